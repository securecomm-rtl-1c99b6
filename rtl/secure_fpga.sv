// secure_fpga: SecureFPGA, the security datapath on the FPGA side. It owns
// the single SM4 crypto engine (used as decryptor and encryptor) and the MAC
// verifier, and handles one frame at a time in either direction.
//
// Frame layout (128-bit blocks, as stored in DDR):
//   0: nonce_full = E(N)   1: reserved   2..n+1: E(M0..Mn-1)   n+2: MAC
// with MAC computed over the plaintext M and N (Encrypt-and-MAC).
//
// Receive (CPU -> FPGA): after a frame descriptor (n, nonce_lite) is
// accepted, the ciphertext blocks arrive from the FDMA. The nonce block and
// the data blocks enter the crypto in decrypt mode back to back; the
// reserved block is skipped; the MAC block is kept. The decrypted nonce N is
// checked against nonce_lite (N[28:0], sent over LITE channel 1) and loaded
// into the MAC verifier; each decrypted data block is written to FIFO1 and
// folded into the MAC as it leaves the pipeline. When the verifier is done,
// the frame passes if the nonce pair matches and the MAC matches: FIFO1 is
// then committed (the kernel may read the frame), otherwise FIFO1 drops the
// frame. rx_done/rx_pass report the outcome. A frame is accepted only when
// FIFO1 has room for all n blocks; a frame longer than FIFO1 is read and
// failed without being stored.
//
// Transmit (FPGA -> CPU): once a frame has passed, its N and nonce_full are
// kept for replies. A kernel result frame (stream with last) is built in
// FIFO2: nonce_full and the reserved block first, then each kernel block is
// sent to the encryptor and to the MAC verifier in the same cycle; the
// ciphertext is written to FIFO2 as it leaves the pipeline, and the MAC last.
// txf_valid/txf_len then hand the frame to CommFPGA. A result frame is cut
// at TX_MAX blocks if the kernel has not ended it, so that it always fits
// FIFO2; a new result frame starts only when FIFO2 is empty.
//
// The crypto's requests come from the frame stream or from the MAC verifier
// (which has priority); its results are routed by tag. The SecureComm description shares
// one crypto and one verifier between both directions; serving one frame at
// a time is this design's simplest way to do that.
module secure_fpga
  import securecomm_pkg::*;
#(
  parameter block_t      KEY         = 128'h0123456789abcdeffedcba9876543210,
  parameter int unsigned LEN_W       = 20,
  parameter int unsigned FIFO1_DEPTH = 1024,
  parameter int unsigned FIFO2_DEPTH = 1024
) (
  input  logic                         clk,
  input  logic                         rst_n,
  // receive frame descriptor and ciphertext stream
  input  logic                         rxf_valid,
  output logic                         rxf_ready,
  input  logic [LEN_W-1:0]             rxf_len,      // data blocks
  input  logic [28:0]                  rxf_nonce,    // nonce_lite
  input  logic                         rx_valid,
  output logic                         rx_ready,
  input  block_t                       rx_data,
  output logic                         rx_done,
  output logic                         rx_pass,
  output logic                         rx_nonce_bad, // with rx_done: nonce pair mismatch
  // FIFO1 write side
  output logic                         f1_wr,
  output logic [128:0]                 f1_data,      // {last, plaintext}
  output logic                         f1_commit,
  output logic                         f1_drop,
  input  logic [$clog2(FIFO1_DEPTH):0] f1_free,
  // kernel results
  input  logic                         kout_valid,
  output logic                         kout_ready,
  input  block_t                       kout_data,
  input  logic                         kout_last,
  // FIFO2 write side and result frame handover
  output logic                         f2_wr,
  output block_t                       f2_data,
  input  logic                         f2_empty,
  output logic                         txf_valid,
  input  logic                         txf_ready,
  output logic [LEN_W-1:0]             txf_len,
  output logic                         tx_cut        // pulse: result frame cut at TX_MAX
);
  localparam int unsigned TX_MAX = FIFO2_DEPTH - FRAME_OVERHEAD;

  typedef enum logic [3:0] {
    S_IDLE, S_RX, S_RX_WAIT, S_TX_H0, S_TX_H1, S_TX, S_TX_WAIT, S_TX_MAC, S_TX_HAND
  } state_e;
  state_e state;

  // frame bookkeeping
  logic [LEN_W-1:0] n_q;         // data blocks of the frame
  logic [LEN_W:0]   in_idx;      // receive: index of the next frame block
  logic [LEN_W-1:0] out_cnt;     // data results seen
  logic [28:0]      lite_q;
  logic             oversize_q, nonce_ok_q, mac_blk_seen;
  block_t           exp_mac_q, n_pend_q, nf_pend_q, n_q128, nf_q;
  logic             have_nonce_q;

  // crypto
  logic             c_in_valid, c_in_ready, c_out_valid;
  crypto_mode_e     c_mode;
  block_t           c_in_data, c_out_data;
  logic [1:0]       c_in_tag, c_out_tag;

  // MAC verifier
  logic   m_clear, m_nonce_load, m_blk_valid, m_finish;
  block_t m_nonce, m_blk;
  logic   m_req_valid, m_req_ready, m_rsp_valid, m_busy, m_done, m_match;
  block_t m_req_data, m_mac;

  sm4_crypto #(.KEY(KEY), .TAG_W(2)) u_crypto (
    .clk, .rst_n, .in_valid(c_in_valid), .in_ready(c_in_ready), .in_mode(c_mode),
    .in_key('0), .in_data(c_in_data), .in_tag(c_in_tag),
    .out_valid(c_out_valid), .out_data(c_out_data), .out_tag(c_out_tag)
  );

  mac_verifier u_mac (
    .clk, .rst_n, .clear(m_clear), .nonce_load(m_nonce_load), .nonce(m_nonce),
    .blk_valid(m_blk_valid), .blk_data(m_blk), .finish(m_finish), .exp_mac(exp_mac_q),
    .req_valid(m_req_valid), .req_ready(m_req_ready), .req_data(m_req_data),
    .rsp_valid(m_rsp_valid), .rsp_data(c_out_data),
    .busy(m_busy), .done(m_done), .mac(m_mac), .match(m_match)
  );

  // ---------------- stream side of the crypto input ----------------
  logic rx_is_nonce, rx_is_rsvd, rx_is_data, rx_is_mac;
  logic rx_take, k_take, tx_room;
  logic [LEN_W-1:0] k_cnt;       // kernel blocks accepted in this result frame

  assign rx_is_nonce = in_idx == '0;
  assign rx_is_rsvd  = in_idx == (LEN_W + 1)'(1);
  assign rx_is_mac   = in_idx == (LEN_W + 1)'(n_q) + (LEN_W + 1)'(2);
  assign rx_is_data  = !rx_is_nonce && !rx_is_rsvd && !rx_is_mac;

  always_comb begin
    rx_ready = 1'b0;
    if (state == S_RX && !mac_blk_seen)
      rx_ready = (rx_is_rsvd || rx_is_mac) ? 1'b1 : (c_in_ready && !m_req_valid);
  end
  assign rx_take = rx_valid && rx_ready;

  assign tx_room    = k_cnt < LEN_W'(TX_MAX);
  assign kout_ready = state == S_TX && c_in_ready && !m_req_valid && tx_room;
  assign k_take     = kout_valid && kout_ready;

  always_comb begin
    c_in_valid  = 1'b0;
    c_mode      = CM_ENC;
    c_in_data   = m_req_data;
    c_in_tag    = TAG_MAC;
    m_req_ready = c_in_ready;
    if (m_req_valid) begin
      c_in_valid = 1'b1;
    end else if (rx_take && (rx_is_nonce || rx_is_data)) begin
      c_in_valid = 1'b1;
      c_mode     = CM_DEC;
      c_in_data  = rx_data;
      c_in_tag   = rx_is_nonce ? TAG_NONCE : TAG_DATA;
    end else if (k_take) begin
      c_in_valid = 1'b1;
      c_mode     = CM_ENC;
      c_in_data  = kout_data;
      c_in_tag   = TAG_DATA;
    end
  end

  // ---------------- crypto results ----------------
  logic res_nonce, res_data, rx_mode;
  assign rx_mode     = state inside {S_RX, S_RX_WAIT};
  assign res_nonce   = c_out_valid && c_out_tag == TAG_NONCE;
  assign res_data    = c_out_valid && c_out_tag == TAG_DATA;
  assign m_rsp_valid = c_out_valid && c_out_tag == TAG_MAC;

  logic last_rx_data;
  assign last_rx_data = res_data && rx_mode && out_cnt == n_q - 1'b1;

  always_comb begin
    m_clear      = 1'b0;
    m_nonce_load = 1'b0;
    m_nonce      = c_out_data;
    m_blk_valid  = 1'b0;
    m_blk        = c_out_data;
    m_finish     = 1'b0;
    if (state == S_IDLE) m_clear = 1'b1;
    if (rx_mode) begin
      m_nonce_load = res_nonce;
      m_blk_valid  = res_data;
      m_finish     = (res_nonce && n_q == '0) || last_rx_data;
    end else if (state == S_TX_H0) begin
      m_nonce_load = 1'b1;
      m_nonce      = n_q128;
    end else if (state == S_TX) begin
      m_blk_valid  = k_take;
      m_blk        = kout_data;
      m_finish     = k_take && (kout_last || k_cnt == LEN_W'(TX_MAX - 1));
    end
  end

  // FIFO1 writes: decrypted data in receive mode
  assign f1_wr   = res_data && rx_mode && !oversize_q;
  assign f1_data = {last_rx_data, c_out_data};

  // FIFO2 writes: header, ciphertext, MAC
  always_comb begin
    f2_wr   = 1'b0;
    f2_data = c_out_data;
    unique case (state)
      S_TX_H0:  begin f2_wr = 1'b1; f2_data = nf_q; end
      S_TX_H1:  begin f2_wr = 1'b1; f2_data = '0;   end
      S_TX_MAC: begin f2_wr = 1'b1; f2_data = m_mac; end
      S_TX, S_TX_WAIT: f2_wr = res_data;
      default: ;
    endcase
  end

  // frame decision
  logic rx_fin, pass;
  assign rx_fin  = state == S_RX_WAIT && m_done;
  assign pass    = nonce_ok_q && m_match && !oversize_q;
  assign f1_commit = rx_fin && pass;
  assign f1_drop   = rx_fin && !pass;

  assign rxf_ready = state == S_IDLE &&
                     (f1_free >= ($clog2(FIFO1_DEPTH) + 1)'(rxf_len) || rxf_len > LEN_W'(FIFO1_DEPTH));
  assign txf_valid = state == S_TX_HAND;
  assign txf_len   = k_cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= S_IDLE;
      n_q          <= '0;
      in_idx       <= '0;
      out_cnt      <= '0;
      lite_q       <= '0;
      oversize_q   <= 1'b0;
      nonce_ok_q   <= 1'b0;
      mac_blk_seen <= 1'b0;
      exp_mac_q    <= '0;
      n_pend_q     <= '0;
      nf_pend_q    <= '0;
      n_q128       <= '0;
      nf_q         <= '0;
      have_nonce_q <= 1'b0;
      k_cnt        <= '0;
      rx_done      <= 1'b0;
      rx_pass      <= 1'b0;
      rx_nonce_bad <= 1'b0;
      tx_cut       <= 1'b0;
    end else begin
      rx_done <= 1'b0;
      tx_cut  <= 1'b0;
      if (res_data) out_cnt <= out_cnt + 1'b1;
      unique case (state)
        S_IDLE: begin
          in_idx       <= '0;
          out_cnt      <= '0;
          k_cnt        <= '0;
          mac_blk_seen <= 1'b0;
          if (rxf_valid && rxf_ready) begin
            n_q        <= rxf_len;
            lite_q     <= rxf_nonce;
            oversize_q <= rxf_len > LEN_W'(FIFO1_DEPTH);
            nonce_ok_q <= 1'b0;
            state      <= S_RX;
          end else if (kout_valid && have_nonce_q && f2_empty && c_in_ready) begin
            state <= S_TX_H0;
          end
        end
        S_RX: begin
          if (rx_take) begin
            in_idx <= in_idx + 1'b1;
            if (rx_is_nonce) nf_pend_q <= rx_data;
            if (rx_is_mac) begin
              exp_mac_q    <= rx_data;
              mac_blk_seen <= 1'b1;
              state        <= S_RX_WAIT;
            end
          end
        end
        S_RX_WAIT: if (m_done) begin
          rx_done      <= 1'b1;
          rx_pass      <= pass;
          rx_nonce_bad <= !nonce_ok_q;
          if (pass) begin
            n_q128       <= n_pend_q;
            nf_q         <= nf_pend_q;
            have_nonce_q <= 1'b1;
          end
          state <= S_IDLE;
        end
        S_TX_H0: state <= S_TX_H1;
        S_TX_H1: state <= S_TX;
        S_TX: if (k_take) begin
          k_cnt <= k_cnt + 1'b1;
          if (kout_last || k_cnt == LEN_W'(TX_MAX - 1)) begin
            tx_cut <= !kout_last;
            state  <= S_TX_WAIT;
          end
        end
        S_TX_WAIT: if (m_done) state <= S_TX_MAC;
        S_TX_MAC:  state <= S_TX_HAND;
        S_TX_HAND: if (txf_ready) state <= S_IDLE;
        default:   state <= S_IDLE;
      endcase
      if (res_nonce && rx_mode) begin
        n_pend_q   <= c_out_data;
        nonce_ok_q <= c_out_data[28:0] == lite_q;
      end
    end
  end

  a_mac_idle: assert property (@(posedge clk) disable iff (!rst_n)
    state == S_IDLE |-> !m_busy);
  a_f1_room: assert property (@(posedge clk) disable iff (!rst_n) f1_wr |-> f1_free != '0);
  a_one_frame: assert property (@(posedge clk) disable iff (!rst_n)
    res_data |-> state inside {S_RX, S_RX_WAIT, S_TX, S_TX_WAIT});
endmodule
