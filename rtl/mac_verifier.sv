// mac_verifier: the MAC unit of SecureFPGA, used both to verify received
// frames and to generate the MAC of result frames. For a message of
// 128-bit blocks M0..Mn-1 (zero padded by the sender) and a 128-bit nonce N:
//   T   = M0 ^ M1 ^ ... ^ Mn-1            (accumulated as blocks stream by)
//   C   = E(T ^ N)                         (first request to the SM4 crypto)
//   C0, C1 = ASCII hex characters of C[127:64] and C[63:0], upper case
//   MAC = E(C0 ^ C1)                       (second request to the SM4 crypto)
// The unit owns no cipher: it issues its two encryptions through a
// request/response port to the shared SM4 crypto (encryption, fixed key) and
// waits for each result.
//
// Interface: clear starts a new message (T = 0); nonce_load captures N (may
// come any time before finish); blk_valid adds blk_data into T; finish
// (after, or together with, the last block) starts the two encryptions.
// done pulses with mac and match = (mac == exp_mac), exp_mac being the MAC
// read from the received frame (ignored when generating). busy is high from
// finish to done. With the 34-cycle crypto latency a MAC takes about 72
// cycles after finish.
module mac_verifier
  import securecomm_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   clear,
  input  logic   nonce_load,
  input  block_t nonce,
  input  logic   blk_valid,
  input  block_t blk_data,
  input  logic   finish,
  input  block_t exp_mac,
  // to the shared crypto (encrypt, fixed key)
  output logic   req_valid,
  input  logic   req_ready,
  output block_t req_data,
  input  logic   rsp_valid,
  input  block_t rsp_data,
  // result
  output logic   busy,
  output logic   done,
  output block_t mac,
  output logic   match
);
  typedef enum logic [2:0] {S_IDLE, S_REQ1, S_WAIT1, S_REQ2, S_WAIT2, S_DONE} state_e;
  state_e state;
  block_t t_q, n_q, c_q;
  logic [255:0] cx;

  assign cx = hex_expand(c_q);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      t_q   <= '0;
      n_q   <= '0;
      c_q   <= '0;
      mac   <= '0;
    end else begin
      if (nonce_load) n_q <= nonce;
      if (clear)          t_q <= '0;
      else if (blk_valid) t_q <= t_q ^ blk_data;
      unique case (state)
        S_IDLE:  if (finish) state <= S_REQ1;
        S_REQ1:  if (req_ready) state <= S_WAIT1;
        S_WAIT1: if (rsp_valid) begin c_q <= rsp_data; state <= S_REQ2; end
        S_REQ2:  if (req_ready) state <= S_WAIT2;
        S_WAIT2: if (rsp_valid) begin mac <= rsp_data; state <= S_DONE; end
        S_DONE:  state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    req_valid = state inside {S_REQ1, S_REQ2};
    req_data  = (state == S_REQ1) ? (t_q ^ n_q) : (cx[255:128] ^ cx[127:0]);
  end

  assign busy  = state != S_IDLE;
  assign done  = state == S_DONE;
  assign match = mac == exp_mac;

  a_no_block_while_busy: assert property (@(posedge clk) disable iff (!rst_n)
    busy |-> !blk_valid);
  a_no_stray_response: assert property (@(posedge clk) disable iff (!rst_n)
    rsp_valid |-> state inside {S_WAIT1, S_WAIT2});
endmodule
