// fdma: the DMA engine of CommFPGA. It hides the AXI4 (full) protocol behind
// a simple application interface: a read or write request is a byte address
// and a length in 128-bit beats; read data come back as a valid/ready stream,
// write data are taken as a valid/ready stream. Read and write engines are
// independent and can run at the same time (AXI read and write channels are
// separate).
//
// Each transfer is cut into INCR bursts of at most MAX_BURST beats that
// never cross a 4 KB boundary (an AXI4 rule). The read engine issues the next
// AR as soon as the previous one is accepted (several bursts outstanding, one
// ID, so data return in order); the write engine sends AW, then the burst's W
// beats with WLAST, then the next AW, and counts B responses. rd_done /
// wr_done pulse when the last read beat has been handed over / the last write
// response has arrived. A non-OKAY response sets the sticky err flag.
// Addresses must be 16-byte aligned. Beat size 16 bytes (AxSIZE = 4), all
// write strobes set. The data width and burst policy are this design's
// choice; the SecureComm description names the FDMA and its purpose only.
module fdma #(
  parameter int unsigned ADDR_W    = 40,
  parameter int unsigned LEN_W     = 20,
  parameter int unsigned MAX_BURST = 256
) (
  input  logic              clk,
  input  logic              rst_n,
  // application read interface
  input  logic              rd_req_valid,
  output logic              rd_req_ready,
  input  logic [ADDR_W-1:0] rd_req_addr,
  input  logic [LEN_W-1:0]  rd_req_len,
  output logic              rd_valid,
  input  logic              rd_ready,
  output logic [127:0]      rd_data,
  output logic              rd_done,
  // application write interface
  input  logic              wr_req_valid,
  output logic              wr_req_ready,
  input  logic [ADDR_W-1:0] wr_req_addr,
  input  logic [LEN_W-1:0]  wr_req_len,
  input  logic              wr_valid,
  output logic              wr_ready,
  input  logic [127:0]      wr_data,
  output logic              wr_done,
  output logic              err,
  // AXI4 master
  output logic [ADDR_W-1:0] m_axi_araddr,
  output logic [7:0]        m_axi_arlen,
  output logic [2:0]        m_axi_arsize,
  output logic [1:0]        m_axi_arburst,
  output logic              m_axi_arvalid,
  input  logic              m_axi_arready,
  input  logic [127:0]      m_axi_rdata,
  input  logic [1:0]        m_axi_rresp,
  input  logic              m_axi_rlast,
  input  logic              m_axi_rvalid,
  output logic              m_axi_rready,
  output logic [ADDR_W-1:0] m_axi_awaddr,
  output logic [7:0]        m_axi_awlen,
  output logic [2:0]        m_axi_awsize,
  output logic [1:0]        m_axi_awburst,
  output logic              m_axi_awvalid,
  input  logic              m_axi_awready,
  output logic [127:0]      m_axi_wdata,
  output logic [15:0]       m_axi_wstrb,
  output logic              m_axi_wlast,
  output logic              m_axi_wvalid,
  input  logic              m_axi_wready,
  input  logic [1:0]        m_axi_bresp,
  input  logic              m_axi_bvalid,
  output logic              m_axi_bready
);
  // beats allowed in the next burst, given the beat index inside the current
  // 4 KB page and rem beats left
  function automatic logic [8:0] burst_beats(input logic [7:0] beat_in_4k,
                                             input logic [LEN_W-1:0] rem);
    logic [8:0] to_4k;
    logic [8:0] n;
    to_4k = 9'd256 - 9'(beat_in_4k);
    n = (rem < LEN_W'(MAX_BURST)) ? 9'(rem) : 9'(MAX_BURST);
    return (n < to_4k) ? n : to_4k;
  endfunction

  // ---------------- read engine ----------------
  typedef enum logic [1:0] {R_IDLE, R_ADDR, R_DATA} rstate_e;
  rstate_e             rstate;
  logic [ADDR_W-1:0]   r_addr;
  logic [LEN_W-1:0]    r_rem, r_left;   // beats not yet requested / not yet received
  logic [8:0]          r_beats;

  assign r_beats       = burst_beats(r_addr[11:4], r_rem);
  assign rd_req_ready  = rstate == R_IDLE;
  assign m_axi_araddr  = r_addr;
  assign m_axi_arlen   = 8'(r_beats - 9'd1);
  assign m_axi_arsize  = 3'd4;
  assign m_axi_arburst = 2'b01;
  assign m_axi_arvalid = rstate == R_ADDR;
  assign rd_valid      = m_axi_rvalid && rstate != R_IDLE;
  assign rd_data       = m_axi_rdata;
  assign m_axi_rready  = rd_ready && rstate != R_IDLE;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rstate  <= R_IDLE;
      r_addr  <= '0;
      r_rem   <= '0;
      r_left  <= '0;
      rd_done <= 1'b0;
    end else begin
      rd_done <= 1'b0;
      if (m_axi_rvalid && m_axi_rready) begin
        r_left <= r_left - 1'b1;
        if (r_left == LEN_W'(1) && r_rem == '0) begin
          rstate  <= R_IDLE;
          rd_done <= 1'b1;
        end
      end
      unique case (rstate)
        R_IDLE: if (rd_req_valid && rd_req_len != '0) begin
          r_addr <= rd_req_addr;
          r_rem  <= rd_req_len;
          r_left <= rd_req_len;
          rstate <= R_ADDR;
        end
        R_ADDR: if (m_axi_arready) begin
          r_addr <= r_addr + ADDR_W'({r_beats, 4'b0000});
          r_rem  <= r_rem - LEN_W'(r_beats);
          if (r_rem == LEN_W'(r_beats)) rstate <= R_DATA;
        end
        default: ;
      endcase
    end
  end

  // ---------------- write engine ----------------
  typedef enum logic [1:0] {W_IDLE, W_ADDR, W_DATA, W_RESP} wstate_e;
  wstate_e             wstate;
  logic [ADDR_W-1:0]   w_addr;
  logic [LEN_W-1:0]    w_rem;
  logic [8:0]          w_beats, w_cnt;
  logic [LEN_W-1:0]    w_bursts, w_bresp;

  assign w_beats       = burst_beats(w_addr[11:4], w_rem);
  assign wr_req_ready  = wstate == W_IDLE;
  assign m_axi_awaddr  = w_addr;
  assign m_axi_awlen   = 8'(w_beats - 9'd1);
  assign m_axi_awsize  = 3'd4;
  assign m_axi_awburst = 2'b01;
  assign m_axi_awvalid = wstate == W_ADDR;
  assign m_axi_wdata   = wr_data;
  assign m_axi_wstrb   = '1;
  assign m_axi_wvalid  = wstate == W_DATA && wr_valid;
  assign wr_ready      = wstate == W_DATA && m_axi_wready;
  assign m_axi_bready  = 1'b1;

  logic [8:0] w_len_q;    // beats of the burst in flight
  assign m_axi_wlast = w_cnt == w_len_q - 9'd1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wstate   <= W_IDLE;
      w_addr   <= '0;
      w_rem    <= '0;
      w_cnt    <= '0;
      w_len_q  <= '0;
      w_bursts <= '0;
      w_bresp  <= '0;
      wr_done  <= 1'b0;
    end else begin
      wr_done <= 1'b0;
      if (m_axi_bvalid) w_bresp <= w_bresp + 1'b1;
      unique case (wstate)
        W_IDLE: if (wr_req_valid && wr_req_len != '0) begin
          w_addr   <= wr_req_addr;
          w_rem    <= wr_req_len;
          w_bursts <= '0;
          w_bresp  <= '0;
          wstate   <= W_ADDR;
        end
        W_ADDR: if (m_axi_awready) begin
          w_len_q  <= w_beats;
          w_cnt    <= '0;
          w_addr   <= w_addr + ADDR_W'({w_beats, 4'b0000});
          w_rem    <= w_rem - LEN_W'(w_beats);
          w_bursts <= w_bursts + 1'b1;
          wstate   <= W_DATA;
        end
        W_DATA: if (m_axi_wvalid && m_axi_wready) begin
          w_cnt <= w_cnt + 1'b1;
          if (m_axi_wlast) wstate <= (w_rem == '0) ? W_RESP : W_ADDR;
        end
        W_RESP: if (w_bresp + LEN_W'(m_axi_bvalid) == w_bursts) begin
          wstate  <= W_IDLE;
          wr_done <= 1'b1;
        end
        default: ;
      endcase
    end
  end

  // sticky error on any non-OKAY response
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) err <= 1'b0;
    else if ((m_axi_rvalid && m_axi_rready && m_axi_rresp != 2'b00) ||
             (m_axi_bvalid && m_axi_bresp != 2'b00)) err <= 1'b1;
  end

  a_ar_stable: assert property (@(posedge clk) disable iff (!rst_n)
    m_axi_arvalid && !m_axi_arready |=> m_axi_arvalid && $stable(m_axi_araddr));
  a_aw_stable: assert property (@(posedge clk) disable iff (!rst_n)
    m_axi_awvalid && !m_axi_awready |=> m_axi_awvalid && $stable(m_axi_awaddr));
  // the final beat of a transfer must close a burst
  a_rlast: assert property (@(posedge clk) disable iff (!rst_n)
    m_axi_rvalid && m_axi_rready && r_left == LEN_W'(1) && r_rem == '0 |-> m_axi_rlast);
endmodule
