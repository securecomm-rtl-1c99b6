// securecomm_top: the FPGA side of SecureComm. Data move between the ARM CPU
// and an FPGA kernel through two circular queues in shared DDR (bufferA
// CPU->FPGA, bufferB FPGA->CPU). Every frame in DDR is SM4-encrypted and
// carries an encrypted nonce and a MAC, so a snooping or tampering agent on
// the AXI bus or in DDR sees only ciphertext and cannot forge or replay a
// frame; small parameters (addresses, lengths, the low 29 nonce bits, queue
// indices) travel directly over the four 32-bit LITE channels.
//
// Structure (one clock domain):
//   comm_fpga   LITE channels, parameter FIFO, FDMA (AXI4 master), queue
//               indices and bufferB space management
//   secure_fpga SM4 crypto (decrypt/encrypt, one shared pipeline) and MAC
//               verifier; checks received frames, builds result frames
//   FIFO1       frame_fifo: verified plaintext for the kernel; a frame
//               becomes visible only after its MAC passed
//   FIFO2       sync_fifo: the encrypted result frame awaiting the FDMA
//
// External parts, brought out as ports: the DDR (AXI4 master, 128-bit),
// the CPU's LITE channels (the AXI GPIO ports on the board), and the kernel
// (kin_* stream out of FIFO1 with a last flag per frame, kout_* stream of
// results into the encryptor). alarm/fail_flag report an integrity failure,
// alarm_clear is the user's response. Throughput of the crypto is one
// 128-bit block per clock.
module securecomm_top
  import securecomm_pkg::*;
#(
  parameter block_t            KEY         = 128'h0123456789abcdeffedcba9876543210,
  parameter int unsigned       ADDR_W      = 40,
  parameter int unsigned       LEN_W       = 20,
  parameter int unsigned       MAX_SIZE    = 16,
  parameter int unsigned       FIFO1_DEPTH = 1024,
  parameter int unsigned       FIFO2_DEPTH = 1024,
  parameter logic [ADDR_W-1:0] BUFB_BASE   = 40'h00_7000_0000,
  parameter logic [ADDR_W-1:0] BUFB_BYTES  = 40'h00_0100_0000
) (
  input  logic              clk,
  input  logic              rst_n,
  // LITE channels
  input  logic              ch1_valid,
  input  logic [31:0]       ch1_data,
  output logic              ch2_valid,
  input  logic              ch2_ready,
  output logic [31:0]       ch2_data,
  input  logic [31:0]       ch3,
  output logic [31:0]       ch4,
  output logic              alarm,
  output logic              fail_flag,
  input  logic              alarm_clear,
  output logic              axi_err,
  // per-frame status (one-cycle pulses, for monitoring)
  output logic              stat_rx_done,
  output logic              stat_rx_pass,
  output logic              stat_rx_nonce_bad,
  output logic              stat_tx_cut,
  // kernel input (verified plaintext) and output (results)
  output logic              kin_valid,
  input  logic              kin_ready,
  output logic [127:0]      kin_data,
  output logic              kin_last,
  input  logic              kout_valid,
  output logic              kout_ready,
  input  logic [127:0]      kout_data,
  input  logic              kout_last,
  // AXI4 master to DDR
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
  logic                         rxf_valid, rxf_ready, rx_valid, rx_ready, rx_done, rx_pass;
  logic                         rx_nonce_bad, tx_cut;
  logic [LEN_W-1:0]             rxf_len, txf_len;
  logic [28:0]                  rxf_nonce;
  block_t                       rx_data, f2_wdata, f2_rdata;
  logic                         f1_wr, f1_commit, f1_drop;
  logic [128:0]                 f1_wdata, f1_rdata;
  logic [$clog2(FIFO1_DEPTH):0] f1_free;
  logic                         f2_wr, f2_rd, f2_empty, f2_full;
  logic                         txf_valid, txf_ready;

  comm_fpga #(
    .ADDR_W(ADDR_W), .LEN_W(LEN_W), .MAX_SIZE(MAX_SIZE),
    .BUFB_BASE(BUFB_BASE), .BUFB_BYTES(BUFB_BYTES)
  ) u_comm (
    .clk, .rst_n, .ch1_valid, .ch1_data, .ch2_valid, .ch2_ready, .ch2_data, .ch3, .ch4,
    .alarm, .fail_flag, .alarm_clear,
    .rxf_valid, .rxf_ready, .rxf_len, .rxf_nonce, .rx_valid, .rx_ready, .rx_data,
    .rx_done, .rx_pass, .txf_valid, .txf_ready, .txf_len,
    .f2_rd, .f2_data(f2_rdata), .f2_empty,
    .m_axi_araddr, .m_axi_arlen, .m_axi_arsize, .m_axi_arburst, .m_axi_arvalid, .m_axi_arready,
    .m_axi_rdata, .m_axi_rresp, .m_axi_rlast, .m_axi_rvalid, .m_axi_rready,
    .m_axi_awaddr, .m_axi_awlen, .m_axi_awsize, .m_axi_awburst, .m_axi_awvalid, .m_axi_awready,
    .m_axi_wdata, .m_axi_wstrb, .m_axi_wlast, .m_axi_wvalid, .m_axi_wready,
    .m_axi_bresp, .m_axi_bvalid, .m_axi_bready, .axi_err
  );

  secure_fpga #(
    .KEY(KEY), .LEN_W(LEN_W), .FIFO1_DEPTH(FIFO1_DEPTH), .FIFO2_DEPTH(FIFO2_DEPTH)
  ) u_secure (
    .clk, .rst_n, .rxf_valid, .rxf_ready, .rxf_len, .rxf_nonce, .rx_valid, .rx_ready, .rx_data,
    .rx_done, .rx_pass, .rx_nonce_bad,
    .f1_wr, .f1_data(f1_wdata), .f1_commit, .f1_drop, .f1_free,
    .kout_valid, .kout_ready, .kout_data, .kout_last,
    .f2_wr, .f2_data(f2_wdata), .f2_empty, .txf_valid, .txf_ready, .txf_len, .tx_cut
  );

  frame_fifo #(.WIDTH(129), .DEPTH(FIFO1_DEPTH)) u_fifo1 (
    .clk, .rst_n, .wr_en(f1_wr), .wr_data(f1_wdata), .commit(f1_commit), .drop(f1_drop),
    .free(f1_free), .rd_valid(kin_valid), .rd_ready(kin_ready), .rd_data(f1_rdata)
  );
  assign {kin_last, kin_data} = f1_rdata;

  sync_fifo #(.WIDTH(128), .DEPTH(FIFO2_DEPTH)) u_fifo2 (
    .clk, .rst_n, .wr_en(f2_wr), .wr_data(f2_wdata), .full(f2_full), .rd_en(f2_rd),
    .rd_data(f2_rdata), .empty(f2_empty), .count()
  );

  assign stat_rx_done      = rx_done;
  assign stat_rx_pass      = rx_pass;
  assign stat_rx_nonce_bad = rx_nonce_bad;
  assign stat_tx_cut       = tx_cut;

  a_fifo2_room: assert property (@(posedge clk) disable iff (!rst_n) f2_wr |-> !f2_full);
endmodule
