// comm_fpga: CommFPGA, the communication side of the FPGA. It contains the
// LITE channel logic and the FDMA, and runs the two shared-memory queues:
//
// bufferA (CPU -> FPGA): the CPU owns bufferA_rear (channel 3), the FPGA owns
// bufferA_front (channel 4). While the queue is not empty (front != rear) and
// a parameter set is waiting in the parameter FIFO, the frame descriptor is
// handed to SecureFPGA (which accepts it when FIFO1 has room) and the FDMA
// reads the n+3 blocks of the frame from base_addr. When SecureFPGA reports
// the result, the integrity status goes out on channel 2. On a pass the front
// advances: front = (front + 1) % MAX_SIZE. On a failure the frame is
// dropped, fail_flag and alarm are raised and the receive side waits for the
// user's response (alarm_clear); the front then advances past the rejected
// frame.
//
// bufferB (FPGA -> CPU): the FPGA owns bufferB_rear, the CPU owns
// bufferB_front. When SecureFPGA has a result frame in FIFO2, CommFPGA checks
// that the queue is not full and finds room for the frame in the bufferB
// region [BUFB_BASE, BUFB_BASE + BUFB_BYTES): frames are placed one after the
// other and wrap to the start of the region when the end is reached; the
// space of frames the CPU has consumed (those before bufferB_front) is
// reclaimed by remembering each slot's start address. The FDMA writes the
// frame, the base address and length go out on channel 2, and then the rear
// advances: rear = (rear + 1) % MAX_SIZE.
//
// The receive and transmit sides run independently (AXI read and write
// channels). Frames are 16-byte aligned; lengths on the LITE channels count
// 128-bit data blocks. The placement policy inside bufferB, the alarm
// response and the queue depth MAX_SIZE are this design's choices; the
// SecureComm protocol leaves the sender free to place frames anywhere in its buffer.
module comm_fpga
  import securecomm_pkg::*;
#(
  parameter int unsigned       ADDR_W     = 40,
  parameter int unsigned       LEN_W      = 20,
  parameter int unsigned       MAX_SIZE   = 16,
  parameter logic [ADDR_W-1:0] BUFB_BASE  = 40'h00_7000_0000,
  parameter logic [ADDR_W-1:0] BUFB_BYTES = 40'h00_0100_0000
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
  // user response to an integrity alarm
  output logic              alarm,
  output logic              fail_flag,
  input  logic              alarm_clear,
  // to / from SecureFPGA, receive side
  output logic              rxf_valid,
  input  logic              rxf_ready,
  output logic [LEN_W-1:0]  rxf_len,
  output logic [28:0]       rxf_nonce,
  output logic              rx_valid,
  input  logic              rx_ready,
  output logic [127:0]      rx_data,
  input  logic              rx_done,
  input  logic              rx_pass,
  // transmit side: FIFO2 read and frame handover
  input  logic              txf_valid,
  output logic              txf_ready,
  input  logic [LEN_W-1:0]  txf_len,
  output logic              f2_rd,
  input  logic [127:0]      f2_data,
  input  logic              f2_empty,
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
  output logic              m_axi_bready,
  output logic              axi_err
);
  localparam int unsigned IW = $clog2(MAX_SIZE);
  localparam logic [ADDR_W-1:0] BUFB_END = BUFB_BASE + BUFB_BYTES;

  function automatic logic [15:0] next_idx(input logic [15:0] i);
    return (i == 16'(MAX_SIZE - 1)) ? 16'd0 : i + 16'd1;
  endfunction

  // ---------------- LITE channels ----------------
  logic              prm_valid, prm_pop;
  logic [ADDR_W-1:0] prm_addr;
  logic [28:0]       prm_len, prm_nonce;
  logic              st_valid, st_ready, st_pass_q;
  logic              tx_valid, tx_ready;
  logic [15:0]       bufa_rear, bufb_front, bufa_front, bufb_rear;
  logic [ADDR_W-1:0] tx_addr_q;
  logic [LEN_W-1:0]  tx_len_q;

  lite_channels #(.ADDR_W(ADDR_W), .PARAM_DEPTH(MAX_SIZE)) u_lite (
    .clk, .rst_n, .ch1_valid, .ch1_data, .prm_valid, .prm_pop, .prm_addr, .prm_len,
    .prm_nonce, .ch2_valid, .ch2_ready, .ch2_data, .st_valid, .st_ready, .st_pass(st_pass_q),
    .tx_valid, .tx_ready, .tx_addr(tx_addr_q), .tx_len(29'(tx_len_q)), .ch3, .bufa_rear,
    .bufb_front, .bufa_front, .bufb_rear, .ch4
  );

  // ---------------- FDMA ----------------
  logic              rd_req_valid, rd_req_ready, rd_done;
  logic              wr_req_valid, wr_req_ready, wr_done;
  logic [ADDR_W-1:0] rd_addr_q;
  logic [LEN_W-1:0]  rd_len_q;

  fdma #(.ADDR_W(ADDR_W), .LEN_W(LEN_W)) u_fdma (
    .clk, .rst_n,
    .rd_req_valid, .rd_req_ready, .rd_req_addr(rd_addr_q), .rd_req_len(rd_len_q),
    .rd_valid(rx_valid), .rd_ready(rx_ready), .rd_data(rx_data), .rd_done,
    .wr_req_valid, .wr_req_ready, .wr_req_addr(tx_addr_q), .wr_req_len(tx_len_q + LEN_W'(FRAME_OVERHEAD)),
    .wr_valid(!f2_empty), .wr_ready(f2_rd), .wr_data(f2_data), .wr_done, .err(axi_err),
    .m_axi_araddr, .m_axi_arlen, .m_axi_arsize, .m_axi_arburst, .m_axi_arvalid, .m_axi_arready,
    .m_axi_rdata, .m_axi_rresp, .m_axi_rlast, .m_axi_rvalid, .m_axi_rready,
    .m_axi_awaddr, .m_axi_awlen, .m_axi_awsize, .m_axi_awburst, .m_axi_awvalid, .m_axi_awready,
    .m_axi_wdata, .m_axi_wstrb, .m_axi_wlast, .m_axi_wvalid, .m_axi_wready,
    .m_axi_bresp, .m_axi_bvalid, .m_axi_bready
  );

  // ---------------- receive side (bufferA) ----------------
  typedef enum logic [2:0] {R_IDLE, R_DESC, R_READ, R_WAIT, R_STATUS, R_ALARM} rstate_e;
  rstate_e     rstate;
  logic [15:0] a_front_q;
  logic        rd_finished_q, res_seen_q;

  assign bufa_front   = a_front_q;
  assign rxf_valid    = rstate == R_DESC;
  assign rxf_len      = LEN_W'(prm_len);
  assign rxf_nonce    = prm_nonce;
  assign prm_pop      = rxf_valid && rxf_ready;
  assign rd_req_valid = rstate == R_READ;
  assign st_valid     = rstate == R_STATUS;
  assign alarm        = rstate == R_ALARM;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rstate        <= R_IDLE;
      a_front_q     <= '0;
      rd_addr_q     <= '0;
      rd_len_q      <= '0;
      st_pass_q     <= 1'b0;
      fail_flag     <= 1'b0;
      rd_finished_q <= 1'b0;
      res_seen_q    <= 1'b0;
    end else begin
      unique case (rstate)
        R_IDLE: if (prm_valid && a_front_q != bufa_rear) rstate <= R_DESC;
        R_DESC: if (rxf_ready) begin
          rd_addr_q     <= prm_addr;
          rd_len_q      <= LEN_W'(prm_len) + LEN_W'(FRAME_OVERHEAD);
          rd_finished_q <= 1'b0;
          res_seen_q    <= 1'b0;
          rstate        <= R_READ;
        end
        R_READ: if (rd_req_ready) rstate <= R_WAIT;
        R_WAIT: begin
          if (rd_done) rd_finished_q <= 1'b1;
          if (rx_done) begin
            res_seen_q <= 1'b1;
            st_pass_q  <= rx_pass;
          end
          if ((rd_done || rd_finished_q) && (rx_done || res_seen_q)) rstate <= R_STATUS;
        end
        R_STATUS: if (st_ready) begin
          if (st_pass_q) begin
            a_front_q <= next_idx(a_front_q);
            rstate    <= R_IDLE;
          end else begin
            fail_flag <= 1'b1;
            rstate    <= R_ALARM;
          end
        end
        R_ALARM: if (alarm_clear) begin
          a_front_q <= next_idx(a_front_q);
          fail_flag <= 1'b0;
          rstate    <= R_IDLE;
        end
        default: rstate <= R_IDLE;
      endcase
    end
  end

  // ---------------- transmit side (bufferB) ----------------
  typedef enum logic [1:0] {T_IDLE, T_REQ, T_WRITE, T_MSG} tstate_e;
  tstate_e           tstate;
  logic [15:0]       b_rear_q;
  logic [ADDR_W-1:0] wp_q;
  logic [ADDR_W-1:0] slot_addr [MAX_SIZE];
  logic [ADDR_W-1:0] need, oldest, place;
  logic              q_empty, q_full, fits;

  assign bufb_rear = b_rear_q;
  assign q_empty   = b_rear_q == bufb_front;
  assign q_full    = next_idx(b_rear_q) == bufb_front;
  assign need      = ADDR_W'({txf_len + LEN_W'(FRAME_OVERHEAD), 4'b0000});
  assign oldest    = slot_addr[bufb_front[IW-1:0]];

  // first-fit placement in the bufferB ring
  always_comb begin
    fits  = 1'b0;
    place = BUFB_BASE;
    if (q_empty) begin
      fits = need <= BUFB_BYTES;
    end else if (wp_q > oldest) begin
      if (wp_q + need <= BUFB_END) begin
        fits  = 1'b1;
        place = wp_q;
      end else if (BUFB_BASE + need <= oldest) begin
        fits  = 1'b1;
      end
    end else if (wp_q + need <= oldest) begin
      fits  = 1'b1;
      place = wp_q;
    end
  end

  assign txf_ready    = tstate == T_IDLE && !q_full && fits;
  assign wr_req_valid = tstate == T_REQ;
  assign tx_valid     = tstate == T_MSG;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tstate    <= T_IDLE;
      b_rear_q  <= '0;
      wp_q      <= BUFB_BASE;
      tx_addr_q <= '0;
      tx_len_q  <= '0;
      for (int i = 0; i < MAX_SIZE; i++) slot_addr[i] <= BUFB_BASE;
    end else begin
      unique case (tstate)
        T_IDLE: if (txf_valid && txf_ready) begin
          tx_addr_q <= place;
          tx_len_q  <= txf_len;
          wp_q      <= place + need;
          tstate    <= T_REQ;
        end
        T_REQ:   if (wr_req_ready) tstate <= T_WRITE;
        T_WRITE: if (wr_done) tstate <= T_MSG;
        T_MSG: if (tx_ready) begin
          slot_addr[b_rear_q[IW-1:0]] <= tx_addr_q;
          b_rear_q <= next_idx(b_rear_q);
          tstate   <= T_IDLE;
        end
        default: tstate <= T_IDLE;
      endcase
    end
  end

  a_front_in_range: assert property (@(posedge clk) disable iff (!rst_n) a_front_q < 16'(MAX_SIZE));
  a_rear_in_range:  assert property (@(posedge clk) disable iff (!rst_n) b_rear_q < 16'(MAX_SIZE));
endmodule
