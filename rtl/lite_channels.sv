// lite_channels: the FPGA end of the four 32-bit LITE channels between the
// CPU driver and CommFPGA (on the board they are AXI GPIO ports).
//
// Channel 1 (CPU -> FPGA) carries messages selected by bits [31:29]:
//   001 base_addr_H, 010 base_addr_L, 011 data_len, 100 nonce[28:0].
// The address is {H, L[28:0]}, so H holds the bits above bit 28. A frame's
// parameters are collected in holding registers; the nonce message, the last
// one the CPU sends for a frame, pushes {base_addr, data_len, nonce_lite}
// into the parameter FIFO. Other opcodes are ignored.
// Channel 2 (FPGA -> CPU) carries 001 base_addr_H, 010 base_addr_L,
// 011 data_len of a result frame (sent as a group of three), and 111 with
// payload 0 (integrity passed) or 1 (integrity failed) for a received frame.
// Status messages take priority between groups.
// Channel 3 (written by the CPU) = {bufferA_rear, bufferB_front};
// channel 4 (written by the FPGA) = {bufferA_front, bufferB_rear}.
//
// Handshake: ch1_valid marks a new channel-1 word for one cycle; channel 2 is
// a valid/ready pair. These strobes stand for the GPIO driver's write and
// read events; the SecureComm description gives the message layout, the strobes and the
// rule that the nonce message completes a parameter set are this design's
// choice. data_len counts 128-bit data blocks of the frame.
module lite_channels
  import securecomm_pkg::*;
#(
  parameter int unsigned ADDR_W      = 40,
  parameter int unsigned PARAM_DEPTH = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  // channel 1
  input  logic              ch1_valid,
  input  logic [31:0]       ch1_data,
  // parameter FIFO read side
  output logic              prm_valid,
  input  logic              prm_pop,
  output logic [ADDR_W-1:0] prm_addr,
  output logic [28:0]       prm_len,
  output logic [28:0]       prm_nonce,
  // channel 2
  output logic              ch2_valid,
  input  logic              ch2_ready,
  output logic [31:0]       ch2_data,
  input  logic              st_valid,     // integrity result of a received frame
  output logic              st_ready,
  input  logic              st_pass,
  input  logic              tx_valid,     // parameters of a result frame
  output logic              tx_ready,
  input  logic [ADDR_W-1:0] tx_addr,
  input  logic [28:0]       tx_len,
  // channels 3 and 4
  input  logic [31:0]       ch3,
  output logic [15:0]       bufa_rear,
  output logic [15:0]       bufb_front,
  input  logic [15:0]       bufa_front,
  input  logic [15:0]       bufb_rear,
  output logic [31:0]       ch4
);
  localparam int unsigned PW = ADDR_W + 29 + 29;

  // ---------------- channel 1 ----------------
  logic [ADDR_W-1:0] addr_q;
  logic [28:0]       len_q;
  logic              push, empty, full;
  logic [PW-1:0]     fifo_out;
  lite_op_e          op1;

  assign op1  = lite_op_e'(ch1_data[31:29]);
  assign push = ch1_valid && op1 == OP_NONCE;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      addr_q <= '0;
      len_q  <= '0;
    end else if (ch1_valid) begin
      unique case (op1)
        OP_ADDR_H: addr_q[ADDR_W-1:29] <= ch1_data[ADDR_W-30:0];
        OP_ADDR_L: addr_q[28:0]        <= ch1_data[28:0];
        OP_LEN:    len_q               <= ch1_data[28:0];
        default: ;
      endcase
    end
  end

  sync_fifo #(.WIDTH(PW), .DEPTH(PARAM_DEPTH)) u_param_fifo (
    .clk, .rst_n, .wr_en(push), .wr_data({addr_q, len_q, ch1_data[28:0]}), .full,
    .rd_en(prm_pop), .rd_data(fifo_out), .empty, .count()
  );

  assign prm_valid = !empty;
  assign {prm_addr, prm_len, prm_nonce} = fifo_out;

  // ---------------- channel 2 ----------------
  typedef enum logic [1:0] {C2_IDLE, C2_ADDR_L, C2_LEN} c2state_e;
  c2state_e          c2;
  logic [28:0]       tx_addr_lo_q;   // ADDR_H goes out at once; only ADDR_L waits
  logic [28:0]       tx_len_q;
  logic              sending;

  assign sending  = ch2_valid && ch2_ready;
  assign st_ready = c2 == C2_IDLE && (!ch2_valid || ch2_ready);
  assign tx_ready = c2 == C2_IDLE && !st_valid && (!ch2_valid || ch2_ready);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c2        <= C2_IDLE;
      ch2_valid <= 1'b0;
      ch2_data  <= '0;
      tx_addr_lo_q <= '0;
      tx_len_q  <= '0;
    end else begin
      if (sending) ch2_valid <= 1'b0;
      unique case (c2)
        C2_IDLE:
          if (st_valid && st_ready) begin
            ch2_valid <= 1'b1;
            ch2_data  <= {OP_STATUS, st_pass ? STATUS_PASS : STATUS_FAIL};
          end else if (tx_valid && tx_ready) begin
            ch2_valid <= 1'b1;
            ch2_data  <= {OP_ADDR_H, 29'(tx_addr[ADDR_W-1:29])};
            tx_addr_lo_q <= tx_addr[28:0];
            tx_len_q  <= tx_len;
            c2        <= C2_ADDR_L;
          end
        C2_ADDR_L:
          if (sending) begin
            ch2_valid <= 1'b1;
            ch2_data  <= {OP_ADDR_L, tx_addr_lo_q};
            c2        <= C2_LEN;
          end
        C2_LEN:
          if (sending) begin
            ch2_valid <= 1'b1;
            ch2_data  <= {OP_LEN, tx_len_q};
            c2        <= C2_IDLE;
          end
        default: c2 <= C2_IDLE;
      endcase
    end
  end

  // ---------------- channels 3 and 4 ----------------
  assign {bufa_rear, bufb_front} = ch3;
  assign ch4 = {bufa_front, bufb_rear};

  a_param_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) push |-> !full);
  a_ch2_hold: assert property (@(posedge clk) disable iff (!rst_n)
    ch2_valid && !ch2_ready |=> ch2_valid && $stable(ch2_data));
endmodule
