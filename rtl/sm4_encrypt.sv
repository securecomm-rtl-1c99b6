// sm4_encrypt: the 32-round SM4 datapath, fully pipelined with one register
// per round (reg0 .. reg32), followed by the final word reversal. A new
// 128-bit block can enter every clock, so throughput is one block per cycle;
// the pipeline never stalls.
//
// Timing: a block presented with in_valid in cycle t is in reg0 at t+1, in
// reg_i at t+1+i, and appears on out_* (combinationally from reg32) during
// cycle t+33. Round i is computed between reg_i and reg_i+1 with rk[i].
//
// The round keys are supplied per stage from outside, and each stage exposes
// the side-band bits (stage_sb[i]) of the block it currently holds, so the
// caller can pick the key for every stage from the block's own mode (fixed
// key, inverted key for decryption, or a rolling key). Decryption is the same
// datapath fed with the round keys in reverse order. The side band (SB_W bits)
// travels unchanged with the block and comes out with it.
module sm4_encrypt
  import securecomm_pkg::*;
#(
  parameter int unsigned SB_W = 4
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_valid,
  input  block_t          in_data,
  input  logic [SB_W-1:0] in_sb,
  input  rkset_t          rk,                  // rk[i] feeds round i
  output logic [SB_W-1:0] stage_sb [32],       // side band of the block in reg_i
  output logic            out_valid,
  output block_t          out_data,
  output logic [SB_W-1:0] out_sb
);
  block_t            stage_q  [33];
  logic [SB_W-1:0]   sb_q     [33];
  logic [32:0]       valid_q;
  block_t            round_y  [32];

  for (genvar i = 0; i < 32; i++) begin : g_round
    sm4_round u_round (.x(stage_q[i]), .rk(rk[i]), .y(round_y[i]));
    assign stage_sb[i] = sb_q[i];
  end

  // data registers carry no reset: only valid_q qualifies them
  always_ff @(posedge clk) begin
    stage_q[0] <= in_data;
    sb_q[0]    <= in_sb;
    for (int i = 0; i < 32; i++) begin
      stage_q[i+1] <= round_y[i];
      sb_q[i+1]    <= sb_q[i];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) valid_q <= '0;
    else        valid_q <= {valid_q[31:0], in_valid};
  end

  assign out_valid = valid_q[32];
  assign out_data  = word_rotate(stage_q[32]);
  assign out_sb    = sb_q[32];
endmodule
