// sm4_crypto: the SM4 crypto engine of SecureFPGA. One shared 32-stage
// pipeline (sm4_encrypt) serves encryption and decryption; each block carries
// its own mode, so encrypt and decrypt requests may be interleaved cycle by
// cycle with no pipeline flush.
//
//   CM_ENC  fixed-key encryption. The round keys of the sealed key (parameter
//           KEY) are computed at elaboration and wired to the rounds.
//   CM_DEC  fixed-key decryption. The sealed round keys are loaded once after
//           reset into the key inversion module (sm4_key_inv), which hands
//           round i the key rk[31-i].
//   CM_ROLL rolling-key encryption. The key given with the block is expanded
//           by the pipelined key expansion (sm4_key_exp) in step with the
//           block, so every block may use a different key.
//
// Interface: valid/ready request (in_ready is low only until the inverted
// keys are ready, about 33 cycles after reset); results come out after a
// fixed 34 cycles with the request's tag and cannot be stalled, so a caller
// must have room for every result it has asked for. Throughput: one block per
// clock. The one-cycle input register lets the key expansion run one stage
// ahead of the data. Key installation and protection are outside this
// design: the sealed key is a parameter.
module sm4_crypto
  import securecomm_pkg::*;
#(
  parameter block_t      KEY   = 128'h0123456789abcdeffedcba9876543210,
  parameter int unsigned TAG_W = 2
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  output logic             in_ready,
  input  crypto_mode_e     in_mode,
  input  block_t           in_key,     // used in CM_ROLL only
  input  block_t           in_data,
  input  logic [TAG_W-1:0] in_tag,
  output logic             out_valid,
  output block_t           out_data,
  output logic [TAG_W-1:0] out_tag
);
  localparam rkset_t RK_FIXED = expand_key(KEY);
  localparam int unsigned SB_W = 2 + TAG_W;

  rkset_t      inv_rk, roll_rk, stage_rk;
  logic [31:0] inv_ready, roll_valid;
  logic        inv_loaded_q;
  logic        fire;

  logic             d_valid_q;
  block_t           d_data_q;
  logic [SB_W-1:0]  d_sb_q;
  logic [SB_W-1:0]  stage_sb [32];
  logic [SB_W-1:0]  out_sb;

  assign in_ready = inv_ready[31];
  assign fire     = in_valid && in_ready;

  // load the sealed keys into the inversion triangle once after reset
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) inv_loaded_q <= 1'b0;
    else        inv_loaded_q <= 1'b1;
  end

  sm4_key_inv u_key_inv (
    .clk, .rst_n, .load(!inv_loaded_q), .rk_in(RK_FIXED),
    .rk_out(inv_rk), .ready(inv_ready)
  );

  sm4_key_exp u_key_exp (
    .clk, .rst_n, .key_valid(fire && in_mode == CM_ROLL), .key(in_key),
    .rk_out(roll_rk), .rk_valid(roll_valid)
  );

  always_ff @(posedge clk) begin
    d_data_q <= in_data;
    d_sb_q   <= {in_mode, in_tag};
  end
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) d_valid_q <= 1'b0;
    else        d_valid_q <= fire;
  end

  // per-round key select from the mode of the block in that round
  always_comb begin
    for (int i = 0; i < 32; i++) begin
      unique case (crypto_mode_e'(stage_sb[i][SB_W-1 -: 2]))
        CM_DEC:  stage_rk[i] = inv_rk[i];
        CM_ROLL: stage_rk[i] = roll_rk[i];
        default: stage_rk[i] = RK_FIXED[i];
      endcase
    end
  end

  sm4_encrypt #(.SB_W(SB_W)) u_pipe (
    .clk, .rst_n, .in_valid(d_valid_q), .in_data(d_data_q), .in_sb(d_sb_q),
    .rk(stage_rk), .stage_sb(stage_sb),
    .out_valid, .out_data, .out_sb
  );

  assign out_tag = out_sb[TAG_W-1:0];

// the mode code 2'b11 is not defined
  a_mode_legal: assert property (@(posedge clk) disable iff (!rst_n)
    in_valid |-> in_mode inside {CM_ENC, CM_DEC, CM_ROLL});
endmodule
