// sm4_key_exp: pipelined SM4 key expansion for the rolling-key mode. Stage 0
// registers MK ^ FK; stage i+1 registers one key-schedule step
// K(i+4) = K(i) ^ L'(tau(K(i+1)^K(i+2)^K(i+3)^CK(i))), keeping the last four
// words, which are exactly what the next step needs. rk_out[i] (= K(i+4)) is
// taken from stage i+1. A new key can enter every clock, so in any cycle the
// 32 outputs belong to 32 different keys: rk_out[i] belongs to the key that
// entered i+1 cycles earlier.
//
// Timing: key presented with key_valid in cycle t; rk_out[i] is valid in
// cycle t+2+i (rk_valid[i] marks it). A data block that enters sm4_encrypt in
// cycle t+1 reaches round i in cycle t+2+i and so meets its own round key.
module sm4_key_exp
  import securecomm_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        key_valid,
  input  block_t      key,
  output rkset_t      rk_out,
  output logic [31:0] rk_valid
);
  block_t      st_q [33];
  logic [32:0] v_q;

  always_ff @(posedge clk) begin
    st_q[0] <= key_whiten(key);
    for (int i = 0; i < 32; i++) st_q[i+1] <= key_step(st_q[i], ck(i));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) v_q <= '0;
    else        v_q <= {v_q[31:0], key_valid};
  end

  for (genvar i = 0; i < 32; i++) begin : g_out
    assign rk_out[i]   = st_q[i+1][31:0];
    assign rk_valid[i] = v_q[i+1];
  end
endmodule
