// sm4_round: one combinational SM4 round, as drawn in the round detail of the
// pipelined cipher. The three upper words X1, X2, X3 of the stage register are
// XORed with the round key, passed through four S-boxes (tau) and the linear
// transform L, then XORed with X0; the result is concatenated behind X1..X3 to
// form the next stage register: y = {X1, X2, X3, X0 ^ L(tau(X1^X2^X3^rk))}.
// The same round is used for encryption and decryption; only the key order
// differs. Purely combinational, no clock.
module sm4_round
  import securecomm_pkg::*;
(
  input  block_t x,   // {X0, X1, X2, X3}, X0 in [127:96]
  input  word_t  rk,  // round key of this round
  output block_t y    // {X1, X2, X3, X4}
);
  word_t mix, sub, lin;

  always_comb begin
    mix = x[95:64] ^ x[63:32] ^ x[31:0] ^ rk;
    sub = tau(mix);
    lin = lin_data(sub);
    y   = {x[95:0], x[127:96] ^ lin};
  end
endmodule
