// tb_sm4_round: drives random stage values and round keys into one SM4 round
// and compares with a word-level model of the round function
// F = X0 ^ L(tau(X1^X2^X3^rk)) built from the reference package.
module tb_sm4_round;
  import securecomm_pkg::*;
  import sm4_ref_pkg::*;
  int checks = 0, failures = 0;
  block_t x, y;
  word_t rk;

  sm4_round dut (.x, .rk, .y);

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 500; n++) begin
      logic [31:0] t, f;
      x  = {$urandom, $urandom, $urandom, $urandom};
      rk = $urandom;
      #1;
      t = r_tau(x[95:64] ^ x[63:32] ^ x[31:0] ^ rk);
      f = x[127:96] ^ t ^ r_rol(t, 2) ^ r_rol(t, 10) ^ r_rol(t, 18) ^ r_rol(t, 24);
      checks++;
      if (y !== {x[95:0], f}) begin
        failures++;
        $display("FAIL x=%h rk=%h y=%h", x, rk, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
