// tb_sm4_key_exp: presents a new random key every clock and checks that
// output i carries round key i of the key that entered i+2 cycles before the
// current cycle (so 32 keys are in flight at once), against the reference
// key schedule.
module tb_sm4_key_exp;
  import securecomm_pkg::*;
  import sm4_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, key_valid = 0;
  block_t key;
  rkset_t rk_out;
  logic [31:0] rk_valid;
  block_t hist [int];
  int cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;
  sm4_key_exp dut (.clk, .rst_n, .key_valid, .key, .rk_out, .rk_valid);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) begin
    for (int i = 0; i < 32; i++) if (hist.exists(cyc - 2 - i)) begin
      logic [31:0] r [32];
      r_keys(hist[cyc - 2 - i], r);
      checks += 2;
      if (!rk_valid[i]) begin failures++; $display("FAIL valid %0d", i); end
      if (rk_out[i] != r[i]) begin failures++; $display("FAIL rk %0d @%0d", i, cyc); end
    end
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 100; n++) begin
      @(negedge clk);
      key_valid = 1;
      key = (n == 0) ? 128'h0123456789abcdeffedcba9876543210
                     : {$urandom, $urandom, $urandom, $urandom};
      hist[cyc] = key;
    end
    @(negedge clk); key_valid = 0;
    repeat (40) @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
