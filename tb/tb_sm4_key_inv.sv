// tb_sm4_key_inv: loads a set of round keys, then checks cycle by cycle that
// lane i shows ready exactly i+1 cycles after the load and then carries
// rk_in[31-i]; reloads a second key set and checks the wave again.
module tb_sm4_key_inv;
  import securecomm_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, load = 0;
  rkset_t rk_in, rk_out;
  logic [31:0] ready;

  always #5 clk = ~clk;
  sm4_key_inv dut (.clk, .rst_n, .load, .rk_in, .rk_out, .ready);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load_and_check();
    rkset_t k;
    for (int i = 0; i < 32; i++) k[i] = $urandom;
    @(negedge clk);
    rk_in = k; load = 1;
    @(negedge clk);
    load = 0; rk_in = '0;
    // now one cycle after the load edge
    for (int c = 0; c < 34; c++) begin
      for (int i = 0; i < 32; i++) begin
        check(ready[i] == (i <= c), $sformatf("ready lane %0d cycle %0d", i, c));
        if (i <= c) check(rk_out[i] == k[31-i], $sformatf("key lane %0d", i));
      end
      @(negedge clk);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    check(ready == 0, "not ready after reset");
    rst_n = 1;
    load_and_check();
    load_and_check();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
