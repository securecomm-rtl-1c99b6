// tb_sm4_encrypt: streams blocks back to back through the 32-stage pipeline
// with the round keys of a random key (encryption) or reversed (decryption),
// plus the published example vector. Checks every result against the
// reference model, the 33-cycle latency, one result per clock (no bubbles),
// and that the side band comes out with its block.
module tb_sm4_encrypt;
  import securecomm_pkg::*;
  import sm4_ref_pkg::*;
  localparam int N = 200;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, out_valid;
  block_t in_data, out_data;
  logic [3:0] in_sb, out_sb;
  logic [3:0] stage_sb [32];
  rkset_t rk;
  block_t key;
  bit     dec;
  block_t exp_q [$];
  int     tin_q [$];
  int     cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  sm4_encrypt #(.SB_W(4)) dut (.clk, .rst_n, .in_valid, .in_data, .in_sb, .rk,
                               .stage_sb, .out_valid, .out_data, .out_sb);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s @%0d", what, cyc); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (out_valid) begin
    block_t e;
    int t;
    e = exp_q.pop_front();
    t = tin_q.pop_front();
    check(out_data == e, "data");
    check(cyc - t == 33, "latency 33");
    check(out_sb == 4'(t), "side band");
  end

  task automatic run(input block_t k, input bit d);
    key = k; dec = d;
    rk = d ? reverse_keys(expand_key(k)) : expand_key(k);
    for (int n = 0; n < N; n++) begin
      @(negedge clk);
      in_valid = 1;
      in_data  = (n == 0) ? 128'h0123456789abcdeffedcba9876543210
                          : {$urandom, $urandom, $urandom, $urandom};
      in_sb    = 4'(cyc);
      exp_q.push_back(sm4_ref(in_data, k, d));
      tin_q.push_back(cyc);
    end
    @(negedge clk) in_valid = 0;
    repeat (40) @(negedge clk);
  endtask

  int outs = 0, gaps = 0, last_out = -1;
  always @(negedge clk) if (out_valid) begin
    if (last_out >= 0 && cyc - last_out != 1 && outs % N != 0) gaps++;
    last_out = cyc; outs++;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(128'h0123456789abcdeffedcba9876543210, 0);
    run({$urandom, $urandom, $urandom, $urandom}, 0);
    run({$urandom, $urandom, $urandom, $urandom}, 1);
    check(outs == 3 * N, "all blocks out");
    check(gaps == 0, "one block per clock");
    check(exp_q.size() == 0, "queue drained");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
