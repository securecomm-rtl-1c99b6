// tb_sm4_crypto: after the key inversion is ready, issues one request per
// clock with a random mix of fixed-key encryption, fixed-key decryption and
// rolling-key encryption (a fresh key each time), random tags and the odd
// idle cycle. Every result is compared with the reference cipher; the tag,
// the 34-cycle latency and the order are checked, and each mode must have
// been exercised.
module tb_sm4_crypto;
  import securecomm_pkg::*;
  import sm4_ref_pkg::*;
  localparam block_t KEY = 128'h0123456789abcdeffedcba9876543210;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, out_valid;
  crypto_mode_e in_mode;
  block_t in_key, in_data, out_data;
  logic [1:0] in_tag, out_tag;
  int cyc = 0;
  block_t exp_q [$];
  int     t_q [$];
  logic [1:0] tag_q [$];
  int n_mode [3] = '{0, 0, 0};

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  sm4_crypto #(.KEY(KEY), .TAG_W(2)) dut (.clk, .rst_n, .in_valid, .in_ready, .in_mode,
    .in_key, .in_data, .in_tag, .out_valid, .out_data, .out_tag);

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
    check(exp_q.size() > 0, "unexpected output");
    if (exp_q.size() > 0) begin
      check(out_data == exp_q.pop_front(), "data");
      check(out_tag == tag_q.pop_front(), "tag");
      check(cyc - t_q.pop_front() == 34, "latency 34");
    end
  end

  initial begin
    int ready_at;
    repeat (2) @(negedge clk);
    rst_n = 1;
    while (!in_ready) @(negedge clk);
    ready_at = cyc;
    check(ready_at > 30 && ready_at < 40, "key inversion ready time");
    for (int n = 0; n < 600; n++) begin
      @(negedge clk);
      in_valid = ($urandom % 8) != 0;
      in_mode  = crypto_mode_e'($urandom % 3);
      in_key   = {$urandom, $urandom, $urandom, $urandom};
      in_data  = {$urandom, $urandom, $urandom, $urandom};
      in_tag   = 2'($urandom);
      if (in_valid) begin
        n_mode[in_mode]++;
        exp_q.push_back(sm4_ref(in_data, in_mode == CM_ROLL ? in_key : KEY, in_mode == CM_DEC));
        tag_q.push_back(in_tag);
        t_q.push_back(cyc);
      end
    end
    @(negedge clk) in_valid = 0;
    repeat (40) @(negedge clk);
    check(exp_q.size() == 0, "all results seen");
    for (int m = 0; m < 3; m++) check(n_mode[m] > 50, "mode exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
