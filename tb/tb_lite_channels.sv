// tb_lite_channels: sends parameter sets (address high/low, length, nonce)
// on channel 1, with stray reserved-opcode words mixed in, and checks what
// comes out of the parameter FIFO. Requests integrity results and result-
// frame parameter groups and checks the channel-2 words (opcode in bits
// 31:29, payload below) under random backpressure. Checks the channel 3/4
// packing.
module tb_lite_channels;
  import securecomm_pkg::*;
  localparam int AW = 40;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic ch1_valid = 0, prm_valid, prm_pop = 0, ch2_valid, ch2_ready = 0;
  logic [31:0] ch1_data, ch2_data, ch3, ch4;
  logic [AW-1:0] prm_addr, tx_addr;
  logic [28:0] prm_len, prm_nonce, tx_len;
  logic st_valid = 0, st_ready, st_pass, tx_valid = 0, tx_ready;
  logic [15:0] bufa_rear, bufb_front, bufa_front, bufb_rear;
  logic [31:0] exp2 [$];

  always #5 clk = ~clk;

  lite_channels #(.ADDR_W(AW)) dut (.clk, .rst_n, .ch1_valid, .ch1_data, .prm_valid, .prm_pop,
    .prm_addr, .prm_len, .prm_nonce, .ch2_valid, .ch2_ready, .ch2_data, .st_valid, .st_ready,
    .st_pass, .tx_valid, .tx_ready, .tx_addr, .tx_len, .ch3, .bufa_rear, .bufb_front,
    .bufa_front, .bufb_rear, .ch4);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic ch1(input logic [2:0] op, input logic [28:0] v);
    @(negedge clk);
    ch1_valid = 1; ch1_data = {op, v};
    @(negedge clk);
    ch1_valid = 0;
  endtask

  // channel-2 receiver
  always @(negedge clk) ch2_ready = $urandom % 3 != 0;
  always @(posedge clk) if (rst_n && ch2_valid && ch2_ready) begin
    check(exp2.size() > 0 && ch2_data == exp2[0], $sformatf("ch2 word %h", ch2_data));
    if (exp2.size() > 0) void'(exp2.pop_front());
  end

  initial begin
    logic [AW-1:0] a [8];
    logic [28:0] l [8], n [8];
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 8; i++) begin
      a[i] = {$urandom, $urandom} & ~40'hF;
      l[i] = 29'($urandom);
      n[i] = 29'($urandom);
      ch1(3'b001, 29'(a[i][AW-1:29]));
      ch1(3'b101, 29'($urandom));          // reserved opcode, ignored
      ch1(3'b010, a[i][28:0]);
      ch1(3'b011, l[i]);
      ch1(3'b100, n[i]);
    end
    for (int i = 0; i < 8; i++) begin
      @(negedge clk);
      check(prm_valid, "param available");
      check(prm_addr == a[i] && prm_len == l[i] && prm_nonce == n[i], "param set");
      prm_pop = 1;
      @(negedge clk) prm_pop = 0;
    end
    @(negedge clk) check(!prm_valid, "param FIFO empty");
    // channel 2
    for (int i = 0; i < 10; i++) begin
      logic [AW-1:0] ta;
      ta = {$urandom, $urandom};
      @(negedge clk);
      if (i % 2) begin
        st_valid = 1; st_pass = $urandom % 2;
        exp2.push_back({3'b111, st_pass ? 29'd0 : 29'd1});
        @(posedge clk); while (!st_ready) @(posedge clk);
        #1 st_valid = 0;
      end else begin
        tx_valid = 1; tx_addr = ta; tx_len = 29'($urandom);
        exp2.push_back({3'b001, 29'(ta[AW-1:29])});
        exp2.push_back({3'b010, ta[28:0]});
        exp2.push_back({3'b011, tx_len});
        @(posedge clk); while (!tx_ready) @(posedge clk);
        #1 tx_valid = 0;
      end
    end
    repeat (30) @(negedge clk);
    check(exp2.size() == 0, "all channel-2 words sent");
    ch3 = 32'h1234_abcd; bufa_front = 16'h5555; bufb_rear = 16'h0007;
    #1;
    check(bufa_rear == 16'h1234 && bufb_front == 16'habcd, "channel 3 split");
    check(ch4 == 32'h5555_0007, "channel 4 packing");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
