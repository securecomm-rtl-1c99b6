// tb_sync_fifo: random pushes and pops against a queue model, including
// filling the FIFO to full and draining it to empty; checks data order,
// count, full and empty every cycle.
module tb_sync_fifo;
  localparam int W = 16, D = 8;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, wr_en = 0, rd_en = 0, full, empty;
  logic [W-1:0] wr_data, rd_data;
  logic [3:0] count;
  logic [W-1:0] model [$];
  int n_full = 0, n_empty = 0;

  always #5 clk = ~clk;
  sync_fifo #(.WIDTH(W), .DEPTH(D)) dut (.clk, .rst_n, .wr_en, .wr_data, .full, .rd_en,
                                         .rd_data, .empty, .count);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      int bias;
      @(negedge clk);
      check(count == 4'(model.size()), "count");
      check(full == (model.size() == D), "full");
      check(empty == (model.size() == 0), "empty");
      if (model.size() > 0) check(rd_data == model[0], "head data");
      if (full) n_full++;
      if (empty) n_empty++;
      bias = (n / 300) % 2 ? 3 : 1;
      wr_en = !full && ($urandom % 4 < 4 - bias);
      rd_en = !empty && ($urandom % 4 < bias);
      wr_data = W'($urandom);
      @(posedge clk);
      if (rd_en) void'(model.pop_front());
      if (wr_en) model.push_back(wr_data);
    end
    check(n_full > 0 && n_empty > 0, "reached full and empty");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
