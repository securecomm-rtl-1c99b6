// tb_frame_fifo: writes random-length frames, each ending in a random commit
// or drop, while the reader pulls at random. A model holds the committed
// stream; the reader must see exactly the committed frames in order and
// nothing of a dropped one, never before its commit. Also checks free.
module tb_frame_fifo;
  localparam int W = 20, D = 32;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, wr_en = 0, commit = 0, drop = 0, rd_valid, rd_ready = 0;
  logic [W-1:0] wr_data, rd_data;
  logic [5:0] free;
  logic [W-1:0] committed [$], pending [$];
  int n_commit = 0, n_drop = 0, held = 0;

  always #5 clk = ~clk;
  frame_fifo #(.WIDTH(W), .DEPTH(D)) dut (.clk, .rst_n, .wr_en, .wr_data, .commit, .drop,
                                          .free, .rd_valid, .rd_ready, .rd_data);

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

  // reader
  always @(negedge clk) if (rst_n) begin
    check(rd_valid == (committed.size() > 0), "valid only for committed data");
    check(free == 6'(D - held), "free");
    rd_ready = $urandom % 3 != 0;
  end
  always @(posedge clk) if (rd_valid && rd_ready) begin
    check(rd_data == committed.pop_front(), "read data");
    held--;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < 200; f++) begin
      int len;
      bit pass;
      len = 1 + $urandom % 12;
      pass = $urandom % 3 != 0;
      while (free < len) @(negedge clk);
      for (int i = 0; i < len; i++) begin
        @(negedge clk);
        wr_en = 1; wr_data = W'($urandom);
        commit = (i == len - 1) && pass;
        pending.push_back(wr_data);
        @(posedge clk); held++;
        #1 wr_en = 0; commit = 0;
      end
      @(negedge clk);
      if (pass) begin
        n_commit++;
        foreach (pending[i]) committed.push_back(pending[i]);
      end else begin
        drop = 1; n_drop++;
        @(posedge clk); held -= len;
        #1 drop = 0;
      end
      pending.delete();
    end
    repeat (100) @(negedge clk);
    check(committed.size() == 0, "all committed data read");
    check(n_commit > 0 && n_drop > 0, "both commit and drop used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
