// tb_fdma: the FDMA against the behavioural AXI memory with random stalls.
// Writes transfers of random length (1 to 700 beats, so several bursts and
// 4 KB crossings occur) at random aligned addresses from a data stream with
// random gaps, reads them back through the read interface with random
// backpressure, and compares every beat with the data written and with the
// memory contents. Also checks: no burst crosses 4 KB, WLAST placement,
// done pulses, and read/write running at the same time.
module tb_fdma;
  localparam int AW = 40;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic rd_req_valid = 0, rd_req_ready, rd_valid, rd_ready = 0, rd_done;
  logic [AW-1:0] rd_req_addr, wr_req_addr;
  logic [19:0] rd_req_len, wr_req_len;
  logic [127:0] rd_data, wr_data;
  logic wr_req_valid = 0, wr_req_ready, wr_valid = 0, wr_ready, wr_done, err;
  logic [AW-1:0] araddr, awaddr;
  logic [7:0] arlen, awlen;
  logic [2:0] arsize, awsize;
  logic [1:0] arburst, awburst, rresp, bresp;
  logic arvalid, arready, rlast, rvalid, rready, awvalid, awready;
  logic [15:0] wstrb;
  logic wlast, wvalid, wready, bvalid, bready;
  logic [127:0] rdata, wdata;
  int overlap = 0;

  always #5 clk = ~clk;

  fdma #(.ADDR_W(AW)) dut (.clk, .rst_n, .rd_req_valid, .rd_req_ready, .rd_req_addr, .rd_req_len,
    .rd_valid, .rd_ready, .rd_data, .rd_done, .wr_req_valid, .wr_req_ready, .wr_req_addr,
    .wr_req_len, .wr_valid, .wr_ready, .wr_data, .wr_done, .err,
    .m_axi_araddr(araddr), .m_axi_arlen(arlen), .m_axi_arsize(arsize), .m_axi_arburst(arburst),
    .m_axi_arvalid(arvalid), .m_axi_arready(arready), .m_axi_rdata(rdata), .m_axi_rresp(rresp),
    .m_axi_rlast(rlast), .m_axi_rvalid(rvalid), .m_axi_rready(rready), .m_axi_awaddr(awaddr),
    .m_axi_awlen(awlen), .m_axi_awsize(awsize), .m_axi_awburst(awburst), .m_axi_awvalid(awvalid),
    .m_axi_awready(awready), .m_axi_wdata(wdata), .m_axi_wstrb(wstrb), .m_axi_wlast(wlast),
    .m_axi_wvalid(wvalid), .m_axi_wready(wready), .m_axi_bresp(bresp), .m_axi_bvalid(bvalid),
    .m_axi_bready(bready));

  axi_mem_model #(.ADDR_W(AW)) mem (.clk, .rst_n, .araddr, .arlen, .arsize, .arburst, .arvalid,
    .arready, .rdata, .rresp, .rlast, .rvalid, .rready, .awaddr, .awlen, .awsize, .awburst,
    .awvalid, .awready, .wdata, .wstrb, .wlast, .wvalid, .wready, .bresp, .bvalid, .bready);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (!rd_req_ready && !wr_req_ready) overlap++;

  task automatic do_write(input longint addr, input int len, ref logic [127:0] data [$]);
    @(negedge clk);
    wr_req_valid = 1; wr_req_addr = AW'(addr); wr_req_len = 20'(len);
    @(negedge clk);
    wr_req_valid = 0;
    for (int i = 0; i < len; ) begin
      wr_valid = $urandom % 4 != 0;
      wr_data  = data[i];
      @(posedge clk);
      if (wr_valid && wr_ready) i++;
      @(negedge clk);
    end
    wr_valid = 0;
    while (!wr_done) @(negedge clk);
    check(1, "write done");
  endtask

  task automatic do_read(input longint addr, input int len, ref logic [127:0] data [$]);
    int got;
    @(negedge clk);
    rd_req_valid = 1; rd_req_addr = AW'(addr); rd_req_len = 20'(len);
    @(negedge clk);
    rd_req_valid = 0;
    got = 0;
    while (got < len) begin
      rd_ready = $urandom % 4 != 0;
      @(posedge clk);
      if (rd_valid && rd_ready) begin
        check(rd_data == data[got], $sformatf("read beat %0d", got));
        got++;
      end
      @(negedge clk);
    end
    rd_ready = 0;
    repeat (2) @(negedge clk);
    check(!rd_req_ready == 0, "read engine idle after done");
  endtask

  initial begin
    logic [127:0] d [$], e [$];
    longint a, b;
    int n, m;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 12; t++) begin
      d.delete(); e.delete();
      n = 1 + $urandom % 700;
      m = 1 + $urandom % 300;
      a = 64'h10_0000_0000 + longint'($urandom % 4096) * 16;
      b = 64'h20_0000_0000 + longint'($urandom % 4096) * 16;
      for (int i = 0; i < n; i++) d.push_back({$urandom, $urandom, $urandom, $urandom});
      for (int i = 0; i < m; i++) begin
        e.push_back({$urandom, $urandom, $urandom, $urandom});
        mem.poke(b + 16 * i, e[i]);
      end
      // write one buffer while reading another
      fork
        do_write(a, n, d);
        do_read(b, m, e);
      join
      for (int i = 0; i < n; i++) check(mem.peek(a + 16 * i) == d[i], "memory contents");
      do_read(a, n, d);
    end
    check(mem.bursts_4k_violations == 0, "no 4KB crossing");
    check(mem.wlast_errors == 0, "wlast");
    check(err == 0, "no error");
    check(overlap > 0, "read and write overlapped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
