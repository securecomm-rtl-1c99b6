// tb_securecomm_image: one network input of shape 224 x 224 x 3 with one
// byte per element (150,528 bytes, 9,408 blocks of 16 bytes) sent through the
// FPGA side at its default sizes. A frame carries at most FIFO1_DEPTH (1024)
// data blocks, so the sender cuts the input into nine full frames and one of
// 192 blocks and posts them back to back into the 16-slot bufferA queue; the
// design verifies each frame, hands the plaintext to the kernel and returns
// the kernel's answers as encrypted result frames in bufferB. The kernel
// model answers every third frame with twice as many blocks, so results also
// leave as frames cut at FIFO2's limit. Every block is checked against the
// reference model; see securecomm_env.svh for the models.
module tb_securecomm_image;
  localparam logic [127:0] KEY = 128'h0123456789abcdeffedcba9876543210;
  localparam int MAX_SIZE    = 16;
  localparam int FIFO1_DEPTH = 1024;
  localparam int FIFO2_DEPTH = 1024;
  localparam logic [39:0] BUFB_BASE  = 40'h00_7000_0000;
  localparam logic [39:0] BUFB_BYTES = 40'h00_0100_0000;
  localparam int IMG_BYTES   = 224 * 224 * 3;
  localparam int IMG_BLOCKS  = IMG_BYTES / 16;

  `include "securecomm_env.svh"

  securecomm_top dut (
    .clk, .rst_n, .ch1_valid, .ch1_data, .ch2_valid, .ch2_ready, .ch2_data, .ch3, .ch4,
    .alarm, .fail_flag, .alarm_clear, .axi_err, .stat_rx_done, .stat_rx_pass,
    .stat_rx_nonce_bad, .stat_tx_cut, .kin_valid, .kin_ready, .kin_data, .kin_last,
    .kout_valid, .kout_ready, .kout_data, .kout_last,
    .m_axi_araddr(araddr), .m_axi_arlen(arlen), .m_axi_arsize(arsize), .m_axi_arburst(arburst),
    .m_axi_arvalid(arvalid), .m_axi_arready(arready), .m_axi_rdata(rdata), .m_axi_rresp(rresp),
    .m_axi_rlast(rlast), .m_axi_rvalid(rvalid), .m_axi_rready(rready), .m_axi_awaddr(awaddr),
    .m_axi_awlen(awlen), .m_axi_awsize(awsize), .m_axi_awburst(awburst), .m_axi_awvalid(awvalid),
    .m_axi_awready(awready), .m_axi_wdata(wdata), .m_axi_wstrb(wstrb), .m_axi_wlast(wlast),
    .m_axi_wvalid(wvalid), .m_axi_wready(wready), .m_axi_bresp(bresp), .m_axi_bvalid(bvalid),
    .m_axi_bready(bready)
  );

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    report_counts();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int left, len, frames, expect_results;
    reset_dut();
    left = IMG_BLOCKS;
    frames = 0;
    expect_results = 0;
    while (left > 0) begin
      len = (left > FIFO1_DEPTH) ? FIFO1_DEPTH : left;
      send_frame(len, E_PASS);
      frames++;
      expect_results += (frames % 3 == 0) ? 2 * len : len;
      left -= len;
    end
    drain(1500000);
    report_counts();
    $display("input: %0d bytes in %0d frames", IMG_BYTES, frames);
    check(frames == 10, "input cut into ten frames");
    check(n_pass == frames, "every frame passed");
    check(n_alarm == 0, "no alarm");
    check(n_results == expect_results, "every result block came back");
    check(n_cut > 0, "result frame cut at FIFO2 limit");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
