// tb_securecomm_full: the FPGA side at its default sizes (FIFO1 and FIFO2
// of 1024 blocks, 16 bufferA/bufferB slots, 16 MB bufferB). It runs one
// complete operation at full scale: a frame that fills FIFO1 exactly (1024
// data blocks) goes through verification to the kernel and its results come
// back as one result frame; a tampered frame, a replayed frame and a frame
// one block longer than FIFO1 are rejected with alarms; a second full frame
// is answered with 2048 result blocks, which leave as result frames cut at
// FIFO2's limit of 1021 data blocks. Every block is checked against the
// reference model. See securecomm_env.svh for the models.
module tb_securecomm_full;
  localparam logic [127:0] KEY = 128'h0123456789abcdeffedcba9876543210;
  localparam int MAX_SIZE    = 16;
  localparam int FIFO1_DEPTH = 1024;
  localparam int FIFO2_DEPTH = 1024;
  localparam logic [39:0] BUFB_BASE  = 40'h00_7000_0000;
  localparam logic [39:0] BUFB_BYTES = 40'h00_0100_0000;

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
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    report_counts();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset_dut();
    send_frame(FIFO1_DEPTH, E_PASS);
    send_frame(300, E_PASS);
    send_frame(200, E_MAC_FAIL);
    send_frame(100, E_NONCE_FAIL);
    send_frame(FIFO1_DEPTH + 1, E_OVERSIZE);
    send_frame(FIFO1_DEPTH, E_PASS);   // third verified frame: kernel answers 2048 blocks
    drain(200000);
    report_counts();
    check(n_pass == 3, "three frames passed");
    check(n_mac_fail == 1, "tampering detected");
    check(n_nonce_fail == 1, "replay detected");
    check(n_oversize == 1, "oversize frame rejected");
    check(n_alarm == 3, "one alarm per failed frame");
    check(n_cut > 0, "result frame cut at FIFO2 limit");
    check(n_results == FIFO1_DEPTH + 300 + 2 * FIFO1_DEPTH, "every result block came back");
    check(n_ar > 6, "reads split into bursts");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
