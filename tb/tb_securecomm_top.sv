// tb_securecomm_top: end-to-end test of the FPGA side at reduced sizes
// (FIFO1 64 blocks, FIFO2 32 blocks, 4 queue slots, 1.5 KB bufferB) so that
// every mechanism occurs many times in a short run: verified frames reaching
// the kernel, MAC failures from tampered DDR contents, replayed frames caught
// by the nonce pair, frames too long for FIFO1, alarms and their clearing,
// frames waiting for FIFO1 room, bufferA empty waits, a full bufferB queue,
// bufferB wrap-around and reclaim, result frames cut at FIFO2's limit, AXI
// bursts split at 4 KB, and reads overlapping writes. Each must happen at
// least once. See securecomm_env.svh for the models.
module tb_securecomm_top;
  localparam logic [127:0] KEY = 128'h0123456789abcdeffedcba9876543210;
  localparam int MAX_SIZE    = 4;
  localparam int FIFO1_DEPTH = 64;
  localparam int FIFO2_DEPTH = 32;
  localparam logic [39:0] BUFB_BASE  = 40'h00_7000_0000;
  localparam logic [39:0] BUFB_BYTES = 40'h600;
  localparam int N_FRAMES = 40;
  localparam int MAX_LEN  = 60;

  `include "securecomm_env.svh"

  securecomm_top #(
    .KEY(KEY), .MAX_SIZE(MAX_SIZE), .FIFO1_DEPTH(FIFO1_DEPTH), .FIFO2_DEPTH(FIFO2_DEPTH),
    .BUFB_BASE(BUFB_BASE), .BUFB_BYTES(BUFB_BYTES)
  ) dut (
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
    repeat (400000) @(posedge clk);
    failures++;
    report_counts();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset_dut();
    for (int f = 0; f < N_FRAMES; f++) begin
      unique case (f % 10)
        3:       send_frame(1 + $urandom % MAX_LEN, E_MAC_FAIL);
        6:       send_frame(1 + $urandom % MAX_LEN, E_NONCE_FAIL);
        8:       send_frame(FIFO1_DEPTH + 1 + $urandom % 8, E_OVERSIZE);
        9:       send_frame(f == 9 ? 0 : 40 + $urandom % (MAX_LEN - 39), E_PASS);
        default: send_frame(1 + $urandom % MAX_LEN, E_PASS);
      endcase
    end
    drain(300000);
    report_counts();
    check(n_pass > 0, "frames passed");
    check(n_mac_fail > 0, "tampering detected");
    check(n_nonce_fail > 0, "replay detected");
    check(n_oversize > 0, "oversize frame rejected");
    check(n_alarm == n_mac_fail + n_nonce_fail + n_oversize, "one alarm per failed frame");
    check(n_f1_wait > 0, "frame waited for FIFO1 room");
    check(n_aq_empty > 0, "bufferA empty wait");
    check(n_bq_full > 0, "bufferB queue full");
    check(n_wrap > 0, "bufferB wrap-around");
    check(n_cut > 0, "result frame cut at FIFO2 limit");
    check(n_ar > N_FRAMES, "reads split into bursts");
    check(n_rd_wr_overlap > 0, "read and write overlapped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
