// tb_comm_fpga: drives the CommFPGA block directly. The DDR is the AXI
// memory model with random stalls; the SecureFPGA side is a behavioural
// model that consumes each frame, judges it with the reference cipher and
// MAC, reports the verdict, and answers every passed frame with a result
// frame through a FIFO2 model. A CPU model places frames in the bufferA
// ring, announces them on LITE channel 1 and advances bufferA_rear on
// channel 3; it reads result frames named on channel 2 back from bufferB,
// compares them with what the SecureFPGA model sent, and advances
// bufferB_front, sometimes slowly so that the bufferB queue fills. Every
// alarm is answered with alarm_clear. Checks: frame images reach the
// SecureFPGA side unchanged, every status message matches the verdict,
// every result frame lands intact inside bufferB and stays intact until the
// CPU releases it, and the queue, wrap and
// alarm mechanisms all occur.
module tb_comm_fpga;
  import securecomm_pkg::*;
  import sm4_ref_pkg::*;

  localparam block_t      KEY        = 128'h0123456789abcdeffedcba9876543210;
  localparam int          AW         = 40;
  localparam int          LEN_W      = 20;
  localparam int          MAX_SIZE   = 4;
  localparam int          F1_DEPTH   = 16;     // SecureFPGA model: longest accepted frame
  localparam int          TX_MAX     = 13;     // SecureFPGA model: longest result frame
  localparam logic [39:0] BUFB_BASE  = 40'h00_7000_0000;
  localparam logic [39:0] BUFB_BYTES = 40'h200;
  localparam longint      BUFA_BASE  = 64'h10_0000_0000;

  typedef enum int { E_PASS, E_MAC_FAIL, E_NONCE_FAIL, E_OVERSIZE } outcome_e;

  int checks = 0, failures = 0, cyc = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  logic ch1_valid = 0, ch2_valid, ch2_ready = 0, alarm, fail_flag, alarm_clear = 0, axi_err;
  logic [31:0] ch1_data = '0, ch2_data, ch3, ch4;
  logic rxf_valid, rxf_ready = 0, rx_valid, rx_ready = 0, rx_done = 0, rx_pass = 0;
  logic [LEN_W-1:0] rxf_len, txf_len = '0;
  logic [28:0] rxf_nonce;
  logic [127:0] rx_data, f2_data;
  logic txf_valid = 0, txf_ready, f2_rd, f2_empty;
  logic [AW-1:0] araddr, awaddr;
  logic [7:0] arlen, awlen;
  logic [2:0] arsize, awsize;
  logic [1:0] arburst, awburst, rresp, bresp;
  logic arvalid, arready, rlast, rvalid, rready, awvalid, awready;
  logic [15:0] wstrb;
  logic wlast, wvalid, wready, bvalid, bready;
  logic [127:0] rdata, wdata;

  logic [15:0] a_rear_tb = 0, b_front_tb = 0;
  assign ch3 = {a_rear_tb, b_front_tb};

  comm_fpga #(
    .ADDR_W(AW), .LEN_W(LEN_W), .MAX_SIZE(MAX_SIZE), .BUFB_BASE(BUFB_BASE),
    .BUFB_BYTES(BUFB_BYTES)
  ) dut (
    .clk, .rst_n, .ch1_valid, .ch1_data, .ch2_valid, .ch2_ready, .ch2_data, .ch3, .ch4,
    .alarm, .fail_flag, .alarm_clear,
    .rxf_valid, .rxf_ready, .rxf_len, .rxf_nonce, .rx_valid, .rx_ready, .rx_data,
    .rx_done, .rx_pass, .txf_valid, .txf_ready, .txf_len, .f2_rd, .f2_data, .f2_empty,
    .m_axi_araddr(araddr), .m_axi_arlen(arlen), .m_axi_arsize(arsize), .m_axi_arburst(arburst),
    .m_axi_arvalid(arvalid), .m_axi_arready(arready), .m_axi_rdata(rdata), .m_axi_rresp(rresp),
    .m_axi_rlast(rlast), .m_axi_rvalid(rvalid), .m_axi_rready(rready), .m_axi_awaddr(awaddr),
    .m_axi_awlen(awlen), .m_axi_awsize(awsize), .m_axi_awburst(awburst), .m_axi_awvalid(awvalid),
    .m_axi_awready(awready), .m_axi_wdata(wdata), .m_axi_wstrb(wstrb), .m_axi_wlast(wlast),
    .m_axi_wvalid(wvalid), .m_axi_wready(wready), .m_axi_bresp(bresp), .m_axi_bvalid(bvalid),
    .m_axi_bready(bready), .axi_err
  );

  axi_mem_model #(.ADDR_W(AW), .STALL_PCT(15)) mem (.clk, .rst_n, .araddr, .arlen, .arsize,
    .arburst, .arvalid, .arready, .rdata, .rresp, .rlast, .rvalid, .rready, .awaddr, .awlen,
    .awsize, .awburst, .awvalid, .awready, .wdata, .wstrb, .wlast, .wvalid, .wready, .bresp,
    .bvalid, .bready);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s @%0d", what, cyc);
    end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [127:0] rnd128();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

  // ------------------------------------------------------------ counters
  int n_pass = 0, n_mac_fail = 0, n_nonce_fail = 0, n_oversize = 0, n_alarm = 0;
  int n_f1_wait = 0, n_bq_full = 0, n_wrap = 0, n_aq_empty = 0, n_ar = 0, n_overlap = 0;
  int n_res_frames = 0;

  always @(posedge clk) if (rst_n) begin
    if (rxf_valid && !rxf_ready) n_f1_wait++;
    if (txf_valid && dut.q_full) n_bq_full++;
    if (txf_valid && txf_ready && !dut.q_empty && dut.place != dut.wp_q) n_wrap++;
    if (int'(dut.rstate) == 0 && dut.prm_valid && dut.a_front_q == a_rear_tb) n_aq_empty++;
    if (arvalid && arready) n_ar++;
    if (rvalid && rready && wvalid && wready) n_overlap++;
    check(!axi_err, "no AXI error");
  end

  // ------------------------------------------------------------ CPU: send
  outcome_e     exp_outcome [$];
  logic [127:0] sent_img [$][$];       // frame images the SecureFPGA side must see

  task automatic ch1_send(input logic [2:0] op, input logic [28:0] v);
    @(negedge clk);
    ch1_valid = 1;
    ch1_data  = {op, v};
    @(negedge clk);
    ch1_valid = 0;
  endtask

  task automatic send_frame(input int len, input outcome_e kind);
    logic [127:0] n, d [$], img [$];
    longint addr;
    int slot;
    while (((a_rear_tb + 1) % MAX_SIZE) == ch4[31:16]) @(negedge clk);
    slot = a_rear_tb;
    addr = BUFA_BASE + longint'(slot) * 64'h10_0000 + longint'($urandom % 256) * 16;
    n = rnd128();
    for (int i = 0; i < len; i++) d.push_back(rnd128());
    img.push_back(sm4_ref(n, KEY, 0));
    img.push_back('0);
    foreach (d[i]) img.push_back(sm4_ref(d[i], KEY, 0));
    img.push_back(mac_ref(d, n, KEY));
    if (kind == E_MAC_FAIL) begin
      int k = 2 + int'($urandom % len);
      img[k] = img[k] ^ (128'h1 << ($urandom % 128));
    end
    foreach (img[i]) mem.poke(addr + 16 * i, img[i]);
    exp_outcome.push_back(kind);
    sent_img.push_back(img);
    ch1_send(3'b001, 29'(addr >> 29));
    ch1_send(3'b010, 29'(addr));
    ch1_send(3'b011, 29'(len));
    ch1_send(3'b100, (kind == E_NONCE_FAIL) ? n[28:0] ^ 29'h100 : n[28:0]);
    repeat ($urandom % 20) @(negedge clk);
    a_rear_tb = 16'((a_rear_tb + 1) % MAX_SIZE);
  endtask

  // ------------------------------------------------------------ CPU: channel 2
  logic [AW-1:0] rx_addr;
  typedef struct { longint addr; int len; } res_t;
  res_t res_q [$];

  always @(negedge clk) ch2_ready = $urandom % 4 != 0;
  always @(posedge clk) if (rst_n && ch2_valid && ch2_ready) begin
    unique case (ch2_data[31:29])
      3'b111: begin
        outcome_e e;
        check(exp_outcome.size() > 0, "status without frame");
        e = exp_outcome.pop_front();
        check((ch2_data[28:0] == 0) == (e == E_PASS), "status matches verdict");
        case (e)
          E_PASS:       n_pass++;
          E_MAC_FAIL:   n_mac_fail++;
          E_NONCE_FAIL: n_nonce_fail++;
          default:      n_oversize++;
        endcase
      end
      3'b001: rx_addr[AW-1:29] = ch2_data[AW-30:0];
      3'b010: rx_addr[28:0] = ch2_data[28:0];
      3'b011: res_q.push_back('{longint'(rx_addr), int'(ch2_data[28:0])});
      default: check(0, "unknown channel-2 opcode");
    endcase
  end

  // ------------------------------------------------------------ user: alarms
  always @(posedge alarm) begin
    n_alarm++;
    check(fail_flag, "fail flag with alarm");
    repeat (5 + $urandom % 20) @(negedge clk);
    alarm_clear = 1;
    @(negedge clk);
    alarm_clear = 0;
  end

  // ------------------------------------------------------------ SecureFPGA model
  logic [127:0] f2_mem [256];
  logic [7:0]   f2_wp = '0, f2_rp = '0;
  logic [127:0] res_img [$][$];        // result frames the CPU must find in bufferB
  assign f2_empty = f2_wp == f2_rp;
  assign f2_data  = f2_mem[f2_rp];
  always @(posedge clk) if (f2_rd && !f2_empty) f2_rp <= f2_rp + 1'b1;

  initial begin
    @(posedge rst_n);
    forever begin
      logic [127:0] blk [$], exp [$], n, d [$], r [$];
      logic [28:0] lite;
      int len;
      bit pass;
      blk.delete();
      d.delete();
      r.delete();
      @(negedge clk);
      rxf_ready = $urandom % 3 == 0;
      if (rxf_valid && rxf_ready) begin
        @(posedge clk);
        len = int'(rxf_len);
        lite = rxf_nonce;
        @(negedge clk);
        rxf_ready = 0;
        while (blk.size() < len + 3) begin
          rx_ready = $urandom % 4 != 0;
          @(posedge clk);
          if (rx_valid && rx_ready) blk.push_back(rx_data);
          @(negedge clk);
        end
        rx_ready = 0;
        check(sent_img.size() > 0, "frame was sent");
        if (sent_img.size() > 0) begin
          exp = sent_img.pop_front();
          check(blk == exp, "frame image reaches SecureFPGA unchanged");
        end
        // judge the frame as the SecureFPGA would
        for (int i = 0; i < len; i++) d.push_back(sm4_ref(blk[2 + i], KEY, 1));
        n = sm4_ref(blk[0], KEY, 1);
        pass = len <= F1_DEPTH && n[28:0] == lite && mac_ref(d, n, KEY) == blk[len + 2];
        repeat ($urandom % 10) @(negedge clk);
        rx_done = 1;
        rx_pass = pass;
        @(negedge clk);
        rx_done = 0;
        if (pass) begin
          // result frame: ~data, cut at TX_MAX
          for (int i = 0; i < len && i < TX_MAX; i++) d[i] = ~d[i];
          while (d.size() > TX_MAX) void'(d.pop_back());
          if (d.size() == 0) continue;
          r.push_back(blk[0]);
          r.push_back('0);
          foreach (d[i]) r.push_back(sm4_ref(d[i], KEY, 0));
          r.push_back(mac_ref(d, n, KEY));
          foreach (r[i]) begin
            f2_mem[f2_wp] = r[i];
            f2_wp++;
          end
          res_img.push_back(r);
          txf_valid = 1;
          txf_len   = LEN_W'(d.size());
          do @(posedge clk); while (!txf_ready);
          @(negedge clk);
          txf_valid = 0;
        end
      end
    end
  end

  // ------------------------------------------------------------ CPU: receive
  initial begin
    @(posedge rst_n);
    forever begin
      res_t rr;
      logic [127:0] exp [$];
      bit same;
      while (res_q.size() == 0) @(negedge clk);
      rr = res_q.pop_front();
      n_res_frames++;
      check(rr.addr >= BUFB_BASE && rr.addr + 16 * (rr.len + 3) <= BUFB_BASE + BUFB_BYTES,
            "result frame inside bufferB");
      check(res_img.size() > 0, "result frame was sent");
      if (res_img.size() > 0) begin
        exp = res_img.pop_front();
        check(rr.len + 3 == exp.size(), "result length message");
        same = 1;
        foreach (exp[i]) if (mem.peek(rr.addr + 16 * i) != exp[i]) same = 0;
        check(same, "result frame intact in bufferB");
      end
      repeat ((n_res_frames % 3 == 0) ? 300 : $urandom % 10) @(negedge clk);
      // the frame must still be intact when the CPU releases its slot
      same = 1;
      foreach (exp[i]) if (mem.peek(rr.addr + 16 * i) != exp[i]) same = 0;
      check(same, "result frame not overwritten before release");
      b_front_tb = 16'((b_front_tb + 1) % MAX_SIZE);
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (5) @(negedge clk);
    for (int f = 0; f < 50; f++) begin
      case (f % 10)
        3:       send_frame(1 + $urandom % 8, E_MAC_FAIL);
        6:       send_frame(1 + $urandom % 8, E_NONCE_FAIL);
        9:       send_frame(F1_DEPTH + 1 + $urandom % 40, E_OVERSIZE);
        default: send_frame(1 + $urandom % F1_DEPTH, E_PASS);
      endcase
    end
    for (int i = 0; i < 50000 && (exp_outcome.size() > 0 || res_img.size() > 0 ||
                                  res_q.size() > 0); i++) @(negedge clk);
    repeat (400) @(negedge clk);
    check(exp_outcome.size() == 0, "every frame got a status");
    check(res_img.size() == 0 && res_q.size() == 0, "every result frame reached the CPU");
    $display("frames: pass=%0d mac_fail=%0d nonce_fail=%0d oversize=%0d alarms=%0d results=%0d",
             n_pass, n_mac_fail, n_nonce_fail, n_oversize, n_alarm, n_res_frames);
    $display("mechanisms: rx_wait=%0d bufA_empty_wait=%0d bufB_full=%0d bufB_wrap=%0d ar=%0d rd_wr_overlap=%0d",
             n_f1_wait, n_aq_empty, n_bq_full, n_wrap, n_ar, n_overlap);
    check(n_pass > 0 && n_mac_fail > 0 && n_nonce_fail > 0 && n_oversize > 0, "every verdict seen");
    check(n_alarm == n_mac_fail + n_nonce_fail + n_oversize, "one alarm per failed frame");
    check(n_f1_wait > 0 && n_aq_empty > 0 && n_bq_full > 0 && n_wrap > 0, "every mechanism seen");
    check(n_overlap > 0, "reads and writes overlapped on AXI");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
