// securecomm_env.svh: shared end-to-end environment for the securecomm_top
// testbenches. The including module defines the localparams KEY, MAX_SIZE,
// FIFO1_DEPTH, FIFO2_DEPTH, BUFB_BASE, BUFB_BYTES, N_FRAMES, MAX_LEN, SEED
// and instantiates the top as `dut`; this file supplies everything else:
//
//  * the DDR: axi_mem_model with random stalls,
//  * a CPU model: builds frames in software (random nonce N, E(N), reserved
//    block, encrypted data, MAC of the plaintext and N), places them in a
//    bufferA ring of MAX_SIZE slots, sends base address, length and
//    nonce_lite on LITE channel 1, advances bufferA_rear on channel 3; reads
//    result frames named on channel 2 from bufferB, decrypts them, checks
//    their nonce and MAC and advances bufferB_front (slowly at times, so the
//    bufferB queue fills);
//  * an attacker: overwrites a data block of some frames in DDR (MAC
//    failure) and replays old captured frames in place of new ones (nonce
//    pair mismatch); some frames are longer than FIFO1 (rejected);
//  * a kernel model: reads verified frames from FIFO1 with random stalls and
//    answers each with a result stream (sometimes twice as long, so result
//    frames are cut at FIFO2's limit);
//  * the user: answers every alarm with alarm_clear.
// Every integrity verdict, every result block and the mechanisms exercised
// are checked and counted.

  import securecomm_pkg::*;
  import sm4_ref_pkg::*;

  localparam int AW = 40;
  localparam longint BUFA_BASE = 64'h10_0000_0000;
  localparam int TX_MAX = FIFO2_DEPTH - 3;

  typedef enum int {E_PASS, E_MAC_FAIL, E_NONCE_FAIL, E_OVERSIZE} outcome_e;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int cyc = 0;
  always @(posedge clk) cyc++;

  logic ch1_valid = 0, ch2_valid, ch2_ready = 0, alarm, fail_flag, alarm_clear = 0, axi_err;
  logic [31:0] ch1_data, ch2_data, ch3, ch4;
  logic stat_rx_done, stat_rx_pass, stat_rx_nonce_bad, stat_tx_cut;
  logic kin_valid, kin_ready = 0, kin_last, kout_valid = 0, kout_ready, kout_last = 0;
  logic [127:0] kin_data, kout_data;
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

  // ------------------------------------------------------------ counters
  int n_pass = 0, n_mac_fail = 0, n_nonce_fail = 0, n_oversize = 0, n_alarm = 0;
  int n_f1_wait = 0, n_bq_full = 0, n_wrap = 0, n_cut = 0, n_ar = 0, n_results = 0;
  int n_aq_empty = 0, n_result_frames = 0, n_rd_wr_overlap = 0;

  always @(posedge clk) if (rst_n) begin
    if (dut.u_comm.rxf_valid && !dut.u_comm.rxf_ready) n_f1_wait++;
    if (dut.u_comm.txf_valid && dut.u_comm.q_full) n_bq_full++;
    if (dut.u_comm.txf_valid && dut.u_comm.txf_ready && !dut.u_comm.q_empty &&
        dut.u_comm.place != dut.u_comm.wp_q) n_wrap++;
    if (int'(dut.u_comm.rstate) == 0 && dut.u_comm.prm_valid &&
        dut.u_comm.a_front_q == a_rear_tb) n_aq_empty++;
    if (stat_tx_cut) n_cut++;
    if (arvalid && arready) n_ar++;
    if (rvalid && rready && wvalid && wready) n_rd_wr_overlap++;
  end

  // ------------------------------------------------------------ CPU: send
  outcome_e    exp_outcome [$];
  logic [127:0] passed_nonce [$];
  logic [127:0] kernel_exp [$];        // plaintext the kernel must receive
  logic [127:0] old_image [$];         // a captured frame for the replay attack
  longint      old_addr_len;
  bit          have_old = 0;

  function automatic logic [127:0] rnd128();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

  task automatic ch1_send(input logic [2:0] op, input logic [28:0] v);
    @(negedge clk);
    ch1_valid = 1; ch1_data = {op, v};
    @(negedge clk);
    ch1_valid = 0;
  endtask

  task automatic send_frame(input int len, input outcome_e kind);
    logic [127:0] n, d [$], img [$];
    longint addr;
    int slot;
    // wait for a free bufferA slot: (rear + 1) % MAX_SIZE != front
    while (((a_rear_tb + 1) % MAX_SIZE) == ch4[31:16]) @(negedge clk);
    slot = a_rear_tb;
    addr = BUFA_BASE + longint'(slot) * 64'h10_0000 + longint'($urandom % 256) * 16;
    n = rnd128();
    for (int i = 0; i < len; i++) d.push_back(rnd128());
    img.push_back(sm4_ref(n, KEY, 0));
    img.push_back('0);
    foreach (d[i]) img.push_back(sm4_ref(d[i], KEY, 0));
    img.push_back(mac_ref(d, n, KEY));
    if (kind == E_NONCE_FAIL && have_old) begin
      // replay: DDR holds an old, once valid frame; LITE carries the new nonce
      foreach (old_image[i]) mem.poke(addr + 16 * i, old_image[i]);
      len = old_image.size() - 3;
    end else begin
      foreach (img[i]) mem.poke(addr + 16 * i, img[i]);
      if (kind == E_MAC_FAIL) begin
        int k;
        k = 2 + $urandom % len;
        mem.poke(addr + 16 * k, mem.peek(addr + 16 * k) ^ (128'h1 << ($urandom % 128)));
      end
    end
    if (kind == E_PASS && !have_old && len < FIFO1_DEPTH) begin
      old_image = img; have_old = 1;
    end
    if (kind == E_PASS) begin
      passed_nonce.push_back(n);
      foreach (d[i]) kernel_exp.push_back(d[i]);
    end
    exp_outcome.push_back(kind);
    ch1_send(3'b001, 29'(addr >> 29));
    ch1_send(3'b010, 29'(addr));
    ch1_send(3'b011, 29'(len));
    ch1_send(3'b100, n[28:0]);
    repeat ($urandom % 20) @(negedge clk);
    a_rear_tb = 16'((a_rear_tb + 1) % MAX_SIZE);
  endtask

  // ------------------------------------------------------------ CPU: channel 2
  logic [AW-1:0] rx_addr;
  logic [28:0]   rx_len;
  typedef struct { longint addr; int len; } res_t;
  res_t res_q [$];

  always @(negedge clk) ch2_ready = $urandom % 4 != 0;
  always @(posedge clk) if (rst_n && ch2_valid && ch2_ready) begin
    unique case (ch2_data[31:29])
      3'b111: begin
        outcome_e e;
        check(exp_outcome.size() > 0, "status without frame");
        e = exp_outcome.pop_front();
        check((ch2_data[28:0] == 0) == (e == E_PASS), $sformatf("integrity verdict %s", e.name()));
        case (e)
          E_PASS:       n_pass++;
          E_MAC_FAIL:   n_mac_fail++;
          E_NONCE_FAIL: n_nonce_fail++;
          E_OVERSIZE:   n_oversize++;
          default: ;
        endcase
      end
      3'b001: rx_addr[AW-1:29] = ch2_data[AW-30:0];
      3'b010: rx_addr[28:0] = ch2_data[28:0];
      3'b011: begin
        rx_len = ch2_data[28:0];
        res_q.push_back('{longint'(rx_addr), int'(rx_len)});
      end
      default: check(0, "unknown channel-2 opcode");
    endcase
  end

  // nonce-pair check seen by the hardware for replayed frames
  always @(posedge clk) if (stat_rx_done && !stat_rx_pass && exp_outcome.size() > 0)
    if (exp_outcome[0] == E_NONCE_FAIL) check(stat_rx_nonce_bad, "replay flagged as nonce mismatch");

  // ------------------------------------------------------------ user: alarms
  always @(posedge alarm) begin
    n_alarm++;
    check(fail_flag, "fail flag with alarm");
    repeat (5 + $urandom % 20) @(negedge clk);
    alarm_clear = 1;
    @(negedge clk);
    alarm_clear = 0;
  end

  // ------------------------------------------------------------ kernel model
  logic [127:0] result_exp [$];
  int kin_frames = 0;
  int k_pending = 0;                   // kernel answers not yet fully sent
  logic [127:0] kbuf [$];
  always @(negedge clk) kin_ready = $urandom % 5 != 0;
  always @(posedge clk) if (rst_n && kin_valid && kin_ready) begin
    check(kernel_exp.size() > 0 && kin_data == kernel_exp[0], "kernel input data");
    if (kernel_exp.size() > 0) void'(kernel_exp.pop_front());
    kbuf.push_back(kin_data);
    if (kin_last) begin
      kin_frames++;
      fork begin
        logic [127:0] f [$];
        int m;
        f = kbuf;
        m = (kin_frames % 3 == 0) ? 2 * f.size() : f.size();
        kbuf.delete();
        k_pending++;
        kernel_out(f, m);
        k_pending--;
      end join_none
    end
  end

  semaphore ksem = new(1);
  task automatic kernel_out(input logic [127:0] f [$], input int m);
    ksem.get(1);
    for (int j = 0; j < m; ) begin
      logic [127:0] r;
      @(negedge clk);
      r = ~f[j % f.size()] ^ {32'(j), 96'h0};
      kout_valid = $urandom % 4 != 0;
      kout_data  = r;
      kout_last  = j == m - 1;
      @(posedge clk);
      if (kout_valid && kout_ready) begin
        result_exp.push_back(r);
        j++;
      end
    end
    @(negedge clk) kout_valid = 0; kout_last = 0;
    ksem.put(1);
  endtask

  // ------------------------------------------------------------ CPU: receive
  initial begin
    @(posedge rst_n);
    forever begin
      res_t r;
      logic [127:0] n, d [$];
      bit known;
      while (res_q.size() == 0) @(negedge clk);
      r = res_q.pop_front();
      d.delete();
      n_result_frames++;
      check(r.addr >= BUFB_BASE && r.addr + 16 * (r.len + 3) <= BUFB_BASE + BUFB_BYTES,
            "result frame inside bufferB");
      n = sm4_ref(mem.peek(r.addr), KEY, 1);
      known = 0;
      foreach (passed_nonce[i]) if (passed_nonce[i] == n) known = 1;
      check(known, "result nonce is one the CPU sent");
      check(mem.peek(r.addr + 16) == '0, "reserved block");
      for (int i = 0; i < r.len; i++) d.push_back(sm4_ref(mem.peek(r.addr + 16 * (2 + i)), KEY, 1));
      check(mem.peek(r.addr + 16 * (2 + r.len)) == mac_ref(d, n, KEY), "result MAC");
      check(r.len <= TX_MAX, "result frame length");
      foreach (d[i]) begin
        check(result_exp.size() > 0 && d[i] == result_exp[0], "result data");
        if (result_exp.size() > 0) void'(result_exp.pop_front());
        n_results++;
      end
      // consume slowly now and then so that bufferB fills up
      repeat ((n_result_frames % 4 == 0) ? 400 : $urandom % 10) @(negedge clk);
      b_front_tb = 16'((b_front_tb + 1) % MAX_SIZE);
    end
  end

  // ------------------------------------------------------------ main helpers
  task automatic reset_dut();
    repeat (3) @(negedge clk);
    rst_n = 1;
  endtask

  task automatic drain(input int limit);
    int t;
    t = 0;
    while ((exp_outcome.size() > 0 || kernel_exp.size() > 0 || result_exp.size() > 0 ||
            res_q.size() > 0 || kout_valid || kbuf.size() > 0 || k_pending > 0 ||
            int'(dut.u_comm.tstate) != 0 || !dut.u_fifo2.empty ||
            int'(dut.u_secure.state) != 0) && t < limit) begin
      @(negedge clk);
      t++;
    end
    repeat (50) @(negedge clk);
    check(t < limit, "design drained");
    check(exp_outcome.size() == 0, "every frame got a verdict");
    check(kernel_exp.size() == 0, "kernel got every verified block");
    check(result_exp.size() == 0, "CPU got every result block");
    check(!axi_err, "no AXI error");
    check(mem.bursts_4k_violations == 0, "no burst crosses 4 KB");
    check(mem.wlast_errors == 0, "WLAST placement");
  endtask

  task automatic report_counts();
    $display("frames: pass=%0d mac_fail=%0d nonce_fail=%0d oversize=%0d alarms=%0d",
             n_pass, n_mac_fail, n_nonce_fail, n_oversize, n_alarm);
    $display("mechanisms: fifo1_wait=%0d bufA_empty_wait=%0d bufB_full=%0d bufB_wrap=%0d tx_cut=%0d ar_bursts=%0d rd_wr_overlap=%0d",
             n_f1_wait, n_aq_empty, n_bq_full, n_wrap, n_cut, n_ar, n_rd_wr_overlap);
    $display("results: frames=%0d blocks=%0d", n_result_frames, n_results);
  endtask
