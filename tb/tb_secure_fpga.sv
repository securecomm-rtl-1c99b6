// tb_secure_fpga: drives the SecureFPGA core directly, with small FIFO1 and
// FIFO2 instances, and checks both directions against the reference model.
// Receive: frames {E(N), reserved, E(data)..., MAC} are streamed in with
// random gaps; the verdict (pass, MAC failure, nonce-pair failure,
// oversize) is checked, and FIFO1 must release exactly the plaintext of the
// frames that passed, with the last flag on each frame's final block.
// Transmit: a kernel model answers each passed frame with ~data; the result
// frames read back from FIFO2 must be {E(N), 0, E(result)..., MAC} with the
// nonce of a passed frame, and cut at FIFO2 depth - 3 blocks.
module tb_secure_fpga;
  import securecomm_pkg::*;
  import sm4_ref_pkg::*;

  localparam block_t KEY       = 128'h0123456789abcdeffedcba9876543210;
  localparam int     LEN_W     = 20;
  localparam int     F1_DEPTH  = 16;
  localparam int     F2_DEPTH  = 16;
  localparam int     TX_MAX    = F2_DEPTH - 3;

  typedef enum int { E_PASS, E_MAC_FAIL, E_NONCE_FAIL, E_OVERSIZE } outcome_e;

  int checks = 0, failures = 0, cyc = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  logic rxf_valid = 0, rxf_ready, rx_valid = 0, rx_ready, rx_done, rx_pass, rx_nonce_bad;
  logic [LEN_W-1:0] rxf_len = '0, txf_len;
  logic [28:0] rxf_nonce = '0;
  block_t rx_data = '0;
  logic f1_wr, f1_commit, f1_drop;
  logic [128:0] f1_data, f1_rdata;
  logic [$clog2(F1_DEPTH):0] f1_free;
  logic kin_valid, kin_ready = 0;
  logic kout_valid = 0, kout_ready, kout_last = 0;
  block_t kout_data = '0;
  logic f2_wr, f2_empty, f2_full, f2_rd = 0, txf_valid, txf_ready = 0, tx_cut;
  block_t f2_data, f2_rdata;

  secure_fpga #(.KEY(KEY), .LEN_W(LEN_W), .FIFO1_DEPTH(F1_DEPTH), .FIFO2_DEPTH(F2_DEPTH)) dut (
    .clk, .rst_n, .rxf_valid, .rxf_ready, .rxf_len, .rxf_nonce, .rx_valid, .rx_ready, .rx_data,
    .rx_done, .rx_pass, .rx_nonce_bad, .f1_wr, .f1_data, .f1_commit, .f1_drop, .f1_free,
    .kout_valid, .kout_ready, .kout_data, .kout_last,
    .f2_wr, .f2_data, .f2_empty, .txf_valid, .txf_ready, .txf_len, .tx_cut
  );
  frame_fifo #(.WIDTH(129), .DEPTH(F1_DEPTH)) u_f1 (
    .clk, .rst_n, .wr_en(f1_wr), .wr_data(f1_data), .commit(f1_commit), .drop(f1_drop),
    .free(f1_free), .rd_valid(kin_valid), .rd_ready(kin_ready), .rd_data(f1_rdata)
  );
  sync_fifo #(.WIDTH(128), .DEPTH(F2_DEPTH)) u_f2 (
    .clk, .rst_n, .wr_en(f2_wr), .wr_data(f2_data), .full(f2_full), .rd_en(f2_rd),
    .rd_data(f2_rdata), .empty(f2_empty), .count()
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s @%0d", what, cyc);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expectations
  logic [127:0] kin_exp [$];     // plaintext FIFO1 must release
  bit           kin_last_exp [$];
  logic [127:0] res_exp [$];     // kernel results, in order
  logic [127:0] passed_n [$];    // nonces of the frames that passed
  int n_pass = 0, n_macf = 0, n_noncef = 0, n_over = 0, n_cut = 0, n_f1_wait = 0;
  int n_res_frames = 0, n_res_blocks = 0;

  always @(posedge clk) if (rst_n) begin
    if (rxf_valid && !rxf_ready) n_f1_wait++;
    if (tx_cut) n_cut++;
    check(!(f2_wr && f2_full), "FIFO2 never overflows");
  end

  task automatic send_frame(input int len, input outcome_e kind);
    logic [127:0] n, d [$], fr [$];
    bit pass;
    n = {$urandom, $urandom, $urandom, $urandom};
    for (int i = 0; i < len; i++) d.push_back({$urandom, $urandom, $urandom, $urandom});
    fr.push_back(sm4_ref(n, KEY, 0));
    fr.push_back('0);
    foreach (d[i]) fr.push_back(sm4_ref(d[i], KEY, 0));
    fr.push_back(mac_ref(d, n, KEY));
    if (kind == E_MAC_FAIL) begin
      int bi = 2 + int'($urandom % (len + 1));
      int bb = int'($urandom % 128);
      fr[bi][bb] = ~fr[bi][bb];
    end
    @(negedge clk);
    rxf_valid = 1;
    rxf_len   = LEN_W'(len);
    rxf_nonce = (kind == E_NONCE_FAIL) ? n[28:0] ^ 29'h1 : n[28:0];
    do @(posedge clk); while (!rxf_ready);
    @(negedge clk);
    rxf_valid = 0;
    foreach (fr[i]) begin
      while ($urandom % 4 == 0) @(negedge clk);
      rx_valid = 1;
      rx_data  = fr[i];
      do @(posedge clk); while (!rx_ready);
      @(negedge clk);
      rx_valid = 0;
    end
    while (!rx_done) @(posedge clk);
    pass = kind == E_PASS;
    check(rx_pass == pass, "frame verdict");
    check(rx_nonce_bad == (kind == E_NONCE_FAIL), "nonce-pair verdict");
    case (kind)
      E_PASS:       n_pass++;
      E_MAC_FAIL:   n_macf++;
      E_NONCE_FAIL: n_noncef++;
      default:      n_over++;
    endcase
    if (pass) begin
      passed_n.push_back(n);
      foreach (d[i]) begin
        kin_exp.push_back(d[i]);
        kin_last_exp.push_back(i == len - 1);
      end
    end
  endtask

  // kernel: reads FIFO1 and answers each frame with ~data
  initial begin
    logic [127:0] got [$];
    @(posedge rst_n);
    forever begin
      @(negedge clk);
      kin_ready = ($urandom % 3) != 0;
      @(posedge clk);
      if (kin_valid && kin_ready) begin
        check(kin_exp.size() > 0 && f1_rdata[127:0] == kin_exp[0], "FIFO1 plaintext");
        check(kin_last_exp.size() > 0 && f1_rdata[128] == kin_last_exp[0], "FIFO1 last flag");
        if (kin_exp.size() > 0) begin
          void'(kin_exp.pop_front());
          void'(kin_last_exp.pop_front());
        end
        got.push_back(~f1_rdata[127:0]);
        if (f1_rdata[128]) begin
          @(negedge clk);
          kin_ready = 0;
          foreach (got[i]) begin
            res_exp.push_back(got[i]);
            kout_valid = 1;
            kout_data  = got[i];
            kout_last  = i == got.size() - 1;
            do @(posedge clk); while (!kout_ready);
            @(negedge clk);
            kout_valid = 0;
          end
          got.delete();
        end
      end
    end
  end

  // CommFPGA side: read each result frame from FIFO2 and check it
  initial begin
    @(posedge rst_n);
    forever begin
      logic [127:0] blk [$], d [$], n;
      int len;
      bit known;
      @(posedge clk);
      if (txf_valid) begin
        blk.delete();
        d.delete();
        len = int'(txf_len);
        check(len >= 1 && len <= TX_MAX, "result length");
        for (int i = 0; i < len + 3; i++) begin
          @(negedge clk);
          check(!f2_empty, "FIFO2 holds the whole frame");
          blk.push_back(f2_rdata);
          f2_rd = 1;
          @(negedge clk);
          f2_rd = 0;
        end
        check(f2_empty, "FIFO2 empty after the frame");
        // the nonce is that of a frame that passed (which one depends on how
        // receive and transmit interleave)
        n = sm4_ref(blk[0], KEY, 1);
        known = 0;
        foreach (passed_n[i]) if (passed_n[i] == n) known = 1;
        check(known, "result nonce block");
        check(blk[1] == '0, "result reserved block");
        for (int i = 0; i < len; i++) begin
          d.push_back(sm4_ref(blk[2 + i], KEY, 1));
          check(res_exp.size() > 0 && d[i] == res_exp[0], "result data");
          if (res_exp.size() > 0) void'(res_exp.pop_front());
        end
        check(blk[len + 2] == mac_ref(d, n, KEY), "result MAC");
        n_res_frames++;
        n_res_blocks += len;
        txf_ready = 1;
        @(negedge clk);
        txf_ready = 0;
      end
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (5) @(negedge clk);
    for (int f = 0; f < 40; f++) begin
      case (f % 8)
        3:       send_frame(1 + $urandom % 8, E_MAC_FAIL);
        5:       send_frame(1 + $urandom % 8, E_NONCE_FAIL);
        7:       send_frame(F1_DEPTH + 1 + $urandom % 4, E_OVERSIZE);
        default: send_frame(1 + $urandom % F1_DEPTH, E_PASS);
      endcase
    end
    send_frame(0, E_PASS);
    send_frame(0, E_MAC_FAIL);
    for (int i = 0; i < 20000 && (kin_exp.size() > 0 || res_exp.size() > 0 ||
                                  !f2_empty || kout_valid); i++) @(negedge clk);
    repeat (200) @(negedge clk);
    check(kin_exp.size() == 0, "kernel received every passed block");
    check(res_exp.size() == 0, "every result block came back");
    $display("frames: pass=%0d mac_fail=%0d nonce_fail=%0d oversize=%0d fifo1_wait=%0d",
             n_pass, n_macf, n_noncef, n_over, n_f1_wait);
    $display("results: frames=%0d blocks=%0d cut=%0d", n_res_frames, n_res_blocks, n_cut);
    check(n_pass > 0 && n_macf > 0 && n_noncef > 0 && n_over > 0, "every verdict seen");
    check(n_cut > 0, "a result frame was cut");
    check(n_f1_wait > 0, "a frame waited for FIFO1 room");
    check(n_res_frames > n_pass - 1, "result frames produced");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

