// tb_mac_verifier: the MAC unit wired to a real sm4_crypto (fixed key).
// Messages of random length and content with random nonces are streamed in;
// every MAC is compared with the reference MAC, and match must be high for
// the right expected MAC and low for a corrupted one. One fixed vector
// (blocks 1, 2, 3, nonce = the example key, key = the example key) has the
// MAC 801228fa24c1d80ef5d975ef3982eae9 computed by a separate software model.
module tb_mac_verifier;
  import securecomm_pkg::*;
  import sm4_ref_pkg::*;
  localparam block_t KEY = 128'h0123456789abcdeffedcba9876543210;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic clear = 0, nonce_load = 0, blk_valid = 0, finish = 0;
  block_t nonce, blk_data, exp_mac, mac;
  logic req_valid, req_ready, rsp_valid, busy, done, match;
  block_t req_data, rsp_data;
  logic [1:0] rsp_tag;

  always #5 clk = ~clk;

  mac_verifier dut (.clk, .rst_n, .clear, .nonce_load, .nonce, .blk_valid, .blk_data,
    .finish, .exp_mac, .req_valid, .req_ready, .req_data, .rsp_valid, .rsp_data,
    .busy, .done, .mac, .match);
  sm4_crypto #(.KEY(KEY)) u_crypto (.clk, .rst_n, .in_valid(req_valid), .in_ready(req_ready),
    .in_mode(CM_ENC), .in_key('0), .in_data(req_data), .in_tag(2'd2),
    .out_valid(rsp_valid), .out_data(rsp_data), .out_tag(rsp_tag));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one(input block_t blocks [$], input block_t n, input bit corrupt,
                     input bit use_fixed, input block_t fixed_mac);
    block_t m;
    int lat;
    m = use_fixed ? fixed_mac : mac_ref(blocks, n, KEY);
    @(negedge clk);
    clear = 1; nonce_load = 1; nonce = n;
    @(negedge clk);
    clear = 0; nonce_load = 0;
    foreach (blocks[i]) begin
      blk_valid = 1; blk_data = blocks[i];
      finish = i == blocks.size() - 1;
      @(negedge clk);
    end
    blk_valid = 0; finish = 0;
    exp_mac = corrupt ? m ^ 128'h1 : m;
    lat = 0;
    while (!done) begin @(negedge clk); lat++; end
    check(mac == m, "mac value");
    check(match == !corrupt, "match flag");
    check(lat < 80, "mac latency");
  endtask

  initial begin
    block_t q [$];
    repeat (2) @(negedge clk);
    rst_n = 1;
    while (!req_ready) @(negedge clk);
    q = '{128'd1, 128'd2, 128'd3};
    one(q, KEY, 0, 1, 128'h801228fa24c1d80ef5d975ef3982eae9);
    for (int n = 0; n < 30; n++) begin
      q.delete();
      repeat (1 + $urandom % 20) q.push_back({$urandom, $urandom, $urandom, $urandom});
      one(q, {$urandom, $urandom, $urandom, $urandom}, n % 3 == 1, 0, '0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
