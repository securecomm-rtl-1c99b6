// tb_securecomm_pkg: checks the package functions against the published SM4
// example (key = plaintext = 0123456789abcdeffedcba9876543210 gives
// 681edf34d206965e86b3e94f536e4246), first/last round keys of that example,
// the S-box being a permutation, CK values and the ASCII hex expansion
// (4'hA -> 8'h41, as in the MAC description).
module tb_securecomm_pkg;
  import securecomm_pkg::*;
  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // watchdog
  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    block_t k, x;
    rkset_t rk;
    bit seen [256];
    logic [255:0] e;
    k = 128'h0123456789abcdeffedcba9876543210;
    rk = expand_key(k);
    check(rk[0]  == 32'hf12186f9, "rk0");
    check(rk[31] == 32'h9124a012, "rk31");
    x = k;
    for (int i = 0; i < 32; i++) x = data_step(x, rk[i]);
    check(word_rotate(x) == 128'h681edf34d206965e86b3e94f536e4246, "known answer");
    x = 128'h681edf34d206965e86b3e94f536e4246;
    for (int i = 0; i < 32; i++) x = data_step(x, rk[31-i]);
    check(word_rotate(x) == k, "decrypt known answer");
    foreach (seen[i]) seen[i] = 0;
    for (int i = 0; i < 256; i++) seen[SBOX[i]] = 1;
    for (int i = 0; i < 256; i++) check(seen[i], "sbox permutation");
    check(ck(0) == 32'h00070e15, "ck0");
    check(ck(31) == 32'h646b7279, "ck31");
    e = hex_expand(128'hA0123456789ABCDEF0123456789ABCDE);
    check(e[255:248] == 8'h41, "hex A");
    check(e[247:240] == 8'h30, "hex 0");
    check(e[127:0] == "F0123456789ABCDE", "hex C1");
    check(e[255:128] == "A0123456789ABCDE", "hex C0");
    check(reverse_keys(rk)[0] == rk[31], "reverse");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
