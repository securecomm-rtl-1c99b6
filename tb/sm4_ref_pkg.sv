// sm4_ref_pkg: straight-line reference models used by the testbenches.
// sm4_ref() follows the textbook SM4 description word by word (key schedule
// with FK/CK, 32 rounds, reversed output), written independently of the RTL
// round and pipeline modules; only the S-box table is shared. mac_ref() is the
// MAC of a list of plaintext blocks and a 128-bit nonce:
//   T = XOR of blocks, C = E(T ^ nonce), {C0,C1} = ASCII hex of C,
//   MAC = E(C0 ^ C1).
package sm4_ref_pkg;
  import securecomm_pkg::SBOX;

  function automatic logic [31:0] r_rol(input logic [31:0] x, input int n);
    return (x << n) | (x >> (32 - n));
  endfunction

  function automatic logic [31:0] r_tau(input logic [31:0] a);
    logic [31:0] b;
    for (int k = 0; k < 4; k++) b[8*k +: 8] = SBOX[a[8*k +: 8]];
    return b;
  endfunction

  function automatic logic [31:0] r_ck(input int i);
    logic [31:0] w;
    for (int j = 0; j < 4; j++) w[31-8*j -: 8] = 8'(((4*i + j) * 7) & 255);
    return w;
  endfunction

  function automatic void r_keys(input logic [127:0] key, output logic [31:0] rk [32]);
    logic [31:0] k [36];
    logic [31:0] fk [4];
    fk = '{32'ha3b1bac6, 32'h56aa3350, 32'h677d9197, 32'hb27022dc};
    for (int i = 0; i < 4; i++) k[i] = key[127-32*i -: 32] ^ fk[i];
    for (int i = 0; i < 32; i++) begin
      logic [31:0] t;
      t = r_tau(k[i+1] ^ k[i+2] ^ k[i+3] ^ r_ck(i));
      k[i+4] = k[i] ^ t ^ r_rol(t, 13) ^ r_rol(t, 23);
      rk[i] = k[i+4];
    end
  endfunction

  function automatic logic [127:0] sm4_ref(input logic [127:0] din,
                                           input logic [127:0] key,
                                           input bit decrypt);
    logic [31:0] rk [32];
    logic [31:0] x [36];
    r_keys(key, rk);
    for (int i = 0; i < 4; i++) x[i] = din[127-32*i -: 32];
    for (int i = 0; i < 32; i++) begin
      logic [31:0] t, k;
      k = decrypt ? rk[31-i] : rk[i];
      t = r_tau(x[i+1] ^ x[i+2] ^ x[i+3] ^ k);
      x[i+4] = x[i] ^ t ^ r_rol(t, 2) ^ r_rol(t, 10) ^ r_rol(t, 18) ^ r_rol(t, 24);
    end
    return {x[35], x[34], x[33], x[32]};
  endfunction

  function automatic logic [255:0] hex_ref(input logic [127:0] c);
    logic [255:0] r;
    for (int i = 0; i < 32; i++) begin
      logic [3:0] n;
      n = c[127-4*i -: 4];
      r[255-8*i -: 8] = (n <= 9) ? 8'(48 + int'(n)) : 8'(55 + int'(n));
    end
    return r;
  endfunction

  // MAC over a queue of plaintext blocks
  function automatic logic [127:0] mac_ref(input logic [127:0] blocks [$],
                                           input logic [127:0] nonce,
                                           input logic [127:0] key);
    logic [127:0] t, c;
    logic [255:0] e;
    t = '0;
    foreach (blocks[i]) t ^= blocks[i];
    c = sm4_ref(t ^ nonce, key, 0);
    e = hex_ref(c);
    return sm4_ref(e[255:128] ^ e[127:0], key, 0);
  endfunction
endpackage
