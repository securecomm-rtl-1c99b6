// securecomm_pkg: types, constants and pure functions shared by the SecureComm
// FPGA-side modules.
//
// SM4 part: the S-box (the standard SM4 table, 256 bytes), the nonlinear
// transform tau (four parallel S-box lookups), the data linear transform
//   L(B)  = B ^ (B<<<2) ^ (B<<<10) ^ (B<<<18) ^ (B<<<24)
// and the key-schedule linear transform L'(B) = B ^ (B<<<13) ^ (B<<<23),
// the system parameters FK and CK (CK byte j of word i is (4i+j)*7 mod 256),
// and a constant function that expands a 128-bit key into its 32 round keys
// (used to pre-compute the sealed fixed-key round keys at elaboration).
// Blocks are big-endian: word X0 sits in bits [127:96].
//
// MAC part: hex_expand() turns the 128-bit value C into 32 upper-case ASCII hex
// characters, C0 being the characters of C[127:64] and C1 those of C[63:0].
//
// LITE part: the 3-bit opcodes in bits [31:29] of the channel 1/2 words, and
// the data-frame layout (nonce block, reserved block, data blocks, MAC block).
package securecomm_pkg;

  typedef logic [127:0] block_t;
  typedef logic [31:0]  word_t;
  // 32 round keys, rk[i] used by round i
  typedef logic [31:0][31:0] rkset_t;

  localparam logic [7:0] SBOX [256] = '{
    8'hd6, 8'h90, 8'he9, 8'hfe, 8'hcc, 8'he1, 8'h3d, 8'hb7, 8'h16, 8'hb6, 8'h14, 8'hc2, 8'h28, 8'hfb, 8'h2c, 8'h05,
    8'h2b, 8'h67, 8'h9a, 8'h76, 8'h2a, 8'hbe, 8'h04, 8'hc3, 8'haa, 8'h44, 8'h13, 8'h26, 8'h49, 8'h86, 8'h06, 8'h99,
    8'h9c, 8'h42, 8'h50, 8'hf4, 8'h91, 8'hef, 8'h98, 8'h7a, 8'h33, 8'h54, 8'h0b, 8'h43, 8'hed, 8'hcf, 8'hac, 8'h62,
    8'he4, 8'hb3, 8'h1c, 8'ha9, 8'hc9, 8'h08, 8'he8, 8'h95, 8'h80, 8'hdf, 8'h94, 8'hfa, 8'h75, 8'h8f, 8'h3f, 8'ha6,
    8'h47, 8'h07, 8'ha7, 8'hfc, 8'hf3, 8'h73, 8'h17, 8'hba, 8'h83, 8'h59, 8'h3c, 8'h19, 8'he6, 8'h85, 8'h4f, 8'ha8,
    8'h68, 8'h6b, 8'h81, 8'hb2, 8'h71, 8'h64, 8'hda, 8'h8b, 8'hf8, 8'heb, 8'h0f, 8'h4b, 8'h70, 8'h56, 8'h9d, 8'h35,
    8'h1e, 8'h24, 8'h0e, 8'h5e, 8'h63, 8'h58, 8'hd1, 8'ha2, 8'h25, 8'h22, 8'h7c, 8'h3b, 8'h01, 8'h21, 8'h78, 8'h87,
    8'hd4, 8'h00, 8'h46, 8'h57, 8'h9f, 8'hd3, 8'h27, 8'h52, 8'h4c, 8'h36, 8'h02, 8'he7, 8'ha0, 8'hc4, 8'hc8, 8'h9e,
    8'hea, 8'hbf, 8'h8a, 8'hd2, 8'h40, 8'hc7, 8'h38, 8'hb5, 8'ha3, 8'hf7, 8'hf2, 8'hce, 8'hf9, 8'h61, 8'h15, 8'ha1,
    8'he0, 8'hae, 8'h5d, 8'ha4, 8'h9b, 8'h34, 8'h1a, 8'h55, 8'had, 8'h93, 8'h32, 8'h30, 8'hf5, 8'h8c, 8'hb1, 8'he3,
    8'h1d, 8'hf6, 8'he2, 8'h2e, 8'h82, 8'h66, 8'hca, 8'h60, 8'hc0, 8'h29, 8'h23, 8'hab, 8'h0d, 8'h53, 8'h4e, 8'h6f,
    8'hd5, 8'hdb, 8'h37, 8'h45, 8'hde, 8'hfd, 8'h8e, 8'h2f, 8'h03, 8'hff, 8'h6a, 8'h72, 8'h6d, 8'h6c, 8'h5b, 8'h51,
    8'h8d, 8'h1b, 8'haf, 8'h92, 8'hbb, 8'hdd, 8'hbc, 8'h7f, 8'h11, 8'hd9, 8'h5c, 8'h41, 8'h1f, 8'h10, 8'h5a, 8'hd8,
    8'h0a, 8'hc1, 8'h31, 8'h88, 8'ha5, 8'hcd, 8'h7b, 8'hbd, 8'h2d, 8'h74, 8'hd0, 8'h12, 8'hb8, 8'he5, 8'hb4, 8'hb0,
    8'h89, 8'h69, 8'h97, 8'h4a, 8'h0c, 8'h96, 8'h77, 8'h7e, 8'h65, 8'hb9, 8'hf1, 8'h09, 8'hc5, 8'h6e, 8'hc6, 8'h84,
    8'h18, 8'hf0, 8'h7d, 8'hec, 8'h3a, 8'hdc, 8'h4d, 8'h20, 8'h79, 8'hee, 8'h5f, 8'h3e, 8'hd7, 8'hcb, 8'h39, 8'h48
  };

  localparam word_t FK [4] = '{32'ha3b1bac6, 32'h56aa3350, 32'h677d9197, 32'hb27022dc};

  function automatic word_t rol(input word_t x, input int n);
    return (x << n) | (x >> (32 - n));
  endfunction

  function automatic word_t tau(input word_t a);
    return {SBOX[a[31:24]], SBOX[a[23:16]], SBOX[a[15:8]], SBOX[a[7:0]]};
  endfunction

  function automatic word_t lin_data(input word_t b);
    return b ^ rol(b, 2) ^ rol(b, 10) ^ rol(b, 18) ^ rol(b, 24);
  endfunction

  function automatic word_t lin_key(input word_t b);
    return b ^ rol(b, 13) ^ rol(b, 23);
  endfunction

  function automatic word_t ck(input int i);
    word_t w;
    for (int j = 0; j < 4; j++) w[31-8*j -: 8] = 8'(((4*i + j) * 7) % 256);
    return w;
  endfunction

  // One key-schedule step: {K1,K2,K3,K4} from {K0,K1,K2,K3} and CK_i.
  function automatic block_t key_step(input block_t k, input word_t cki);
    word_t nk;
    nk = k[127:96] ^ lin_key(tau(k[95:64] ^ k[63:32] ^ k[31:0] ^ cki));
    return {k[95:0], nk};
  endfunction

  // One data round: {X1,X2,X3,X4} from {X0,X1,X2,X3} and rk_i.
  function automatic block_t data_step(input block_t x, input word_t rk);
    word_t nx;
    nx = x[127:96] ^ lin_data(tau(x[95:64] ^ x[63:32] ^ x[31:0] ^ rk));
    return {x[95:0], nx};
  endfunction

  function automatic block_t key_whiten(input block_t mk);
    return mk ^ {FK[0], FK[1], FK[2], FK[3]};
  endfunction

  function automatic rkset_t expand_key(input block_t mk);
    rkset_t rk;
    block_t k;
    k = key_whiten(mk);
    for (int i = 0; i < 32; i++) begin
      k = key_step(k, ck(i));
      rk[i] = k[31:0];
    end
    return rk;
  endfunction

  function automatic rkset_t reverse_keys(input rkset_t rk);
    rkset_t r;
    for (int i = 0; i < 32; i++) r[i] = rk[31-i];
    return r;
  endfunction

  // Reverse the word order after round 31: (X35,X34,X33,X32).
  function automatic block_t word_rotate(input block_t x);
    return {x[31:0], x[63:32], x[95:64], x[127:96]};
  endfunction

  function automatic logic [7:0] hex_char(input logic [3:0] n);
    return (n < 4'd10) ? (8'h30 + 8'(n)) : (8'h41 + 8'(n) - 8'd10);
  endfunction

  // {C0, C1}: 32 ASCII characters of C, most significant nibble first.
  function automatic logic [255:0] hex_expand(input block_t c);
    logic [255:0] r;
    for (int i = 0; i < 32; i++) r[255-8*i -: 8] = hex_char(c[127-4*i -: 4]);
    return r;
  endfunction

  // LITE channel 1/2 opcodes, bits [31:29] of the channel word.
  typedef enum logic [2:0] {
    OP_IDLE    = 3'b000,
    OP_ADDR_H  = 3'b001,
    OP_ADDR_L  = 3'b010,
    OP_LEN     = 3'b011,
    OP_NONCE   = 3'b100,
    OP_STATUS  = 3'b111
  } lite_op_e;

  localparam logic [28:0] STATUS_PASS = 29'd0;
  localparam logic [28:0] STATUS_FAIL = 29'd1;

  // Crypto operation selected per block.
  typedef enum logic [1:0] {
    CM_ENC  = 2'd0,   // fixed (sealed) key, encrypt
    CM_DEC  = 2'd1,   // fixed key, decrypt with the inverted round keys
    CM_ROLL = 2'd2    // rolling key: key supplied with the block, encrypt
  } crypto_mode_e;

  // Tags that route crypto results inside SecureFPGA.
  typedef enum logic [1:0] {
    TAG_NONCE = 2'd0,
    TAG_DATA  = 2'd1,
    TAG_MAC   = 2'd2
  } crypto_tag_e;

  // Frame layout in 128-bit blocks: nonce_full, reserved, data..., MAC.
  localparam int FRAME_OVERHEAD = 3;

endpackage
