// aes_gcm_pkg: types, constants and functions shared by the key-synthesized
// AES-GCM core.
//
// Bit and byte order. A 128-bit block is held as logic [127:0] with the first
// byte of the block (as written in hex) in bits [127:120]. For AES this is
// state byte 0 (row 0, column 0); the state is filled column by column. For
// GF(2^128) the GCM convention applies: field bit i of a block (coefficient of
// x^i) is vector bit [127-i], so "right shift" in the GCM sense is a >> on the
// vector and bit 127 of the GCM algorithms is vector bit [0].
//
// The functions below are evaluated while the design is elaborated: they turn
// the one AES key given as a parameter into the eleven round keys, the hash
// key H = E(K, 0^128) and the 128-entry multiplication table T of H. This is
// the "synthesized key" idea of the design: none of this exists as hardware,
// the results are constants that the synthesis tool folds into the datapath.
// The composite-field helpers (GF(2^4) arithmetic and the isomorphic
// mappings) are used by the pipelined composite-field S-box.
package aes_gcm_pkg;

  typedef logic [127:0] block_t;
  typedef logic [10:0][127:0] round_keys_t;   // [r] = round key r
  typedef logic [127:0][127:0] ghash_table_t;  // [i] = H * x^i

  // Kind of a 128-bit beat on the core's input stream.
  typedef enum logic [1:0] {
    BK_IV   = 2'd0,  // starts a message: data[127:32] is the 96-bit IV
    BK_AAD  = 2'd1,  // additional authenticated data, hashed only
    BK_TEXT = 2'd2,  // plaintext, encrypted, the ciphertext is hashed
    BK_LEN  = 2'd3   // len(A)||len(C) in bits, hashed, ends the message
  } blk_kind_e;

  // How SubBytes is built (Fig. 3 of the design description).
  typedef enum logic [1:0] {
    SBOX_BRAM      = 2'd0,  // ROM in block RAM, registered read + register
    SBOX_LUT       = 2'd1,  // table in LUTs + register
    SBOX_COMPOSITE = 2'd2   // GF((2^4)^2) inversion, four register stages
  } sbox_style_e;

  // Default key of the design (the example key of the round key table).
  localparam block_t DEFAULT_KEY = 128'h000102030405060708090a0b0c0d0e0f;

  // GCM reduction constant R = 11100001 || 0^120.
  localparam block_t GCM_R = {8'he1, 120'd0};

  // Clock cycles through one SubBytes stage of each style.
  function automatic int unsigned sbox_latency(sbox_style_e style);
    case (style)
      SBOX_BRAM:      return 2;
      SBOX_LUT:       return 1;
      default:        return 4;
    endcase
  endfunction

  // Cycles from a block entering the AES pipeline to its result: one
  // register after the first AddRoundKey, nine full rounds of SubBytes,
  // ShiftRows, MixColumns and AddRoundKey registers, and a final round
  // without MixColumns.
  function automatic int unsigned aes_latency(sbox_style_e style);
    return 1 + 9 * (sbox_latency(style) + 3) + (sbox_latency(style) + 2);
  endfunction

  // ---------------------------------------------------------------- GF(2^8)
  function automatic logic [7:0] xtime(logic [7:0] a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  function automatic logic [7:0] gf8_mul(logic [7:0] a, logic [7:0] b);
    logic [7:0] p = '0;
    logic [7:0] x = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= x;
      x = xtime(x);
    end
    return p;
  endfunction

  // Multiplicative inverse as a^254 (0 maps to 0), by square and multiply.
  function automatic logic [7:0] gf8_inv(logic [7:0] a);
    logic [7:0] r = 8'h01;
    logic [7:0] p = a;
    for (int i = 0; i < 8; i++) begin
      if (i != 0) r = gf8_mul(r, p);  // 254 = 1111_1110b
      p = gf8_mul(p, p);
    end
    return r;
  endfunction

  function automatic logic [7:0] aes_affine(logic [7:0] b);
    logic [7:0] s;
    for (int i = 0; i < 8; i++)
      s[i] = b[i] ^ b[(i + 4) % 8] ^ b[(i + 5) % 8] ^ b[(i + 6) % 8] ^ b[(i + 7) % 8];
    return s ^ 8'h63;
  endfunction

  // The whole S-box as a 256-entry table, entry a = affine(a^-1). It is
  // computed once, here, and serves the block RAM and LUT styles and the
  // elaboration-time key schedule.
  typedef logic [255:0][7:0] sbox_table_t;

  function automatic sbox_table_t sbox_table();
    sbox_table_t t;
    for (int a = 0; a < 256; a++) t[a] = aes_affine(gf8_inv(8'(a)));
    return t;
  endfunction

  localparam sbox_table_t SBOX_TABLE = sbox_table();

  function automatic logic [7:0] sbox(logic [7:0] a);
    return SBOX_TABLE[a];
  endfunction

  // ---------------------------------------------------- AES round functions
  function automatic block_t sub_bytes(block_t s);
    block_t r;
    for (int i = 0; i < 16; i++) r[127 - 8*i -: 8] = sbox(s[127 - 8*i -: 8]);
    return r;
  endfunction

  // Row r of the state is rotated left by r columns.
  function automatic block_t shift_rows(block_t s);
    block_t r;
    for (int c = 0; c < 4; c++)
      for (int row = 0; row < 4; row++)
        r[127 - 8*(4*c + row) -: 8] = s[127 - 8*(4*((c + row) % 4) + row) -: 8];
    return r;
  endfunction

  function automatic logic [31:0] mix_column(logic [31:0] col);
    logic [7:0] a0, a1, a2, a3;
    {a0, a1, a2, a3} = col;
    return {xtime(a0) ^ xtime(a1) ^ a1 ^ a2 ^ a3,
            a0 ^ xtime(a1) ^ xtime(a2) ^ a2 ^ a3,
            a0 ^ a1 ^ xtime(a2) ^ xtime(a3) ^ a3,
            xtime(a0) ^ a0 ^ a1 ^ a2 ^ xtime(a3)};
  endfunction

  function automatic block_t mix_columns(block_t s);
    block_t r;
    for (int c = 0; c < 4; c++) r[127 - 32*c -: 32] = mix_column(s[127 - 32*c -: 32]);
    return r;
  endfunction

  // ------------------------------------------- elaboration-time key schedule
  function automatic round_keys_t key_expand(block_t key);
    round_keys_t rk;
    logic [31:0] w [44];
    logic [31:0] t;
    logic [7:0]  rcon = 8'h01;
    for (int i = 0; i < 4; i++) w[i] = key[127 - 32*i -: 32];
    for (int i = 4; i < 44; i++) begin
      t = w[i-1];
      if (i % 4 == 0) begin
        t = {t[23:0], t[31:24]};
        t = {sbox(t[31:24]), sbox(t[23:16]), sbox(t[15:8]), sbox(t[7:0])};
        t[31:24] ^= rcon;
        rcon = xtime(rcon);
      end
      w[i] = w[i-4] ^ t;
    end
    for (int r = 0; r <= 10; r++) rk[r] = {w[4*r], w[4*r+1], w[4*r+2], w[4*r+3]};
    return rk;
  endfunction

  function automatic block_t aes_encrypt(block_t key, block_t pt);
    round_keys_t rk = key_expand(key);
    block_t s = pt ^ rk[0];
    for (int r = 1; r <= 10; r++) begin
      s = shift_rows(sub_bytes(s));
      if (r != 10) s = mix_columns(s);
      s ^= rk[r];
    end
    return s;
  endfunction

  // ------------------------------------------------------------ GF(2^128)
  // Algorithm 2: table of H * x^i for i = 0..127 (GCM bit order).
  function automatic ghash_table_t ghash_table(block_t h);
    ghash_table_t t;
    block_t v = h;
    for (int i = 0; i < 128; i++) begin
      t[i] = v;
      v = v[0] ? ((v >> 1) ^ GCM_R) : (v >> 1);
    end
    return t;
  endfunction

  // ------------------------------------------------- GF((2^4)^2) S-box parts
  // GF(2^4) with x^4 + x + 1; GF((2^4)^2) with y^2 + y + lambda, lambda = {1100}.
  function automatic logic [3:0] gf4_mul(logic [3:0] a, logic [3:0] b);
    logic [3:0] p = '0;
    logic [3:0] x = a;
    for (int i = 0; i < 4; i++) begin
      if (b[i]) p ^= x;
      x = {x[2:0], 1'b0} ^ (x[3] ? 4'b0011 : 4'b0000);
    end
    return p;
  endfunction

  function automatic logic [3:0] gf4_sq(logic [3:0] a);
    return {a[3], a[3] ^ a[1], a[2], a[2] ^ a[0]};
  endfunction

  function automatic logic [3:0] gf4_mul_lambda(logic [3:0] a);
    return gf4_mul(a, 4'b1100);
  endfunction

  // GF(2^4) inverses as a 16-entry table, entry a = a^14 (0 maps to 0).
  typedef logic [15:0][3:0] gf4_table_t;

  function automatic gf4_table_t gf4_inv_table();
    gf4_table_t t;
    for (int a = 0; a < 16; a++) begin
      logic [3:0] r = 4'd1;
      for (int i = 0; i < 14; i++) r = gf4_mul(r, 4'(a));
      t[a] = r;
    end
    return t;
  endfunction

  localparam gf4_table_t GF4_INV_TABLE = gf4_inv_table();

  function automatic logic [3:0] gf4_inv(logic [3:0] a);
    return GF4_INV_TABLE[a];
  endfunction

  // Isomorphic mapping GF(2^8) -> GF((2^4)^2), result {high, low}. It sends
  // x (02) to the root beta = {0010,0001} of the AES polynomial
  // x^8+x^4+x^3+x+1 in the composite field; column i of the matrix is beta^i.
  function automatic logic [7:0] iso_map(logic [7:0] a);
    logic [7:0] q;
    q[7] = a[7] ^ a[5];
    q[6] = a[7] ^ a[5] ^ a[3] ^ a[2];
    q[5] = a[7] ^ a[6] ^ a[4] ^ a[1];
    q[4] = a[6] ^ a[5] ^ a[4];
    q[3] = a[6] ^ a[5] ^ a[3];
    q[2] = a[6] ^ a[4] ^ a[3] ^ a[2];
    q[1] = a[7] ^ a[5] ^ a[3];
    q[0] = a[1] ^ a[0];
    return q;
  endfunction

  // Inverse isomorphic mapping GF((2^4)^2) -> GF(2^8).
  function automatic logic [7:0] iso_map_inv(logic [7:0] q);
    logic [7:0] a;
    a[7] = q[6] ^ q[4] ^ q[2];
    a[6] = q[6] ^ q[4] ^ q[3] ^ q[2] ^ q[1];
    a[5] = q[7] ^ q[6] ^ q[4] ^ q[2];
    a[4] = q[7] ^ q[4] ^ q[3] ^ q[1];
    a[3] = q[7] ^ q[1];
    a[2] = q[6] ^ q[1];
    a[1] = q[7] ^ q[5] ^ q[4];
    a[0] = q[7] ^ q[5] ^ q[4] ^ q[0];
    return a;
  endfunction

endpackage
