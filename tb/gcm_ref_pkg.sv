// gcm_ref_pkg: reference models for the testbenches, written independently
// of the RTL's package and in a different style (byte arrays, FIPS-197 and
// SP 800-38D text-book algorithms):
//   ref_sbox      S-box by searching for the multiplicative inverse
//   ref_aes       AES-128 encryption with its own key expansion
//   ref_round     one AES round (optionally without MixColumns)
//   ref_gmul      bit-serial GF(2^128) multiplication (GCM bit order)
//   ref_gcm_*     a GCM message built up block by block
package gcm_ref_pkg;

  typedef logic [7:0] bytes16_t [16];

  function automatic logic [7:0] ref_mul8(logic [7:0] a, logic [7:0] b);
    logic [15:0] p = '0;
    for (int i = 0; i < 8; i++) if (b[i]) p ^= 16'(a) << i;
    for (int i = 15; i >= 8; i--) if (p[i]) p ^= 16'h11b << (i - 8);
    return p[7:0];
  endfunction

  function automatic logic [7:0] ref_sbox(logic [7:0] a);
    logic [7:0] inv = 8'h00;
    logic [7:0] s;
    for (int b = 1; b < 256; b++) if (ref_mul8(a, 8'(b)) == 8'h01) inv = 8'(b);
    s = inv ^ {inv[6:0], inv[7]} ^ {inv[5:0], inv[7:6]} ^ {inv[4:0], inv[7:5]}
        ^ {inv[3:0], inv[7:4]} ^ 8'h63;
    return s;
  endfunction

  function automatic bytes16_t to_bytes(logic [127:0] v);
    bytes16_t b;
    for (int i = 0; i < 16; i++) b[i] = v[127 - 8*i -: 8];
    return b;
  endfunction

  function automatic logic [127:0] from_bytes(bytes16_t b);
    logic [127:0] v;
    for (int i = 0; i < 16; i++) v[127 - 8*i -: 8] = b[i];
    return v;
  endfunction

  function automatic logic [127:0] ref_round(logic [127:0] st, logic [127:0] rk, bit last);
    bytes16_t s = to_bytes(st);
    bytes16_t t;
    bytes16_t k = to_bytes(rk);
    for (int i = 0; i < 16; i++) s[i] = ref_sbox(s[i]);
    for (int i = 0; i < 16; i++) t[i] = s[(i + 4 * (i % 4)) % 16];  // ShiftRows
    s = t;
    if (!last)
      for (int c = 0; c < 4; c++) begin
        logic [7:0] a0, a1, a2, a3;
        a0 = s[4*c]; a1 = s[4*c+1]; a2 = s[4*c+2]; a3 = s[4*c+3];
        s[4*c]   = ref_mul8(a0, 2) ^ ref_mul8(a1, 3) ^ a2 ^ a3;
        s[4*c+1] = a0 ^ ref_mul8(a1, 2) ^ ref_mul8(a2, 3) ^ a3;
        s[4*c+2] = a0 ^ a1 ^ ref_mul8(a2, 2) ^ ref_mul8(a3, 3);
        s[4*c+3] = ref_mul8(a0, 3) ^ a1 ^ a2 ^ ref_mul8(a3, 2);
      end
    for (int i = 0; i < 16; i++) s[i] ^= k[i];
    return from_bytes(s);
  endfunction

  function automatic logic [127:0] ref_round_key(logic [127:0] key, int r);
    logic [7:0] w [176];
    logic [7:0] t [4];
    logic [7:0] rc = 8'h01;
    logic [127:0] out;
    for (int i = 0; i < 16; i++) w[i] = key[127 - 8*i -: 8];
    for (int i = 16; i < 176; i += 4) begin
      for (int j = 0; j < 4; j++) t[j] = w[i - 4 + j];
      if (i % 16 == 0) begin
        logic [7:0] tmp;
        tmp = t[0]; t[0] = ref_sbox(t[1]) ^ rc; t[1] = ref_sbox(t[2]);
        t[2] = ref_sbox(t[3]); t[3] = ref_sbox(tmp);
        rc = ref_mul8(rc, 8'h02);
      end
      for (int j = 0; j < 4; j++) w[i + j] = w[i - 16 + j] ^ t[j];
    end
    for (int i = 0; i < 16; i++) out[127 - 8*i -: 8] = w[16*r + i];
    return out;
  endfunction

  function automatic logic [127:0] ref_aes(logic [127:0] key, logic [127:0] pt);
    logic [127:0] s = pt ^ key;
    for (int r = 1; r <= 10; r++) s = ref_round(s, ref_round_key(key, r), r == 10);
    return s;
  endfunction

  // X * Y in GF(2^128), SP 800-38D algorithm 1.
  function automatic logic [127:0] ref_gmul(logic [127:0] x, logic [127:0] y);
    logic [127:0] z = '0;
    logic [127:0] v = y;
    for (int i = 0; i < 128; i++) begin
      if (x[127 - i]) z ^= v;
      if (v[0]) v = (v >> 1) ^ {8'b1110_0001, 120'd0};
      else      v = v >> 1;
    end
    return z;
  endfunction

  function automatic logic [127:0] mask_to_bits(logic [15:0] m);
    logic [127:0] b;
    for (int i = 0; i < 16; i++) b[8*i +: 8] = {8{m[i]}};
    return b;
  endfunction

endpackage
