// gf128_fixed_mult: GF(2^128) multiplier with one operand, the hash key H,
// fixed at elaboration.
//
// The bit-serial GCM multiplication loop is split in two. The part that
// depends only on H (shifting H and reducing it with R = 11100001||0^120) is
// run at elaboration and leaves a table T[i] = H * x^i, i = 0..127. The
// hardware only does the rest: X = XOR of T[i] over the bits A_i that are 1.
// Since T is constant, every output bit is the XOR of those input bits A_i
// for which that bit of T[i] is 1; table zeros cost nothing. Bit order is
// GCM's: A_i is a[127-i].
//
// Interface: purely combinational, x = a * H within the same clock.
module gf128_fixed_mult
  import aes_gcm_pkg::*;
#(
  parameter block_t H = aes_encrypt(DEFAULT_KEY, '0)
) (
  input  block_t a,
  output block_t x
);

  localparam ghash_table_t T = ghash_table(H);

  always_comb begin
    x = '0;
    for (int i = 0; i < 128; i++)
      if (a[127 - i]) x ^= T[i];
  end

endmodule
