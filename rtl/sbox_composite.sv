// sbox_composite: AES S-box computed in the composite field GF((2^4)^2),
// pipelined over four register stages (the "composite field" style of
// SubBytes, for targets without memories).
//
// The byte is mapped into GF((2^4)^2) as {ah, al} (ah*y + al, y^2 = y + lambda
// over GF(2^4) = GF(2)[x]/(x^4+x+1), lambda = {1100}). Its inverse is
// {d^-1*ah, d^-1*(ah^al)} with d = lambda*ah^2 ^ (ah^al)*al. Stages:
//   1: isomorphic map, ah ^ al                       -> register
//   2: squarer, lambda multiply, GF(2^4) multiply, xor -> register
//   3: GF(2^4) inversion of d                        -> register
//   4: two GF(2^4) multiplies                        -> register
// after which the inverse isomorphic map and the AES affine map are applied
// without a further register. The stage boundaries follow the drawn
// datapath; the field polynomials, lambda and the mapping matrix are this
// design's choice, the drawing only names the operators. Interface: d is
// sampled every clock edge, q = S(d) four clocks later. No reset: data only.
module sbox_composite
  import aes_gcm_pkg::*;
(
  input  logic       clk,
  input  logic [7:0] d,
  output logic [7:0] q
);

  // Stage 1
  logic [3:0] s1_ah, s1_al, s1_sum;
  // Stage 2
  logic [3:0] s2_ah, s2_sum, s2_d;
  // Stage 3
  logic [3:0] s3_ah, s3_sum, s3_dinv;
  // Stage 4
  logic [3:0] s4_hi, s4_lo;

  logic [7:0] mapped;
  assign mapped = iso_map(d);

  always_ff @(posedge clk) begin
    s1_ah   <= mapped[7:4];
    s1_al   <= mapped[3:0];
    s1_sum  <= mapped[7:4] ^ mapped[3:0];

    s2_ah   <= s1_ah;
    s2_sum  <= s1_sum;
    s2_d    <= gf4_mul_lambda(gf4_sq(s1_ah)) ^ gf4_mul(s1_sum, s1_al);

    s3_ah   <= s2_ah;
    s3_sum  <= s2_sum;
    s3_dinv <= gf4_inv(s2_d);

    s4_hi   <= gf4_mul(s3_dinv, s3_ah);
    s4_lo   <= gf4_mul(s3_dinv, s3_sum);
  end

  assign q = aes_affine(iso_map_inv({s4_hi, s4_lo}));

endmodule
