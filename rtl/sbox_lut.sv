// sbox_lut: AES S-box held as a 256-entry table in logic, followed by one
// pipeline register (the "LUT" style of SubBytes).
//
// The table is computed while the design is elaborated (multiplicative
// inverse in GF(2^8) followed by the AES affine map) and indexed directly by
// the input byte; on an FPGA with 6-input LUTs this maps to LUTs and wide
// multiplexers. Interface: d is sampled every clock edge, q = S(d) one clock
// later. No reset: the register only carries data, validity is tracked by the
// enclosing pipeline.
module sbox_lut
  import aes_gcm_pkg::*;
(
  input  logic       clk,
  input  logic [7:0] d,
  output logic [7:0] q
);

  always_ff @(posedge clk) q <= SBOX_TABLE[d];

endmodule
