// sbox_bram: AES S-box held in a read-only block RAM, with the RAM's
// synchronous read followed by a pipeline register (the "BlockRAM" style of
// SubBytes).
//
// The memory is a 256 x 8 array filled at elaboration with S(a) = affine of
// the GF(2^8) inverse of a. The first register is the RAM's own output latch
// (synchronous read, which block RAMs need); the second is the pipeline
// register drawn after the RAM. Interface: d is sampled every clock edge,
// q = S(d) two clocks later. No reset: data only.
module sbox_bram
  import aes_gcm_pkg::*;
(
  input  logic       clk,
  input  logic [7:0] d,
  output logic [7:0] q
);

  logic [7:0] rom [256];
  logic [7:0] rd_q;

  initial begin
    for (int a = 0; a < 256; a++) rom[a] = SBOX_TABLE[a];
  end

  always_ff @(posedge clk) begin
    rd_q <= rom[d];
    q    <= rd_q;
  end

endmodule
