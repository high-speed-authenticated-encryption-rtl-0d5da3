// aes_subbytes: the SubBytes step for a whole 128-bit AES state: sixteen
// S-boxes side by side, all of the style chosen by STYLE.
//
// STYLE selects one of the three S-box constructions (block RAM, LUT table
// or pipelined composite field); the latency is the S-box's, see
// aes_gcm_pkg::sbox_latency (2, 1 or 4 clocks). d is sampled every clock
// edge; q = SubBytes(d) LATENCY clocks later. No valid or reset: the
// enclosing pipeline tracks validity.
module aes_subbytes
  import aes_gcm_pkg::*;
#(
  parameter sbox_style_e STYLE = SBOX_BRAM
) (
  input  logic   clk,
  input  block_t d,
  output block_t q
);

  for (genvar i = 0; i < 16; i++) begin : g_sbox
    if (STYLE == SBOX_BRAM) begin : g_bram
      sbox_bram u_sbox (.clk(clk), .d(d[8*i +: 8]), .q(q[8*i +: 8]));
    end else if (STYLE == SBOX_LUT) begin : g_lut
      sbox_lut u_sbox (.clk(clk), .d(d[8*i +: 8]), .q(q[8*i +: 8]));
    end else begin : g_comp
      sbox_composite u_sbox (.clk(clk), .d(d[8*i +: 8]), .q(q[8*i +: 8]));
    end
  end

endmodule
