// aes_round: one sub-pipelined AES encryption round with its round key fixed
// at elaboration.
//
// The round is cut into register stages as in the key-synthesized AES
// pipeline: SubBytes (with the S-box's own registers), a register after
// ShiftRows, a register after MixColumns, and a register after AddRoundKey.
// With FINAL set (round 10) MixColumns and its register are left out. The
// round key RK is a parameter, so AddRoundKey is an XOR with a constant:
// bits where the key is 0 cost nothing, bits where it is 1 become inverters.
// Interface: d is sampled every clock edge and q is the round output
// LATENCY = sbox_latency(STYLE) + (FINAL ? 2 : 3) clocks later. No reset.
module aes_round
  import aes_gcm_pkg::*;
#(
  parameter sbox_style_e STYLE = SBOX_BRAM,
  parameter block_t      RK    = '0,
  parameter bit          FINAL = 1'b0
) (
  input  logic   clk,
  input  block_t d,
  output block_t q
);

  block_t sb, sr_q, mc_q;

  aes_subbytes #(.STYLE(STYLE)) u_subbytes (.clk(clk), .d(d), .q(sb));

  always_ff @(posedge clk) sr_q <= shift_rows(sb);

  if (FINAL) begin : g_final
    assign mc_q = sr_q;
  end else begin : g_mix
    always_ff @(posedge clk) mc_q <= mix_columns(sr_q);
  end

  always_ff @(posedge clk) q <= mc_q ^ RK;

endmodule
