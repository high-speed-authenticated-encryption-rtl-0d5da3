// ghash_fixed: GHASH accumulator with the hash key H synthesized in.
//
// Each accepted 128-bit block X is folded into the running hash as
// Y <= (Y xor X) * H in one clock, using the fixed-operand multiplier
// gf128_fixed_mult; the register Y closes the feedback loop, so one block
// per clock is hashed without pipeline bubbles. clear sets Y to zero at the
// start of a message (it wins over in_valid).
//
// Interface: clear and in_valid/in_data are sampled each clock; y is the
// register, updated one clock after a block is accepted. Asynchronous
// active-low reset clears Y.
module ghash_fixed
  import aes_gcm_pkg::*;
#(
  parameter block_t H = aes_encrypt(DEFAULT_KEY, '0)
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   clear,
  input  logic   in_valid,
  input  block_t in_data,
  output block_t y
);

  block_t prod;

  gf128_fixed_mult #(.H(H)) u_mult (.a(y ^ in_data), .x(prod));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        y <= '0;
    else if (clear)    y <= '0;
    else if (in_valid) y <= prod;
  end

endmodule
