// aes_keysynth: fully pipelined AES-128 encryption with the key synthesized
// into the structure.
//
// There is no key schedule in hardware. The eleven round keys are derived
// from the parameter KEY while the design is elaborated and each round gets
// its key as a constant (for the default key they are K0 = 000102..0f up to
// K10 = 13111d7fe3944a17f307a78b4d2b30c5). The pipeline is the initial
// AddRoundKey with K0 and a register, then rounds 1 to 10 (aes_round), round
// 10 without MixColumns. A new block can enter on every clock.
//
// Interface: in_valid/in_block are sampled each clock; out_valid/out_block
// give E(KEY, in_block) LATENCY = aes_latency(STYLE) clocks later (40 with
// LUT S-boxes, 50 with block RAM, 70 with composite field). Only the valid
// shift register is reset; the data registers are not. There is no stall:
// the core accepts and delivers one block per clock.
module aes_keysynth
  import aes_gcm_pkg::*;
#(
  parameter block_t      KEY   = DEFAULT_KEY,
  parameter sbox_style_e STYLE = SBOX_BRAM
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  input  block_t in_block,
  output logic   out_valid,
  output block_t out_block
);

  localparam round_keys_t RK      = key_expand(KEY);
  localparam int unsigned LATENCY = aes_latency(STYLE);

  block_t state [11];

  always_ff @(posedge clk) state[0] <= in_block ^ RK[0];

  for (genvar r = 1; r <= 10; r++) begin : g_round
    aes_round #(
      .STYLE(STYLE),
      .RK   (RK[r]),
      .FINAL(r == 10)
    ) u_round (
      .clk(clk),
      .d  (state[r-1]),
      .q  (state[r])
    );
  end

  assign out_block = state[10];

  logic [LATENCY-1:0] valid_sr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) valid_sr <= '0;
    else        valid_sr <= {valid_sr[LATENCY-2:0], in_valid};
  end

  assign out_valid = valid_sr[LATENCY-1];

endmodule
