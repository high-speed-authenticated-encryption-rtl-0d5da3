// aes_gcm_top: key-synthesized AES-GCM authenticated encryption core,
// one 128-bit block per clock.
//
// The key is a parameter. At elaboration it yields the AES round keys and the
// hash key H = E(K, 0^128), so neither a key schedule nor an H computation
// exists in hardware: the AES pipeline (aes_keysynth) has constant round
// keys and GHASH (ghash_fixed) multiplies by a constant H. A new key means a
// new build of the design.
//
// Input stream, one beat per clock when in_valid is high, per message:
//   BK_IV   once, in_data[127:32] = 96-bit IV. Its counter block J0 is
//           encrypted; the result E(K, J0) is kept to mask the tag.
//   BK_AAD  any number of additional data blocks; hashed, not encrypted.
//   BK_TEXT any number of plaintext blocks; encrypted with the counter
//           blocks inc32(J0), inc32^2(J0), ... and the ciphertext is hashed.
//   BK_LEN  once, len(A) || len(C) in bits (64 bits each); hashed, ends
//           the message.
// in_mask marks the valid bytes of a beat (bit 15 = byte 0 = in_data
// [127:120]); bytes outside it are zeroed before hashing and in the
// ciphertext, which covers a short last AAD or text block. Messages may
// follow each other without gaps.
//
// Timing: counter blocks go through the AES pipeline (LATENCY clocks, see
// aes_gcm_pkg::aes_latency) while the input beat waits in a delay line of
// the same depth. The keystream is XORed with the plaintext into the output
// register (ciphertext out_data, out_valid, LATENCY+1 clocks after the beat
// was taken); the next clock folds the registered block into GHASH. The tag
// GHASH ^ E(K, J0) is shown on tag with tag_valid for one clock,
// LATENCY+2 clocks after the BK_LEN beat. There is no back-pressure.
module aes_gcm_top
  import aes_gcm_pkg::*;
#(
  parameter block_t      KEY   = DEFAULT_KEY,
  parameter sbox_style_e STYLE = SBOX_BRAM
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      in_valid,
  input  blk_kind_e in_kind,
  input  block_t    in_data,
  input  logic [15:0] in_mask,
  output logic      out_valid,
  output block_t    out_data,
  output logic [15:0] out_mask,
  output logic      tag_valid,
  output block_t    tag
);

  localparam block_t      H       = aes_encrypt(KEY, '0);
  localparam int unsigned LATENCY = aes_latency(STYLE);

  // One input beat as it travels down the delay line.
  typedef struct packed {
    blk_kind_e   kind;
    block_t      data;
    logic [15:0] mask;
  } beat_t;

  // ------------------------------------------------------------ counter
  block_t ctr;

  gcm_counter u_counter (
    .clk    (clk),
    .rst_n  (rst_n),
    .load   (in_valid && in_kind == BK_IV),
    .iv     (in_data[127:32]),
    .advance(in_valid && in_kind == BK_TEXT),
    .ctr    (ctr)
  );

  // ------------------------------------------------------- AES pipeline
  logic   ks_valid;
  block_t ks;

  aes_keysynth #(.KEY(KEY), .STYLE(STYLE)) u_aes (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (in_valid && (in_kind == BK_IV || in_kind == BK_TEXT)),
    .in_block (ctr),
    .out_valid(ks_valid),
    .out_block(ks)
  );

  // Delay line that keeps each input beat level with its keystream.
  logic [LATENCY-1:0] dly_valid;
  beat_t              dly [LATENCY];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) dly_valid <= '0;
    else        dly_valid <= {dly_valid[LATENCY-2:0], in_valid};
  end

  always_ff @(posedge clk) begin
    dly[0] <= '{kind: in_kind, data: in_data, mask: in_mask};
    for (int i = 1; i < LATENCY; i++) dly[i] <= dly[i-1];
  end

  logic  aligned_valid;
  beat_t aligned;
  assign aligned_valid = dly_valid[LATENCY-1];
  assign aligned       = dly[LATENCY-1];

  // ------------------------------------- keystream XOR, output register
  block_t mask_bits;
  always_comb
    for (int b = 0; b < 16; b++) mask_bits[8*b +: 8] = {8{aligned.mask[b]}};

  logic   x_valid_q;
  beat_t  x_q;
  block_t x_next;

  always_comb begin
    case (aligned.kind)
      BK_IV:   x_next = ks;
      BK_TEXT: x_next = (ks ^ aligned.data) & mask_bits;
      BK_AAD:  x_next = aligned.data & mask_bits;
      default: x_next = aligned.data;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) x_valid_q <= 1'b0;
    else        x_valid_q <= aligned_valid;
  end

  always_ff @(posedge clk) x_q <= '{kind: aligned.kind, data: x_next, mask: aligned.mask};

  assign out_valid = x_valid_q && x_q.kind == BK_TEXT;
  assign out_data  = x_q.data;
  assign out_mask  = x_q.mask;

  // ------------------------------------------------------------- GHASH
  block_t y;
  block_t ej0_q;
  logic   tag_pend_q;

  ghash_fixed #(.H(H)) u_ghash (
    .clk     (clk),
    .rst_n   (rst_n),
    .clear   (x_valid_q && x_q.kind == BK_IV),
    .in_valid(x_valid_q && x_q.kind != BK_IV),
    .in_data (x_q.data),
    .y       (y)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ej0_q      <= '0;
      tag_pend_q <= 1'b0;
    end else begin
      if (x_valid_q && x_q.kind == BK_IV) ej0_q <= x_q.data;
      tag_pend_q <= x_valid_q && x_q.kind == BK_LEN;
    end
  end

  assign tag_valid = tag_pend_q;
  assign tag       = y ^ ej0_q;

  // The keystream must arrive exactly with the beats that need it.
  a_keystream_aligned : assert property (@(posedge clk) disable iff (!rst_n)
      aligned_valid && (aligned.kind == BK_IV || aligned.kind == BK_TEXT) |-> ks_valid)
    else $error("keystream missing for an IV or text beat");

endmodule
