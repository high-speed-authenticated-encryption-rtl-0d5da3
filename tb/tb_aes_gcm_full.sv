// tb_aes_gcm_full: the core at its default build (key 000102..0f, block RAM
// S-boxes) taken through one complete authenticated encryption.
//
// One message: IV, two AAD blocks (the second 9 bytes long), eight text
// blocks sent back to back (the last 5 bytes long) and the length block.
// Ciphertext blocks and the tag are compared with a reference GCM computed
// here; each ciphertext block must leave 51 clocks after its plaintext beat
// (50-clock AES pipeline plus the output register), on consecutive clocks,
// and the tag 52 clocks after the length beat.
module tb_aes_gcm_full;
  import aes_gcm_pkg::*;
  import gcm_ref_pkg::*;

  localparam block_t KEY = 128'h000102030405060708090a0b0c0d0e0f;
  localparam int LAT = 50;
  localparam int NT = 8;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        in_valid = 1'b0;
  blk_kind_e   in_kind = BK_IV;
  block_t      in_data = '0;
  logic [15:0] in_mask = '1;
  logic        out_valid, tag_valid;
  block_t      out_data, tag;
  logic [15:0] out_mask;
  int          cycle = 0;
  int checks = 0;
  int failures = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  aes_gcm_top dut (.clk, .rst_n, .in_valid, .in_kind, .in_data, .in_mask,
                   .out_valid, .out_data, .out_mask, .tag_valid, .tag);

  blk_kind_e   kinds [NT + 4];
  block_t      datas [NT + 4];
  logic [15:0] masks [NT + 4];
  block_t      exp_c [NT];
  int          due_c [NT];
  block_t      exp_tag;
  int          due_tag;
  int          n_c = 0;
  int          n_tag = 0;

  always @(posedge clk) if (rst_n) begin
    if (out_valid) begin
      checks++;
      if (n_c >= NT || out_data !== exp_c[n_c] || cycle != due_c[n_c]) begin
        failures++;
        $display("FAIL ciphertext %0d: %032x at %0d", n_c, out_data, cycle);
      end
      n_c++;
    end
    if (tag_valid) begin
      checks++;
      if (tag !== exp_tag || cycle != due_tag) begin
        failures++;
        $display("FAIL tag %032x at %0d, want %032x at %0d", tag, cycle, exp_tag, due_tag);
      end
      n_tag++;
    end
  end

  initial begin
    block_t h, ctr, y, ej0;
    int t0;
    // Reference.
    h = ref_aes(KEY, '0);
    checks++;
    if (h !== 128'hc6a13b37878f5b826f4f8162a1c8d879) failures++;
    kinds[0] = BK_IV;  datas[0] = {96'h_bad_c0de_1234_5678_9abc_def0, 32'd0}; masks[0] = '1;
    kinds[1] = BK_AAD; datas[1] = {$urandom, $urandom, $urandom, $urandom}; masks[1] = '1;
    kinds[2] = BK_AAD; datas[2] = {$urandom, $urandom, $urandom, $urandom} & mask_to_bits(16'hff80);
    masks[2] = 16'hff80;
    for (int i = 0; i < NT; i++) begin
      kinds[3 + i] = BK_TEXT;
      datas[3 + i] = {$urandom, $urandom, $urandom, $urandom};
      masks[3 + i] = (i == NT - 1) ? 16'hf800 : 16'hffff;
    end
    kinds[NT + 3] = BK_LEN;
    datas[NT + 3] = {64'd200, 64'((NT - 1) * 128 + 40)};
    masks[NT + 3] = '1;
    ctr = {datas[0][127:32], 32'd1};
    ej0 = ref_aes(KEY, ctr);
    y = ref_gmul(datas[1], h);
    y = ref_gmul(y ^ datas[2], h);
    for (int i = 0; i < NT; i++) begin
      ctr[31:0] += 1;
      exp_c[i] = (ref_aes(KEY, ctr) ^ datas[3 + i]) & mask_to_bits(masks[3 + i]);
      y = ref_gmul(y ^ exp_c[i], h);
    end
    y = ref_gmul(y ^ datas[NT + 3], h);
    exp_tag = y ^ ej0;

    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    t0 = cycle + 1;
    for (int i = 0; i < NT + 4; i++) begin
      in_valid <= 1'b1;
      in_kind  <= kinds[i];
      in_data  <= datas[i];
      in_mask  <= masks[i];
      @(posedge clk);
    end
    in_valid <= 1'b0;
    for (int i = 0; i < NT; i++) due_c[i] = t0 + 3 + i + LAT + 1;
    due_tag = t0 + NT + 3 + LAT + 2;
    repeat (LAT + 20) @(posedge clk);
    checks++;
    if (n_c != NT || n_tag != 1) begin
      failures++;
      $display("FAIL %0d ciphertext blocks and %0d tags", n_c, n_tag);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
