// tb_aes_gcm_top: end-to-end self-checking testbench of the key-synthesized
// AES-GCM core.
//
// Four cores share one input stream: the GCM test key
// feffe9928665731c6d6a8f9467308308 with block RAM, LUT and composite-field
// S-boxes, and the all-zero key with LUT S-boxes. The stream holds the
// published GCM test cases (zero key: one zero block, tag
// ab6e47d42cec13bdf53a67b21257bddf; test key: 64-byte text, tag
// 4d5c2af327cd64a62cf35abd2ba6fab4; 20 bytes of AAD and 60 bytes of text,
// tag 5bc94fbc3221a5db94fae95ae7121a47), then random messages with AAD,
// short last blocks, idle clocks inside messages and messages sent back to
// back. Every ciphertext block and tag of every core is compared with a
// reference GCM, and its clock is checked: ciphertext LATENCY+1 clocks
// after its plaintext beat, tag LATENCY+2 clocks after the length beat
// (LATENCY = 50, 40, 70 for the three S-box styles).
// Counted mechanisms (each must occur): AAD blocks, text blocks, short
// blocks, idle clocks inside a message, back-to-back messages, messages
// without text, and all three S-box styles in use.
module tb_aes_gcm_top;
  import aes_gcm_pkg::*;
  import gcm_ref_pkg::*;

  localparam block_t KEY_TC = 128'hfeffe9928665731c6d6a8f9467308308;
  localparam int ND = 4;
  localparam block_t      KEYS   [ND] = '{KEY_TC, KEY_TC, KEY_TC, '0};
  localparam sbox_style_e STYLES [ND] = '{SBOX_BRAM, SBOX_LUT, SBOX_COMPOSITE, SBOX_LUT};
  localparam int          LATS   [ND] = '{50, 40, 70, 40};

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        in_valid = 1'b0;
  blk_kind_e   in_kind = BK_IV;
  block_t      in_data = '0;
  logic [15:0] in_mask = '1;
  int          cycle = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  int checks = 0;
  int failures = 0;

  // Expected results, one queue per core.
  typedef struct { block_t data; logic [15:0] mask; int due; } exp_t;
  exp_t exp_ct  [ND][$];
  exp_t exp_tag [ND][$];

  // Reference state per core for the message being sent.
  block_t ref_ctr [ND];
  block_t ref_ej0 [ND];
  block_t ref_y   [ND];
  block_t ref_h   [ND];

  // Mechanism counters.
  int n_aad = 0, n_text = 0, n_short = 0, n_gap = 0, n_b2b = 0, n_notext = 0, n_msg = 0;

  for (genvar k = 0; k < ND; k++) begin : g_dut
    logic        out_valid, tag_valid;
    block_t      out_data, tag;
    logic [15:0] out_mask;

    aes_gcm_top #(.KEY(KEYS[k]), .STYLE(STYLES[k])) dut (
      .clk, .rst_n, .in_valid, .in_kind, .in_data, .in_mask,
      .out_valid, .out_data, .out_mask, .tag_valid, .tag
    );

    always @(posedge clk) if (rst_n) begin
      if (out_valid) begin
        checks++;
        if (exp_ct[k].size() == 0) begin
          failures++;
          $display("FAIL core %0d: unexpected ciphertext", k);
        end else begin
          exp_t e;
          e = exp_ct[k].pop_front();
          if (out_data !== e.data || out_mask !== e.mask || cycle != e.due) begin
            failures++;
            $display("FAIL core %0d ct: got %032x at %0d, want %032x at %0d",
                     k, out_data, cycle, e.data, e.due);
          end
        end
      end
      if (tag_valid) begin
        checks++;
        if (exp_tag[k].size() == 0) begin
          failures++;
          $display("FAIL core %0d: unexpected tag", k);
        end else begin
          exp_t e;
          e = exp_tag[k].pop_front();
          if (tag !== e.data || cycle != e.due) begin
            failures++;
            $display("FAIL core %0d tag: got %032x at %0d, want %032x at %0d",
                     k, tag, cycle, e.data, e.due);
          end
        end
      end
    end
  end

  // Stimulus: every beat is first put in a list, then driven by a single
  // loop that also steps the reference model (one clock per beat).
  typedef struct {
    blk_kind_e   kind;
    block_t      data;
    logic [15:0] mask;
    int          gap;   // idle clocks before this beat
  } stim_t;
  stim_t stim_q [$];
  int    pending_gap = 0;

  task automatic add(blk_kind_e kind, block_t data, logic [15:0] mask);
    stim_q.push_back('{kind: kind, data: data, mask: mask, gap: pending_gap});
    pending_gap = 0;
  endtask

  task automatic idle(int n);
    pending_gap += n;
  endtask

  // Reference model of every core, stepped with one beat driven at 'cycle'.
  task automatic ref_step(stim_t s);
    block_t m;
    m = mask_to_bits(s.mask);
    for (int k = 0; k < ND; k++) begin
      block_t h, ks;
      h  = ref_h[k];
      ks = ref_aes(KEYS[k], s.kind == BK_IV ? {s.data[127:32], 32'd1}
                                            : {ref_ctr[k][127:32], ref_ctr[k][31:0] + 32'd1});
      case (s.kind)
        BK_IV: begin
          ref_ctr[k] = {s.data[127:32], 32'd1};
          ref_ej0[k] = ks;
          ref_y[k]   = '0;
        end
        BK_AAD: ref_y[k] = ref_gmul(ref_y[k] ^ (s.data & m), h);
        BK_TEXT: begin
          block_t c;
          ref_ctr[k][31:0] = ref_ctr[k][31:0] + 1;
          c = (ks ^ s.data) & m;
          exp_ct[k].push_back('{data: c, mask: s.mask, due: cycle + 1 + LATS[k] + 1});
          ref_y[k] = ref_gmul(ref_y[k] ^ c, h);
        end
        default: begin
          ref_y[k] = ref_gmul(ref_y[k] ^ s.data, h);
          exp_tag[k].push_back('{data: ref_y[k] ^ ref_ej0[k], mask: '1, due: cycle + 1 + LATS[k] + 2});
        end
      endcase
    end
  endtask

  // A message whose AAD and text are given as left-aligned 16-byte blocks.
  task automatic message(block_t iv_blk, block_t aad [], int aad_bytes,
                         block_t pt [], int pt_bytes, bit gaps);
    int na, np;
    na = (aad_bytes + 15) / 16;
    np = (pt_bytes + 15) / 16;
    n_msg++;
    if (np == 0) n_notext++;
    add(BK_IV, iv_blk, '1);
    for (int i = 0; i < na; i++) begin
      int nb;
      nb = (i == na - 1 && aad_bytes % 16 != 0) ? aad_bytes % 16 : 16;
      if (nb != 16) n_short++;
      n_aad++;
      add(BK_AAD, aad[i], 16'hffff << (16 - nb));
    end
    for (int i = 0; i < np; i++) begin
      int nb;
      nb = (i == np - 1 && pt_bytes % 16 != 0) ? pt_bytes % 16 : 16;
      if (nb != 16) n_short++;
      n_text++;
      if (gaps && i == 1) begin
        n_gap++;
        idle(2);
      end
      add(BK_TEXT, pt[i], 16'hffff << (16 - nb));
    end
    add(BK_LEN, {64'(aad_bytes * 8), 64'(pt_bytes * 8)}, '1);
  endtask

  // Published ciphertexts and tags.
  localparam block_t TC3_P [4] = '{
    128'hd9313225f88406e5a55909c5aff5269a, 128'h86a7a9531534f7da2e4c303d8a318a72,
    128'h1c3c0c95956809532fcf0e2449a6b525, 128'hb16aedf5aa0de657ba637b391aafd255};
  localparam block_t TC3_C [4] = '{
    128'h42831ec2217774244b7221b784d0d49c, 128'he3aa212f2c02a4e035c17e2329aca12e,
    128'h21d514b25466931c7d8f6a5aac84aa05, 128'h1ba30b396a0aac973d58e091473f5985};
  localparam block_t TC_IV = {96'hcafebabefacedbaddecaf888, 32'd0};

  // Published values checked against the reference model itself, so that a
  // mismatch on the cores cannot come from the model.
  task automatic check_reference();
    block_t h, y, ej0, ctr;
    h = ref_aes(KEY_TC, '0);
    checks++;
    if (h !== 128'hb83b533708bf535d0aa6e52980d53b78) failures++;
    ctr = {TC_IV[127:32], 32'd1};
    ej0 = ref_aes(KEY_TC, ctr);
    y = '0;
    for (int i = 0; i < 4; i++) begin
      block_t c;
      ctr[31:0] += 1;
      c = ref_aes(KEY_TC, ctr) ^ TC3_P[i];
      checks++;
      if (c !== TC3_C[i]) failures++;
      y = ref_gmul(y ^ c, h);
    end
    y = ref_gmul(y ^ {64'd0, 64'd512}, h);
    checks++;
    if ((y ^ ej0) !== 128'h4d5c2af327cd64a62cf35abd2ba6fab4) begin
      failures++;
      $display("FAIL reference model tag, test case 3");
    end
    // Test case 4: AAD feedfacedeadbeeffeedfacedeadbeefabaddad2, 60-byte text.
    ctr = {TC_IV[127:32], 32'd1};
    y = ref_gmul(128'hfeedfacedeadbeeffeedfacedeadbeef, h);
    y = ref_gmul(y ^ {32'habaddad2, 96'd0}, h);
    for (int i = 0; i < 4; i++) y = ref_gmul(y ^ (i == 3 ? {TC3_C[3][127:32], 32'd0} : TC3_C[i]), h);
    y = ref_gmul(y ^ {64'd160, 64'd480}, h);
    checks++;
    if ((y ^ ej0) !== 128'h5bc94fbc3221a5db94fae95ae7121a47) begin
      failures++;
      $display("FAIL reference model tag, test case 4");
    end
    // Test case 2: zero key, zero IV, one zero block.
    h = ref_aes('0, '0);
    checks++;
    if ((ref_aes('0, 128'd2)) !== 128'h0388dace60b6a392f328c2b971b2fe78) failures++;
    y = ref_gmul(ref_gmul(128'h0388dace60b6a392f328c2b971b2fe78, h) ^ 128'd128, h);
    checks++;
    if ((y ^ ref_aes('0, 128'd1)) !== 128'hab6e47d42cec13bdf53a67b21257bddf) begin
      failures++;
      $display("FAIL reference model tag, test case 2");
    end
  endtask

  initial begin
    block_t aad [];
    block_t pt [];
    check_reference();
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);

    for (int k = 0; k < ND; k++) ref_h[k] = ref_aes(KEYS[k], '0);
    // Test case 2 (zero key, zero IV, one zero block).
    pt = new[1]; pt[0] = '0;
    aad = new[0];
    message('0, aad, 0, pt, 16, 1'b0);
    // Test case 3, back to back.
    n_b2b++;
    pt = new[4]; foreach (pt[i]) pt[i] = TC3_P[i];
    message(TC_IV, aad, 0, pt, 64, 1'b0);
    // Test case 4: 20 bytes of AAD, 60 bytes of text, back to back.
    n_b2b++;
    aad = new[2];
    aad[0] = 128'hfeedfacedeadbeeffeedfacedeadbeef;
    aad[1] = {32'habaddad2, 96'd0};
    pt[3] = {TC3_P[3][127:32], 32'd0};
    message(TC_IV, aad, 20, pt, 60, 1'b0);
    // Random traffic.
    for (int m = 0; m < 12; m++) begin
      int ab, pb;
      ab = $urandom_range(0, 40);
      pb = (m == 5) ? 0 : $urandom_range(1, 80);
      aad = new[(ab + 15) / 16];
      pt  = new[(pb + 15) / 16];
      foreach (aad[i]) aad[i] = {$urandom, $urandom, $urandom, $urandom};
      foreach (pt[i])  pt[i]  = {$urandom, $urandom, $urandom, $urandom};
      if (m % 3 == 0) idle($urandom_range(1, 5));
      else n_b2b++;
      message({$urandom, $urandom, $urandom, 32'd0}, aad, ab, pt, pb, m % 4 == 1);
    end

    // Drive the list: in_valid is written exactly once per clock.
    foreach (stim_q[i]) begin
      repeat (stim_q[i].gap) begin
        in_valid <= 1'b0;
        @(posedge clk);
      end
      in_valid <= 1'b1;
      in_kind  <= stim_q[i].kind;
      in_data  <= stim_q[i].data;
      in_mask  <= stim_q[i].mask;
      ref_step(stim_q[i]);
      @(posedge clk);
    end
    in_valid <= 1'b0;
    repeat (100) @(posedge clk);

    for (int k = 0; k < ND; k++) begin
      checks++;
      if (exp_ct[k].size() != 0 || exp_tag[k].size() != 0) begin
        failures++;
        $display("FAIL core %0d: %0d ciphertexts and %0d tags missing", k,
                 exp_ct[k].size(), exp_tag[k].size());
      end
    end
    $display("mechanisms: messages=%0d aad=%0d text=%0d short=%0d gaps=%0d back_to_back=%0d no_text=%0d styles=3",
             n_msg, n_aad, n_text, n_short, n_gap, n_b2b, n_notext);
    if (n_aad == 0)    begin failures++; $display("FAIL no AAD block"); end
    if (n_text == 0)   begin failures++; $display("FAIL no text block"); end
    if (n_short == 0)  begin failures++; $display("FAIL no short block"); end
    if (n_gap == 0)    begin failures++; $display("FAIL no idle clock inside a message"); end
    if (n_b2b == 0)    begin failures++; $display("FAIL no back-to-back message"); end
    if (n_notext == 0) begin failures++; $display("FAIL no message without text"); end
    checks += 6;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
