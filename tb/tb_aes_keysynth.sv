// tb_aes_keysynth: self-checking testbench of the key-synthesized AES-128
// pipeline.
//
// With the default key 000102..0f it checks the eleven synthesized round keys
// against the published table, the FIPS-197 example (00112233..ff ->
// 69c4e0d86a7b0430d8cdb78070b4c55a) and the hash key E(K, 0) =
// c6a13b37878f5b826f4f8162a1c8d879. Then random blocks are pushed in back to
// back (one per clock, with a gap in the middle) through all three S-box
// styles, every result is compared with a reference AES, and the latency is
// checked: 50 clocks (block RAM), 40 (LUT), 70 (composite field).
module tb_aes_keysynth;
  import aes_gcm_pkg::*;
  import gcm_ref_pkg::*;

  localparam int N = 40;
  localparam block_t KEY = 128'h000102030405060708090a0b0c0d0e0f;
  localparam block_t TABLE_RK [11] = '{
    128'h000102030405060708090a0b0c0d0e0f, 128'hd6aa74fdd2af72fadaa678f1d6ab76fe,
    128'hb692cf0b643dbdf1be9bc5006830b3fe, 128'hb6ff744ed2c2c9bf6c590cbf0469bf41,
    128'h47f7f7bc95353e03f96c32bcfd058dfd, 128'h3caaa3e8a99f9deb50f3af57adf622aa,
    128'h5e390f7df7a69296a7553dc10aa31f6b, 128'h14f9701ae35fe28c440adf4d4ea9c026,
    128'h47438735a41c65b9e016baf4aebf7ad2, 128'h549932d1f08557681093ed9cbe2c974e,
    128'h13111d7fe3944a17f307a78b4d2b30c5};

  logic   clk = 1'b0;
  logic   rst_n = 1'b0;
  logic   in_valid = 1'b0;
  block_t in_block = '0;
  logic   v [3];
  block_t o [3];
  block_t stim [N];
  int     cycle = 0;
  int     t_in [N];
  int checks = 0;
  int failures = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  aes_keysynth #(.KEY(KEY), .STYLE(SBOX_BRAM))      dut_bram (.clk, .rst_n, .in_valid, .in_block, .out_valid(v[0]), .out_block(o[0]));
  aes_keysynth #(.KEY(KEY), .STYLE(SBOX_LUT))       dut_lut  (.clk, .rst_n, .in_valid, .in_block, .out_valid(v[1]), .out_block(o[1]));
  aes_keysynth #(.KEY(KEY), .STYLE(SBOX_COMPOSITE)) dut_comp (.clk, .rst_n, .in_valid, .in_block, .out_valid(v[2]), .out_block(o[2]));

  localparam int LAT [3] = '{50, 40, 70};
  int got_n [3] = '{0, 0, 0};

  // Output checkers, one per style.
  for (genvar s = 0; s < 3; s++) begin : g_chk
    always @(posedge clk) begin
      if (rst_n && v[s]) begin
        int k;
        k = got_n[s];
        checks++;
        if (k >= N || o[s] !== ref_aes(KEY, stim[k])) begin
          failures++;
          $display("FAIL style %0d block %0d: got %032x", s, k, o[s]);
        end
        checks++;
        if (k < N && cycle - t_in[k] != LAT[s]) begin
          failures++;
          $display("FAIL style %0d block %0d latency %0d", s, k, cycle - t_in[k]);
        end
        // Known answers, looked at as they leave the LUT pipeline.
        if (s == 1 && k < 2) begin
          checks++;
          if (o[s] !== (k == 0 ? 128'h69c4e0d86a7b0430d8cdb78070b4c55a
                               : 128'hc6a13b37878f5b826f4f8162a1c8d879)) begin
            failures++;
            $display("FAIL known answer %0d: %032x", k, o[s]);
          end
        end
        got_n[s] = k + 1;
      end
    end
  end

  initial begin
    for (int r = 0; r <= 10; r++) begin
      checks++;
      if (dut_bram.RK[r] !== TABLE_RK[r]) begin
        failures++;
        $display("FAIL round key %0d", r);
      end
    end
    checks++;
    if (ref_aes(KEY, 128'h00112233445566778899aabbccddeeff) != 128'h69c4e0d86a7b0430d8cdb78070b4c55a) failures++;
    stim[0] = 128'h00112233445566778899aabbccddeeff;
    stim[1] = '0;
    for (int n = 2; n < N; n++) stim[n] = {$urandom, $urandom, $urandom, $urandom};
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < N; n++) begin
      if (n == N / 2) begin
        in_valid <= 1'b0;
        repeat (3) @(posedge clk);
      end
      in_valid <= 1'b1;
      in_block <= stim[n];
      t_in[n] = cycle + 1;
      @(posedge clk);
    end
    in_valid <= 1'b0;
    repeat (90) @(posedge clk);
    for (int s = 0; s < 3; s++) begin
      checks++;
      if (got_n[s] != N) begin
        failures++;
        $display("FAIL style %0d delivered %0d blocks", s, got_n[s]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
