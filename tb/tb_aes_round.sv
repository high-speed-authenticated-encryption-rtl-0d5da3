// tb_aes_round: self-checking testbench of one sub-pipelined AES round.
//
// Uses round key K1 of the default key (d6aa74fdd2af72fadaa678f1d6ab76fe) in
// a full round and K10 (13111d7fe3944a17f307a78b4d2b30c5) in a final round
// without MixColumns, both with LUT S-boxes. Random states enter on every
// clock; each output is compared with the reference round after the
// expected latency: 1 (S-box) + 3 = 4 clocks for a full round, 3 for the
// final round. The FIPS-197 example state after round 1 is checked too.
module tb_aes_round;
  import aes_gcm_pkg::*;
  import gcm_ref_pkg::*;

  localparam block_t K1  = 128'hd6aa74fdd2af72fadaa678f1d6ab76fe;
  localparam block_t K10 = 128'h13111d7fe3944a17f307a78b4d2b30c5;
  localparam int N = 64;

  logic   clk = 1'b0;
  block_t d, q_full, q_final;
  block_t stim [N];
  int checks = 0;
  int failures = 0;

  always #5 clk = ~clk;

  aes_round #(.STYLE(SBOX_LUT), .RK(K1),  .FINAL(1'b0)) dut_full  (.clk(clk), .d(d), .q(q_full));
  aes_round #(.STYLE(SBOX_LUT), .RK(K10), .FINAL(1'b1)) dut_final (.clk(clk), .d(d), .q(q_final));

  initial begin
    // FIPS-197 appendix C.1: input of round 1 = plaintext ^ key.
    stim[0] = 128'h00102030405060708090a0b0c0d0e0f0;
    for (int n = 1; n < N; n++) stim[n] = {$urandom, $urandom, $urandom, $urandom};
    checks++;
    if (ref_round(stim[0], K1, 1'b0) != 128'h89d810e8855ace682d1843d8cb128fe4) failures++;
    for (int cyc = 0; cyc < N + 4; cyc++) begin
      d = (cyc < N) ? stim[cyc] : '0;
      @(posedge clk);
      #1;
      if (cyc >= 3 && cyc - 3 < N) begin
        checks++;
        if (q_full !== ref_round(stim[cyc - 3], K1, 1'b0)) begin
          failures++;
          $display("FAIL full round %0d: %032x", cyc - 3, q_full);
        end
      end
      if (cyc >= 2 && cyc - 2 < N) begin
        checks++;
        if (q_final !== ref_round(stim[cyc - 2], K10, 1'b1)) begin
          failures++;
          $display("FAIL final round %0d: %032x", cyc - 2, q_final);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
