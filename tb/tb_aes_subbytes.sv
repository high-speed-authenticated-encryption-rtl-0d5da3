// tb_aes_subbytes: self-checking testbench of the 16-S-box SubBytes step.
//
// Instantiates SubBytes in all three S-box styles, feeds the same random
// 128-bit states into each on consecutive clocks, and checks every output
// byte against the reference S-box after the style's latency (2 for block
// RAM, 1 for LUT, 4 for composite field).
module tb_aes_subbytes;
  import aes_gcm_pkg::*;
  import gcm_ref_pkg::*;

  localparam int N = 64;

  logic   clk = 1'b0;
  block_t d;
  block_t q_bram, q_lut, q_comp;
  block_t stim [N];
  block_t want [N];
  int checks = 0;
  int failures = 0;

  always #5 clk = ~clk;

  aes_subbytes #(.STYLE(SBOX_BRAM))      dut_bram (.clk(clk), .d(d), .q(q_bram));
  aes_subbytes #(.STYLE(SBOX_LUT))       dut_lut  (.clk(clk), .d(d), .q(q_lut));
  aes_subbytes #(.STYLE(SBOX_COMPOSITE)) dut_comp (.clk(clk), .d(d), .q(q_comp));

  task automatic check(string name, block_t got, block_t exp, int idx);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s block %0d: got %032x want %032x", name, idx, got, exp);
    end
  endtask

  initial begin
    for (int n = 0; n < N; n++) begin
      stim[n] = {$urandom, $urandom, $urandom, $urandom};
      for (int i = 0; i < 16; i++) want[n][8*i +: 8] = ref_sbox(stim[n][8*i +: 8]);
    end
    for (int cyc = 0; cyc < N + 4; cyc++) begin
      d = (cyc < N) ? stim[cyc] : '0;
      @(posedge clk);
      #1;
      if (cyc - 0 >= 0 && cyc < N)     check("lut",  q_lut,  want[cyc],     cyc);
      if (cyc >= 1 && cyc - 1 < N)     check("bram", q_bram, want[cyc - 1], cyc - 1);
      if (cyc >= 3 && cyc - 3 < N)     check("comp", q_comp, want[cyc - 3], cyc - 3);
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
