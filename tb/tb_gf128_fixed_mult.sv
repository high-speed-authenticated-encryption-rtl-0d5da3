// tb_gf128_fixed_mult: self-checking testbench of the fixed-operand
// GF(2^128) multiplier.
//
// Two instances: one with the default hash key (c6a13b37878f5b826f4f8162a1c8d879,
// derived from the default AES key at elaboration) and one with
// H = b83b533708bf535d0aa6e52980d53b78 (the hash key of the GCM test key
// feffe9928665731c6d6a8f9467308308). Checks the field's one (80..00), zero,
// single bits and random operands against a bit-serial reference
// multiplication.
module tb_gf128_fixed_mult;
  import aes_gcm_pkg::*;
  import gcm_ref_pkg::*;

  localparam block_t H_DEF = 128'hc6a13b37878f5b826f4f8162a1c8d879;
  localparam block_t H_TC  = 128'hb83b533708bf535d0aa6e52980d53b78;

  block_t a, x_def, x_tc;
  int checks = 0;
  int failures = 0;

  gf128_fixed_mult              dut_def (.a(a), .x(x_def));
  gf128_fixed_mult #(.H(H_TC))  dut_tc  (.a(a), .x(x_tc));

  task automatic check(block_t op);
    a = op;
    #1;
    checks++;
    if (x_def !== ref_gmul(op, H_DEF)) begin
      failures++;
      $display("FAIL default H, a=%032x: got %032x", op, x_def);
    end
    checks++;
    if (x_tc !== ref_gmul(op, H_TC)) begin
      failures++;
      $display("FAIL test H, a=%032x: got %032x", op, x_tc);
    end
  endtask

  initial begin
    check({1'b1, 127'd0});
    checks++;
    if (x_tc !== H_TC) failures++;
    check('0);
    for (int i = 0; i < 128; i++) check(block_t'(1) << i);
    for (int n = 0; n < 200; n++) check({$urandom, $urandom, $urandom, $urandom});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
