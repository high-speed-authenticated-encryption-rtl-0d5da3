// tb_ghash_fixed: self-checking testbench of the H-synthesized GHASH
// accumulator.
//
// Uses the GCM test hash key H = 66e94bd4ef8a2c3b884cfa59ca342b2e (AES key
// zero). First the hash of GCM test case 2 (ciphertext block
// 0388dace60b6a392f328c2b971b2fe78 then the length block 0..080), which must
// be f38cbb1ad69223dcc3457ae5b6b0f885, the published tag
// ab6e47d42cec13bdf53a67b21257bddf xor E(0, J0) = 58e2fccefa7e3061367f1d57a4e7455a. Then random sequences with idle clocks
// and clears, compared block by block with a reference Y = (Y ^ X) * H, and
// one block accepted per clock.
module tb_ghash_fixed;
  import aes_gcm_pkg::*;
  import gcm_ref_pkg::*;

  localparam block_t H = 128'h66e94bd4ef8a2c3b884cfa59ca342b2e;

  logic   clk = 1'b0;
  logic   rst_n = 1'b0;
  logic   clear = 1'b0;
  logic   in_valid = 1'b0;
  block_t in_data = '0;
  block_t y;
  block_t model = '0;
  int checks = 0;
  int failures = 0;

  always #5 clk = ~clk;

  ghash_fixed #(.H(H)) dut (.clk, .rst_n, .clear, .in_valid, .in_data, .y);

  task automatic step(logic c, logic v, block_t x);
    clear    <= c;
    in_valid <= v;
    in_data  <= x;
    @(posedge clk);
    #1;
    if (c)      model = '0;
    else if (v) model = ref_gmul(model ^ x, H);
    checks++;
    if (y !== model) begin
      failures++;
      $display("FAIL y=%032x want %032x", y, model);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    step(1'b1, 1'b0, '0);
    step(1'b0, 1'b1, 128'h0388dace60b6a392f328c2b971b2fe78);
    step(1'b0, 1'b1, 128'h00000000000000000000000000000080);
    checks++;
    if (y !== 128'hf38cbb1ad69223dcc3457ae5b6b0f885) begin
      failures++;
      $display("FAIL test case 2 hash %032x", y);
    end
    checks++;
    if ((y ^ 128'h58e2fccefa7e3061367f1d57a4e7455a) !== 128'hab6e47d42cec13bdf53a67b21257bddf) failures++;
    for (int n = 0; n < 300; n++)
      step($urandom_range(0, 19) == 0, $urandom_range(0, 3) != 0,
           {$urandom, $urandom, $urandom, $urandom});
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
