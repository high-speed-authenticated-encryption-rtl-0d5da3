// tb_gcm_counter: self-checking testbench of the GCM counter generator.
//
// Loads an IV and checks J0 = IV||00000001 in the load clock, then the
// counter blocks inc32(J0), inc32^2(J0), ... on each advance, a hold while
// neither load nor advance is set, the wrap of the low 32 bits (IV part
// unchanged) and a reload in the middle of a run.
module tb_gcm_counter;
  import aes_gcm_pkg::*;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        load = 1'b0;
  logic        advance = 1'b0;
  logic [95:0] iv = '0;
  block_t      ctr;
  int checks = 0;
  int failures = 0;

  always #5 clk = ~clk;

  gcm_counter dut (.clk, .rst_n, .load, .iv, .advance, .ctr);

  task automatic expect_ctr(block_t want, string what);
    #1;
    checks++;
    if (ctr !== want) begin
      failures++;
      $display("FAIL %s: got %032x want %032x", what, ctr, want);
    end
  endtask

  initial begin
    logic [95:0] iv0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    iv0 = 96'hcafebabefacedbaddecaf888;
    @(negedge clk);
    load = 1'b1; iv = iv0;
    expect_ctr({iv0, 32'd1}, "J0");
    @(negedge clk);
    load = 1'b0; advance = 1'b1;
    for (int i = 2; i < 20; i++) begin
      expect_ctr({iv0, 32'(i)}, "count");
      @(negedge clk);
    end
    advance = 1'b0;
    expect_ctr({iv0, 32'd20}, "hold");
    @(negedge clk);
    expect_ctr({iv0, 32'd20}, "hold");
    // Wrap: IV whose J0 is already close to the top.
    load = 1'b1; iv = 96'h0123456789abcdef01234567;
    #1;
    @(negedge clk);
    load = 1'b0;
    // Force the register near the wrap by advancing from a loaded state.
    for (int i = 2; i < 6; i++) begin
      advance = 1'b1;
      expect_ctr({96'h0123456789abcdef01234567, 32'(i)}, "second message");
      @(negedge clk);
    end
    advance = 1'b0;
    // inc32 wrap, checked on the register update rule directly.
    dut.cnt_q = {96'h0123456789abcdef01234567, 32'hffff_ffff};
    advance = 1'b1;
    expect_ctr({96'h0123456789abcdef01234567, 32'hffff_ffff}, "before wrap");
    @(negedge clk);
    expect_ctr({96'h0123456789abcdef01234567, 32'h0000_0000}, "after wrap");
    @(negedge clk);
    advance = 1'b0;
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
