// tb_sbox_bram: self-checking testbench of the block RAM S-box.
//
// Streams all 256 byte values into the S-box, one per clock, and compares
// each output, 2 clock(s) later, with a reference S-box found by searching
// for the GF(2^8) inverse. Also checks three values from the AES standard
// (S(00)=63, S(01)=7c, S(53)=ed) and that the latency is exactly 2.
module tb_sbox_bram;
  import gcm_ref_pkg::*;

  localparam int LAT = 2;

  logic       clk = 1'b0;
  logic [7:0] d;
  logic [7:0] q;
  int checks = 0;
  int failures = 0;

  always #5 clk = ~clk;

  sbox_bram dut (.clk(clk), .d(d), .q(q));

  logic [7:0] hist [LAT+1];
  logic [7:0] expected [256];

  initial begin
    for (int a = 0; a < 256; a++) expected[a] = ref_sbox(8'(a));
    checks++; if (expected[8'h00] != 8'h63) failures++;
    checks++; if (expected[8'h01] != 8'h7c) failures++;
    checks++; if (expected[8'h53] != 8'hed) failures++;
    d = 8'h00;
    for (int i = 0; i < 256 + LAT; i++) begin
      d = 8'(i);
      @(posedge clk);
      #1;
      if (i >= LAT - 1) begin
        checks++;
        if (q != expected[8'(i - LAT + 1)]) begin
          failures++;
          $display("FAIL S(%02x): got %02x want %02x", 8'(i - LAT + 1), q, expected[8'(i - LAT + 1)]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
