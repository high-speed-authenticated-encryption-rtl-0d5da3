// gcm_counter: counter-block generator of GCM's CTR mode.
//
// On load the 96-bit IV starts a message: ctr shows the pre-counter block
// J0 = IV || 0^31 || 1 in that same clock (its encryption masks the tag) and
// the register is set to inc32(J0). On advance ctr shows the register and
// the register steps by inc32, which increments the low 32 bits modulo 2^32
// and leaves the IV part alone. load wins over advance.
//
// Interface: combinational ctr output, register updated on the clock edge.
// Asynchronous active-low reset clears the register.
module gcm_counter
  import aes_gcm_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        load,
  input  logic [95:0] iv,
  input  logic        advance,
  output block_t      ctr
);

  block_t cnt_q;
  block_t j0;

  assign j0  = {iv, 32'd1};
  assign ctr = load ? j0 : cnt_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                cnt_q <= '0;
    else if (load || advance)  cnt_q <= {ctr[127:32], ctr[31:0] + 32'd1};
  end

endmodule
