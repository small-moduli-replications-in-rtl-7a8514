// ring_ip4: the radix-4 computational element of one channel of one ring:
// y = x0*c0 + x1*c1 + x2*c2 + x3*c3 (mod MOD).
//
// Every MRRNS channel runs the same algorithm independently over Z_MOD. For a
// radix-4 DFT the four products of data and combined twiddle/DFT coefficients
// are formed by four ring_cell multipliers, then summed by a two-level tree of
// ring_cell adders: three pipeline stages, each one switching-tree layer plus
// its latch. One new inner product may enter every clock.
// Interface: x[n], c[n] ring values in; y valid LATENCY = 3 clocks later.
module ring_ip4
  import mrrns_pkg::*;
#(
  parameter int MOD = 7
) (
  input  logic  clk,
  input  ring_t x [4],
  input  ring_t c [4],
  output ring_t y
);

  ring_t prod [4];
  ring_t sum1 [2];

  for (genvar n = 0; n < 4; n++) begin : g_mul
    ring_cell #(.MOD(MOD), .OP(RING_MUL)) u_mul (.clk(clk), .a(x[n]), .b(c[n]), .y(prod[n]));
  end
  for (genvar n = 0; n < 2; n++) begin : g_add1
    ring_cell #(.MOD(MOD), .OP(RING_ADD)) u_add (.clk(clk), .a(prod[2*n]), .b(prod[2*n+1]), .y(sum1[n]));
  end
  ring_cell #(.MOD(MOD), .OP(RING_ADD)) u_add2 (.clk(clk), .a(sum1[0]), .b(sum1[1]), .y(y));

endmodule
