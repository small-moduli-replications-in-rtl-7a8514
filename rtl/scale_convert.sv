// scale_convert: scaling by 2^S and conversion of the redundant power-of-two
// coefficients to one binary number.
//
// Input is a number held as coefficients c[k] in [-52, 52] of 2^k, k = 0..NW-1.
// The low S coefficients go through a chain of S scaling adders, each dropping
// the least significant bit of the running sum before adding the next
// coefficient:
//   t_0 = c[0],   t_i = floor(t_{i-1} / 2) + c[i]   for i = 1..S,
// so t_S approximates sum_{i<=S} c[i] 2^(i-S) with an error in (-1, 0]. The
// running sum stays within [-104, 104], so these adders are SCALE_W bits wide.
// The remaining NW-1-S coefficients are then added by ordinary binary adders at
// their own weight: out = t_S + sum_{i>S} c[i] * 2^(i-S). The result is the
// input divided by 2^S and rounded toward minus infinity (error below one unit).
// Interface: c[k] in, out registered (latency 1 clock). No reset: data only.
module scale_convert
  import mrrns_pkg::*;
#(
  parameter int NW      = 31,
  parameter int S       = 14,
  parameter int SCALE_W = 8,
  parameter int OUT_W   = NW - S + COEF_W
) (
  input  logic                    clk,
  input  coef_t                   c [NW],
  output logic signed [OUT_W-1:0] out
);

  logic signed [SCALE_W-1:0] t [S+1];
  logic signed [OUT_W-1:0]   acc [NW-S];

  always_comb begin
    t[0] = SCALE_W'(c[0]);
    for (int i = 1; i <= S; i++)
      t[i] = (t[i-1] >>> 1) + SCALE_W'(c[i]);
    acc[0] = OUT_W'(t[S]);
    for (int i = 1; i < NW - S; i++)
      acc[i] = acc[i-1] + (OUT_W'(c[S+i]) <<< i);
  end

  always_ff @(posedge clk) out <= acc[NW-S-1];

endmodule
