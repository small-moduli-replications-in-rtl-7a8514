// mrrns_fwd_map: forward MRRNS map of one signed-bit integer over the bit
// indeterminates.
//
// A number with |value| < 2^(2^NV) is a polynomial in NV indeterminates
// (W = 2, X = 4, Y = 16, Z = 256 for NV = 4): bit i of the magnitude is the
// coefficient of the monomial whose exponent of indeterminate v is bit v of i,
// and every digit takes the number's sign, so digits are 0 or +1 (positive) or
// 0 or -1 (negative). The map evaluates that polynomial with each indeterminate
// set to each of the roots 0, +1, -1 of V(V^2 - 1), giving 3^NV values. Each
// monomial then evaluates to 0 or +/-1, so a value is a signed count of set
// bits: only sign changes and additions.
// Interface: sgn/mag is the number in sign-magnitude form; val[c] is the
// evaluation at channel c, whose base-3 digit v selects the root of
// indeterminate v (0 -> 0, 1 -> +1, 2 -> -1). Values are exact integers in
// [-2^NV, 2^NV]; reduction to the rings happens downstream. Combinational.
module mrrns_fwd_map
  import mrrns_pkg::*;
#(
  parameter int NV = 4
) (
  input  logic                  sgn,
  input  logic [2**NV-1:0]      mag,
  output logic signed [NV+1:0]  val [pow3(NV)]
);

  localparam int NB  = 2**NV;
  localparam int NCH = pow3(NV);

  // Masks of the bits whose monomial evaluates to +1 or to -1 at channel c.
  function automatic logic [NB-1:0] mono_mask(int c, bit want_neg);
    logic [NB-1:0] msk;
    msk = '0;
    for (int b = 0; b < NB; b++) begin
      int p;
      p = 1;
      for (int v = 0; v < NV; v++)
        if (((b >> v) & 1) != 0) p *= root_of(digit3(c, v));
      msk[b] = want_neg ? (p < 0) : (p > 0);
    end
    return msk;
  endfunction

  for (genvar c = 0; c < NCH; c++) begin : g_ch
    localparam logic [NB-1:0] POS = mono_mask(c, 1'b0);
    localparam logic [NB-1:0] NEG = mono_mask(c, 1'b1);
    always_comb begin
      int acc;
      acc = 0;
      for (int b = 0; b < NB; b++) begin
        if (POS[b] && mag[b]) acc += 1;
        if (NEG[b] && mag[b]) acc -= 1;
      end
      val[c] = (NV + 2)'(sgn ? -acc : acc);
    end
  end

endmodule
