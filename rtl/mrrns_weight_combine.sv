// mrrns_weight_combine: sets T = j and gathers equal weights, for one modulus.
//
// The inverse map yields coefficients of monomials W^a X^b Y^c Z^d T^e with
// exponents 0..2. Now that all products are formed, T is given its meaning j,
// so T^2 = -1: the real part is the T^0 coefficient minus the T^2 coefficient
// and the imaginary part is the T^1 coefficient. Each remaining monomial is a
// power of two, 2^k with k = a + 2b + 4c + 8d (W = 2, X = 4, Y = 16, Z = 256),
// and monomials of equal k are summed in the ring (for example X^2, W^2 X and Y
// all weigh 2^4). The result is the product written in powers of two,
// k = 0 .. NW-1 with NW = 2^(NV+1) - 1, with coefficients still as residues.
// Interface: coef[e] indexed by exponent digits (T digit most significant);
// re[k], im[k] registered, latency 1 clock. No reset: data only.
module mrrns_weight_combine
  import mrrns_pkg::*;
#(
  parameter int MOD = 7,
  parameter int NV  = 4
) (
  input  logic  clk,
  input  ring_t coef [pow3(NV+1)],
  output ring_t re   [2**(NV+1)-1],
  output ring_t im   [2**(NV+1)-1]
);

  localparam int NB = pow3(NV);
  localparam int NW = 2**(NV+1) - 1;

  ring_t re_d [NW];
  ring_t im_d [NW];

  // Monomials (over W, X, Y, Z) of weight 2^k.
  function automatic logic [NB-1:0] members(int k);
    logic [NB-1:0] msk;
    for (int b = 0; b < NB; b++) msk[b] = (weight_of(b, NV) == k);
    return msk;
  endfunction

  for (genvar k = 0; k < NW; k++) begin : g_w
    localparam logic [NB-1:0] MEMB = members(k);
    always_comb begin
      int sr, si;
      sr = 0;
      si = 0;
      for (int b = 0; b < NB; b++) begin
        if (MEMB[b]) begin
          sr += int'(coef[b]) - int'(coef[b + 2 * NB]);
          si += int'(coef[b + NB]);
        end
      end
      re_d[k] = ring_t'(mod_int(sr, MOD));
      im_d[k] = ring_t'(mod_int(si, MOD));
    end
  end

  always_ff @(posedge clk) begin
    re <= re_d;
    im <= im_d;
  end

endmodule
