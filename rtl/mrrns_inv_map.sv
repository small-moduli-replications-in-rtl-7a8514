// mrrns_inv_map: inverse MRRNS map for one modulus.
//
// After the computation each channel holds the result polynomial evaluated at
// one point of {0,+1,-1}^NVT. Every indeterminate appears with degree at most
// 2, so the polynomial is recovered one indeterminate at a time by 3-point
// interpolation of p(v) = c0 + c1*v + c2*v^2 from p(0), p(1), p(-1):
//   c0 = p(0),  c1 = (p(1) - p(-1)) / 2,  c2 = (p(1) + p(-1)) / 2 - p(0),
// where /2 is multiplication by the inverse of 2 in Z_MOD. Stage v of the
// linear pipeline converts base-3 digit v of the index from a root selector
// into an exponent; after NVT stages entry e is the coefficient (mod MOD) of
// the monomial whose exponents are the base-3 digits of e.
// Interface: y[c] channel values in, coef[e] out, LATENCY = NVT clocks, one
// vector per clock. No reset: data only.
module mrrns_inv_map
  import mrrns_pkg::*;
#(
  parameter int MOD = 7,
  parameter int NVT = 5
) (
  input  logic  clk,
  input  ring_t y    [pow3(NVT)],
  output ring_t coef [pow3(NVT)]
);

  localparam int N  = pow3(NVT);
  localparam int I2 = inv2(MOD);

  ring_t st [NVT+1][N];
  assign st[0] = y;

  for (genvar v = 0; v < NVT; v++) begin : g_stage
    localparam int STRIDE = pow3(v);
    ring_t nx [N];
    for (genvar e = 0; e < N; e++) begin : g_e
      localparam int D    = digit3(e, v);
      localparam int BASE = e - D * STRIDE;
      always_comb begin
        int p0, p1, pm;
        p0 = int'(st[v][BASE]);
        p1 = int'(st[v][BASE + STRIDE]);
        pm = int'(st[v][BASE + 2 * STRIDE]);
        case (D)
          0:       nx[e] = ring_t'(p0);
          1:       nx[e] = ring_t'(mod_int((p1 - pm) * I2, MOD));
          default: nx[e] = ring_t'(mod_int((p1 + pm) * I2 - p0, MOD));
        endcase
      end
    end
    always_ff @(posedge clk) st[v+1] <= nx;
  end

  assign coef = st[NVT];

endmodule
