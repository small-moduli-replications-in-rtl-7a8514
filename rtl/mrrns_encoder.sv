// mrrns_encoder: complex forward MRRNS map into the direct-product rings.
//
// A complex operand re + j*im is written as P(W,X,..) + T*Q(W,X,..), with the
// extra indeterminate T standing for j. T cannot be a root of T^2 + 1 in Z_3 or
// Z_7, so it is mapped, like the bit indeterminates, through T(T^2 - 1) = 0,
// i.e. evaluated at 0, +1 and -1. Two mrrns_fwd_map instances evaluate P and
// Q; channel c = cb + 3^NV * dt then holds P(cb) + root(dt) * Q(cb), reduced
// modulo 3, 5 and 7. That is 3^(NV+1) channels per modulus (243 for NV = 4).
// Interface: sign-magnitude real and imaginary parts in; res[m][c] is the
// residue of channel c modulo MODULI[m], registered (latency 1 clock, one
// operand per clock). No reset: data only.
module mrrns_encoder
  import mrrns_pkg::*;
#(
  parameter int NV = 4
) (
  input  logic             clk,
  input  logic             re_sgn,
  input  logic [2**NV-1:0] re_mag,
  input  logic             im_sgn,
  input  logic [2**NV-1:0] im_mag,
  output ring_t            res [NMOD][pow3(NV+1)]
);

  localparam int NB  = pow3(NV);
  localparam int NCH = pow3(NV + 1);

  logic signed [NV+1:0] p_val [NB];
  logic signed [NV+1:0] q_val [NB];

  mrrns_fwd_map #(.NV(NV)) u_re (.sgn(re_sgn), .mag(re_mag), .val(p_val));
  mrrns_fwd_map #(.NV(NV)) u_im (.sgn(im_sgn), .mag(im_mag), .val(q_val));

  ring_t res_d [NMOD][NCH];
  always_comb begin
    for (int c = 0; c < NCH; c++) begin
      int v;
      v = int'(p_val[c % NB]) + root_of(c / NB) * int'(q_val[c % NB]);
      for (int m = 0; m < NMOD; m++) res_d[m][c] = ring_t'(mod_int(v, MODULI[m]));
    end
  end

  always_ff @(posedge clk) res <= res_d;

endmodule
