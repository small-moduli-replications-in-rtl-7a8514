// mrrns_radix4: a time-multiplexed radix-4 DFT element computed in the
// Modulus Replication RNS (MRRNS) over the very small rings Z_3, Z_5 and Z_7.
//
// Data and twiddles are sign-magnitude complex integers with magnitudes below
// 2^MW, MW = 2^NV (16 bits for NV = 4). Each operand is written as a
// polynomial in the bit indeterminates W = 2, X = 4, Y = 16, Z = 256 and the
// complex indeterminate T = j, with digits 0/+-1, and is evaluated at every
// point of {0,+1,-1}^(NV+1): 3^(NV+1) = 243 independent channels per modulus,
// 729 in all. Each channel computes the same 4-term inner product over its own
// tiny ring with switching-tree cells. The inverse map interpolates the product
// polynomial back, T is then set to j, coefficients of equal power-of-two
// weight are summed in the rings, each weight's three residues are converted
// to an integer in [-52, 52] by mixed radix conversion, and the scaling /
// binary conversion array divides by 2^S and assembles two's complement words.
//
// Pipeline (clocks after a butterfly output is issued by the sequencer):
//   forward map 1, channel element 3, inverse map NV+1, weight merge 1,
//   conversion + scaling 1  => LATENCY = NV + 7 (11 for NV = 4).
// A butterfly is accepted with in_valid & in_ready and produces four outputs,
// k = 0..3, on four consecutive clocks; butterflies may follow back to back
// (one every 4 clocks). out_valid/out_k qualify out_re/out_im, which equal
// floor-scaled X_k / 2^S (each power-of-two coefficient taken modulo 105 into
// [-52, 52], as the rings deliver it). Reset is synchronous, active low, and
// clears the control path only.
module mrrns_radix4
  import mrrns_pkg::*;
#(
  parameter int NV = 4,
  parameter int S  = 14,
  localparam int MW      = 2**NV,
  localparam int NW      = 2**(NV+1) - 1,
  localparam int OUT_W   = NW - S + COEF_W
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  output logic                    in_ready,
  input  logic [3:0]              x_re_sgn,
  input  logic [3:0][MW-1:0]      x_re_mag,
  input  logic [3:0]              x_im_sgn,
  input  logic [3:0][MW-1:0]      x_im_mag,
  input  logic [3:0]              w_re_sgn,
  input  logic [3:0][MW-1:0]      w_re_mag,
  input  logic [3:0]              w_im_sgn,
  input  logic [3:0][MW-1:0]      w_im_mag,
  output logic                    out_valid,
  output logic [1:0]              out_k,
  output logic signed [OUT_W-1:0] out_re,
  output logic signed [OUT_W-1:0] out_im
);

  localparam int NCH     = pow3(NV + 1);
  localparam int LATENCY = NV + 7;

  // ---------------------------------------------------------------- sequencing
  logic               issue_valid;
  logic [1:0]         issue_k;
  logic [3:0]         d_re_sgn, d_im_sgn, c_re_sgn, c_im_sgn;
  logic [3:0][MW-1:0] d_re_mag, d_im_mag, c_re_mag, c_im_mag;

  r4_sequencer #(.MW(MW)) u_seq (
    .clk, .rst_n, .in_valid, .in_ready,
    .x_re_sgn, .x_re_mag, .x_im_sgn, .x_im_mag,
    .w_re_sgn, .w_re_mag, .w_im_sgn, .w_im_mag,
    .issue_valid, .issue_k,
    .d_re_sgn, .d_re_mag, .d_im_sgn, .d_im_mag,
    .c_re_sgn, .c_re_mag, .c_im_sgn, .c_im_mag
  );

  // ---------------------------------------------------------------- forward map
  ring_t dres [4][NMOD][NCH];
  ring_t cres [4][NMOD][NCH];

  for (genvar n = 0; n < 4; n++) begin : g_enc
    mrrns_encoder #(.NV(NV)) u_enc_d (
      .clk, .re_sgn(d_re_sgn[n]), .re_mag(d_re_mag[n]),
      .im_sgn(d_im_sgn[n]), .im_mag(d_im_mag[n]), .res(dres[n])
    );
    mrrns_encoder #(.NV(NV)) u_enc_c (
      .clk, .re_sgn(c_re_sgn[n]), .re_mag(c_re_mag[n]),
      .im_sgn(c_im_sgn[n]), .im_mag(c_im_mag[n]), .res(cres[n])
    );
  end

  // ------------------------------------------- channels, inverse map, merging
  ring_t wre [NMOD][NW];
  ring_t wim [NMOD][NW];

  for (genvar m = 0; m < NMOD; m++) begin : g_mod
    localparam int MOD = MODULI[m];
    ring_t y    [NCH];
    ring_t coef [NCH];

    for (genvar ch = 0; ch < NCH; ch++) begin : g_ch
      ring_t xv [4];
      ring_t cv [4];
      for (genvar n = 0; n < 4; n++) begin : g_in
        assign xv[n] = dres[n][m][ch];
        assign cv[n] = cres[n][m][ch];
      end
      ring_ip4 #(.MOD(MOD)) u_pe (.clk, .x(xv), .c(cv), .y(y[ch]));
    end

    mrrns_inv_map #(.MOD(MOD), .NVT(NV + 1)) u_inv (.clk, .y(y), .coef(coef));

    mrrns_weight_combine #(.MOD(MOD), .NV(NV)) u_comb (
      .clk, .coef(coef), .re(wre[m]), .im(wim[m])
    );
  end

  // -------------------------------------------- conversion and scaling
  coef_t cre [NW];
  coef_t cim [NW];

  for (genvar k = 0; k < NW; k++) begin : g_mrc
    mrc_conv u_mrc_re (.r3(wre[0][k][1:0]), .r5(wre[1][k]), .r7(wre[2][k]), .value(cre[k]));
    mrc_conv u_mrc_im (.r3(wim[0][k][1:0]), .r5(wim[1][k]), .r7(wim[2][k]), .value(cim[k]));
  end

  scale_convert #(.NW(NW), .S(S), .OUT_W(OUT_W)) u_scale_re (.clk, .c(cre), .out(out_re));
  scale_convert #(.NW(NW), .S(S), .OUT_W(OUT_W)) u_scale_im (.clk, .c(cim), .out(out_im));

  // ---------------------------------------------------------- control pipe
  logic [LATENCY-1:0]      vpipe;
  logic [LATENCY-1:0][1:0] kpipe;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      vpipe <= '0;
      kpipe <= '0;
    end else begin
      vpipe <= {vpipe[LATENCY-2:0], issue_valid};
      kpipe <= {kpipe[LATENCY-2:0], issue_k};
    end
  end

  assign out_valid = vpipe[LATENCY-1];
  assign out_k     = kpipe[LATENCY-1];

endmodule
