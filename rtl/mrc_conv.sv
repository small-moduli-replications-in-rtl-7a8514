// mrc_conv: the three-ring converter. Residues modulo 3, 5 and 7 (8 input bits
// in all) are turned into the signed integer they represent in [-52, 52].
//
// Mixed radix conversion: x = a1 + 3*a2 + 15*a3 with
//   a1 = r3,
//   a2 = (r5 - a1) * 3^-1            (mod 5),  3^-1 = 2 in Z_5,
//   a3 = ((r7 - a1) * 3^-1 - a2) * 5^-1  (mod 7),  3^-1 = 5, 5^-1 = 3 in Z_7,
// which gives x in [0, 104]; values above 52 stand for x - 105. Being an
// 8-input function it could equally be one look-up table; mixed radix digits
// are used because that is the preferred conversion. Combinational.
// Interface: r3 (2 bits), r5, r7 (3 bits) in; value out, 7-bit two's complement.
module mrc_conv
  import mrrns_pkg::*;
(
  input  logic [1:0] r3,
  input  ring_t      r5,
  input  ring_t      r7,
  output coef_t      value
);

  always_comb begin
    int a1, a2, a3, x;
    a1 = int'(r3);
    a2 = mod_int((int'(r5) - a1) * 2, 5);
    a3 = mod_int(((int'(r7) - a1) * 5 - a2) * 3, 7);
    x  = a1 + 3 * a2 + 15 * a3;
    if (x > C_HALF) x -= M_PROD;
    value = coef_t'(x);
  end

endmodule
