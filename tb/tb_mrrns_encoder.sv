// tb_mrrns_encoder: checks the complex forward map and residue reduction.
// Random complex sign-magnitude operands are applied each clock; one clock
// later every channel residue must equal (P + t*Q) mod m, where P and Q are the
// real and imaginary polynomials evaluated at the channel's roots and t is the
// channel's root for T, computed here from the operand values directly.
module tb_mrrns_encoder;
  import mrrns_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  logic        re_sgn, im_sgn;
  logic [15:0] re_mag, im_mag;
  ring_t       res [3][243];
  int checks = 0, failures = 0;
  int moduli [3] = '{3, 5, 7};

  mrrns_encoder #(.NV(4)) dut (.clk, .re_sgn, .re_mag, .im_sgn, .im_mag, .res);

  function automatic int rt(int c, int v);
    int d;
    d = (c / (3 ** v)) % 3;
    return d == 0 ? 0 : (d == 1 ? 1 : -1);
  endfunction

  // Polynomial of a sign-magnitude value at roots (w,x,y,z) of channel c.
  function automatic int poly(logic s, logic [15:0] m, int c);
    int acc;
    acc = 0;
    for (int i = 0; i < 16; i++)
      if (m[i]) begin
        int term;
        term = 1;
        for (int v = 0; v < 4; v++) if (((i >> v) & 1) == 1) term *= rt(c, v);
        acc += term;
      end
    return s ? -acc : acc;
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic ps, qs;
    logic [15:0] pm, qm;
    for (int t = 0; t < 60; t++) begin
      @(negedge clk);
      if (t > 0) begin
        for (int c = 0; c < 243; c++) begin
          int v;
          v = poly(ps, pm, c % 81) + rt(c, 4) * poly(qs, qm, c % 81);
          for (int m = 0; m < 3; m++) begin
            int e;
            e = ((v % moduli[m]) + moduli[m]) % moduli[m];
            checks++;
            if (int'(res[m][c]) != e) begin
              failures++;
              if (failures < 10) $display("FAIL t=%0d m=%0d ch=%0d got=%0d exp=%0d", t, moduli[m], c, res[m][c], e);
            end
          end
        end
      end
      re_sgn = 1'($urandom); re_mag = 16'($urandom);
      im_sgn = 1'($urandom); im_mag = 16'($urandom);
      ps = re_sgn; pm = re_mag; qs = im_sgn; qm = im_mag;
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
