// tb_mrrns_fwd_map: checks the forward map against direct polynomial
// evaluation. For the 16-bit map (W, X, Y, Z) random sign-magnitude numbers
// are applied and every channel value is compared with sum_i d_i * w^i0 x^i1
// y^i2 z^i3 at that channel's roots, computed with integer powers. The 8-bit
// map (W, X, Y) is also given the single monomial W*Y (bit 5): its 27 values
// must be the products w*y.
module tb_mrrns_fwd_map;
  import mrrns_pkg::*;

  logic        sgn4, sgn3;
  logic [15:0] mag4;
  logic [7:0]  mag3;
  logic signed [5:0] val4 [81];
  logic signed [4:0] val3 [27];
  int checks = 0, failures = 0;

  mrrns_fwd_map #(.NV(4)) dut4 (.sgn(sgn4), .mag(mag4), .val(val4));
  mrrns_fwd_map #(.NV(3)) dut3 (.sgn(sgn3), .mag(mag3), .val(val3));

  function automatic int rt(int c, int v);
    int d;
    d = (c / (3 ** v)) % 3;
    return d == 0 ? 0 : (d == 1 ? 1 : -1);
  endfunction

  function automatic int ref_eval(int nv, logic s, logic [15:0] m, int c);
    int acc;
    acc = 0;
    for (int i = 0; i < (1 << nv); i++) begin
      int term;
      term = m[i] ? (s ? -1 : 1) : 0;
      for (int v = 0; v < nv; v++) term *= rt(c, v) ** ((i >> v) & 1);
      acc += term;
    end
    return acc;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 200; t++) begin
      sgn4 = 1'($urandom);
      mag4 = (t == 0) ? 16'hFFFF : 16'($urandom);
      sgn3 = 1'($urandom);
      mag3 = 8'($urandom);
      #1;
      for (int c = 0; c < 81; c++) begin
        checks++;
        if (int'(val4[c]) != ref_eval(4, sgn4, mag4, c)) begin
          failures++;
          $display("FAIL nv=4 mag=%h s=%0d ch=%0d got=%0d exp=%0d", mag4, sgn4, c,
                   val4[c], ref_eval(4, sgn4, mag4, c));
        end
      end
      for (int c = 0; c < 27; c++) begin
        checks++;
        if (int'(val3[c]) != ref_eval(3, sgn3, {8'h0, mag3}, c)) begin
          failures++;
          $display("FAIL nv=3 ch=%0d", c);
        end
      end
    end
    // Bit 5 of the 8-bit system is the monomial W*Y.
    sgn3 = 0;
    mag3 = 8'b0010_0000;
    #1;
    for (int c = 0; c < 27; c++) begin
      checks++;
      if (int'(val3[c]) != rt(c, 0) * rt(c, 2)) begin
        failures++;
        $display("FAIL WY layer ch=%0d got=%0d", c, val3[c]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
