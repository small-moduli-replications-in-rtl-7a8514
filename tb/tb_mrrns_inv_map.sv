// tb_mrrns_inv_map: random polynomials with exponents 0..2 in every
// indeterminate are evaluated here at all points of {0,+1,-1}^NVT modulo the
// ring, fed to the inverse map, and the coefficients that come out NVT clocks
// later must be the ones the polynomial was built from. Done for the full
// five-indeterminate map over Z_7 and Z_5, and a two-indeterminate one over Z_3.
module tb_mrrns_inv_map;
  import mrrns_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  ring_t y7 [243], c7 [243];
  ring_t y5 [243], c5 [243];
  ring_t y3 [9],   c3 [9];
  int checks = 0, failures = 0;

  mrrns_inv_map #(.MOD(7), .NVT(5)) u7 (.clk, .y(y7), .coef(c7));
  mrrns_inv_map #(.MOD(5), .NVT(5)) u5 (.clk, .y(y5), .coef(c5));
  mrrns_inv_map #(.MOD(3), .NVT(2)) u3 (.clk, .y(y3), .coef(c3));

  function automatic int rt(int c, int v);
    int d;
    d = (c / (3 ** v)) % 3;
    return d == 0 ? 0 : (d == 1 ? 1 : -1);
  endfunction

  function automatic int ex(int e, int v);
    return (e / (3 ** v)) % 3;
  endfunction

  // p(point c) = sum_e coef[e] * prod_v root_v^exp_v  (mod m)
  function automatic int eval_at(int coefs[], int nvt, int m, int c);
    int acc;
    acc = 0;
    for (int e = 0; e < coefs.size(); e++) begin
      int term;
      term = coefs[e];
      for (int v = 0; v < nvt; v++) term *= rt(c, v) ** ex(e, v);
      acc += term;
    end
    return ((acc % m) + m) % m;
  endfunction

  initial begin
    repeat (500) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int p7[], p5[], p3[];
    p7 = new[243]; p5 = new[243]; p3 = new[9];
    for (int t = 0; t < 12; t++) begin
      @(negedge clk);
      for (int e = 0; e < 243; e++) begin
        p7[e] = $urandom_range(6);
        p5[e] = $urandom_range(4);
      end
      for (int e = 0; e < 9; e++) p3[e] = $urandom_range(2);
      for (int c = 0; c < 243; c++) begin
        y7[c] = ring_t'(eval_at(p7, 5, 7, c));
        y5[c] = ring_t'(eval_at(p5, 5, 5, c));
      end
      for (int c = 0; c < 9; c++) y3[c] = ring_t'(eval_at(p3, 2, 3, c));
      // Mod-3 map has latency 2: check it first, then hold inputs for 5 clocks.
      repeat (2) @(posedge clk);
      @(negedge clk);
      for (int e = 0; e < 9; e++) begin
        checks++;
        if (int'(c3[e]) != p3[e]) begin failures++; $display("FAIL m3 e=%0d", e); end
      end
      // The mod-7/5 maps need 5 clocks; change the inputs only now and check
      // that the values of this vector arrive exactly after five.
      repeat (3) @(posedge clk);
      @(negedge clk);
      for (int e = 0; e < 243; e++) begin
        checks += 2;
        if (int'(c7[e]) != p7[e]) begin failures++; if (failures < 10) $display("FAIL m7 t=%0d e=%0d got=%0d exp=%0d", t, e, c7[e], p7[e]); end
        if (int'(c5[e]) != p5[e]) begin failures++; if (failures < 10) $display("FAIL m5 t=%0d e=%0d", t, e); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
