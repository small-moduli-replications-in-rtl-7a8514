// tb_mrrns_weight_combine: random coefficient vectors (indexed by exponent
// digits of W, X, Y, Z, T) are applied; one clock later every power-of-two
// weight must hold, modulo the ring, the sum over all (a,b,c,d) with
// a + 2b + 4c + 8d = k of the T^0 coefficient minus the T^2 coefficient (real)
// and of the T^1 coefficient (imaginary). Also checks the equivalences
// X^2 ~ W^2 X ~ Y by loading only those monomials.
module tb_mrrns_weight_combine;
  import mrrns_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  ring_t coef [243];
  ring_t re [31], im [31];
  int checks = 0, failures = 0;

  mrrns_weight_combine #(.MOD(7), .NV(4)) dut (.clk, .coef, .re, .im);

  initial begin
    repeat (500) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int er[31], ei[31];
    for (int t = 0; t < 40; t++) begin
      @(negedge clk);
      for (int i = 0; i < 243; i++) coef[i] = ring_t'(t == 0 ? 0 : $urandom_range(6));
      if (t == 0) begin
        coef[0 + 2*3]  = 3'd1;   // X^2
        coef[2 + 1*3]  = 3'd2;   // W^2 X
        coef[9]        = 3'd3;   // Y
        coef[81 + 9]   = 3'd4;   // T Y  (imaginary 2^4)
        coef[162 + 1]  = 3'd1;   // T^2 W -> real -W
      end
      for (int k = 0; k < 31; k++) begin er[k] = 0; ei[k] = 0; end
      for (int a = 0; a < 3; a++)
        for (int b = 0; b < 3; b++)
          for (int c = 0; c < 3; c++)
            for (int d = 0; d < 3; d++) begin
              int idx, k;
              idx = a + 3*b + 9*c + 27*d;
              k = a + 2*b + 4*c + 8*d;
              er[k] += int'(coef[idx]) - int'(coef[idx + 162]);
              ei[k] += int'(coef[idx + 81]);
            end
      if (t == 0 && (er[4] != 6 || ei[4] != 4 || er[1] != -1)) begin
        failures++;
        $display("FAIL reference equivalences");
      end
      @(posedge clk);
      @(negedge clk);
      for (int k = 0; k < 31; k++) begin
        checks += 2;
        if (int'(re[k]) != ((er[k] % 7) + 7) % 7) begin failures++; $display("FAIL re t=%0d k=%0d", t, k); end
        if (int'(im[k]) != ((ei[k] % 7) + 7) % 7) begin failures++; $display("FAIL im t=%0d k=%0d", t, k); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
