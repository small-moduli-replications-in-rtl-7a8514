// tb_scale_convert: random coefficient sets in [-52, 52] for weights 2^0..2^30
// are converted with S = 14. The chain of floor-halving adders must give
// exactly floor(V / 2^S), V = sum c_k 2^k computed here in 64-bit arithmetic,
// so the scaling error is in (-1, 0]. Extreme all-+52 / all--52 sets and a
// case with every low coefficient negative are included. Latency 1 clock.
module tb_scale_convert;
  import mrrns_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  coef_t c [31];
  logic signed [23:0] out;
  int checks = 0, failures = 0;

  scale_convert #(.NW(31), .S(14)) dut (.clk, .c, .out);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint v, e;
    for (int t = 0; t < 1000; t++) begin
      @(negedge clk);
      v = 0;
      for (int k = 0; k < 31; k++) begin
        int ck;
        case (t)
          0: ck = 52;
          1: ck = -52;
          2: ck = (k <= 14) ? -1 : 0;
          default: ck = $urandom_range(104) - 52;
        endcase
        c[k] = coef_t'(ck);
        v += longint'(ck) <<< k;
      end
      e = v >>> 14;
      @(posedge clk);
      @(negedge clk);
      checks++;
      if (longint'(out) != e) begin
        failures++;
        $display("FAIL t=%0d got=%0d exp=%0d", t, out, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
