// tb_mrc_conv: every integer in [-52, 52] is reduced modulo 3, 5 and 7 and the
// converter must return it; covers all 105 residue triples.
module tb_mrc_conv;
  import mrrns_pkg::*;

  logic [1:0] r3;
  ring_t r5, r7;
  coef_t value;
  int checks = 0, failures = 0;

  mrc_conv dut (.r3, .r5, .r7, .value);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = -52; x <= 52; x++) begin
      r3 = 2'(((x % 3) + 3) % 3);
      r5 = 3'(((x % 5) + 5) % 5);
      r7 = 3'(((x % 7) + 7) % 7);
      #1;
      checks++;
      if (int'(value) != x) begin
        failures++;
        $display("FAIL x=%0d got=%0d", x, value);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
