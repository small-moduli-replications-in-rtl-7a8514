// tb_switching_tree: exhaustive check of the decision-tree look-up. Two trees
// (6 and 4 inputs) with arbitrary tables are driven with every input word and
// each output is compared with the table entry picked by that word. The
// default tree (bit 0 of the mod 7 product) is checked against a*b mod 7.
module tb_switching_tree;
  localparam logic [63:0] T6 = 64'hC3A5_0F96_1E2D_7B48;
  localparam logic [15:0] T4 = 16'h8E31;

  logic [5:0] in6;
  logic [3:0] in4;
  logic f6, f4;
  int checks = 0, failures = 0;

  switching_tree #(.N(6), .TRUTH(T6)) dut6 (.in(in6), .f(f6));
  switching_tree #(.N(4), .TRUTH(T4)) dut4 (.in(in4), .f(f4));
  logic fm;
  switching_tree dutm (.in(in6), .f(fm));   // default: bit 0 of a*b mod 7

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 64; i++) begin
      in6 = 6'(i);
      in4 = 4'(i);
      #1;
      checks++;
      if (f6 !== T6[i]) begin
        failures++;
        $display("FAIL N=6 in=%0d f=%0b exp=%0b", i, f6, T6[i]);
      end
      if (i / 8 < 7 && i % 8 < 7) begin
        checks++;
        if (fm !== 1'(((i / 8) * (i % 8)) % 7)) begin
          failures++;
          $display("FAIL mod7 bit0 a=%0d b=%0d", i / 8, i % 8);
        end
      end
      if (i < 16) begin
        checks++;
        if (f4 !== T4[i]) begin
          failures++;
          $display("FAIL N=4 in=%0d f=%0b exp=%0b", i, f4, T4[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
