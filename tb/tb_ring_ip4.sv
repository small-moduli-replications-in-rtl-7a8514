// tb_ring_ip4: streams a new random 4-term inner product into elements over
// Z_3, Z_5 and Z_7 every clock and checks each result exactly three clocks
// later against integer arithmetic reduced modulo the ring.
module tb_ring_ip4;
  import mrrns_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  ring_t x [3][4];
  ring_t c [3][4];
  ring_t y [3];
  int checks = 0, failures = 0;
  int moduli [3] = '{3, 5, 7};
  int hist [3][$];

  ring_ip4 #(.MOD(3)) u3 (.clk, .x(x[0]), .c(c[0]), .y(y[0]));
  ring_ip4 #(.MOD(5)) u5 (.clk, .x(x[1]), .c(c[1]), .y(y[1]));
  ring_ip4 #(.MOD(7)) u7 (.clk, .x(x[2]), .c(c[2]), .y(y[2]));

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 500; t++) begin
      @(negedge clk);
      for (int m = 0; m < 3; m++) begin
        int e;
        // Result of the vector applied three clocks ago.
        if (hist[m].size() == 3) begin
          e = hist[m].pop_front();
          checks++;
          if (int'(y[m]) != e) begin
            failures++;
            $display("FAIL mod %0d t=%0d got=%0d exp=%0d", moduli[m], t, y[m], e);
          end
        end
        e = 0;
        for (int n = 0; n < 4; n++) begin
          x[m][n] = ring_t'($urandom_range(moduli[m] - 1));
          c[m][n] = ring_t'($urandom_range(moduli[m] - 1));
          e += int'(x[m][n]) * int'(c[m][n]);
        end
        hist[m].push_back(e % moduli[m]);
      end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
