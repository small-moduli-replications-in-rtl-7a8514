// tb_ring_cell: exhaustive check of small-ring operators. For the mod 7
// multiplier and a set of adders/subtractors over Z_3, Z_5, Z_7, every operand
// pair is applied and the result one clock later is compared with integer
// arithmetic reduced modulo the ring. The one-clock latency is checked by
// changing operands every clock.
module tb_ring_cell;
  import mrrns_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  ring_t a, b;
  ring_t y_mul7, y_add7, y_sub7, y_mul5, y_add5, y_mul3, y_sub3;
  int checks = 0, failures = 0;

  ring_cell #(.MOD(7), .OP(RING_MUL)) u_mul7 (.clk, .a, .b, .y(y_mul7));
  ring_cell #(.MOD(7), .OP(RING_ADD)) u_add7 (.clk, .a, .b, .y(y_add7));
  ring_cell #(.MOD(7), .OP(RING_SUB)) u_sub7 (.clk, .a, .b, .y(y_sub7));
  ring_cell #(.MOD(5), .OP(RING_MUL)) u_mul5 (.clk, .a, .b, .y(y_mul5));
  ring_cell #(.MOD(5), .OP(RING_ADD)) u_add5 (.clk, .a, .b, .y(y_add5));
  ring_cell #(.MOD(3), .OP(RING_MUL)) u_mul3 (.clk, .a, .b, .y(y_mul3));
  ring_cell #(.MOD(3), .OP(RING_SUB)) u_sub3 (.clk, .a, .b, .y(y_sub3));

  task automatic chk(string nm, int m, int got, int exp_v, int ai, int bi);
    if (ai >= m || bi >= m) return;
    checks++;
    if (got != exp_v) begin
      failures++;
      $display("FAIL %s a=%0d b=%0d got=%0d exp=%0d", nm, ai, bi, got, exp_v);
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int pa, pb;
    a = 0; b = 0;
    pa = -1; pb = -1;
    for (int i = 0; i <= 64; i++) begin
      @(negedge clk);
      if (pa >= 0) begin
        chk("mul7", 7, int'(y_mul7), (pa * pb) % 7, pa, pb);
        chk("add7", 7, int'(y_add7), (pa + pb) % 7, pa, pb);
        chk("sub7", 7, int'(y_sub7), (pa - pb + 7) % 7, pa, pb);
        chk("mul5", 5, int'(y_mul5), (pa * pb) % 5, pa, pb);
        chk("add5", 5, int'(y_add5), (pa + pb) % 5, pa, pb);
        chk("mul3", 3, int'(y_mul3), (pa * pb) % 3, pa, pb);
        chk("sub3", 3, int'(y_sub3), (pa - pb + 3) % 3, pa, pb);
      end
      if (i < 64) begin
        a = ring_t'(i / 8);
        b = ring_t'(i % 8);
        pa = i / 8;
        pb = i % 8;
      end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
