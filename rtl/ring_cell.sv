// ring_cell: one pipelined operator of a small ring Z_MOD (MOD = 3, 5 or 7):
// y <= a OP b (mod MOD), OP one of add, subtract, multiply.
//
// Each of the three output bits is produced by its own 6-input switching tree
// (two 3-bit operands, a in the upper three tree levels, b in the lower three),
// and the three tree outputs are caught by the stage's output register, the
// logic equivalent of the evaluate-then-restoring-latch dynamic pipeline stage.
// The truth tables are computed at elaboration from MOD and OP. Operand codes
// >= MOD never occur; their table entries are don't-cares and are set to 0 here.
// Interface: operands a, b are ring values; y is valid one clock after them
// (latency 1, one result per clock). There is no reset: the stage holds data
// only, like the dynamic pipeline it models.
module ring_cell
  import mrrns_pkg::*;
#(
  parameter int       MOD = 7,
  parameter ring_op_e OP  = RING_MUL
) (
  input  logic  clk,
  input  ring_t a,
  input  ring_t b,
  output ring_t y
);

  function automatic logic [63:0] table_bit(logic [1:0] bitn);
    logic [63:0] t;
    ring_t r;
    t = '0;
    for (int i = 0; i < 64; i++) begin
      ring_t ai, bi;
      ai = ring_t'(i >> 3);
      bi = ring_t'(i & 7);
      if (int'(ai) < MOD && int'(bi) < MOD) begin
        case (OP)
          RING_ADD: r = ring_add(ai, bi, MOD);
          RING_SUB: r = ring_sub(ai, bi, MOD);
          default:  r = ring_mul(ai, bi, MOD);
        endcase
        t[i] = r[bitn];
      end
    end
    return t;
  endfunction

  ring_t f;
  for (genvar g = 0; g < RW; g++) begin : g_tree
    switching_tree #(.N(6), .TRUTH(table_bit(2'(g)))) u_tree (
      .in ({a, b}),
      .f  (f[g])
    );
  end

  always_ff @(posedge clk) y <= f;

endmodule
