// switching_tree: an N-input, one-output logic function stored as a truth
// table and evaluated as a binary decision tree.
//
// This is the logic view of the switching-tree cell used for the small-ring
// operators: a tree of series switches, one level per input, whose leaves are
// programmed from the truth table (a leaf is present for a '1', absent for a
// '0'), so exactly one root-to-leaf path is selected by an input word. Level 0
// of the tree is steered by the most significant input in[N-1] and the last
// level by in[0], matching the truth-table input ordering. Entry i of TRUTH is
// the output for input word i. The electrical tree minimisation (don't-care
// merging, wires replacing switches) changes no logic value and is not modelled.
// Purely combinational; the pipeline latch lives in the cell that uses it.
// The default table is bit 0 of the mod 7 multiplier: entry 8*a + b is bit 0
// of (a * b mod 7) for a, b < 7, and 0 for the unused operand code 7.
module switching_tree #(
  parameter int N = 6,
  parameter logic [2**N-1:0] TRUTH = 64'h0054_0E4C_3270_2A00
) (
  input  logic [N-1:0] in,
  output logic         f
);

  // Walk the tree from the root: each level keeps the half of the remaining
  // table selected by its input bit.
  logic [2**N-1:0] t;
  always_comb begin
    t = TRUTH;
    for (int l = N - 1; l >= 0; l--) begin
      if (in[l]) t = t >> (1 << l);
    end
    f = t[0];
  end

endmodule
