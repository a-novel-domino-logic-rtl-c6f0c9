// prefix_black_cell: the full prefix operator of the carry tree.
//
// Combines a more significant node (hi) with a less significant, adjacent
// node (lo) into the node that spans both:
//   H = H_hi + T_hi . H_lo
//   T = T_hi . T_lo
// This is the group generate / group propagate combination of carry
// look-ahead addition; Ling's pseudo-carries H and shifted transmits T obey
// the same operator, so one cell serves the whole Ling tree.
// The operator follows the reference design.
// Interface: two ling_pkg::prefix_node_t inputs, one out.
// Timing: combinational, one AND-OR level for H and one AND for T.
module prefix_black_cell
  import ling_pkg::*;
(
  input  prefix_node_t hi,
  input  prefix_node_t lo,
  output prefix_node_t y
);

  always_comb begin
    y.h = hi.h | (hi.t & lo.h);
    y.t = hi.t & lo.t;
  end

endmodule
