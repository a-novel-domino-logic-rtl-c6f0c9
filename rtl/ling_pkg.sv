// ling_pkg: shared types and constants of the Kogge-Stone Ling adder.
//
// A node of the carry tree carries a pair (H, T): H is the group Ling
// pseudo-carry of a span of bits and T the group transmit (product of the
// per-bit transmits t = a + b) of the same span shifted down by one bit, as
// Ling's recurrence H_i = g_i + t_(i-1).H_(i-1) requires. The same associative
// prefix operator combines these pairs as it combines Weinberger's (G, T).
// The default widths (16-bit adder, 4-bit carry-select groups) are those of
// the adder this package belongs to.
package ling_pkg;

  // Adder width and carry-select group size of the reference configuration.
  localparam int unsigned ADDER_WIDTH = 16;
  localparam int unsigned GROUP_BITS  = 4;

  // One node of the prefix tree: group pseudo-carry and group transmit.
  typedef struct packed {
    logic h;
    logic t;
  } prefix_node_t;

endpackage
