// ling_merged_cell: merged first stage of Ling's carry recurrence.
//
// Ling factors the transmit of the top bit out of the carry, so the first
// combine of bits i and i-1 needs no transmit on the generate path: because
// g_(i-1) implies t_(i-1), the pair pseudo-carry is simply
//   H = g_i + g_(i-1)
// where Weinberger's recurrence needs G = g_i + t_i . g_(i-1). The pair's
// transmit is shifted down by one bit, as Ling's recurrence uses it:
//   T = t_(i-1) . t_(i-2)
// For the lowest pair (i = 1), t_(i-2) is the transmit of the carry-in
// position, which is 1.
// The function follows the reference design, which builds this stage as an
// inverting NAND gate; the positive-logic form here is equivalent.
// Interface: the two generates and the two transmits in, one
// ling_pkg::prefix_node_t out.
// Timing: combinational, one gate level after the bit operations.
module ling_merged_cell
  import ling_pkg::*;
(
  input  logic         g_hi,   // g_i
  input  logic         g_lo,   // g_(i-1)
  input  logic         t_lo,   // t_(i-1)
  input  logic         t_lo2,  // t_(i-2)
  output prefix_node_t y
);

  always_comb begin
    y.h = g_hi | g_lo;
    y.t = t_lo & t_lo2;
  end

endmodule
