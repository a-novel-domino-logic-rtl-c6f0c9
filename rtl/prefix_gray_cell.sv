// prefix_gray_cell: the reduced prefix operator of the carry tree.
//
// Used where the lower span reaches the least significant end of the adder
// (the carry-in), so the combined span is complete and only its pseudo-carry
// is needed further on:
//   H = H_hi + T_hi . H_lo
// No group transmit is produced.
// The reference drawing shows such reduced nodes without a legend; where
// they are placed in this tree follows from the carry-in handling, which
// is this design's own.
// Interface: the more significant node (H and T) and the lower pseudo-carry
// in, the completed pseudo-carry out.
// Timing: combinational, one AND-OR level.
module prefix_gray_cell
  import ling_pkg::*;
(
  input  prefix_node_t hi,
  input  logic         lo_h,
  output logic         h
);

  assign h = hi.h | (hi.t & lo_h);

endmodule
