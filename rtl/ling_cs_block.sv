// ling_cs_block: carry-select sum block of the Ling adder.
//
// Ling's pseudo-carry moves one transmit term out of the carry tree and into
// the sum: the carry into the block's lowest bit is c = t_below . h_in, where
// h_in is the group pseudo-carry from the tree and t_below the transmit of
// the bit just below the block. The block therefore computes its sums twice,
// once for h_in = 0 (incoming carry 0) and once for h_in = 1 (incoming carry
// t_below), each with a short ripple of c_(i+1) = g_i + t_i.c_i over its own
// bits, and lets the late-arriving h_in pick one result through a
// multiplexer. The ripple form of the two precomputed sums is this design's
// choice; only the selection by the pseudo-carry is fixed.
// Interface: per-bit g, t, p of the block's BITS bits, t_below, h_in; out the
// block's sum bits and the carry out of its top bit.
// Timing: combinational; h_in reaches the outputs through one multiplexer.
module ling_cs_block #(
  parameter int unsigned BITS = ling_pkg::GROUP_BITS
) (
  input  logic [BITS-1:0] g,
  input  logic [BITS-1:0] t,
  input  logic [BITS-1:0] p,
  input  logic            t_below,
  input  logic            h_in,
  output logic [BITS-1:0] s,
  output logic            cout
);

  logic [BITS-1:0] s0, s1;  // sums for h_in = 0 and h_in = 1
  logic            c0, c1;  // running carries of the two versions

  always_comb begin
    c0 = 1'b0;
    c1 = t_below;
    for (int i = 0; i < BITS; i++) begin
      s0[i] = p[i] ^ c0;
      s1[i] = p[i] ^ c1;
      c0    = g[i] | (t[i] & c0);
      c1    = g[i] | (t[i] & c1);
    end
    s    = h_in ? s1 : s0;
    cout = h_in ? c1 : c0;
  end

endmodule
