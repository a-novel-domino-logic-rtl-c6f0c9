// ling_ks_adder16: 16-bit Kogge-Stone adder with Ling's recurrence.
//
// The adder computes {cout, s} = a + b + cin. Instead of true carries its
// tree computes Ling pseudo-carries H_i = g_i + t_(i-1).H_(i-1), from which
// the carry is c_(i+1) = t_i.H_i. Factoring t_i out of the carry shortens
// the first combine stage (H of a bit pair is just g_i + g_(i-1)) at the
// price of one more term in the sum, which is recovered by carry selection.
// Structure, as in the reference schematic:
//   bit_ops           g, t, p for every bit;
//   ling_sparse_tree  merged first stage, 4-bit group nodes, then a
//                     Kogge-Stone recurrence over the groups, giving the
//                     pseudo-carry into each 4-bit group;
//   ling_cs_block x4  each 4-bit block precomputes its sums for both values
//                     of its group pseudo-carry and selects with it.
// The carry-in enters as the pseudo-carry into the lowest block (the
// transmit below bit 0 is taken as 1) and as the lowest node of the tree.
// The carry-out is the carry out of the top block. Widths other than 16
// (multiples of 4, at least 8) elaborate with the same structure.
// The carry-in port and the carry-out from the top block are this design's
// choices; the reference equations describe A + B with a carry-out only.
// Interface: a, b, cin in; s, cout out. No clock: the reference design is a
// combinational datapath; its domino precharge/evaluate timing is a circuit
// matter and is not modelled.
// Timing: combinational, 1 + 4 + 1 gate levels from operands to sum for
// WIDTH = 16 (bit operations, four prefix levels, sum multiplexer).
module ling_ks_adder16
  import ling_pkg::*;
#(
  parameter int unsigned WIDTH   = ADDER_WIDTH,
  parameter int unsigned CS_BITS = GROUP_BITS
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] s,
  output logic             cout
);

  localparam int unsigned NG = WIDTH / CS_BITS;

  if (CS_BITS != GROUP_BITS) begin : g_bad_group
    $error("ling_ks_adder16: the Ling tree is built for 4-bit groups");
  end

  logic [WIDTH-1:0] g, t, p;
  logic [NG-1:0]    hc;       // pseudo-carry into each group
  logic [NG-1:0]    blk_cout; // carry out of each block

  bit_ops #(.WIDTH(WIDTH)) u_bit_ops (
    .a(a), .b(b), .g(g), .t(t), .p(p)
  );

  ling_sparse_tree #(.WIDTH(WIDTH)) u_tree (
    .g(g), .t(t), .cin(cin), .hc(hc)
  );

  for (genvar j = 0; j < NG; j++) begin : g_block
    ling_cs_block #(.BITS(CS_BITS)) u_cs (
      .g      (g[CS_BITS*j +: CS_BITS]),
      .t      (t[CS_BITS*j +: CS_BITS]),
      .p      (p[CS_BITS*j +: CS_BITS]),
      .t_below((j == 0) ? 1'b1 : t[CS_BITS*j-1]),
      .h_in   (hc[j]),
      .s      (s[CS_BITS*j +: CS_BITS]),
      .cout   (blk_cout[j])
    );
  end

  assign cout = blk_cout[NG-1];

endmodule
