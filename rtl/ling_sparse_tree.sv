// ling_sparse_tree: sparse Kogge-Stone tree of Ling pseudo-carries.
//
// The tree delivers one Ling pseudo-carry per 4-bit group, H_(4j-1), the
// carry information into group j; the sums inside each group are then formed
// by a carry-select block. It works in three parts:
//   1. Merged first stage: at every odd bit i a ling_merged_cell forms the
//      pair node (H = g_i + g_(i-1), T = t_(i-1).t_(i-2)).
//   2. One prefix level joins the two pairs of each group into the group node
//      (H_(4j+3:4j), T_(4j+2:4j-1)).
//   3. A Kogge-Stone recurrence over the group nodes, with the carry-in as an
//      extra node below group 0 (its pseudo-carry is cin, its transmit is 1).
//      At level L a node combines with the node 2^L groups below it; a
//      combine whose lower node already reaches the carry-in completes the
//      span and needs only a prefix_gray_cell, all others use a
//      prefix_black_cell. ceil(log2(WIDTH/4)) levels complete every group
//      carry that a carry-select block needs.
// The top group needs no tree node: the carry-out of the adder is taken from
// its carry-select block.
// The pair and group rows and the four-row depth follow the reference
// drawing. Feeding the carry-in into the tree, and leaving the top group
// without tree nodes (the drawing has nodes there), are this design's
// choices.
// Interface: per-bit generate g and transmit t, the carry-in cin; out
// hc[j] = Ling pseudo-carry into group j (hc[0] = cin). The carry into bit 4j
// is then c_(4j) = t_(4j-1).hc[j].
// Timing: combinational; 2 + ceil(log2(WIDTH/4)) prefix levels (4 for the
// 16-bit adder). WIDTH must be a multiple of 4 and at least 8.
module ling_sparse_tree
  import ling_pkg::*;
#(
  parameter int unsigned WIDTH = ADDER_WIDTH
) (
  input  logic [WIDTH-1:0]         g,
  input  logic [WIDTH-1:0]         t,
  input  logic                     cin,
  output logic [WIDTH/GROUP_BITS-1:0] hc
);

  localparam int unsigned NG     = WIDTH / GROUP_BITS;  // number of groups
  localparam int unsigned LEVELS = $clog2(NG);           // Kogge-Stone levels

  if (WIDTH % GROUP_BITS != 0 || WIDTH < 2 * GROUP_BITS) begin : g_bad_width
    $error("ling_sparse_tree: WIDTH must be a multiple of 4 and at least 8");
  end

  // Row 1 and row 2 nodes of every group but the top one.
  prefix_node_t pair_lo [NG-1];  // bits 4j+1 : 4j
  prefix_node_t pair_hi [NG-1];  // bits 4j+3 : 4j+2
  prefix_node_t grp     [NG-1];  // bits 4j+3 : 4j

  // Kogge-Stone row 0 over the group nodes. Index k = 0 is the carry-in
  // node, k = j+1 is the node of group j (bit 4j+3). Each later row is
  // declared inside its own g_level scope.
  prefix_node_t ks0 [NG];

  for (genvar j = 0; j < NG - 1; j++) begin : g_group
    ling_merged_cell u_pair_lo (
      .g_hi (g[4*j+1]),
      .g_lo (g[4*j]),
      .t_lo (t[4*j]),
      .t_lo2((j == 0) ? 1'b1 : t[4*j-1]),
      .y    (pair_lo[j])
    );
    ling_merged_cell u_pair_hi (
      .g_hi (g[4*j+3]),
      .g_lo (g[4*j+2]),
      .t_lo (t[4*j+2]),
      .t_lo2(t[4*j+1]),
      .y    (pair_hi[j])
    );
    prefix_black_cell u_grp (
      .hi(pair_hi[j]),
      .lo(pair_lo[j]),
      .y (grp[j])
    );
    assign ks0[j+1] = grp[j];
  end

  assign ks0[0] = '{h: cin, t: 1'b1};

  for (genvar l = 0; l < LEVELS; l++) begin : g_level
    localparam int unsigned D = 1 << l;
    prefix_node_t cur [NG];  // row l
    prefix_node_t nxt [NG];  // row l+1
    if (l == 0) begin : g_first
      assign cur = ks0;
    end else begin : g_later
      assign cur = g_level[l-1].nxt;
    end
    for (genvar k = 0; k < NG; k++) begin : g_node
      if (k < D) begin : g_pass
        // Already complete: carried to the next row unchanged.
        assign nxt[k] = cur[k];
      end else if (k < 2 * D) begin : g_gray
        // The lower node reaches the carry-in: the span completes here.
        logic h;
        prefix_gray_cell u_gray (
          .hi  (cur[k]),
          .lo_h(cur[k-D].h),
          .h   (h)
        );
        assign nxt[k] = '{h: h, t: 1'b0};
      end else begin : g_black
        prefix_black_cell u_black (
          .hi(cur[k]),
          .lo(cur[k-D]),
          .y (nxt[k])
        );
      end
    end
  end

  for (genvar j = 0; j < NG; j++) begin : g_out
    assign hc[j] = g_level[LEVELS-1].nxt[j].h;
  end

endmodule
