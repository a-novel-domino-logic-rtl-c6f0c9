// bit_ops: per-bit operations of a parallel-prefix adder.
//
// For every bit position i the block forms the three local signals the rest
// of the adder is built from:
//   g_i = a_i . b_i     generate
//   t_i = a_i + b_i     transmit (the OR form of propagate)
//   p_i = a_i ^ b_i     half sum (the XOR form of propagate)
// These are the bit operations of Weinberger's and Ling's recurrences; the
// adder needs both the OR and the XOR forms, t for the carry tree and p for
// the sum.
// The formulas are those of the reference design; producing all three in
// one block is this design's own arrangement.
// Interface: WIDTH-bit operands in, three WIDTH-bit vectors out.
// Timing: purely combinational, one gate level.
module bit_ops #(
  parameter int unsigned WIDTH = 16
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] g,
  output logic [WIDTH-1:0] t,
  output logic [WIDTH-1:0] p
);

  always_comb begin
    g = a & b;
    t = a | b;
    p = a ^ b;
  end

endmodule
