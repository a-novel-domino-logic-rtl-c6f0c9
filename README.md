# 16-bit Kogge-Stone adder with Ling's carry recurrence

A parallel-prefix adder spends most of its delay in the carry tree. Ling's
transformation makes the first level of that tree cheaper: instead of the true
carry it computes a *pseudo-carry* H from which the transmit of one bit has been
factored out. The pair combine at the bottom of the tree then needs two terms
instead of three. The transmit that was taken out returns in the sum, where a
multiplexer hides it. This RTL implements that adder: 16 bits, a sparse
Kogge-Stone tree of Ling pseudo-carries with a merged first stage, and four
4-bit carry-select sum blocks.

It computes `{cout, s} = a + b + cin` combinationally. It has no clock, no
reset and no pipeline stage.

## Ling's pseudo-carry

Per bit, with operands `a`, `b`:

| signal | formula   | name                          |
|--------|-----------|-------------------------------|
| `g_i`  | `a_i & b_i` | generate                    |
| `t_i`  | `a_i \| b_i` | transmit (OR-form propagate) |
| `p_i`  | `a_i ^ b_i` | half sum (XOR-form propagate) |

The usual carry recurrence is `c_(i+1) = g_i | t_i & c_i`. Because `g_i`
implies `t_i`, the carry can be written `c_(i+1) = t_i & (g_i | c_i)`. Ling
names the bracket the pseudo-carry:

    H_i     = g_i | t_(i-1) & H_(i-1)
    c_(i+1) = t_i & H_i

H obeys the same associative prefix operator as the ordinary group
generate and propagate, provided that a node's transmit is shifted down by one
bit. A node spanning bits `i..k` carries the pair `(H_(i:k), T_(i-1:k-1))`,
and two adjacent nodes combine as

    H = H_hi | T_hi & H_lo
    T = T_hi & T_lo

The gain is at the bottom of the tree. For a bit pair, `g_(i-1)` implies
`t_(i-1)`, so the pair's pseudo-carry is just `H_(i:i-1) = g_i | g_(i-1)`. The
ordinary group generate of the same pair is `g_i | t_i & g_(i-1)`.

The cost appears in the sum, `s_i = p_i ^ (t_(i-1) & H_(i-1))`. The sum is
computed for both values of H and H selects between them. The extra AND then
stays off the path from H to the output.

## The carry tree (`ling_sparse_tree`)

The tree is *sparse*: it delivers a pseudo-carry only at the top bit of
every 4-bit group (bits 3, 7 and 11), not at every bit. The rows, bottom to
top, are:

1. **Merged first stage** (`ling_merged_cell`). At every odd bit `i`:
   `H = g_i | g_(i-1)`, `T = t_(i-1) & t_(i-2)`.
2. **Group row** (`prefix_black_cell`). The two pair nodes of each group are
   joined into `(H_(4j+3:4j), T_(4j+2:4j-1))`.
3. **Kogge-Stone rows over the groups.** The carry-in is an extra node below
   group 0, with pseudo-carry `cin` and transmit 1. At level `l`, the node of
   each group combines with the node `2^l` groups below it. If the lower node
   already reaches the carry-in, the result is complete and needs only the
   pseudo-carry (`prefix_gray_cell`). Otherwise both H and T are formed
   (`prefix_black_cell`). Completing every carry needs `ceil(log2(WIDTH/4))`
   levels, which is 2 for 16 bits.

For 16 bits, bit operations plus four prefix rows give the pseudo-carries into
the groups:

| output  | value       | complete after |
|---------|-------------|----------------|
| `hc[0]` | `cin`       | input          |
| `hc[1]` | `H_3` with `cin` | row 3     |
| `hc[2]` | `H_7` with `cin` | row 4     |
| `hc[3]` | `H_11` with `cin`| row 4     |

The carry into bit `4j` is `t_(4j-1) & hc[j]`. The transmit below bit 0
counts as 1.

## Carry-select sum blocks (`ling_cs_block`)

Each 4-bit block precomputes two sums with a short ripple over its own bits:

- one with an incoming carry of 0, for `h_in = 0`;
- one with an incoming carry of `t_below`, for `h_in = 1`.

A multiplexer driven by the group pseudo-carry then picks one of the two.
The block also returns its carry-out. The carry-out of the top block is the
adder's `cout`.

## Interface and timing

`ling_ks_adder16 #(WIDTH = 16, CS_BITS = 4)`

| port   | dir | width   | meaning       |
|--------|-----|---------|---------------|
| `a`    | in  | `WIDTH` | addend        |
| `b`    | in  | `WIDTH` | addend        |
| `cin`  | in  | 1       | carry-in      |
| `s`    | out | `WIDTH` | sum           |
| `cout` | out | 1       | carry-out     |

The adder is purely combinational. In gate levels, the path to the sum is one
level for the bit operations, then four prefix rows, then the sum multiplexer.
`WIDTH` may be any multiple of 4 from 8 upward, and the tree grows its
Kogge-Stone rows to match. Only 4-bit groups are supported
(`CS_BITS = 4`).

The shared node type `prefix_node_t` and the default sizes live in `ling_pkg`.

## Where this RTL departs from, or adds to, the reference design

- **Group size.** The reference schematic draws four 4-bit carry-select
  blocks fed by carries at bits 3, 7 and 11. The accompanying prose calls the
  adder "sparse-2". This RTL follows the schematic: one pseudo-carry per
  4 bits.
- **Carry-in.** The reference equations describe `A + B` giving a sum and a
  carry-out, with no carry-in. The schematic does feed a carry into the
  lowest sum block. Here `cin` is a port and enters the tree as the node
  below bit 0, so it is correct for every group.
- **Carry-out.** The schematic draws tree nodes in column 15 as well. Once the
  carry-in is in the tree, those nodes would need a fifth row to be complete.
  The carry-out is therefore taken from the top carry-select block, and
  column 15 has no tree nodes. As a result, the tree does not read
  `g[15:12]` or `t[14:11]`, and lint reports those bits as unused.
- **Block insides.** The reference gives the carry-select blocks only as
  boxes. The two-ripple-plus-multiplexer form is this design's choice.
- **Gate types.** The reference states that the Ling first stage is a NAND
  where the Weinberger adder has an OAI gate. That describes inverting CMOS
  gates. The RTL writes the same functions in positive logic.
- **Circuit family.** The reference adder was built and characterised in
  static, dynamic and domino CMOS for power and delay. None of that is
  modelled here. The RTL captures only the logic function and the structure,
  with no precharge or evaluate phases and no sizing.
- **Baseline not included.** The Weinberger Kogge-Stone adder, used as the
  point of comparison, is not part of this RTL.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench                 | what it checks |
|---------------------------|----------------|
| `tb_bit_ops`              | random and corner operands against a per-bit truth table |
| `tb_prefix_black_cell`    | all 16 input combinations |
| `tb_prefix_gray_cell`     | all 8 input combinations |
| `tb_ling_merged_cell`     | all 16 combinations, plus `t_i & H` = carry out of every 2-bit pair sum |
| `tb_ling_cs_block`        | all operands × `t_below` × `h_in` against `a + b + (t_below & h_in)` |
| `tb_ling_sparse_tree`     | 20 000 random vectors against a serial Ling recurrence, and `t & hc` against the true carries of `a + b + cin` |
| `tb_ling_ks_adder16`      | the full adder at default parameters: corner cases, walking ones and 100 000 random vectors against `a + b + cin` |
| `tb_ling_ks_adder_widths` | 8-, 32- and 64-bit instances against `a + b + cin` |

`tb_ling_ks_adder16` also counts how often each mechanism occurred, and fails
if one never did:

- each block selecting each of its two sums;
- a pseudo-carry of 1 while the true carry is 0;
- the carry-in deciding the top group;
- a carry-out.

For the cells, the expected values come from case analysis. For the larger
blocks, they come from integer addition or from a serial evaluation of the
recurrence. They are never computed by the prefix formulas under test.

Simulate one testbench with Verilator 5:

    verilator --binary --timing --assert -Irtl rtl/ling_pkg.sv \
        rtl/bit_ops.sv rtl/prefix_black_cell.sv rtl/prefix_gray_cell.sv \
        rtl/ling_merged_cell.sv rtl/ling_sparse_tree.sv rtl/ling_cs_block.sv \
        rtl/ling_ks_adder16.sv tb/tb_ling_ks_adder16.sv --top-module tb_ling_ks_adder16
    ./obj_dir/Vtb_ling_ks_adder16

Lint the adder with `verilator --lint-only -Wall` and the same `rtl/` file
list, using `--top-module ling_ks_adder16`.

## Files

- `rtl/ling_pkg.sv`: node type `prefix_node_t` and the default widths.
- `rtl/bit_ops.sv`: per-bit `g`, `t` and `p`.
- `rtl/ling_merged_cell.sv`: the merged first Ling stage.
- `rtl/prefix_black_cell.sv`, `rtl/prefix_gray_cell.sv`: the prefix operator, full and pseudo-carry-only.
- `rtl/ling_sparse_tree.sv`: the sparse Kogge-Stone pseudo-carry tree.
- `rtl/ling_cs_block.sv`: the 4-bit carry-select sum block.
- `rtl/ling_ks_adder16.sv`: the top-level adder.
