# Wallace-tree multiplier with a Han-Carlson parallel-prefix final adder

The slowest part of a binary adder is its carry chain. A ripple-carry adder
passes the carry through every bit one at a time. A parallel-prefix adder
instead computes every carry with a tree of depth log2(n). The Han-Carlson
tree is a middle road between two well-known trees. Kogge-Stone is fast but
has many cells and wires. Brent-Kung is small but deep. Han-Carlson runs a
Kogge-Stone tree on every other bit position, then adds one extra level that
fills in the positions in between. This halves the cell count of Kogge-Stone
for the cost of one extra level.

This RTL has two parts:

* `han_carlson_adder`: a generic Han-Carlson adder with carry-in and
  carry-out, 16 bits wide by default. This is the core of the design.
* `wallace_multiplier`: an unsigned 8 x 8 Wallace-tree multiplier. Its final
  carry-propagate addition is done by the 16-bit Han-Carlson adder. This is
  the top level.

Everything is combinational: there are no clocks, registers or resets.

## Files

| file | contents |
|---|---|
| `rtl/gp_cell.sv` | black prefix cell: G = g2 \| p2·g1, P = p2·p1 |
| `rtl/gn_cell.sv` | grey prefix cell: G = g2 \| p2·g1 |
| `rtl/han_carlson_adder.sv` | generic Han-Carlson adder, `WIDTH` = 16 |
| `rtl/csa_row.sv` | row of full adders (3:2 carry-save compressor), `W` = 16 |
| `rtl/wallace_multiplier.sv` | top: partial products, Wallace tree, final adder, `N` = 8 |
| `tb/tb_*.sv` | one self-checking testbench per module |

## The prefix tree

### Generate, propagate and the carry-in slot

Each bit i starts with a generate bit g = a·b and a propagate bit p = a ⊕ b.
Adjacent bit groups are merged with the prefix operator:

    (G, P) = (g_hi | p_hi·g_lo,  p_hi·p_lo)

A **black cell** (`gp_cell`) computes both G and P. A **grey cell**
(`gn_cell`) computes only G. A grey cell is used where the lower group
already reaches the bottom of the word, so its G is a finished carry and no
P is needed above it.

The carry-in is handled as one more prefix position below bit 0. The tree
works on positions 0..WIDTH:

* position 0 holds (g = cin, p = 0);
* operand bit i sits at position i+1.

Once the tree is done, position i holds the carry *into* bit i. So
`sum[i] = p[i] ^ carry[i]`, and `cout` is the value at position WIDTH.

### The levels

With WIDTH+1 positions the tree has log2(WIDTH) + 1 levels:

1. **Pair level.** Every odd position j merges with j-1. Position 1 is bit 0
   merged with cin, so it becomes the first finished carry (grey cell).
2. **Kogge-Stone levels** (spans 2, 4, 8, ...). Only the odd positions take
   part. Position j merges with position j-span, if that exists. The cell is
   grey when j < 2·span, because the lower operand then already reaches
   position 0. Otherwise it is black.
3. **Final level.** Every even position j ≥ 2 takes the finished carry of
   position j-1 through one grey cell.

For WIDTH = 16 this gives 5 levels. The cell count per level is
8 / 7 / 6 / 4 / 8: 16 grey cells and 17 black cells (B = black, G = grey).

```
position: 16 15 14 13 12 11 10  9  8  7  6  5  4  3  2  1  0(cin)
level 1       B     B     B     B     B     B     B     G
span 2        B     B     B     B     B     B     G
span 4        B     B     B     B     G     G
span 8        G     G     G     G
final      G     G     G     G     G     G     G     G
```

In the RTL each level is a generate block, `g_lvl[k]`, with its own vectors
`gv` and `pv`. Which cell goes at a position, and its span, are worked out
from `k` and `j` by localparams. This keeps every signal acyclic, so
Verilator sees no false combinational loops. It also makes the same code
correct at any width. The testbench checks widths 8, 16 and 32.

### Where this adder differs from the 16-bit netlist it follows

The cell layout above is the one in the original 16-bit Han-Carlson netlist.
That netlist has three points that this RTL handles differently:

* **Lowest span-2 and span-4 cells.** In the netlist, the cells at
  positions 3 and 5 take the raw carry-in as their lower operand. They
  should take the finished carry of position 1 (bit 0 merged with cin).
  With the raw carry-in, a carry generated in bit 0 is lost. For example,
  7 + 1 gives 0. This RTL uses position 1, as the adder's function requires.
* **Carry-out.** The netlist drives `cout` from the carry into bit 14. This
  RTL drives it with the true carry out of bit 15, which takes one extra
  grey cell at position 16 on the final level.
* **Cell bodies.** The two cell types appear in the netlist by name and
  ports only. Their equations here are the standard prefix operator.

The eight operand sets of the reference simulation give the same sums with
this RTL. They run from 18 + 8960 = 8978 up to 29700 + 33043 + 1 = 62744,
and `tb_han_carlson_adder` checks all of them.

## The multiplier

`wallace_multiplier` (parameter `N`, default 8) works in three steps:

1. **Partial products.** Row r is `a & {N{b[r]}}` shifted left by r, held as
   a 2N-bit word.
2. **Wallace reduction.** On each level the rows are taken three at a time.
   Each group of three goes through a `csa_row`, which is 2N independent
   full adders. The sum word stays in place and the carry word moves up one
   bit. The one or two rows left over pass on unchanged. r rows become
   2·⌊r/3⌋ + (r mod 3). For N = 8 that is 8 → 6 → 4 → 3 → 2, which is four
   full-adder delays whatever the operand values. The row count per level
   and the number of levels are computed by constant functions
   (`rows_at`, `num_levels`). The levels are generate blocks `g_lev[k]`.
3. **Final addition.** The last two rows go into `han_carlson_adder` with
   WIDTH = 2N and cin = 0.

An N x N product fits in 2N bits, so all arithmetic is done modulo 2^2N.
No carry is ever produced out of bit 2N-1: the exhaustive test confirms that
the final adder's carry-out is 0 for all 65,536 operand pairs. That
carry-out is left unread.

The idea of a Wallace tree closed by a parallel-prefix adder is given.
Everything else in the multiplier is this implementation's own choice:

* 8-bit operands, chosen so the final adder is the 16-bit Han-Carlson adder;
* unsigned operands;
* an AND array for the partial products;
* word-level grouping of rows into full-adder rows;
* no pipelining.

To build a signed (Baugh-Wooley or Booth) version, only the partial-product
step would change.

## Interfaces

| module | parameters | inputs | outputs |
|---|---|---|---|
| `wallace_multiplier` | `N = 8` | `a[N-1:0]`, `b[N-1:0]` | `product[2N-1:0]` |
| `han_carlson_adder` | `WIDTH = 16` | `a`, `b` `[WIDTH-1:0]`, `cin` | `sum[WIDTH-1:0]`, `cout` |
| `csa_row` | `W = 16` | `x`, `y`, `z` `[W-1:0]` | `s`, `c` `[W-1:0]` |
| `gp_cell` | none | `g2`, `p2`, `g1`, `p1` | `G`, `P` |
| `gn_cell` | none | `g2`, `p2`, `g1` | `G` |

`han_carlson_adder` requires WIDTH ≥ 2, and `csa_row` requires W ≥ 2.

## Not included

The variable-latency *speculative* Han-Carlson adder and its error
detection and error correction stages are not here. Only their purpose is
known: an approximate, faster carry tree whose result is flagged when the speculation
fails, and then corrected. Their stages,
speculation window and detection logic are not specified, so none of this
RTL tries to reproduce them.

## Verification

Each testbench compares the module against the simulator's own integer
arithmetic. It ends by printing `TB_RESULT checks=<n> failures=<n>`, and
each has a time-out watchdog.

| testbench | what it runs |
|---|---|
| `tb_gp_cell`, `tb_gn_cell` | all input combinations |
| `tb_csa_row` | 20,000 random triples: s + c = x + y + z, c[0] = 0, s = parity |
| `tb_han_carlson_adder` | the eight reference sums; every "generate at bit i, then propagate to the top" carry chain, with and without cin; 200,000 random 16-bit sums; 20,000 random sums each at WIDTH = 8 and WIDTH = 32 |
| `tb_wallace_multiplier` | all 65,536 products at the default parameters; checks the final adder never carries out; counts two-row reductions, carries that cross 8 or more bits of the final adder, zero products and 255 x 255, and fails if any of these never occurs |

To run a testbench with Verilator 5:

```
verilator --binary --timing -Wall -Wno-fatal -y rtl tb/tb_wallace_multiplier.sv -o sim
./obj_dir/sim
```

Use the same command for the other testbenches. `-y rtl` lets Verilator find
the submodules by file name. To lint a module on its own:

```
verilator --lint-only -Wall -y rtl rtl/wallace_multiplier.sv
```

Only style warnings are left, and they are expected:

* the propagate vector of the last prefix level is never read, because the
  carries are all that is needed there;
* the final adder's carry-out is never read in the multiplier.

The 16-bit adder synthesizes to 33 prefix cells plus the input and output
XOR/AND gates. On a 4-input-LUT FPGA it was reported at 34 slices and 59
LUTs, with 50 I/O pins (16 + 16 + 16 + 1 + 1). These are figures for the
original netlist and were not measured here.
