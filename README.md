# Parallel array multiplier with row-skipping carries (MCSA / DCSA)

An N x N unsigned array multiplier that reduces the partial products with a
carry-save array in which every row adds only **one multiplexer delay** to the
critical path, instead of an XOR delay plus a multiplexer delay as in the
textbook array.

The trick is in where the carries go. A full adder built as "XOR of two
operands, then a multiplexer steered by the carry input" is fast from its
carry input to its outputs (one multiplexer) and slow from its XOR operands
(XOR plus multiplexer). In a conventional array each cell takes a partial
product bit, the sum of the row above and the carry of the row above, all
arriving late at once, so every row costs two delays. Here:

* the **partial product bit** (ready at time zero) and a **carry from two rows
  up** (ready one delay earlier than the sum of the row above) go to the two
  XOR operands, so the XOR has settled before the slow signal arrives;
* the **sum of the row directly above** goes to the carry input, through
  which it reaches the outputs in one multiplexer delay.

The cell that does this, **MCSA**, is a full adder whose XOR operand fed by
the forwarded carry is active low and whose carry output is active low, so a
carry can be wired from one MCSA to another two rows down without an inverter.
Because carries skip a row, the array ends with *two* carry vectors (those of
the last two rows) plus a sum vector. A second cell, **DCSA**, a full adder
with two active-low operands and an active-low carry output, is used to build
the final carry-propagate adder that consumes them.

The whole design is combinational: no clock, no reset, no registers.

## Interface

`par_mult #(N)` (top level)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `x`  | in  | N     | multiplicand, unsigned |
| `y`  | in  | N     | multiplier, unsigned |
| `p`  | out | 2N    | product `x * y` |

`N` defaults to 16 and must be at least 4. The product is valid in the same
time step as the operands (zero clock cycles of latency).

## The two cells

Both cells are one-bit full adders; the figure of merit is which input is on
the fast path.

| cell   | operands (XOR side)        | carry in | outputs |
|--------|----------------------------|----------|---------|
| `mcsa` | `a_n` (active low), `b`    | `ci`     | `s = a^b^ci`, `co_n = ~maj(a,b,ci)` |
| `dcsa` | `a_n`, `b_n` (both active low) | `ci` | `s = a^b^ci`, `co_n = ~maj(a,b,ci)` |

Inside, each is written as the gates of the published cell schematics:
inverters restore the active-low operands, an XNOR compares the operands, one
2:1 multiplexer steered by `ci` chooses the XNOR output or its complement as
the sum, and a second multiplexer steered by the XNOR output chooses the
carry (equal operands generate their own value; unequal ones propagate `ci`),
with its output inverted. The gate types follow the publication; which data
pin of each multiplexer takes which signal could not be taken from it and was
chosen here so that the cells are correct full adders.

## The MCSA array (`mcsa_array`)

Cells are placed exactly as in a conventional array: row `j = 1 .. N-1` has
N-1 cells at binary weights `w = j .. j+N-2`, and row 0 is simply partial
product row 0. Cell `(j, w)` is wired as follows.

| input | source |
|-------|--------|
| `b`   | partial product `x[w-j] & y[j]` |
| `ci`  | sum of cell `(j-1, w)`; for row 1, partial product `x[w] & y[0]`; for the top cell of a row (`w = j+N-2`), the top partial product `x[N-1] & y[j-1]` of the row above, which no cell has added yet |
| `a_n` | inverted carry of cell `(j-2, w-1)`, i.e. two rows up, one weight lower |

The boundaries need care, because near the edges of the triangle the cell
two rows down does not exist:

* Rows 1 and 2 have no row two above them; their `a_n` is tied to 1
  (logical zero). The one exception is the lowest cell of row 2, `(2,2)`,
  which takes the carry of the lowest cell of row 1, `(1,1)`: no other cell at
  weight 2 could absorb it, and the input is free.
* The top cell of every row has no cell two rows up at weight `w-1`; its
  `a_n` is 1.
* Carries with no cell two rows below are not added in the array. These are
  all carries of rows N-2 and N-1, and the carries of the diagonal (lowest)
  cells of rows 2 .. N-3. They are handed to the final adder.

The array's outputs are therefore

* `p_lo[2:0]`: product bits 0, 1 and 2, already final (`x0 & y0` and the
  lowest sums of rows 1 and 2);
* three vectors over weights 3 .. 2N-2 (2N-4 bits, bit `k` has weight `k+3`):
  `s` (the last sum at each weight, true polarity), `ca_n` (inverted carries
  of the diagonal cells and of row N-2) and `cb_n` (inverted carries of row
  N-1). Unused positions of the carry vectors are 1 (logical zero); they are
  constant outputs by construction.

so that `x*y = p_lo + ((s + ~ca_n + ~cb_n) << 3)`.

For N = 4, the map is:

| cell  | `a_n` (inverted) from | `b`   | `ci`       |
|-------|-----------------------|-------|------------|
| (1,1) | 0                     | x0y1  | x1y0 — its sum is P1 |
| (1,2) | 0                     | x1y1  | x2y0       |
| (1,3) | 0                     | x2y1  | x3y0       |
| (2,2) | carry of (1,1)        | x0y2  | sum (1,2) — its sum is P2 |
| (2,3) | 0                     | x1y2  | sum (1,3)  |
| (2,4) | 0                     | x2y2  | x3y1       |
| (3,3) | carry of (1,2)        | x0y3  | sum (2,3)  |
| (3,4) | carry of (1,3)        | x1y3  | sum (2,4)  |
| (3,5) | 0                     | x2y3  | x3y2       |

and the final adder sees, at weights 3, 4, 5, 6: `s` = sum (3,3), (3,4),
(3,5), x3y3; `ca` = carries of (2,2), (2,3), (2,4), none; `cb` = none,
carries of (3,3), (3,4), (3,5). P3 to P7 come out of the final adder, as in
the published 4 x 4 design, whose final adder is 4 bits wide.

## The DCSA final adder (`dcsa_cpa`)

`dcsa_cpa #(W)` returns the W+1-bit sum `s + ~ca_n + ~cb_n` (modulo
2^(W+1); in the multiplier it always fits). It has two rows of DCSA cells:

1. a **compression row**: cell `k` takes the two inverted carry vectors on
   its active-low operands and the sum vector on its carry input, giving a sum
   `t[k]` and an inverted carry `u_n[k]` of weight `k+1`;
2. a **ripple row**: cell `k` takes `u_n[k-1]` and the previous cell's
   inverted ripple carry on its two active-low operands and `t[k]` on its
   carry input. Since both of its operands are inverted carries, the chain
   needs no inverters. The carry into bit 0 is zero; an extra cell at
   position W forms the top bit.

That the final adder is made of DCSA cells fed by the inverted carries of
the last two MCSA rows, with a zero carry in, follows the publication. The
split into two rows is this design's own: three vectors reach the adder, and
one row of full adders cannot add three vectors and a ripple carry.

## Timing

The RTL has no delays; it is a zero-delay description of a gate netlist. A
unit-delay analysis of that netlist, counting XOR/XNOR and multiplexer as one
delay Δ and inverters and AND gates as zero (the counting under which the
array scheme was proposed), gives:

| N  | array settled | whole multiplier |
|----|---------------|------------------|
| 4  | 4 Δ           | 15 Δ             |
| 8  | 8 Δ           | 31 Δ             |
| 16 | 16 Δ          | 63 Δ             |

The array meets the claimed N Δ (a conventional array takes 2(N-1) Δ). The
final adder, a ripple chain of 2N-3 cells in which the carry enters through
an XOR operand (two delays per bit), dominates the total. The published
totals for the proposed multiplier (4, 8 and 17 Δ at 4, 8 and 16 bits, with
about 6 ns per Δ) give the final adder almost no time and are not reached by
this final adder. A faster final adder (the ripple carry through the carry
input, or a carry-lookahead structure) would be this design's own addition.

## Size

| N  | conventional array (full adders) | this design (MCSA + DCSA) |
|----|----------------------------------|---------------------------|
| 4  | 9 + 3 = 12                       | 9 + 4 + 5 = 18 (+50 %)    |
| 8  | 49 + 7 = 56                      | 49 + 12 + 13 = 74 (+32 %) |
| 16 | 225 + 15 = 240                   | 225 + 28 + 29 = 282 (+18 %) |

plus N² AND gates in both. The increase claimed for the original design is
about 13 %; the difference is the second row of this design's final adder and
its width (2N-4 bits rather than N for N > 4).

## Where this RTL departs from, or goes beyond, the original description

* **Carry forwarding.** The description once says the carry goes to "the next
  row" and elsewhere that it goes to the second row below, and that the final
  adder receives inverted carries of the last two rows. Only the second
  reading gives the one-delay rows and two carry vectors, and it is the one
  built.
* **Boundary carries** (rows 1 and 2, top cells, diagonal cells) are this
  design's own arrangement; it reproduces the published 4 x 4 picture (P0..P2
  from the array, a 4-bit final adder for P3..P7).
* **Final adder** width (2N-4 bits) and two-row structure are this design's
  own; see above.
* **Operands are unsigned.** Signed operands, Booth recoding and the
  conventional array used for comparison are not part of this RTL.

## Files

| file | contents |
|------|----------|
| `rtl/par_mult.sv`   | top level |
| `rtl/mult_pkg.sv`   | shared constants: the weight (3) where the final adder starts and the final vector width 2N-4 |
| `rtl/pp_gen.sv`     | N² AND gates forming `pp[j][i] = x[i] & y[j]` |
| `rtl/mcsa_array.sv` | the MCSA carry-save array |
| `rtl/mcsa.sv`       | MCSA cell |
| `rtl/dcsa_cpa.sv`   | DCSA final carry-propagate adder |
| `rtl/dcsa.sv`       | DCSA cell |
| `tb/*_tb.sv`        | one self-checking testbench per module, plus `par_mult_sizes_tb` |

## Simulation

Each testbench prints `TB_RESULT checks=<n> failures=<m>` and stops. For
example, the default-size end-to-end test:

    verilator --binary --timing --assert -Irtl -Itb tb/par_mult_tb.sv \
              --top-module par_mult_tb -Mdir obj_par_mult
    ./obj_par_mult/Vpar_mult_tb

| testbench | what it covers |
|-----------|----------------|
| `mcsa_tb`, `dcsa_tb` | all 8 input combinations of each cell |
| `pp_gen_tb` | corner and random operands, every partial product row |
| `mcsa_array_tb` | array outputs recombined to the product: N = 4 and N = 5 exhaustive (N = 5 is the first size with a diagonal carry sent to the final adder), N = 16 random; counts carries forwarded two rows down |
| `dcsa_cpa_tb` | W = 4 exhaustive (the 4 x 4 multiplier's adder), W = 28 random and full-length ripples |
| `par_mult_tb` | default N = 16: corners, the operand pairs of the published simulation runs (4 x E = 38, B x 8 = 58, AB x 3D, 918F x 5F33, hexadecimal) and 22,000 random pairs. It counts and requires each carry mechanism: a carry forwarded two rows down, the row 1 to row 2 carry, a diagonal carry sent to the final adder, both final carry vectors set at one weight, and a ripple over at least 8 bits |
| `par_mult_sizes_tb` | N = 4 and N = 8 over all operand pairs, N = 16 random, with the published operand pairs at each size |

`par_mult_tb` reads internal nets by hierarchical name to count the carry
mechanisms; its product checks use only the ports.

## Changing it

`N` is the only design parameter; `dcsa_cpa`'s `W` is derived from it
(2N-4, `mult_pkg::final_width`) in the top. The array's wiring rules are all in the generate loops of
`mcsa_array.sv`, in the order of the table above; changing the carry routing
means changing the `a_n` selection there and the list of carries handed to
`ca_n`/`cb_n` at the bottom of the file, which must stay complementary (a
carry either feeds a cell or goes to the final adder, never both).
