# Parallel multipliers from horizontal compressors

An n x n array multiplier spends its time in two ways. Carries ripple
*horizontally*, from weight to weight. Partial sums travel *vertically*,
through the cells that add bits of the same weight. A classical carry-save
array pays about n cell delays for each, so about 2n in all. The
multipliers here, after L. Ciminiera's paper "Parallel Multipliers Based on
Horizontal Compressors", cut both to about n/2 and reach a delay of about
n cells:

* **Horizontal**: the basic cell is a *2FA*, a two-bit full adder. It adds
  two 2-bit numbers and a carry-in and sends its carry-out two positions to
  the left, so a carry crosses 2n bit positions in n cells. This is a
  "horizontal compressor": many weights, few bits per weight.
* **Vertical**: the partial products `q[i][j] = a[i] & b[j]` are split into
  two triangles. The *upper* one holds j >= i and the *lower* one j < i. Each
  triangle is at most n/2 bits tall in any column, so each is reduced by its
  own shallow array (an "n x n/2 multiplier"). The two arrays work in
  parallel, and a final adder sums their results.

All the logic is combinational: there is no clock, reset or handshake.
Operands go in and the product comes out after the array delay.

## The four multipliers

`hcm_top` puts all four on shared operands `a`, `b` (N bits, default 8) and
brings out four 2N-bit products:

| output   | module, parameters                  | operands          | halves                  | final adder                         |
|----------|-------------------------------------|-------------------|-------------------------|-------------------------------------|
| `p_fig1` | `hcm_mult1 SIGNED=0`                | unsigned          | 2FA arrays (`hcm_half2`) | one row of N-1 2FAs                 |
| `p_fig2` | `hcm_mult1 SIGNED=1`                | two's complement  | 2FA arrays              | one row of N-1 2FAs                 |
| `p_fig3` | `hcm_mult2 FINAL=0`                 | two's complement  | 1FA carry-save (`hcm_half1`) | three rows of 2FAs in a tree  |
| `p_fig4` | `hcm_mult2 FINAL=1`                 | two's complement  | 1FA carry-save          | one row of N-1 eq.(8) cells         |

The names refer to the paper's figures. The paper offers these as
alternatives. Putting them side by side in one top is this design's choice,
made so they can be compared and tested together.

## The first multiplier: 2FA half arrays

This is the part that takes the most explaining. It is in `hcm_half2`, with
the wiring rules in `hcm_pkg`.

**Which bits go where.** For the two halves:

* `q[0][0]` is `p0` directly.
* `q[0][1]` and `q[1][0]` go into a half adder, drawn as one AND and one
  EX-OR. Its sum is `p1` and its carry enters the final adder.
* The upper half takes every other `q[i][j]` with j >= i, except
  `q[n-1][n-1]`.
* The lower half takes every other `q[i][j]` with j < i, plus
  `q[n-1][n-1]`. The paper's drawings put that bit on the lower side.

**Digit columns.** A 2FA covers two adjacent weights, so each half is
organised in columns of two weights. In the upper half, column d covers
weights 2d and 2d+1. In the lower half it covers 2d+1 and 2d+2: the lower
half is the mirror of the upper one, shifted by one position. Inside a
column:

* the top cell adds the first two partial-product rows that reach the
  column (in the upper half these are rows 0 and 1, i.e. `q[0][*]` and
  `q[1][*]`);
* every cell below adds the 2-bit sum from the cell above and one more row;
* the bottom cell's two sum bits are the half's result at those two
  weights. Each half therefore yields a single binary number, one bit per
  weight.

**Carry chains.** The columns are aligned at the bottom, next to the final
adder. Each cell takes its carry-in from the cell at the same height in the
column to its right, so every level of cells forms a ripple-carry chain.
Columns grow by one cell per digit up to the middle, so the top cell of
each growing column gets no carry (its carry input is 0, or takes a data
bit). As a result, the result bits of digit column d are ready after d cell
delays. That is exactly when the final adder's carry reaches digit d. The
halves and the final adder therefore overlap, and the whole multiplier
settles in n cell delays.

`hcm_pkg::mult1_depth` counts cell delays for this exact wiring. It gives
n for n = 4, 8, 12 and 16, signed and unsigned, and the testbench checks
that.

**The left edge.** Past the middle, the columns shrink again. The topmost
carries of a column then find no cell at their height in the next column.
They join that column's low-weight data bits, and a carry input with no
incoming carry takes a data bit. The paper's drawing does not make this
edge legible, so this part is this design's own. It costs a few cells: see
"Departures" below.

**Final adder.** Cell k (k = 1..n-1) adds bits 2k and 2k+1 of the upper
result, the same bits of the lower result, and the carry of cell k-1. It
yields `p[2k+1:2k]`. Its first cell takes the half adder's carry and, via
the lower result, `q[2][0]`.

**Two's complement** (`SIGNED = 1`). `hcm_ppgen` forms the partial products
in modified form:

* `a[n-1] & ~b[j]` in the sign row;
* `~a[i] & b[n-1]` in the sign column;
* `~a[n-1] & ~b[n-1]` at the corner.

The product then equals the sum of these bits plus
`(a[n-1] + b[n-1]) * 2^(n-1) + 3 * 2^(2n-2)`, modulo 2^(2n). The first term
is added through a half adder on the two sign bits: its EX-OR enters the
lower half at weight n-1 and its AND enters the upper half at weight n. The
constant is added as a 1 at weight 2n-2 (upper half) and a 1 at weight 2n-1
(lower half). `tb_hcm_ppgen` checks this identity for every pair of 6-bit
operands.

## The second multiplier: carry-save halves

`hcm_mult2` splits the partial products the same way. Each half, however,
is a carry-save array of ordinary one-bit full adders (`hcm_half1`). Each
weight column is a chain of full adders. Its inputs are the column's
partial products followed by all carries from the column to its right, and
no carry travels along a level. Each half ends in two numbers and is about
n/2 cells deep. That placement of the adders is this design's own; the
paper gives only the carry-save principle.

The final adder must then add four numbers.

* `FINAL = 0` (Fig. 3): three rows of 2FA ripple-carry adders (`hcm_rca2`)
  in a tree. Upper sum + upper carry and lower sum + lower carry are added
  in parallel, then those two results are added.
* `FINAL = 1` (Fig. 4): one row of n-1 cells of the paper's eq. (8)
  (`hcm_cell8`). Each cell computes `s = 2*(x0+..+x4) + (y0+..+y4)` into
  four bits. The cell at weights (2k, 2k+1) takes:
  * on its weight-1 inputs, the four bits of weight 2k plus `s2` of the cell
    to its right;
  * on its weight-2 inputs, the four bits of weight 2k+1 plus `s3` of that
    cell.

  It delivers `p[2k+1:2k]` on `s1:s0`. The first cell gets the p1 half
  adder's carry on a weight-1 input.

## Cells

| module      | function                                                    |
|-------------|-------------------------------------------------------------|
| `hcm_fa2`   | m-bit full adder, `cout*2^M + s = a + b + cin`; the 2FA at M = 2 |
| `hcm_fa1`   | one-bit full adder                                          |
| `hcm_ha`    | half adder (AND carry, EX-OR sum)                           |
| `hcm_cell8` | eq. (8) counter: five weight-2 and five weight-1 bits into 4 bits |
| `hcm_ppgen` | the n^2 partial-product AND gates, plain or two's complement form |
| `hcm_rca2`  | ripple-carry row of D 2FAs                                  |

The paper gives these cells as arithmetic functions and costs them as
look-up tables. Here their insides are plain gates or additions left to
synthesis.

## Departures from the paper

* **Cell counts** of this wiring, against the paper's formulas:

  | array                     | this RTL at n = 8                  | paper at n = 8      |
  |---------------------------|------------------------------------|---------------------|
  | first multiplier, unsigned | 34 2FA + 1 HA                     | n^2/2 - 1 = 31 2FA + 1 HA |
  | first multiplier, signed   | 36 2FA + 2 HA                     | 31 2FA + 2 HA       |
  | second multiplier halves   | 25 1FA                            | (n-3)^2 - 1 = 24    |
  | Fig. 3 final adder         | 3(n-1) = 21 2FA                   | 3n - 5 = 19         |
  | Fig. 4 final adder         | n - 1 = 7 cells                   | n - 1 = 7           |

  The extra 2FAs of the first multiplier come from how the carry chains end
  at the left edge of the halves. The extra final-adder cells of Fig. 3
  come from rows that span all digits rather than a trimmed range. The
  products are exact in every case.
* **Delay.** For the first multiplier the count of cell delays is n, as the
  paper states. For the second multiplier the same count gives n/2 for each
  carry-save half, but n + 1 (Fig. 3) and n (Fig. 4) for the whole array.
  The paper states n and n - 1. The count treats every cell as one delay
  and the AND and EX-OR gates as free.
* **`q[n-1][n-1]`** is added in the lower half, where the drawings put it,
  rather than in the upper triangle of the split.
* **Size.** The arrays are generic in N. The paper states its scheme for n
  a multiple of 4. The RTL was simulated at N = 4, 8, 12 and 16.
* The paper also sketches applying the split again inside each half, with
  4FA cells in the final additions, to approach n/2 cell delays. It gives no
  structure for that, so it is not built. `hcm_fa2` with `M = 4` is the 4FA
  cell.

## Simulating

Every testbench in `tb/` is self-checking and prints
`TB_RESULT checks=<n> failures=<n>`. With Verilator 5, from the folder that
holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal rtl/hcm_pkg.sv rtl/*.sv \
    tb/tb_hcm_top.sv --top-module tb_hcm_top -o sim
./obj_dir/sim
```

(`hcm_pkg.sv` must come first; listing it twice only draws a warning.)

* `tb_hcm_top` applies all 65536 operand pairs to the four multipliers at
  the default N = 8. It compares each product with `a*b` (unsigned) or
  `$signed(a)*$signed(b)`, and checks that the sign corrections and the p1
  half-adder carry were each exercised. It takes a few seconds.
* `tb_hcm_mult1` and `tb_hcm_mult2` do the same exhaustively at N = 4 and
  8, and with random operands at N = 12 and 16. `tb_hcm_mult1` also checks
  the cell-delay count against n.
* `tb_hcm_half2` and `tb_hcm_half1` check each half on its own: the sum of
  its outputs against the sum of the bits it is meant to add.
* The cell testbenches are exhaustive.

To change the operand width, set `N` on `hcm_top` or on a single
multiplier. The wiring is computed at elaboration by the functions in
`hcm_pkg`, so nothing else needs editing. To change which bit goes to which
half, edit `hcm_pkg::half_bit`. The testbenches of the halves then show
whether the change still adds every bit exactly once.
