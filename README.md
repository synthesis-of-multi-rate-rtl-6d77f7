# Multi-rate arrays: convolution, decimation and Toeplitz factorization

A systolic array runs everything on one clock. The clock period has to fit
the slowest operation, usually a multiply-accumulate. Moving a word to the
neighbouring cell, or an addition, is much faster, but still costs a whole
period. A **multi-rate array (MRA)** gives each kind of operation its own
rate:

- the multiply-accumulate keeps a "basic time unit" of K fast ticks;
- data transfers take one fast tick, 1/K of a unit.

This makes the array up to K times faster without broadcasting across the
whole chip. A **bounded broadcast array (BBA)** is the same idea done with
wires: a value reaches a group of K neighbouring cells in one tick, and only
the hop between groups costs a register.

Multiple rates also let an array handle some recurrences that are not
uniform. The thesis this RTL is based on (A. Li, *Synthesis of Multi-Rate
Arrays from Directional Uniform Recurrence Equations*, M.S. thesis, Oregon
State University, 1990) calls them *directional uniform recurrence
equations*. In these, a dependence `p -> D p + d` has `D - I` of rank one,
so the dependence is uniform along one family of hyperplanes. The factor
`r = 1 + alpha^T mu` decides the treatment:

- **r > 1:** an MRA with clock ratio r (example: the decimation filter,
  where `x(2i-j)` gives r = 2);
- **r = -1:** fold the index space onto itself to get a uniform recurrence
  (example: the lower factor of a Toeplitz matrix).

This repository has synthesizable SystemVerilog for four arrays built on
these ideas. They sit side by side in one top module, `mra_top`:

| module      | what it computes                                   | idea shown                       |
|-------------|----------------------------------------------------|----------------------------------|
| `conv_mra`  | convolution y_i = sum_j w_j x_{i+j}                | MRA, clock ratio K = 3           |
| `conv_bba`  | the same convolution                               | bounded broadcast, groups of 3   |
| `decim_mra` | decimation filter y(i) = sum_j h(j) x(M i - j)     | MRA with ratio r = M = 2         |
| `toeplitz`  | YR = X for a symmetric Toeplitz R                  | uniform array plus folded array  |

Every module's file begins with a header giving its interface and its
cycle-exact timing. This README explains how the parts work together and
where the RTL departs from the thesis.

## One clock, several rates

The thesis assumes the slow clocks come from a fast one. Here that is
literal. Each design has a single clock `clk`, the **fast** clock. A slow
clock is either:

- a clock enable made inside the design (decimation filter), or
- a multi-cycle path: operands are captured on one edge, and the result is
  written K edges later (convolution MRA).

So every module is one synchronous clock domain with a synchronous,
active-high reset `rst`. To build real multi-clock hardware, the enables
mark where a divided clock would go. The multi-cycle paths then need
matching timing constraints.

## Convolution on a multi-rate array (`conv_mra`, `conv_mra_pe`)

The recurrence is written on an index grid (i = output, j = tap):

```
y(i,j) = y(i,j-1) + w(i,j) x(i,j);   w(i,j) = w(i-1,j);   x(i,j) = x(i+1,j-1)
```

Node (i,j) is scheduled at `j + i/K` basic units, and the grid is projected
along j. That gives one PE per output, with the output kept in its
accumulator. The register counts follow from the schedule:

- A weight moves one PE per `1/K` unit: **one fast register per PE**, left
  to right.
- A sample moves one PE per `1 - 1/K` unit: **K-1 fast registers per PE**,
  right to left. That is two registers for K = 3.
- Each PE does one multiply-accumulate per unit, one fast tick after its
  left neighbour.

```
 w ->[D]-+----->[D]-+----->[D]-+----->[D]-+
         |          |          |          |
      (acc0)     (acc1)     (acc2)     (acc3)      y_0 .. y_3 stay here
         |          |          |          |
  <-[D][D]-+<-[D][D]-+<-[D][D]-+<-[D][D]-+<- x
```

Inside a PE, a valid weight and the sample at the PE's x input are captured
together. The accumulator is written K ticks later. A concurrent assertion
checks the one rule the user must keep: valid weights come at least K
ticks apart.

Timing with T0 = tick of the first weight and k weights:

- samples x_e are presented at `T0 + K e + 1 - (NPE-1)(K-1)`, one every K
  ticks, the first ones before the first weight;
- `done` rises at `T0 + K k + NPE + 1`.

That is `(NPE-1) + K k` ticks of computation, the thesis' `T = (n-1)/K + k`
units for n outputs, plus an input and an output register. A systolic array
needs `n + 2k - 2` units. The testbench checks this tick count exactly.

## Convolution with bounded broadcast (`conv_bba`)

Here samples stay in the PEs (six of them, x_0..x_5). Weights enter at the
left, one per tick:

- PEs 0-2 see a weight in the tick it arrives;
- PEs 3-5 see it one tick later, through the group register.

Partial sums enter at the left as zero and move right. They pass one
register after each PE, plus **one more register at each group boundary**.
That extra register makes a partial sum meet, at PE p, the weight that came
exactly one tick after the one it met at PE p-1. So the partial sum that
meets w_0 at PE i collects `y_i = sum_j w_j x_{i+j}`.

The complete outputs leave the right end on consecutive ticks, highest
index first. Each partial sum carries two flags, "met w_0" and "met
w_{k-1}". Together they raise `y_valid` only for complete outputs. The array
has a single rate: every operation starts on a whole tick, as a BBA
requires.

## Decimation filter (`decim_mra`, `decim_mra_pe`)

`y(i) = sum_{j=0..N} h(j) x(M i - j)` keeps only every M-th output of an
FIR filter. A systolic array for it needs M separate sample paths, because
the sample index steps by M per output. The multi-rate version has one
sample bus and one output bus:

- PE j holds h(j). The column runs PE N at the top down to PE 0.
- Samples enter at the top, one per fast tick, and move down through M-1
  registers per PE (one register for M = 2).
- Partial sums start at zero at the top and move down one PE per **slow**
  tick (M fast ticks), each PE adding `h(j) * tap`.

Because samples run M times as fast as partial sums, PE j always sees
`x(c - j)` when the partial sum for output c passes. One output leaves
PE 0 every M samples. The phase of the slow enable makes c a multiple of M.
Samples before the first tick after reset count as zero. The latency from
x(M i) to y(i) is `M + N(M-1)` ticks.

## Toeplitz factorization (`toeplitz` = `toep_upper` + `toep_lower`)

For a symmetric Toeplitz R with first row t(0..N-1), the design finds a unit
lower-triangular Y and an upper-triangular X with **YR = X**. X is the upper
LU factor of R, and Y is the inverse of the lower one. The recurrences are
(i = row):

```
x(1,j) = w(1,j) = t(j-1)
z(i)   = -w(i-1,i) / x(i-1,i-1)
x(i,j) = x(i-1,j-1) + z(i) w(i-1,j)       j >= i
w(i,j) = w(i-1,j)   + z(i) x(i-1,j-1)     j >  i
y(1,1) = 1,  y(i,0) = 0
y(i,j) = y(i-1,j-1) + z(i) y(i-1,i-j)     j <= i
```

X and w never need Y. So the work splits into two arrays joined only by the
stream of multipliers z(i), which passes through one register.

### Upper array: X and z (`toep_upper`, `toep_upper_pe`)

This part is a uniform recurrence. Cell P owns diagonal `j - i = P` and
keeps x in place. In each row, w moves one cell toward the boundary, so the
two operands of the next division are always next to the boundary cell:

- x(i-1,i-1) is in cell 0;
- w(i-1,i) is in cell 1.

The boundary cell holds the only divider. z(i) goes from the boundary into
cell 0 and then moves right one cell per tick. Cell P therefore handles
row i at tick `2(i-2) + P` after the start. Each cell writes its new x into
a small memory, which ends up holding one diagonal of X.

### Lower array: Y by folding (`toep_lower`, `toep_lower_pe`)

`y(i-1, i-j)` reads the previous row **backwards**. Its dependence matrix is
`[1 0; 1 -1]`, which gives r = -1. No cell arrangement makes that a
nearest-neighbour link as it stands. Folding every row in the middle pairs
each entry with its mirror image. Cell D then carries:

- `a = y(i, i-D)`, the row read from the diagonal; it stays in the cell;
- `b = y(i, D+1)`, the row read from column 1; it moves right one cell per
  row.

Both values use the same node function:

```
a(i) = a(i-1) + z(i) * b_left(i-1)
b(i) = b_left(i-1) + z(i) * a(i-1)
```

This is a uniform, switch-free linear array; a lattice filter has the same
form. z moves right with b. Each cell keeps its previous b in one register
(`b_old`), because its right neighbour handles the same row one tick later.
The lower array accepts z tokens at any rate up to one per tick.

Timing: `x_done` comes 2N-2 ticks after `start`, and `done` 3N-2 ticks
after it.

## Number formats

The thesis gives no word lengths. This RTL uses:

- **Filters:** 16-bit signed samples and coefficients, 40-bit accumulators
  (parameters `DW`, `AW`). The arithmetic is exact integer arithmetic.
- **Toeplitz:** signed fixed point Q15.16 in 32 bits (`mra_pkg::TW`, `TF`).
  Products round toward minus infinity. Division truncates toward zero.
  A zero pivot gives z = 0 instead of a fault.

## Parameters of the top level

| parameter | default | meaning                                       |
|-----------|---------|-----------------------------------------------|
| `K`       | 3       | clock ratio of the convolution MRA            |
| `NPE`     | 4       | MRA PEs = outputs per convolution run         |
| `KB`      | 3       | broadcast group size of the BBA               |
| `NB`      | 6       | BBA PEs = samples held                        |
| `M`       | 2       | decimation factor                             |
| `NH`      | 4       | decimation filter order (taps h(0..NH))       |
| `NT`      | 7       | Toeplitz matrix order                         |
| `DW`,`AW` | 16, 40  | filter data and accumulator widths            |

The defaults are the sizes drawn in the thesis' figures. The example
convolution there has 7 outputs with 4 weights. It takes two runs of
`conv_mra` at the default size, or `NPE = 7`. On `conv_bba` it takes three
loads, or `NB = 10`.

## Simulating

Each testbench is self-checking. It prints
`TB_RESULT checks=<n> failures=<m>` and stops. For example, the end-to-end
test of the whole top at its default sizes:

```
verilator --binary --timing --assert -y rtl -y tb \
    rtl/mra_pkg.sv tb/toep_ref_pkg.sv tb/tb_mra_top.sv --top-module tb_mra_top
./obj_dir/Vtb_mra_top
```

Replace `tb_mra_top` with `tb_conv_mra`, `tb_conv_bba`, `tb_decim_mra`,
`tb_toep_upper`, `tb_toep_lower` or `tb_toeplitz` to test one block. Each
takes well under a second.

## What the tests establish

- **Convolution (both arrays) and decimation:** outputs are compared with
  direct evaluation of the sums on random 16-bit data. This covers 1 to 7
  weights on `conv_mra`, 1 to 6 on `conv_bba`, and a coefficient reload in
  the middle of a decimation stream.
  Completion ticks, output spacing and the number of multiply-accumulates
  are checked exactly.
- **Toeplitz:** X, Y and every z(i) are compared bit for bit with a
  row-by-row evaluation of the recurrences (`tb/toep_ref_pkg.sv`). The test
  also checks YR = X in real arithmetic to within 0.01, on random
  well-conditioned matrices and the identity. The top-level test adds a
  matrix with zero pivots.
- **Top:** `tb_mra_top` runs all four designs at once at the default sizes.
  It fails if a mechanism never happened. The mechanisms are: slow
  multiply-accumulates, weights crossing a broadcast group boundary,
  decimated outputs, coefficient reloads, z multipliers passed between the
  Toeplitz arrays, and zero pivots.

Not covered: rounding error growth for large or ill-conditioned Toeplitz
matrices, accumulator overflow (the widths are ample for the sizes tested),
and timing closure of the multi-cycle paths in a real netlist.

## Where this RTL departs from the thesis

- **One fast clock.** Slow clocks are enables or multi-cycle paths, not
  separate clock nets (see above).
- **Broadcast convolution keeps samples, not outputs, in the PEs.** The
  thesis derives both convolution arrays from one projection, with each PE
  owning one output. Its drawing of the broadcast array, however, holds
  one sample per PE and moves the partial sums, and `conv_bba` follows the
  drawing. So its run time is `k + (NPE-1)/K` ticks per load, plus I/O
  registers. The thesis' formula `ceil(n/K) + k - 1` is for the
  output-per-PE form.
- **Decimation for general M.** The thesis draws only M = 2. Using M-1
  sample registers per PE for other M is this design's generalisation. It
  was also simulated at M = 3.
- **Upper Toeplitz array.** The thesis names the cells (a divider cell, and
  an x/w cell with a memory) and two schedule options. The mapping here is
  this design's own: one cell per diagonal, w read from the neighbour's
  register rather than through extra delay stages, and row 1 loaded in
  parallel.
- **Lower Toeplitz array.** The fold follows the thesis' switch-free
  design: two values per cell, one node function, registers on z and on
  the moving value. Here z and b flow the same way and a stays put; in the
  thesis z and one value flow against the other.
- **The thesis' other lower-array design** uses switches between cells. It
  is not built.
- **Interfaces are this design's own.** That covers `clr`/`done`, the
  first/last flags, the parallel loads of coefficients, samples and t, and
  the z token format (`mra_pkg::ztok_t`: valid, row, value).
- **Not built:**
  - the single-rate baselines the thesis compares against (systolic and
    full-broadcast convolution, systolic decimation filter);
  - the two-unit cell of its introductory recurrence example, whose
    functions are left unspecified.

## Files

- `rtl/mra_pkg.sv`: Toeplitz fixed-point type and arithmetic, z token.
- `rtl/conv_mra.sv`, `rtl/conv_mra_pe.sv`: multi-rate convolution.
- `rtl/conv_bba.sv`: bounded broadcast convolution.
- `rtl/decim_mra.sv`, `rtl/decim_mra_pe.sv`: multi-rate decimation filter.
- `rtl/toeplitz.sv`, `rtl/toep_upper.sv`, `rtl/toep_upper_pe.sv`,
  `rtl/toep_lower.sv`, `rtl/toep_lower_pe.sv`: Toeplitz factorization.
- `rtl/mra_top.sv`: all four side by side.
- `tb/tb_*.sv`: one testbench per block plus `tb_mra_top`.
- `tb/toep_ref_pkg.sv`: Toeplitz reference model and test matrices.
