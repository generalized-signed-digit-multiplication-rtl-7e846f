# Generalized signed-digit array multipliers

A generalized signed-digit (GSD) number has a fixed radix `R` and digits taken
from a set `[-ALPHA, BETA]` that holds more than `R` values
(`ALPHA + BETA + 1 > R`). Because of that redundancy a digit position can
absorb a bounded transfer from the position below without passing anything
further up. Additions then take constant time whatever the word length, and
so does each accumulation step of a multiplier. This RTL builds on that idea.
It holds a family of `N`-by-`N`-digit multipliers whose delay grows only
linearly in `N`, with no carry ripple anywhere in them:

| unit | algorithm | array | products | latency (cycles) | result digit set |
|------|-----------|-------|----------|------------------|------------------|
| `cf_semisys_2d` | carry-free | 2-D, row-parallel (x broadcast) | 1 per cycle | N+1 | partial-product set |
| `cf_linear` | carry-free | 1-D, one cell per digit position | 1 per N cycles | N+1 | partial-product set |
| `cf_systolic_2d` | carry-free | 2-D, systolic (no broadcast) | 1 per cycle | 4N | partial-product set |
| `et_semisys_2d` | estimate-transfer | 2-D, row-parallel | 1 per cycle | 2N+1 | operand set |
| `tp_semisys_2d` | two-phase transfer | 2-D, row-parallel | 1 per cycle | 2N+1 | operand set |
| `pt_semisys_2d` | parallel transfer | 2-D, row-parallel | 1 per cycle | N+1 | partial-product set |
| `lc_systolic_2d` | estimate-transfer (`ALG=0`) or two-phase (`ALG=1`) | 2-D, systolic | 1 per cycle | 6N | operand set |
| `pt_systolic_2d` | parallel transfer | 2-D, systolic | 1 per cycle | 5N | partial-product set |
| `lc_linear` | estimate-transfer (`ALG=0`) or two-phase (`ALG=1`) | 1-D, one cell per digit position | 1 per 2N cycles | 2N+1 | operand set |
| `tp_sparse_semisys_2d` | two-phase transfer, `M` product terms per transfer stage | 2-D, row-parallel | 1 per cycle | 2*ceil(N/M)+1 | operand set |
| `pt_sparse_semisys_2d` | parallel transfer, `M` product terms per transfer | 2-D, row-parallel | 1 per cycle | ceil(N/M)+1 | partial-product set |
| `gsd_correct` | carry-free digit-set conversion | one row | 1 per cycle | 1 | operand set |

`gsd_mult_top` places all of them side by side on shared operands. Where a
unit's result is in the larger partial-product digit set, a `gsd_correct`
stage follows it.

The defaults are `N = 4`, radix 4 (`LOG2R = 2`) and digits `[-3, 3]`. That is
the maximally redundant radix-4 set, and it is the one set on which all four
algorithms work with cheap parameters.

## Numbers on the wires

* A digit is a two's-complement field just wide enough for its digit set.
  Operand digits in `[-3,3]` take 3 bits. Partial-product digits in `[-5,4]`
  take 4 bits.
* A word is a packed array `logic [N-1:0][W-1:0]`. Element 0 is the least
  significant digit. The value is `sum(d[j] * R**j)`.
* Every product word has `2N + GUARD` positions. The guard positions are
  explained below.
* In every unit, reset (`rst_n`, active low, asynchronous) clears only the
  valid and control state. Data registers are not reset.

## The accumulation step and its split

All algorithms are serial-parallel multiplication: for `i = N-1 .. 0`, the
partial product `z` gets `x_i * y` added at positions `i .. i+N-1`. What
differs is how each position turns its sum back into a digit. The basic
operation, done by every node, is the **split** of a position sum `p` into
`p = R*t + w`. It works the way a hardware designer would build it (see
`gsd_pkg::split_digit`):

1. Take `t` from the bits of `p` above the lowest `LOG2R` bits (an
   arithmetic shift), and `w` from the lowest `LOG2R` bits (`0 .. R-1`).
2. Compare `w` with an upper bound `WU`. If `w > WU`, subtract `R` from `w`
   and add 1 to `t`.

So `w` always lands in the window `[WU-R+1, WU]`. `t` goes one position up.
The choice of `WU` is a parameter of each unit.

### Carry-free (`cf_cell`)

Per step, each position computes `z = w + t_in` (the remainder it kept plus
the transfer from below), then `p = z + x_i*y_(j-i)`, then splits `p`. For
this to close on itself, the partial-product set must be larger than the
operand set. The transfers range over `[-TNEG, TPOS]` with
`TNEG = ceil(ALPHA*BETA/(R-1))` and `TPOS = ceil(max(ALPHA², BETA²)/(R-1))`.
The partial-product set is then `[WU-R+1-TNEG, WU+TPOS]`, which holds
`R + TNEG + TPOS` digits, the minimum possible. With the defaults and `WU = 1`
this gives `t ∈ [-3,3]`, `w ∈ [-2,1]` and `z ∈ [-5,4]`. A "circle" node adds
a product term. A "square" node (a position outside `i .. i+N-1`) only splits.
Both are the same circuit with `mul_en` tied differently.

### Estimate-transfer (`et_semisys_2d`)

This algorithm keeps the partial product in the operand set, so no correction
is needed afterwards. It gets there by sending a small **estimate** of each
transfer one row before the transfer itself. With the defaults the estimate
is binary, and the derivation is as follows:

* Since `z = w + t_in` must stay in `[-3,3]` and `w` needs a window of `R = 4`
  values, an incoming transfer can only range over 4 consecutive values. The
  two subranges are `[-3,0]` (estimate 1) and `[0,3]` (estimate 2).
* Estimate 1 means `w ∈ [0,3]` (`WL1 = 0`). Estimate 2 means `w ∈ [-3,0]`
  (`WL2 = -3`).
* A position sum `p ∈ [-12,12]` must produce a transfer inside the subrange
  it announces, whichever window the position uses. This holds exactly when
  the estimate is 2 for `p >= 0` and 1 for `p < 0`. So the threshold is
  `T = 0`, and the estimate costs one sign test.

The circle row computes `p` and the estimate and registers both. The square
row looks at the estimate arriving from the position below, picks its window,
and forms `t = floor((p - WL)/R)` and `w = p - R*t`.

### Two-phase transfer (`tp_semisys_2d`)

This is the carry-free split done twice per step. The first split is
`p = R*t + w` with `WU1`. Then `q = w + t_in`, split again as `q = R*u + v`
with `WU2`, and `z = v + u_in`. The second pass squeezes the digit back into
the operand set. With `WU1 = WU2 = 1`: `t ∈ [-3,3]`, `q ∈ [-5,4]`,
`u ∈ [-1,1]` and `z ∈ [-3,2]`.

### Parallel transfer (`pt_semisys_2d`)

Here one split produces two transfers: `p = R²*t + R*u + w`. `t`, `u` and `w`
start as the upper, middle and lower bit fields of `p`. The middle and lower
fields are compared with `UU` and `WU` at the same time, and all three are
adjusted in parallel. The middle digit absorbs the lower field's adjustment,
so `u` can reach `UU+1`. Each position adds its own `w`, the `u` from one
position below and the `t` from two positions below. An exhaustive range
analysis of the defaults (`WU = UU = 1`) gives the partial-product set
`[-5,4]`. That is one digit more than the theoretical minimum of `2R+1`,
which is the cost of the parallel adjustment.

### Sparse transfer (`pt_sparse_semisys_2d`)

The parallel-transfer split can take in a much larger sum than one product
term needs. The sparse variant uses that: each row adds `M` product terms
(`x_i*y_(j-i)` for `M` consecutive multiplier digits) to a position before it
splits once. An `N`-digit multiplication then needs `ceil(N/M)` transfer rows
instead of `N`. The last row takes fewer terms when `M` does not divide `N`.

The partial-product set must stay closed under a row of `M` terms, and
`[ZL, ZH]` is a parameter, not derived. It was found by iterating the range
of `w + u + t` over all sums until it stopped growing. With the defaults
(`M = 2`, `WU = UU = 1`) the set is `[-5,4]`, the same as for one term per
row, so the same correction stage follows. Other points that were checked:

| digits | `M` | `WU`, `UU` | `[ZL, ZH]` |
|--------|-----|------------|------------|
| `[-3,3]` | 2 | 1, 1 | `[-5,4]` |
| `[-3,3]` | 3 | 1, 0 | `[-7,4]` |
| `[-2,2]` | 4 | 1, 0 | `[-6,3]` |

The split bounds must also leave small sums where they are. With `WU = 0`,
for example, a sum of 1 becomes `-3` plus a transfer of 1, and that transfer
climbs one position per row without end. `WU` must therefore be at least 1
and at most `R-2`.

The two-phase method has a sparse variant too (`tp_sparse_semisys_2d`). Its
circle rows add `M` product terms each, and the square rows are unchanged.
With `M = 2` and split bounds `WU1 = 1`, `WU2 = 2`, the ranges are
`t ∈ [-5,5]`, `u ∈ [-2,1]` and `v ∈ [-1,2]`, so `z = v + u` stays in `[-3,3]`
and no correction is needed. Note that `WU2` differs from the value used in
`tp_semisys_2d`: with `WU2 = 1` the digits would reach `-4`. In radix 4 with
`[-3,3]`, no choice of bounds works for `M = 3`.

### Correction (`gsd_correct`)

This stage runs once per product. It splits each digit `z = R*c + s` with
`s ∈ [CWU-R+1, CWU]` and outputs `s_j + c_(j-1)`, plus one extra top digit.
For `[-5,4] → [-3,3]` in radix 4, `c ∈ [-1,1]` and the output is in
`[-3,2]`. One carry-free step is enough only when the operand set has enough
redundancy. An elaboration-time `$error` rejects parameter sets where one step
cannot convert.

## Guard positions

The algorithm as stated produces `2N` digits. In simulation, the transfer
leaving position `2N-1` turned out not always to be zero. Dropping it leaves
the result correct only modulo `R^(2N)`. Each array therefore carries
`GUARD` extra positions at the top:

* One guard position is enough for the carry-free, two-phase,
  parallel-transfer and both sparse-transfer arrays in radix 4 and 8. With it, no transfer ever left
  the top in any test.
* The estimate-transfer array needs two (`GUARD = 2`). With estimate 2, a
  sum of 1..3 sends up a transfer of +1, so a +1 can climb one position per
  step at the top of the word.
* Radix 2 is not supported. There, a +1 (or a −1) moves up one position per
  step, and a fixed small guard cannot catch it.

Outputs are therefore `2N+1` digits wide (`2N+2` for `et`). A correction
stage adds one more digit.

## The arrays

### Row-parallel ("semisystolic") 2-D arrays

These are `cf_semisys_2d`, `et_semisys_2d`, `tp_semisys_2d` and
`pt_semisys_2d`. Row `k` performs step `i = N-1-k` at every digit position in
the same cycle. Multiplier digit `x_i` is broadcast along the row. A register
stage follows every row:

* remainders go straight down;
* transfers go down and one position to the more significant side (two
  positions for the `R²` transfer of `pt`);
* estimates go down and one position up.

The two limited-carry algorithms use two rows per step (circle, then square),
which makes their latency `2N+1`. A final row performs only `z = w + t`
(or `v + u`). Operand words enter at the top and travel down with the rows, so
a new multiplication can start every cycle. Latency counts from the cycle
with `in_valid` high to the cycle with `out_valid` high.

### Linear array (`cf_linear`)

This array has one cell per digit position, and every cell works on the same
step. `x_i` is broadcast. The multiplicand sits in a shift register that
moves one cell towards the least significant end per step, so cell `j` always
holds `y_(j-i)`. Each cell keeps its own remainder. Transfers go to the
more significant neighbour through a register.

`y` is loaded in parallel in the start cycle, and the first step runs in that
cycle. The last cycle (the final addition) overlaps the start of the next
multiplication. The handshake:

* `in_ready` is high when idle, and again exactly `N` cycles after a start;
* the product appears `N+1` cycles after its start.

### Limited-carry linear array (`lc_linear`)

This is the same construction for the two limited-carry algorithms. Each step
now needs two cycles in every cell: a circle cycle that adds the product term
and a square cycle that forms the transfer. Each cell holds the two values
that the 2-D array passes down, the one kept at the position and the one read
by the next position up. The multiplicand shifts after each square cycle.
`in_ready` comes back `2N` cycles after a start. The product appears `2N+1`
cycles after the start, in the operand digit set.

### Systolic 2-D array (`cf_systolic_2d`)

The node graph is the one of `cf_semisys_2d`, but node `(k, j)` is computed
in cycle `c(k,j) = 2k + (2N-1-j)`. Rows are two cycles apart, and the more
significant positions go first. No two nodes of a row are active in the same
cycle, so `x_i` passes from node to node instead of being broadcast. Every
arc gets as many registers as its two ends differ in time:

| arc | from → to | registers |
|-----|-----------|-----------|
| x | (k, j+1) → (k, j) | 1 |
| transfer t | (k-1, j-1) → (k, j) | 1 |
| remainder w | (k-1, j) → (k, j) | 2 |
| y | (k-1, j+1) → (k, j) | 3 |

The most significant result digit is ready in cycle `2N` and the least
significant one `2N-1` cycles later. The guard position (no product term) is
computed in the same cycle as position `2N-1`, so the latency stays `4N`.
Input skew and output deskew registers (`gsd_delay`) give a word-parallel
interface: `z` appears `4N` cycles after `in_valid`, one product per cycle.
The clock can be faster than that of the row-parallel arrays, because no wire
is longer than a neighbour link.

### Systolic arrays for the other algorithms

`lc_systolic_2d` and `pt_systolic_2d` apply the same construction to the
node graphs of the limited-carry and parallel-transfer arrays.

`lc_systolic_2d` has `2N` rows (a circle row and a square row per step) plus
the final row. Node `(r, j)` runs in cycle `2r + (2N-1-j)`. Each node passes
two values down. One stays at its position: `p` or `w` for estimate-transfer,
`w` or `v` for two-phase. The other goes one position up: the estimate `e` or
transfer `t` for estimate-transfer, `t` or `u` for two-phase. `ALG` selects
the node functions; they are those of `et_semisys_2d` and `tp_semisys_2d`.
The multiplicand digit is used only in circle rows, so it skips a row.

| arc | from → to | registers |
|-----|-----------|-----------|
| x | (r, j+1) → (r, j) | 1 |
| value to the next position | (r-1, j-1) → (r, j) | 1 |
| value straight down | (r-1, j) → (r, j) | 2 |
| y | (r-2, j+1) → (r, j) | 5 |

The lower-left result node is reached in cycle `4N`, and the lower-right one
`2N-1` cycles later, so the latency is `6N`.

`pt_systolic_2d` has to wait longer between rows. The `R²` transfer `t` goes
two positions up, and it must still arrive at least one cycle before use.
This needs three cycles per row: node `(k, j)` runs in cycle
`3k + (2N-1-j)`, and the latency is `5N`.

| arc | from → to | registers |
|-----|-----------|-----------|
| x | (k, j+1) → (k, j) | 1 |
| transfer t (R²) | (k-1, j-2) → (k, j) | 1 |
| transfer u (R) | (k-1, j-1) → (k, j) | 2 |
| remainder w | (k-1, j) → (k, j) | 3 |
| y | (k-1, j+1) → (k, j) | 4 |

Both arrays have skew and deskew registers at their edges, as
`cf_systolic_2d` does.

## Top level (`gsd_mult_top`)

| port | dir | meaning |
|------|-----|---------|
| `clk`, `rst_n` | in | clock, asynchronous active-low reset |
| `in_valid`, `x`, `y` | in | one multiplication for all pipelined arrays (N digits each, 3 bits per digit) |
| `lin_in_valid` / `lin_in_ready` | in / out | start the linear array on the same `x`, `y` |
| `lcl_in_valid` / `lcl_in_ready` | in / out | start both limited-carry linear arrays on the same `x`, `y` |
| `cf_valid`, `cf_z` | out | carry-free row-parallel, corrected, 2N+2 digits, latency N+2 |
| `sys_valid`, `sys_z` | out | carry-free systolic, corrected, 2N+2 digits, latency 4N+1 |
| `lin_valid`, `lin_z` | out | carry-free linear, corrected, 2N+2 digits, latency N+2 after start |
| `et_valid`, `et_z` | out | estimate-transfer, 2N+2 digits, latency 2N+1 |
| `tp_valid`, `tp_z` | out | two-phase, 2N+1 digits, latency 2N+1 |
| `pt_valid`, `pt_z` | out | parallel-transfer, corrected, 2N+2 digits, latency N+2 |
| `ets_valid`, `ets_z` | out | estimate-transfer systolic, 2N+2 digits, latency 6N |
| `tps_valid`, `tps_z` | out | two-phase systolic, 2N+1 digits, latency 6N |
| `pts_valid`, `pts_z` | out | parallel-transfer systolic, corrected, 2N+2 digits, latency 5N+1 |
| `spt_valid`, `spt_z` | out | sparse-transfer (`SP_M = 2`), corrected, 2N+2 digits, latency ceil(N/2)+2 |
| `tsp_valid`, `tsp_z` | out | sparse-transfer two-phase (`SP_M = 2`, `TS_WU2 = 2`), 2N+1 digits, latency 2*ceil(N/2)+1 |
| `etl_valid`, `etl_z` | out | estimate-transfer linear, 2N+2 digits, latency 2N+1 after start |
| `tpl_valid`, `tpl_z` | out | two-phase linear, 2N+1 digits, latency 2N+1 after start |

All outputs have digits in `[-3,3]`.

## Changing the number system

`N` can be changed freely (`N >= 2`). `LOG2R`, `ALPHA` and `BETA` are
parameters everywhere, and all field widths follow from them through
`gsd_pkg`. The algorithm-specific constants do not follow automatically:
`WU` values, the estimate threshold and windows, the `pt` digit set and the
correction bound were worked out for radix 4 with `[-3,3]`. For another
digit set:

* carry-free: any `WU` in `[0, R-1]` gives a valid multiplier;
* `gsd_correct` and `tp_semisys_2d` check their ranges at elaboration;
* the estimate-transfer windows and the `pt` and sparse-transfer sets must
  be re-derived as above,
  and then confirmed with the testbenches, which check the digit set of every
  result.

The testbenches also run radix 4 with `[-2,2]` and radix 8 with `[-4,5]`
(carry-free), radix 8 with `[-5,5]` (two-phase, in both array types), and
the sparse-transfer points in the table above.

## Verification

Each unit has a self-checking testbench in `tb/`. Every product is compared
with the integer product of the operand values. Every digit is checked
against the unit's digit set, and every latency is checked exactly.

* `tb_cf_cell`: exhaustive over every input combination of the node.
* `tb_gsd_correct`: extreme and random words.
* `tb_cf_semisys_2d`, `tb_tp_semisys_2d`, `tb_et_semisys_2d`,
  `tb_pt_semisys_2d`, `tb_cf_systolic_2d`, `tb_lc_systolic_2d`,
  `tb_pt_systolic_2d`, `tb_pt_sparse_semisys_2d`, `tb_tp_sparse_semisys_2d`:
  these use the shared driver
  `mult2d_run`. Each runs 2000 to 3000 products per configuration, issued
  mostly back to back, with the all-maximum and all-minimum operands first.
* `tb_cf_linear`, `tb_lc_linear` (with its driver `lin_run`): also check
  when `in_ready` is high and count starts that overlap the final cycle.
* `tb_gsd_mult_top`: runs all thirteen outputs on 4000 operand pairs at the default
  parameters. It also checks that every mechanism occurs: back-to-back
  issue, linear-array stalls and overlapped starts, nonzero guard digits,
  nonzero correction transfers, both estimate values, nonzero second-phase
  and `R²` transfers.

Each testbench prints `TB_RESULT checks=<n> failures=<n>` and has a watchdog.
To run one with Verilator:

```
verilator --binary --timing -Irtl -Itb rtl/gsd_pkg.sv tb/tb_gsd_mult_top.sv \
          --top-module tb_gsd_mult_top -Mdir obj -o sim && obj/sim
```

The Verilator lint warnings that remain name bits nobody reads. These are
the last row's copy of the operand words, the transfer out of the top guard
position, `y` outputs of the last systolic row, and the clock input of a
zero-length delay line.

## Not built

* Systolic schedules for the sparse-transfer variant.
* Linear arrays from the systolic schedules. Both linear arrays here come
  from the row-parallel schedules.
* Radix 2. Every array here needs radix 4 or more (see the guard positions).
  So the minimally redundant radix-2 sparse-transfer case, with four terms
  per transfer, is not available.
* Time and area figures. The arrays are not characterised for clock period
  or size.
