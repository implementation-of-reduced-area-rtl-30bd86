# Reusable 2-D integer DCT with a counter-driven transposition buffer

This is synthesizable SystemVerilog for the forward 2-D integer DCT of HEVC. It handles
4x4, 8x8, 16x16 and 32x32 blocks. The design rests on two ideas:

* **One reusable 1-D unit for every length.** A 32-point integer DCT unit is built so that
  the same hardware can also compute two 16-point, four 8-point or eight 4-point
  transforms. Every combinational pass yields 32 coefficients, whatever the transform
  length.
* **A transposition buffer with no enables.** The buffer between the row and column
  transforms is a set of shifting register lines and output multiplexers. A single up
  counter sequences it. There are no externally driven write enables and no clock-gating
  AND gates.

The 2-D transform is the usual row/column decomposition:

```
in_row ──► reusable_dct ──► reorder ──► scale ──► transpose_buffer ──► reusable_dct ──► reorder ──► scale ──► reg ──► out_col
           (rows, 32-pt)               (16 b)     (32 x 32 x 16 b)     (columns, 32-pt)           (16 b)
```

## The reusable 1-D unit (`reusable_dct`)

### Even/odd decomposition

An N-point DCT splits into two halves:

* The **even** coefficients y(0), y(2), … are the N/2-point DCT of the butterfly sums
  a(i) = x(i) + x(N-1-i).
* The **odd** coefficients y(1), y(3), … are fixed linear combinations of the differences
  b(i) = x(i) − x(N-1-i).

So one level of the unit has these parts:

| part | module | job |
|---|---|---|
| input adder unit | `iau` | forms a(i) and b(i) |
| shift-add unit | `sau` | multiplies each b(i) by the odd-row basis constants, one shifted copy of b(i) per set bit of the constant (no multipliers) |
| output adder unit | `oau` | sums those products into y(1), y(3), …, y(N-1) |
| upper half-unit | `reusable_dct #(N/2)` | even coefficients |

The half-unit is itself a reusable unit, so the structure recurses: 32 → 16 → 8 → 4. The
recursion ends at `dct4`, a plain 4-point transform:

* even part: 64(a0 ± a1)
* odd part: 83·b0 + 36·b1 and 36·b0 − 83·b1

The basis values are the HEVC integers: 64, 83/36, 89/75/50/18, 90/87/80/70/57/43/25/9 and
the 16 odd values of the 32-point matrix. `dct_pkg::coef(N, k, n)` derives every entry
C_N[k][n]. It folds the angle (2n+1)·k·π/(2N) into the first quadrant and looks it up in
one 33-entry table of 64·√2·cos(mπ/64) as HEVC rounds it. The SAU constants are elaborated
from this function, so no coefficient table appears as data.

### Split mode

Each level also has a second N/2-point unit (the *lower* unit), two rows of AND gates and
two multiplexer groups. A small control unit (`dct_ctrl`) sets them from the requested
length L:

| | L ≥ N (full length) | L < N (split) |
|---|---|---|
| 1st-stage AND gates (in front of the IAU) | pass | zero |
| input mux (to the upper unit) | sums a(i) | x(0 … N/2-1) |
| 2nd-stage AND gates (in front of the lower unit) | zero | pass x(N/2 … N-1) |
| output mux (to the odd lines) | OAU | lower unit |

When the level is split, each half transforms its own half of the input. The idle half's
inputs are forced to zero so that it does not toggle. Because every level decides this for
itself, a 32-point unit at L = 8 ends up as four 8-point transforms of x[0..7], x[8..15],
x[16..23] and x[24..31].

### Output line order (the part that needs care)

At every level, the upper unit drives the even output lines and the output mux drives the
odd ones. In split mode this interleaves the blocks' results. Coefficient j of block B
comes out on line

```
line = j · (N/L) + bitreverse_{log2(N/L)}(B)
```

For example, at N = 32 and L = 8, block 1 (x[8..15]) has its DC term on line 2 and block 2
(x[16..23]) on line 1. This is `dct_pkg::bus_pos`.

`dct_reorder` undoes the permutation. It sits behind each of the two units in
`dct2d_top`, so from there on lane B·L + j holds coefficient j of block B. Reading the
unit's own outputs directly means applying the formula above.

Widths: a unit with W-bit inputs has W + log2(N) + 7 bit outputs. The row sum of the
absolute basis values is below 2^(log2(N)+7), so the unit never overflows and never
rounds.

## The transposition buffer (`transpose_buffer`)

The storage is N register lines of N registers each.

* **Line i, element i.** Line i carries element i of every row. An accepted row shifts all
  lines by one register at once. After N rows, register k of line i holds element i of row
  N-1-k.
* **Column read-out.** There is one output multiplexer per register position. All of them
  select the same line m, so together they present element m of every stored row: column m
  of the block.
* **The counter.** A log2(N)+1 bit up counter is the only control:

```
cnt      0 … N-1                 N … 2N-1
phase    load                    read
in_ready 1                       0
lines    shift on in_valid       hold
out      –                       out_valid = 1, out_idx = cnt - N, out_col = column out_idx
```

The counter advances on every accepted row in the load phase and on every cycle in the
read phase, then wraps. The first column is presented in the cycle right after the last
row is taken.

Rows offered during the read phase are refused: `in_ready` is low. So a block occupies the
buffer for 2N cycles. The 1-D units are fully parallel and take one row or column per
cycle, so the buffer is what limits 2-D throughput. One N x N tile is done every 2N
cycles. A length tag (`in_len`) is captured with the first row and travels with the block.

## 2-D operation and scaling (`dct2d_top`)

A tile is N rows of N samples; N = 32 by default.

* **At length L = N** the tile is a single block.
* **At smaller L** the tile is (N/L)² independent L x L blocks. The row unit splits each row
  into N/L blocks, and the column unit splits each column the same way. Transposing the
  whole tile transposes every block in place, so no extra addressing is needed.

Between the stages, `dct_scale` applies the HEVC normalisation:

* after the row stage: rounding shift by log2(L) − 1 + (BIT_DEPTH − 8), then saturation to
  16 bits (the buffer word)
* after the column stage: rounding shift by log2(L) + 6, then saturation to 16 bits

With 9-bit residuals (BIT_DEPTH = 8), the values stay in range as in HEVC. Full-range
16-bit inputs do saturate, and the testbenches exercise that.

### Interface and timing

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock; synchronous active-low reset (clears the buffer counter and `out_valid`) |
| `in_valid`, `in_ready` | in/out | a row is taken on a cycle with both high |
| `in_len` | in | length code, `dct_pkg::dct_len_e`: 0..3 = 4, 8, 16, 32 points; hold it for the N rows of a tile; must not exceed N (asserted) |
| `in_row[N]` | in | N signed 16-bit samples |
| `out_valid`, `out_idx` | out | `out_col` holds column `out_idx` = u of the coefficient tile |
| `out_len` | out | length code of the tile being output |
| `out_col[N]` | out | signed 16-bit; `out_col[v]` = coefficient (vertical frequency v mod L, horizontal u mod L) of block (v/L, u/L) |

If the last row of a tile is taken at clock edge E, column 0 is in the output register
after edge E+1. Columns 1 … N-1 follow on the next N-1 cycles.

### Parameters

| parameter | default | meaning |
|---|---|---|
| `N` | 32 | tile size and largest length (4, 8, 16 or 32) |
| `IN_W` | 16 | input sample width |
| `MID_W` | 16 | buffer word width |
| `OUT_W` | 16 | coefficient width |
| `BIT_DEPTH` | 8 | video bit depth; sets the first shift |

`N = 8` gives the 8-point instance: a 8x8 buffer, with lengths 4 and 8.

## Files

| file | content |
|---|---|
| `rtl/dct_pkg.sv` | length enum, HEVC basis function `coef`, line order `bus_pos` |
| `rtl/dct2d_top.sv` | 2-D transform (top) |
| `rtl/reusable_dct.sv` | recursive reusable N-point unit |
| `rtl/dct4.sv` | 4-point leaf |
| `rtl/iau.sv`, `rtl/sau.sv`, `rtl/oau.sv` | input adder, shift-add and output adder units |
| `rtl/dct_ctrl.sv` | per-level control unit |
| `rtl/and_gates.sv`, `rtl/in_mux_asm.sv`, `rtl/out_mux_asm.sv` | gating and mux assemblies of a level |
| `rtl/transpose_buffer.sv` | counter-driven transposition buffer |
| `rtl/dct_reorder.sv`, `rtl/dct_scale.sv` | split-mode reordering; inter-stage rounding and saturation |
| `tb/dct_ref_pkg.sv` | reference model for the testbenches |
| `tb/*_tb.sv` | one self-checking testbench per module; `dct2d_top_tb` (defaults) and `dct2d_top_n8_tb` (N = 8) run end to end |

## Verification

The reference model in `tb/dct_ref_pkg.sv` builds the basis in a different way from the
RTL:

* it takes each entry's sign from the real cosine
* it takes the magnitude from the per-size HEVC constant lists
* it defines the split-mode line order recursively rather than by the closed formula

The testbenches cover the following:

* **`reusable_dct_tb`**: every coefficient at all four lengths, for random and extreme
  inputs. It also drives an 8-point instance with the ramp 1..8 and random vectors.
* **`transpose_buffer_tb`**: random gaps in the input, plus rows offered during read-out.
  It checks column order and data, the length tag, `in_ready`, and the one-cycle turnaround.
* **`dct_reorder_tb`, `dct_scale_tb`**: the split-mode line mapping at every length, and
  the rounding and saturation of both stages.
* **`dct2d_top_tb`**: end to end at the default parameters. It sends tiles at every
  length, both residual-like and full-range. It checks every coefficient, the column order,
  the latency above, and that each length, a refused row and saturation each occurred.

Each testbench prints `TB_RESULT checks=<n> failures=<m>` and has a cycle watchdog.

Running one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
  rtl/dct_pkg.sv tb/dct_ref_pkg.sv tb/dct2d_top_tb.sv --top-module dct2d_top_tb
./obj_dir/Vdct2d_top_tb
```

Other testbenches are run the same way by swapping the file and top module name.

Lint note: `verilator --lint-only -Wall` with `reusable_dct` itself as the top module
reports `y_even`/`y_low` as undriven. In that setting Verilator does not expand a top
module's instances of itself. Under any parent the recursion is expanded, and simulation
checks it.

## What is this design's own, and where it may differ from the original architecture

Taken from the architecture description:

* the IAU/SAU/OAU split
* the 4-point building block
* two N/2-point reusable units per level, with first- and second-stage AND gates and input
  and output mux assemblies under a control unit
* the upper unit on the even and the mux on the odd output lines
* lengths 4 to 32 at a constant 32 coefficients per pass
* the 1-D → N x N buffer → 1-D chain
* a buffer made of a counter, register lines and multiplexers, with no AND gates and no
  manual enables

Choices made here, which a user should weigh:

* **Buffer timing.** The lines hold while the block is read. A block therefore takes 2N
  cycles and new rows are refused meanwhile. Each line has N registers, and all output
  multiplexers share the counter as select. The original drawing also shows a chain of
  registers between the counter and the multiplexers, whose timing is not specified. That
  chain is not built here.
* **Scaling and widths.** The HEVC inter-stage shifts, the saturation to 16 bits and all
  internal widths are chosen here.
* **Interface.** The valid/ready handshake, the length code and its encoding, the
  column-by-column output order and the reordering to natural order are all choices made
  here.
* **Reset.** Reset is synchronous and active low, and clears only control state.
* **Coefficient values.** The coefficients are the standard HEVC integer matrix. Results
  have been checked against that matrix, not against any published simulation values.
* **Default size.** The default configuration is N = 32. An 8-point instance (N = 8) is a
  parameter change and has its own end-to-end test.
