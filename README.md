# Aging-aware variable-latency 64 × 64 multiplier with adaptive hold logic

If the clock of a multiplier is set by its worst-case path, every
multiplication pays for the rarest slow input pattern. Aging makes this
worse: transistors slow down over the years, so the margin has to be even
larger. This design instead clocks a **column-bypassing array multiplier**
faster than its worst case. Each multiplication gets one or two cycles,
depending on a cheap prediction of how long it will take:

* In a column-bypassing multiplier, every multiplicand bit that is 0 switches
  off a whole diagonal of full adders. Its signals are simply passed through.
  The more zeros the multiplicand has, the shorter the longest active path.
* The **adaptive hold logic (AHL)** counts the zeros of the multiplicand. With
  enough zeros, the product is taken after one cycle. With too few, the
  operands are held and the product is taken after two cycles.
* An **aging input** switches the AHL to a stricter threshold. Once the
  circuit has slowed down, more operations get two cycles, and none fails
  timing.

With random operands, about half of all operations finish in one cycle. The
average latency is therefore well below the two cycles that a fixed-latency
design with the same clock would need.

## Structure

```
ahl_mult_top  (variable-latency control, operand and product registers)
├── ahl       (zero count of the multiplicand, two thresholds, aging select)
└── mult64    (64 × 64 product from four 32 × 32 arrays and three adders)
    ├── cb_mult m1  mdL × mrL → p1
    ├── cb_mult m2  mdH × mrL → p2
    ├── cb_mult m3  mdL × mrH → p3
    └── cb_mult m4  mdH × mrH → p4
        └── full_adder cells
```

| file | contents |
|---|---|
| `rtl/ahl_mult_pkg.sv` | operand widths, controller state type |
| `rtl/full_adder.sv` | one-bit full adder |
| `rtl/cb_mult.sv` | N × N column-bypassing array, N = 32 by default |
| `rtl/ahl.sv` | adaptive hold logic |
| `rtl/mult64.sv` | four sub-arrays and the adder chain |
| `rtl/ahl_mult_top.sv` | the complete multiplier |

## The column-bypassing array (`cb_mult`)

This is the part that is hardest to follow from the code. It is an ordinary
carry-save array multiplier with one multiplexer added per cell.

Partial product `a[i]·b[k]` has weight `i+k`. `a` is the multiplicand and
`b` the multiplier. For rows `k = 1 … N-1` there is a carry-save row of `N-1`
full adders. Cell `FA(k,i)` adds three bits:

* its side input `a[i]·b[k]`;
* its upper input: `a[i+1]·b[0]` in row 1; in later rows, the sum of
  `FA(k-1,i+1)`, or `a[N-1]·b[k-1]` for the leftmost cell;
* its carry input: the carry of `FA(k-1,i)`, which is 0 in row 1.

Sums go straight down, and carries go to the lower-left cell. As a result,
all cells that handle `a[i]` lie on one diagonal, and the carry chain of that
diagonal stays inside it. Product bit `p[0]` is `a[0]·b[0]`, and `p[k]` is
the sum of `FA(k,0)`. A final ripple-carry row of `N-1` full adders (carry-in
0, leftmost input `a[N-1]·b[N-1]`) adds the last carry-save row into
`p[2N-2:N]`. Its carry-out is `p[2N-1]`.

**Bypass.** If `a[i] = 0`, every cell of diagonal `i` has a side input of 0
and a carry input of 0. Its sum therefore equals its upper input, and its
carry is 0. A multiplexer selected by `a[i]` passes the upper bit straight
down, and the carry leaving the cell is ANDed with `a[i]`. A bypassed
diagonal contributes no adder delay, which is why the zero count predicts
the delay. The ripple row is never bypassed.

In RTL simulation the bypass has no visible effect: the product is the same
either way. It matters for timing and power after synthesis, where the
multiplexers cut the carry-save chains of zero columns. The testbench
therefore checks the products, including multiplicands with mostly zeros
and the 1010 × 1111 case. It cannot check delays.

## Adaptive hold logic (`ahl`)

`zeros` is the number of 0 bits of the 64-bit multiplicand. Two judging
comparisons run in parallel:

| aging | one cycle if | default |
|---|---|---|
| 0 | `zeros >= TH_FRESH` | 32 |
| 1 | `zeros >= TH_AGED` | 33 |

`one_cycle` is the result that `aging` selects. The block is combinational.
The thresholds are parameters. Their defaults (half the bits, and one more)
are this design's choice: they are not derived from a timing analysis of a
real process. To use this on silicon, set them from static timing of the
synthesised array at the target clock, for the fresh and for the aged
corner.

## Variable-latency control (`ahl_mult_top`)

A three-state controller (`VL_IDLE`, `VL_EXEC`, `VL_HOLD`). All signals are
synchronous to `clk`. `rst` is a synchronous, active-high reset.

* An operation is accepted on a rising edge where `in_valid && in_ready`. On
  that edge `md`/`mr` are registered, and the controller enters `VL_EXEC`.
* In `VL_EXEC`, the multiplier and the AHL work on the registered operands.
  * If `one_cycle` is 1, the product is registered at the next edge.
    `in_ready` is already 1 in that cycle, so short operations run
    back-to-back at one per cycle.
  * Otherwise `hold` is 1. The operands stay in their registers (an
    assertion checks this), and the controller moves to `VL_HOLD`. The
    product is registered one edge later.
* `out_valid` is a one-cycle pulse that comes with `product`. `out_long`
  tells that the result took two cycles.

Latency, counted from the accepting edge: 1 edge for a short operation, 2
for a long one. `p1…p4` bring out the four sub-products of the operation in
flight, for observation only.

`aging` is a plain input. It is read in the first cycle of each operation.
The logic that decides that the circuit has aged (a delay sensor, or a
count of timing errors) is not part of this RTL. It must be supplied by the
system, or the input can be tied off.

## How it relates to the published design, and its limits

Taken from the published design:

* the carry-save array with its ripple row;
* the bypass multiplexer selected by the multiplicand bit, and the carry
  gating;
* the AHL deciding between one and two cycles from the multiplicand's zero
  count, adjusted for aging;
* the 64 × 64 size built from four 32 × 32 column-bypassing
  sub-multipliers and three adders;
* the signal names `md`, `mr`, `product`, `p1…p4`.

This design's own choices:

* the threshold values, and the two-threshold way of adjusting for aging;
* which quarter product each of `p1…p4` holds, and the order of the three
  adders;
* one AHL on the full 64-bit multiplicand, rather than one per sub-array;
* the valid/ready handshake, the reset, and where the registers sit.

Not built:

* the aging detector;
* any error detection and re-execution path. A `reexecute` signal and
  signals `r1`–`r3` appear in the published simulation, but their function
  is not described.
* the row-bypassing variant, which would feed the AHL with the multiplier's
  zeros instead;
* the plain array multiplier, which is only the point of comparison.

## Simulation

Each block has a self-checking testbench in `tb/`. Each one prints a line
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_cb_mult` | 4 × 4 and 8 × 8 exhaustively; 32 × 32 on corner cases and on random operands, some sparse and some dense |
| `tb_ahl` | every zero count 0…64, with aging at 0 and at 1 |
| `tb_mult64` | the 128-bit product and each sub-product against `*` |
| `tb_ahl_mult_top` | end to end at full size (below) |

`tb_ahl_mult_top` runs at the full 64 × 64 size. It runs 3000 operations
with random gaps, and switches the aging input every 500 cycles. A
scoreboard checks, for each operation:

* the product;
* `out_long` and `hold`;
* the exact cycle on which the result arrives.

It counts how often each mechanism happens, and fails if one never does:

* one-cycle operations;
* two-cycle operations;
* decisions that aging changed;
* back-to-back acceptance;
* idle cycles;
* bypassed and non-bypassed multiplicands.

A typical run has about 1500 short and 1500 long operations, and about 340
decisions changed by aging.

With Verilator 5, from the repository root:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/ahl_mult_pkg.sv rtl/full_adder.sv rtl/cb_mult.sv rtl/ahl.sv \
    rtl/mult64.sv rtl/ahl_mult_top.sv tb/tb_ahl_mult_top.sv \
    --top-module tb_ahl_mult_top -o sim
./obj_dir/sim
```

Each sub-block testbench builds the same way with its own files. For
example, `tb_cb_mult` needs `rtl/full_adder.sv` and `rtl/cb_mult.sv`. All
testbenches finish in a few seconds.

Changing the size: `ahl_mult_top #(.W(...))` sets the operand width (it must
be even). The AHL thresholds follow as `W/2` and `W/2+1` unless they are set
on `ahl` directly. After synthesis, the default top is about 39,000
word-level cells, almost all of them in the four arrays, plus 261 flip-flops.
