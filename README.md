# Reliable low-power 12 × 12 multiplier with a Wallace-tree reduced-precision replica

A multiplier draws less power at a lower supply voltage. Below its critical voltage,
though, its longest carry paths miss the sampling edge and the product comes out
wrong. This design accepts those timing errors and corrects them with
*algorithmic noise tolerance*. Two multipliers work side by side:

* the **main block**, an exact 12 × 12 Wallace-tree multiplier. It is the block
  meant to run voltage-overscaled, so its sampled output `ya` may contain soft
  errors.
* the **reduced-precision replica (RPR)**, a 6 × 6 fixed-width Wallace multiplier
  fed with only the six most significant bits of each operand. Its carry chains
  are much shorter, so at the same voltage it stays correct, though coarse.

An error-correction stage registers both results. It keeps the main result unless
it lies further than a threshold `Th` from the replica's estimate, and in that case
it outputs the replica's value instead:

```
y = ya            if |ya - yr| <= Th
y = yr            if |ya - yr| >  Th
Th = max over all inputs of |yo - yr|      (yo = error-free product)
```

So the replica catches any large error, in practice errors in the high-order
product bits. Small errors pass through, but they are small by definition.

The design is written from the description by P. Lakshmi Neeraja and Ch. Rajesh
Babu, *Reliable Low Power Multiplier Design Using Reduced Precision Redundancy by
Wallace Architecture*. Points that description leaves open were settled here; they
are listed under "Design choices".

```
             +------------------+   p_main     vos_err
  a[11:0] -+-> wallace_mult     |------------->(xor)--->[reg]-- ya --+----------------+
  b[11:0] -|  (12x12, exact)    |                                    |                |
           | +------------------+                                    v                v
           |                                                  +-------------+    +-------+
           | +------------------+   yr_fw[5:0]                | difference  |err |  mux  |--> y
           +-> fixed_width_rpr  |------------------->[reg]-yr->| |ya-yr|>Th  |--->|       |
              (a[11:6] x b[11:6]|                              +-------------+    +-------+
               6-bit, ICV/MICV  |                                    ^                ^
               compensation)    |                                    +----- yr*2^18 --+
              +------------------+
```

## The threshold and what it guarantees

`Th` is the largest distance between an error-free 24-bit product and the
replica's estimate, taken over all 2^24 operand pairs. It does not have to be found
by exhaustive simulation. The replica sees only `a[11:6]` and `b[11:6]`. For each
of the 4096 MSB pairs, the exact product is smallest with all low bits 0 and largest
with all low bits 1, so the largest distance lies at one of those two ends.
`mul_pkg::compute_th()` runs this search at elaboration time. For the default size
it gives

```
Th = 455553   (about 2.7 % of the 24-bit range)
```

The value depends on the replica's compensation. With plain truncation it would be
1826817, and with the ICV term alone 490113 (see below). A tighter replica gives a
tighter threshold, so more errors are caught.

Consequences a user should know:

* Without soft errors the main result is always kept (`err = 0`, `y = a*b`). This
  follows from the definition of `Th`, and the testbenches check it.
* With soft errors, the output is always within `2·Th` of the exact product. A
  kept `ya` is within `Th` of `yr`, which is within `Th` of the exact product; a
  replaced one is `yr` itself.
* A flip of product bit 20 or above (2^20 > 2·Th) is always detected and replaced.
  Flips of lower bits may pass undetected, and they cost at most their own weight.

## The replica and its truncation compensation

The replica multiplies `xh = a[11:6]` by `yh = b[11:6]` and keeps only the six
high bits of the 12-bit product. In the full-scale result those bits carry weight
2^18. The 6 × 6 partial-product array (`xh[i]·yh[j]` at weight 2^(i+j)) is split by
column:

| part | columns (i+j) | terms | treatment |
|------|---------------|-------|-----------|
| MSP (most significant part) | 6 … 10 | 15 | summed exactly |
| ICV, input correction vector | 5 | 6 | β = number of set terms, added as β output LSBs |
| MICV, minor ICV | 4 | 5 | α = number of set terms, decides one extra LSB |
| LSP (least significant part) | 0 … 3 | 10 | not built |

Dropping the lower columns (and the operands' low halves) makes the replica read
low on average. Measured against the full 24-bit product with uniform inputs, the
mean shortfall of the plain truncated replica, in output LSBs (2^18), tracks β:

| β | 0 | 1 | 2 | 3 | 4 | 5 | 6 |
|---|---|---|---|---|---|---|---|
| mean error | 0.55 | 1.31 | 2.12 | 3.00 | 3.94 | 4.93 | 5.99 |

So the ICV terms are wired straight into the MSP's least significant column (weight
2^6 of the 6 × 6 product), one unit each. This needs no logic at all. For β = 0 the
residual is 0.74 LSB when some MICV term is set and 0.37 LSB when none is. The
replica therefore adds one more LSB exactly when `β = 0 and α > 0`: one NOR over
the ICV terms and one OR over the MICV terms, outside the adder tree's critical
path. Mean error over all inputs:

| replica | mean error (LSB) | Th |
|---------|------------------|----|
| truncated MSP only | 1.74 | 1826817 |
| + ICV | 0.24 | 490113 |
| + ICV + MICV unit (this design) | 0.16 | 455553 |

The compensated sum never exceeds 4032 < 2^12, so the six output bits never
overflow.

## The Wallace reduction

Both multipliers share one reduction module, `wallace_tree`. It works column by
column:

1. The partial products are AND terms: row `j` is the multiplicand gated by
   multiplier bit `j`, shifted by `j`.
2. In each stage, every column's bits are taken three at a time by full adders.
   A leftover pair goes to a half adder, and a leftover single bit passes on. Sums
   stay in the column; carries move to the next column.
3. Stages repeat until no column holds more than two bits. The two remaining rows
   are added by a ripple-carry adder (`rca`).

Column heights for every stage are computed at elaboration. Only adders with live
inputs are generated, and the slot that each sum and carry lands in is fixed by
those heights. For the full 12 × 12 array the tallest column goes 12 → 8 → 6 → 4 →
3 → 2, which takes five stages. The replica uses the same module on a truncated
array. `KEEP_FROM` drops the columns below the MSP. `NEXTRA` extra bits at weight
`EXTRA_COL` carry the six ICV terms and the MICV unit into the MSP's least
significant column.

Two 4 × 4 multipliers show the same idea wired cell by cell. They are
stand-alone examples, placed beside the reliable multiplier in the top level:

* `wallace4x4` has a first stage of HA6, FA7, FA8 and HA9, and a second stage of
  HA10, FA11, FA13 and FA15. The final ripple row is HA17, FA18, FA19 and FA20,
  giving product bits P0 … P7.
* `wallace4x4_two_stage` reduces only where a column is too tall. Stage 1 has two
  half adders on columns 3 and 4, and stage 2 has four full adders on columns 2 to
  5. A 6-bit ripple-carry adder then adds the two remaining rows, giving z0 … z7.

## Modelling the voltage-overscaling errors

Timing failures cannot happen in RTL simulation, so the design exposes them as an
input. The main block's output passes through `ya_in = p_main ^ vos_err` before it
is registered. Each set bit of `vos_err` flips that bit of the sampled product, as a
late-arriving carry would. `yo` is the same product without the flips (the
"error-free output" that defines `Th`). For normal use, tie `vos_err` to zero. A
testbench or a fault-injection harness drives it to exercise the correction path.

## Interface and timing

`reliable_mult_top` (the top level) contains `mul12`, `wallace4x4` and
`wallace4x4_two_stage`:

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk` | in | 1 | clock, rising edge |
| `rst_n` | in | 1 | active-low synchronous reset; clears the output registers |
| `a`, `b` | in | 12 | unsigned operands |
| `vos_err` | in | 24 | soft-error pattern applied to the main block's sampled output |
| `y` | out | 24 | corrected product |
| `ya` | out | 24 | main-block product as sampled (with soft errors) |
| `yo` | out | 24 | error-free main-block product |
| `yr` | out | 12 | replica product on the scale of `a[11:6]*b[11:6]`; its six low bits are always 0 |
| `th` | out | 24 | threshold in use (constant) |
| `err` | out | 1 | 1 when `y` was taken from the replica |
| `ex_a`, `ex_b` | in | 4 | operands of the 4 × 4 example |
| `ex_p` | out | 8 | `ex_a * ex_b`, combinational |
| `ex2_a`, `ex2_b` | in | 4 | operands of the two-stage 4 × 4 example |
| `ex2_z` | out | 8 | `ex2_a * ex2_b`, combinational |

All `mul12` outputs are registered. They show the result for the `a`, `b` and
`vos_err` present at the previous rising edge, which is a latency of one clock with
one new operation per clock. `y`, `err` and `th` are combinational from the
registers. The replica's full-scale value is `yr * 2^12` (`yr_fw * 2^18`).

## Files

| file | content |
|------|---------|
| `rtl/mul_pkg.sv` | default width, replica reference model, `compute_th()` |
| `rtl/half_adder.sv`, `rtl/full_adder.sv` | adder cells |
| `rtl/rca.sv` | ripple-carry adder |
| `rtl/wallace_tree.sv` | column-wise Wallace reduction plus final adder |
| `rtl/wallace_mult.sv` | main block, N × N exact multiplier |
| `rtl/fixed_width_rpr.sv` | replica with ICV/MICV compensation |
| `rtl/difference.sv` | `|ya - yr|` and the `> Th` flag |
| `rtl/error_correction.sv` | output registers, difference, output mux |
| `rtl/mul12.sv` | the reliable multiplier |
| `rtl/wallace4x4.sv` | 4 × 4 cell-level example, numbered cells |
| `rtl/wallace4x4_two_stage.sv` | 4 × 4 cell-level example, two stages plus final adder |
| `rtl/reliable_mult_top.sv` | top level |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## Parameters and resizing

`N` (default 12) sets the operand width of `mul12`, `wallace_mult`,
`fixed_width_rpr` and `error_correction`. The replica width is `N/2`, so `N` must
be even. `TH` defaults to `compute_th(N)`, which uses 64-bit arithmetic (up to
`N = 30`) and loops over 2^N MSB pairs at elaboration. The no-overflow property of
the compensated replica was checked for `N` = 4 … 16. `TH` can be overridden, for
example to trade detection rate against false replacements, but any value below the
default lets error-free products be replaced by the coarser replica value.

## Simulating

Each testbench is self-checking. It prints `TB_RESULT checks=<n> failures=<m>` and
has a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/mul_pkg.sv \
    tb/tb_reliable_mult_top.sv --top-module tb_reliable_mult_top
./obj_dir/Vtb_reliable_mult_top
```

Replace the testbench name for the others (`tb_mul12`, `tb_fixed_width_rpr`,
`tb_wallace_tree`, …). `rtl/mul_pkg.sv` must come first on the command line.

What the testbenches establish:

* `tb_wallace_tree` drives arbitrary bits into every array position of the 12 × 12
  shape, the replica's truncated shape and two small shapes, and compares the
  result with a weighted integer sum.
* `tb_wallace_mult` runs corner values and 20000 random 12 × 12 products, plus an
  exhaustive 4 × 4 run.
* `tb_fixed_width_rpr` checks all 4096 MSB pairs against an independent
  column-sum model, with random low bits that the replica must ignore.
* `tb_mul12` checks `th`. It sweeps every MSB pair at both ends of its range, with
  no errors, and shows that the largest distance reached equals `th`. It then runs
  6000 operations with single-bit, two-bit and random error patterns, and checks
  the selection rule, the `2·Th` bound, reset, and the one-clock latency.
* `tb_wallace4x4` and `tb_wallace4x4_two_stage` check all 256 products of each
  example.
* `tb_reliable_mult_top` runs the whole top level at default size, including both
  4 × 4 examples. It counts that each case occurs: main result kept, replica
  selected, small error kept, MICV unit added, and ICV-only compensation.

## Design choices and departures

Followed from the source description: the main-block / replica / threshold-mux
structure, and the selection rule with its definition of `Th`. Also followed:
registers on both results ahead of the comparison, a 12 × 12 main block with a
6-bit fixed-width replica on the operand MSBs, and the MSP / ICV / MICV / LSP split
with the statement that the error is about β (β + 1 when β = 0). Wallace reduction
with full and half adders and a ripple-carry final adder is used for both
multipliers. The cell numbering and stage layout of the two 4 × 4 examples, and
the `mul12` port names and widths, come from the same source. In `wallace4x4_two_stage`, which
bits of a column meet in which adder is read from the drawing where legible;
inside a column the choice does not change the product.

Settled here:

* **Compensation weight and MICV rule.** The source says neither in what unit the
  error is about β nor how the MICV enters. The statistics above fixed both: β
  counts output LSBs, and one extra LSB is added when β = 0 and α > 0.
* **Unsigned operands only.** The main block uses plain AND partial products, as
  the source describes them. Its conclusion also claims error reduction for signed
  numbers, but it describes no signed version of this design; Booth recoding
  appears only for the design it compares against.
* **`Th` is computed**, not a printed constant.
* **Clock, reset and error ports.** `clk`, `rst_n` (synchronous, active low),
  `vos_err` and `err` are additions to the published port list. `yr` keeps its
  12-bit width with the six low bits zero.
* **Cell-level labels in `wallace4x4`.** Three input labels of the published
  drawing would use a partial product twice. The column weights fix them as a1b1
  (FA7), a3b1 (HA9) and a3b2 (FA15).
* **Top level.** `reliable_mult_top` exists only to place the two 4 × 4 examples
  beside `mul12`.

Not represented:

* the supply-voltage scaling itself, and any power, delay or area figures. The
  source reports a 22 % saving against its comparison design and FPGA utilisation
  of about 340–349 four-input LUTs, none of which this RTL can reproduce.
* the comparison design: an ANT multiplier with a Baugh–Wooley or Booth main block
  and an array-based fixed-width replica.

`mul12` has 159 pins: the 132 of the published port list, plus clock, reset, the
24-bit error input and `err`. Like the published design, which already needs
more I/O than the 124 of the small FPGA it was mapped to, it is meant to sit inside
a larger design rather than on pins.
