# 12 x 12 ANT multiplier with a fixed-width replica

Lowering the supply voltage of a multiplier below the level its critical path
needs (voltage overscaling) saves a lot of power. The price is timing
errors. The longest carry chains miss the sampling edge, so some products come
out wrong, often in their most significant bits. *Algorithmic noise
tolerance* (ANT) accepts these errors and repairs them. Beside the main
multiplier runs a small, fast replica that computes only an estimate of the
product. The replica's paths are short, so it meets timing even at the reduced
voltage. When the main result is further from the estimate than the estimate's
own worst-case error, the main result must be wrong. The estimate is then
output instead.

This RTL implements such a multiplier for 12-bit unsigned operands:

```
              +-----------------+  ya (24 b)
  x[11:0] --+-| mdsp_dadda      |-----------+
  y[11:0] --|-| 12x12 Dadda     |           |    +--------------+     +-----+
            | +-----------------+           +--->| ant_decision |---->| reg |--> p[23:0]
            |                                    | |ya-yr<<18|  |---->|     |--> corrected
            | +-----------------+  yr (6 b)  +-->|   > TH ?     |     +-----+
            +-| fw_rpr          |------------+   +--------------+
  x[11:6],    | 6-bit fixed-    |
  y[11:6]     | width replica   |
              +-----------------+
```

The replica is a *fixed-width* reduced-precision replica (RPR). It multiplies
only the six MSBs of each operand and keeps only the upper six bits of that
6 x 6 product. Most of its partial-product array is never built. A cheap
compensation recovers most of the error this causes.

## The fixed-width replica (`fw_rpr`)

This is the part that takes the most explaining. Let `xh = x[11:6]` and
`yh = y[11:6]`. Index their bits 0..5. The partial products `xh[i] & yh[j]`
fall into four groups by column `i + j`:

| group | columns | terms | treatment |
|---|---|---|---|
| MSP (most significant part) | `i + j >= 6` | 15 | built, summed |
| ICV (input correction vector, beta) | `i + j = 5` | 6 | each term added as **one LSB** of the result |
| MICV (minor ICV, alpha) | `i + j = 4` | 5 | used only in one OR condition |
| LSP | `i + j <= 3` | 10 | dropped |

The result is `yr = (MSP + comp * 2^6) >> 6`. It is a 6-bit number of weight
2^18 in the 24-bit product. The compensation `comp` works as follows:

* The five ICV terms `xh[5]yh[0], xh[4]yh[1], ..., xh[1]yh[4]` go straight
  into the lowest kept column. This counts each one at twice its true weight.
  The doubling is deliberate: statistically, the average error of plain
  truncation (which includes the dropped low operand bits) is close to beta
  output LSBs when beta > 0. The average is also nearly the same whichever ICV
  bit is set. So one unit of weight per ICV term is the right correction, and
  it costs nothing but wiring.
* The sixth ICV term `xh[0]yh[5]` goes through an OR gate. The gate's other
  input is `(ICV == 0) && (MICV != 0)`. When no ICV bit is set, the truncation
  error still averages about one LSB. This term adds that LSB, but only if
  the next column down is not empty.

With this compensation, `yr` never exceeds 63, so no carry-out is kept. Over
all 2^24 operand pairs, its mean error against the exact product is about
+0.16 LSB of `yr`. The largest absolute error is 455553 (≈ 1.74 LSB of weight
2^18).

The compensation bits do not sit on the path through the adder array's
carries. The replica's delay stays that of a 6 x 6 upper-half array.

## Main multiplier (`mdsp_dadda`)

This is a plain Dadda multiplier. The 144 partial products are reduced in
stages with target heights 9, 6, 4, 3, 2. A full adder takes three bits off a
column and a half adder takes two. In each stage every column gets just enough
full adders, and at most one half adder, to reach the target, counting the
carries that arrive from the column below. The last two rows go to a single
carry-propagate adder (`+`). The reduction is written as loops over constant
bounds. Every height depends only on `N`, so the loops unroll into a fixed
netlist. The module works for any `N`.

## Error detection (`ant_decision`)

```
yr_al = yr << 18
y     = (|ya - yr_al| > TH) ? yr_al : ya
```

`TH` must be the largest difference that the replica alone can cause:
`TH = max over all x, y of |x*y - (yr << 18)|`. For this replica,
`TH = 455553`. `tb_fw_rpr` recomputes the maximum and checks it. `x*y` grows
with the low operand bits, so for each of the 4096 `(xh, yh)` pairs only the
four corners `x[5:0], y[5:0] in {0, 63}` need evaluating.

Two consequences follow for a user:

* An error-free product is never replaced.
* A replaced product is within `TH` of the exact value. A corrupted product
  that is *kept* (its error was at most about `TH`) can be up to `2*TH` away.
  Errors in the low bits pass through uncorrected. ANT is designed for the
  large MSB errors of timing failures.

## Top level (`ant_multiplier`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | sampling clock |
| `rst_n` | in | 1 | asynchronous, active-low reset of the output register |
| `x`, `y` | in | 12 each | unsigned operands |
| `p` | out | 24 | registered product (main or replica value) |
| `corrected` | out | 1 | registered: 1 when the replica value was output |

All three blocks are combinational. The only storage is the output
register, so the latency is one cycle and a new pair can be applied every
cycle. The parameter `N` scales the multiplier and the replica (`N/2` bits),
but `TH` holds the value for `N = 12`. For any other `N` it must be
recomputed with the formula above.

## What follows the design idea and what is a local choice

Taken from the ANT fixed-width-RPR scheme:

* The MDSP/RPR/decision structure and the selection rule with
  `TH = max |exact - replica|`.
* 12-bit unsigned operands and a 6-bit fixed-width replica.
* The MSP/ICV/MICV/LSP split.
* Direct injection of five ICV terms and the conditional OR gate.
* A Dadda tree as the main multiplier.

Local choices:

* **The OR-gate condition.** It reads as "no ICV bit set and some MICV bit
  set". This is one reading of the condition for the under-compensated case.
* **Alignment of `yr`.** It is aligned by its weight, `<< 18`, with zero low
  bits.
* **The value of TH.** 455553 was computed for exactly this replica.
* **Registers.** There is only an output register, with asynchronous reset.
  A reference FPGA implementation of the scheme reports 36 flip-flops; this
  design has 25.
* **The `corrected` flag.**
* **Adder structure.** The replica's adder array is written as a sum and the
  Dadda's final adder as `+`; synthesis chooses the adders.

Not included: the voltage overscaling itself. It is an operating condition,
not logic. Also not included are the Baugh–Wooley array main multiplier and
the full-width replica that this scheme is compared against.

## Verification

Each block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`.

* `tb_mdsp_dadda`: corner and one-hot operands plus 200,000 random pairs,
  against a shift-and-add reference. Set `EXHAUSTIVE` for all 2^24 pairs.
* `tb_fw_rpr`: all 4096 replica inputs against a reference built from the
  group definitions. It also checks the error bound and that the TH maximum is
  exactly 455553.
* `tb_ant_decision`: differences at exactly `TH` and `TH + 1` on both sides
  of every replica value, plus random pairs.
* `tb_ant_multiplier`: the whole design at default parameters. It runs
  300,000 operand pairs through the registered output and checks the latency.
  It emulates overscaling errors by forcing the main multiplier's output
  (`dut.ya`) to a value with one or two bits flipped on every fourth cycle.
  It requires that each of these happens at least once: reset, a clean cycle,
  a corrected soft error, a small error that is kept, an ICV-compensated
  replica result, and the OR-gate case. It runs in a few seconds.

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl tb/tb_ant_multiplier.sv --top-module tb_ant_multiplier
./obj_dir/Vtb_ant_multiplier
```
