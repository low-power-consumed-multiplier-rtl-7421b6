# Fixed-width replica ANT multiplier (12 x 12 bit)

A multiplier that keeps giving usable results when its supply voltage is pushed
below the level at which its longest paths still meet timing. The technique is
*algorithmic noise tolerance* (ANT): next to the full multiplier runs a small
*reduced-precision replica* (RPR) whose paths are short enough to stay correct at
the lowered voltage. When the full product and the replica's estimate disagree by
more than a fixed threshold, the full product is taken to be corrupted by a timing
error and the estimate is output instead.

What sets this design apart is the replica. Instead of a full-width 6 x 6
multiplier of the operand MSBs, it is a **fixed-width** multiplier: it computes only
the six most significant product bits, roughly halving its adder cells and
shortening its critical path. The error this truncation causes is largely cancelled
by a cheap compensation made of wiring plus three gates.

## Block diagram

```
            x_i, y_i (12 b each)
               |            \
               |             \ upper 6 bits of each
               v              v
     +-----------------+   +---------------------+
     | mdsp_multiplier |   |  fixed_width_rpr    |
     | 12x12 array     |   |  6-bit fixed width  |
     +-----------------+   +---------------------+
          | ya (24 b)            | yr (6 b, weight 2^18)
   mdsp_err_i -> XOR             |
          v                      v
      [ ya_q ]               [ yr_q ]          <- sampling registers (edge 1)
          \                     /
           +---- ant_decision --+   |ya - yr| > TH ? yr : ya
                      |
                 [ p_o, sel_rpr_o ]            <- output registers (edge 2)
```

| File | Module | Role |
|---|---|---|
| `rtl/ant_pkg.sv` | `ant_pkg` | default width `ANT_N = 12`, threshold `ANT_TH`, full-adder function |
| `rtl/mdsp_multiplier.sv` | `mdsp_multiplier` | main 12 x 12 unsigned carry-save array multiplier |
| `rtl/fixed_width_rpr.sv` | `fixed_width_rpr` | compensated fixed-width replica, word length `H` (default 6) |
| `rtl/ant_decision.sv` | `ant_decision` | error detection and output selection |
| `rtl/ant_multiplier.sv` | `ant_multiplier` | top: the three blocks, registers and valid pipeline |

## The fixed-width replica and its compensation

This is the part that needs the most explanation.

Let `xh = x[11:6]` and `yh = y[11:6]`, and index their bits locally as `a` and `b`
(0..5). The exact product of the MSBs is the sum of the 36 bits `xh[a] & yh[b]`,
each with weight `2^(a+b)` relative to `2^12`. The replica sorts those bits by
anti-diagonal `a + b`:

| Subset | Bits | Treatment |
|---|---|---|
| MSP | `a + b >= 6` (15 bits) | summed: these form the 6-bit result, weights 2^18..2^23 |
| ICV, input correction vector | `a + b == 5` (6 bits, C1..C6) | used as compensation |
| MICV, minor input correction vector | `a + b == 4` (5 bits) | used only to decide a carry-in |
| LSP | `a + b <= 3` | dropped |

Dropping everything below the MSP (and all the low operand bits, which the replica
never sees) leaves an error that on average is close to `beta` units of 2^18,
where `beta` is the number of set ICV bits. So the compensation adds `beta` to the
lowest kept column: each ICV bit, which by itself has weight 2^17, is fed into that
column as a carry-in with weight 2^18. This costs no gates, only wires.

The one case this handles badly is `beta == 0`. There the remaining error depends
on the MICV: with no MICV bit set it is small, with any set it is large enough that
one more unit is worth adding. Hence the conditional carry-in

```
Cm1 = NOR(C1 .. C5)        // no direct ICV bit set
Cm2 = OR(MICV)             // beta1 > 0
Cm  = Cm1 & Cm2
C6' = C6 | Cm              // C6 = xh[0] & yh[5] enters through this OR
yr  = MSP + C1 + .. + C5 + C6'
```

which amounts to `yr = MSP + beta + (beta == 0 && beta1 > 0)`. Whether C6 is also
an input of the NOR makes no difference: if C6 is set, the OR output is 1 anyway.
The extra gates sit at the bottom of the lowest column, off the critical path.

Measured against the exact 24-bit product over all 2^24 operand pairs, the
6-bit replica's error `x*y - yr` lies in [-364544, +455553]. Its SNR against the
exact product is about 33.8 dB. Plain truncation (MSP only) gives about 20.6 dB,
and a full-width 6 x 6 replica about 31.3 dB. Relative to plain truncation, the
mean absolute error drops to 20.2 % and the mean square error to 4.8 %.

`H` is a parameter. The published design picked `H = 6` after comparing 5 to 10
bits; `tb/tb_rpr_wordlength.sv` builds all six and prints their SNR.

## Threshold and decision

`ant_decision` outputs `ya` when `|ya - yr| <= TH` and `yr` otherwise, and raises
`sel_rpr_o` in the second case. TH must be the largest difference a *correct*
product can have from the replica. Otherwise error-free products get replaced.
For N = 12, H = 6 it is 455553 (`ant_pkg::ANT_TH`). This value was found by
evaluating every input pair, and `tb_fixed_width_rpr` recomputes it. For other
word lengths with N = 12:

| H | 5 | 6 | 7 | 8 | 9 | 10 |
|---|---|---|---|---|---|---|
| TH | 861441 | 455553 | 241633 | 128177 | 66681 | 33680 |

If you change N or H, recompute TH. For each MSB pair `(xh, yh)`, the extremes of
`x*y - yr` occur with the low operand bits all zero or all one. So a loop over the
`2^(2H)` MSB pairs is enough.

Consequences worth knowing:
* A soft error smaller than TH passes through uncorrected. The scheme bounds the
  output error by roughly TH; it does not remove the error.
* A large soft error is replaced by `yr`, so that output carries the replica's
  truncation error (at most 455553, i.e. about 2.7 % of full scale).

## Main multiplier

`mdsp_multiplier` is an unsigned array multiplier. Eleven rows of full adders
accumulate the partial-product rows in carry-save form, and each row retires one
low product bit. A ripple-carry adder then merges the last row into the upper 12
bits. This long row-plus-ripple path is what fails first when the supply is
lowered. The published design calls its main block a Baugh–Wooley array, but its
operands are unsigned, and for unsigned operands that array reduces to this one.

## Timing and interface of the top

`ant_multiplier` accepts one operand pair per clock and has a latency of 2 cycles:

| Cycle | Event |
|---|---|
| 0 | `x_i`, `y_i`, `in_valid_i` applied; both multipliers evaluate |
| edge 1 | `ya` and `yr` sampled. Under overscaling, a late main multiplier misses this edge. |
| edge 2 | `p_o`, `sel_rpr_o`, `ya_o`, `yr_o` and `out_valid_o` registered |

`rst_ni` is a synchronous, active-low reset that clears every register.

`mdsp_err_i` is XORed into the main product as it is sampled. Logic simulation has
no notion of late paths, so this mask stands in for the timing errors that
overscaling produces. Tie it to zero in a real implementation. The overscaled
supply itself is an electrical condition and is not modelled.

## Where this RTL departs from, or goes beyond, the published design

* The compensation condition is `beta == 0 && beta1 > 0`. This follows the OR gate
  that detects `beta1` and the stated purpose of the carry-in (insufficient
  compensation when the MICV is non-zero). One sentence of the original wording
  suggests `beta1 == 0` instead.
* The error statistics come out close to, but not exactly at, the published
  figures: mean absolute error 20.2 % vs 21.4 %, mean square 4.8 % vs 5.6 %, SNR
  33.8 dB vs 33.15 dB. The same procedure reproduces the published full-width
  replica figures exactly. The gap most likely comes from a difference in test
  inputs or in some detail of the compensation.
* The replica's MSP is summed with word-level adders per row, so synthesis chooses
  the adder cells. The exact full-adder layout of the original replica array, and
  its placement of the carry-ins far from the critical path, are not reproduced
  cell by cell.
* Register placement, valid signals, reset and the soft-error port are choices
  made here.
* Voltage overscaling, power, area, and the 200 MHz / 0.6 V operating point are
  electrical results. RTL does not model them.

## Testbenches

All of them are self-checking and end with a `TB_RESULT checks=.. failures=..`
line.

| Testbench | What it checks |
|---|---|
| `tb_mdsp_multiplier` | corner operands and 200 000 random pairs against `x*y` |
| `tb_fixed_width_rpr` | all 4096 MSB pairs against an independent reference (`tb/ant_ref_pkg.sv`); the Cm flag; recomputes TH; every compensation case occurs |
| `tb_ant_decision` | differences at TH, TH+1 and beyond in both directions, plus random pairs |
| `tb_ant_multiplier` | top at default size: 10 000 random pairs with idle cycles. About 10 % get a large imitated soft error (must be replaced by `yr`) and about 10 % a small one (tolerated). Checks every output, the 2-cycle latency and that each mechanism occurs. Reports SNR of the replica (~33.8 dB), the unprotected main product (~11.6 dB) and the ANT output (~43.8 dB). |
| `tb_rpr_wordlength` | replicas with H = 5..10 on 10 000 random pairs. Checks each estimate against the reference model and against that H's threshold, and prints SNR of compensated, truncated and full-width replicas. |

To simulate with Verilator 5 from the repository root, for example:

```
verilator --binary --timing -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/ant_pkg.sv tb/ant_ref_pkg.sv tb/tb_ant_multiplier.sv \
    --top-module tb_ant_multiplier
./obj_dir/Vtb_ant_multiplier
```

Replace the testbench name to run another. Each run takes well under a second.
