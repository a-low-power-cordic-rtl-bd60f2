# Multiplier-less 8-point DCT: Loeffler flow graph with CORDIC and CSD rotators

This is a pipelined 8-point one-dimensional discrete cosine transform (DCT-II), the kind of
transform used inside JPEG and MPEG coders. It is aimed at low power and small area, and it has
no general-purpose multiplier.

It starts from Loeffler's flow graph, which needs only three rotations and two scalings by √2
beyond plain add/subtract butterflies. Each of these multiplications is then replaced by
shift-and-add logic:

| Flow-graph element | Angle / constant | Built as | Module |
|---|---|---|---|
| rotator C3, odd half | 3π/16 | 2 unfolded CORDIC micro-rotations + CSD gain compensation | `cordic_3pi16` |
| rotator C1, odd half | π/16 | 2 unfolded CORDIC micro-rotations, no compensation | `cordic_pi16` |
| rotator √2·C6, even half | 3π/8, gain √2 | direct 4-multiplier rotator, multipliers in CSD | `csd_rotator` |
| two √2 scalers, last stage | √2 | CSD constant multiplier | `csd_const_mult` |

An earlier CORDIC-based Loeffler DCT approximates the 3π/8 rotation with a three-step CORDIC and
moves its compensation to the end. This design does not: the 3π/8 rotator uses exact 12-bit
constants in canonical signed-digit (CSD) form. The aim is less area and power than that
all-CORDIC version, and the result is also more accurate.

## What it computes

For signed inputs `x[0..7]` the outputs are, in natural order:

    X[0] = Σ x[n]
    X[k] = √2 · Σ x[n] · cos((2n+1)·k·π/16),   k = 1..7

These outputs are 2√2 times the orthonormal DCT-II. This is the natural scale of the
unnormalised Loeffler graph. Any normalisation is left to the next step, for example a JPEG
quantiser.

The CORDIC rotations are only approximate, so the results are too:
- The π/16 rotation turns by 10.70° instead of 11.25°, with a gain of 1.0097.
- The 3π/16 rotation turns by 33.69° instead of 33.75°.
- The constants carry 12 fractional bits.

For 8-bit inputs, the largest error against the exact formula above is about 7.2 LSB on outputs
that reach ±1024. That is about 0.7 % of full scale, and it comes almost entirely from the π/16
approximation. This error is small next to the quantisation steps of lossy image or video
coding. It does, however, mean that the core is not a bit-exact reference DCT.

## The flow graph

There are four stages. Each row is one word of the vector, and a pipeline register follows every
stage.

```
stage 1  butterflies (x0,x7) (x1,x6) (x2,x5) (x3,x4)
         rows 0..3 = sums, rows 7,6,5,4 = differences
stage 2  even: butterflies (0,3) (1,2)
         odd:  C3 = cordic_3pi16 on (row4, row7), C1 = cordic_pi16 on (row5, row6)
stage 3  even: butterfly (0,1)               -> X0, X4
               csd_rotator on (row2, row3)   -> X2, X6
         odd:  row4 = r4 + r6, row6 = r4 - r6, row7 = r7 + r5, row5 = r7 - r5
stage 4  X1 = r7 + r4, X7 = r7 - r4, X3 = √2·r5, X5 = √2·r6
```

A butterfly maps (I0, I1) to (I0 + I1, I0 − I1). A rotator by angle nπ/16 with gain k maps
(I0, I1) to:

    R0 =  I0·k·cos(nπ/16) + I1·k·sin(nπ/16)
    R1 = −I0·k·sin(nπ/16) + I1·k·cos(nπ/16)

All rotators, CORDIC or CSD, follow this same sign convention.

## The rotators

### π/16: CORDIC without compensation (`cordic_pi16`)

```
x1 = x  + (y  >>> 3)    y1 = y  - (x  >>> 3)
xo = x1 + (y1 >>> 4)    yo = y1 - (x1 >>> 4)
```

This uses four adders and no multiplier. Its gain, √(1+2⁻⁶)·√(1+2⁻⁸) = 1.0097, is close enough
to one that it is simply accepted.

### 3π/16: CORDIC with compensation (`cordic_3pi16`)

```
x1 = x  + (y  >>> 1)    y1 = y  - (x  >>> 1)
x2 = x1 + (y1 >>> 3)    y2 = y1 - (x1 >>> 3)
xo = x2 · 3635/4096     yo = y2 · 3635/4096
```

The two micro-rotations, atan(½) + atan(⅛), give 33.69°. Their gain is 1.1267, which is too
large to ignore.

The compensation cannot be pushed to the outputs. The two outputs of this rotator are added in
the next stage to the outputs of the π/16 rotator, whose gain is 1.0097. Both operands of those
additions must carry the same gain. So the compensation is one CSD multiplier per output, inside
the block. Its constant is 3635 = 2¹² − 2⁹ + 2⁶ − 2⁴ + 2² − 2⁰, which is 1/1.1267 with 12
fractional bits.

The choice of shifts (1, 3) and the placement of this compensation are this design's own.

### √2·C6 (3π/8): CSD rotator (`csd_rotator`)

This is the direct form: four constant multipliers, one adder for R0 and one subtractor for R1.
It has no pre-addition, so no intermediate value grows beyond the output range, and the critical
path is one multiplier plus one adder. Its constants are √2·cos(3π/8) and √2·sin(3π/8), stored
as `floor(c·4096)`:

| constant | value | binary | CSD (digits −1/0/+1) | adders |
|---|---|---|---|---|
| √2·sin(3π/8) = 1.30656 | 5351 | 1.010011100111 | 1.0101 00−10 100−1 | 6 terms instead of 8 |
| √2·cos(3π/8) = 0.54120 | 2216 | 0.100010101000 | same, no adjacent ones | 4 terms |
| √2 = 1.41421 | 5792 | 1.011010100000 | 10.−0−010100000 | 5 terms either way |

### CSD multiplication (`csd_const_mult`)

`csd_const_mult` computes `floor(a · COEF / 2^12)`. The function `dct_pkg::csd_encode` recodes
`COEF` into canonical signed digits at elaboration. The rule: an odd remainder that is 1 mod 4
takes digit +1, one that is 3 mod 4 takes digit −1. This rule never puts two non-zero digits
next to each other. The multiplier then adds or subtracts `a <<< i` for every non-zero digit `i`.

A new constant therefore needs only its integer. There are no digit strings to write by hand. A
built-in assertion checks that the digits add back up to the constant.

## Number format and widths

Defaults: `DATA_W = 8` input bits, `FRAC_W = 4` guard bits, `OUT_W = 12` output bits.

- Inputs are `DATA_W`-bit two's complement, for example level-shifted 8-bit pixels.
- Inside, every row is `DATA_W + 4` integer bits plus `FRAC_W` fraction bits: 16 bits by default.
  The DC term grows by 3 bits, and one more bit is margin for the CORDIC gain before
  compensation.
- All right shifts and all constant products truncate toward −∞.
- At the end, each output is rounded to the nearest integer (halves round up) and given in
  `OUT_W` bits.
- With the default widths no value overflows. The extreme outputs, for inputs of ±full scale, are −1024 and +1020.

## Interface and timing (`loeffler_dct8`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | rising-edge clock |
| `rst_n` | in | 1 | asynchronous, active-low reset; clears every register |
| `in_valid` | in | 1 | `x` carries a vector |
| `x[8]` | in | 8 × `DATA_W` signed | samples x[0..7] |
| `out_valid` | out | 1 | `X` carries a result |
| `X[8]` | out | 8 × `OUT_W` signed | coefficients X[0..7], natural order |

- **Latency:** a vector taken at a rising edge appears on `X`, with `out_valid` high, exactly 4
  rising edges later.
- **Throughput:** one vector per clock, i.e. 8 samples per clock.
- **Gaps:** cycles with `in_valid` low travel through the pipeline as `out_valid` low.
- **Idle datapath:** the data registers load only valid data, so an idle datapath does not
  toggle. This fits the low-power aim and lets synthesis insert clock gating.

The design was meant for 100 MHz in a 0.18 µm process. The longest stage is stage 2 or stage 3.
Stage 2 is two CORDIC steps plus the compensation multiplier. Stage 3 is one CSD multiplier plus
one adder.

## Departures and own choices

These parts follow the intended architecture:
- the Loeffler flow graph and its wiring;
- which rotator is CORDIC and which is CSD;
- the π/16 micro-rotations (shifts 3 and 4, no compensation);
- the 12-bit CSD constants.

These are this design's own choices:
- the 3π/16 micro-rotations and where their gain is compensated;
- the √2 scalers built as CSD multipliers;
- all word widths, guard bits and truncation/rounding rules;
- the four-stage pipeline with a valid bit, and the reset.

The 2-D DCT and the inverse DCT are not included. A 2-D 8×8 DCT needs a transpose buffer and a
second pass (or a second instance) around this 1-D core.

## Files

| file | contents |
|---|---|
| `rtl/dct_pkg.sv` | constants (with their formulas), CSD type, `csd_encode`, `csd_weight` |
| `rtl/butterfly.sv` | add/subtract pair |
| `rtl/csd_const_mult.sv` | CSD shift-add constant multiplier |
| `rtl/csd_rotator.sv` | four-multiplier rotator with CSD multipliers (√2·C6) |
| `rtl/cordic_pi16.sv` | π/16 CORDIC rotator |
| `rtl/cordic_3pi16.sv` | 3π/16 CORDIC rotator with compensation |
| `rtl/loeffler_dct8.sv` | top: the flow graph and the pipeline |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## Verification

Each testbench prints `TB_RESULT checks=N failures=M` at the end. A watchdog stops it if it hangs.

- **`tb_loeffler_dct8`** runs the top at its default parameters. It sends about 3000 vectors:
  random ones, full-scale ones with the worst sign patterns, and a ramp and some constants. The
  stream mixes back-to-back vectors with gaps, and is reset in the middle. Each result is compared
  two ways:
  - against a bit-exact model of the same fixed-point graph, written with ordinary
    multiplications;
  - against the exact DCT formula, within 10 LSB.

  The testbench also checks that the latency is exactly 4 clocks for every vector. It checks that
  no result is lost or appears after a reset. And it checks that back-to-back input, gaps,
  full-scale input and a reset actually occurred.
- **The unit testbenches** check each block bit-exactly against an independent model, and against
  the ideal rotation or product within a stated tolerance. `tb_csd_const_mult` also checks that
  the CSD recoding has no adjacent non-zero digits, and that 5351 needs only 6 terms.

To simulate with Verilator (5.x), for example the top:

```
verilator --binary --timing --assert -Irtl -Itb --top-module tb_loeffler_dct8 \
          rtl/dct_pkg.sv tb/tb_loeffler_dct8.sv
./obj_dir/Vtb_loeffler_dct8
```

For a unit test, swap in its testbench name. Verilator finds the other modules through `-Irtl`.
Each run takes well under a second.

## Changing it

- **Wider samples:** set `DATA_W`. The internal and output widths follow, and the bit-exact model
  in `tb_loeffler_dct8` uses its own `DATA_W` and `F` constants.
- **More precision:** raise `FRAC_W` for more guard bits. Raise `dct_pkg::CSD_FRAC` and the
  constants for more constant precision. The package comment gives the formula for each constant.
- **Another rotator:** `csd_rotator` takes any `K_COS`/`K_SIN` integer pair.
- **Another CORDIC:** copy one of the CORDIC modules and change its shifts. If its gain is far
  from one, add a compensation the way `cordic_3pi16` does.
