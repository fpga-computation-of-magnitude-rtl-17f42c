# Pipelined CORDIC magnitude calculator with ROM correction

This block computes the magnitude `sqrt(x² + y²)` of a complex sample whose
real and imaginary parts are 12-bit unsigned integers. A typical use is the
output of a fixed-point FFT or complex FIR filter. It uses no square root and
no general multiplier. Five unrolled integer CORDIC vectoring iterations turn
the vector almost onto the x axis. A 64-word ROM then corrects for the small
angle that is left. One multiplication by the constant 0.6076 removes the
CORDIC gain. The pipeline takes one sample per clock and returns the rounded
magnitude 7 clocks later.

Over all 4096 × 4096 input pairs, the result is never more than **4.65** from
the exact magnitude. Without the correction the figure is **11.73**: plain
five-iteration CORDIC with the same scaling.

## Datapath

```
 x_in,y_in (12b unsigned)
      │
 cordic_stage0     k=0  x1 = x0 + y0          y1 = y0 − x0            ─┐
 cordic_stage #1   k=1  x ± (y >>> 1)          y ∓ (x >> 1)             │ 15-bit
 cordic_stage #2   k=2  x ± (y >>> 2)          y ∓ (x >> 2)             │ two's
 cordic_stage #3   k=3  x ± (y >>> 3)          y ∓ (x >> 3)             │ complement
 cordic_stage #4   k=4  x ± (y >>> 4)          y ∓ (x >> 4)            ─┘
 correction_stage       x_corr = x5 + ROM[ x5[13:11], min(|y5|>>6, 7) ]
 const_mult             mag = round(x_corr × 39820 / 2^16)       (13b)
```

Each row is one register stage. The valid flag runs alongside the data.
Nothing in the pipeline can stall.

### The iterations

Every iteration is a pseudo-rotation of the vector by ±atan(2⁻ᵏ). The sign is
chosen so that |y| shrinks:

| sign of y(k) | x(k+1)              | y(k+1)             |
|--------------|---------------------|--------------------|
| y ≥ 0        | x(k) + (y(k) >>> k) | y(k) − (x(k) >> k) |
| y < 0        | x(k) − (y(k) >>> k) | y(k) + (x(k) >> k) |

- **Iteration 0.** It has no shift. Both inputs are non-negative, so this
  step is always the 45° clockwise rotation `x1 = x0 + y0`, `y1 = y0 − x0`.
  The subtraction is done as `y0 + ~x0 + 1` on 13 bits, then sign-extended.
- **Iterations 1–4.** The shift truncates toward minus infinity, because it
  is an arithmetic shift of the two's complement word. The signal `x` stays
  non-negative throughout; an assertion checks this.
- **Subtraction.** Each subtraction is an addition of the inverted operand
  with a carry-in of 1. A multiplexer driven by the sign of `y` picks which
  operand is inverted.

Word growth:

- x5 is at most 9527 and fits in 14 bits.
- |y5| is at most 545.
- A 15-bit signed internal word is enough everywhere.

### The correction

After five iterations the vector is still up to about atan(2⁻⁴) ≈ 3.6° off
the axis. So x5 underestimates the scaled length by roughly

    sqrt(x5² + y5²) − x5  ≈  y5² / (2·x5)  ≈  |y5| · atan(|y5| / x5) / 2

At the largest inputs this is up to about 18 before scaling. It is the main
error of a five-stage CORDIC. A full-precision version of this term would
need a divider or a multiplier. Instead, the term is read from a table
addressed by coarse versions of both coordinates:

- **x index:** the three most significant bits of the 14-bit x5, i.e. bins of
  2048.
- **y index:** |y5| / 64, three bits, i.e. bins of 64. The few samples with
  |y5| ≥ 512 are clamped to index 7. The `y_sat` output flags them.
- **Word (xi, yi):** `round(yc · atan(yc/xc) / 2)`, with the bin centres
  `xc = (xi + 0.5)·2048` and `yc = (yi + 0.5)·64`.

Some words can never be reached, for example a large y with a small x. They
hold the formula's value anyway.

The words are computed during elaboration by a constant function
(`cordic_pkg::corr_entry`), so no data file is involved. Their values range
from 0 to 105.

### Scaling

Five iterations with shifts 0…4 lengthen the vector by
K = ∏ sqrt(1 + 2⁻²ᵏ) ≈ 1.6425. The design multiplies by the fixed constant
0.6076, held as 39820/2¹⁶, and rounds to the nearest integer. That is
slightly below 1/K = 0.6088. The ROM correction and the truncation bias of
the shifts partly absorb the difference.

## Accuracy

Measured by `tb_cordic_magnitude_full`, which runs all 16.8 million pairs, for
1 ≤ x, y ≤ 4095:

| variant                                | max. error | at (x, y)      |
|----------------------------------------|-----------:|----------------|
| five iterations, × 0.6076, no ROM      | 11.73      | (4088, 3386)   |
| five iterations, ROM correction (this) | 4.65       | (4072, 3370)   |

The largest errors occur for large inputs whose angle, after stage 4, ends
near ±3.6°. A finer y index would lower the error most. The x index matters
less, since only x5 > 4096 produces large |y5|. A finer y index means more
ROM address bits.

The published description of this architecture reports a maximum error of
about 2.5 for a 6-bit-address correction table. That figure is **not**
reached here. The exact quantisation and ROM contents behind it are not
known. Even a table whose 64 words were individually optimised for this
addressing scheme would give about 3.1–3.4, so a different addressing was
probably used.

## Interface and timing (`cordic_magnitude`)

| port        | dir | width | meaning                                                |
|-------------|-----|-------|--------------------------------------------------------|
| `clk`       | in  | 1     | clock, rising edge                                     |
| `rst_n`     | in  | 1     | asynchronous active-low reset                          |
| `in_valid`  | in  | 1     | `x_in`, `y_in` hold a sample this clock                |
| `x_in`      | in  | 12    | real part, unsigned                                    |
| `y_in`      | in  | 12    | imaginary part, unsigned                               |
| `out_valid` | out | 1     | `mag` is valid; `in_valid` delayed by 7 clocks         |
| `mag`       | out | 13    | rounded magnitude, 0 … 5791                            |
| `y_sat`     | out | 1     | this sample's ROM y index was clamped (diagnostic)     |

- **Throughput:** one sample per clock, with no back-pressure.
- **Latency:** `N_ITER + 2` clocks, 7 by default.
- **Inputs:** unsigned. For signed samples, take the absolute values first.
  The magnitude does not depend on the quadrant.
- **Critical paths:** between registers there is at most:
  - one 15-bit adder with a multiplexer;
  - the ROM plus a 15-bit adder;
  - a 15 × 16-bit constant multiplication.

## Parameters

All defaults live in `rtl/cordic_pkg.sv`:

| name      | default | meaning                                          |
|-----------|---------|--------------------------------------------------|
| `IN_W`    | 12      | input width                                      |
| `INT_W`   | 15      | internal two's complement width                  |
| `N_ITER`  | 5       | unrolled iterations (shifts 0 … N_ITER−1)        |
| `OUT_W`   | 13      | output width                                     |
| `XA_BITS`, `YA_BITS`, `YA_LSB` | 3, 3, 6 | ROM addressing                   |
| `K_FRAC`, `K_INV` | 16, 39820 | inverse gain 0.6076 in fixed point      |

The ROM addressing is sized for 12-bit inputs and five iterations. If you
change `IN_W` or `N_ITER`, re-derive the range of |y| after the last stage and
choose `YA_LSB` to match. Also widen `INT_W` to `IN_W + 3`. Then re-run the
exhaustive testbench, or a random one for wider inputs.

## Where this follows the source architecture and where it does not

**Taken from the source architecture:**

- 12-bit unsigned inputs and a 15-bit internal word.
- Five unrolled iterations with shifts 0…4, truncated by arithmetic shifts.
- The first stage built as an adder plus a subtractor with inverted operand
  and carry-in.
- Inverter/multiplexer/adder stages selected by the sign of y.
- A 64-word ROM addressed by 3 bits of x5 and 3 bits of y5/64, holding an
  angle correction of the form y·atan(y/x)/2.
- A single multiplication by the constant 0.6076.

**Choices made here:**

- **Rotation direction.** Read literally, the source's sign convention for
  the rotation would not shrink |y|. The standard vectoring direction, which
  drives |y| toward zero, is used.
- **Sign extension.** y1 is sign-extended rather than zero-extended.
- **x index scale.** The source states both "3 msbs of x5" and a quantisation
  step of 512. x5 reaches 9527, so a step of 512 would need 5 bits. The 3-msb
  form (step 2048) is used, which keeps the 6-bit address.
- **ROM contents.** The words are evaluated at bin centres, and the y index
  is clamped. The correction is added to x5 before the multiplication.
- **Fixed-point details.** The constant is held in Q0.16, the output is
  rounded, the output is 13 bits wide, and there is one register per stage.
- **Control signals.** The valid flag, the reset and the `y_sat` output are
  additions of this design.
- **Speed.** The source reports 100 MHz on a Xilinx FPGA. That has not been
  checked here.

## Files

| file                          | content                                         |
|-------------------------------|-------------------------------------------------|
| `rtl/cordic_pkg.sv`           | widths, constants, ROM word formula             |
| `rtl/cordic_stage0.sv`        | iteration 0 (adder / subtractor)                |
| `rtl/cordic_stage.sv`         | iteration k ≥ 1, `SHIFT` parameter              |
| `rtl/corr_rom.sv`             | 64-word correction table                        |
| `rtl/correction_stage.sv`     | ROM address formation, correction adder         |
| `rtl/const_mult.sv`           | × 0.6076 with rounding                          |
| `rtl/cordic_magnitude.sv`     | top level                                       |
| `tb/cordic_ref_pkg.sv`        | bit-true reference model, exact magnitude       |
| `tb/tb_<block>.sv`            | self-checking test per block                    |
| `tb/tb_cordic_magnitude.sv`   | end-to-end stream with idle cycles and latency checks |
| `tb/tb_cordic_magnitude_full.sv` | exhaustive 12-bit accuracy run (≈10 s)       |

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself. A
watchdog counts a failure if the test hangs.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```sh
verilator --binary --timing -Wno-fatal -Irtl -Itb -y rtl -y tb \
    rtl/cordic_pkg.sv tb/cordic_ref_pkg.sv tb/tb_cordic_magnitude_full.sv \
    --top-module tb_cordic_magnitude_full -o sim
./obj_dir/sim
```

To run another test, replace the testbench file and `--top-module`. To lint
the design alone:

```sh
verilator --lint-only -Wall -Irtl -y rtl rtl/cordic_pkg.sv rtl/cordic_magnitude.sv
```

The remaining lint warnings are deliberate:

- The low bits of |y| are not used by the ROM address.
- `rst_n` appears both as the asynchronous reset and in the assertions'
  `disable iff`.
