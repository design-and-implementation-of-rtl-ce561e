# Fully parallel 256-point radix-4 FFT with shift-add twiddles

A coherent optical receiver that compensates chromatic dispersion in the
frequency domain has to transform its samples as fast as the ADCs deliver
them. Data arrives continuously and cannot be buffered for long, so a
streaming FFT that takes one sample per clock, as most FFT cores do, falls
further behind with every frame. This core is the opposite: **all 256
complex samples of a frame enter in one clock, and all 256 bins leave
together nine clocks later.** A new frame can enter on every clock. At a
312.5 MHz frame clock that is 80 Gsample/s of complex data.

Three ideas keep such a core buildable in FPGA logic:

* **Radix 4.** A 256-point transform needs only log4(256) = 4 stages. The
  internal factors of a radix-4 node are +-1 and +-j, so they cost no
  multiplier, only swaps and sign changes.
* **Constant twiddles as shift-add logic.** The structure is fully
  parallel, so every twiddle multiplier always sees the same twiddle
  factor. Each factor is therefore a constant, scaled to an integer, and is
  built from shifters and adders. No DSP blocks and no lookup RAM are used.
* **Time-shared multipliers.** A complex product needs four real products.
  Each twiddle branch has only two constant multipliers, one for Cb and one
  for -Sb. They run on a clock of twice the frame rate and are used twice
  per frame.

The architecture follows Polat, Ozturk and Yakut, *Design and
Implementation of 256-Point Radix-4 100 Gbit/s FFT Algorithm into FPGA for
High-Speed Applications*. This RTL was written from that description. The
section "Where this RTL departs from or adds to the published design" lists
what was filled in here.

## Data flow

```
 i_in/q_in ──► input ──► stage 1 ──────────► stage 2 ──► stage 3 ──► stage 4 ──► digit   ──► output ──► i_out/q_out
 256 x 5 bit   reg       adder │ multiplier   (same)      (same)      adder      reversal    reg        256 x 14 bit
                         block │ block                                block      (wiring)
   clk:          1         2        3          4   5       6   7        8                      9
```

| clock | what is registered                                      |
|-------|---------------------------------------------------------|
| 1     | input frame                                             |
| 2, 4, 6 | adder block of stage 1, 2, 3 (64 dragonfly adders each) |
| 3, 5, 7 | multiplication block of stage 1, 2, 3                  |
| 8     | adder block of stage 4 (no twiddles)                    |
| 9     | bins in natural order                                   |

`out_valid` is `in_valid` delayed by exactly nine clocks.

### Which samples meet where

The stages use the usual in-place decimation-in-frequency order. In stage
`s` (0-based) the span is `L = N / 4^(s+1)`: 64, 16, 4, 1. Dragonfly `d`
(0 to 63) has offset `j = d mod L` and base `(d / L)*4L + j`. It reads the
samples at `base + q*L` for `q = 0..3` and writes its four results back to
the same positions. Result `q` is then multiplied by `W_256^(q*j*4^s)`, where
`W_N^n = exp(-j 2 pi n / N)`.

After four stages, position `p` holds bin `k`, where `p` is `k` with its
four base-4 digits reversed. The output register reads position
`digit_rev4(k)` for bin `k`. This reordering is only wiring.

## The dragonfly adder (`r4_adder_subblock`)

The adder takes `a, b, c, d = x(n), x(n+N/4), x(n+N/2), x(n+3N/4)`, each
with a real part `x` and an imaginary part `y`. It produces:

| output | real            | imaginary       | complex            |
|--------|-----------------|-----------------|--------------------|
| 0      | xa+xb+xc+xd     | ya+yb+yc+yd     | a + b + c + d      |
| 1      | xa+yb-xc-yd     | ya-xb-yc+xd     | a - jb - c + jd    |
| 2      | xa-xb+xc-xd     | ya-yb+yc-yd     | a - b + c - d      |
| 3      | xa-yb-xc+yd     | ya+xb-yc-xd     | a + jb - c - jd    |

Output 0 always has twiddle 1. The real and imaginary parts of outputs 1 to
3 are the operands `P` and `T` of the twiddle multiplication. Eight shared
sums and differences (xa+xc, xa-xc, ...) feed the eight results, and the
results are registered.

## The twiddle multiplication block (`twiddle_mult`)

This block computes

```
xb' = P*Cb - T*(-Sb)
yb' = T*Cb + P*(-Sb)
```

Here `W = Cb + j(-Sb)`, and `Cb = round(1024 cos theta)` and
`Sb = round(1024 sin theta)` are elaboration-time constants (`fft_pkg::tw_cos`,
`tw_sin`). For `N = 256` the first factors are 1024+0j, 1024-25j, 1023-50j,
1021-75j and so on. With a scale of 1024, neighbouring angles still map to
different integers; with 16 or 64 several of them would coincide.

### Sign-magnitude arithmetic

The constant multipliers (`shift_add_mult`) work on unsigned numbers. The
block splits `P` and `T` into sign and magnitude ("ABS"), and uses the
magnitude of each coefficient. It multiplies the magnitudes by adding one
shifted copy of the operand for each 1 bit of the constant. For example,
84·x = 4x + 16x + 64x. On the way out ("Return ABS"), the product magnitude
is divided by 1024, rounding to nearest with halves rounded up. Then the
sign is put back: the sign of the operand XOR the sign of the coefficient.
So each product is rounded to the nearest integer, with halves rounded away
from zero.

### Two passes per frame clock

Only two constant multipliers exist per branch: `×|Cb|` and `×|Sb|`. They
run on `clk2x`. The helper `clk2x_phase` provides `first_half`, which is 1
during the `clk2x` period that starts at a `clk` edge.

```
clk        ‾‾‾‾‾‾‾‾‾|_________|‾‾‾‾‾‾‾‾‾|_________|
clk2x      ‾‾‾‾|____|‾‾‾‾|____|‾‾‾‾|____|‾‾‾‾|____|
first_half ‾‾‾‾‾‾‾‾‾|_________|‾‾‾‾‾‾‾‾‾|_________|
P, T       ====== frame A =====X===== frame B =====X
           pass 1:  ×Cb <- |P|, ×Sb <- |T|
                    edge M: store |P|,|T| (input regs) and P·Cb, T·(-Sb) (output regs)
                    pass 2: ×Cb <- stored |T|, ×Sb <- stored |P|
                              edge E (= next clk edge):
                              xb' <= P·Cb - T·(-Sb)   (from the output regs)
                              yb' <= T·Cb + P·(-Sb)   (from the multipliers)
```

The operands cross between the passes: in pass 2, `T` goes to the `Cb`
multiplier and `P` to the `-Sb` multiplier. That is what produces `yb'`
while the stored pass-1 products produce `xb'`. Both results are registered
at the `clk2x` edge that is also a `clk` edge. They then stay stable for a
whole `clk` period, like any other `clk` register. The block has a latency
of one frame clock.

When `theta = 0` (exponent 0 mod N), there is nothing to multiply. The
branch is a plain `clk` register with the same latency. This covers output 0
of every dragonfly and every output with `j = 0`. Of the 256 branches per
stage, 189, 180 and 144 are real multipliers in stages 1, 2 and 3. The other
angles that would be trivial (90°, 180°, 270°) are not special-cased; their
shift-add multipliers reduce to a wire or to nothing.

## Number format and accuracy

* **Inputs** are `IN_W = 5`-bit two's complement, matching 5-bit ADCs.
* **No scaling:** the core computes `X(k) = sum x(n) W^kn`. A constant input
  `v` gives `X(0) = 256 v` exactly.
* **Word growth:** stage outputs are 8, 10, 12 and 14 bits wide
  (`fft_pkg::stage_w`). Each adder block adds 2 bits. One extra bit is added
  after stage 1, because a rotation can move the full magnitude
  `sqrt(2)·max(|re|,|im|)` into one component. Overflow cannot occur for any
  input.
* **Error** comes from the rounded twiddles and from rounding each product
  to an integer. The table gives the mean absolute error (MAE) over 2048
  random full-scale bins per configuration. Random inputs change from run
  to run, so the values move by a few percent. `tb_fft_table2` checks the
  two rows with small factors, and `tb_fft256_r4` the 5-bit/1024 row. The
  8-bit/1024 row was measured with the same helper (`fft_mae_probe`) at
  `IN_W = 8`, `TW_FRAC = 10`. The published MAE values are given for
  comparison; their test vectors are not available.

| input bits | expanding factor | MAE real / imag, this RTL | published MAE real / imag |
|-----------:|-----------------:|--------------------------:|--------------------------:|
| 5          | 1024             | 2.33 / 2.31               | 1.11 / 1.18               |
| 5          | 16               | 4.3 / 4.3                 | 3.45 / 3.94               |
| 8          | 1024             | 2.49 / 2.42               | 1.20 / 1.28               |
| 8          | 64               | 9.5-9.8 / 9.7-9.8         | 9.80 / 9.06               |

At small expanding factors the error from the coarse twiddles dominates,
and this RTL agrees with the published figures. At 1024, the remaining
error comes from rounding each product to an integer, and it is about twice
the published value. The published design does not say how it rounds. Any
scheme with more fractional bits between stages would lower this floor. The
largest single error seen on full-scale random input is about 12. The
unscaled output range is ±8191.

## Clocks and reset

* `clk` is the frame clock (312.5 MHz is the target; timing is not checked
  here).
* `clk2x` must have twice the frequency of `clk`, with every rising edge of
  `clk` also a rising edge of `clk2x`. In an FPGA, both come from one PLL or
  MMCM. Paths from `clk` registers into the multiplier get one `clk2x`
  period (half a `clk` period); the multiplier outputs are read by `clk` logic a full `clk`
  period later.
* `rst_n` is asynchronous and active low. It clears the `out_valid`
  pipeline and the `clk2x` phase tracker. Data registers have no reset.
  Outputs are defined on the ninth clock after the first frame, as
  `out_valid` shows. After reset the phase tracker is valid from the first
  `clk` edge.

## Where this RTL departs from or adds to the published design

Taken from the published design:
* 4 stages: adder block plus multiplier block, and an adder-only last stage.
* 64 dragonfly adder sub-blocks per stage, with the output equations above.
* Constant shift-add multipliers on magnitudes with ABS and Return ABS.
* The two-pass schedule on a double-rate clock.
* The register-only theta = 0 path.
* 5-bit inputs, twiddles scaled by 1024, and a nine-clock latency.

Chosen here, because the description does not fix them:
* Where the nine registers sit.
* Round-to-nearest for each product. Truncation toward zero was also
  tried: it gives an MAE of about 5.8 at the main configuration.
* Internal and output word widths.
* The `in_valid`/`out_valid` signals and the reset.
* The `first_half` phase mechanism.
* The natural-order output, made by digit-reversal wiring.
* The index mapping, which is the standard in-place radix-4 DIF order.

Not included:
* The ADC, GTX transceiver and bit-reordering front end that would turn the
  serial lanes of a real receiver into 256-sample frames.
* The dispersion equaliser and the inverse FFT that would follow the core.
* FPGA timing and resource figures. The published Virtex-6 result of
  123,406 registers and 213,700 LUTs at 336 MHz cannot be reproduced
  without vendor tools. Generic synthesis of this RTL gives about 78,000
  flip-flop bits.

## Files

| file | contents |
|------|----------|
| `rtl/fft_pkg.sv` | twiddle constants, word widths, log4, base-4 digit reversal |
| `rtl/fft256_r4.sv` | top: input register, four stages, digit reversal, output register, valid pipeline |
| `rtl/fft_stage.sv` | one stage: 64 adder sub-blocks and 256 twiddle branches (none in the last stage) |
| `rtl/r4_adder_subblock.sv` | dragonfly additions |
| `rtl/twiddle_mult.sv` | two-pass constant complex multiplier, or a register when theta = 0 |
| `rtl/shift_add_mult.sv` | unsigned constant multiplier built from shifts and adds |
| `rtl/clk2x_phase.sv` | tells clk2x logic which half of the clk period it is in |
| `tb/tb_*.sv` | self-checking testbenches, one per module, plus `tb_fft_table2` |
| `tb/fft_mae_probe.sv` | helper for `tb_fft_table2`: drives one FFT configuration and measures its error |

Parameters of `fft256_r4`: `N` (a power of 4, default 256), `IN_W`
(default 5) and `TW_FRAC` (log2 of the expanding factor, default 10). The
output width is `IN_W + 2*log4(N) + 1`. The RTL is written for any power
of four; the whole core has been simulated at N = 256, and single stages at
N = 16.

## Simulating

All testbenches are self-checking and end with a line
`TB_RESULT checks=<n> failures=<m>`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/fft_pkg.sv tb/tb_fft256_r4.sv --top-module tb_fft256_r4
./obj_dir/Vtb_fft256_r4
```

Replace the testbench name to run another one. `tb_fft_table2` also needs
`-y tb`.

* `tb_fft256_r4` runs the full-size core (about a minute to build, under a
  second to run). It checks the following:
  * An impulse and a constant frame, which must come out exactly.
  * 24 random full-scale frames, back to back and around idle gaps. Each
    frame is compared bin for bin with a bit-exact sequential model and with
    a double-precision DFT (within ±16, MAE below 3).
  * Latency of exactly nine clocks.
  * That both multiplier passes, back-to-back frames, idle gaps and the
    bypass paths were all exercised.
* `tb_fft_stage` checks a 16-point stage with multipliers and a last stage
  against an in-place reference.
* `tb_twiddle_mult` checks the twiddles W^0, W^1, W^64 = -j and W^160 with a
  new operand every clock.
* `tb_r4_adder_subblock`, `tb_shift_add_mult` and `tb_clk2x_phase` test
  their modules alone.
* `tb_fft_table2` runs two 256-point configurations, 5-bit inputs with a
  factor of 16 and 8-bit inputs with a factor of 64. Each must match the
  bit-exact model, and its MAE must fall in a band around the published
  value. It takes about three minutes to build.
