# Parity-SOS-ECC: four parallel FFTs that find and repair their own soft errors

When several FFTs run side by side on different signals, their linearity can be
used to protect them far more cheaply than by duplicating each one. This RTL
protects four 8-point complex FFTs with **one** extra FFT and **three**
sum-of-squares (Parseval) checks:

* A **parity FFT** transforms the sum of the four inputs. Because the FFT is
  linear, its output equals the sum of the four channel outputs, so any single
  channel can be rebuilt as `X_parity - (the other three outputs)`.
* Three **Parseval checks** say *which* channel is wrong. Each check covers
  three channels, chosen like the rows of a Hamming code, so that a faulty
  channel sets its own pattern of check flags.
* Each channel's output frame waits until its flags are known. It then
  leaves either as it was computed or, if the flags name that channel, as
  the rebuilt frame.

The FFTs and the checks use multipliers built after the Urdhva Tiryagbhyam
("vertically and crosswise") rule of Vedic arithmetic.

Everything is synthesizable SystemVerilog-2017 in `rtl/`, with a
self-checking testbench per module in `tb/`.

## Finding the faulty channel

By Parseval's theorem, the energy of a signal and the energy of its
transform agree. For the unscaled 8-point DFT used here, `sum_k |X[k]|^2 = 8 * sum_n |x[n]|^2`.
A single check compares the two sides of one transform. Here the checks are
put on *combinations* of channels instead of on each channel:

| check | input side          | output side         |
|-------|---------------------|---------------------|
| p1    | x1 + x2 + x3        | X1 + X2 + X3        |
| p2    | x1 + x2 + x4        | X1 + X2 + X4        |
| p3    | x1 + x3 + x4        | X1 + X3 + X4        |

The input-side combinations are formed before the FFTs (`input_encoder`) and
the output-side ones from the FFT outputs (`output_encoder`). A fault-free
bank satisfies all three checks, because the transform of a sum is the sum
of the transforms. A flag is 1 when its check fails. The flags
`{p1,p2,p3}` form the syndrome:

| syndrome | meaning                           | action                          |
|----------|-----------------------------------|---------------------------------|
| 000      | no error (or an error in the parity FFT) | outputs pass unchanged   |
| 111      | channel 1                         | channel 1 replaced by rebuild   |
| 110      | channel 2                         | channel 2 replaced by rebuild   |
| 101      | channel 3                         | channel 3 replaced by rebuild   |
| 011      | channel 4                         | channel 4 replaced by rebuild   |
| 100, 010, 001 | the check path itself        | outputs pass unchanged          |

The cost for k channels is one extra FFT and `1 + log2(k)` checks. A plain
Hamming protection needs `1 + log2(k)` extra FFTs. One check per channel
needs k checks. Neither of those two alternatives is part of this RTL.

### What a Parseval check cannot see

A check compares one number per frame, the total energy. If a fault changes
a bin value `C` to `C + e`, the energy changes by `e*(2C + e)`. This is near
zero when `C` is close to `-e/2`: the fault then escapes the check and the
syndrome is wrong. This blind spot belongs to the check method itself. In the
end-to-end test, about 1 in 100 randomly chosen high-bit flips falls into it.
The test draws such faults again and reports how many it drew.

The twiddle products are rounded, so a fault-free transform meets the
theorem only approximately. The comparator (`mag_compare`) therefore flags a
frame only when

    |8*E_in - E_out| > (max(8*E_in, E_out) >> TOL_SHIFT) + TOL_ABS

with `TOL_SHIFT = 10` and `TOL_ABS = 131072` by default. The relative term
covers large signals and the absolute term covers small ones. Flips of bit
15 and above in a 20-bit bin are seen at every amplitude, apart from the
blind spot above. Low-order
flips in full-scale frames stay below the tolerance and go undetected. Their
effect is of the order of the rounding noise. Lower `TOL_SHIFT`/`TOL_ABS` only
if you have measured the rounding error of your own configuration.

## Repairing it

`edc` (one instance per channel, `m8`..`m11`) stores each arriving output bin
twice, in one bank of a two-bank buffer:

* the bin as computed, `X_i`;
* the rebuild, `X_parity - sum of the other three X_j`.

When the syndrome of that frame arrives, the unit streams the frame out. It
takes the rebuild if the syndrome names its channel and the stored bins
otherwise. The rebuild comes from a different transform and is rounded
differently, so it differs from an error-free `X_i` by a few LSB. The test
measures at most 2 LSB from the exact DFT.

## Frame timing

All five FFTs and the three checks run in lock step on one `in_valid`. Frames
are 8 samples long. For a frame whose last sample enters in cycle `t`:

| cycle        | event                                                        |
|--------------|--------------------------------------------------------------|
| t            | 8th sample taken; the whole transform is computed and stored |
| t+1 .. t+8   | FFT bins 0..7 stream out into the checks and the `edc` buffers |
| t+9          | output-side energy complete                                  |
| t+10         | `syn_valid`, `syndrome`, `err_loc`                           |
| t+11 .. t+18 | corrected bins 0..7 on `y_re`/`y_im` with `y_valid`          |

Frames may follow each other back to back at one sample per cycle. Idle cycles
between samples are also allowed. Because a frame's output overlaps the next
frame's input, each check keeps up to two input energies in a small queue.
For the same reason each `edc` has two buffer banks.

## The FFT (`fft8`)

This is a radix-2 decimation-in-time network in one combinational block. It
takes the stored samples in bit-reversed order, with the current sample as
`x[7]`, and runs three butterfly stages. The result is stored in an output
buffer that streams bin k on cycle `t+1+k`. The twiddles `W8^0 = 1` and
`W8^2 = -j` are only wiring. `W8^1 = c(1-j)` and `W8^3 = -c(1+j)`, with
`c = cos(pi/4)`, need `c*(re+im)` and `c*(im-re)` of two values. Four
`scale_c45` units compute these products. Each forms `|v| * 92682` in a
Vedic multiplier, shifts right by 17 with rounding and restores the sign.
`92682 / 2^17` is `cos(pi/4)` to within 8e-7. Outputs are not scaled:
`OW = IW + 4` bits hold the full growth of an 8-point transform of `IW`-bit
inputs. With 16-bit inputs, bins are within 0.65 LSB of the exact DFT.

`fault_re`/`fault_im` are XORed onto the streamed bins. They exist only to
emulate soft errors in tests. Tie them to zero.

## The Vedic multipliers

`vedic_mult4` is the 4x4 cell. Product bit k is the low bit of the sum of
all partial products `a[i] & b[j]` with `i + j = k`, plus the carry left
by column k-1. These are the seven "vertical and crosswise" steps. All
partial products are generated at once. `vedic_mult` applies the same rule
one level up, to 4-bit digits: column k of the product adds the 8-bit digit
products `a_i * b_j` with `i + j = k` from `vedic_mult4` cells, plus the
carry. Widths are rounded up to a multiple of 4, with at least 20 bits so
the twiddle constant fits. Signed operands go through sign and magnitude.
The multipliers are used for the twiddle products (`scale_c45`) and for the
magnitude squares of the Parseval checks (`mag_square`).

## Modules

| module              | role                                                                    |
|---------------------|-------------------------------------------------------------------------|
| `parity_sos_ecc_fft`| top: 4 channel FFTs (`m1`..`m4`), parity FFT, encoders, 3 checks, 4 `edc` (`m8`..`m11`) |
| `fft8`              | streaming 8-point complex FFT                                           |
| `scale_c45`         | signed value times cos(pi/4), rounded, through a Vedic multiplier      |
| `vedic_mult`        | N x N unsigned Vedic multiplier from 4x4 cells                          |
| `vedic_mult4`       | 4 x 4 Urdhva Tiryagbhyam multiplier                                     |
| `input_encoder`     | x1+x2+x3, x1+x2+x4, x1+x3+x4 and x1+x2+x3+x4                            |
| `output_encoder`    | X1+X2+X3, X1+X2+X4, X1+X3+X4                                            |
| `parseval_check`    | magnitude squares, two accumulators, energy queue, comparator -> flag p |
| `mag_square`        | re^2 + im^2                                                             |
| `energy_acc`        | per-frame sum of squared magnitudes                                     |
| `mag_compare`       | tolerant energy comparator                                              |
| `edc`               | per-channel frame buffer and rebuild selection                          |
| `fft_pkg`           | sizes, twiddle constant, `err_loc_e` and the syndrome decoder           |

## Top-level interface (`parity_sos_ecc_fft`)

| port                     | dir | width       | meaning                                             |
|--------------------------|-----|-------------|-----------------------------------------------------|
| `clk`, `rst`             | in  | 1           | clock; synchronous active-high reset                |
| `in_valid`               | in  | 1           | one sample of each channel this cycle              |
| `x_re[4]`, `x_im[4]`     | in  | IW (16)     | channel samples: 16-bit real + 16-bit imaginary, a 32-bit word |
| `y_valid`                | out | 1           | corrected bins valid                                |
| `y_re[4]`, `y_im[4]`     | out | OW (20)     | corrected bins, natural order                      |
| `corrected`              | out | 4           | channel i's current frame is the rebuild          |
| `syn_valid`              | out | 1           | one pulse per frame                                 |
| `syndrome`               | out | 3           | `{p1,p2,p3}`, 1 = check failed                     |
| `err_loc`                | out | `err_loc_e` | decoded location                                   |
| `fault_re[5]`, `fault_im[5]` | in | OW+2    | XOR onto FFT outputs (index 4 = parity FFT); test only |
| `fault_chk[3]`           | in  | OW+2        | XOR onto the real part of each check's output combination; test only |

Parameters: `IW` (16), `OW` (`IW+4`), `TOL_SHIFT` (10), `TOL_ABS` (131072).
The transform size of 8 is fixed by the butterfly network.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. The
package must come first:

    verilator --binary --timing --assert -Wno-fatal -y rtl +libext+.sv \
        --top-module tb_parity_sos_ecc_fft rtl/fft_pkg.sv tb/tb_parity_sos_ecc_fft.sv
    ./obj_dir/Vtb_parity_sos_ecc_fft

`-y rtl` lets verilator find each module in `rtl/<module>.sv`. The same
command works for any `tb/tb_<module>.sv`. The simulator has only two states, so the
testbenches reset or initialise everything they read.

`tb_parity_sos_ecc_fft` runs the top at its default parameters for 3000
frames. The frames use full-scale, 1/16 and 1/256 amplitudes, mostly back to
back and sometimes with idle cycles. It rotates through nine scenarios: no
fault, a fault in each of the four channel FFTs, in the parity FFT, and in
each of the three check paths. It compares every bin with a floating-point
DFT, within 1.5 LSB, or 4 LSB for a rebuilt channel. It also checks every
syndrome and the latencies above. Each scenario must occur and be handled
correctly at least once. The module testbenches check:

* the multipliers, exhaustively or against integer products;
* `fft8` against a floating-point DFT, including full-scale frames, idle
  cycles and a fault pattern;
* the checks, encoders and `edc` against models of their own.

## Design choices beyond the scheme itself

The scheme fixes the structure, the check combinations, the syndrome table,
the rebuild formula, the 8-point size, the 32-bit samples and the use of
Vedic multipliers. The following are this implementation's own choices:

* A 32-bit input sample is read as a complex number with 16-bit real and
  16-bit imaginary parts.
* Streaming interface: one `valid` for all channels, no back-pressure, and
  a synchronous active-high reset that clears only the control state.
* The FFT architecture, the twiddle precision (17 fraction bits) and the
  rounding. There is no output scaling.
* Energies are compared with a tolerance, because the rounded transform
  meets Parseval's theorem only approximately. The flag polarity is
  1 = error.
* Frames are held in per-channel buffers until their syndrome arrives. This
  adds about one frame of latency.
* The parity FFT is unprotected by design. A fault there sets no flag and
  changes no output. A fault in a check path sets a one-hot syndrome and is
  ignored.
* Only single faults per frame are handled. Two faulty channels in one frame
  give a wrong syndrome and a wrong repair.
* The `fault_*` ports are test hooks.
