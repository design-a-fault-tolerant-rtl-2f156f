# Fault-tolerant parallel FFTs: parity FFT, energy checks and Razor flip-flops

Signal-processing chips often run several identical FFTs side by side. Duplicating or
triplicating each one to survive soft errors is expensive. This design protects four parallel
8-point FFTs against a soft error in any one of them with much less:

* one extra **parity FFT**, which transforms the sum of the four input frames;
* three **sum-of-squares (Parseval) checks**, arranged like an error-correcting code so that
  their pass/fail pattern names the faulty FFT;
* a **corrector** that rebuilds the faulty FFT's spectrum as parity output minus the other three.

On top of that, the register that captures the FFT results is built from **Razor flip-flops**.
A result that settles too late for the clock edge is caught by a shadow latch on a delayed clock,
flagged, and put back one cycle late instead of being passed on wrong.

The four FFTs take 32-bit signed complex samples: 32 bits of real part and 32 bits of imaginary
part.

## How an error is found and repaired

Write `x_f` for the input frame of FFT `f` (f = 0..3) and `X_f` for its spectrum.

**Parity FFT.** The FFT is linear, so `P = FFT(x_0 + x_1 + x_2 + x_3) = X_0 + X_1 + X_2 + X_3`.
If exactly one FFT `f` is wrong, its spectrum is `X_f = P - sum of the other three`. The parity FFT
only repairs. It cannot say which FFT is wrong.

**Parseval checks.** For an unscaled 8-point DFT, `sum_k |X[k]|^2 = 8 * sum_n |x[n]|^2`. The time
side needs no FFT. It is just the energy of the samples. Each check applies this identity to the
*sum* of three FFTs. It compares the energy of `X_a + X_b + X_c` with 8 times the energy of
`x_a + x_b + x_c`:

| check | covers FFTs | FFT 0 faulty | FFT 1 faulty | FFT 2 faulty | FFT 3 faulty |
|-------|-------------|:------------:|:------------:|:------------:|:------------:|
| 0     | 0, 1, 2     | fails        | fails        | fails        | –            |
| 1     | 0, 1, 3     | fails        | fails        | –            | fails        |
| 2     | 0, 2, 3     | fails        | –            | fails        | fails        |

Each FFT has its own syndrome, and every such syndrome has at least two bits set (FFT 0: `111`,
FFT 1: `011`, FFT 2: `101`, FFT 3: `110`). A syndrome with a single bit set cannot come from one
faulty FFT. It means that a check itself is faulty. The design reports it as `check_err` and
leaves the outputs alone. A fault in the parity FFT trips no check and changes no output. The map
is `SOS_ECC_MAP` in `ft_fft_pkg`.

**Correction.** `sos_ecc_decoder` turns the syndrome into a one-hot `err_fft`.
`fft_corrector` replaces every bin of that FFT with `P - sum of the others`, saturated to the
output width.

The scheme corrects one faulty FFT per frame set, however many of its bins or bits are wrong. Two
faulty FFTs in the same set give a wrong location or a wrong repair.

## The detection threshold

This is the least obvious part of the design. The FFTs are fixed point, so the two sides of
Parseval's identity are never exactly equal:

* `1/sqrt(2)` (used for `W8^1` and `W8^3`) is held as `round(2^30/sqrt(2))`. This makes the
  transform very slightly non-unitary, giving an energy error that grows with the energy
  (relative size about 2^-30).
* The two rotated products are rounded to the nearest integer. This puts up to about 2 LSB on
  each odd bin. Its effect on the energy grows only with the square root of the energy.

`parseval_check` therefore flags a mismatch only when

    |E_out - 8*E_in| > (8*E_in >> TOL_SHIFT) + TOL_ABS,   TOL_SHIFT = 16, TOL_ABS = 2^24

The relative term covers the twiddle quantisation with a wide margin. For check sums of three
FFTs, the absolute term is large enough that the rounding term never exceeds the threshold at any
energy. The tolerance must exceed about `144 * 2^TOL_SHIFT`, so keep `TOL_ABS` above that if you
change `TOL_SHIFT`.

The price is that small errors pass unseen. A flipped bit changes the energy by about
`2*|X|*2^b`. At full-scale input (about 2^70 energy per check) only flips in roughly bit 22 and
above of a 36-bit bin are caught. On smaller signals the threshold falls and lower bits are
caught too. This is the usual property of Parseval checks: they catch the errors that matter
numerically, not every error. The parity-based correction is exact up to a few LSB of rounding.

## Razor register and re-execution

All stage-1 results go into one `razor_ff` bank, 3129 bits wide. That covers the four spectra,
the parity spectrum, the three input-side energies and `in_valid`. Each bit has four parts:

* a main flip-flop on `clk`;
* a shadow latch that is transparent while `clk_del` is high;
* a comparator;
* a multiplexer in front of the main flip-flop.

With a 10 ns clock and `clk_del` 3 ns behind it:

```
clk      ‾‾‾‾‾|_____|‾‾‾‾‾|_____|‾‾‾‾‾
clk_del  ___|‾‾‾‾‾|_____|‾‾‾‾‾|_____|
         edge k    ^ shadow closes (k+8 ns): error sampled
                             edge k+1: main FF reloads from shadow
```

Data that settles after edge k but before `clk_del` falls ends up in the shadow latch but not in
the main flip-flop. At the falling edge of `clk_del` the difference is registered as
`razor_error`. At edge k+1 the main flip-flop loads the shadow value, so the correct result
appears one cycle late. In that same edge the output register takes nothing, and the input frame
set on the ports is **not** accepted. The source must hold it for one more cycle: this is the
re-execution. The comparison is skipped for the cycle after a recovery, because the main
flip-flop then holds the restored value rather than its input.

Two timing rules apply, as for any Razor design:

* `clk_del` must lag `clk` by less than the clock's high phase.
* The data must not change while `clk_del` is high. This is the short-path constraint. The
  testbench therefore changes inputs 9 ns into the cycle.

`razor_error` is also the signal for an adaptive hold logic (AHL) controller, such as one that
lengthens the clock or the hold time when timing errors become frequent. No such controller is
included here. The flag is a top-level output for one.

## Pipeline and interface (`ft_fft_top`)

```
x[4][8] ──┬─ fft8 ×4 ─────────────────┐
          ├─ parity_fft ──────────────┤  razor_ff   ┌─ sum of 3 spectra ─ sos_unit ─ parseval_check ×3 ─ sos_ecc_decoder ─┐
          └─ sum of 3 frames ─ sos_unit ×3 ┘  (stage 1) └────────────────────── fft_corrector ◄──────────────────────────┘ ─ output reg
```

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `clk_del`, `rst_n` | in | 1 | clock, Razor delayed clock, asynchronous active-low reset |
| `in_valid` | in | 1 | a set of four frames is present |
| `x_re`, `x_im` | in | [4][8] × 32 signed | time samples, `[fft][n]` |
| `inj_en`, `inj_fft`, `inj_bin`, `inj_im`, `inj_mask` | in | 1, 3, 3, 1, 38 | soft-error injection, see below |
| `razor_error` | out | 1 | timing error: hold the input, notify AHL |
| `out_valid` | out | 1 | results present |
| `y_re`, `y_im` | out | [4][8] × 36 signed | corrected spectra, `[fft][k]`, unscaled (`y[k] = sum x[n] W8^nk`) |
| `err_detected` | out | 1 | some check failed |
| `err_fft` | out | 4 | one-hot FFT that was corrected |
| `check_err` | out | 1 | a single check failed: nothing corrected |

The design takes one frame set per clock. Results appear one clock after the set is accepted,
and two clocks after a Razor recovery. Inputs must be stable from before the rising edge until
`clk_del` falls.

**Fault injection.** With `inj_en` high, `inj_mask` is XORed into the captured stage-1 result:

* `inj_fft` 0..3: bin `inj_bin` of that FFT (its imaginary part if `inj_im` is set);
* `inj_fft` 4: the same, in the parity FFT;
* `inj_fft` 5..7: the top 38 bits of check 0..2's input-side energy.

Tie `inj_en` low in use.

## Number formats

| signal | width | notes |
|--------|-------|-------|
| input sample | 32 + 32 bits signed | real, imaginary |
| FFT output | 36 bits signed | unscaled. Cannot overflow: `|Re X| <= 8*sqrt(2)*2^31 < 2^35` |
| parity input / output | 34 / 38 bits | exact sum of four frames |
| check sums | 34 bits (time), 38 bits (frequency) | |
| energies | 72 bits (time), 80 bits (frequency) | exact |

The `fft8` core is a combinational radix-2 decimation-in-frequency design. The first stage forms
`x[k] ± x[k+4]` and rotates the differences by `W8^k`. Two 4-point DFTs, which need only
additions, then give the even and odd bins. Only `W8^1` and `W8^3` need a multiplier.

## Modules

| file | role |
|------|------|
| `rtl/ft_fft_pkg.sv` | sizes (8 points, 4 FFTs, 3 checks, 32-bit data) and the check map |
| `rtl/fft8.sv` | 8-point FFT core |
| `rtl/parity_fft.sv` | sum of the four frames, then `fft8` on 34-bit data |
| `rtl/sos_unit.sv` | exact sum of squares of 8 complex values |
| `rtl/parseval_check.sv` | energy comparison with threshold |
| `rtl/sos_ecc_decoder.sv` | syndrome to faulty FFT / faulty check |
| `rtl/fft_corrector.sv` | rebuild from parity |
| `rtl/razor_ff.sv` | Razor flip-flop, `WIDTH` cells with one error flag. It contains a latch by design |
| `rtl/ft_fft_top.sv` | top level |
| `tb/*_tb.sv` | one self-checking testbench per module |
| `tb/fft_ref_pkg.sv` | double-precision DFT reference and random helpers |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops on its own. It also has a
watchdog. With Verilator 5:

```
verilator --binary --timing --timescale 1ns/1ps -Wno-fatal -Irtl -Itb -y rtl -y tb \
    rtl/ft_fft_pkg.sv tb/fft_ref_pkg.sv tb/ft_fft_top_tb.sv --top-module ft_fft_top_tb
./obj_dir/Vft_fft_top_tb
```

`ft_fft_top` also carries concurrent assertions: no output in the cycle after a Razor error, no
two Razor errors in a row, `err_fft` at most one-hot, and no correction together with
`check_err`. Build with `--assert` to enable them.

To run another testbench, replace the last file and the top module name. For example,
`tb/razor_ff_tb.sv` with `razor_ff_tb`.

`ft_fft_top_tb` runs the top at its default sizes. It sends 300 frame sets, each with one
scenario:

* clean full-scale data, where no check may fire;
* one FFT corrupted, which must be located and repaired;
* the parity FFT corrupted, with no effect;
* a check corrupted, where only `check_err` may rise;
* a late arrival, which must be recovered through the Razor register while the source stalls.

It compares every output bin with a double-precision DFT of the original inputs. It also checks
the flags and the latency, and counts each scenario. It fails if any scenario never occurred. The
block testbenches compare:

* `fft8` and `parity_fft` against the DFT, on impulses, extremes and random frames;
* `sos_unit` against 128-bit arithmetic;
* `parseval_check` just inside and just outside the threshold;
* the decoder against its full table;
* the corrector on random corrupted spectra;
* `razor_ff` on normal and late data with a real delayed clock.

## Where this design makes its own choices

The following are specific to this implementation:

* the fixed-point formats;
* the radix-2 DIF FFT structure and the 30-bit twiddle precision;
* the threshold formula and its values;
* which FFTs each check covers;
* the two-stage pipeline;
* a stall of one cycle as the form of re-execution;
* the latch polarity and error timing of the Razor cell;
* the fault-injection port.

Changing `NFFT` needs a new `SOS_ECC_MAP` with distinct syndromes of two or more bits, plus
matching widths in `parity_fft` and `fft_corrector`. `fft8` is written for 8 points only.

Not included:

* **The adaptive hold logic controller.** Only its input, `razor_error`, is provided.
* **Variants of the scheme.** These are a Parseval check per FFT instead of the coded checks, and
  a simpler partial-sum check in place of the Parseval check for applications with fewer errors.
* **FPGA area and timing figures.**
