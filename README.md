# Hybrid digital matched filter for DSSS code acquisition

A direct-sequence spread-spectrum receiver finds code timing with a matched
filter. The filter correlates the incoming baseband stream with the spreading
code at every sample. This RTL implements a 128-tap filter: 4-bit signed
samples, 4 samples per chip, 32 chips. It produces one correlation value per
input sample:

    y[k] = sum_{i=0}^{127} c_i x[k-i],   c_i = +1/-1 = chip[i/4]

The architecture aims at low power. It does so by moving as few flip-flops as
possible per sample. It combines three ideas:

1. **Differential coefficients.** Four consecutive taps share one chip, and
   neighbouring chips are often equal. The filter therefore computes the
   *change* of the output, `z[k] = y[k] - y[k-1]`, which needs far fewer
   additions. It then accumulates the changes.
2. **Hybrid form.** The taps are cut into stages of `S` taps (`S = 32`, the
   *summation degree*). Each stage adds its own taps at once in direct form.
   Its partial sum is handed to the next stage `S` samples later in
   transposed form. Because of that `S`-sample delay, a register file can
   hold the partial sums. Each entry is written once every `S` samples,
   instead of a delay line that shifts every cycle.
3. **A lazy input window.** The last 32 samples are kept so that most of them
   stand still. Per sample, only one register-file word and one shift chain
   out of four move.

The flip-flops written per sample are 32 in the input window, 29 in the
partial-sum register files and 12 in the accumulator, plus the small counter.
That is about 80 bits in total. Of the 149 flip-flop bits and 928
register-file bits in the design, only these switch per sample.

## Files

| file | role |
|---|---|
| `rtl/dmf_pkg.sv` | sizes, default code, differential-coefficient and width functions |
| `rtl/hybrid_dmf.sv` | top level: wires the stages together |
| `rtl/dmf_ctrl.sv` | sample counter: phase, register-file address, priming flag |
| `rtl/dmf_input_unit.sv` | 32-sample input window (register file + shift chains) |
| `rtl/dmf_add_unit.sv` | one stage's carry-save adder |
| `rtl/dmf_psum_rf.sv` | one stage's partial-sum register file |
| `rtl/dmf_diff_acc.sv` | output accumulator `y[k] = y[k-1] + z[k]` |
| `tb/tb_*.sv` | self-checking testbenches, one per module, plus a sweep over `S` |

## Top-level interface (`hybrid_dmf`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock |
| `rst_n` | in | 1 | asynchronous, active-low reset; restarts from an all-zero history |
| `x_valid` | in | 1 | `x_in` carries a sample; when low the whole filter holds |
| `x_in` | in | 4 | signed received sample |
| `y_valid` | out | 1 | `y` carries a new output |
| `y` | out | 12 | signed correlation `y[k]`, registered |

- **Throughput:** one sample per clock.
- **Latency:** `y[k]` appears in the cycle after `x[k]` is presented with
  `x_valid`.
- **Exactness:** the output is exact from the first sample after reset. It
  is not a windowed approximation. The output range is [-960, +960] for the
  balanced default code, and at most ±1024 for any code. Either range fits
  12 bits.

Parameters: `XW` (4), `M` (4, the oversampling rate), `N_TAPS` (128), `S`
(32), and `CODE`. In `CODE`, bit `j` is chip `j`, with 1 meaning +1. Chip 0
weighs the newest samples. To correlate against a received code
`p[0..31]`, with `p[0]` sent first, set `CODE[j] = p[31-j]`. The constraints
are `S` divides `N_TAPS`, `M` divides `S`, and `S/M >= 2`. The default code
is an arbitrary 31-chip m-sequence (x^5+x^2+1) padded with one −1 chip.
Replace it with the code of your system.

## How the arithmetic is rearranged

This is the part worth understanding before changing anything.

### From chips to differential coefficients

Write `d_0 = c_0`, `d_i = c_i - c_{i-1}` and `d_128 = -c_127`. Then

    y[k] = y[k-1] + z[k],   z[k] = sum_{i=0}^{128} d_i x[k-i]

Because `c_i` is constant over each run of four taps, `d_i` is zero unless
`i` is a multiple of 4. At `i = 4c` it takes one of three values:

- ±1 at the two ends (`c = 0` and `c = 32`);
- ±2 where chip `c` differs from chip `c-1`;
- 0 where the chips are equal.

So `z` has at most 33 terms, each a sample times 0, ±1 or ±2, instead of
128. `dmf_pkg::chip_diff` computes these coefficients at elaboration. The
adders are specialised to them, so a zero coefficient costs no hardware.

### Splitting into stages (hybrid form)

The 129 differential taps are `n = S·t + r` with `S = 32`, `t = 4`, `r = 1`.
The remainder tap `d_0 x[k]` uses the sample arriving now. Taps 1..128 use
the stored window `x[k-1] .. x[k-32]` and are cut into four stages
`g = 0..3`:

    stage g, at sample k:  Q_g[k] = sum_{q=0}^{7} e_{8g+q+1} · x[k-4(q+1)] + Q_{g+1}[k-32]
    z[k] = d_0 x[k] + Q_0[k],   with Q_4 = 0

Here `e_c = d_{4c}`. Stage 3 holds the oldest taps (97..128) and starts each
output. Its partial sum waits 32 samples in a register file. Stage 2 then
adds taps 65..96 to it, using the window as it is 32 samples later. The
same happens at stages 1 and 0. For a fixed output, each stage therefore
does its part once every 32 samples. This is why register files work here:

- every partial sum is written once;
- it is read exactly 32 samples later, at the same address `k mod 32`;
- so one address counter serves all three files.

All four stages read the same eight window samples in the same cycle. That
is the transposed-form property that keeps input fan-out low.

Each partial sum is kept at the width of its worst case. The widths are 9,
10 and 10 bits for the stored sums and 11 bits for `z`. The adders work
modulo 2^W. Because every true value fits its width, the result is exact.
The 12-bit accumulator may wrap in between for the same reason.

### The input window (`dmf_input_unit`)

The stages only ever read the samples `x[k-4], x[k-8], .., x[k-32]`. These
are the samples of the current oversampling phase `k mod 4`. The 32-sample
window is stored as follows:

- a **4-entry register file**, one entry per phase, holding the newest
  sample of each phase;
- **four shift chains** of 7 samples, one per phase.

When sample `x[k]` arrives, with phase `p`, the unit works in two steps:

1. The entry `rf[p]` still holds `x[k-4]`, and chain `p` holds
   `x[k-8] .. x[k-32]`. These are exactly the eight samples the adders need
   this cycle.
2. At the clock edge, `x[k]` overwrites `rf[p]`. The old `x[k-4]` shifts
   into chain `p`.

The other three chains and three entries stay still. Each chain shifts once
every four samples.

### The adder (`dmf_add_unit`)

One stage adds up to nine addends and the incoming partial sum in a single
cycle. Each addend is a 4-bit sample times ±1 or ±2. The adder avoids sign
extension and negators as follows:

- **Scaling:** ×2 is a one-bit left shift of the row.
- **Negation:** a negative coefficient uses the one's complement of the
  sample. The missing +1 is accounted for in a constant.
- **Sign-bit inversion:** the sign bit of each row is inverted. This turns
  the signed sample into the unsigned `x + 8`, so the rows need no sign
  extension. The `-8` per row is accounted for in the same constant.
- **Correction constant:** `K = sum over non-zero d of |d|·((d<0) - 8)`.
  It is known at elaboration and enters as one extra row.
- **Reduction:** the rows, the sign-extended partial sum and `K` pass
  through a linear array of full-adder rows (carry-save). One
  carry-propagate adder finishes the sum.

### Start-up

The input window and the accumulator are reset to zero. The partial-sum
register files are not reset. Instead, `dmf_ctrl` keeps a `primed` flag
low for the first 32 samples, and reads of the files return zero until
then. Those first reads would refer to samples before reset, which count
as zero. This start-up matters because of the accumulator: any error that
entered `y` would stay in it forever.

## What follows the published architecture, and what is this design's own

Taken from the published architecture:

- 4-bit samples, 4× oversampling, 128 taps and `S = 32`;
- the hybrid local-direct/global-transposed split;
- the differential-coefficient recursion;
- the input storage (register file for the newest `M` samples, shift chains
  clocked every `M` samples);
- register files for the partial sums;
- carry-save addition with sign-bit inversion, one's-complement negation, a
  precomputed correction constant, and zero-coefficient addends left out.

This design's own choices:

- **Constant folding.** All corrections are folded into one constant row.
  They are not placed in empty bit positions of the addend rows. The linear
  carry-save array is one possible regular layout, not a copy of a
  published one.
- **Stored partial sums.** These are kept as one carry-propagated word, not
  as a carry-save pair.
- **Interfaces and sizes:** the `x_valid`/`y_valid` handshake, the reset and
  priming scheme, the word widths, the register-file timing (asynchronous
  read, write at the edge), and the default code.
- **The remainder tap `d_0 x[k]`.** It is taken from the live input rather
  than stored, so the window is exactly 32 samples.

Not reproduced:

- the gate-level power and area figures of the published design;
- the sizes of its control logic;
- threshold detection or peak search after the filter. That work was not
  part of the published filter.

## Verification

Each testbench prints `TB_RESULT checks=N failures=F`. Each has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_dmf_ctrl` | phase, address and `primed` against a reference count, with random enables |
| `tb_dmf_input_unit` | every tap against `x[k-4(q+1)]` from a reference history |
| `tb_dmf_add_unit` | mixed coefficients (−2..+2, including zeros), random and extreme inputs, against integer arithmetic |
| `tb_dmf_psum_rf` | a word read back is the one written 32 accepted samples earlier; idle cycles write nothing |
| `tb_dmf_diff_acc` | the wrap-around accumulation |
| `tb_hybrid_dmf` | see below |
| `tb_hybrid_dmf_codes` | the default filter with three extreme codes: all chips equal (only the end coefficients are non-zero), alternating chips (every coefficient ±2), one sign change; a full-scale stretch drives the output to −1024 |
| `tb_hybrid_dmf_sweep` | the same filter at `S` = 8, 16, 32 and 64 (16, 8, 4 and 2 stages), fed one stream, each output against the reference |

`tb_hybrid_dmf` runs the default configuration end to end. It compares every
output with a direct-form correlation, including the one-cycle latency. Its
stimulus covers:

- random data with idle cycles;
- the code aligned for the +960 peak;
- the code aligned for the −960 extreme.

It also counts priming, idle cycles and register-file address wraps, and
fails if any of them never happens.

Running one testbench with Verilator:

    verilator --binary --timing --assert -y rtl rtl/dmf_pkg.sv \
        tb/tb_hybrid_dmf.sv --top-module tb_hybrid_dmf
    ./obj_dir/Vtb_hybrid_dmf

(`-y rtl` lets Verilator find each module in `rtl/<name>.sv`; the package
is listed first because modules import it.)

`verilator --lint-only -Wall` reports no errors for any module. It
reports only these warnings, which are harmless:

- unused package constants;
- unused sample bits in a stage whose coefficient is zero, which are left
  out by design.

## Limits and trust

- The code is fixed at elaboration. A programmable-code version would need a
  multiplexer or a sign-select per addend, which gives up the savings from
  zero coefficients.
- Correctness is established by simulation against a behavioural reference
  at all four summation degrees. No gate-level or formal equivalence check
  was run. Power was not measured.
