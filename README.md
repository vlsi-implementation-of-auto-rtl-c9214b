# Time-multiplexed auto-correlator for MIMO-OFDM CFO estimation

An OFDM receiver has to estimate its carrier frequency offset (CFO) from the
packet preamble before it can demodulate anything. The usual way is
auto-correlation: multiply each received sample by the conjugate of the
sample one training-symbol period earlier, sum the products, and take the
angle of the sum. On an 802.11a/n legacy preamble this is done twice:

* **coarse**, on the short training symbols (STS, period L = 16 samples),
  which can measure offsets up to ±2 subcarrier spacings;
* **fine**, on the two long training symbols (LTS, period L = 64 samples),
  which measures ±0.5 spacing with better precision.

With N_r receive antennas the textbook MIMO version gives every antenna its
own 64-sample delay line and its own complex multiplier and adds the N_r
sums (maximal-ratio combining). The delay lines dominate the area.

This design builds the correlator for 4 antennas at roughly the cost of one.
It rests on two ideas:

1. **Sample reduction.** Each antenna contributes only a quarter of the
   correlation window: floor(L/N_r) = 4 samples of the STS, 16 of the LTS.
   The four quarters still add up to one full-length correlation, so the
   estimate is about as good as a single-antenna receiver's. The diversity of
   the other antennas is given up, not the window length.
2. **Time multiplexing.** The quarters are staggered: antenna 1 owns the first
   quarter of the symbol, antenna 2 the second, and so on. Only one antenna
   needs the multiplier in any cycle, so a single conjugate-multiply-accumulate
   unit (the *AC block*) is shared through a multiplexer and stays busy on
   every sample of the correlate symbol.

The correlation it computes is

```
A = sum_{j=1..4} sum_{k=(j-1)L/4 .. jL/4-1} r_j(n0+L+k) * conj(r_j(n0+k))
eps = N / (2*pi*L) * angle(A)          N = 64 (FFT size)
```

where n0 is the first sample of the 8th STS (coarse) or of LTS 1 (fine).

## Why 16 registers per antenna are enough

The fine correlation pairs samples 64 apart, yet each antenna has only a
16-stage delay register. The register does not shift every cycle: it shifts
only while its antenna owns the window. Antenna 2, for example, shifts during
samples 16–31 of LTS 1 (filling the register with exactly those 16 samples)
and then holds. During samples 16–31 of LTS 2 it shifts again, and the
register's last stage is at every step the LTS 1 sample at the same
position: 16 enabled shifts ago, which is 64 samples ago.

For the coarse correlation the same register is used with a tap after stage
4: each antenna shifts 4 times in the 8th STS and 4 times in the 9th, so
stage 4 holds the sample 16 positions back. A 2-to-1 multiplexer after the
register picks stage 4 or stage 16.

## Schedule

Samples are counted within a symbol by a 6-bit counter. The branch that owns
the current sample is a 2-bit field of that counter:

| phase | symbols | samples per antenna | owner of sample c | delay tap |
|-------|---------|---------------------|-------------------|-----------|
| coarse capture   | 8th STS | 4  | c[3:2] | stage 4  |
| coarse correlate | 9th STS | 4  | c[3:2] | stage 4  |
| fine capture     | LTS 1   | 16 | c[5:4] | stage 16 |
| fine correlate   | LTS 2   | 16 | c[5:4] | stage 16 |

The owner index drives the Ctrl Mux select and, decoded, the shift enable of
that antenna's delay register. During a capture symbol the AC block is idle.
During a correlate symbol it multiplies on every sample, and its accumulator
restarts on sample 0 and delivers on the last sample. A small state register
(idle, coarse capture/correlate, fine capture/correlate) tells the two
symbols of a pair apart, because a 6-bit counter runs through an LTS once per
symbol.

The schedule starts from two pulses that a symbol-timing block (not part of
this RTL) must supply:

* `coarse_start` with the first sample of the 8th STS;
* `fine_start` with the first sample of LTS 1.

A start pulse takes effect on the sample that carries it. `fine_start` wins
if both are high, and either one restarts an estimation already running.

## Datapath and number formats

* Input: 10-bit signed I and 10-bit signed Q per antenna (`ac_pkg::iq_t`).
* AC block: `rx * conj(drx)` in full precision (21 bits per part), registered,
  then accumulated in 27 bits (21 + log2(64)). Nothing is rounded; overflow is
  impossible for 64 full-scale products.
* CFO estimator: an iterative vectoring CORDIC, one micro-rotation per clock,
  15 rotations. A vector with a negative real part is negated first and the
  angle preset to π, so the result is a four-quadrant angle. Output formats:
  * `cfo_phase`: 16-bit signed, π = 2^15 (wraps at ±π);
  * `cfo_eps`: 18-bit signed, 15 fraction bits, in subcarrier spacings;
    `eps = phase * 64 / (2L)`, that is phase×2 for coarse and phase/2 for
    fine. Coarse values span ±2, fine values ±0.5.

  The arctangent table holds round(atan(2^-i)/π · 2^15) for i = 0..14.
  Angle error is within 7 LSB (0.04°) for |A| ≥ 2^12.

## Interface and timing of `mimo_cfo_sync`

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset |
| `in_valid` | in | 1 | a new sample is present on all antennas |
| `rx[4]` | in | 4 × 20 | samples `{re, im}`, 10-bit signed each |
| `coarse_start`, `fine_start` | in | 1 | schedule starts (see above) |
| `corr`, `corr_valid`, `corr_fine` | out | 2 × 27, 1, 1 | correlation A; 1-cycle strobe; 1 = fine |
| `cfo_phase`, `cfo_eps`, `cfo_valid`, `cfo_fine` | out | 16, 18, 1, 1 | angle and CFO; 1-cycle strobe; 1 = fine |
| `busy` | out | 1 | an estimation or CORDIC run is in progress |

* `corr_valid` rises 2 clocks after the cycle carrying the last sample of
  the 9th STS or LTS 2. `cfo_valid` rises 16 clocks after `corr_valid`.
  Results hold until the next one.
* One sample per `in_valid`. `in_valid` may drop at any time, and everything
  then holds, so the clock may run faster than the 20 MS/s sample rate. The
  original chip reached 77 MHz in 0.18 µm CMOS.

## Modules

| file | role |
|------|------|
| `rtl/ac_pkg.sv` | sizes (NR = 4, IQ_W = 10, STS 16, LTS 64, N = 64), sample and sum types |
| `rtl/mimo_cfo_sync.sv` | top: correlator plus CFO estimator |
| `rtl/tm_autocorr.sv` | the time-multiplexed correlator: controller, 4 delay lines, mux, AC block |
| `rtl/ac_controller.sv` | 6-bit counter, phase state, branch select and delay enables, AC strobes |
| `rtl/ac_delay_line.sv` | gated 16-stage complex delay register with the stage-4 / stage-16 tap mux |
| `rtl/ac_ctrl_mux.sv` | selects the owning antenna's present and delayed sample |
| `rtl/ac_block.sv` | conjugate, complex multiply, accumulate |
| `rtl/cfo_estimator.sv` | CORDIC angle and scaling to the normalized CFO |

Sizes that are module parameters: `DLY` (delay depth) in `tm_autocorr`,
`DEPTH`/`COARSE_TAP` in `ac_delay_line`, `NR`/`CNT_W` in `ac_controller`, and
`IN_W`/`ITER`/`FFT_N` in `cfo_estimator`. The sample and sum widths are
package constants, because they set the shared struct types.

## What follows the original architecture and what is added here

Taken from the original design: 4 antennas, 10-bit I/Q, four 16-sample delay
registers with an output multiplexer, one shared AC block
(conjugate, complex multiplier, adder) behind a control multiplexer, a 6-bit
counter whose bits [3:2] and [5:4] schedule the coarse and fine work, the
per-antenna windows, and the CFO formula.

Chosen here, where the original is silent:

* the coarse tap at stage 4 (the original shows a two-input mux after the
  delay without naming its taps);
* the phase state register and the `coarse_start`/`fine_start` interface;
* one 2-bit select into the Ctrl Mux, with the controller choosing the
  counter field by task (the original feeds both fields to the mux);
* signed I/Q, synchronous reset clearing all registers, and a 2-stage AC
  pipeline;
* the CORDIC (the original only says "CORDIC or LUT"), its 15 iterations and
  its number formats;
* four-quadrant angle instead of a plain arctangent of Im/Re.

Not included: the symbol-timing and power-calculation blocks that sat next to
the correlator on the original chip. Their function is not specified, so
`coarse_start`/`fine_start` are ports. The conventional per-antenna
64-sample correlator is the baseline the design is measured against and is
not built.

## Verification

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`:

| testbench | what it checks |
|-----------|----------------|
| `tb_ac_delay_line` | output against a history of enabled shifts, both taps, random enables |
| `tb_ac_ctrl_mux` | all selects with random data |
| `tb_ac_controller` | every control output per sample against the schedule table, with `in_valid` gaps; window length; idle after; restart by `fine_start` |
| `tb_ac_block` | 200 windows of 1–64 products, full-scale corners, exact sums, 2-cycle latency |
| `tb_cfo_estimator` | 410 vectors in all quadrants against floating-point atan2 (±8 LSB), eps scaling, 16-cycle latency |
| `tb_tm_autocorr` | 6 generated 4-antenna preambles, coarse and fine results bit-exact against the reduced correlation sum |
| `tb_mimo_cfo_sync` | end to end at the default size: 8 preambles with offsets from −1.8 to +1.8, bit-exact correlations, CFO against atan2 and against the true offset (coarse ±0.03, fine ±0.01); checks that the shared AC block multiplies on every correlate-symbol sample, L/4 times per antenna; counts that each mechanism ran (coarse, fine, antenna hand-over, held delay register, input gap, left-half-plane angle) |

`tb/tb_preamble_pkg.sv` generates the stimulus: random periodic STS and LTS
waveforms, one random complex gain per antenna, CFO rotation, uniform noise,
and rounding to 10 bits. It does not model a multipath channel.

To run a test with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_mimo_cfo_sync \
    -y rtl -y tb +libext+.sv rtl/ac_pkg.sv tb/tb_preamble_pkg.sv tb/tb_mimo_cfo_sync.sv
./obj_dir/Vtb_mimo_cfo_sync
```

Every test finishes in well under a second.

## How far to trust it

The correlation path is checked bit-exact against an independent model of
the reduced, time-multiplexed sum, and the CFO output is checked against
the true offsets of generated preambles. Neither the gate count nor the power
of the original chip was reproduced or measured. The BER and MSE results
quoted for this scheme come from floating-point system simulation with a
multipath channel, which these tests do not repeat. The estimate depends on
the start pulses being placed on the right samples. A misplaced pulse gives
a wrong estimate, and nothing flags it.
