# Adaptive SCORE receiver for cognitive-radio spectrum sensing

A cognitive radio has to notice a primary user's signal and pull it out of
noise and interference without knowing its waveform. Many man-made signals
are *cyclostationary*: their statistics repeat at a known cyclic frequency
alpha, such as a symbol rate, a chip rate or twice a carrier offset. Noise and
most interferers do not have a feature at that alpha. This RTL uses that
property in two ways:

* **Sensing.** It measures the cyclic autocorrelation
  `R(alpha, lag) = sum_n x(n) conj(x(n-lag)) exp(-j 2 pi alpha n)` over a window
  and reports its absolute value, the *score*, for several lags at once. It
  raises a detection flag when the largest score of a window passes a
  threshold.
* **Extraction.** It runs an adaptive filter (beamformer) whose weights are
  trained by LMS towards a reference built from the input itself. The
  reference is the input delayed by `tau` and frequency-shifted by `alpha`.
  Only the cyclostationary signal of interest (SOI) is correlated with that
  reference, so the filter keeps the SOI and suppresses the rest. This is
  *least-squares SCORE* (spectral self-coherence restoral) with a fixed
  control vector.

The whole datapath takes one IF sample per clock and is fully pipelined. It
uses fixed-point arithmetic throughout, and CORDICs wherever a rotation,
magnitude or phase is needed.

```
 if_data ─► preprocessing ──────── bb ──────┬──────────────► beamformer ──► soi
 (real IF)  NCO + mixer (DDC)               │                 y=Σ w_i x(n-i)  │
            64-tap FIR, ↓DECIM              ▼                     ▲ taps      │ y
                                   cyclic_correlation             │ w         ▼
                                   delay line, NLAG lag branches  └── weight_update_engine
                                   × exp(-j2πα n), window sums,       e = u - y
                                   |R| via CORDIC, detection          w += 2^-μ e conj(x)
                                   reference u(n) ───────────────────────────▲
```

## Modules

| file | role |
|---|---|
| `score_pkg.sv` | widths, complex struct types, CORDIC arctangent table, round-and-saturate |
| `adaptive_score_top.sv` | top level: wires the four units together |
| `preprocessing.sv` | `ddc` followed by `fir_decimator` |
| `ddc.sv`, `nco.sv`, `phase_accumulator.sv` | down-conversion: 32-bit phase accumulator, CORDIC sine/cosine, two multipliers |
| `fir_decimator.sv`, `adder_tree.sv` | 64-tap complex low-pass filter; computes only the retained outputs |
| `cyclic_correlation.sv`, `delay_line.sv` | lags, cyclic rotation, window accumulation, scores, detection, reference |
| `beamformer.sv` | weight application over an NW-tap register |
| `weight_update_engine.sv` | LMS update, output magnitude/phase monitor, loop occupancy |
| `cordic_rotator.sv`, `cordic_vectoring.sv` | pipelined CORDIC in both modes |

Every file opens with a comment describing its function, interface and
latency.

## Why the reference trains the filter towards the SOI

Let the decimated baseband stream be `x(n) = s(n) + i(n) + v(n)`: SOI,
interferer and noise. The reference is

    u(n) = x(n - tau) * exp(+j 2 pi alpha n)

For a signal with a cyclic feature at `(alpha, tau)`, `E[s(n) conj(u(n))]` is
non-zero. For `i` and `v` it averages to zero. The LMS filter minimises
`E|u(n) - y(n)|^2` with `y(n) = sum_i w_i x(n-i)`. The minimiser is
`w = R_xx^-1 r_xu`, and `r_xu` only contains the SOI's part. The filter
therefore forms a response that passes the SOI and places nulls on
components uncorrelated with the reference. The error never reaches zero:
`u` also holds shifted noise and interference that nothing in `x` can
cancel. Convergence shows up as a drop in error power and as interferer
suppression, not as a vanishing error.

In the end-to-end test, the SOI is a pair of tones at ±0.06 cycles/sample,
which has a feature at alpha = 0.12. The interferer is a single tone at
+0.15. After adaptation, the interferer in the output falls from about 1350
to about 17 in amplitude (about 38 dB), while the SOI tone stays at its
level or rises.

## Number formats

| quantity | format |
|---|---|
| IF and baseband samples, filter outputs, reference, error | 16-bit Q1.15 (`sample_t`, `cplx_t`) |
| phases | 32 bits for one full turn (`2^32` = 2 pi); wrap-around is free |
| frequency words `ddc_fcw`, `alpha_fcw` | cycles per sample × 2^32 (`ddc_fcw` per IF sample, `alpha_fcw` per decimated sample) |
| correlation window sums | 32-bit (`cplx_acc_t`); lag products are Q2.15 in 18 bits, so a 1024-sample window cannot overflow |
| weights | 24 bits with 20 fraction bits (range ±8), saturating (`cplx_w_t`) |
| scores | 34 bits, `K · |R|` |

Every multiplier result is rounded (half up) and saturated back to Q1.15
by `round_sat` in the package.

**CORDIC gain.** Both CORDICs use STAGES = 16 micro-rotations and work on
W+2 bits. They do *not* divide out the gain K = 1.64676:

* The NCO pre-scales its start vector by 1/K. Its sine and cosine therefore
  have amplitude 32767.
* The reference branch multiplies by 1/K (39797 in Q0.16).
* The correlation branches leave K in. The scores and `soi_mon_mag` are
  `K · |value|`. Keep this in mind when setting `det_threshold`.

The input phase is folded into ±90° by a first stage. Accuracy is a few
LSBs at 16 bits.

## Timing and the adaptation loop

| path | latency (clocks) |
|---|---|
| DDC (NCO CORDIC + mixer) | STAGES + 3 = 19 |
| FIR decimator, from the input completing a block of DECIM | 9 |
| beamformer | 6 |
| **IF sample → extracted `soi` sample** | **34** |
| reference `u(n)` after its decimated sample | STAGES + 3 = 19 |
| window end → `corr_valid` | STAGES + 4 |
| `corr_valid` → first `score_valid` | STAGES + 2; then one lag per clock, and `det_valid` after the last |
| decimated sample → weight update (`w_upd`) | STAGES + 5 = 21 |

The LMS loop is closed per decimated sample. The error for sample n needs
the reference for sample n, which passes through a CORDIC, and the update
must land before sample n+1 enters the beamformer. The loop therefore
occupies STAGES + 6 = 22 clocks. With one IF sample per clock, DECIM must be
at least 22. The top stops elaboration with an error if it is not.
`adapt_busy` shows the loop's occupancy. `overrun` pulses if a decimated
sample arrives while the loop is still busy; that cannot happen with the
defaults. Idle clocks on `if_valid` are allowed anywhere.

## Configuration ports

| port | meaning |
|---|---|
| `ddc_fcw` | IF carrier; the spectrum is shifted *down* by this frequency |
| `alpha_fcw` | cyclic frequency under test |
| `corr_lag[k]` | lag of each correlation branch (0..DEPTH-1) |
| `ref_lag` | tau of the LMS reference; should be a lag at which the SOI's feature is strong |
| `mu_shift` | LMS step 2^-(10+mu_shift) on the raw product (about 2^-mu_shift relative to unit power) |
| `adapt_en` | 0 freezes the weights |
| `det_threshold` | detection threshold on the window's largest score |

The weights reset to a pass-through filter (w_0 = 1). All registers have an
active-low asynchronous reset. The delay-line RAM is not reset; a fill
counter masks it until written.

## Parameters (top-level defaults)

| parameter | default | meaning |
|---|---|---|
| `DECIM` | 32 | decimation factor (≥ STAGES + 6) |
| `STAGES` | 16 | CORDIC micro-rotations |
| `NLAG` | 4 | parallel correlation branches |
| `DEPTH` | 64 | delay-line length, largest lag + 1 |
| `LOG2_WIN` | 10 | correlation window = 1024 decimated samples |
| `NW` | 8 | weights / filter taps |

The FIR is a 64-tap Hamming-windowed sinc with cut-off 0.5/DECIM. It is
scaled to unit DC gain and quantised to Q1.15. The coefficients are a
constant table in `fir_decimator.sv`. If you change DECIM, regenerate them
with `h[n] = w_hamming[n] · sin(2π fc (n-31.5)) / (π (n-31.5))`, normalised
to sum 32768 (±rounding). The test recomputes them from this formula.

## Resources

There is one multiplier per complex-product term:

| unit | multipliers |
|---|---|
| FIR | 128 |
| beamformer | 32 |
| LMS update | 32 |
| correlation branches | 16 |
| reference gain | 2 |
| mixer | 2 |
| **total** | **212** |

Each is at most 17 × 24 bits, so it fits one DSP slice of a current FPGA.
The CORDICs use adders only. The delay line is one RAM of 64 × 32 bits.

## Relation to the published architecture

The design follows the usual four-unit arrangement of an adaptive SCORE
receiver: preprocessing (down-conversion and decimating FIR), cyclic
correlation unit (programmable delays, multiplication by a complex
exponential, parallel window accumulators), weight update engine (LMS, with
a CORDIC for magnitude and phase) and a beamforming/filtering stage. The
published description stays at block level. The following are this
design's own choices, or points where it departs:

* **Temporal, not spatial, weights.** There is one input stream and no
  antenna array. The weight vector is applied across an 8-tap delay line
  (adaptive FIR filtering). A multi-antenna version would replace the
  beamformer's tap register with one sample per element. The loop would not
  change.
* **Error definition.** The published text only says the weights maximise
  a cyclostationary cost. The least-squares SCORE error with the reference
  from the correlation unit is this design's reading.
* **Only the LMS engine.** An RLS engine on a systolic array is named as an
  option for faster convergence but is not specified, so it is not built.
* **Adaptivity of parameters** is limited to the run-time inputs `mu_shift`,
  `adapt_en`, `alpha_fcw`, the lags and the threshold. No automatic step-size
  control is built.
* **Latency** is 34 clocks from IF input to extracted output. The
  published figure is about 35–50 clocks. The pipeline was not padded to
  match.
* **Scaling.** Fixed scaling (round and saturate after each product, 1/K
  after the reference CORDIC) is used. There is no automatic gain control
  and no normalised LMS step.
* **Sine/cosine and rotations** all come from CORDICs. The lookup-table
  alternative for the complex exponential is not used.
* **Detection rule** (largest score against a fixed threshold), window
  length, number of lags, FIR length, DECIM and all widths beyond
  "16-bit samples, 24–32-bit intermediates" are this design's choices.
* Bit-error-rate figures require a demodulator, which is outside this RTL.

## Verification

Every unit has a self-checking testbench in `tb/`. Each one compares
against an independent model worked out in the testbench and checks
latencies. It prints `TB_RESULT checks=N failures=M` at the end and has a
watchdog.

| testbench | what it checks |
|---|---|
| `tb_cordic_rotator`, `tb_cordic_vectoring` | random vectors and phases against `$cos/$sin/$atan2`; latency |
| `tb_ddc` | mixer output against a real-valued model of the NCO; latency |
| `tb_fir_decimator` | bit-exact against a convolution model with coefficients recomputed from the formula; DC gain; stop-band rejection; decimation ratio |
| `tb_preprocessing` | DDC plus FIR chain, rate and latency |
| `tb_cyclic_correlation` | window sums, scores and detection against a model; reference stream; latencies |
| `tb_beamformer` | bit-exact dot product; latency |
| `tb_weight_update_engine` | bit-exact error and weight updates, freeze, overrun, monitor; convergence on a coherent reference against a floating-point LMS (20 dB error drop after 52 updates at step 2^-2; output MSE against floating point about 2e-10) |
| `tb_adaptive_score_top` | the whole design at its default parameters (see below) |

`tb_adaptive_score_top` runs about 330,000 IF samples with random idle
gaps, in these phases:

1. Noise only.
2. SOI plus interferer plus noise, with adaptation on.
3. Adaptation frozen for 200 samples.
4. Noise only again.

It checks:

* every `soi` sample bit-exactly against the weights in force;
* every window's correlation sums, rebuilt from the decimated stream with
  the configured lags and alpha;
* every LMS error, against `u(n) - y(n)` rebuilt from the decimated stream;
* the decimation ratio;
* the 34-clock latency;
* no detection during noise and a detection in every SOI window;
* a falling adaptation error;
* more than 12 dB interferer suppression;
* that no overrun occurs.

It also counts each mechanism: decimation, window end, detection on and
off, weight update, frozen update and input gap. It fails if any of them
never happened. It takes a few seconds in Verilator.

To run a testbench with Verilator (5.x), from the directory holding `rtl/`
and `tb/`:

```
verilator --binary --timing -Irtl -y rtl rtl/score_pkg.sv \
          tb/tb_adaptive_score_top.sv --top-module tb_adaptive_score_top -o sim
./obj_dir/sim
```

Replace the name to run another testbench. Running the FIR, correlation
and top tests with the defaults is quick; no parameter needs to be reduced.

## Known limitations

* The LMS step is a power of two. Without normalisation, the usable
  `mu_shift` depends on the input power. With strong inputs, a small
  `mu_shift` can make the loop diverge; the weights then saturate at ±8.
  The tests use 2 (block test) and 3 (end-to-end test).
* The 16-stage CORDICs have no guard bits. Phase and magnitude are accurate
  to a few LSBs, which the tests tolerate.
* The window sums are 32 bits. Windows longer than 2^14 samples at full
  scale could overflow them; widen `ACC_W` in the package first.
* Timing closure at a particular clock rate has not been verified. The
  deepest combinational paths are one 16×16 or 17×24 multiplier, or one
  adder level.
