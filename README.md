# Background-calibrated 14-bit pipeline ADC (1 bit per stage)

A pipeline ADC with 1-bit stages is only as linear as its interstage gains and
sub-DAC levels are accurate, and capacitor matching of about 0.1 % limits such
a converter to roughly 10 bits. Digital calibration fixes this by giving each
stage's decision a programmable weight. Each weight is measured by grounding the
stage's input, forcing its decision to 0 and then to 1, and letting the later
stages digitise the two residues. A plain foreground calibration has to take the
stage off line to do that. In this design the converter never stops. Two spare
stages sit at the end of the 16-stage pipeline. At a *calibration instant* every
sample in flight jumps two stages down the pipeline, and that frees one
conversion slot for an artificial calibration sample. Output codes keep coming
out once per sample cycle with the same latency, and no sample is lost.

The RTL contains the digital part (encoder, weight bank, calibration
controller). It also contains a fixed-point behavioural model of the analog
pipeline, so the whole converter can be simulated with its errors.

## Converter and output code

- There are 16 identical stages, and the nominal gain of each is G = 1.81 rather than 2. A
  stage samples its input, compares it with 0 V, subtracts ±VREF/2 (VREF = 1 V)
  and amplifies the difference by G: `r = G·(v − (q − ½)·VREF)`.
- With G < 2 the residue of one stage always fits in the next stage's input
  range, even with comparator offsets. The full scale is
  `VFS = G/(G−1)·VREF/2 = 1.12 V`, and a comparator may be off by about ±0.12 V.
- The output code is `D = Σ q_i·w_i`. The nominal weight is
  `w_i = G^(16−i)` output LSBs, so stage 16 carries exactly 1 LSB.
  `Σ w_i ≈ 16369`, which gives 14 bits.
- Gain errors and sub-DAC errors make the real weights differ from the nominal
  ones. Calibration measures the real weight of stages 7, 6, …, 1, in that
  order, and stores it.
- Stage k is always measured by the stages after it. Those stages must be
  right first, so calibration runs from the back of the pipeline to the front.
  Stages 8 to 18 keep their nominal weights.

## Measuring a weight

A stage's transfer curve has two segments, one for q = 0 and one for q = 1. To
measure stage k, its input is grounded. Its decision is forced to 0, which
gives residue S1 = +G·VREF/2, and then to 1, which gives S2 = −G·VREF/2. The
stages after k digitise each residue into the codes D_S1 and D_S2. For the
output not to jump between the segments at the same input, the weight must be

    w_k = D_S1 − D_S2

The controller uses two calibration instants per stage, one for each forced
decision, and writes the new weight after the second.

## Freeing a slot: the two-stage shift

This is the core of the design. Odd stages sample on phase 1 and even stages on
phase 2, so a sample advances two stages per sample cycle. Stage 1 takes a new
input sample on every phase-1 edge.

On a calibration instant (a phase-1 edge):

| stage | normally takes | at the instant takes |
|---|---|---|
| 1 | new input sample n | the calibration sample (dummy value) |
| 3 | residue of stage 2 (sample n−1) | new input sample n |
| 5 | residue of stage 4 (sample n−2) | residue of stage 2 (sample n−1) |
| odd p ≥ 5 | residue of stage p−1 | residue of stage p−3 |
| 17 | residue of stage 16 (finished sample) | residue of stage 14 |

Every sample in flight skips two stages at once. It still passes through 16
stages, and the samples that jumped end in stage 18 instead of stage 16. A
moved sample reaches the end exactly when it would have without the jump. The
calibration sample enters stage 1 and trails the moved samples.

When the calibration sample arrives at stage k, stage k has its input grounded
and its decision forced. Stages k+1 to 18 then digitise its residue. After
that the pipeline runs normally until the next instant.

Stages 17 and 18 take part only when a moved sample or the calibration sample
comes to them. The encoder's `extra_en` bits enable their sampling, and
outside calibration both stages stay idle.

Instants are at least 11 sample cycles apart. Within 11 cycles the moved
samples have left stage 18 and the measurement is back (after 9 cycles). A
second jump could never push a moved sample past the last stage. An assertion
in `digital_encoder` checks this. A full run is 14 instants in 11-cycle slots,
which makes 154 sample cycles, or 3 µs at 51.2 MS/s.

### Weights of moved samples

A moved sample's decision from physical stage p belongs to logical position
p − 2, so it must be weighted with `w_(p−2)`. The weights of stages 1, 2, 3, …
are applied at stages 3, 4, 5, … for those samples. The weights are measured
for the physical stages, so while a calibration is running a moved sample picks
up the weight error between stages p and p−2. These codes are less accurate
during calibration. Outside calibration the pipeline is used as calibrated.

## Digital encoder: tokens that follow the samples

`digital_encoder` keeps one token register per stage, next to the analog
sample that the stage holds. A token holds:

- the kind of sample: input sample, calibration sample or empty;
- whether the sample has been moved;
- a partial sum of `q_j·w_j` over the stages the sample has already left.

Tokens follow exactly the same routing as the analog samples, including the
jump to stage p−3. When a token leaves stage p, it adds `q_p` times the weight
of its logical position. When a sample reaches logical position 16 (physical
stage 16, or stage 18 if moved), its sum is rounded to 14 bits. The rounded sum
goes out on the next phase-1 edge.

The calibration sample's sum is cleared up to and including stage k, so it adds
only stages k+1 to 18. Stages 17 and 18 count with the nominal weights G⁻¹ and
G⁻² below the LSB, which sharpens the measurement. The sum is returned as `ds`
after stage 18. The encoder also produces the `force_zero` strobe that grounds
stage k when the calibration sample reaches it, and the `extra_en` bits for
stages 17 and 18.

## Timing

- `clk` runs at twice the sample rate. Each edge ends one of the two
  non-overlapping phases, so the clock period is 9.77 ns at 51.2 MS/s.
  Internally a flag `ph` alternates. `phi1` is high in the period that ends
  with a phase-1 edge.
- `x_in` is sampled on phase-1 edges.
- `dout` changes on phase-1 edges and `dout_valid` is high for one clock. The
  latency is 16 phases (8 sample cycles) from the edge on which the sample was
  taken. There is one code per sample cycle, even during calibration.
- `cal_start` (a one-clock pulse) starts a run. The first instant is on the
  next phase-1 edge. `cal_done` rises 154 sample cycles after that first
  instant and `cal_busy` stays high until then.

## Number formats (own choices)

| quantity | type | format |
|---|---|---|
| voltage (analog model) | `volt_t` | signed 32 bit, 1 V = 2²⁴ |
| gain | `gain_t` | unsigned 18 bit, 16 fractional bits (1.81 → 118620) |
| weight, partial sum | `weight_t` | unsigned 24 bit, 8 fractional bits, in output LSBs |
| output code | `dout` | 14 bit, rounded to nearest, clipped to 0…16383 |

The nominal weights are computed at elaboration by `adc_cal_pkg::nominal_weight`.
The function multiplies 2^8 by the quantised gain (16 − i) times, with 24 guard
bits, and rounds the result.

## Files

| file | what it is |
|---|---|
| `rtl/adc_cal_pkg.sv` | sizes, formats, token type, nominal-weight function |
| `rtl/adc_top.sv` | the converter: pipeline model, encoder, weight bank, controller, phase flag |
| `rtl/analog_pipeline.sv` | **behavioural model**: 18 stages with the shift switches and the grounding |
| `rtl/pipeline_stage.sv` | **behavioural model**: S/H, comparator, sub-DAC, subtractor, gain |
| `rtl/digital_encoder.sv` | output codes, sample tokens, weight selection, calibration measurement |
| `rtl/weight_bank.sv` | 18 programmable weights, reset to nominal |
| `rtl/cal_controller.sv` | calibration sequence and weight update |
| `tb/tb_*.sv` | one self-checking testbench per module |

The top's ports `gain`, `thresh` and `vref` (one entry per stage) set the
errors of the analog model. In silicon they would not exist. The analog
pipeline would take their place, and the digital blocks connect to it through
`q`, `cal_shift`, `extra_en`, `force_zero` and `force_q`. The outputs `dout_shifted`,
`cal_shift`, `cal_force`, `weight_we` and `weights` are there for observation.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. To
build and run one (here the whole converter):

    verilator --binary --timing --assert -Irtl -y rtl -y tb \
        rtl/adc_cal_pkg.sv tb/tb_adc_top.sv --top-module tb_adc_top -o sim
    ./obj_dir/sim

Each run takes well under a second.

- `tb_adc_top` runs the converter at its default size.
  - **Part A** uses ideal stages. Every code is compared with a real-number
    ideal pipeline, including the codes of moved samples during a full
    calibration run. It also checks the latency and that no code is missing.
  - **Part B** uses the error case: a 150 kHz, 0.994 V sine sampled at
    51.2 MS/s, 1024 samples. All 18 stages have gain errors of 0.1–0.5 %,
    comparator offsets up to 0.112 V (10 % of full scale) and sub-DAC
    reference errors up to 0.1 %. Calibration starts at sample 350. Over ten
    random error sets the converter gives about 9–10.5 effective bits before
    calibration and 12.6–13.4 bits after, with a worst deviation from a
    straight line of 1–2 LSB. The test requires a gain of more than 2 bits,
    more than 12.5 bits after calibration, and exactly 154 sample cycles for
    the run.
  - The testbench also counts instants, forced stages, weight writes and
    moved samples reaching the output.
- `tb_analog_pipeline` follows every sample through the stages with an
  independent model of the shift table. It checks every decision and every
  residue, with stages 17 and 18 enabled only for moved and calibration
  samples.
- `tb_digital_encoder` drives random decision bits by the same table and
  checks the codes, the moved-sample flag, `force_zero`, `extra_en` and `ds`.
- `tb_weight_bank`, `tb_cal_controller` and `tb_pipeline_stage` check their
  modules alone. This includes the 11-cycle spacing, the order 7 → 1, the
  weight `D_S1 − D_S2` and the 154-cycle run.

## Where this design makes its own choices

- **Clocking.** The two phases are alternate edges of one clock. A real
  converter uses a non-overlapping clock generator, which is not part of the
  RTL.
- **Analog models.** The stage transfer is `G·(v − (q−½)·VREF)`, the standard
  block-diagram form. Writing it from the capacitor ratios of the MDAC gives
  `(1 + C1/C2)·v − (C1/C2)·V_DAC`, which is a different form. The model follows
  the block-diagram form, which also matches the full-scale derivation above.
  Amplifier saturation, noise and settling are not modelled. The switched-
  capacitor circuit itself is not described in RTL.
- **The dummy sample.** Stage 1 simply samples the input at an instant. Its
  results are discarded up to stage k.
- **Calibration schedule.** The 11-cycle slot, the order (forced 0, then
  forced 1) and the single measurement per point (no averaging) are choices
  made to fit a 154-cycle run for 7 stages.
- **Use of the spare stages.** Stages 17 and 18 are added to D_S with nominal
  weights. Keeping them idle outside calibration is done by enabling their
  sampling per sample; how the spare stages are switched off is this design's
  choice.
- **Weight widths, rounding, reset values and the encoder's token scheme** are
  all this design's own choices.
- **Accuracy limits.** Each measurement is quantised by the stages after the
  stage being measured, and the error builds up towards stage 1. With ideal
  stages, calibration moves w_1 by about −3 LSB (0.04 %). That changes the
  overall gain, not the linearity.
- **Not covered.** Variants with more bits per stage and the gate-count and
  area estimate are not covered.
