# MCE background calibration for a pipelined ADC with an open-loop first stage

A pipelined ADC is cheaper and faster if the first stage's residue amplifier is a plain
open-loop differential pair instead of a high-gain op-amp in feedback. The cost is that
the gain is neither exact nor linear. A good model of such an amplifier is

    Vres = a1*Vx + a3*Vx^3

This design is the digital logic that measures a1 and a3 while the converter runs, then
removes both errors from the output. Nothing stops the conversion, and no reference
converter is needed. The method is the *multi-correlation estimation* (MCE) technique:

* The first-stage sub-DAC adds a small random offset (dither) to every sample. It is
  +-Vd1 for one window of samples and +-Vd2 = Vd1/2 for the next. The sign comes from a
  single pseudorandom bit R.
* Correlating the digitized residue with R gives, per window,
  `E[R*Db] = -a1*Vd - a3*(3*E[ea^2]*Vd + Vd^3)`, where ea is the first-stage
  quantization error. The input and the backend quantization noise are uncorrelated with
  R, so they drop out.
* Take `eps3 = E1 - 2*E2`, with E1 from the Vd1 window and E2 from the Vd2 window. This
  cancels every term that is linear in Vd, including the input-dependent E[ea^2]. What
  remains is `-3/4 * a3 * Vd1^3`: a pure measure of the cubic error.
* Once the cubic error is corrected, `E1 = -a1*Vd1` measures the linear gain.

Two least-mean-square (LMS) recursions drive these error terms to zero:

* p1 converges to a1.
* p3 converges to a3/a1^3.

The output is corrected with the current values of p1 and p3.

The scheme comes from the thesis *A Novel Digital Background Calibration Scheme for
Multistage ADCs*. This RTL is an independent implementation of its digital part. Below,
"the reference" means that thesis. Where this design differs from it, the difference is
marked in the text and collected under *Scope and departures*.

## Signal flow

```
        s1_code (k) ------------------------------+--> DWA selector --> cap_code_sel / cap_dith_sel
 stage 1 (analog) <-- inj_sign, inj_big <-- dither sequencer (LFSR + window counter)
        |                                          |
        | be_code (ten 1.5-bit decisions, ADC_LATENCY later)      delay line (dither record, k)
        v                                          |
   backend_dec --Db--> nonlinear_cal --Db1(u)--+---+--> mce_correlator --s1,s2--> lms_estimator
    (shift+add)        (table e(Db) for p3)    |                                   |   |
                               ^               +--> linear_recombine --> dout      p1  p3
                               +------------------------------ p3 -----------------+   |
                                                         p1 --------------------------+
```

The modules, in data-flow order:

* **`dither_sequencer`** holds a 31-bit LFSR (`lfsr_rng`) and a window counter. It
  presents the dither for the current sample: its sign, its amplitude, and whether the
  sample is the last one of a Vd1/Vd2 window pair. The windows are 2^`N_LOG2` samples
  long (2^17 by default), so p1 and p3 are updated once every 2^18 samples.
* **`dwa_selector`** chooses which of the sub-DAC's split unit capacitors carry the code
  and which carry the dither. Each unit capacitor is split in two, and the halves form a
  ring. A decision d takes the next 2d halves for the code, then 2 halves for Vd1 or 1 for
  Vd2. The pointer then moves past all of them (data-weighted averaging). Over time every
  capacitor is used equally often. This averages out the Vd1/Vd2 ratio error, which would
  otherwise bias p3.
* **`backend_dec`** adds the ten 1.5-bit backend decisions with weights 2^-1 ... 2^-10.
  The result is the digitized residue Db.
* **`nonlinear_cal`** outputs the linearized residue `u`, the root of
  `u + p3*u^3 = Db`. This is the amplifier's cubic inverted in the digital domain,
  scaled by a1.
* **`mce_correlator`** conditionally negates `u` by R and accumulates it, separately for
  the Vd1 and Vd2 windows. It hands both sums to the estimator at the end of each window
  pair.
* **`lms_estimator`** forms `eps3 = E1 - 2*E2` and `eps1' = E1/p1 + Vd1`, then applies
  `p1 -= mu1*eps1'` and `p3 -= mu3*eps3`. The division uses a sequential divider
  (`seq_divider`, 56 clocks), which is cheap because it is needed only once per
  2^18 samples.
* **`linear_recombine`** outputs `dout = p1*(k*delta + R*Vd) + u`. The first-stage value
  includes the dither that the sub-DAC subtracted, so the dither cancels in the output.
  The design multiplies D1 by p1 rather than dividing the residue by p1. As a result,
  `dout` has a fixed overall gain of about a1 (it is in residue units). Divide by `p1`,
  or ignore the gain, to get input units.

## The correction table (the subtle part)

The reference proposes a precomputed two-dimensional ROM e(Db, p3). This design does not
use one, because p3 changes only once per update. Instead, `nonlinear_cal` keeps a table with one
entry e(Db) = Db - u per backend code (2048 entries for 11-bit Db), in two banks:

* One bank corrects samples.
* Meanwhile, a sequential solver fills the other bank for the newest p3. It runs a 17-step
  bisection per entry, one step per clock, so a whole table takes about 35 000 clocks. That
  is far shorter than the 262 144 samples between updates.
* The finished bank becomes active only at a window-pair boundary, so no correlation
  window ever mixes two tables. The consequence is that the p3 used in the data path lags
  the estimator by one update. The LMS loop tolerates this at the step sizes used.
* After reset, no bank is valid and the residue passes uncorrected. The first table (for
  the reset value p3 = 0, which is e = 0) becomes active as soon as it is solved.

Bisection finds the root wherever `u + p3*u^3` is monotonic, that is for
`|u| < sqrt(-1/(3*p3))` when p3 < 0. For the example amplifier that bound is 0.85 Vref,
while the residues that occur stay below 0.48 Vref. Codes beyond the turning point saturate.

## LMS loop behaviour

The defaults are the step sizes mu1 = 3.04 and mu3 = 0.96 (held as Q.10 constants 3113 and
983), with p1 starting at the ideal gain 8 and p3 at 0. A closed-loop simulation at the
defaults uses an amplifier with a1 = 7.6 and a3 = -204.8 (5 % gain error, 10 % cubic
distortion) and a 0.97 Vref sine input. The parameters evolve as follows:

| updates (x 2^18 samples) | 25    | 50    | 100   | 150   | 250   | 400   |
|--------------------------|-------|-------|-------|-------|-------|-------|
| p1 (target 7.6)          | 7.792 | 7.656 | 7.533 | 7.512 | 7.549 | 7.584 |
| p3 (target -0.4665)      | -0.10 | -0.19 | -0.32 | -0.39 | -0.45 | -0.46 |

p1 first overshoots below a1 and then creeps back. The two loops are not orthogonal:
while cubic error remains, it pulls E1. After 500 updates (131 M samples) p1 = 7.5956
and p3 = -0.4678. At that point:

* the output divided by p1 follows the input within 0.30 LSB of a 12-bit converter
  (0.10 LSB rms);
* the SNDR has risen from 44.1 dB (p1 = 8, p3 = 0) to 82.6 dB. The reference reports
  38.4 dB and 71.1 dB for its own, noisier behavioural model.
* the ENOB measured after each of the last 20 updates stays between 13.25 and 13.69 bits.
  The parameter jitter from one update to the next costs little (the reference reports a
  steady-state mean of 11.52 bits).

The analog model has no thermal noise and only the first stage is imperfect, so these
figures are an upper bound for a real converter.

The loop never stops, so it follows drift of the amplifier. `tb_mce_cal_top` tests this
with 2^12-sample windows: once the loop has converged, a1 drops from 7.6 to 7.4 and the
converter keeps running. About 150 updates later p1 has reached 7.41. p3 then moves
around its new optimum, -204.8/7.4^3 = -0.505.

The time constants follow from the loop algebra: tau3 = 4/(3*a1^3*Vd1^3*mu3) and
tau1 = p1/(mu1*Vd1), both counted in updates. With Vd1 = 1/32 Vref they are about 100 and
84 updates (roughly 26 M and 22 M samples). These values are consistent with the run
above. For p1 the formula gives a much longer time than the 1.02e6/fs the reference lists
for this configuration. For p3 the reference lists 67e6/fs, about 256 updates, which is
within a factor of 2.5 of the formula.
Larger mu shortens the loops at the cost of more parameter jitter: the steady-state spread
is proportional to mu.

## Dither amplitude mismatch

Everything above assumes that Vd2 is exactly Vd1/2. Suppose Vd2 is too large by alpha.
Then E2 gains -a1*alpha, and p3 settles away from its optimum:

    dp3 = -2*a1*alpha / (3/4 * a1^3 * Vd1^3)

This is the first-order shift. For this amplifier it is about -0.024 for each 0.1 % of
Vd2. The shift actually seen is about half of that, because the exact inverse reacts more
strongly to p3 at large residues. `tb_mce_vd2_mismatch` measures the effect (means over
the last 200 of 700 updates, 2^14-sample windows):

| dither capacitors | p3 - p3,opt | SNDR |
|-------------------|-------------|------|
| Vd2 0.1 % too large | -0.006 | 73.1 dB |
| fixed pair, +0.5 % / -0.5 % (Vd2 0.5 % too large) | -0.064 | 66.3 dB |
| same pair in a ring of 66 half capacitors (+-0.5 %), rotated by DWA | +0.009 | 73.7 dB |

With DWA, every half capacitor carries the dither equally often, so the mismatch averages
out of the correlations. What is left is a small per-sample dither error, which stays in
the output as noise.

## Number formats and sizes

All values are fixed point with Vref = 1 (`mce_pkg`):

| quantity | format |
|----------|--------|
| sample-domain words (`u`, `dout`) | Q.16 in 24 bits |
| p1, p3, eps1', eps3 | Q.24 in 32 bits |
| correlation accumulators | 48 bits |

Other default sizes:

* **First stage:** step delta = 1/16 (`DELTA_LOG2 = 4`), decision k in [-16, 16],
  Vd1 = delta/2 = 1/32, Vd2 = 1/64.
* **Backend:** ten 1.5-bit stages (`BE_STAGES = 10`), so Db has an LSB of 2^-10 Vref.
* **DWA ring in the top:** 33 unit capacitors (one per decision level), split into 66
  halves.

## Top-level interface and timing (`mce_cal_top`)

The converter delivers one sample per clock, continuously after reset. The reset is
asynchronous and active low.

| port | dir | meaning |
|------|-----|---------|
| `s1_code[5:0]` | in | stage-1 sub-ADC decision k (signed) of the sample in this cycle |
| `inj_sign`, `inj_big` | out | dither of this sample: sign (1 = +Vd) and amplitude (1 = Vd1) |
| `cap_code_sel[65:0]`, `cap_dith_sel[65:0]` | out | DWA selections for this sample |
| `be_code[9:0][1:0]` | in | backend decisions of the sample taken `ADC_LATENCY` clocks earlier (0: -1, 1: 0, 2: +1) |
| `dout[23:0]`, `dout_valid` | out | calibrated output, Q.16, `ADC_LATENCY + 3` clocks after the sample's cycle |
| `p1`, `p3` | out | current parameters, Q.24; `p_update` pulses after each change |
| `eps1p`, `eps3` | out | last error estimates, Q.24 |
| `lut_swap`, `lut_busy` | out | a new correction table became active / one is being computed |

The port timing works as follows:

* Within one cycle, `s1_code`, `inj_*` and `cap_*` all refer to the same sample. The DWA
  pointer advances at the end of the cycle.
* `ADC_LATENCY` (default 6) must equal the number of clocks between a sample's stage-1
  decision and its aligned backend code. Set it to match the analog pipeline.

Parameters: `N_LOG2`, `DELTA_LOG2`, `BE_STAGES`, `ADC_LATENCY`, `MU1_Q10`, `MU3_Q10`,
`P1_INIT`, `P3_INIT` and `SEED`.

## Simulating

Every testbench in `tb/` is self-checking. Each ends with a line
`TB_RESULT checks=N failures=M`. To build and run one with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb rtl/mce_pkg.sv tb/tb_mce_cal_top.sv \
          --top-module tb_mce_cal_top -Mdir obj && ./obj/Vtb_mce_cal_top
```

| testbench | what it shows |
|-----------|---------------|
| `tb_mce_cal_top` | closed loop with 2^12-sample windows, 700 updates, then a gain drift and 600 more (about 10 s) |
| `tb_mce_cal_top_full` | closed loop at all defaults, 500 updates (131 M samples, about 2 min), steady-state ENOB spread |
| `tb_mce_vd2_mismatch` | three engines side by side: Vd2 0.1 % off, fixed dither capacitors 0.5 % off, the same capacitors rotated by DWA (about 1 min) |
| `tb_lfsr_rng` | RNG sequence |
| `tb_dither_sequencer` | window alternation and sign sequence |
| `tb_dwa_selector` | the two-cycle 8-capacitor example, a random reference check, equal capacitor use |
| `tb_backend_dec` | shift-and-add recombination |
| `tb_nonlinear_cal` | table solution against a floating-point root, swap discipline |
| `tb_mce_correlator` | window sums |
| `tb_lms_estimator` | each recursion step against floating point, 57-clock update latency |
| `tb_linear_recombine` | p1*(k*delta + R*Vd) + u |

The three closed-loop benches:

* drive `tb/pipeline_adc_model.sv`, a real-valued behavioural model of the first stage
  (sub-ADC, dithered sub-DAC, cubic amplifier) and of ten ideal 1.5-bit backend stages;
* count the mechanisms of the scheme: Vd1 and Vd2 windows, LMS updates, table swaps and
  DWA wrap-arounds (the first two also count both dither signs);
* check the convergence of p1 and p3 and the SNDR;
* the first two also check the output error against the input and the output latency.

## Scope and departures

* Only the first stage is calibrated, and the backend is taken as ideal. The scheme extends
  stage by stage: each stage is calibrated with the stages behind it as its backend, with
  its own estimator and calibration block. That chain is not built here.
* The analog parts are outside this RTL: sample-and-hold, comparators, the modified
  capacitor array and the residue amplifier. So is the time alignment of the backend stage
  outputs. `be_code` is expected already aligned.
* The cubic inverse is solved by bisection into a recomputed two-bank table, not by the
  closed trigonometric form in a two-dimensional ROM. The two agree where the cubic is
  monotonic.
* p3 is defined as a3/a1^3. This is the ratio the cubic inverse depends on, and it gives
  the reference's example value of -0.46654. One summary formula in the reference writes
  a3/a1 instead.
* The cubic error term is E1 - 2*E2, as derived in the reference. Its mismatch analysis
  writes E1 - E2 once, which would not cancel the linear term.
* Window order (Vd1 first), LFSR polynomial and seed, word lengths, `ADC_LATENCY`, reset
  behaviour, the 1.5-bit decision encoding and DWA ring sizing are this design's own
  choices.
* No timing closure at the 200 MS/s target has been attempted.
