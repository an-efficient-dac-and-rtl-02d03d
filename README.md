# Add-only DAC and interstage-gain calibration for a 9-level-per-stage pipelined ADC

A multi-bit pipelined ADC loses linearity mostly in its first stages. Two
effects dominate:

- **Capacitor mismatch** in the sub-DAC shifts each linear segment of the
  stage's residue curve up or down.
- **Finite opamp gain** changes the interstage gain, so each segment's slope
  is wrong.

Both effects open gaps and overlaps between the segments. These show up as
missing codes, large DNL and a saw-tooth INL.

The calibration here removes both effects without a single multiplier or
divider. Each unit capacitor of a stage is measured once, through the stages
behind it. From the eight measured errors, an adder chain builds nine
correction constants, one for each possible stage decision. During
conversion, the constant that belongs to the stage's decision is added to the
code coming from the stages behind it. This puts every segment back in line.
The slope of the segments is not corrected, so what remains is a plain overall
gain error, which most applications tolerate.

The repository holds synthesizable RTL for the digital part and behavioural
(real-valued) models of the analog pipeline, so that the whole converter can
be simulated end to end.

## The converter

Seven stages. Each of stages 1 to 6 works the same way:

- a 9-level sub-flash ADC quantises the stage input to a level L in -4..+4
  (code D = L+4, 0..8);
- a sub-DAC made of eight unit capacitors Cs1..Cs8 subtracts L steps;
- a residue amplifier with a nominal gain of 4 amplifies the difference and
  passes it to the next stage.

Stage 7 is a bare 9-level flash. Everything is measured in the stage step
Delta:

- The input range is ±4.5 Delta.
- An ideal amplified residue stays within ±2 Delta, while the next stage accepts
  ±4.5 Delta. The ±2.5 Delta of headroom absorbs comparator offsets of up to
  about ±0.6 Delta.

The digital output is

    dout = sum over k of (D_k - 4) * 4^(7-k)   [+ compensation, see below]

in units of Delta/4096. That gives 9·4^6 = 36864 levels, about 15.2 bits,
held in a signed 16-bit word. Nominal codes span ±21844, and the word is
saturated at ±32767.

How the sub-DAC is set from the code (`dac_decoder`, matrix M):

| code D | Cs1 | Cs2 | Cs3 | Cs4 | Cs5 | Cs6 | Cs7 | Cs8 |
|---|---|---|---|---|---|---|---|---|
| 0 | -1 | -1 | -1 | -1 | 0 | 0 | 0 | 0 |
| 1 | 0 | -1 | -1 | -1 | 0 | 0 | 0 | 0 |
| 2 | 0 | 0 | -1 | -1 | 0 | 0 | 0 | 0 |
| 3 | 0 | 0 | 0 | -1 | 0 | 0 | 0 | 0 |
| 4 | 0 | 0 | 0 | 0 | 0 | 0 | 0 | 0 |
| 5 | 0 | 0 | 0 | 0 | 1 | 0 | 0 | 0 |
| 6 | 0 | 0 | 0 | 0 | 1 | 1 | 0 | 0 |
| 7 | 0 | 0 | 0 | 0 | 1 | 1 | 1 | 0 |
| 8 | 0 | 0 | 0 | 0 | 1 | 1 | 1 | 1 |

(+1 means the capacitor is switched to +Vref, -1 to -Vref.)

## Why adding constants is enough

With opamp gain A and feedback factor beta, a stage amplifies by
G' = A/(1 + A·beta) instead of 4. Capacitor j contributes its own step dCs_j
instead of exactly 1 Delta. The residue for level L is then

    r = G' · (vin - sum_j M[D][j] · dCs_j)

**Measuring configuration.** The stage input is grounded and only Cs_i is
switched to +Vref. The stage then outputs r_i = -G'·dCs_i, which is -4 Delta
if ideal. The stages behind it digitise this value. The error of capacitor i
is

    eps_i = -4 Delta - r_i

**Correction constants.** Taking C[D] = sum_j M[D][j] · eps_j gives

    r + C[D] = G'·vin - 4·L

so the stage's level L cancels exactly against the 4·L of its own digital
weight. Every segment lands on one straight line with slope G'/4.

Because every row of M is a run of equal entries next to the middle column,
C is just two running sums (`comp_value_calc`):

- C[4] = 0
- C[3] = -eps_4, C[2] = -eps_4 - eps_3, and so on down to C[0]
- C[5] = eps_5, C[6] = eps_5 + eps_6, and so on up to C[8]

The residual gain error matters because the measurement of a stage goes
through the stages behind it. For that reason stages are calibrated from the
back: stage 3 first, through the uncalibrated stages 4..7, then stage 2
through the calibrated stage 3, then stage 1. The calibrated chain ends up
with a gain equal to the product of the three stages' G'/4. That is about
0.96 with 50 dB opamps. Stages 4..6 stay uncalibrated: at their weight, their
errors are below one 14-bit LSB.

## Digital core (`pipeadc_cal_core`, synthesizable)

- **`digital_correction`**
  - A shift register per stage lines the codes up in time. Stage k's code
    arrives k-1 clocks after stage 1's.
  - It then forms, from the back, P_7 = D_7 - 4 and
    P_k = (D_k-4)·4^(7-k) + P_(k+1) + C_k[D_k].
  - The compensation term C_k[D_k] exists only for k ≤ 3 and is added only
    while compensation is enabled.
  - P_1, saturated, is `dout`. For each calibrated stage k, P_(k+1) is
    exported as that stage's *backend code*.
- **`stage_compensator`** (one per calibrated stage) holds the nine constants
  and selects one by the aligned stage code. It resets to zero, which means no
  correction.
- **`cal_controller`** runs the calibration. For each calibrated stage
  (3, 2, 1) and each capacitor (1..8), it:
  1. drives `fe_cal_en/stage/cap`;
  2. waits `SETTLE` clocks;
  3. sums 2^`AVG_LOG2` backend codes and rounds the mean (half rounds up);
  4. stores eps = -4^(7-k) - mean. Here -4^(7-k) is -4 Delta expressed in
     output LSBs at stage k's backend.

  After the eighth capacitor, it pulses that stage's `comp_load`, and the
  compensator takes `comp_value_calc`'s nine sums.
- While a run is in progress, compensation is forced on, whatever
  `cal_bypass` says. This makes each stage be measured through its already
  calibrated backend.

Timing at default parameters:

| quantity | value |
|---|---|
| Latency, sampling edge of stage 1 → `dout` | 7 clocks (`N_STAGES`) |
| Calibration run | 3·(8·(16+16+1)+1) = 795 clocks of `cal_busy` |

Results taken while `cal_busy` is high are not conversions of the input.
After synthesis, the core is 241 word-level cells and 682 flip-flop bits.
Of those bits, 432 are the 27 compensation words and 84 are the alignment
registers.

| parameter | default | meaning |
|---|---|---|
| `N_STAGES` | 7 | stages |
| `N_CAL` | 3 | calibrated stages (the first ones) |
| `OUT_W` | 16 | output word |
| `AVG_LOG2` | 4 | log2 of samples averaged per capacitor |
| `SETTLE` | 16 | clocks waited after each configuration change; must exceed the 9-clock path from the configuration to the backend code |

Internal words (pipeadc_pkg) are 20 bits for the recombination, 14 bits for
eps and 16 bits for the constants.

## Analog models (behavioural, not synthesizable)

- **`subflash_adc_model`**: eight comparators at ±0.5, ±1.5, ±2.5 and
  ±3.5 Delta. Each threshold has a Gaussian offset `THR_SIGMA`, clipped to
  ±0.6 Delta.
- **`mdac_model`**: the unit-capacitor MDAC, with
  - Cf = 8/3 of a unit capacitor, which gives a nominal gain of 4;
  - Gaussian capacitor mismatch `CAP_SIGMA`;
  - closed-loop gain A/(1+A·beta), with A from `OPAMP_GAIN_DB`;
  - Vref = 32/3 Delta, so that a nominal capacitor step is exactly 1 Delta.
- **`pipeadc_frontend_model`**: six stages of flash + `dac_decoder` + MDAC,
  plus the last flash.
  - Each stage registers its code and residue once per clock. The sampling
    and amplification phases are merged into one clock.
  - It adds `NOISE_RMS` to every residue.
  - It implements the measuring configuration.
- **`model_rand_pkg`**: all random draws come from a seeded generator here, so
  a given `SEED` always builds the same converter.

Default error sizes:

| error | default | in volts |
|---|---|---|
| capacitor mismatch σ | 0.3 % | — |
| opamp gain | 50 dB | — |
| comparator offset σ | 0.16 Delta | 30 mV |
| thermal noise | 5.3e-8 Delta rms | 10 nV rms |

The volt figures assume Delta = 187.5 mV. The Delta scaling and the clipping
are modelling choices.

`pipeadc_top` joins the front-end model and the core. Its input `vin` is a
`real` in Delta units, so the top is a simulation model. Take
`pipeadc_cal_core` for an implementation.

## What the simulations show (default seed)

| test | compensation off | after calibration |
|---|---|---|
| 40000-point ramp, missing 14-bit codes | 245 | 0 |
| max abs DNL, 14-bit LSB (code density, about 4.4 hits per code) | 1.00 (missing codes) | 0.51 |
| max abs INL, 14-bit LSB (best-fit line) | 12.9 | 0.79 |
| overall gain | 1.00 (on average) | 0.958 |
| coherent sine, 4.3 Delta, 4096 points: SNDR | 56.4 dB | 84.6 dB |

With 1 % capacitor mismatch, `tb_pipeadc_cal_core` goes from 262 missing codes
and 20.6 LSB INL to 0 missing codes and 0.86 LSB.

## Testbenches

Each testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_pipeadc_top` | The end-to-end test at default parameters: latency, ramp before calibration, calibration length and the three compensator loads, ramp after calibration (no missing code, DNL < 1 and INL ≤ 2 LSB14, gain equal to the product of the calibrated stages' gains), and missing codes coming back under bypass. |
| `tb_sine_sndr` | The SNDR before and after calibration. |
| `tb_pipeadc_cal_core` | The core with a 1 % mismatch front end. Stage-3 errors are compared with the model's capacitor values. |
| `tb_digital_correction` | Random staggered codes and constants against a reference sum. Covers bypass and saturation. |
| `tb_cal_controller` | Against a scripted backend: error values, rounding, stage order and run length. |
| `tb_comp_value_calc`, `tb_dac_decoder`, `tb_stage_compensator` | Against the matrix written out in full. |
| `tb_subflash_adc_model`, `tb_mdac_model`, `tb_pipeadc_frontend_model` | The models against their ideal equations. |

Run one with Verilator 5, from the directory that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert -Irtl -Itb \
        rtl/pipeadc_pkg.sv rtl/model_rand_pkg.sv tb/tb_pipeadc_top.sv \
        --top-module tb_pipeadc_top -Mdir build && ./build/Vtb_pipeadc_top

Each takes well under a second.

## Choices not fixed by the underlying method, and limits

- Time alignment of the stage codes, the 16-bit saturation and the word
  widths inside the core are choices made for this RTL.
- The calibration is foreground: conversion stops during a run, and the run is
  started by a pin. Two further choices belong to the run itself:
  - the order (stage 3, then 2, then 1) and forcing compensation on during
    the run;
  - averaging and the settling wait.
- Residual gain error: after calibration the converter has a gain of about
  0.96 rather than 1. This is the product of the three calibrated stages'
  gain errors. Nothing here corrects it.
- In `dac_decoder`, `dac_p[3:0]` and `dac_n[7:4]` are constant zero by
  construction: the lower capacitors only ever go to -Vref and the upper ones
  only to +Vref. The middle constant C[4] of `comp_value_calc` is always zero.
- The analog models are idealised:
  - one clock per stage;
  - no opamp offset, settling, or Cf mismatch;
  - offsets clipped to the redundancy range.

  The numbers above come from these models, not from silicon.
