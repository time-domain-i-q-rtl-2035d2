# Time-domain I/Q-imbalance and LO-feedthrough calibrator

A direct-conversion transmitter distorts its baseband signal in two ways that
matter for a wideband WLAN (IEEE 802.11af, 54-862 MHz TV bands): the I and Q
paths do not match in gain and phase, which creates an image of the signal,
and the LO leaks to the output (LO feedthrough, LOFT), which creates a carrier
spur. This RTL measures both impairments with nothing more than a square-law
envelope detector on the transmitter output, and then pre-distorts the
baseband samples so that the two effects cancel.

The key idea is that the detector output can be written as a *linear*
function of known signals. An LMS loop fits the five unknown weights of that
function in the time domain, one sample at a time, with no FFT. A CORDIC-based
estimator then turns the weights into gain, phase and LOFT values, and a small
per-sample compensator applies the correction.

## The signal model

The transmitter's baseband equivalent output is modelled as

    v = I + j·α·e^{jθ}·Q + σ·e^{jφ}

Here α and θ are the gain and phase error of the Q branch relative to I, and
σ·e^{jφ} is the LO leak. An ideal square-law detector returns
s = |v|². Expanding:

    s = I² + χ·η
    η = [ Q²,  2I,        −2IQ,       1,   2Q            ]
    χ = [ α²,  σ·cos φ,   α·sin θ,    σ²,  σ·sin(φ − θ)  ]

η is computed from the known baseband sample, and χ is constant. So
`e = s − I² − χ·η` is an error that is linear in χ, and the LMS update

    χ ← χ + μ·e·η,     μ = 1/128

drives it to zero. Once χ has converged, the impairments follow:

    α = √χ₁    sin θ = χ₃ / α    σ = √χ₄    cos φ = χ₂ / σ
    θ = asin(sin θ)              φ = acos(cos φ)

The sign of φ is not given by the arccosine. It comes from χ₅. Since
`σ·sin φ·cos θ = χ₅ + χ₂·sin θ` and cos θ > 0, the sign of the right-hand side
is the sign of φ.

A single baseband tone is enough for training. With a tone, Q² contains a
component at twice the tone frequency, which separates χ₁ from the constant
term χ₄. The testbenches use a tone of amplitude 0.9 full scale. With small
signals the Q²/1 pair becomes nearly collinear, and training slows down
markedly.

## The compensator

The compensator inverts the model. Take d = Q − σ·sin φ. It sends

    Qc = d / (α·cos θ)
    Ic = I − σ·cos φ + tan θ · d

Passing (Ic, Qc) through the model gives back exactly I + jQ. Per sample, this
costs two multiplies and three additions, with one register stage. The four
coefficients are:

| coefficient | value              | source                          |
|-------------|--------------------|---------------------------------|
| `lo_i`      | σ·cos φ            | χ₂ directly                     |
| `lo_q`      | σ·sin φ            | (χ₅ + χ₂·sin θ)·α·g             |
| `g`         | 1/(α·cos θ)        | divider                         |
| `t`         | tan θ              | divider (sin θ / cos θ)         |

`lo_q` is deliberately not formed as σ·sin(acos(χ₂/σ)). When φ is close to 0
or π, that route is ill-conditioned. With 15-bit χ, one LSB of χ₂ then moves
sin φ by several percent, and the LRR is capped near 30 dB. The χ₅ route has
no such problem. φ itself is still computed with the arccosine and reported.

## Block structure and timing

```
 bb ──┬──────────────────────────► iq_compensator ──► tx (to DACs)
      │                                   ▲ coef, en
      └─► bb_delay ─► lms_update ─► param_estimator
                         ▲  chi          (2× cordic, 2× divider)
 det (envelope) ─────────┘
                cal_controller sequences all of the above
```

All blocks run on one clock, one baseband sample per cycle. The timing figures
assume 80 MHz.

A calibration proceeds as follows:

1. **Clear** (1 cycle). χ is set to [1, 0, 0, 0, 0], an ideal transmitter. The
   compensator is bypassed from here until estimation ends, so the detector
   sees the raw transmitter.
2. **Train.** This is 12000 LMS steps of 8 cycles each, i.e. 96000 cycles or
   1.2 ms. Each step takes the current detector sample `det` together with the
   baseband sample delayed by `delay_sel + 1` cycles. Training therefore
   decimates the sample stream by 8.
3. **Estimate** (89 cycles). This is three rounds on the two CORDIC operators,
   then a multiply cycle, then the two dividers.
4. **Compensate.** The compensator is enabled with the new coefficients, and
   `cal_done` stays high. A new `cal_start` repeats the sequence.

From the cycle in which `cal_start` is high to `cal_done`, the total is
96093 cycles.

### LMS step (`lms_update`)

One step needs 11 products. Two shared multipliers compute them over phases
1-6 of the 8-cycle step:

| phase | multiplier A | multiplier B | action                               |
|-------|--------------|--------------|--------------------------------------|
| 1     | I·I          | Q·Q          | e = s − I²; store Q²                 |
| 2     | I·Q          | χ₁·Q²        | store IQ; e −= χ₁Q²                  |
| 3     | χ₂·I         | χ₃·IQ        | e −= 2χ₂I − 2χ₃IQ                    |
| 4     | χ₅·Q         | –            | e −= 2χ₅Q + χ₄ (e complete)          |
| 5     | e·Q²         | e·I          | update χ₁, χ₂                        |
| 6     | e·IQ         | e·Q          | update χ₃, χ₅; χ₄ += μe              |
| 7     | –            | –            | `step_done`                          |

The χ accumulators are 23 bits wide: the 15 published bits plus 8 guard bits
below them. They saturate rather than wrap. Without the guard bits, μ·e·η
rounds to zero while the small LOFT terms (σ² is only a few tens of LSBs) are
still far from their final values. The estimator sees only the upper 15 bits.

### Parameter estimator (`param_estimator`, `cordic`, `divider`)

Each of the two CORDIC operators is used three times, for 25 cycles each time:

| round | operator A                   | operator B                          |
|-------|------------------------------|-------------------------------------|
| 1     | α = √χ₁                      | σ = √χ₄                             |
| 2     | sin θ = χ₃/α                 | cos φ = χ₂/σ                        |
| 3     | θ = asin(sin θ), and cos θ   | φ = π/2 − asin(cos φ)               |

The `cordic` operator implements three modes:

- **Square root**, by hyperbolic vectoring of (m + ¼, m − ¼). The operand is
  first normalised by 4^k into [0.5, 2), because σ² can be as small as 10⁻³.
  Iterations 4 and 13 are repeated, as hyperbolic CORDIC requires. The gain
  is removed with a constant multiply.
- **Division**, by linear vectoring. It requires |a/b| < 2.
- **Arcsine**, by double rotation. The unit vector is rotated twice per
  iteration toward the target sine, and the target is scaled by the exact
  step gain (1 + 2⁻²ⁱ). The rotation direction flips while x < 0, and a
  result that ends with x < 0 is folded back to the principal value. This
  mode also returns cos of the angle.

The CORDIC latency is 1 load cycle, 23 iterations, 1 gain-multiply cycle and
1 output cycle, so 25 in total. Near |sin| = 1 the angle is ill-conditioned by
nature, but the cosine output stays accurate. The arcsine inputs are clamped
to ±(1 − 2⁻¹⁶).

The `divider` is a radix-4 restoring divider. It produces a 16-bit magnitude
(Q1.15) in 8 cycles plus a sign cycle, 9 cycles in total. The caller must keep
|num/den| below 2.

## Number formats (`iqloft_pkg`)

| signal                      | format                  |
|-----------------------------|-------------------------|
| baseband I/Q, `tx`          | signed 12 bit, Q1.11    |
| detector sample `det`       | unsigned 16 bit, Q4.12  |
| χ (output of LMS)           | signed 15 bit, Q2.13    |
| estimator values, angles    | signed 26 bit, 20 frac. |
| compensator coefficients    | signed 17 bit, Q2.15    |
| LMS error `lms_err`         | signed 32 bit, 22 frac. |

The detector output is expected in the same scale as |v|², i.e. unit gain. A
real detector's gain and offset must be calibrated into `det` before it
reaches this block, or they will be absorbed into α² and σ².

## Top-level interface (`iqloft_top`)

| port          | dir | meaning                                               |
|---------------|-----|-------------------------------------------------------|
| `bb`          | in  | baseband sample (struct `iq_t`: `.i`, `.q`)           |
| `det`         | in  | digitised envelope-detector sample                    |
| `delay_sel`   | in  | alignment: `det` pairs with `bb` from `delay_sel+1` cycles earlier |
| `cal_start`   | in  | start a calibration (pulse)                           |
| `tx`          | out | compensated sample to the DACs, 1 cycle after `bb`    |
| `cal_busy`    | out | calibration in progress (compensator bypassed)        |
| `cal_done`    | out | compensator active                                    |
| `cal_state`, `train_steps`, `chi`, `imp`, `coef`, `lms_err` | out | observation |

`delay_sel` must equal the loop latency from `tx` to `det`, not counting the
compensator's own register. In the testbench, the detector model has 5 cycles
of latency and `delay_sel = 5`. A setting one cycle off still converges, but
to a biased χ. With the testbench's tone, IRR and LRR after calibration then
drop to 40-44 dB, and the reported σ and φ become unusable.

Parameters: `N_TRAIN` (12000), `MU_SHIFT` (7, i.e. μ = 1/128) and `DLY_DEPTH`
(16).

## What is original and what is this implementation's own

The following come from the original description of the scheme:

- the detector model s = |v|²;
- the χ/η decomposition and the LMS update with μ = 1/128;
- χ at 15 bits;
- 8 cycles per step and 12000 steps at 80 MHz;
- two CORDIC operators reused for square root, division and arcsine/arccosine
  at 25 cycles per operation;
- two 9-cycle dividers;
- a 1-cycle multiply/add compensator.

The following are choices made here:

- all word widths except χ;
- the schedule of the 11 LMS products on two multipliers;
- the guard bits and saturation;
- the initial χ;
- the CORDIC algorithms and the arcsine fold;
- how the sign of φ is found, and the well-conditioned `lo_q`;
- the compensator equations, and the role of the two dividers, which here
  compute the compensator coefficients;
- the delay line;
- the sequencer, including compensator bypass during training and
  recalibration from the compensating state.

The original counts 4 multipliers for estimator and compensator together. This
implementation uses four plain multiplies in the estimator besides the CORDIC
gain corrections, and two in the compensator.

Limitations:

- Training length is fixed. Convergence is not detected.
- If the LOFT is near zero, σ → 0, so cos φ = χ₂/σ is undefined and the
  reported φ is meaningless. The coefficients are still correct, because
  `lo_i` and `lo_q` do not depend on φ.
- Detector nonlinearity (HD3) is not modelled by the LMS. It leaks mostly into
  σ², which biases the LOFT estimate. See `tb_hd3_sweep` below.

## Verification

Every block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`:

| testbench            | what it checks |
|----------------------|----------------|
| `tb_cordic`          | sqrt, division and arcsine/cosine against real-valued references, including small radicands and sines near ±1; 25-cycle latency |
| `tb_divider`         | 300 random quotients bit-exact; 9-cycle latency |
| `tb_lms_update`      | 8-cycle step timing, first-step error and update, convergence of all five χ to a known transmitter within 0.004 after 12000 steps |
| `tb_param_estimator` | α, θ, σ, φ and all four coefficients for fixed and random impairments, including φ between 0 and θ and φ near π; 89-cycle latency |
| `tb_iq_compensator`  | outputs against the real-valued equations within 1 LSB, saturation, bypass, and closed-loop inversion of the transmitter model |
| `tb_bb_delay`        | every tap setting |
| `tb_cal_controller`  | one clear cycle, exactly N steps, one estimator start, bypass until done, total cycles, restart |
| `tb_iqloft_top`      | two full-size calibrations in a loop with the transmitter/detector model (`tb/tx_ed_model.sv`); parameter accuracy, 96093-cycle calibration, IRR/LRR before and after, and counts of bypass, training steps, estimations, compensation, recalibration and the negative-φ decision |
| `tb_hd3_sweep`       | four full-size calibrations with growing detector HD3 |
| `tb_chip_population` | eight random transmitters, each calibrated at full size; every one must reach 38 dB IRR and 33 dB LRR (worst seen: 55 dB and 44 dB) |

Typical results of `tb_iqloft_top`, with ±1 LSB detector noise:

| α, θ, σ, φ               | IRR before → after | LRR before → after |
|--------------------------|--------------------|--------------------|
| 1.08, 0.07, 0.05, 0.8    | 25.7 → 78.6 dB     | 25.4 → 50.1 dB     |
| 0.93, −0.10, 0.08, −1.9  | 19.0 → 48.0 dB     | 16.3 → 48.3 dB     |

`tb_hd3_sweep` runs with hd3 = 0, 0.003, 0.01 and 0.03. Over that range the
σ estimate grows from 0.061 to 0.141 (true value 0.06), and the LRR falls from
47.8 to 41.2 dB. The IRR stays above 50 dB. This is the expected picture:
detector distortion mainly affects the LOFT estimate.

To run a testbench with Verilator:

    verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
        rtl/iqloft_pkg.sv tb/tb_iqloft_top.sv --top-module tb_iqloft_top
    ./obj_dir/Vtb_iqloft_top

Substitute any other testbench name. Each full-size calibration is about
96000 cycles and takes well under a second to simulate.

The analog parts are not RTL: the envelope detector (square-law devices,
common-source gain stage, ~1 MHz RC low-pass) and the transmitter itself.
`tb/tx_ed_model.sv` models them behaviourally as the impairment equation
above, followed by |v|², an optional third-order term, 16-bit quantisation,
noise and a fixed latency.
