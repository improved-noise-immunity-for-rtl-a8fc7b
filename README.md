# Two-sample PLL with smoothing (2SS-PLL) and a totem-pole PFC controller

A single-phase power-factor-correction (PFC) stage must draw a sinusoidal
current in phase with the grid voltage. It therefore needs the phase of that
voltage, and a phase-locked loop (PLL) provides it. A single-phase grid gives
only one signal, while a Park-transform PLL needs two in quadrature (α, β).
The *two-sample* quadrature generator makes β from nothing more than the
present sample and the sample two steps back. That is cheap, but it acts as a
discrete differentiator, so ADC quantisation and sensing noise pass straight
into β, and from there into the phase.

The design here puts a first-order smoothing filter in front of the
two-sample generator, with the filter and the generator sharing one delay
register. It then removes the gain and the phase lag that the filter adds at
the grid frequency, so β is in quadrature again. The result keeps the
two-sample structure's tiny memory (two registers) and becomes much less
sensitive to noise. Around the PLL sits the digital controller of a
totem-pole PFC: a DC-voltage PI loop, a reference multiplier, a current PI
loop and a PWM.

All of it is synthesizable SystemVerilog (IEEE 1800-2017) in `rtl/`, with a
self-checking testbench for every module in `tb/`.

## Signal chain

```
 adc_vg, polarity ─► polarity_reconstruct ─► α_k
 α_k ─► smoother ──► s_k, s_{k-1} ─► qsg_2s ─► β'_k ─► smooth_comp ─► β_k
                                                        ▲ (uses raw α_k)
 (α_k, β_k, sin θ, cos θ) ─► park_pd ─► vq ─► pi_controller (Kp=46, Ki=1024)
 δ = clamp(δ_nom + PI) ─► vco (phase accumulator + CORDIC) ─► θ, sin θ, cos θ
 δ ─► qsg_coeff ─► 1/sin 2δ, tan δ, tan φ, gain   (used from the next sample)
```

The frequency is carried as δ = ωT_s, the phase advance per sample in
radians (N_k = 2π/δ samples per grid period). At 50 Hz and
T_s = 156.25 µs, δ = 0.0491 rad and N = 128.

## The quadrature generator and its compensation

This part needs the closest reading.

**Smoother.** The filter is s_k = γ·α_k + (1−γ)·s_{k−1}, with γ = 2⁻⁵ = 0.03125.
It is computed as `s_{k-1} + (α_k − s_{k-1}) >>> 5`, so it needs no multiplier.
Its state register s_{k−1} is also the first delay of the quadrature
generator.

**Two-sample QSG.** On the smoothed samples:

    β'_k = (s_{k−2} − s_k) / sin(2δ) + s_k · tan δ

For a pure sinusoid s = S·sin(δk + ψ), this gives exactly −S·cos(δk + ψ): the
same amplitude, 90° behind. Only one extra register (s_{k−2}) is needed.

**Why compensation is needed.** At the grid frequency the smoother has gain
H and phase lag φ < 0. So β' is the quadrature of a signal that is smaller
and delayed, and it mixes α and β:
β' = H(β cos φ + α sin φ). Inverting this gives

    β_k = β'_k · 1/(H cos φ) − α_k · tan φ

Both coefficients come from a continuous-time model of the smoother:

* tan φ = δ / ln(1−γ). This is exact within the model, and is −1.546 at
  50 Hz, i.e. a lag of −57°.
* 1/(H cos φ) = |ln(1−γ)/γ| · (1 + tan²φ). This is 3.44 at 50 Hz.

**A point to be aware of.** The method is often drawn with the gain block as
the constant |ln(1−γ)/γ| alone. That is the limit for δ ≪ |ln(1−γ)|, which
here would mean far more than 198 samples per period. At 128 samples per
period, cos φ is about 0.54, and the constant gain would leave β badly out of
quadrature. This design uses the full expression. The fault test of
`qsg_coeff` replaces it with the constant, and the testbench rejects that.

**Residual error.** The smoother is really discrete. Its exact response at
50 Hz is |G| = 0.543 and arg G = −55.7°, against 0.535 and −57.1° from the
continuous model. So β keeps an error of about 0.05 pu (about 1.4°). In
closed loop this costs under 0.1° of mean phase error (measured 0.084° on a
clean grid). `tb_pll_2ss` checks β against the exact discrete prediction,
within 0.01 pu.

**Coefficient unit (`qsg_coeff`).** After every sample it recomputes the four
coefficients from the new δ:

* 1/(2δ) comes from a 50-cycle restoring divider.
* 1/sin x ≈ 1/x + x/6 + 7x³/360 and tan x ≈ x + x³/3 + 2x⁵/15. Both are
  accurate to about 1e-7 below 100 Hz.
* tan φ and the gain are one constant multiply each.

After reset it holds the 50 Hz values.

## Phase detector, loop filter, oscillator

* **Sign convention.** The grid is taken as V·sin θ_g, so that the PLL's
  `sin_t` is in phase with the grid voltage and can be used directly as the
  current-reference shape. The QSG then gives β = −V·cos θ_g, and the Park
  detector forms:
  * vq = α cos θ + β sin θ = V sin(θ_g − θ)
  * vd = α sin θ − β cos θ = V cos(θ_g − θ)
* **Loop filter.** This is a PI with Kp = 46 rad/s and Ki = 1024 rad/s² per
  unit of vq, which gives a natural frequency of 32 rad/s and damping of 0.72.
  The output is scaled by T_s, so it is a correction of δ directly.
  * δ is limited to 40–60 Hz.
  * The integrator is clamped to the same range, which prevents wind-up.
* **Amplitude.** The input is scaled to per unit of the nominal peak
  (`PEAK_CODE`) and is not normalised further. During a voltage dip the loop
  gain therefore falls in proportion to the depth.
* **Oscillator.** A 32-bit phase accumulator (2³² = one turn) advances by
  δ·2³²/2π per sample. A 24-iteration CORDIC produces sin θ and cos θ to
  about 2e-6. Its arctangent table and gain are computed at elaboration from
  atan(2⁻ⁱ) and ∏ 1/√(1+2⁻²ⁱ).

## Timing of one sample

`pll_2ss` handles one sample per `sample_en` strobe, in this order:

| cycle after `sample_en` | step                                                            |
|-------------------------|-----------------------------------------------------------------|
| 0                       | α_k registered                                                  |
| 1                       | smoother and QSG update, β'_k registered                        |
| 2                       | compensation, β_k registered                                    |
| 3                       | Park detector, vq registered                                    |
| 4                       | PI update                                                       |
| 5                       | δ and θ updated; CORDIC and coefficient divider start           |
| ≈ 59                    | `done`: sin θ, cos θ, θ, δ valid for the **next** sampling instant |

An assertion checks that `sample_en` never arrives while a sample is still in
progress. At 6.4 kHz, any clock above about 0.4 MHz is fast enough. The
defaults assume 100 MHz (15625 cycles per sample).

## PFC controller (`pfc_controller`, the top)

**Sampling.** The PWM carrier sets the sampling period. In the first cycle of
each period, `adc_trigger` is high and the three ADC codes are taken as
valid:
* |v_g| plus a polarity bit (the grid voltage is sensed after rectification);
* the line current, offset binary around `IL_ZERO_CODE`;
* the DC output voltage.

**In the same cycle:**
* The **DC-voltage PI** turns V*_DC − v_o into the current amplitude A,
  limited to 0…`I_MAX`.
* The **current PI** turns i_ref − i_L into the duty command, limited to
  0…1, using the i_ref formed in the previous period.
* The PLL starts on the new sample.

**When the PLL is done,** i_ref = A·sin θ is formed for the next instant.
The PWM (sawtooth carrier) takes the new duty at the start of the next
period. The output is `pwm_out`.

**Half cycles.** In a totem-pole stage, the two switches of the fast leg swap
the boost role every half cycle. The controller therefore takes the current
error with the sign of the reference (`half_cycle`, the sign of sin θ), so
one duty command always means "duty of the switch that boosts now".
`half_cycle` is brought out for the gate driver: 1 means S2 boosts, 0 means S1
boosts.

**Not in the RTL.** The ADCs, the sensing and rectifier, the gate driver and
the power stage are analog parts. They are outside the RTL and reach it
through ports.

## Parameters

| parameter | default | module | origin |
|---|---|---|---|
| `TS` | 156.25e-6 s | pll_2ss, qsg_coeff, pi_controller, pfc_controller | method |
| `GAMMA_SHIFT` | 5 (γ = 0.03125) | smoother, qsg_coeff, pll_2ss | method |
| `KP`, `KI` | 46, 1024 | pll_2ss / pi_controller | method |
| `F_NOM` | 50 Hz | pll_2ss, qsg_coeff | method |
| `F_MIN`, `F_MAX` | 40, 60 Hz | pll_2ss | own choice |
| `ADC_BITS`, `PEAK_CODE` | 12, 3500 | pll_2ss, polarity_reconstruct | own choice |
| `ITER` | 24 | vco, cordic_sincos | own choice |
| `PWM_PERIOD` | 15625 cycles | pfc_controller, pwm (`PERIOD`) | own choice (100 MHz clock) |
| `KP_V`, `KI_V`, `I_MAX` | 2.0, 20.0, 1.2 pu | pfc_controller | placeholder |
| `KP_I`, `KI_I` | 0.4, 200.0 | pfc_controller | placeholder |
| `IL_ZERO_CODE`, `IL_PU_CODE`, `VO_PU_CODE` | 2048, 1000, 2500 | pfc_controller | own choice |

All signal values are signed Q8.24 (`pll_pkg::q_t`). Currents and voltages
are in per unit of the grid peak and of `IL_PU_CODE`. The gains of the two
PFC loops are only placeholders. They were tuned against a crude averaged
plant model and give a power factor of about 0.89 on it. That model has no
duty feed-forward, so the current stays at zero near the zero crossings. For
a real converter, retune `KP_V`, `KI_V`, `KP_I` and `KI_I` (and consider
adding feed-forward); the PLL does not depend on them.

## How far it is verified

Each module has a testbench that compares it with a model computed
independently in real arithmetic. Each testbench was also run against a
deliberately broken copy of its module, and every one of those runs failed.

Measured results:

| scenario | mean phase error |
|---|---|
| clean 50 Hz | 0.084° (peak 0.16°) |
| 5 % Gaussian-like noise | 0.27–0.31° (peak < 1°) |
| 49 → 51 Hz frequency jump | settles to 0.18–0.20° |
| +60° / +90° phase jumps | settle to 0.2–0.3° |
| 50 % dip lasting 200 ms | 0.4–0.9° during the dip |
| 2 % DC offset, 3 % 3rd and 2 % 5th harmonic, 5 % noise | 0.29° (peak 1.0°) |

Other measurements:
* PLL processing time per sample: 59 cycles.
* With the plant model, the DC voltage is held within 1 % of 1.23 pu.
* PWM pulse widths match the duty command exactly.

Not verified:
* Other mixes of harmonics, and larger DC offsets.
* Behaviour on hardware.
* Timing closure at 100 MHz. The compensation step has a long combinational
  path (two 32×32 multiplies and an adder). Pipeline it if the target clock
  needs it; the sample budget leaves plenty of room.

## Files

| file | content |
|---|---|
| `rtl/pll_pkg.sv` | Q8.24 type and saturating arithmetic helpers |
| `rtl/polarity_reconstruct.sv` | signed per-unit input from rectified code and polarity |
| `rtl/smoother.sv` | γ-smoother; its state is the shared delay |
| `rtl/qsg_2s.sv` | two-sample quadrature generator |
| `rtl/smooth_comp.sv` | gain and phase compensation of the smoother |
| `rtl/qsg_coeff.sv`, `rtl/seq_divider.sv` | frequency-dependent coefficients |
| `rtl/park_pd.sv` | Park phase detector |
| `rtl/pi_controller.sv` | PI with limits (loop filter, voltage and current loops) |
| `rtl/vco.sv`, `rtl/cordic_sincos.sv` | phase accumulator and sine/cosine |
| `rtl/pll_2ss.sv` | the PLL and its sequencer |
| `rtl/pwm.sv` | PWM modulator, also the sampling strobe |
| `rtl/pfc_controller.sv` | top: the complete controller |
| `tb/tb_<module>.sv` | self-checking testbench of each module |
| `tb/tb_pfc_controller.sv` | closed-loop test with a plant model, all grid events, 500 cycles per sample |
| `tb/tb_pfc_controller_full.sv` | same plant, all defaults (15625 cycles per sample), start-up and regulation |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops by itself.
Examples with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal rtl/pll_pkg.sv rtl/*.sv \
          tb/tb_pll_2ss.sv --top-module tb_pll_2ss -o tb && ./obj_dir/tb

verilator --binary --timing --assert -Wno-fatal rtl/pll_pkg.sv rtl/*.sv \
          tb/tb_pfc_controller.sv --top-module tb_pfc_controller -o tb && ./obj_dir/tb
```

Run times: the unit tests take well under 10 s each. `tb_pfc_controller`
(about 2 s of grid time) takes about 10 s. `tb_pfc_controller_full` takes
about 1.5 minutes, because it clocks every one of the 15625 cycles per
sample.

To try another smoothing factor, change `GAMMA_SHIFT` on `pll_2ss`: all
compensation constants follow from it at elaboration. To try another
sampling rate, change `TS` together with the clock division.
