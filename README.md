# Single-phase grid PLL that rejects DC offset (SRF-PLL with DC-SOGI)

A grid-tied inverter must know the phase, frequency and amplitude of the grid
voltage. On a single-phase grid a phase-locked loop first has to invent a
second, orthogonal signal so that the voltage can be treated as a rotating
vector. The usual way is a second-order generalised integrator (SOGI). It
gives an in-phase band-pass output `v_alpha` and a 90°-lagging low-pass
output `v_beta`. Its weak point is DC. A DC offset on the measured voltage
passes through the low-pass branch. It then appears in the PLL's
frequency and amplitude estimates as a ripple at the grid frequency. The
offset can come from the measurement chain, the A/D converter or a fault.
With a 50 % offset the frequency estimate swings by several hertz.

This RTL implements the remedy proposed by M. Ristović Krstić, S. Lubura and
T. Nikolić in "Improved single-phase PLL structure with DC-SOGI block on FPGA
board implementation". The SOGI gets a small control loop of its own: the
**DC-SOGI**. The band-pass output has no DC, so `e − v_alpha` is the DC left
at the filter input. An integrator drives that residue to zero by building
up an estimate `m` of the offset, and `m` is subtracted from the input.
After a short transient the quadrature pair is clean. The PLL downstream
then sees no ripple, and `m` is a measurement of the offset.

Everything is fixed-point RTL and works one sample at a time. The clock is
50 MHz and the sample rate is 10 kHz by default.

## Signal flow

```
            +-------------------- omega_est (previous sample) ---------------+
            v                                                                |
 vin --> [ DC-SOGI ] --v_alpha, v_beta--> [ alpha-beta / dq ] --v_q--> [ PI ] --dw--> [ VCO ] --> theta
          |    ^                                 ^         |                    + omega_nom      |
          |    +-- m (DC estimate) fed back      |         +--> v_d (amplitude)                  |
          +--> dc_est                            +-------------- theta (previous sample) --------+
```

| Block | File | What it does |
|---|---|---|
| sample timer | `rtl/sample_timer.sv` | one-clock strobe every `round(CLK_HZ*TS)` clocks (5000) |
| DC-SOGI | `rtl/dc_sogi.sv` | frequency-adaptive quadrature generator with DC-elimination loop |
| Park phase detector | `rtl/srf_park.sv` (+ `rtl/sincos_cordic.sv`) | `v_d = v_α cosθ + v_β sinθ`, `v_q = v_β cosθ − v_α sinθ` |
| loop filter | `rtl/pi_loop_filter.sv` | PI on `v_q`, trapezoidal integral |
| VCO | `rtl/vco.sv` | `ω = ω_nom + dw`, phase accumulator `θ += Ts·ω`, `f = ω/2π` |
| DAC formatter | `rtl/dac_output.sv` | two selected signals to 14-bit offset-binary words |
| top | `rtl/srf_pll_top.sv` | wiring, sequencing, overrun flag |
| shared | `rtl/pll_pkg.sv`, `rtl/fx_div.sv` | number formats, constants, serial divider |

When locked, `v_q = 0`, `v_d` is the grid amplitude, `f_est` the frequency,
and `cos θ` follows `vin` (for `vin = A sin φ` the loop settles at
`θ = φ − 90°`).

## The DC-SOGI in detail

### Filters

Both SOGI branches are discretised with the bilinear transform and share one
denominator. Here `A = 2ωTs` and `B = (ωTs)²`:

```
W_alpha(z) = r (z² − 1)      / (z² + p z + q)      band-pass, 0° at ω
W_beta(z)  = t (z² + 2z + 1) / (z² + p z + q)      low-pass, −90° at ω
r = A/(A+B+4)   t = B/(A+B+4)   p = 2(B−4)/(A+B+4)   q = (B−A+4)/(A+B+4)
```

`ω` is the PLL's own frequency estimate from the previous sample, so the
filters follow the grid. The four coefficients are recomputed on every
sample. This takes one division, `1/(A+B+4)`, done by the serial divider,
followed by four multiplications.

### DC loop

```
e(n) = vin(n) − m(n)
x(n) = e(n) − v_alpha(n)                         DC residue
m(n) = m(n−1) + k*·(x(n) + x(n−1)),  k* = ki·Ts/2   trapezoidal integrator
```

The closed loop from `vin` to `v_alpha`/`v_beta` is third order:

```
W_alpha_m(z) = r (z³ − z² − z + 1) / D(z)
W_beta_m(z)  = t (z³ + z² − z − 1) / D(z)
D(z) ∝ z³ + p1 z² + p2 z + p3
p1 = (p + k*(1−r+p) − 1)/(1 + k*(1−r))
p2 = (q − p + k*(r+p+q))/(1 + k*(1−r))
p3 = (k*(r+q) − q)/(1 + k*(1−r))
```

Both closed-loop transfer functions have a zero at z = 1, so DC is blocked
on both outputs.

### The delay-free loop

`W_alpha` has a direct path from `e(n)` to `v_alpha(n)` (the `r·z²` term).
The trapezoidal integrator has a direct path from `x(n)` to `m(n)`. So
`e(n)` depends on itself. A unit delay in the feedback would change the
dynamics. Instead, the block solves the loop exactly each sample. It first
forms the parts that do not depend on `e(n)`:

```
S_alpha = −r e(n−2) − p v_alpha(n−1) − q v_alpha(n−2)     (v_alpha(n) = r e(n) + S_alpha)
M0      = m(n−1) + k* x(n−1)                               (m(n) = M0 + k*((1−r) e(n) − S_alpha))
e(n)    = (vin − M0 + k* S_alpha) / (1 + k*(1 − r))
```

It then updates `v_alpha`, `v_beta`, `x` and `m`. The reciprocal
`1/(1 + k*(1−r))` is a second serial division per sample. It depends on `r`,
so it changes with `ω`. With this exact solution the hardware has exactly the
third-order response above. `tb/dc_sogi_tb.sv` checks this by comparing the
block with a floating-point model of `W_alpha_m`, `W_beta_m` and
`E/Vin = (z−1)(z²+pz+q)/D(z)`.

### The gain `ki`

`ki` sets how fast the offset is learned. With the real root of the
continuous characteristic polynomial placed at the real part of the complex
pair, the optimum at 50 Hz is `ki = 85.3135 s⁻¹`. `ki` is a run-time input
(`pll_pkg::KI_OPT` holds the optimum). At this 10 kHz sample rate, a 50 %
DC step inside the closed PLL gives:

| ki | time to stay within 2 % of the step | overshoot |
|---|---|---|
| 10 | 0.35 s | none |
| 85.3135 | 0.022 s | 1.5 % |
| 500 | 0.39 s | 30 % (damped oscillation) |

`dc_loop_en = 0` forces `k* = 0` and `m = 0`, which gives the plain SOGI.
This is for comparison only.

## Sequencing and timing

Nothing is pipelined, because a sample only arrives every 5000 clocks. The
stages run one after another. Each is started by the previous one's
one-cycle `done`:

| Stage | Clocks | Why |
|---|---|---|
| DC-SOGI | 144 | two serial divisions of 69 clocks each, then the arithmetic steps |
| Park | 31 | 28-step CORDIC for sin/cos θ, then the rotation |
| PI | 1 | |
| VCO | 1 | |
| **total, `vin_strobe` → `out_valid`** | **177** | |

`vin` is registered on `vin_strobe`. All estimates change together on the
cycle `out_valid` is high. A strobe that arrives while the chain is busy is
dropped and sets the sticky `overrun` output. This cannot happen at the
defaults. It would need `CLK_HZ·TS < 177`.

## Number formats

* `fx_t`: signed 40 bits, 28 fraction bits (Q12.28). It carries voltages in
  per unit, coefficients, ω in rad/s, f in Hz and gains. The range of ±2048
  covers ω up to about 320 rad/s. The resolution of 3.7·10⁻⁹ keeps the SOGI
  poles (|z| ≈ 0.985) accurate.
* Constants that are multiplied by `Ts` (`2Ts`, `Ts/2`, `Ts/2π`, `1/2π`) carry
  16 extra fraction bits (`fxx_t`). This avoids a frequency error from rounding
  a tiny constant.
* `phase_t`: unsigned 32 bits, one turn = 2³², so it wraps at 2π by itself.
  The per-sample increment is rounded to nearest. Over 2 s at 51 Hz the phase
  error stays below 10⁻⁶ turn.
* DAC words: 14-bit offset binary, full scale ±2 p.u., 1 p.u. = 4096 codes,
  truncated and saturated. `dac_sel_a`/`dac_sel_b` pick from `v_alpha`,
  `v_beta`, `v_d`, `v_q`, DC estimate, `f_est − 50 Hz`, `sin θ` and `cos θ`.

## PLL loop gains and a stability caveat

The PI gains are `KP = 25`, `KI = 600` (parameters `KP` and `KI_PLL`). At
1 p.u. this gives a natural frequency of about 24.5 rad/s and a damping of
0.51. The loop has no amplitude normalisation: `v_q` goes into the PI as it
is. So the loop is slower at low voltage: at 0.5 p.u. it needs about a second
to settle fully.

The proportional gain must stay moderate because the PLL and the DC-SOGI
are coupled. The frequency estimate retunes the DC-SOGI, and the DC-SOGI
transient disturbs the PLL. With `KP ≥ 50` the pair went unstable in
simulation at `ki = 500`: a 50 % DC step started a growing 10 Hz oscillation
of the frequency estimate. At `KP = 25`, `ki` from 10 to 500 is well behaved.
If you raise `KP` to get faster frequency tracking, rerun
`tb/srf_pll_workloads_tb.sv`.

## Measured behaviour

`tb/srf_pll_workloads_tb.sv` applies each operating point for 1 s and then
measures peak-to-peak ripple for 0.1 s:

| Grid | DC | loop on: f p-p | v_d p-p | loop off: f p-p | v_d p-p |
|---|---|---|---|---|---|
| 49 Hz, 1 p.u. | 5 % | 0.0004 Hz | 0.0001 | 0.42 Hz | 0.10 |
| 49 Hz, 1 p.u. | 50 % | 0.0004 Hz | 0.0001 | 4.17 Hz | 1.03 |
| 51 Hz, 1 p.u. | 5 % | 0.0004 Hz | 0.0001 | 0.42 Hz | 0.10 |
| 51 Hz, 1 p.u. | 50 % | 0.0004 Hz | 0.0001 | 4.16 Hz | 1.03 |
| 50 Hz, 0.5 p.u. | 5 % | 0.023 Hz | 0.0003 | 0.43 Hz | 0.10 |
| 50 Hz, 0.5 p.u. | 50 % | 0.023 Hz | 0.0003 | 4.10 Hz | 1.02 |
| 50 Hz, 1.35 p.u. | 5 % | 0.0005 Hz | 0.0001 | 0.42 Hz | 0.10 |
| 50 Hz, 1.35 p.u. | 50 % | 0.0005 Hz | 0.0001 | 4.23 Hz | 1.05 |

These operating points are the ones the original FPGA experiments used: 49
and 51 Hz, 0.5 and 1.35 p.u., 5 % and 50 % DC. The 0.5 p.u. rows show a
larger residue with the loop on, because without amplitude normalisation the
loop gain there is half as large (see the previous section). Frequency steps between 49 and
51 Hz and amplitude steps between 0.5 and 1.35 p.u. are run in
`tb/srf_pll_top_tb.sv`.

## Top-level ports (`srf_pll_top`)

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `vin` | in | 40 | grid voltage sample, p.u., Q12.28; sampled on `vin_strobe` |
| `dc_loop_en` | in | 1 | DC-elimination loop on |
| `ki` | in | 40 | DC-loop gain in s⁻¹, Q12.28 (85.3135 recommended) |
| `dac_sel_a`, `dac_sel_b` | in | 3 | `pll_pkg::dac_sel_e` |
| `vin_strobe` | out | 1 | `vin` is taken on this clock |
| `out_valid` | out | 1 | estimates updated |
| `valpha`, `vbeta` | out | 40 | quadrature pair |
| `vd`, `vq` | out | 40 | amplitude estimate, phase error |
| `dc_est` | out | 40 | DC-offset estimate |
| `omega_est`, `f_est` | out | 40 | frequency in rad/s and Hz |
| `theta` | out | 32 | phase, 2³² = one turn |
| `sin_theta`, `cos_theta` | out | 40 | synchronised reference |
| `dac_a`, `dac_b` | out | 14 | words for a dual 14-bit DAC |
| `overrun` | out | 1 | sticky: a sample strobe was dropped |

Parameters: `CLK_HZ` (50 000 000), `TS` (1e-4 s), `F_NOM` (50 Hz), `KP` (25),
`KI_PLL` (600). Reset puts all filter state at zero, ω at the nominal value
and θ at zero.

## What follows the published design and what is this design's own

These follow the published design:
* the structure of the loop: DC-SOGI, αβ/dq, PI against a zero reference,
  nominal frequency added, integrator, ω fed back to the DC-SOGI;
* the bilinear discretisation and coefficients of both SOGI filters and of
  the DC-loop integrator;
* the closed-loop polynomial;
* the optimal gain 85.3135;
* the nominal 50 Hz;
* the 14-bit output words.

These are this design's own choices, because the source does not give them:
* the sample time (100 µs) and the clock (50 MHz);
* all word lengths;
* the PI gains and their trapezoidal discretisation;
* the forward-Euler phase integrator (it avoids a second algebraic loop);
* the Park sign convention;
* the CORDIC, the serial divider and the sequencing;
* the DAC scaling and the signal selector;
* the `overrun` flag;
* the exact solution of the delay-free DC loop.

The source's own implementation was generated from a Simulink model by an
HDL code generator, so its internal architecture is unknown.

Known departures and gaps:
* The source text quotes the optimal gain as 85.3135, 85.64 and 86.54 in
  different places. 85.3135 is the value its design equations give, and it
  is used here.
* The source states the DC residue as `vin − v_alpha` in one place but draws
  it as `e − v_alpha`. The drawn form is the one consistent with its
  closed-loop equations and is the one used.
* The generic SRF-PLL description divides `v_q` by a low-pass-filtered
  amplitude. The proposed structure does not, and neither does this RTL.
* Settling times measured here are shorter than the 0.5 s / 0.1 s / 0.3 s
  reported for the hardware with ki = 10 / optimum / 500. The shape agrees:
  slow, fast without overshoot, damped oscillation. The absolute times depend
  on the PLL gains and sample time, which were not published.
* No A/D converter interface is included: `vin` is a port. The DAC chips and
  their interface timing are not modelled.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself with a
watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -yrtl -ytb rtl/pll_pkg.sv tb/srf_pll_top_tb.sv \
          --top-module srf_pll_top_tb -o sim && ./obj_dir/sim
```

| Testbench | Covers | Run time |
|---|---|---|
| `tb/dc_sogi_tb.sv` | DC-SOGI against the closed-loop model (loop on, off, ki = 500), latency 144 | ~2 s |
| `tb/srf_park_tb.sv` | Park transform and CORDIC, all quadrants, latency 31 | <1 s |
| `tb/pi_loop_filter_tb.sv`, `tb/vco_tb.sv` | loop filter and oscillator against float models | <1 s |
| `tb/fx_div_tb.sv`, `tb/sincos_cordic_tb.sv` | divider (±1 LSB, saturation, divide by zero, 69 clocks); CORDIC (within 6·10⁻⁸, 30 clocks) | <1 s |
| `tb/sample_timer_tb.sv`, `tb/dac_output_tb.sv` | strobe spacing; 14-bit coding and saturation | <1 s |
| `tb/srf_pll_top_tb.sv` | end to end at a 2 MHz clock: lock, DC step, loop off, ki change, frequency and amplitude steps, DAC words, overrun | ~15 s |
| `tb/srf_pll_workloads_tb.sv` | the operating-point table above | ~40 s |
| `tb/srf_pll_full_tb.sv` | all defaults (50 MHz, 5000 clocks/sample): 49 Hz lock, 50 % DC step, exact sample spacing and 177-clock latency | ~40 s |

The end-to-end testbenches lower only `CLK_HZ`. This changes the number of
idle clocks between samples and nothing in the arithmetic.

To change the sample rate, set `TS` on the top. Every coefficient is derived
from it at elaboration. Keep `CLK_HZ·TS ≥ 177`. The PI gains may need
retuning.
