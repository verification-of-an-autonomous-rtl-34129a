# Droop-controlled single-phase UPS controller with quasi dq power detection

Several UPS inverters feed one load in parallel. No unit talks to another and
no unit is in charge. Each unit measures only its own output voltage and
current, works out how much active and reactive power it delivers, and then
moves the phase and amplitude of its own output voltage along a *droop* line.
A unit that delivers more than its share falls back in phase, and one that
delivers less pushes ahead. The load then splits between the units in the
proportion set by each unit's rated power `P0`. Units can be plugged in or
pulled out at any time.

For this to work, a unit must measure its power quickly. In a three-phase
system the instantaneous power follows from an αβ/dq transformation. A single
phase has no second axis. The controller here builds one from three samples of
the same waveform (the *quasi dq transformation*). It then has the amplitude and
phase of voltage and current after every 50 µs sample, not once per 20 ms mains
cycle. This is what keeps load sharing steady when the load changes several
times within one cycle.

This repository holds synthesizable SystemVerilog for the digital controller
of one unit. It is based on the FPGA controller described in *"Verification of
an Autonomous Decentralized UPS System with Fast Transient Response Using a
FPGA-Based Hardware Controller"*. In that design the power calculation and the
droop run as software on a soft CPU. Here they are hardware too, so the
controller needs no processor.

## Signal flow in one sampling period

```
          adc_start (20 kHz)                       timing_ctrl
              |                                        |
 v_adc ->  fir_filter -> qdq_unit J=1 \                |
                      -> qdq_unit J=2  > dq_average --+--> pll_pi -> freq --> gain_calc -> KH1..3
                      -> qdq_unit J=3 /   (voltage)   |               |
 i_adc ->  fir_filter -> qdq_unit x3  --> dq_average  |               +--> vco -> theta(k-1..k-3)
                                          (current)   |                         (to the qdq units)
                                              |       |
                                              v       v
                                           power_calc (P, Q)
                                              |
                                           droop_ctrl (phi*, E*)      vco @ 50 Hz (nominal time base)
                                              |                           |
                                           vref_calc: vref = E* cos(theta_nom + phi*)
                                              |
                                           deadbeat_calc -> d_time -> gate_drive -> gate[3:0]
```

All quantities are updated once per sampling period. Each block passes a
one-clock `valid`/`start` pulse to the next. `timing_ctrl` sets the period. It
asks the external A/D converter for a conversion, restarts the PWM carrier, and
measures how long the hardware part of the calculation takes.

## The quasi dq transformation (`qdq_unit`)

Take samples of `v = V cos(ωt)` every `T = J·Ts`. Three consecutive samples
are enough to rebuild an orthogonal pair:

```
alpha = v(k-J)                                   =  V cos(ω t')
beta  = (v(k-2J) - v(k)) · KH,  KH = 1/(2ωT)     ≈  V sin(ω t')     (t' = time of sample k-J)
```

The exact factor is `sin(ωT)/(ωT)`. At 50 Hz it differs from one by 0.04 % for
J = 3 and by less for J = 1 and 2.

A normal dq rotation by the PLL phase `theta` of sample k-J then gives

```
d =  alpha·cos(theta) + beta·sin(theta) = V cos(ωt' - theta)
q = -alpha·sin(theta) + beta·cos(theta) = V sin(ωt' - theta)
```

followed by `amp = sqrt(d²+q²)` and `phase = atan2(q, d)`. One iterative
16-step CORDIC (`cordic`) does both steps in turn: a rotation, then
vectoring. A result is ready 40 clocks after its sample.

Noise matters here, because `beta` is a small difference of two large
samples. At 20 kHz and 50 Hz the difference is only 3 % of the amplitude. The
controller therefore runs three units per signal, with J = 1, 2 and 3, which
gives effective sampling rates of 20, 10 and 6.7 kHz. It then averages their
results (`dq_average`). Each unit is a delay line of 2J+1 samples at the full
20 kHz rate, so all three produce a result every period. Their outputs finish
in the same clock. Phases are averaged as offsets from the first unit, so that
readings on either side of ±180° do not cancel.

`gain_calc` recomputes `KH1 = FS/(4π f)` from the frequency the PLL measures.
It uses a 48/32-bit restoring divider, one bit per clock, and takes
`KH2 = KH1/2` and `KH3 = KH1/3`. The gains therefore follow the actual line
frequency. After reset they hold their 50 Hz values.

## PLL and the two time bases

`pll_pi` drives the averaged voltage `Vd` to zero:
`f = 50 Hz + KP·e + Σ KI·e` with `e = -Vd`. The result is clamped to 40–60 Hz,
with anti-windup. `vco` is a 32-bit phase accumulator that advances by
`f/FS` of a turn each period. Its sample-and-hold outputs `theta_hold[j-1]`
give each unit the phase of the very sample it uses as `alpha`. With this sign
convention the loop settles with `theta` 90° behind the voltage, so `Vq`
equals the amplitude. The default gains (KP = 115, KI = 33000) give about
20 Hz of loop bandwidth for a half-scale voltage (16384 counts). The gain
scales with the amplitude, because the error is not normalised.

The output reference is *not* built on the PLL phase. A second `vco`
instance runs at exactly 50 Hz. It is the nominal-frequency time base, and
`vref = E* cos(theta_nom + phi*)`. If the PLL phase were used, a unit's
`phi*` would feed back into the frequency it measures, and any non-zero
`phi*` would drive that frequency to its limit. The measured frequency
`freq` only sets the quasi dq gains and is reported as status.

## Power and droop (`power_calc`, `droop_ctrl`)

```
P = (Vd·Id + Vq·Iq)/2       Q = (Vq·Id - Vd·Iq)/2       (scaled by 2^-16)
phi* = phi0 - m·(P0 - P)    E* = E0 - n·(Q0 - Q)
```

When the PLL is locked, P is half the product of the voltage and current
amplitudes times the cosine of the angle between them. Q uses the sine, and a
lagging current gives a positive Q.

`m` and `n` are signed Q16.16 inputs. The droop equation is implemented as
published. For the falling phase–power line that load sharing needs,
`m` must be **negative**. To share in the ratio of the rated powers, scale
each unit's gain as `m = -M/P0`, so that equal relative loading gives equal
phase. The phase correction is clamped to ±90°, and `E*` to 0…131071 counts.

## Reference, on-time and gates

`vref_calc` forms the sinusoidal reference with a third CORDIC (19 clocks).
`deadbeat_calc` turns it into the on-time of the next carrier period:
`u = vref + KV/256·(vref - v) + KI/256·i` and
`d_time = PERIOD/2·(1 + u/VDC)`, clamped to 0…PERIOD. `VDC` is the DC-link
voltage in A/D counts. The published design names this stage only, so the law is this
design's own. Tune it, or replace it with a true deadbeat law for your LC
filter. `gate_drive` produces bipolar PWM for an H-bridge:

- Leg A is high for `d_time` clocks of each 20 kHz carrier period, and leg B is its complement.
- Each switch turns on only after its leg has been steady for `DEAD` clocks, 1 µs by default.
- A new `d_time` takes effect at the next carrier start.

`gate = {B low, B high, A low, A high}`.

## Timing

| step | clocks (62 MHz) |
|---|---|
| A/D conversion (external, assumed in the tests) | 20 |
| FIR, quasi dq (2 CORDIC passes), average, PI | 43 |
| **A/D + hardware detection (published budget: 73 clocks, 1.18 µs)** | **63** |
| power, droop, reference, on-time | 22 |
| whole chain from adc_start (published budget: 13.6 µs) | 85 (1.37 µs) |
| sampling period / PWM carrier | 3100 |

The 62 MHz clock is inferred from the published design's figure of 73 clocks in
1.18 µs. Change `CLK_HZ`, and the period, carrier and divider constants
follow. `hw_cycles` reports the measured detection latency, `irq` marks its
end, and `overrun` latches if a period ends before detection finishes.

## Number formats (`ups_pkg`)

| type | format |
|---|---|
| `sample_t` | 16-bit signed A/D counts |
| `data_t` | 18-bit signed (alpha/beta, d/q, amplitude, E*, vref) |
| `angle_t` | 16-bit binary angle, 2^16 = 2π |
| `freq_t` | Q16.16 Hz |
| `gain_t` | Q16.16 (KH) |
| `power_t` | 32-bit signed, (½·V·I in counts²)/2^16 |

Volts and amperes follow from the A/D scaling, which the published design does not
give. With ±50 V and ±5 A full scale, 1 W is 65.5 power units. The
published experimental setting `P0 = 62.5 W`, `E0 = 25√2 V` then becomes
`p0 = 4096`, `e0 = 23170`.

## Top level `ups_ctrl_top`

| port | dir | meaning |
|---|---|---|
| `adc_start` | out | start an A/D conversion (once per period) |
| `adc_valid`, `v_adc`, `i_adc` | in | both samples, valid for one clock |
| `p0`, `q0`, `e0`, `phi0`, `m_gain`, `n_gain` | in | droop settings of this unit |
| `gate[3:0]` | out | H-bridge gates |
| `freq`, `v_amp`, `i_amp`, `phi_i` | out | detected frequency, amplitudes, current phase relative to voltage |
| `p_out`, `q_out`, `phi_ref`, `e_ref`, `vref`, `d_time` | out | power and references |
| `irq`, `hw_cycles`, `overrun` | out | timing status |

Parameters: `CLK_HZ` (62 000 000), `FS_HZ` (20 000), `DEAD` (62 clocks).
Reset is active-low and asynchronous.

## How far it follows the published design

These follow the published design:

- the overall structure;
- the three-sample quasi dq equations;
- three parallel branches at 20/10/6.7 kHz, with averaging;
- a PLL that drives `Vd` to zero with PI plus 50 Hz;
- the gains `KH = 1/(2ωTs)` from the measured frequency;
- the droop equations;
- the reference `E cos(· + phi*)`;
- the latency budgets.

These are this design's own:

- The word widths, the 62 MHz clock, the CORDIC, and the divider.
- The FIR coefficients: a 4-tap moving average, because the published design gives none.
- The PLL gains and limits.
- The delay-line reading of the three sampling rates.
- Deriving the reference from a nominal 50 Hz time base. The published design's two
  block diagrams disagree on this point.
- The exact dq form of the power calculation.
- The on-time law, which the published design only names.
- The PWM scheme and the dead time.
- Power, droop and reference are done in hardware. In the published design they are CPU
  software.

The published design also gives no A/D converter interface. Here it is one strobe out and
one strobe with both samples back.

The analog side is outside this RTL: the inverter, LC filter, line impedance
and load. Parallel operation is tested against a behavioural model of it (see
below). The controller's response to a load step and to rapid load changes is
tested against a stiff voltage.

## Load sharing in parallel operation

`tb_parallel_ups` puts two or three controllers on one bus. Each drives an
ideal averaged H-bridge, whose voltage over a carrier period is
`VDC·(2·d_time/PERIOD - 1)`, and its LC filter is taken as ideal. Each unit
reaches the bus through 0.2 Ω + 2 mH. The bus feeds a 10 Ω load, about 60 W
at 25 V rms. These line and load values are assumptions; the published
experiment does not state them. The droop slopes are scaled per unit as
`m = -M/P0` and `n = -N/P0`, with M = 3° and N = 2 % of `E0` at rated power.

Measured balance P1:P2 against the published experiment:

| setting | 1:0.5 | 1:0.75 | 1:1 | 1:1.5 | 1:2 | 1:2.5 | 1:3 |
|---|---|---|---|---|---|---|---|
| this model | 0.70 | 0.87 | 1.00 | 1.17 | 1.28 | 1.35 | 1.41 |
| published | 0.47 | 0.68 | 0.94 | 1.49 | 1.91 | 2.35 | 3.11 |

With three units at equal ratings the split is 20.67 : 20.68 : 20.64 W
(published: 1 : 0.95 : 0.92). When the third unit is unplugged, the other
two take its load back. In a rapid load change with two units at 1:1, a
second 10 Ω load is switched in and out every 2 ms, 40 times. Both units follow
every step, and their output currents stay within 0.015 A of each other at a
6.9 A peak.

The sharing moves in the right direction and keeps the order of the
settings, but it is much weaker than published. The cause is the slope. How
closely the split follows `P0` depends on the slope times the line's
power-per-degree, and with this model any slope of 4° or more oscillates and
hits the ±90° clamp. The power estimate is taken every sample and not
filtered, so a steeper slope feeds detection noise and line transients
straight back into the output phase. The published experiment reached a much
steeper effective slope. Its line impedance, and any smoothing it applied,
are not known. Treat the droop gains here as a stable starting point, not as
tuned values.

Droop is switched on only after the units have run 150 ms with `m = n = 0`.
That lets every PLL lock first. With droop active from reset, the power
readings taken before lock drive the phase references to their clamps, and
the units never synchronise.

## Verification

Each block has a self-checking testbench in `tb/`, named `tb_<block>.sv`. It
compares the block against values computed independently in real arithmetic.
It checks latencies wherever they are fixed, and ends with a
`TB_RESULT checks=N failures=M` line.

`tb_ups_ctrl_top` runs the whole controller at its default parameters in
three phases:

1. A 50.5 Hz voltage with a current lagging 30°.
2. A load step to a larger in-phase current.
3. Twenty load changes, 2 ms apart. That is ten per cycle.

It checks:

- PLL lock to 50.5 Hz;
- amplitudes to 1 % and current phase to 1°;
- P and Q;
- the droop outputs against the droop equations;
- the reference's amplitude and phase;
- the PWM on-time of every carrier period;
- the latency budgets, and that P settles within 12 samples after each rapid load change.

It also counts each mechanism and fails if any never occurred: lock, gain
update, load step, droop response, dead time and irq.

`tb_parallel_ups`, also at the default parameters, runs the load-sharing
sequence above. It checks several things:

- each balance leans the same way as its setting and does not overshoot it;
- 1:1 is equal to within 5 %;
- 1:1:1 is equal to within 10 %;
- a plugged-in unit takes load, and an unplugged one carries none;
- both units follow each rapid load change and share its current.

It takes about a minute and a half.

To run a testbench with plain Verilator:

```
verilator --binary --timing -Irtl -y rtl +libext+.sv rtl/ups_pkg.sv tb/tb_ups_ctrl_top.sv \
          --top-module tb_ups_ctrl_top && ./obj_dir/Vtb_ups_ctrl_top
```

The full-size top-level test simulates about 21 million clocks (about 0.34 s
of operation) and takes well under a minute.
