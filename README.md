# Real-time emulator of a sensorless IPMSM drive at standstill

This design puts a whole motor drive on one FPGA clock domain: an interior permanent-magnet
synchronous motor (IPMSM) model, the three-phase inverter, the PWM, the current sampling,
a PI current controller, and a sensorless position estimator that works at zero speed. It is
meant for hardware-in-the-loop work. A controller or estimator can be developed and tuned
against the emulated motor long before a real motor and inverter exist. The motor can also be
pushed into conditions that would damage a prototype.

At standstill a motor produces no back-EMF, so the rotor position cannot be read from it.
This drive finds the position from the motor's saliency instead: an interior PM motor has a
smaller inductance along the magnet axis (d) than across it (q). The drive applies short test
voltage pulses on top of the controller's output and looks at how the current responds. Two
pulse directions are enough to recover the angle without knowing either inductance. Three
ideas make this work in hardware:

* **Asymmetric PWM.** The duty ratio can be changed every half PWM period. A test pulse can
  therefore be applied as a +dv / −dv pair around the moment the controller samples the
  current. The flux change of the pair cancels at that moment, so the controller never sees
  the test signal. It keeps a fixed sampling rate even while testing.
* **Parameterless angle estimate.** The current responses to two test vectors 90° apart are
  combined so that Ld and Lq cancel. The angle comes out of a single ATAN2.
* **One arithmetic unit for seven transformations.** The drive needs four Park and three
  inverse-Park transformations every 2.5 µs integration step. They all run one after another
  on one CORDIC sine/cosine block and one multiplier block.

## Block diagram and data flow

```
            +--------------------- emulator_top (one 40 MHz clock) ----------------------+
 iq_ref ----> pi_controller --v_qd--> [ICT2 @ theta_est] --+                             |
 id_ref ---->   ^  ^   ^                                   +--> v_ref --> pwm_asym --leg-+--> gate_drive --> gate_hi/lo
 encoder --> rotary_tuner (gains) |                        |               |             |
              |  |  omega_est     |   test_signal_gen -----+ [ICT3 @ test angle]         |
              |  |                |                                        v             |
              |  |  i_qd_meas <-- [CT2 @ theta_est] <-- i_mid      voltage_modulator      |
              |  |                                       ^                 | v_abc       |
              |  |                                  current_meas          [CT1 @ theta_r]|
              |  +---- position_estimator <-[CT3/CT4]- d2  ^                v v_qd       |
              |          theta_est, omega_est              |          pmsm_model         |
              |                                            +-- i_abc <-[ICT1 @ theta_r]  |
            +----------------------------------------------------------------------------+
```

All CTx / ICTx boxes are slots of the single `shared_transform` unit. The true rotor angle
`theta_r` and speed `omega_dt` of the emulated motor are inputs. In a laboratory setup they
would come from a mechanical model or a knob. The estimated angle and speed are outputs, so
they can be compared with the true ones.

## Three time scales

| quantity | value | clocks |
|---|---|---|
| system clock | 25 ns (40 MHz) | 1 |
| integration interval (motor model step, transformation run) | 2.5 µs | 100 (`FRAME_CYCLES`) |
| half PWM period (duty ratio may change) | 62.5 µs | 2500 (`HALF_CYCLES`) |
| PWM period (controller sample and update) | 125 µs | 5000 |
| position estimate (test I + test II) | 250 µs | 10000 |

One integration interval does the following:

1. The voltage modulator delivers the interval's average phase voltages.
2. The shared unit runs all seven transformations. This takes 16 clocks.
3. The motor model takes one forward-Euler step with the fresh qd voltage.
4. The motor's phase currents (ICT1) hold for the rest of the interval.

Most of each interval is idle. That slack is what lets one arithmetic unit serve everything.

## Number formats

* **Values.** Every electrical quantity is a signed 18-bit per-unit value with 13 fraction
  bits (Q4.13, ±16 pu), typedef `sample_t`. The bases are 10 A and 100 V. The 18-bit width
  matches the 18×18 embedded multipliers of common FPGAs.
* **Angles.** Angles are 18-bit binary angles (`angle_t`): 2^18 is one turn, so 2^17 is π and
  wrap-around is free.
* **Speeds.** A speed is given as ω·2.5 µs with 24 fraction bits, in the same 18-bit width.
  Both the true speed input and the estimated speed output use this format.
* **Motor states.** The model's two integrator states are 48 bits wide, with 37 fraction bits.
  The per-step increment of a 2.5 µs Euler step is far smaller than one Q4.13 LSB and would
  otherwise be lost.
* **Gains.** PI gains are unsigned with 14 fraction bits. The encoder step of 0.01 is 164 LSB.

The package `pmsm_pkg` holds these types, the timing constants, the CORDIC arctangent table
and a saturating narrowing function.

## The motor model (`pmsm_model`)

The model uses the standard IPMSM current equations in the rotor frame. The q axis is taken at
angle θ from phase a, and the d axis leads it by 90°:

```
d iq/dt = vq/Lq − R/Lq·iq − ω·Ld/Lq·id
d id/dt = vd/Ld − R/Ld·id + ω·Lq/Ld·iq
```

They are integrated with forward Euler at Δt = 2.5 µs. Two small datapaths, one per axis,
evaluate both derivatives from the same present currents in one clock. Each integrator is a
single enabled adder/register. There is no permanent-magnet flux term, because the emulator
targets standstill.

The default coefficients describe R = 0.5 Ω, Ld = 8 mH and Lq = 16 mH. The inverter's DC link
is 300 V (3 pu). Change `AQ`, `AD`, `BQ`, `BD`, `LDLQ` and `LQLD` for another motor; the
header of `pmsm_model.sv` gives the scaling.

## Injecting test vectors without disturbing the controller

This is the part of the design that is easiest to get wrong. It spans `pwm_asym`,
`test_signal_gen`, `current_meas` and the top-level timing.

**PWM.** `pwm_asym` is centre-aligned, and every half period loads its own compare values:

```
cmp = HALF/2 + v·HALF/Vdc
```

* In the first half (the valley half) a leg turns on late.
* In the second half it turns off early.
* The on-time is therefore centred on mid-period, where the current is sampled.

**The test pulses.** `test_signal_gen` puts a test vector of amplitude DV (default 1 pu =
100 V) on top of the controller voltage in two consecutive half periods: +dv in the second
half of period k, then −dv in the first half of period k+1. The samples bracket the pair:

```
 mid(k)        valley(k+1)        mid(k+1)
   |----- +dv -----|----- −dv -----|
   i0              i1              i2
```

**Cancelling the controller's ripple.** The controller voltage is held constant over the whole
pair. The top latches it at mid-period and changes it only at the next mid-period. So the
controller's own current ripple is the same in both halves, and the second difference

```
d2 = (i1 − i0) − (i2 − i1) = 2·τ·L⁻¹·dv        (τ = 62.5 µs)
```

keeps only the response to the test vector. Because +dv and −dv cancel in flux, i2 is the
current the drive would have had without any test. The controller samples it as usual, once
per period, at a fixed rate.

**Alternating tests.** Test pairs start in every PWM period and alternate between test vector
I at angle `ALPHA_I` (default 0, along phase a) and test vector II at `ALPHA_I + DGAMMA`
(default 90°).

**Sampling delay.** The current is sampled `SAMPLE_DELAY` = 120 clocks (3 µs) after each
half-period boundary. That is a typical A/D conversion time. It also covers the latency of the
model and of ICT1, so the sample belongs to the boundary instant.

## Position from two responses (`position_estimator`)

Look at a test vector of amplitude dv at angle γ from the q axis. In a frame xy with x along
the vector, the response is:

```
Δi_x = τ·dv·(S − D·cos 2γ),    Δi_y = τ·dv·D·sin 2γ
S = (Lq + Ld)/(2·Lq·Ld),       D = (Lq − Ld)/(2·Lq·Ld)
```

A second vector turned by Δγ gives the same terms with 2γ + 2Δγ. Subtract the two responses,
and the unknown scale τ·dv·D drops out of the ratio:

```
φ = atan2(Δi_yI − Δi_yII, Δi_xII − Δi_xI) = 2γ + Δγ − π/2
γ = φ/2 − (2Δγ − π)/4
θ = α_I − γ        (α_I = stator angle of test vector I)
```

Each response d2 arrives in phase quantities. It is rotated into its own xy frame by a Park
slot of the shared unit: CT3 at the angle of test I and CT4 at the angle of test II. The
ATAN2 is an 11-step iterative CORDIC (`cordic_atan2`, one step per clock). θ is defined modulo
π, since saliency cannot tell the two magnet poles apart. It is reported in [−π/2, π/2).

**Speed.** The estimator also gives `omega_est`: the change of θ between two successive
estimates (again modulo π) divided by their spacing of two PWM periods. It is scaled by
`OMEGA_K` into the speed format. The first estimate after reset gives no speed. The value is
not filtered, so single-estimate jitter passes straight to the output.

## One arithmetic unit for seven transformations (`shared_transform`)

| slot (`SEL6`) | 0 | 1 | 2 | 3 | 4 | 5 | 6 |
|---|---|---|---|---|---|---|---|
| transformation | ICT1 | CT1 | ICT2 | ICT3 | CT2 | CT3 | CT4 |
| input | motor i_qd | inverter v_abc | PI v_qd | test vector | i at mid-period | test response I | test response II |
| angle | θ_r | θ_r | θ̂ | test angle | θ̂ | α_I | α_I + Δγ |

**Selector signals.** Five signals steer the operands:

* `SEL6` picks the angle fed to CORDIC.
* `SEL2` picks sine (0) or cosine (1).
* `SEL4` and `SEL3` pick the abc operand of a Park slot and the qd operand of an inverse-Park
  slot.
* `SEL6d` is `SEL6` one clock later. It enables the output register of the slot whose product
  is leaving the multiplier.

**Two steps per slot.**

* *Sine step.* The two products with sin θ are kept in two partial registers.
* *Cosine step.* The products with cos θ are added to them, and the slot's output register is
  written.

Park inputs pass a constant-coefficient Clarke stage first (α = (2a−b−c)/3, β = (b−c)/√3).
Inverse-Park outputs pass an inverse Clarke stage. The transforms are amplitude-invariant:

```
Park:          q =  α·cos θ + β·sin θ,   d = −α·sin θ + β·cos θ
inverse Park:  α =  q·cos θ − d·sin θ,   β =  q·sin θ + d·cos θ
```

**Timing.** The 7-step CORDIC sine/cosine (`cordic_sincos`) is unrolled, with its result
registered. A run is 14 steps plus one step to drain the pipeline, and `done` comes 16 clocks
after `start`. The slot order is fixed. The work order is the regular sequence 0, 0, 1, 1, …
6, 6; see the departures below.

## Current controller (`pi_controller`)

One PI datapath serves both axes. It computes q in the first clock after `start` and d in the
second. `done` pulses on the third clock. The controller runs once per PWM period, on the
first transformation run after the mid-period sample.

```
e = i_ref − i_meas
I = clamp(I + Ki·e, ±VLIM)
v = clamp(Kp·e + I + ff, ±VLIM)
ff_q = +ω̂·Ld·i_d,   ff_d = −ω̂·Lq·i_q
```

* **Decoupling.** The feed-forward `ff` cancels the speed-coupling terms of the motor
  equations. It uses the estimated speed.
* **Anti-windup.** Integration is conditional: while the output is in the limit and the error
  pushes it further, the integrator keeps its value.
* **Limit.** `VLIM` defaults to 0.5 pu. This leaves room for the 1 pu test vector inside the
  ±1.5 pu that a 300 V DC link can produce.
* **Gains.** The reset gains are Kp_q = 0.47, Ki_q = 0.55, Kp_d = 0.23 and Ki_d = 0.28.

## Gain tuning with a rotary encoder (`rotary_tuner`)

A mechanical encoder bounces. Each of its two outputs is first synchronised, then filtered: the
filtered output takes a new level only after the input has held it for `FILT` clocks (default
1 ms).

On each rising edge of filtered A:

* B low means one step up.
* B high means one step down.

Steps of 0.01 go to the gain selected by `gain_sel`: 0 Kp_q, 1 Ki_q, 2 Kp_d, 3 Ki_d. The
counts are limited to [`GMIN`, `GMAX`], default 0 to 2.00.

## Inverter side

* **`voltage_modulator`** models an ideal two-level inverter feeding a star-connected motor.
  Over each integration interval it counts the clocks each leg is on. It outputs the
  interval-average phase voltage Vdc/(3N)·(2n_a − n_b − n_c). Switching edges inside an
  interval are thus kept to one-clock resolution, although the model only steps every
  100 clocks.
* **`gate_drive`** turns each leg state into complementary upper/lower switch commands. When
  the leg state changes, the switch that was on opens at once. The other one closes only after
  `DT` = 40 clocks (1 µs) of stable state. An assertion checks that the two are never on
  together.

## Files

| file | contents |
|---|---|
| `rtl/pmsm_pkg.sv` | types, timing constants, CORDIC table, saturation |
| `rtl/emulator_top.sv` | top level: wiring, interval counter, controller and PWM-reference timing |
| `rtl/shared_transform.sv` | the seven-slot Park / inverse-Park unit |
| `rtl/cordic_sincos.sv`, `rtl/cordic_atan2.sv` | CORDIC sine/cosine (7 steps) and ATAN2 (11 steps) |
| `rtl/pmsm_model.sv` | Euler-integrated IPMSM current model |
| `rtl/pi_controller.sv` | shared q/d PI with anti-windup and decoupling |
| `rtl/test_signal_gen.sv` | test vector sequence |
| `rtl/pwm_asym.sv` | asymmetric centre-aligned PWM |
| `rtl/voltage_modulator.sv` | inverter model (interval-average phase voltages) |
| `rtl/gate_drive.sv` | dead-time gate commands |
| `rtl/current_meas.sv` | delayed current samples, mid-period value and second difference |
| `rtl/position_estimator.sv` | angle and speed estimate |
| `rtl/rotary_tuner.sv` | encoder filter, direction, gain counters |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## Simulating

Every testbench is self-checking. Each prints `TB_RESULT checks=N failures=M` and stops, and
each has a watchdog. With Verilator 5, from the repository root:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  -Irtl -y rtl +libext+.sv --top-module tb_emulator_top \
  rtl/pmsm_pkg.sv tb/tb_emulator_top.sv
./obj_dir/Vtb_emulator_top
```

Replace `tb_emulator_top` with any other testbench name to run that one.

**The end-to-end test.** `tb_emulator_top` runs the complete emulator with every parameter at
its default: about 33 ms of drive time, 1.3 M clocks, roughly a second of wall time. It
checks:

* the standstill estimate at rotor angles 0°, 20° and −35°, to within 3°;
* at 0°, every estimate of the last 10 PWM periods to within 0.5°, the error reported for
  the original hardware;
* a slowly turning rotor (35 rad/s electrical), where the estimate must follow and the
  estimated speed must be within 20% of the true speed;
* a 2 pu q-current step that drives the controller into its limit;
* one encoder detent up and one down.

It also counts every mechanism: test pairs I and II, estimates, controller runs, limited runs,
decoupled runs, encoder steps and dead times. It fails if any count stays at zero.

**Typical results.**

* Estimates: 0.12°, 21.0° and −35.15° for 0°, 20° and −35°.
* Turning rotor: 1.3° behind the rotor.
* Estimated speed: about 8% low (1347 against 1464 in the speed format).
* q current after the step: 2.005 pu.

**Unit testbenches.** These compare each module with a reference computed in the testbench
(real arithmetic or an independent integer model). Four shorten their module's time
constants through parameters:

* `tb_pwm_asym`: 100-clock half period.
* `tb_current_meas`: shorter half period and sampling delay.
* `tb_gate_drive`: 8-clock dead time.
* `tb_rotary_tuner`: 8-clock filter and a lower gain limit.

## How far it can be trusted, and where it departs from the published design

This RTL follows a published FPGA emulator closely in its structure and its key numbers:

* the 2.5 µs Euler integration at 100 clocks;
* the 125 µs asymmetric PWM;
* 7 CORDIC steps for sine/cosine and 11 for ATAN2;
* four Park and three inverse-Park transformations on one shared unit, with the five selector
  signals;
* a shared PI datapath with anti-windup;
* an encoder tuner with 0.01 steps and the reset gains above.

The published design was built with a block-diagram tool, not HDL. Everything below is this
design's own choice.

* **Clock.** The original quotes both 20 ns and 25 ns for the core clock. This design uses
  25 ns, which gives the stated 100 clocks per 2.5 µs.
* **Motor, inverter and test data.** R, Ld, Lq, the 300 V DC link, the 1 pu test amplitude,
  the 90° test spacing and the 0.5 pu controller limit are assumed. The original gives none
  of them.
* **Shared-unit schedule.** The published state sequence for the shared unit is not strictly
  regular. Some selector settings repeat to cover pipeline latency. This implementation uses
  a plain sine/cosine pair per slot plus one drain step. The slot order and the selector
  meanings are the same.
* **Estimator formula.** The offset term is derived here directly from the response
  equations, for a four-quadrant arctangent: −(2Δγ − π)/4, outside the half angle. It has
  been checked numerically and in simulation.
* **Methods the original names without describing.** The original gives no method for
  anti-windup, for the speed estimate, for the decoupling or for the current-measurement
  arithmetic. The forms used here (conditional integration, position difference, inductance
  feed-forward, second difference) are the simplest that do the job.
* **Encoder and current reference.** In the original block diagram the current reference
  enters from outside the chip, but the text says it is set with the encoder as well. Here
  the references are input ports, and the encoder tunes the four gains.
* **Converters.** The A/D and D/A converters that connect an external controller or motor sit
  outside the chip. Their digital sides are the top-level ports.
* **Not modelled.** Permanent-magnet back-EMF, inverter voltage drops, dead-time distortion in
  the motor voltage, and measurement noise. The emulated motor is therefore ideal apart from
  the fixed-point arithmetic.
* **Speed estimate.** It assumes estimates every two PWM periods. While test injection is
  switched off the spacing is longer, and the speed value is wrong until two regular estimates
  have passed.
* **Resources.** No FPGA place-and-route was done, so the original's resource savings from
  sharing are not reproduced here as numbers.
