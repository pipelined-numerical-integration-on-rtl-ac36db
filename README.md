# Pipelined generator integration for a mixed-signal transient-stability emulator

Transient-stability simulation of a power grid alternates between two problems
at every time step. One is a large linear system that links bus voltages to
injected currents through the grid's admittance matrix. The other is a set of
small differential equations, one per generator or load. In the emulator this
RTL belongs to, an analog resistor lattice solves the linear system almost
instantly. The digital part, which this RTL describes, integrates the
generators' swing equations in fixed point, with a single deep pipeline that
all generators of the same model type share.

Each time step the digital part:

1. reads every generator bus voltage from the ADCs, all at the same time;
2. streams the samples through the generator pipeline, one generator per
   clock. For each generator the pipeline computes the machine current, the
   electrical power and the rotor acceleration. It then integrates the speed
   and the angle, and produces the Norton-equivalent current of the machine
   for the new angle;
3. writes every new current to the DACs, all at the same time. The analog
   lattice then settles on the bus voltages for the next step.

The integrators offer Forward Euler (FE) and 2-step Adams-Bashforth (AB2).
The design exists to make AB2 cheap. The inputs come from an imprecise
analog solver through 12-bit converters. In such a datapath FE's first-order
error piles up at the time steps of tens of milliseconds that make a study
fast. On grids with fast swings it can then report a stable case as
unstable. AB2, being second order, holds up at much larger steps. That makes
repeated studies cheaper, such as n-1 contingency screening and the binary
search for a critical clearing time. The tests described under Simulation
measure both methods on the hardware.

## The generator pipeline (`generator_pipeline`)

The pipeline uses the classical machine model: an EMF E' behind the transient
reactance x'd, a constant mechanical power Pm, and inertia H. The stages, their
word formats and their latencies are:

| stage | module | output | format | clocks |
|---|---|---|---|---|
| ADC calibration, y = g·x + o | `calibration` | Re/Im V' | Q2.14 | 2 |
| internal machine currents | `machine_currents` | Re/Im I' | Q5.11 | 3 |
| electrical power Pe = Re{V' I'*} | `power_calc` | Pe | Q5.13 | 3 |
| swing equation (2f0/H)(Pm − Pe) | `swing_accel` | dω/dt | Q13.23 | 2 |
| speed integrator (with `history_buffer`) | `integrator` | dδ/dt | Q2.44 | 2 |
| angle integrator (with `history_buffer`) | `integrator` | δ | Q2.52 | 2 |
| truncation | `trunk` | δ | Q2.11 | 1 |
| sine and cosine | `sincos` | sin δ, cos δ | Q2.12 | 3 |
| Norton current ∓E'/x'd | `norton_current` | Re/Im I'' | Q5.11 | 2 |
| DAC calibration | `calibration` | DAC codes | Q2.10 | 2 |

Total latency: 22 clocks. The pipeline accepts one generator per clock with
no stalls. For N generators a pass takes N + 22 clocks.

**Qm.f notation.** A Qm.f word is a two's-complement word of m+f bits. The m
integer bits include the sign. Arithmetic is exact up to the end of each
stage. There the extra fractional bits are dropped (truncation toward minus
infinity) and the result saturates to the stage's output width. The two
integrators are the exception: their states wrap. Most of the precision loss
is concentrated in `trunk`, which cuts the 54-bit angle to 13 bits for the
sine table.

**Angle unit.** Angles are in quarter-turns (units of π/2 rad). In that unit
the swing equation (2H/ω_s)·d²δ/dt² = Pm − Pe becomes
d²δ/dt² = (2f0/H)(Pm − Pe), with the speed in quarter-turns per second. A Q2
word spans exactly one turn, [−π, π), so the angle integrator wraps freely.

**Phasor frame.** The Norton stage forms Re{I''} = −(E'/x'd)·cos δ and
Im{I''} = (E'/x'd)·sin δ. In the usual phasor convention the Norton current
is (E'/x'd)(sin δ − j cos δ). The pipeline therefore works in the frame
X'' = j·conj(X) of the usual phasor X, and every stage uses that frame. The
machine current is I' = I'' − jV'/x'd, so:

- Re{I'} = Re{I''} + Im{V'}/x'd
- Im{I'} = Im{I''} − Re{V'}/x'd

and Pe = Re{V'}Re{I'} + Im{V'}Im{I'}. When the bus voltage equals the EMF, the
machine current is zero, as it should be. If the analog lattice is wired with
the opposite convention, only the gain signs in the parameter records need to
change.

**State between steps.** Each generator has the following state, all indexed
by generator number:

- its speed and its angle, held in the two integrators;
- the derivative of the previous step for each integrator, held in the two
  history buffers;
- the Norton current it injected at the previous step, held in
  `machine_currents`.

A generator index travels with every sample through the pipeline. Each stage
that needs a per-generator parameter reads it from `param_store` with that
index.

## Integration (`integrator`, `history_buffer`)

```
FE:   x(n+1) = x(n) + h·f(n)
AB2:  x(n+1) = x(n) + h·(3/2·f(n) − 1/2·f(n−1))
```

The integrator computes g = 2f(n) for FE or 3f(n) − f(n−1) for AB2, keeping
one extra fractional bit. It multiplies g by h (unsigned Q0.32 seconds, so h
runs from 0.23 ns up to just under 1 s). It truncates the product to the state
format and adds it with wrap-around. Both states advance from step n: the
speed integrator outputs the new speed ω(n+1) on `x` and the speed it started
from, ω(n), on `x_prev`. The angle integrator and its history use ω(n). So FE
and AB2 act on the state vector (δ, ω) exactly as the formulas above say.
(Feeding it ω(n+1) instead would give semi-implicit Euler, which behaves quite
differently.)

Two control inputs cover the start of a run:

- `first`: on the first step after initialisation there is no f(n−1), so AB2
  falls back to FE.
- `update` = 0 (a *prime pass*): states and histories are not touched, but the
  Norton currents of the present angles are computed, stored and sent to the
  DACs. The host runs one prime pass after loading the initial angles, so
  that the grid sees the right injections before the first real step.

A prime pass also makes the next step an FE step. The host should issue one
after every switching event in the grid, such as a fault applied or cleared.
Otherwise AB2's f(n−1) comes from before the event and f(n) from after it.
That one step then costs a first-order error that stays in the trajectory. In
the contingency test below, restarting cut AB2's angle error about tenfold.

**Speed range.** dδ/dt is Q2.44 in quarter-turns per second, so it holds slips
up to ±π rad/s (±0.5 Hz). A machine whose slip goes past that wraps, and its
trajectory is then meaningless. During a terminal fault the slip grows as
π·f0·Pm·t/H. With Pm = 0.9 pu the limit is reached after about 110 ms for
H = 5 s and about 630 ms for H = 30 s. Studies must stay inside this range. A
wider speed word, or a different angle unit in `sincos`, would lift the limit.

## Time-step sequencing and converters

`step_sequencer` runs one pass per command: `cmd_prime` starts a prime pass
and `cmd_step` starts a step. A pass goes through these phases:

1. Start all 2N ADC drivers (`spi_driver`).
2. Wait for all of them.
3. Start `seq_mux`, which latches the N voltage pairs and issues them on N
   consecutive clocks.
4. Wait until `seq_demux` has collected all N results by index.
5. Start all 2N DAC drivers in the same clock.
6. Wait for them, then wait `SETTLE` more clocks for the analog lattice.
7. Pulse `step_done`.

The sequencer raises `first` by itself on the step that follows a prime pass.

The SPI framing is generic because the converter parts are not specified:

- mode 0, MSB first, one 16-bit frame per converter;
- each SCLK half-period lasts `CLK_DIV` clocks;
- the ADC sample is in the low 12 bits of the returned word;
- the DAC word is four zero command bits followed by the 12-bit code.

A frame takes (2·16+1)·CLK_DIV + 1 clocks. At the defaults (N = 5,
CLK_DIV = 2, SETTLE = 16) a whole step takes about 185 clocks.

## Top level (`pnit_top`) and how to drive it

Ports, with N = `N_GEN`:

- `adc_cs_n/adc_sclk/adc_mosi/adc_miso[2N]`: channel 2g is Re{V} of bus g,
  channel 2g+1 is Im{V}.
- `dac_cs_n/dac_sclk/dac_mosi[2N]`: the same layout for currents.
- `cfg_p_*`: writes one `gen_params_t` record, which holds calibration gains
  and offsets, 1/x'd, 2f0/H, Pm and E'/x'd. Their formats are listed in
  `pnit_pkg`.
- `cfg_init_*`: writes one generator's initial speed and angle.
- `cfg_h`, `cfg_method`: the time step and the integration method. Keep them
  stable during a pass.
- `cmd_prime`, `cmd_step`, `busy`, `step_done`: commands and status.
- `obs_*`: each generator's new angle and speed as the pipeline computes them.

To run a simulation:

1. Load every generator's parameters and initial state.
2. Pulse `cmd_prime` and wait for `step_done`.
3. Pulse `cmd_step` and wait for `step_done`, once per time step.

A fault or a line switching is applied in the analog lattice between steps,
followed by a prime pass (`cmd_prime`) so that AB2 restarts cleanly.

## What is modelled and what is not

- **Built:** the generator pipeline for the classical model, its parameter
  store, the sequential MUX and DEMUX, per-converter SPI drivers and the
  time-step controller.
- **Not built:** the analog lattice, the converters themselves, the clock
  source, and pipelines for other injection types such as loads. The
  equations for other injection types are not available here. Several
  pipelines would each get their own MUX and DEMUX.
- **Design choices not fixed by the source architecture:**
  - the formats of the parameter words and of h;
  - the quarter-turn angle unit and the phasor frame above;
  - truncation rather than rounding, and saturation at stage outputs;
  - Pm as a per-generator parameter, and no damping term;
  - the quarter-wave sine table, computed at elaboration with `$sin`;
  - register files for all per-generator storage;
  - the prime pass, the FE fallback on the first step, the settle wait, the
    SPI framing and the host port.
- **Fit to the evaluated system.** The IEEE 18-bus benchmark has 5
  generators, the default `N_GEN`. Its 8 loads would need a load pipeline.
  All of the time steps studied fit in h's Q0.32 format: 60 µs is code
  257698 and 62.5 ms is code 268435456.

## Simulation

Each module has a self-checking testbench `tb/tb_<module>.sv`, which prints
`TB_RESULT checks=N failures=M`. The blocks are checked against integer
reference functions in `tb/pnit_ref_pkg.sv`, which compute each stage's
formula directly on 128-bit integers. `pipe_pass` in that package chains the
formulas into a whole-pipeline reference.

`tb_generator_pipeline` and `tb_pnit_top` run five generators through one
prime pass, 12 AB2 steps (the first falls back to FE) at h = 10 ms and 8 FE
steps at h = 15.6 ms. They close the loop through a toy grid model and check
every DAC code, angle and speed bit for bit. `tb_pnit_top` runs the top at its
default parameters. It uses `tb/spi_conv_model.sv` for the converters and also
checks frame counts and that all DAC frames start in the same clock.

`tb_contingency_steps` is a stability study on the top at its defaults. Each
generator is a classical machine (E' = 1.2, x'd = 0.3, H = 30 s, Pm = 0.9)
tied to an infinite bus through x = 0.4. A testbench grid model stands in for
the analog lattice: it solves the bus voltage from the DAC currents and holds
it at zero while a bolted fault is on. The five generators have their faults
cleared at 300, 540, 570, 600 and 640 ms; the critical clearing time is about
583 ms. Every case is run with FE and AB2 at h = 7.8, 15.6 and 31.3 ms for 2.5
s, and compared with an RK4 solution in real arithmetic. It prints one line
per run, with each machine's verdict (S = stable, U = unstable: angle past π)
and its largest angle deviation. It checks three things:

- AB2 gives the reference verdict at 7.8 and 15.6 ms;
- AB2 stays within 0.01 rad for the two clearly stable cases at 7.8 ms;
- AB2 deviates less than FE wherever both stay stable.

Typical deviations for the 300 ms case are 0.001 / 0.003 / 0.008 rad for AB2
and 0.024 / 0.052 / 0.112 rad for FE. For the 540 ms case FE is off by up to
1.8 rad, while AB2 stays within 0.005 rad up to 15.6 ms.

`tb_cct_search` finds the critical clearing time of the same machine on the
hardware. Each run gives the five generators five different fault durations,
which narrows the bracket sixfold. It does this for both methods at h = 2,
7.8, 15.6 and 31.3 ms and compares each result with a bisection on the RK4
model. It checks that AB2 is within 2.2 % for h up to 15.6 ms. In practice
both methods land within one step of the reference: 584.0 ms at 2 ms, and
577.2 ms at 7.8 ms, where FE gives 585.0 ms.

This machine is deliberately slow, with a swing frequency of about 0.44 Hz, so
that its slip stays inside the speed range. At that frequency even h = 31.3
ms is only 0.09 rad of swing phase per step. So neither test can show FE
breaking down the way it does on faster machines. What they do show is that
FE's angle error is 5 to several hundred times AB2's in every stable case.

Example with plain Verilator:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
  rtl/pnit_pkg.sv tb/pnit_ref_pkg.sv tb/tb_pnit_top.sv --top-module tb_pnit_top
./obj_dir/Vtb_pnit_top
```

Replace the testbench name to run any other block. Every design file is in
`rtl/`, one module or package per file. `pnit_pkg.sv` holds the formats and
has to be read first.
