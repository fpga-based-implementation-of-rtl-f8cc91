# Three-phase sinusoidal PWM generator (SPWM) in SystemVerilog

This design produces the six gate signals of a two-level three-phase voltage
source inverter by sine-carrier pulse width modulation. Three 50 Hz sines,
120 degrees apart and scaled by a modulation index of 0.86, are compared with
a 10 kHz carrier. While a sine is above the carrier, the upper switch of its
inverter leg is on; otherwise the lower switch is on. A short dead band
separates the two. Everything runs from one 100 MHz clock and is built from
counters, constant multipliers, a CORDIC sine generator per phase and
comparators. There are no lookup tables and no memories.

The structure follows a Xilinx System Generator model of SPWM for a
three-phase inverter with an RL load (230 V DC bus, 10 ohm, 1 mH per phase).
That model is made of counters, constant-gain blocks, a small scripted block
for the phase offsets, vendor CORDIC SINCOS blocks and relational blocks. This
RTL rebuilds each of those blocks as plain synthesizable SystemVerilog. The
section "Where this design departs from the original model" lists every
point where the original gives no detail and this design had to choose.

## Signal flow

```
                 carrier chain
 clk ─► tick_gen (2 MHz) ─► carrier_counter (-100..99) ─► const_mult x0.01 ─► carrier ─┐
                                                                                        │ b
                 sine chain                                                             ▼
 clk ─► tick_gen (2^20 Hz) ─► phase_counter (-10486..+10486) ─► const_mult x pi/10486    relational_cmp ─► dead_time ─► gate_hi[k]
        ─► phi ─► mcode_phase ─┬─ a1 = phi          ─► cordic_sincos ─► const_mult x0.86 ─► a        (x3)         └─► gate_lo[k]
                               ├─ a2 = phi - 2pi/3  ─► cordic_sincos ─► const_mult x0.86
                               └─ a3 = phi - 4pi/3  ─► cordic_sincos ─► const_mult x0.86
```

`spwm_top` holds one carrier chain, one phase chain, and three copies of the
sine/compare/dead-time path, one per phase (`g_phase[k]`, k = 0, 1, 2 for
phases a, b, c).

## How the frequencies come out

This is the part that needs the most care when changing parameters.

**Sample enables.** Neither counter steps on every 100 MHz clock. Each
counter has a `tick_gen`: a phase accumulator that adds `F_TICK` every clock,
subtracts `F_CLK` when the sum reaches it, and gives a one-clock `tick` each
time. So the average tick rate is exactly `F_TICK`, even when it does not
divide the clock.

**Output frequency (50 Hz).** The phase counter steps at 2^20 Hz, a sample
period of Ts = 2^-20 s. It sweeps from -1/Ts/100 to +1/Ts/100, which is
-10486 to +10486 with 2^20/100 = 10485.76 rounded. One sweep is 20973 steps.
That is 20973 x 2^-20 s = 20.0014 ms, so the output is 49.997 Hz. In clocks,
a period is 20973 x 100e6 / 2^20 = 2,000,141.2 clocks. Because the ticks
are 95 or 96 clocks apart, consecutive periods are 2,000,141 or 2,000,142
clocks long. The gain after the counter is pi/10486, so the sweep becomes an
angle from -pi to +pi.

**Carrier frequency (10 kHz).** The carrier counter steps at 2 MHz, exactly
every 50 clocks. It counts -100, -99, ... 99 and then reloads -100. That is
200 steps, or 100 us per carrier period. The gain of 1/100 turns this into a
ramp from -1.00 to +0.99. With `TRIANGLE = 1`, the counter instead counts up
to 99 and back down. This gives a symmetric triangle with twice the period at
the same step rate.

To change the output frequency, change `F_PHASE_TICK` or `PHASE_HALF`: the
period is (2*PHASE_HALF + 1) / F_PHASE_TICK. To change the carrier, change
`F_CARRIER_TICK`: the period is (CARRIER_MAX - CARRIER_INIT + 1) /
F_CARRIER_TICK for the ramp. The phase gain follows `PHASE_HALF`
automatically.

## Number formats (`spwm_pkg`)

| type      | width | fraction bits | range     | carries                                   |
|-----------|-------|---------------|-----------|-------------------------------------------|
| `angle_t` | 20    | 17            | +-4 rad   | phase angle, offsets, CORDIC input        |
| `sig_t`   | 16    | 14            | +-2       | sines, scaled sines, carrier              |

The carrier and the scaled sines share `sig_t`, so each comparator is a plain
signed comparison. The second phase offset, 4*pi/3 = 4.19 rad, does not fit
`angle_t`. The top therefore feeds -2*pi/3, which is the same angle.

## The blocks

**`const_mult`.** Multiplies by a constant gain. The gain is quantised to 24
fractional bits (30 for the phase gain). The product is rounded half up,
saturated to the output width and registered, with a latency of 1. It is used
four times: carrier x 0.01, phase count x pi/10486, and each sine x 0.86.

**`mcode_phase`.** Forms `a1 = phi`, `a2 = phi - phi1` and `a3 = phi - phi2`.
The two offsets are inputs, and the top ties them to constants. If a result
falls outside [-pi, pi], 2*pi is added or subtracted once. Each CORDIC thus
always sees an angle in its input range. Phase b lags phase a by 120 degrees,
and phase c lags it by 240 degrees. Latency 1.

**`cordic_sincos`.** A rotation-mode CORDIC with one pipeline stage per
iteration:
- Stage 0 folds an angle outside [-pi/2, pi/2] by +-pi and remembers to
  negate the result.
- The vector starts at (1/G, 0), where G is the CORDIC gain. This cancels the
  gain, so no multiplier is needed at the end.
- Each of the ITER = 10 stages rotates by +-atan(2^-i), according to the sign
  of the remaining angle.
- The arctangent table and 1/G are computed at elaboration from `$atan` and
  `$sqrt`, so changing `ITER` needs no table edits.

The latency is ITER + 1 = 11 clocks. The measured error is below 2e-3, which
is well under one carrier step (0.01). A new angle can enter every clock.
Only the sine output is used. The cosine output is kept because it is part of
the block's interface.

**`relational_cmp`.** A registered `pwm = (sine > carrier)`.

**`dead_time`.** Makes the upper and lower gate signals of one leg from
`pwm`. When `pwm` changes, both gates drop at once. A counter then waits
`DEAD` clocks (100 = 1 us) before the new gate rises. If `pwm` changes back
within the band, the band restarts and the short pulse is lost. This really
happens in this design, a few times per output period. When a sine sits just
at a carrier level, the sine's own 2^20 Hz steps can cross that level back
and forth inside one 50-clock carrier step. `DEAD = 0` gives plain `pwm` and
its inverse. After reset, both gates are low; the lower gate rises `DEAD`
clocks later. An assertion checks that a leg never has both gates on.

**Latency.** From a phase-counter step to a comparator output takes 16
clocks (counter, phase gain, offset stage, 11 in the CORDIC, index gain,
comparator), plus `DEAD` clocks to the gate. The 16 clocks (160 ns) are a
constant delay of the sines, a phase lag of about 0.003 degrees at 50 Hz.

All registers use an active-low asynchronous reset `rst_n`. After reset the
carrier starts at -100 and the phase at -pi, and the generator runs
continuously. There is no enable and no run-time change of the modulation
index or frequency. These are fixed by parameters, as they are in the
original model.

## Top-level interface (`spwm_top`)

| port           | dir | width   | meaning                                                      |
|----------------|-----|---------|--------------------------------------------------------------|
| `clk`          | in  | 1       | 100 MHz clock                                                |
| `rst_n`        | in  | 1       | asynchronous reset, active low                               |
| `gate_hi`      | out | 3       | upper switch of legs a, b, c                                 |
| `gate_lo`      | out | 3       | lower switch of legs a, b, c                                 |
| `pwm`          | out | 3       | comparator outputs, before dead time                         |
| `carrier`      | out | 16      | scaled carrier, `sig_t`                                      |
| `sine`         | out | 3 x 16  | scaled sines, `sig_t`                                        |
| `carrier_wrap` | out | 1       | one-clock pulse at each carrier period start                 |
| `phase_wrap`   | out | 1       | one-clock pulse when the phase returns to -pi (period start) |

Parameters and their defaults:

| parameter        | default     | origin                                       |
|------------------|-------------|----------------------------------------------|
| `F_CLK`          | 100 000 000 | original model (100 MHz system clock)        |
| `F_PHASE_TICK`   | 1 048 576   | original model (Ts = 2^-20 s)                |
| `F_CARRIER_TICK` | 2 000 000   | chosen: 200 steps x 10 kHz                   |
| `CARRIER_W`      | 8           | original model                               |
| `CARRIER_INIT`   | -100        | original model                               |
| `CARRIER_MAX`    | 99          | chosen: 200-step period                      |
| `TRIANGLE`       | 0           | ramp, as in the original model's waveforms   |
| `CARRIER_GAIN`   | 0.01        | original model                               |
| `PHASE_W`        | 20          | original model                               |
| `PHASE_HALF`     | 10486       | original model (2^20/100)                    |
| `MOD_INDEX`      | 0.86        | original model                               |
| `PHI1`, `PHI2`   | 2pi/3, -2pi/3 | original model (120-degree offsets)        |
| `CORDIC_ITER`    | 10          | chosen: gives the original 11-clock latency  |
| `DEAD_CYCLES`    | 100         | chosen: 1 us                                 |

## Where this design departs from the original model

- **Phase gain.** The original feeds the 20-bit counter into a gain of 1. Its
  counter must therefore already be in radian units, through a fixed-point
  format that is not published. Here the counter is an integer and the gain is
  pi/10486. The angle is the same.
- **Carrier rate.** The original gives the carrier counter a sample period of
  2^-20 s and also names a carrier frequency of 10 kHz. With 200 steps, these
  two do not agree: 2^-20 s would give 5.2 kHz. This design keeps 10 kHz by
  stepping the carrier counter at 2 MHz. The 2^-20 s period is used for the
  phase counter, where it gives exactly the 50 Hz of the published waveforms.
- **Carrier shape and range.** The original calls the carrier triangular and
  speaks of a 0..1 range. However, its hardware waveforms show a rising ramp,
  and a counter from -100 scaled by 1/100 spans -1..1. The default here is the
  -1..+0.99 ramp. `TRIANGLE = 1` gives the triangle.
- **Offset constants.** The original feeds two constants into its offset
  block, but their values are not published legibly. 2*pi/3 and 4*pi/3 are
  used, and the offsets are subtracted.
- **Comparator polarity.** This design uses sine > carrier, with the upper
  switch on.
- **Dead time.** The original mentions dead-time handling for the
  complementary signals but gives no value or mechanism. The 1 us band and its
  counter are this design's own choice.
- **CORDIC.** The original uses a vendor block with an 11-clock latency. This
  design uses a 10-iteration pipelined CORDIC with the same latency. Its
  accuracy (about 2e-3) is this design's choice.
- **Fixed-point formats, rounding, saturation, reset.** The original does not
  give these; all are this design's choices.
- **Size.** A generic synthesis of `spwm_top` gives about 2000 flip-flop bits,
  most of them in the three fully pipelined CORDIC units. The original reports
  529 slice registers and 1859 LUTs on a Virtex-5 LX110T, with no block RAM or
  DSP. The vendor CORDIC evidently stores much less state per phase. Both fit
  easily into a Virtex-5 LX110T or a Zynq-7000. The constant multipliers here
  are written as `*`, and a synthesis tool may map them to DSP blocks or to
  shift-and-add logic.

## Verification

Each block has a self-checking testbench in `tb/`. Each one compares the
block's outputs with values computed independently in the testbench, and
ends with a `TB_RESULT checks=N failures=M` line.

| testbench            | what it checks                                                                 |
|----------------------|--------------------------------------------------------------------------------|
| `tb_tick_gen`        | 2^20 Hz ticks 95 or 96 clocks apart, 10485 or 10486 per 10 ms; 2 MHz ticks every 50 |
| `tb_carrier_counter` | ramp and triangle sequences under random enables; one `wrap` per period        |
| `tb_phase_counter`   | the sweep under random enables; the default period of 20973 steps              |
| `tb_const_mult`      | the three gains and saturation against real arithmetic, within 1 LSB           |
| `tb_mcode_phase`     | offsets and wrap-around against real arithmetic                                |
| `tb_cordic_sincos`   | latency of exactly 11 clocks; sine and cosine within 0.003 of `$sin`/`$cos`    |
| `tb_relational_cmp`  | random, near-equal and equal operands                                          |
| `tb_dead_time`       | DEAD = 0, 5, 100 against a reference; swallowed pulses; no overlap             |
| `tb_spwm_top`        | the whole generator at default parameters, driving an inverter/RL-load model   |
| `tb_spwm_top_triangle` | the whole generator with a 10 kHz triangle carrier and no dead band        |

`tb_spwm_top` runs the top with every parameter at its default, for two full
output periods (about 4 million clocks, a few seconds in Verilator). It
measures the second period. It uses `tb/inverter_rl_model.sv`, a behavioural
model of the power stage:
- ideal switches on a 230 V bus;
- freewheeling diodes during dead bands;
- a star-connected RL load with R = 10 ohm and L = 1 mH;
- forward-Euler integration every 10 ns.

The testbench checks the following:
- output period of 2,000,141 or 2,000,142 clocks;
- carrier period of exactly 10,000 clocks;
- the three scaled sines within 0.006 of 0.86 sin(wt - pi - k 2pi/3);
- the duty cycle of every carrier period within 0.02 of (1 + s)/2;
- no shoot-through;
- every dead band exactly 100 clocks, unless a pulse was swallowed inside it;
- the current fundamental within 6 % of the ideal m Vdc / 2 / |R + jwL| =
  9.89 A, with phases b and c lagging by 120 and 240 degrees within 2 degrees;
- the line-voltage fundamental within 6 % of sqrt(3) m Vdc / 2 = 171 V.

The testbench also counts that every mechanism occurs at least once: carrier
wrap, phase wrap, offset wrap-around, CORDIC fold, dead band, swallowed pulse
and diode freewheeling.

Observed at the defaults:
- current fundamental 9.59 A, about 3 % below the ideal; the 1 us dead band
  at 10 kHz (1 % of each carrier period) accounts for most of the loss;
- current THD about 11.8 %, counting all harmonics up to the 100 MHz
  sampling;
- line-voltage fundamental 166 V.

`tb_spwm_top_triangle` sets `TRIANGLE = 1`, `DEAD_CYCLES = 0` and a
3.98 MHz carrier step rate, which makes the 398-step triangle 10 kHz. It checks
the carrier period, the duty cycle per carrier period, that the gates are
exactly `pwm` and its inverse, and the current fundamental. With no dead band,
that fundamental is 9.93 A, against 9.89 A ideal.

The original reports THD values of 1.4-3.6 % for its hardware model. Those
depend on the analysis bandwidth of the tool that measured them, so they are
not comparable with the full-band figure above.

Running a testbench with plain Verilator (5.x), from the folder that holds
`rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
          rtl/spwm_pkg.sv tb/tb_spwm_top.sv --top-module tb_spwm_top -o sim
./obj_dir/sim
```

Replace `tb_spwm_top` with any other testbench name. The package file must be
listed first. Linting a module alone:

```
verilator --lint-only -Wall -Wno-fatal -Irtl -y rtl +libext+.sv rtl/spwm_pkg.sv rtl/spwm_top.sv
```

Remaining lint warnings:
- some unused package constants;
- unused low bits in the CORDIC output rounding;
- `rst_n` used both as an asynchronous reset and in an assertion's
  `disable iff`.

## Files

- `rtl/spwm_pkg.sv`: formats and constants.
- `rtl/tick_gen.sv`, `rtl/carrier_counter.sv`, `rtl/phase_counter.sv`,
  `rtl/const_mult.sv`, `rtl/mcode_phase.sv`, `rtl/cordic_sincos.sv`,
  `rtl/relational_cmp.sv`, `rtl/dead_time.sv`: the blocks.
- `rtl/spwm_top.sv`: the generator.
- `tb/tb_*.sv`: the testbenches.
- `tb/inverter_rl_model.sv`: the behavioural inverter and load. It is not
  synthesizable and is used only by `tb_spwm_top`.

The power stage itself is outside the RTL: the IGBT bridge, DC source, RL load
and measurements. The top's `gate_hi`/`gate_lo` ports are where it connects.
