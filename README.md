# Phase-shifted PWM modulator with flying-capacitor balancing for a three-phase 4-level FLC inverter

A four-level flying-capacitor (4L-FLC) inverter leg stacks three switch cells between
the dc rails. Two floating capacitors sit between the cells: C1 between cells 1 and 2,
and C2 between cells 2 and 3. With C1 held at 2/3 and C2 at 1/3 of the dc voltage, the
leg can put out four voltage levels. Each cell is a complementary IGBT pair (S1/S1n,
S2/S2n, S3/S3n).

The modulator drives each cell with its own PWM signal. The three triangular carriers
are shifted by a third of a switching period against each other. As a result, the phase
voltage switches at three times the carrier frequency: 2.4 kHz for 800 Hz carriers.

This kind of modulation balances the flying capacitors only slowly by itself. This
design adds closed-loop balancing with proportional (P) controllers. A master DSP sends
the measured and desired capacitor voltages. The controllers then shift the modulation
signal of one cell up and of the neighbouring cell down. This charges or discharges the
capacitor between those two cells.

The logic is meant for an FPGA that works as a slave to the DSP. The DSP runs the motor
control and the precharge sequence. It hands the FPGA:
- a voltage vector (Vx, Vy);
- twelve capacitor voltages (measured and desired).

The FPGA turns these into 18 gate signals. A dead-time stage follows. In the original
system that stage is a separate programmable logic device.

## Signal chain

```
 DSP words + syn_d
      |
 register_in ---- Vx,Vy ---> transformation --Va/Vb/Vc--> balancing_flc (x3) --m1..m3--> modulator_flc (x3)
      |                                                      ^                              | PWM1..3, syn_dsp
      +--- V1, V1*, V2, V2* of each phase -------------------+                              v
                                                                             precharging_logic_flc --> dead_time --> gates_o
                                                                                   ^ mode, relays            (18 IGBTs)
```

| Module | Role | Latency |
|---|---|---|
| `register_in` | Copies all 14 input words at once, on the rising edge of the DSP strobe `syn_d`. The strobe is synchronised with two flops. | 3 clk after the `syn_d` edge |
| `transformation` | Turns the XY voltage vector into three phase signals (inverse Clarke transform). | 1 clk |
| `balancing_flc` | Two P controllers with output limiting produce the three cell signals m1, m2, m3. | 1 clk |
| `modulator_flc` | Three phase-shifted triangular carriers and three comparators. Also emits a once-per-period sync pulse. | 1 clk |
| `precharging_logic_flc` | Selects the gate pattern: run, precharge C2, precharge C1, direct, or off. Also drives the relays. | 1 clk |
| `dead_time` | Delays every turn-on by `DT_CYCLES`. | turn-off 1 clk, turn-on `DT_CYCLES`+1 clk |
| `flc_modulator_top` | Wires the chain together. There is one balancing block and one modulator per phase. | |
| `flc_pkg` | Shared types: `sample_t` (16-bit signed), `leg_gates_t`, `pre_mode_t`, and `sat16()`. | |

All data words are 16-bit signed integers. The scale of a capacitor voltage does not
matter here, as long as the measured and desired values use the same one. A 400 V
capacitor fits in 16 bits at any scale above about 0.012 V per LSB.

## Balancing controllers

Per phase, with e = measured - desired:

```
y1 = clamp(KP * (V1 - V1*) / 2^KP_FRAC, +/-Y_LIM)      (C1 controller)
y2 = clamp(KP * (V2 - V2*) / 2^KP_FRAC, +/-Y_LIM)      (C2 controller)
m1 = M + y2
m2 = M - y2 + y1
m3 = M - y1                                            (each saturated to 16 bits)
```

Each controller adds to one cell's signal and subtracts the same amount from the next
cell's signal. The average leg voltage therefore stays the same. Only the share of time
that the load current flows through a capacitor changes.

When both errors are zero, M passes to all three cells unchanged. The carriers' own slow
balancing then does the work, and the output is not distorted. This is the reason for
plain P controllers rather than PI controllers: a PI controller keeps a non-zero output
at zero error.

The trade-offs and points to check:

- **Gain.** A higher gain holds the capacitors closer to their references but distorts
  the output voltage more. The gain is `KP / 2^KP_FRAC`, set at elaboration. The default
  is 1.0, with a limit `Y_LIM` of 4096 (one eighth of full scale). Both values are
  placeholders: tune them for the real hardware.
- **Sign of the gain.** The sign depends on the direction of power flow. In generator
  operation the gain must be negative. This design has no run-time sign input: build with
  a negative `KP`, or extend the block to switch the sign from the torque-current polarity.
- **Which controller drives which cells.** Here the C2 controller acts on the cell 1/2
  pair and the C1 controller on the cell 2/3 pair. This follows the controller diagram
  the scheme is based on. Check this assignment, and the sign, against your capacitor
  numbering and current direction before running hardware.
- **Corrections are added, not multiplied.** The corrections are added to M. Some
  descriptions of the scheme speak of multiplying the controller outputs with the
  modulation signal, but the block diagram shows summing junctions, and that is what is
  built.

## Carriers and timing of the PWM

`modulator_flc` makes its carriers from a 32-bit phase accumulator (NCO). The NCO ticks
`65532 * F_SW` times per second. Each carrier keeps a phase counter p in [0, 65532):

```
tri = 2p - 32766              for p <  32766   (rising)
tri = 2(65532 - p) - 32766    for p >= 32766   (falling)
```

So each carrier runs from -32766 to +32766 in steps of 2. The period of 65532 ticks
divides by three, so carriers 2 and 3 lag carrier 1 by exactly one third and two thirds
of a period. PWMk is 1 while Ink > carrier k.

At the default `CLK_HZ = 100 MHz` and `F_SW = 800 Hz`, one period is 125000 clk. The
NCO makes each period 1 clk longer or shorter now and then.

`syn_dsp_o` pulses for one clk at the valley of carrier 1. This is the moment for the
DSP to sample and to send the next vector. The pulse of the phase-c modulator is the one
that reaches the top output.

Since all three modulators leave reset together, their carriers stay aligned with each
other.

From one `syn_d` edge to a changed gate output takes:
- 3 clk in `register_in`;
- 3 clk through the transformation, balancing and compare stages;
- 1 clk in the pattern selector;
- the dead time for a turn-on.

## Precharge and gate patterns

The DSP runs the whole start-up sequence. The FPGA only applies the pattern it selects
with `mode_i` (`pre_mode_t`):

| Mode | Per leg |
|---|---|
| `MODE_OFF` | all six IGBTs off (after reset) |
| `MODE_RUN` | Sk = PWMk, Skn = not PWMk |
| `MODE_PRE_C2` | S1 and S2 on, the rest off: C2 charges to 1/3 of the dc voltage first |
| `MODE_PRE_C1` | S1 on, the rest off: C1 charges next |
| `MODE_DIRECT` | the 6-bit pattern from `direct_i`. This is the only mode in which both switches of a pair may be on together. |

An assertion in `precharging_logic_flc` checks that no complementary pair is on at once
outside `MODE_DIRECT`.

Two relay outputs follow the DSP's commands:
- `relay_bypass_o` shorts the precharge resistor;
- `relay_line_o` chooses between the ac-line contact and the quick-discharge contact.

`dead_time` treats each of the 18 gate signals on its own: a 1 goes through only after it
has lasted `DT_CYCLES` clk. When one switch of a pair turns off and the other turns on,
both are therefore off for `DT_CYCLES` cycles. Pulses shorter than the dead time are lost.

## Parameters (top level)

| Parameter | Default | Origin |
|---|---|---|
| `F_SW` | 800 | carrier (switching) frequency in Hz of the reference system |
| `CLK_HZ` | 100 000 000 | assumed FPGA clock |
| `KP`, `KP_FRAC` | 256, 8 (gain 1.0) | placeholder gain |
| `Y_LIM` | 4096 | placeholder controller limit |
| `DT_CYCLES` | 200 (2 us) | placeholder dead time |

The data width (16 bit), the three carriers per phase, the three phases and the 18 gate
signals are fixed by the structure.

## Limits and departures

These parts are this design's own choices, not given by the reference system:
- the NCO carrier generator;
- the ±32766 carrier range (instead of the full -32768..32767);
- the synchroniser on `syn_d`;
- the rounding of the Q15 transform;
- the mode encoding and `MODE_DIRECT`.

Not included:
- the modulation of the converter's input side. In the back-to-back (AC/DC/AC) version
  of this converter, the rectifier is also a 4-level FLC and is precharged together with
  the inverter. How that side is modulated is not covered here; this RTL drives the
  inverter's 18 IGBTs only.
- the bus interface between the DSP and the FPGA (address decoding and timing). The 14
  data words and the strobe are plain ports instead.
- the DSP software, the A/D converters and the other I/O of the control board.
- a run-time switch of the controller sign between motor and generator operation.

`syn_d` is assumed to rise only after the data words are stable, and the words must stay
stable for 3 clk after the edge.

## Simulation

Every testbench is self-checking and ends with a line `TB_RESULT checks=N failures=M`.
Build and run one with Verilator 5 from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb rtl/flc_pkg.sv rtl/*.sv \
    tb/tb_flc_modulator_top.sv --top-module tb_flc_modulator_top -Mdir obj -o sim
./obj/sim
```

(Verilator warns that `flc_pkg.sv` is listed twice; to avoid the warning, list the package
first and then the other files by name.)

| Testbench | What it checks |
|---|---|
| `tb_register_in` | Data change only on a rising `syn_d` edge, 3 clk later, and not while `syn_d` stays high. |
| `tb_transformation` | Compared with real-valued inverse Clarke results (±1 LSB), including saturation. |
| `tb_balancing_flc` | Bit-exact against a real-valued model. Also covers the limiter, 16-bit saturation and a negative gain. |
| `tb_modulator_flc` | Period 125000 clk, carrier range, duty = (In + A)/2A, one pulse per period, T/3 and 2T/3 lags, and six level changes per period. |
| `tb_precharging_logic_flc` | Every mode with random inputs, plus the relays and the sync pulse. |
| `tb_dead_time` | Checked cycle by cycle against a run-length model, plus the gap length of a pair. |
| `tb_flc_modulator_top` | End to end at default parameters: off, precharge C2 and C1, the both-on direct pattern, relays, and run. In run, the on-time of all 18 gates is checked per switching period against the modulation chain, with balanced and unbalanced capacitors and with the limiter active. It also checks for no shoot-through, for dead-time gaps, and that input changes without a strobe have no effect. |
| `tb_output_frequency` | A DSP model rotates the voltage vector at 50 Hz (3 periods) and 8.3 Hz (1 period), updating on every sync pulse. It checks each leg's average level per switching period, the 2.4 kHz phase-voltage switching and the number of fundamental periods. Runtime is about 11 s. |

The testbenches do not model the power stage. Whether the capacitors actually settle in
closed loop depends on the load current and the gain, and has not been simulated here.
