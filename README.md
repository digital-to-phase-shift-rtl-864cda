# Digital-to-phase-shift gate drive for a phase-shifted full-bridge DC/DC converter

A zero-voltage-switching full-bridge converter is controlled by phase, not by pulse
width. Each of its two legs (Q1/Q3 on the left, Q2/Q4 on the right) is driven with a
fixed-frequency 50 % square wave, and the converter's effective duty ratio is the
phase shift between the two legs: 0° gives zero output, 180° full output. A digital
controller (a DSP or a microcontroller) computes that duty ratio as a number, so
something has to turn the number into four gate signals with the right phase
relation and with a dead time at every transition, so that the two switches of one
leg are never on together.

This repository holds synthesizable SystemVerilog for two such circuits:

* **Circuit 1** (`dps1_epld`) is driven by a DSP. The DSP supplies a reference
  square wave, `DIR_DATA`, and for every half period a 10-bit number. A down
  counter turns the number into a delay, and a flip-flop copies `DIR_DATA` after
  that delay. This gives the right leg's square wave, `CGA`.
* **Circuit 2** (`dps2_logic`) is driven by a low-cost microcontroller with two PWM
  outputs that start each period together. The width of the second PWM output is
  the phase. Two flip-flops turn the pair into two phase-shifted square waves, and
  74164-style shift registers add the dead time.

`dps_top` puts the two circuits side by side. They are alternatives: a board would
use one of them. They share only clock and reset.

## Gate signals and polarity

All gate outputs are of type `dps_pkg::gates_t`, a packed struct `{a, b, c, d}`:

| field | switch | leg   | circuit 1 source     | circuit 2 source |
|-------|--------|-------|----------------------|------------------|
| `a`   | Q1     | left  | complement of DIR_DATA | DQ1            |
| `b`   | Q3     | left  | DIR_DATA             | complement of DQ1 |
| `c`   | Q2     | right | complement of CGA    | DQ2              |
| `d`   | Q4     | right | CGA                  | complement of DQ2 |

Each source passes through a dead-time stage. That stage lets a rising edge through
only after a fixed number of clocks, and lets a falling edge through at once. Both
gates of a leg are therefore off for that many clocks at every transition. Which
switch of a leg takes the inverted signal is this design's choice. Swapping it
mirrors the bridge and changes nothing else.

## Circuit 1: counter-based phase shift

```
 DIR_DATA ──sync──┬──────────────────────────────── ~ ─► dead-time ─► GATE_A (Q1)
                  ├──────────────────────────────────► dead-time ─► GATE_B (Q3)
                  │          ┌──────────────┐  2COUT
                  └────────► │ D  phase FF  │◄────────┐
 /LATCH ─sync─edge─ load ──► │              │         │
 BD[9:0] ──────────────────► 10-bit counter = 8-bit (1COUT) ─► 2-bit
 /ENB (GN) ─sync───────────► counts while low
                             CGA ─┬─────────────── ~ ─► dead-time ─► GATE_C (Q2)
                                  └──────────────────► dead-time ─► GATE_D (Q4)
 PROT ─sync─► clears all four dead-time counters, gates off
```

**The 10-bit counter** (`dps_counter10`) is two instances of a cascadable down
counter (`dps_down_counter`). The 8-bit low stage counts every clock. Its carry
`1COUT` is high for one clock each time it passes zero. The 2-bit high stage counts
only on that carry. The high stage's carry `2COUT` is thus high for exactly one
clock, when the whole 10-bit value is zero. Each carry output is combinational:
`en & cin & (q == 0)`. It falls at the next edge, when the counter wraps.

A load pulse starts the counter. After its single `2COUT` pulse the counter stops
until the next load. While `/ENB` (the counters' gate enable, GN) is high, the
count is frozen, and the delay grows by as many clocks as the pause lasted.

**The phase-shift flip-flop** (in `dps1_phase_shifter`) samples the synchronised
`DIR_DATA` in the cycle where `2COUT` is high. It is an enabled register on the
logic clock, not a flip-flop clocked by the carry.

**Timing.** Suppose the DSP changes `DIR_DATA` and pulls `/LATCH` low with value N
between clock edges k and k+1. Then:

| event | clock edge |
|---|---|
| synchronised DIR_DATA changes; left-leg gate that was on turns off | k+2 |
| counter loaded with N | k+3 |
| other left-leg gate turns on | k+2+DT_COUNT |
| CGA changes; right-leg gate that was on turns off | k+4+N (+ clocks paused by /ENB) |
| other right-leg gate turns on | k+4+N+DT_COUNT |

The phase shift between the legs is therefore N+2 clocks. For full 180° control,
N+2 must be able to reach one half switching period. For example, with a 44 MHz
clock and 20 kHz switching the half period is 1100 clocks, and the 10-bit range
covers 1025 of them. `BD` must be stable from the falling edge of `/LATCH` until
about three clocks later, when the synchronised strobe is seen. `/LATCH` is
edge-detected, so one strobe gives one load however long it lasts. If a strobe
comes only every other half period, the counter does not run in the half period
without one, and CGA does not follow that DIR_DATA edge.

**Dead time** (`dps_deadtime_counter`, one per gate): the counter is cleared while
its input is low and counts up while the input is high, stopping at `DT_COUNT`. The
gate is the input AND "count reached". The default, `DT_COUNT = 6`, is the count at
which the counter's QB and QC outputs are both set. For a dead time of about 1 µs
this puts the counter's clock near 6 MHz. A faster clock needs a larger
`DT_COUNT`, and `CNT_W` must be widened above 15.

**Protection.** `PROT` high turns all four gates off two clocks later and keeps
them off. On release, each gate whose input is high comes back after a full dead
time.

## Circuit 2: PWM-based phase shift

The microcontroller's PWM outputs share one 8-bit counter. PWM1 and PWM2 both rise
when a period starts, and each falls when the counter reaches its own control
value. The reference microcontroller runs at 20 MHz with a 512-clock PWM period
(25.6 µs). Its high time is 2 clocks per count of the control value. PWM1 gets a
fixed value, and PWM2 carries the phase command (1 to 255).

* **DQ1** toggles on every rising edge of PWM1. It is a 50 % square wave at half
  the PWM frequency, so the switching period is two PWM periods (51.2 µs, about
  19.5 kHz).
* **DQ2** takes the value of DQ1 on every falling edge of PWM2. It is the same
  square wave, delayed by the PWM2 high time. That delay is the phase shift: from 2
  to 510 clocks of a 512-clock half period, in 255 steps. A control value of 0
  gives PWM2 no edge, so DQ2 stops.

Both PWM inputs are synchronised (two stages) and edge-detected on the logic clock.
Each path has the same three-clock latency, so the phase is exact.

**Dead time** (`dps_deadtime_shift`): each leg signal is shifted through a 74164
function (`sr74164`, 8 stages, serial input A AND B, B tied high, asynchronous
clear). The gate is the leg signal AND the shift register's third output, QC
(`TAP = 3`). A rising edge thus reaches the gate three clocks late, and a falling
edge turns it off at once. The gate looks only at QC, not at every stage. A high
pulse that follows a low gap shorter than three clocks would therefore pass
undelayed. The 50 % square waves used here never have such gaps.

**GATE_EN and FAULT.** `GATE_EN` is active high. `FAULT` is active low: it is high
in normal operation, and the port is called `fault_n`. Both are synchronised and
combined into one registered enable. When the enable drops, all shift registers
clear and all four outputs turn off three clocks after the input change. When it
returns, the outputs restart with a full dead time.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `dps_top` | `C1_DT_COUNT` | 6 | circuit-1 dead time, clocks |
| `dps_top` | `C2_DT_TAP` | 3 | circuit-2 dead time, shift-register tap (QC) |
| `dps_top` | `SYNC_STAGES` | 2 | synchroniser depth on every control input |
| `dps_counter10` | `LOW_W`, `HIGH_W` | 8, 2 | split of the phase counter |
| `dps_deadtime_counter` | `CNT_W` | 4 | dead-time counter width |
| `sr74164` | `LEN` | 8 | shift-register length |

Shared types and defaults are in `rtl/dps_pkg.sv`.

## What follows the original circuit and what does not

These follow the original circuits:

* The 10-bit counter split into an 8-bit and a 2-bit stage, their carry behaviour,
  and the GN enable.
* The phase flip-flop sampling DIR_DATA on the 2-bit carry.
* The four dead-time counters.
* In circuit 2, the toggle flip-flop on PWM1, the flip-flop on inverted PWM2, four
  74164 shift registers, and the dead time taken at QC.

These are this design's own choices:

* **One clock domain.** The original clocks its flip-flops directly from the
  counter carry and from the PWM pins. Here all inputs are synchronised to one
  clock and the flip-flops use clock enables. This adds the fixed latencies given
  above.
* **Load protocol of circuit 1.** `/LATCH` loads BD on its falling edge, and the
  counter stops after its terminal pulse. The original names the strobe but does
  not define its protocol.
* **The meaning of PROT, GATE_EN and FAULT.** These are input names of the
  original, whose function is not given.
* **DT_COUNT = 6.** This reads "dead time set by QB and QC of the counter" as the
  count where both are set. The original also lets the 8-bit counter's outputs take
  part in setting the dead time. That part is not described, so it is not built.
* **Which switch of a leg gets the inverted signal.**

These are not included. They are the surrounding system, not part of this logic:

* the DSP and the microcontroller;
* their A/D converters;
* the microcontroller's PWM unit;
* the IGBT drivers and the power stage.

The testbenches drive the DSP signals directly. They use a behavioural model of the
PWM unit, `tb/c196_pwm_model.sv`, which is not synthesizable intent.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`, and each has a cycle-count watchdog. The checks
compare against references kept in the testbench and check exact cycle counts: the
counter delay for values across the 8-bit boundary, 0 and 1023; the
dead-time lengths; the DQ2 lag equal to the PWM2 high time; the effect of
PROT/GATE_EN/FAULT; and the absence of shoot-through. `dps1_epld` and `dps2_logic`
also carry concurrent assertions that the two gates of a leg are never on together.

`tb_dps_top` runs both circuits end to end with every parameter at its default. Circuit 1 runs at
a 1100-clock half period. Circuit 2 runs at the 512-clock PWM period. Each
mechanism must happen at least once: zero and full-scale phase, a carry into the
2-bit counter, a GN pause, PROT, GATE_EN, FAULT, and the minimum and maximum PWM2
width.

`tb_dps_workloads` runs the two circuits at their intended operating points in
real time.

* Circuit 1 runs on a 5.88 MHz clock, at which 6 clocks are 1.02 µs. DIR_DATA runs
  at 20 kHz, and the phase is swept from 0 to 140 of the 147 clocks in a half
  period.
* Circuit 2 runs on 20 MHz, with the PWM model at a 25.6 µs period and PWM2 swept
  from 1 to 255.
* The test checks in nanoseconds the switching period, the dead time (1020 ns and
  150 ns) and the phase between the legs.

Every test finishes in well under a second.

Run one test with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/dps_pkg.sv tb/tb_dps_top.sv \
          --top-module tb_dps_top -Mdir obj_top && obj_top/Vtb_dps_top
```

Replace `tb_dps_top` with any other testbench name. Verilator finds the modules by
file name through `-I`. `dps_pkg.sv` must be listed first.

Not verified: any timing at real clock frequencies; behaviour with asynchronous
clocks beyond what the synchronisers guarantee in simulation (the testbenches
drive inputs from the same clock); and any hardware.

## Files

* `rtl/dps_top.sv`: both circuits side by side.
* `rtl/dps1_epld.sv`, `rtl/dps1_phase_shifter.sv`, `rtl/dps_counter10.sv`,
  `rtl/dps_down_counter.sv`, `rtl/dps_deadtime_counter.sv`: circuit 1.
* `rtl/dps2_logic.sv`, `rtl/dps2_phase_ffs.sv`, `rtl/dps_deadtime_shift.sv`,
  `rtl/sr74164.sv`: circuit 2.
* `rtl/sync_ff.sv`: synchroniser. `rtl/dps_pkg.sv`: shared types and defaults.
* `tb/tb_<module>.sv`: one testbench per module. `tb/tb_dps_workloads.sv`: both
  circuits at their operating points. `tb/c196_pwm_model.sv`: model of
  the microcontroller PWM outputs.
