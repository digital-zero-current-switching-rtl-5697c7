# Zero-current-switching lock-in controller for resonant switched-capacitor converters

A resonant switched-capacitor converter moves the most charge per cycle, and
loses the least, when every switch turns off exactly when its tank's current
crosses zero, after half a resonant period, pi * sqrt(L * C). The tanks of a
real converter never match their nominal values or each other, and they drift
with load and temperature. So a fixed switching frequency is always a little
early or a little late for some tank.

This controller measures and tracks that point for each tank. After every
turn-off it reads a window comparator on the tank's switching node, which
tells it whether the current was still flowing forward (early), had already
reversed (late), or was zero (ZCS). It then lengthens or shortens that tank's
on-time by a small step. The loop works like a delay-locked loop. It locks
onto the resonance within a few hundred switching cycles and then keeps
following slow drifts. On-times have 200 ps resolution from a 20 MHz clock.
A counter sets whole clock periods and a buffer delay line adds the rest.

The RTL is set up for a 4:1 switched-tank converter (STC): two resonant tanks,
one flying capacitor and ten power switches Q1..Q10. The design follows a
published controller IC built in a 0.18 um 5 V process. This RTL is an
independent implementation. Where that design gives no details, the choices
are marked below and in each file's header.

## Block structure

```
                 +-------------------------- lockin_controller ---------------------------+
 V_op pin ------>| sd_frontend* -> sd_adc --OP--> governor --run/step/mode--+             |
                 |                                   ^   ^                   v             |
                 |                          locked   |   | est_done      sequencer ------->|--> Q1..Q10
                 |                                   |   |               (counter +        |
                 |                            autotuner  delay_estimator  hr_timer         |
                 |                                ^          ^            delay lines*)    |
                 |                                +-- samp --+                |            |
                 |                                     |                      | off events |
 V_sw1, V_sw2 -->| zcd_sensor* x2 --------------> sampling_block <------------+            |
                 +--------------------------------------------------------------------------+
  * behavioural models (analog parts and delay lines)
```

| module | role |
|---|---|
| `lockin_pkg` | on-time type `ton_t`, ZCD code `zcd_t`, governor states, mixed-radix add/sub |
| `governor` | start-up, delay estimation, lock-in, fine-tuning, periodic re-estimation, turn-off |
| `sequencer` + `hr_timer` + `delay_line` | charge/discharge phases, per-tank gate pulses with 200 ps resolution |
| `sampling_block` | reads each tank's ZCD after its turn-off (two methods) |
| `delay_estimator` | measures the gate-to-switch delay so that a single sample lands in the valid window |
| `autotuner` + `compensator` + `tune_lpf` | per-tank on-time loop, noise filter, lock flag |
| `sd_adc` + `sd_frontend` | single-pin configuration: sigma-delta level converter giving the 10-bit OP word |
| `zcd_sensor` | two-comparator switching-node sensor (behavioural) |
| `lockin_controller` | top: wires the above for the 4:1 STC |

## On-time word: counter clocks plus delay-line elements

Every time value (on-time, sampling position, step) is a `ton_t` made of two
fields:

* `coarse`: 8 bits of whole 50 ns clock periods (up to 12.75 us).
* `fine`: delay-line elements of 200 ps, from 0 to 249. 250 elements fill
  one clock period.

The fine field is therefore mixed-radix, not binary. Use `ton_add`/`ton_sub`
from the package, which carry and borrow at 250, instead of `+`. Two `ton_t`
values compare correctly as plain packed numbers.

A gate pulse is made in two stages (`hr_timer`). The sequencer's counter holds
a coarse pulse high for `coarse` clocks. A delay line delays a copy of it by
`fine` elements. The gate is high while either copy is high, so it rises with
the counter and falls `fine x 200 ps` after the coarse pulse ends. This gives
counter-comparator resolution of 200 ps without a 5 GHz clock. The 200 ps
element and the 20 MHz clock are the built IC's figures. The OR merge of the
two copies is this design's reading of the block diagram.

## A switching cycle

Each cycle has a charge phase and a discharge phase. Both tanks start each
phase together. Each tank's gates then stay on for that tank's own on-time.

```
clk count   0                         ton2   ton1  +1   +dt
tank 1 gate |=================================|           |
tank 2 gate |===========================|                 |
            |<---------- longest tank ---------->|guard|deadtime|-> next phase
```

* **Phase length** is the longest tank's coarse on-time, plus one guard clock
  that covers any fine extension, plus `dt_cycles` of deadtime. The switching
  period therefore follows the slowest tank, and a faster tank idles at zero
  current until the phase ends.
* **Tune registers:** on-times and deadtime are copied into `ton_act` only
  at the start of a cycle. A cycle always runs to completion with one set of
  values.
* **Turn-off:** when `run` drops, the cycle in progress finishes through its
  discharge phase before the gates stay low.
* **Overlap:** an assertion checks that no charge gate is ever on together
  with a discharge gate.

The ten gates are mapped from the two converter states:

| phase | tank 1 | tank 2 |
|---|---|---|
| charge | Q1, Q5 | Q3, Q8, Q9 |
| discharge | Q2, Q6, Q7 | Q4, Q10 |

`q[i-1]` drives Qi. Each tank uses the same on-time in both phases, since both
phases see the same L and C.

## Reading the current polarity

At turn-off, the body diode clamps the switching node of a tank that still
carries current. If the current still flows toward the node (early), the node
goes to V_out + V_F. If the current has already reversed (late), the node goes
to -V_F. At zero current the node stays near V_out. The sensor compares a
divided copy of the node voltage with two references taken from V_out and
produces a thermometer code:

| code | meaning | tuner action |
|---|---|---|
| `2'b11` | early switching | lengthen the on-time |
| `2'b01` | ZCS | keep it |
| `2'b00` | late switching | shorten it |

The clamp appears only after the inherent delay of the drivers and
transistors, and only until the next phase. The sampling block has two ways
to catch it, selected per configuration:

* **Continuous** (`mode = 0`): the sensor is sampled on every clock, from
  the clock after the tank's turn-off command until the end of the deadtime.
  The first reading that is not ZCS is kept. A window with only ZCS readings
  means ZCS. This needs no knowledge of the delay, but its timing is only as
  fine as the clock.
* **Single sample** (`mode = 1`): one strobe is placed `ds` after the gate
  actually falls, with one-element resolution. The gate falls `fine`
  elements after the coarse edge, so the strobe goes to `fine + ds`. Whole
  clocks are counted, and the remainder goes through a delay line whose
  output edge clocks the capture flip-flop. If the position is less than
  one clock, nothing is counted. The one-clock turn-off event pulse is sent
  into the delay line directly, so even inherent delays shorter than a
  clock period are resolved to one element.

Both methods report one reading per tank at the end of the deadtime, as
`samp[]` with a one-clock `samp_valid` pulse.

**Delay estimation** (`delay_estimator`) supplies `ds`. It runs at start-up
and again every N_est cycles. While it runs, the governor forces a short
fixed on-time (0.6 us). That makes every turn-off early, so a valid reading
is always `2'b11`. The strobe position starts at 0 and moves one element
later each cycle. For each tank, the first position that reads `2'b11`, plus
a small margin (default 1 ns), becomes that tank's `ds`. The first two
readings after the start are ignored, and the sweep gives up at 800 ns and
sets `timeout`. A 61 ns delay takes about 310 cycles to measure.

## The tuning loop

Per tank (`autotuner`):

1. **Compensator:** T_x = T_pulse_x + step on early, minus step on late,
   unchanged otherwise. The result is clamped to 0.1 .. 12.5 us.
2. **LPF:** each proposal T_x enters a shift register. T_pulse_x is loaded
   only when the newest `lpf_depth` entries (4 or 8) are all equal. A
   single wrong reading can never move an on-time. A real trend moves it once
   every `lpf_depth` cycles.
3. **Lock flag:** `locked` is high when every tank has had `lpf_depth` ZCS
   readings in a row. Any other reading clears it.

The governor uses a 5 ns step while it is locking in and a 200 ps step once
locked. It falls back to the large step if the lock is lost. From the 1.0 us
start value, a tank with a 1.27 us half period needs about 53 steps of 5 ns.
With an LPF depth of 4 that takes a little over 200 switching cycles, about
0.6 ms at a 2.95 us switching period.

One consequence is worth knowing. The loop stops at the first on-time that
the sensor calls ZCS. That point is at the edge of the sensor's ZCS window,
not at its centre. How close it comes to the true zero crossing depends on
the sensor's window width, which is set by its resistor divider.

## Governor and configuration

| state | what happens |
|---|---|
| `GOV_OFF` | gates low, tuner reset to `INIT_TON` (1.0 us) |
| `GOV_WAIT_CFG` | wait for the first OP conversion (1024 clocks) |
| `GOV_EST` | latch configuration from OP, fixed on-time, delay estimation, tuner on hold |
| `GOV_LOCKIN` | closed loop, 5 ns step |
| `GOV_RUN` | locked, 200 ps step; back to `GOV_LOCKIN` on loss of lock |
| `GOV_STOP` | enable dropped: wait for the sequencer to finish its cycle |

After N_est cycles in `GOV_LOCKIN`/`GOV_RUN`, the governor returns to
`GOV_EST`. It also re-reads OP at that point, so moving the configuration pin
changes the mode at the next re-estimation.

**Single-pin configuration.** The voltage on one pin, V_op, supplies the
first inverter of a first-order sigma-delta loop. That loop is an inverter,
an RC integrator and an inverter used as a comparator, closed through a
flip-flop. The share of ones in the bit stream is V_th / V_op. `sd_adc` counts
the ones over 1024 clocks, giving `OP = 1024 * V_th / V_op`, refreshed every
51.2 us. The behavioural front end is accurate to about 2 %. OP stays
between 512 (V_op = 2 V_th) and 1023 (V_op = V_th). For this reason only four
bits of OP are used, one setting each, so that each setting is a band of 32
codes:

| OP bit | 0 | 1 |
|---|---|---|
| OP[8] | continuous sampling | single sample |
| OP[7] | LPF depth 4 | LPF depth 8 |
| OP[6] | N_est = 256 cycles | N_est = 4096 cycles |
| OP[5] | deadtime 4 clocks (200 ns) | deadtime 2 clocks (100 ns) |

With V_th = 2.5 V, 4.85 V gives OP of about 528 (all four bits 0) and 3.2 V
gives about 790 (single-sample mode). While the pin voltage is moving, one
conversion can hold an intermediate code. If a re-estimation falls in that
conversion, it latches that code until the next re-estimation.

## What is synthesizable

Synthesizable: the governor, autotuner, delay estimator, `sd_adc` and the
clocked parts of the sequencer and sampling block. They use SystemVerilog-2017
with `always_ff`/`always_comb`, one asynchronous active-low reset, and no
latches.

Behavioural models, which need timing simulation:

* `delay_line` models a buffer chain and tap multiplexer as a transport delay
  of `sel x 200 ps`. It is correct for pulses longer than the delay, which is
  always true here, since pulses are at least one 50 ns clock long. On silicon
  it must be built from hand-placed standard-cell buffers. All delay lines
  should sit close together so that their element delays match.
* `zcd_sensor` models the two comparators and dividers, with voltages as
  integer millivolts.
* `sd_frontend` models the front inverter, the RC network (tau = 1 us) and
  the inverter comparator (V_th = 2.5 V), as a forward-Euler model with a
  5 ns step.

Because of these models, the top includes the off-chip sensors and takes
voltages as integer-millivolt ports. A silicon top would instead take the
two ZCD codes and the comparator bit as pins.

## Simulating

All files use `` `timescale 1ns/1ps ``. Testbenches need `--timing`. For
example, to run the end-to-end test:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv -Irtl \
    rtl/lockin_pkg.sv tb/tb_lockin_controller.sv --top-module tb_lockin_controller
./obj_dir/Vtb_lockin_controller
```

Each testbench prints `TB_RESULT checks=N failures=M`, and a watchdog ends it
if it hangs.

| testbench | what it checks |
|---|---|
| `tb_lockin_controller` | Full controller with default parameters, driving two mismatched tank models (1274.2 ns and 1142.7 ns half periods, 61.3 ns inherent delay). Checks OP from the pin voltage, the estimated delay (exact to the element), lock of both tanks, rejection of a single inverted sensor reading, late-switching corrections after a drift, the switch to single-sample mode through the pin, the gate map, gate widths, deadtime, no overlap, and a clean turn-off. About 3 ms of simulated time in under a second. |
| `tb_workloads` | Three controllers side by side: symmetric prototype tanks (70 nH / 2.35 uF), mismatched prototype tanks (70 nH / 2.62 uF and 50 nH / 2.35 uF), and a start from late switching (1.5 us start value). Each must lock inside its tanks' ZCS windows and estimate the inherent delay exactly. The delay is 61.3 ns, or 45.1 ns (less than a clock period) for the mismatched set. |
| `tb_sequencer`, `tb_sampling_block`, `tb_autotuner`, `tb_delay_estimator`, `tb_governor`, `tb_sd_adc`, `tb_sd_frontend`, `tb_zcd_sensor`, `tb_delay_line` | Each block against a reference worked out in the testbench. Includes timing to 0.01 ns where the block makes pulses. |

`tb/stc_tank_model.sv` is the converter model the system tests use. It
measures each charge pulse and compares it with the tank's half period
±12 ns. After the inherent delay, it sets the switching node to
V_out + 0.7 V (early), -0.7 V (late) or V_out (ZCS).

## Departures and open points

* **Per-tank on-time.** Tuning is per tank: two on-times, each shared by that
  tank's switches in both phases. The source design describes its method as
  allowing a setting per switching state, and in some converters per switch.
  For the 4:1 converter, however, the current polarity is read only at the
  end of the charge phase. So here the discharge phase reuses the charge
  on-time, and no per-switch timing is built.
* **Before enable.** In the source design's bench tests, the converter runs
  open loop at an arbitrary frequency before the controller is enabled. Here
  the gates stay low until `enable`. Closed-loop start from an off-tune value
  is covered by `INIT_TON` instead.
* **Reprogrammable sequences.** Start-up and turn-off sequences are described
  as reprogrammable without hardware changes. Here they are fixed state
  machine paths, and only the OP settings and parameters change them.
* **High-resolution variant.** Delay lines are used both for gate generation
  and for the single-sample strobe. This corresponds to the asynchronous
  high-resolution approach. No separate clock-only variant of the timer is
  built.
* **Governor modes not built.** Light-load operation and conversion-ratio
  selection are mentioned as governor decisions but not specified, so they
  are not implemented. Start-up and turn-off are fixed sequences.
* **Design choices where nothing was specified:**
  * the sampling state machine (first non-ZCS reading wins);
  * the lock criterion;
  * the two step sizes;
  * the OP bit layout;
  * N_est values, estimation on-time, margin and sweep limit;
  * the delay-line length (256 taps);
  * all widths;
  * the reset behaviour.
* **Delay-line multiplexer.** The multiplexer's own delay is a parameter
  (`T_MUX_NS`) that defaults to 0. A non-zero value adds the same offset to
  every on-time, and the loop absorbs it.
* **Analog values.** The sigma-delta threshold and RC values and the ZCD
  divider values are assumptions. The divider satisfies the required window
  condition R_C/(R_A+R_B+R_C) < R2/(R1+R2) < (R_B+R_C)/(R_A+R_B+R_C), which the
  model checks at start.
