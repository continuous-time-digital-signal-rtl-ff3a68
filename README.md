# Dual-mode buck controller with continuous-time DSP transient control

A digital controller for a small, fast buck converter (5 V in, 2 V out,
400 kHz, about 2.5 W). A sampled linear compensator cannot react faster than
its sampling and processing delays allow. This controller avoids that by
running two control laws:

* **Steady state.** A slow incremental PID compensator, updated once per
  switching period, sets the duty cycle of a counter-based DPWM. This path is
  cheap and changes state rarely.
* **Transients.** When the output error leaves a ±3 LSB band, a
  *continuous-time DSP* path takes over the power switch. It senses the
  output with unclocked comparators, finds the valley (or peak) of the output
  voltage, and then gives exactly **one on-off (or off-on) action** of the
  switch. The action is timed by capacitor charge balance, so that the
  inductor current and the output voltage both arrive at their new steady
  state together. Control then returns to the PID.

No inductor current sensor is needed. The charge-balance timing uses only the
voltage deviation at the extreme and a few constants of the power stage
(L·C, Vg, Vout), which are supplied as configuration inputs.

The block structure, the ±3 LSB mode band, the incremental PID law, the
charge-balance equations, the square-root look-up table, the mid-time rule
for the extreme, and the hand-back with the PID reset follow the published
design this RTL implements. The clock rate, the word widths, the quantiser
step, the PID coefficients, the handshakes and several details listed under
[Departures and own choices](#departures-and-own-choices) belong to this
implementation.

## Operating point

| quantity | value | origin |
|---|---|---|
| input / output voltage | 5 V / 2 V | published design |
| switching frequency | 400 kHz | published design |
| L / C | 10 µH / 20 µF | published design |
| load steps evaluated | 0.2 A ↔ 1.2 A | published design |
| PID active band | \|e\| ≤ 3 LSB | published design |
| controller clock | 200 MHz (5 ns) | this implementation |
| DPWM period | 500 clocks, 9-bit duty, 10 mV of output per count | this implementation |
| ADC step (LSB) | 10 mV, 62 comparators, e in −31 … +31 (±310 mV) | this implementation |
| error sign | e = Vref − vout, in LSB; positive when the output is low | this implementation |

## How a load transient is handled

This section follows a light-to-heavy step, where the output dips. The
heavy-to-light step is the mirror image.

**1. Detection.** The comparator outputs are synchronised and encoded into
e(t) every clock. `mode_select` watches e(t) on every clock, not once per
period. The first cycle that |e| > 3, it pulses `trigger` and enters CT-DSP
mode. The on/off controller reads the sign of e. If the output is low, it
turns the switch **on**; if high, **off**. It also arms the min/max detector.

**2. Finding the extreme (`minmax_detect`).** The switch stays in that state
while the inductor current slews towards the new load current. The output
keeps falling until the two currents are equal: that is the valley. The
detector tracks the deepest error level reached. Each time a new level is
reached, it restarts a counter (time *t1* of entering that level). The
valley is declared at *t2*, when both of these hold:

* the error has left that level again;
* the error is smaller than it was one delay cell earlier, e(t) < e(t−T).

The second condition is a slope reversal of the waveform that the delay line
reconstructs. The valley instant is taken as the **middle** of the dwell at
the deepest level. The detector therefore reports `dv` (the depth in LSB) and
`lag = (t2 − t1)/2`: how long ago the valley was.

**3. Charge balance (`charge_balance`).** At the valley the capacitor has lost
Q = C·ΔV. From there the inductor current rises linearly for t_on, with slope
(Vg−Vout)/L, and then falls for t_off, with slope Vout/L, back to the load
current. The triangle above the load current must return Q. Equal peak
current on both sides gives

    t_on / t_off = Vout / (Vg − Vout)
    t_on = sqrt( 2·L·C·ΔV·Vout / (Vg·(Vg − Vout)) )

With ΔV = n LSB this is t_on = K_on·√n. The unit reads √n from a
look-up table (`round(256·√n)`, n = 0…31, computed at elaboration) and
multiplies it by the run-time constant `k_on`. It then multiplies t_on by
`r_off` = (Vg−Vout)/Vout to get t_off. For the operating point above:

    K_on = sqrt(2 · 10µH · 20µF · 10mV · 2V / (5V · 3V)) = 0.730 µs = 146 clocks
    r_off = 3/2 = 384 in Q4.8
    ΔV = 100 mV (n = 10): t_on = 462 clocks (2.31 µs), t_off = 693 clocks (3.46 µs)

**4. The single switching action (`onoff_controller`).** t_on is counted
from the valley, not from the moment the valley was recognised. The
controller therefore starts its counter at `lag`, plus the pipeline cycles,
and keeps the switch on until t_on has elapsed. It then turns the switch off
for t_off. For an overshoot the order is off for t_off, then on for t_on. If
the extreme was recognised later than t_on after it occurred, the first
interval ends at once.

**5. Hand-back.** At the end of t_off the controller pulses `done`.
`mode_select` returns to PID mode and pulses `pid_init`, which has two
effects:

* The PID states reset: e[n−1] = e[n−2] = 0 and d = `d_init`, the ratio
  Vout/Vg.
* The DPWM re-enters its period.

At this instant the inductor current equals the load current. A PWM period
that starts with its full on-time would add half a ripple to the average
current and ring the LC filter; in simulation that caused repeated
re-triggering. So the DPWM enters **half-way into the interval the switch
is already in**. After an off interval it enters at count duty/2, so half an
on-time remains. After an on interval it enters half-way into the off-time.
The ripple then stays centred on the load current.

**Choosing `d_init`.** The published design resets the duty to Vout/Vg.
Dead time, where the body diode conducts, and resistive drops make the
effective ratio a few counts higher. If `d_init` is too far from the true
steady-state duty, the output drifts back out of the ±3 LSB band before the
slow PID corrects it, and a second action follows. The end-to-end testbench
therefore loads 206 counts (ideal: 200) for its modelled stage. Treat
`d_init` as a calibrated value, for example from the power-stage
identification.

## Steady-state loop

`pid_comp` evaluates

    d[n] = d[n−1] + A·e[n] + B·e[n−1] + C·e[n−2]

on the DPWM's `sample` strobe, which comes at count 498 of 500 so that the new
duty is latched at the next period start. It updates only in PID mode and
only while |e| ≤ 3. d keeps 8 fraction bits and saturates to 0…499 counts.

The published design gives no coefficient values. The defaults are A = 3200,
B = −4800 and C = 1800, in 1/256 count per LSB. That is Kp ≈ 3.1, Ki ≈ 0.78
and Kd ≈ 7.0 counts per LSB. They were chosen by closed-loop simulation
against the power stage above: stable at both loads, settling inside the
band, and a single on/off action per step for losses between 30 and
100 mΩ.

`dpwm` is a trailing-edge counter modulator: the output is high for counts
0…duty−1. `gate_mux` selects the DPWM or the on/off controller's command,
registered to avoid glitches. `dead_time` makes the complementary gates of
the high-side and synchronous switches, with both off for 4 clocks (20 ns)
after every edge.

## Front end: comparators and delay line

The published design quantises the output with an asynchronous flash ADC: a
comparator array around Vref, with no sampling clock. `flash_adc` is a
**behavioural model** of that analog part. It has a real-valued `vsense`
input and a digital `vref_code` (Vref[n] in LSB), and 62 comparators at
Vref + (k − 30.5)·10 mV, k = 0…61.

The span of ±310 mV is a choice. The charge-balance
equations assume a deviation below 10 % of the output (200 mV). A
conventional PID, used as the reference below, deviates by about that much. A
PID whose error clips at a narrower span loses its derivative damping once
the output leaves the span; with ±150 mV the reference loop went into a
growing oscillation.

In the published design the delay cells are emulated in FPGA logic, and
`ct_delay_line` does the same:

* a two-flop synchroniser;
* a bubble-tolerant ones count, giving e = 31 − ones;
* a 64-deep shift register of e(t) with a run-time tap, giving e(t−T) for
  T = `tap_t`+1 clocks.

The published design delays each comparator bit. For a thermometer code,
delaying the encoded value is equivalent.

## Module map

| file | role |
|---|---|
| `rtl/ctdsp_pkg.sv` | constants, `err_t`, `tcyc_t`, `pol_e`, integer square-root function |
| `rtl/ctdsp_smps_ctrl.sv` | **top**: ADC model + `ctdsp_core` |
| `rtl/ctdsp_core.sv` | synthesizable controller, all digital blocks wired together |
| `rtl/flash_adc.sv` | comparator array (behavioural, real input) |
| `rtl/ct_delay_line.sv` | synchroniser, encoder, programmable delay cell |
| `rtl/mode_select.sv` | PID / CT-DSP mode, trigger and hand-back pulses |
| `rtl/minmax_detect.sv` | valley / peak detection, depth and lag |
| `rtl/charge_balance.sv` | √ table, t_on and t_off (2-cycle pipeline) |
| `rtl/onoff_controller.sv` | single on-off / off-on action sequencer |
| `rtl/pid_comp.sv` | incremental PID |
| `rtl/dpwm.sv` | 400 kHz DPWM, sampling strobe, ripple-centred restart |
| `rtl/gate_mux.sv` | c(t) selection |
| `rtl/dead_time.sv` | complementary gates with dead time |
| `tb/buck_model.sv` | behavioural synchronous buck stage for the closed-loop tests |
| `tb/tb_ctdsp_smps_ctrl.sv` | end-to-end test at default parameters |
| `tb/tb_pid_reference.sv` | dual-mode controller against the PID-only reference |

## Top-level interface (`ctdsp_smps_ctrl`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | 200 MHz clock, asynchronous active-low reset |
| `vsense` | in | real | sensed output voltage (sensor gain 1) |
| `vref_code` | in | 10 | Vref in 10 mV steps (200 = 2.00 V) |
| `k_on` | in | 12 | clocks per √LSB, 146 for the operating point |
| `r_off` | in | 12 | (Vg−Vout)/Vout in Q4.8, 384 for 5 V → 2 V |
| `d_init` | in | 9 | hand-back duty in DPWM counts (ideal 200) |
| `tap_t` | in | 6 | delay cell T − 1 in clocks |
| `gate_hs`, `gate_ls` | out | 1 | high-side / low-side switch gates |
| `mode_ctdsp` | out | 1 | 1 while the on/off controller drives the switch |
| `err` | out | 6 | e(t), signed, LSB |

Parameters: `DL_DEPTH` (64) is the depth of the delay line. `CTDSP_EN` (1)
selects the dual-mode controller; 0 builds the PID-only reference. `PID_A`,
`PID_B` and `PID_C` (3200, −4800, 1800) are the PID coefficients.

Latency: a comparator change reaches e(t) three clocks later. The on/off
command reaches the gates about three clocks after that, plus the dead time.
Times t_on and t_off are 12-bit clock counts (at most 20 µs).

## Simulating

Each block has a self-checking testbench, `tb/tb_<module>.sv`. Each one ends
by printing `TB_RESULT checks=N failures=M`. For example, with Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb rtl/ctdsp_pkg.sv \
        tb/tb_ctdsp_smps_ctrl.sv --top-module tb_ctdsp_smps_ctrl -Mdir obj -o sim
    obj/sim

`tb_ctdsp_smps_ctrl` runs the whole controller at its default parameters in
closed loop with `buck_model` (50 mΩ loss, diode conduction in dead time)
for 900 µs, which takes about one second. The load steps 0.2 A → 1.2 A → 0.2 A.
The testbench checks steady-state regulation, a single action per step,
recovery time, peak deviation and no shoot-through, and that each mechanism
occurred. Typical results:

| event | peak deviation | load step to hand-back |
|---|---|---|
| 0.2 → 1.2 A | −127 mV | 10.6 µs |
| 1.2 → 0.2 A | +143 mV | 11.8 µs |

The published measurements report about 100 mV and recovery within about
three switching periods (under 10 µs) for the step-up. The modelled stage
here is idealised differently, and the ±30 mV band is crossed before any
reaction is possible, so the simulated dip is deeper and the hand-back
comes about 1 µs later. Beyond ±31 LSB, `dv` saturates at 31 and t_on is
underestimated.

`tb_pid_reference` runs the same load steps on two copies of the
controller, each with its own identical power stage and load. One copy is
the dual-mode controller at its defaults. The other is built with
`CTDSP_EN = 0`, which makes it a conventional PID controller: the on/off
path is never entered, and the PID acts on every error. It gets its own coefficients (A = 4000, B = −7200,
C = 3300), because it must also handle large errors. The testbench checks
that the dual-mode controller beats it in both peak deviation and recovery
time:

| event | PID only: peak deviation | PID only: settling into ±3 LSB |
|---|---|---|
| 0.2 → 1.2 A | 253 mV | 48 µs |
| 1.2 → 0.2 A | 219 mV | 54 µs |

These are close to the published PID-only results of about 200 mV and
60 µs.

Several blocks also carry immediate assertions. They are checked on every
clock edge outside reset, and Verilator evaluates them with `--assert`:

* the two gates are never on together;
* `trigger` and `pid_init` never coincide;
* the on/off controller arms the detector and starts the calculation
  only while it is active, and reports `done` only after releasing the
  switch.

## Departures and own choices

* Clock, widths, ADC step and range, delay-line depth, dead time, and the
  PID coefficients: not given by the published design; chosen here.
* The `CTDSP_EN` switch exists only to build the conventional-PID
  reference that the dual-mode scheme is measured against. The published
  controller is always dual-mode.
* The extreme detector's slope test is e(t) < e(t−T) after leaving the
  deepest level. A one-cycle glitch of one LSB at the deepest level can
  end the search early; there is no further filtering.
* The DPWM's ripple-centred restart at hand-back is an addition. The
  published design only says that the PID corrects the small remaining
  error.
* A phase-1 time-out (4095 clocks) ends an action whose extreme is never
  found.
* The detector's dwell counter saturates at 4095 clocks. A longer dwell at
  the extreme level reports `lag` = 2048.
* The mux select is the on/off controller's `active` flag, and the mux
  output is registered.
* Not included: the power stage itself, the output voltage sensor (taken as
  gain 1), and the limit-cycle identification that supplies L·C and Vg. The
  latter appears here only as the `k_on`, `r_off` and `d_init` inputs.
