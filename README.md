# Pulsed digital low-level RF controller (base-band, FPGA)

This is the FPGA part of a low-level RF (LLRF) system that holds the field of an
accelerating cavity at a set amplitude and phase. Its setting is a normal
conducting proton linac cavity at 325 MHz fed with RF pulses (200 µs, up to
4 Hz), with a required field stability of 0.1 % in amplitude and 0.5° in phase.

The system works in base band. An analog RF board mixes the cavity pick-up
signal down with the master oscillator to I and Q, and also measures the
amplitude with a power detector. ADCs digitise these three signals. The FPGA
computes new I/Q drive samples. DACs and an I/Q modulator turn them back into RF
for the klystron. Because every carrier-dependent part is analog, the digital
controller here is the same for every carrier frequency.

The RTL in `rtl/` is that digital controller. The analog parts (demodulator,
power detector, filters, ADCs, DACs, modulator, oscillator) are not RTL. Their
samples are the top module's ports. So are the host (PC) settings, whose link
protocol is not specified.

## Signal flow

```
 adc_i, adc_q ─► cordic_vectoring ─► phase ─►(−)─► pid_controller (PID) ───────────────► phase_drive ─┐
                 (I/Q → phase)                ▲ phase_setpoint                                        │
                                                                                                      ▼
 adc_amp ────────────────────────────────────►(−)─► pid_controller (PI) ─►(+)─►┐            cordic_rotation ─► dac_i, dac_q
                                              ▲                         ▲   on │ mux ─► ≥0 ─► amp_drive ─┘ (amp/phase → I/Q)
 trigger ─► pulse_sequencer ─► set point table ─► × amp_setpoint ──────┘    │   │  off
   ▲                         └► feed-forward table ─► × amp_setpoint ───────┴──►┘
 trigger_generator (internal periodic | external input)
```

The two loops are separate:

* **Phase loop.** A CORDIC turns the measured I/Q vector into a phase. The
  phase setpoint is subtracted, and a PID controller makes the drive phase.
  The D gain is a register and is meant to be left at zero. In practice the
  D term only adds noise.
* **Amplitude loop.** The amplitude comes from the power detector, not from
  the CORDIC. Its target changes during the pulse. A trigger starts the pulse
  sequencer, which steps through the 2048-entry **set point table**. Each entry
  times the amplitude setpoint is the target of a PI controller. A second table
  of the same shape, the **feed-forward table**, also scaled by the amplitude
  setpoint, is added to the PI output. It supplies the drive that beam loading
  will need, so the loop does not have to wait for an error to build up. With
  **amplitude control off**, only the feed-forward value drives the cavity
  (open loop). The drive amplitude is then limited to **≥ 0**.
* **Integrator hold.** Between pulses there is no field, so the measured phase
  is noise. Both integrators freeze while no pulse runs, and the next pulse
  starts from the integral the previous pulse ended with.

A second CORDIC turns the drive amplitude and phase back into I and Q.

## Number formats and loop polarity

| quantity | format |
|---|---|
| I, Q, amplitude samples | 16-bit signed |
| phase | 16-bit unsigned fraction of a turn: 0x4000 = 90°, 0x8000 = 180° |
| table entries | signed Q1.15 fraction of the amplitude setpoint (0x7FFF ≈ 1.0) |
| Kp, Kd | signed Q8.8 |
| Ki | signed, weight 2⁻¹⁶ per clock |

Both controllers compute `e = measured − setpoint`, and for phases the
difference wraps modulo one turn. The controller output is

```
u = (Kp·e) >>> 8 + acc >>> 16 + (Kd·(e − e_prev)) >>> 8        acc += Ki·e   (unless held)
```

The integrator is clamped to the output range, which prevents wind-up, and `u`
saturates at 16 bits. The error has the sign *measured − setpoint*, so a loop
with negative feedback needs **negative gains**. The testbench uses, for
example, `Kp = −128, Ki = −400` for amplitude and `Kp = −64, Ki = −400` for
phase. This is the easiest thing to get wrong when you set up the controller.

The phase PID output is the drive phase itself. It saturates at ±180° and does
not wrap. If the cavity and cables shift the phase by close to 180°, add that
offset to the phase setpoint.

## Pulse timing

* `trigger_generator`: internal mode fires every `trig_period` clocks. The
  first strobe comes one clock after enabling it. External mode fires three
  clocks after a rising edge of `ext_trigger`, using a two-flop synchroniser
  plus an edge detector.
* `pulse_sequencer`: one clock after the trigger, `pulse_active` rises and the
  table address starts at 0. Each address is held for `step_cycles` clocks, and
  the pulse lasts `pulse_len · step_cycles` clocks. Triggers during a pulse are
  ignored. With one entry per microsecond, the 2048 entries give pulses up to
  about 2 ms. The clock frequency is not fixed by the design; at 100 MHz use
  `step_cycles = 100`.
* Outside a pulse, both tables read as 0. The target amplitude and the
  feed-forward drive are therefore 0 between pulses.
* Latencies, one sample per clock everywhere:

| path | clocks |
|---|---|
| table address → PI setpoint | 3 |
| `adc_amp` → `dac_i/q` | 19 (PI 1, output stage 1, CORDIC 17) |
| `adc_i/q` → `dac_i/q` | 35 (CORDIC 17, PID 1, CORDIC 17) |

The amplitude and phase paths are not delay-matched. Inside a closed loop this
only adds loop delay.

## Modules

| file | role |
|---|---|
| `llrf_pkg.sv` | sample types, host settings struct `llrf_cfg_t`, saturation helper |
| `cordic_atan_pkg.sv` | CORDIC angle table `round(atan(2^-k)/2π · 2^20)` and 1/gain |
| `cordic_vectoring.sv` | I/Q → phase (and magnitude), 16 pipelined stages, < 3 LSB phase error |
| `cordic_rotation.sv` | amplitude/phase → I/Q, gain-compensated, 16 pipelined stages |
| `pid_controller.sv` | subtractor + PID/PI with hold, wrap or saturate error |
| `pulse_table.sv` | 2048 × 16 memory, host write port, registered read |
| `pulse_sequencer.sv` | table address counter started by the trigger |
| `trigger_generator.sv` | internal periodic or external trigger |
| `setpoint_scaler.sv` | table value × amplitude setpoint (Q1.15), saturated |
| `amp_output_stage.sv` | PI + feed-forward, on/off selector, ≥ 0 limit |
| `llrf_top.sv` | the controller |

The host writes the tables through `tbl_we / tbl_sel / tbl_addr / tbl_wdata`.
`tbl_sel = 0` selects the set point table and `tbl_sel = 1` the feed-forward
table. All other settings are fields of the `cfg` port.

## What follows the source design and what is chosen here

These parts follow the design as it was published:

* the base-band split into an analog RF board and a frequency-independent
  digital controller;
* the separate phase PID and amplitude PI controllers, with D at zero gain;
* CORDIC for the phase and the power detector for the amplitude;
* a 2048-entry set point table for pulses up to 2 ms;
* the amplitude setpoint scaling both the set point table and the
  feed-forward table;
* the feed-forward adder, the amplitude-control on/off switch and the ≥ 0
  limit;
* an internal periodic trigger or an external trigger;
* the phase integrator held between pulses.

These are choices made here:

* all word widths and number formats;
* one sample per clock;
* the pipelined CORDIC, including the amplitude/phase → I/Q conversion, whose
  method the source does not give;
* gain scaling and anti-wind-up;
* holding the *amplitude* integrator as well between pulses;
* the feed-forward table having the same depth as the set point table;
* programmable clocks per entry and pulse length;
* the external trigger synchroniser;
* the host port, because the PC link is not described;
* no delay matching between the two paths.

The design does not include the earlier cw algorithms (generator-driven
resonator and self-excited loop), multi-pulse operation with different shapes,
or ramped operation.

## Simulation

Every testbench in `tb/` checks itself. Each ends by printing
`TB_RESULT checks=N failures=M`, and each has a watchdog. To run one with
Verilator 5:

```
verilator --binary --timing --assert --top-module llrf_top_tb -y rtl -y tb \
    rtl/llrf_pkg.sv rtl/cordic_atan_pkg.sv tb/llrf_top_tb.sv -o sim
./obj_dir/sim
```

* `llrf_top_tb` runs the whole controller at its default sizes against
  `cavity_model`. The model is behavioural: a first-order low-pass cavity with
  gain 0.8 and a 30° phase shift, which also plays the front end and the ADCs.
  The test runs four pulses of 2048 entries × 4 clocks:
  * two pulses on the internal trigger;
  * one pulse with amplitude control off, where the drive must equal the
    feed-forward value;
  * one pulse on the external trigger, with a two-step set point.

  At the end of each closed-loop pulse it requires the amplitude within 10⁻³
  of the target and the phase within 0.5° (measured with `atan2` in the
  testbench). It gets about 6·10⁻⁵ and under 0.01°. It also checks the trigger
  period, the pulse length, the frozen integrators between pulses and the
  non-negative drive. It counts every mechanism (both trigger sources, hold,
  control off, ≥ 0 limit active, feed-forward added, pulse end) and fails if
  any never happened. It runs in a few seconds.
* `llrf_beam_pulse_tb` runs the intended operating case at default sizes.
  It assumes a 100 MHz clock with one table entry per µs. It runs 200 µs
  pulses with the trigger period set for 4 Hz. A 36 µs beam takes about 30 %
  of the field. The cavity model has a 1 µs time constant, about a loaded Q of
  1000 at 325 MHz. Results:
  * with a feed-forward step timed to the beam, the amplitude stays within
    1.3·10⁻⁴ through the beam window;
  * with a flat feed-forward table, the slow PI loop lets the field drop by
    about 19 %;
  * in both cases the loop settles to 10⁻³ / 0.5° in about 43 µs.

  The test requires the compensated pulse to stay in tolerance from 60 µs to
  the end.
* Each block has its own testbench `tb/<module>_tb.sv`. Each compares the
  block's outputs with values computed independently in the testbench:
  * the CORDICs against floating-point `atan2`, `sqrt`, `cos` and `sin`, with
    an exact latency check;
  * the PID against a clock-by-clock model;
  * the table against a shadow copy;
  * the sequencer and trigger against their exact timing.

## Limits

* Tuning: the loop gains and the cavity model in the testbench are
  illustrative. Real gains depend on the cavity (loaded Q), the filter delays
  and the clock rate.
* Noise: the controller has no filtering of its own beyond what the analog
  front end provides.
* Testing: closed-loop behaviour has been verified only against the simple
  behavioural cavity.
