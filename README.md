# Digital LLRF vector-sum controller with a real-time cavity simulator

A pulsed superconducting linac needs the RF field in its cavities held to a
fraction of a percent in amplitude and a fraction of a degree in phase during
each pulse. Several things work against that: the cavities' narrow bandwidth
(a few hundred Hz at 1.3 GHz), beam loading, and Lorentz-force detuning (the
field's radiation pressure deforms the cavity and pulls it off resonance
within each pulse). This design regulates the field with two FPGA designs that
are meant to be used together:

* **Cavity controller.** It samples the 10 MHz IF probe signals of up to eight
  cavities and demodulates them to base-band I/Q. It corrects each channel's
  loop gain and phase, adds the channels into one vector sum, and regulates
  that sum with PI feedback. A feed-forward waveform is added for the error
  that repeats from pulse to pulse. Two DACs (I and Q) carry the resulting
  drive vector to the RF modulator.
* **Cavity simulator.** It stands in for up to eight real cavities in real
  time. It takes the controller's I/Q drive and integrates each cavity's
  base-band equation, with detuning from mechanical modes driven by V². Each
  cavity voltage goes back out as a 10 MHz IF signal, so the controller can be
  tested in closed loop, and operators trained, without RF power.

With the defaults here, the closed loop holds the four-cavity vector sum to
0.021 % in amplitude and 0.11° in phase (peak, in a noise-free simulation)
over a 1 ms flat top with beam. That is against a target of ±0.3 % and ±0.3°.

```
          cavity controller                                   cavity simulator
 ADC x8 ─► demod ─► rotation ─┐                          ┌─► cavity model 1 ─► IF ─► DAC
  (IF)     (I,-Q,-I,Q)  (g,θ) ├─► Σ I ─► LPF ─┐          │    ...  (Eq.1 + Lorentz modes)
                              └─► Σ Q ─► LPF ─┤          ├─► cavity model 8 ─► IF ─► DAC
                                              ▼          │                            │
     set-point tables ─► PI (I), PI (Q) + feed-forward ─► DAC I/Q ─► ADC I/Q ─► DC offset + beam
     global timing (trigger, 1 µs table steps, RF gate)                                  │
     ▲                                                                                   │
     └──────────────── simulator IF outputs return to the controller ADCs ◄──────────────┘
```

All converters run at 40 MHz with 14 bits. The IF is 10 MHz, so there are
four samples per IF period.

## Files

| file | contents |
|---|---|
| `rtl/llrf_pkg.sv` | widths, constants, host write bundle, configuration structs |
| `rtl/stf_llrf_system.sv` | top: controller and simulator side by side; converter links are ports |
| `rtl/cavity_controller.sv` | controller top |
| `rtl/if_phase_counter.sv` | sample index 0..3 inside the IF period |
| `rtl/iq_demodulator.sv` | IF samples to base-band I/Q |
| `rtl/vector_rotation.sv` | loop gain and phase correction per channel |
| `rtl/vector_sum.sv` | sum over channels with enable mask |
| `rtl/lpf_average.sv` | 4-sample moving average of the sum |
| `rtl/global_timing.sv` | trigger comparator, table address, RF gate |
| `rtl/fb_ff.sv` | set-point and feed-forward tables and the two PI channels |
| `rtl/pulse_table.sv` | 2048-entry waveform table |
| `rtl/pi_controller.sv` | one PI channel with feed-forward, clipping and anti-windup |
| `rtl/ctrl_setting_register.sv` | controller register file and table write port |
| `rtl/cavity_simulator.sv` | simulator top |
| `rtl/dc_offset_beam.sv` | drive current = ADC input − offset (+ beam) |
| `rtl/cavity_model.sv` | base-band cavity equation, one cavity |
| `rtl/mech_mode.sv` | one Lorentz-force mechanical mode |
| `rtl/if_modulator.sv` | base-band voltage to IF samples |
| `rtl/record_feed.sv` | 1 µs decimated waveform feed and trigger for the simulator's recorder |
| `rtl/sim_setting_register.sv` | simulator register file |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_simulator_step_response.sv` | 10 ms step response of the simulator with Lorentz detuning |

## IF sampling and demodulation

At 40 MHz each 10 MHz period is sampled four times, 90° apart. For an IF
signal `A cos(ωt + φ)`, with base-band `I = A cos φ` and `Q = A sin φ`, the
four samples are `I, −Q, −I, Q`. `iq_demodulator` needs no multipliers. A
2-bit counter (`if_phase_counter`) says which component the current sample
holds; the block fixes the sign and loads it into the I or Q register. Each
component is refreshed every second sample and held in between. The 14-bit
ADC code becomes a 16-bit word (×4), and negating the most negative code
saturates.

Which counter value meets which IF phase depends on cable lengths and
pipeline delays. A different alignment only rotates the measured vector by a
multiple of 90°, and the loop-phase correction removes that like any other
phase offset. In the closed-loop testbench the direct link between the
boards turns the vector by −90°, and the controller is programmed with a
+90° rotation (`gcos = 0`, `gsin = 1.0`).

## Vector sum

`vector_rotation` applies

    I' = g·cosθ·I − g·sinθ·Q
    Q' = g·sinθ·I + g·cosθ·Q

per channel. `g·cosθ` and `g·sinθ` are signed 18-bit numbers with 16
fraction bits (1.0 = 65536), written by the host. Finding θ for each channel
(typically by measuring the beam-induced transient) is host software and is
not part of the RTL.

`vector_sum` adds the enabled channels at full precision (19 bits for eight
16-bit channels). `lpf_average` then averages four consecutive sums, one IF
period. This removes the ripple left by the two-sample hold in the
demodulators.

## PI feedback, feed-forward and the pulse timeline

**Pulse timeline.** A pulse starts from a sampled trigger input.
`global_timing` compares the sample with the level 32 (`a > b`), delays the
result by one cycle, and starts on its rising edge. From then on the table
read address starts at 0 and steps every 40 cycles (1 µs). The RF gate `enag`
stays high for `pulse_len` steps (reset value 1500, i.e. 1.5 ms). A trigger
that arrives during a pulse is ignored.

**Tables.** Four `pulse_table`s hold one entry per microsecond: the I and Q
set points and the I and Q feed-forward values. A set-point write loads both
set tables at once, with I in `data[15:0]` and Q in `data[31:16]`. Set-point
entries are per-cavity values; `fb_ff` multiplies them by 8 to compare with
the vector sum. So with four cavities in the sum, a per-cavity flat-top
voltage V needs the entry V/2.

**PI law** (`pi_controller`, one each for I and Q):

    e    = setpoint − vector_sum                       (20 bits)
    acc += e           every 40 MHz cycle while feedback is on
    ctrl = Kp·e/2^12 + Ki·acc/2^22  (if fb_en)  + FF  (if ff_en)

* `ctrl` is clipped to 16 bits.
* `acc` is 40 bits and saturates.
* `acc` is frozen while the output is clipped in the direction of the error
  (conditional-integration anti-windup).
* With the gate low, `acc` is cleared and the output is zero.
* Kp and Ki are signed 18 bits. Kp = 4096 is a gain of 1; the 12-bit range
  tops out at a gain of about 32.

Setting `fb_en` and `ff_en` separately gives three modes: feedback plus
feed-forward, feed-forward only, and feedback only. The DAC code is the
upper 14 bits of `ctrl`, or zero while `dac_en` is clear.

**Loop gain.** In the closed-loop setup a control word of X produces a drive
current of about X per cavity. The simulated cavity has unity DC gain, and
the sum over N cavities gives N·X. The proportional loop gain is therefore
about N·Kp/4096. The testbench uses Kp = 100000 (gain 24.4), which gives a
loop gain near 100 for four cavities. The closed-loop bandwidth is then about
100 × 217 Hz, well below the limit set by the loop delay.

### Latency

From an ADC sample to the DAC code it affects there are 6 clock edges
(150 ns): demodulator, rotation, sum, average, PI and output register. Add
the converters' own latency to this.

## The cavity simulator's arithmetic

This is the least obvious part of the design. Every cavity model steps once
per 40 MHz cycle (dt = 25 ns) with forward Euler, in fixed point.

### Electrical part (`cavity_model`)

The base-band cavity voltage obeys

    dVr/dt = −ω½·Vr − Δω·Vi + R_L·ω½·Ir
    dVi/dt =  Δω·Vr − ω½·Vi + R_L·ω½·Ii

The states `vr`, `vi` are 32 bits. Their upper 16 bits are the voltage seen
by the rest of the design. With F = 24:

    vr += (−c_bw·vr − d·vi + c_in·(Ir<<16)) >>> 24
    vi += ( d·vr − c_bw·vi + c_in·(Ii<<16)) >>> 24

| coefficient | meaning | example |
|---|---|---|
| `c_bw` | ω½·dt·2^24 | 217 Hz half bandwidth → 2π·217·25e-9·2^24 = 572 |
| `c_in` | drive coupling in the same scale; steady state on resonance is V = (c_in/c_bw)·I | 572 for unity gain |
| `d0` | static detuning, Δω·dt·2^24; 1 unit = 2.38 rad/s = 0.379 Hz | ±30 units ≈ ±11 Hz |

The total detuning is `d = d0 + Σ dw_m`, summed over the mechanical modes.
The drive current `I` comes from `dc_offset_beam`:
`4·ADC code − offset (+ beam current while beam_on)`.

### Mechanical part (`mech_mode`, `N_MODES` = 2 per cavity)

Each mode obeys

    dΔω_m/dt  = Δω̇_m
    dΔω̇_m/dt = −(2πf_m)²·Δω_m − (2πf_m/Q_m)·Δω̇_m − 2π·K_m·(2πf_m)²·V²

Integrating this at 40 MHz is hard because one step is tiny compared with a
mechanical period: 2πf·dt is about 4·10⁻⁵ for a 250 Hz mode. A plain shift
after every update throws away the small increments. An earlier version of
this block did that and stalled a few percent away from the static
deflection. The states used here are:

* `xf`: the detuning in the `d` units above, with 16 extra fraction bits (48 bits);
* `yw`: the change of `xf` per step, scaled by 2^40 (64 bits).

They are updated as

    xf += round(yw / 2^40)
    yw += −ka·xf − round(kb·yw / 2^40) − kc·vsq

    ka = (2π·f_m·dt)² · 2^40         250 Hz → 1695      450 Hz → 5493
    kb = (2π·f_m/Q_m)·dt · 2^40      250 Hz, Q 50 → 863000   450 Hz, Q 100 → 777000
    kc : Lorentz drive; the static detuning is −kc·vsq/ka in xf units

`vsq` is the squared magnitude of the 16-bit voltage. `yw` accumulates its
update without any shift, so no increment is lost, and the detuning settles
on its static value to within one LSB. `ka`, `kb` and `kc` are 25-bit signed
numbers. `kb` limits how low Q can go: the smallest Q is about
2πf·dt·2^40/2^24. All states saturate instead of wrapping.

### IF output

`if_modulator` sends `I, −Q, −I, Q` of the upper 14 bits of each voltage, in
the order the demodulator expects. All eight models share one drive vector,
because the controller has one I/Q output.

### Recorder feed

The simulator board can keep waveforms in its own memory for the host to
read later. `record_feed` prepares what that recorder stores: ten channels
(I and Q of cavities 0–3, then the drive current I and Q), with one sample
kept every 40 cycles (1 µs), held, and marked by a one-cycle `rec_valid`. The
record trigger is a third simulator ADC input, compared against half scale
(code 4096, `a > b`) and registered. `rec_trig` is set for a word set when the
trigger was above the level at any time in the 40-cycle window that ended
there, so a short trigger pulse is not lost between samples. The memory
controller that writes these words into SDRAM is specific to the board and
is not included.

## Register maps

Both designs take one write per cycle on a `host_wr_t` bundle
(`we`, 8-bit `addr`, 32-bit `data`). There is no read-back.

Controller (`ctrl_setting_register`):

| addr | contents | reset |
|---|---|---|
| 0x00 | bit0 fb_en, bit1 ff_en, bit2 dac_en | 0 |
| 0x01 / 0x02 | Kp / Ki (signed 18 bits) | 0 |
| 0x03 | pulse length in µs steps | 1500 |
| 0x04 | channel mask of the vector sum | 0xFF |
| 0x05 | table address for the next table write | 0 |
| 0x06 | set-point entry (I in [15:0], Q in [31:16]) | – |
| 0x07 / 0x08 | I / Q feed-forward entry | – |
| 0x10+2c / 0x11+2c | g·cosθ / g·sinθ of channel c | 65536 / 0 |

The table address advances after every write to 0x06–0x08, and it is shared
by all tables. Load each table in its own run, starting with a write to 0x05.

Simulator (`sim_setting_register`):

| addr | contents |
|---|---|
| 0x00 / 0x01 | ADC offset I / Q |
| 0x02 / 0x03 | beam current I / Q (added while `beam_on`) |
| 0x04 | cavity enable mask (a disabled cavity holds its state) |
| 0x10+16c+k | cavity c: k = 0 c_bw, 1 c_in, 2 d0, 3/4/5 ka/kb/kc of mode 0, 6/7/8 of mode 1 |

All simulator coefficients reset to zero.

## Verification

Each module has a self-checking testbench in `tb/`. The block tests compare
against values computed independently in the testbench. For the cavity and
mechanical models that is a 128-bit integer model of the same update,
checked bit for bit. They also check physical behaviour:

* the time constant and steady state of a step response;
* the 45° rotation at one half-bandwidth of detuning;
* the static Lorentz deflection, and the overshoot of an under-damped mode.

`tb_cavity_controller` checks the ADC-to-DAC latency (6 edges), the channel
mask, the rotation and the DAC enable.

`tb_stf_llrf_system` is the end-to-end test at all default parameters. It
closes the loop between the two designs, with four cavities at 217 Hz half
bandwidth and two mechanical modes each (250 Hz and 450 Hz). It runs three
1.5 ms pulses with a 500 µs exponential fill, a 12000-per-cavity flat top,
and beam from 600 µs to 1400 µs:

| pulse | mode | flat-top error (peak) |
|---|---|---|
| 1 | feedback + feed-forward | 0.021 %, 0.106° |
| 2 | feed-forward only | 4.6 %, 35.5° (detuning is left uncorrected) |
| 3 | feedback only, step set point, PI output clips during the fill | 0.33 %, 0.11° |

The cavity and mode numbers are typical of 1.3 GHz 9-cell cavities; they are
not measured values. The mechanical modes ring for tens of ms. Real pulses
come 200 ms apart, so between pulses the testbench sets the mode damping to
its maximum for 10 ms instead of simulating the whole gap. The simulation has
no noise and ideal converters. The testbench also counts triggers, table
writes, rotations, clipped outputs, Lorentz detuning, beam cycles, the three
control modes and drive-off after each pulse, and requires each to occur. The pulse trigger also drives the recorder
trigger: exactly three recorded windows must carry it, and the feed must
deliver cavity 0 at its flat-top level.

`tb_simulator_step_response` runs the simulator alone for 10 ms after a
drive step. Two cavities are compared: one with the two Lorentz modes, and the
same cavity without them. The cavity without modes follows
12000·(1 − e^(−t/733 µs)) to within 40 counts. The one with modes is pulled
down to −664 detuning units (−250 Hz), with its detuning ringing at the
250 Hz mode. Its amplitude and phase swing with the ringing: after 10 ms it is
at 11306 and −31°, against 11999 and 0°.

To run a testbench with plain Verilator (5.x):

    verilator --binary --timing --assert -Wno-fatal --top-module tb_stf_llrf_system \
        -y rtl -y tb +libext+.sv -Irtl rtl/llrf_pkg.sv tb/tb_stf_llrf_system.sv -o sim
    ./obj_dir/sim

Every testbench ends with `TB_RESULT checks=N failures=M`. The full-size
closed-loop run takes about 10 s.

## What follows the system description and what is this design's own

These parts follow the system description:

* the two-board closed loop;
* 14-bit converters at 40 MHz and a 10 MHz IF;
* eight channels per board;
* the I, −Q, −I, Q demodulation;
* the rotation formula;
* the vector sum of all cavities, then a low-pass filter;
* PI feedback with a Σ-then-gain integral path;
* set-point and feed-forward tables written through a setting register
  (Address_w, Data_w, Enable_sp, Enable_ffi, Enable_ffq);
* a global timing block giving the table read address and an RF gate from a
  trigger compared against 32;
* an output multiplexer selected by a register;
* the cavity equation and the Lorentz-force mode equation;
* a DC-offset-and-beam stage at the simulator input;
* IF outputs;
* a recorder feed of ten channels, down-sampled by 40, with a trigger
  compared against half scale.

These are this design's own choices:

* all word widths and number formats, and both register maps;
* the 1 µs table step and 2048-entry depth;
* the 4-sample boxcar as the low-pass filter;
* the channel mask;
* the anti-windup rule;
* set-point entries scaled ×8;
* forward Euler at the full clock rate, and the mechanical-state scaling;
* two modes per cavity;
* a simulator IF output that uses the controller's sample order;
* a beam gate taken as an input;
* which ten signals the recorder gets, the trigger level as code 4096,
  and the trigger held over each decimation window;
* a trigger taken from a separate sampled input;
* an output multiplexer that chooses between the drive and zero.

Not included:

* the converter chips;
* the memory controller that stores the recorder feed in board SDRAM
  (the feed itself is built; all base-band voltages and detunings are also
  monitor ports);
* host software, including loop-phase calibration;
* two further controller DAC outputs that appear to mirror timing signals
  (here the RF gate `enag` is a port instead);
* the simulator's test stimulus generator (step and gain at its input).

Timing closure has not been studied. The multiplications in `cavity_model`
and `mech_mode` (up to 25×64 bits) sit in one combinational stage and would
need pipelining, or a slower model update rate, on a real FPGA at 40 MHz.
