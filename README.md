# Ring-oscillator PWM controllers for multiphase buck converters

This repository holds SystemVerilog for two pulse-width modulators for
low-voltage, high-current buck regulators of the kind that power processors.
Both are built around current-controlled ring oscillators.

1. **The four-phase digital voltage-regulator (VR) controller.** This is the
   larger design.
   - A ring-oscillator ADC measures the output voltage error.
   - A PID loop filter turns that error into a duty command. Its integrator
     is chosen by the load current.
   - A hybrid counter/delay-line DPWM with 13-bit effective resolution drives
     four interleaved phases.
   - Each phase has a high-side PWM gate and a synchronous-rectifier (SR)
     gate. The dead times come from a table indexed by the load current.
   - The controller also has a soft start, load-current feedforward, pulse
     skipping at light load, discontinuous conduction (DCM) through SR
     timing, phase reconfiguration, and a MICROWIRE register interface.
2. **The ring-oscillator double-edge modulator.**
   - Two matched ring oscillators are biased by an analog command voltage.
   - Their phase difference is the PWM duty ratio.
   - A four-state phase/frequency comparator per tap pair turns the phase
     difference into sixteen evenly phase-shifted PWM outputs. It also turns
     it into four-level feedback codes for an analog minor loop.
   - Both edges of the pulse respond to the input at once.

The design follows a published university thesis on PWM controller ICs for
buck converters. The sections below say where it departs from that thesis.

All digital logic is synthesizable RTL. The ring oscillators are analog
circuits, so `rtl/ring_osc.sv` is a behavioural model with real-valued bias
currents. The other analog parts are not modelled in `rtl/`:

- the ADC input transconductors;
- the feedforward high-pass filter and its window ADC;
- the four-level buffers and the multi-input RC filter;
- the reference DAC.

Their signals are ports of the top, `vr_pwm_top`. The testbenches model them
where a closed loop is needed.

Because `vr_pwm_top` contains the behavioural rings and has real-valued bias
ports, it is for simulation only and does not synthesize. The synthesizable
cores are `vr_controller` and `ro_pwm_detector`. In silicon, the rings would be
custom cells connected to their tap ports.

## Time base: one ring clocks everything

The controller has no PLL and no fast clock.

- A 32-tap ring oscillator (`ring_osc`, M = 32) runs at 32 × f_sw. Its taps
  X0..X31 are spaced by one DPWM LSB. At 31.25 µA and 1 MHz/µA the tap step
  is exactly 1 ns, so the switching period is 1024 ns (≈1 MHz).
- Tap X0 is the controller clock.
- A 5-bit coarse counter `cnt` on X0 counts the 32 segments of a period.
- `cnt[2:0]` (`phase3`) divides each quarter period into 8 clock slots. One
  quarter period holds one ADC sample and one duty update, so the loop runs
  at 4 × f_sw.

The slots of each quarter period:

| phase3 | action |
|---|---|
| 3 | ADC rings stop; their state is reset (`osc_run` low) |
| 4 | ADC counts read, error `de` registered (`de_valid`), counters cleared |
| 5 | ADC rings restart; PID registers its output `dc` |
| 6 | duty combiner registers `duty`/`skip`; deadtime table read |
| 7 → 0 | a phase whose period starts here latches the command |

The ADC conversion window is 6 of 8 slots (192 ns). Latency from the end of
the window to a new duty command is 3 controller cycles (96 ns).

## Hybrid DPWM edge generation (`dpwm_edge`)

This is the hardest part of the design to follow.

A 10-bit edge time is split into two parts:

- 5 MSBs, matched by the coarse counter;
- 5 LSBs, which pick one of the 32 ring taps through a multiplexer.

The comparator output changes on X0. The selected tap can be anywhere in the
segment. A single flip-flop combining the two would have a setup race. Here
the comparator output is re-timed by three staggered samplers:

- `QA0`, on X0, is high 32–64 LSB after the start of the matching segment;
- `QA16d`, taken on X16 twice, is high 48–80 LSB;
- `QA0d`, one X0 later, is high 64–96 LSB.

The multiplexer selects tap (LSB + 16) mod 32. Its output is clocked by the
sampler whose high window safely covers that tap:

- LSB 0..7 uses QA0;
- LSB 8..23 uses QA16d;
- LSB 24..31 uses QA0d.

Every firing edge therefore has at least 8 LSB (8 ns) of margin on both
sides. The cost is a fixed 48-LSB latency on every edge, which cancels
because all edges share it. So one generator toggles its output once per
1024-LSB frame, at `frame start + 48 + value`.

The value is latched at X8 of the frame start. It must therefore be ≤ 959
(`DPWM_VMAX`). This limits the maximum duty ratio to 959/1024 ≈ 93.7 %, which
is far above the ≈11 % a 12 V → 1.3 V converter needs.

`tb_dpwm_edge` sweeps all 960 values and checks:

- the exact time difference between values;
- the 48 ns latency;
- exactly one toggle per frame.

## PWM, SR and dead times per phase (`dpwm_phase`)

Each phase uses four edge generators.

- PWM rises at 0 and falls at `d`, where `d` is the dithered 10-bit duty.
- SR rises at `d + td_off` (clipped to 959 and to `1024 − td_on`).
- SR falls at `1024 − td_on`, just before the next PWM rise. This edge comes
  from a generator framed half a period later.

Each gate signal is the XOR of two toggles, standing in for a set/reset
latch. Its polarity is re-sampled once per period, at an instant where the
signal must be low: X8 of segment 0 for the PWM, X16 of segment 1 for the
SR. So a wrong polarity after reset or after an offset change lasts at most
one period.

Both dead times are at least 1 LSB.

- A long `td_on` from the table ends the SR pulse early. The inductor
  current then stops at zero through the body diode instead of reversing.
  This is how the converter enters DCM at light load.
- If the SR rise would reach the SR fall, there is no SR pulse.

`skip` and the phase enable gate whole periods.

**Dither (`dpwm_dither`).** The 13-bit command is spread over 8 periods.
The 10-bit value is `duty[12:3]` plus 1 in `duty[2:0]` of every 8 periods.
The order is bit-reversed (0,4,2,6,1,5,3,7). Effective resolution is about
120 ps at 1 MHz.

**Multiphase (`dpwm_multiphase`).** All phases share the ring and the coarse
counter. Phase p counts `cnt − offset[p]`, so the offset delays it by whole
32-LSB segments.

- Defaults are 0/8/16/24, giving four phases 90° apart.
- Writing phase 1's offset to 16 and enabling phases 0 and 1 gives two
  phases 180° apart.
- Each phase latches the duty command at its own period start, so the four
  phases together take four updates per period.

## Error ADC (`ring_adc`)

- Two 8-tap state-reset rings are biased by the reference side and by the
  output side of an analog transconductor.
- Every tap of each ring clocks its own counter, so one conversion counts
  8 × f × 192 ns edges. That is 1.536 counts per MHz of ring frequency.
- The error is `Σcount_A − Σcount_B` minus a stored offset, shifted right by
  `res_shift` and clipped to 8-bit signed.
- Between conversions the rings are held in a fixed state, so every
  conversion starts from the same phase.
- During calibration (`cal`) the controller holds its output. The
  surrounding analog stage shorts both inputs to the reference, and each
  conversion stores the raw difference as the offset. This removes
  ring-mismatch offset.

The ADC step in volts is set by the analog gain. The testbenches use
81.4 MHz/V per ring, which gives 4 mV per code, the value the reference
design uses.

## Loop control

**Soft start (`soft_start_ctrl`).** The states run IDLE → CAL (4 samples) →
RAMP → RUN.

- In RAMP the P and D terms are off and only the integrator acts, with gain
  `kss`.
- The integrator slews by at most ±`ramp_step` per sample. This register
  defaults to 4, about 4 duty LSB per µs at the default gains. It is the
  programmable part of the soft start. The step-limit mechanism is this
  design's choice.
- RAMP ends at the first sample with zero error, so the ramp always stops at
  the reference, whatever its value.
- Clearing the enable bit returns to IDLE.

**PID (`pid_compensator`).**
`D_c[n+1] = K_P·e[n] + K_D·(e[n] − e[n−1]) + K_I·D_i[n]`, with
`D_i[n] = D_i[n−1] + e[n−1]`.

- Gains are unsigned Q8.2. The defaults are the prototype's K_P = 32,
  K_I = 0.25 and K_D = 192.
- `D_c` is in 13-bit DPWM LSBs, clipped to 0..8191.
- This design's own additions:
  - the integrator holds while `D_c` is clipped in the direction the error
    pushes (anti-windup);
  - during RAMP every integrator of the array follows the ramp.

**Load-scheduled integrators (`integrator_array`).** There are eight
integrators, each covering 10 A of the 8-bit load code (0.3125 A per code).
The three MSBs of the code choose the active integrator; the others hold
their values. A load step between DCM and CCM then starts from an integrator
that already holds the right duty, and the integrator does not have to slew.

**Feedforward and pulse skipping (`duty_combiner`).**
`duty = D_c + K_FF·ff_code`.

- `ff_code` is the signed 6-bit code of the high-pass-filtered load current.
- K_FF is Q8.2, default 1.0.
- The result is clipped to the DPWM maximum (7679).
- Below `dmin` the duty is forced to 0 and `skip` suppresses both gates for
  the period. This is variable-frequency pulse skipping.

**Deadtime table (`deadtime_lut`).** A 128-byte dual-port RAM, written over
MICROWIRE and read at every update.

- Entry a = `iout[7:2]`: byte 2a holds `td_on`, byte 2a+1 holds `td_off`,
  both in DPWM LSBs.
- Bytes never written read the register defaults.

## Register interface (`microwire_regs`)

MICROWIRE/SPI slave, oversampled by the controller clock.

- Frame: 24 bits, MSB first, CS low for the whole frame.
  - bit 23 = write;
  - bits 22:16 = address;
  - bits 15:0 = data.
- A read returns the addressed register on SO during bits 15..0. SO changes
  after the falling SK edge; sample it on the rising edge.
- A write is applied when CS rises, and only if exactly 24 bits were
  clocked.
- Keep SK at or below 1/16 of the controller clock.

| addr | register | default |
|---|---|---|
| 0 | {sched_en, ff_en, enable} | 3'b111 |
| 1–5 | kp, ki, kd, kss, kff (Q8.2) | 128, 1, 768, 1, 4 |
| 6 | dmin (13-bit duty LSBs) | 40 |
| 7 | res_shift | 0 |
| 8–11 | phase offsets (segments) | 0, 8, 16, 24 |
| 12 | phase enables | 4'b1111 |
| 13, 14 | default td_on, td_off | 10, 10 |
| 15 | ramp_step (soft-start integrator step) | 4 |
| 16 | deadtime table write: data = {1'b0, byte address[6:0], byte} | – |
| 32–35 | monitors: de, duty, load code, {skip, state} | read only |

## Ring-oscillator double-edge modulator (`pfd_fsm`, `ro_pwm_detector`)

Each comparator (`pfd_fsm`) has four states, S0..S3.

- A rising edge of ring A moves it up; a rising edge of ring B moves it
  down.
- While the phase difference is between 0 and 2π, the comparator alternates
  between S1 and S2.
- PWM is the XNOR of the two state bits. It is high from an A edge to the
  next B edge, so its duty ratio equals phase difference / 2π.
- Two A edges in a row reach S3 (duty held at 100 %). Two B edges in a row
  reach S0 (duty held at 0 %).
- The four-level code (0..3) feeds the analog buffer. It keeps pulling the
  loop back, so the rings stay frequency-locked after saturation.

Inputs are sampled by `pfd_clk` through two flip-flops. This clock must be
well above the ring frequency (200 MHz against 1.14 MHz in the tests). Edges
are delayed by 2–3 `pfd_clk` cycles. The reference design reacts to the
edges directly.

`ro_pwm_detector` uses one comparator per tap pair (16 by default). This
gives sixteen PWM outputs spaced by 1/16 of a period and sixteen feedback
codes for the multi-input filter. It also adds a `sat` flag per channel,
which marks an out-of-lock channel.

## Top level (`vr_pwm_top`)

The two designs sit side by side and share only `rst_n`.

| port | meaning |
|---|---|
| `dpwm_ibias_ua` (real) | DPWM ring bias; 31.25 µA gives 1 ns taps, 1024 ns period |
| `adc_ibias_a_ua`, `adc_ibias_b_ua` (real) | ADC ring biases from the analog input stage |
| `adc_cal` | high while the input stage must short both inputs to the reference |
| `iout_code[7:0]`, `ff_code[5:0]` | load-current code (0.3125 A per code) and feedforward code |
| `mw_cs_n`, `mw_sk`, `mw_si`, `mw_so` | MICROWIRE |
| `pwm[3:0]`, `sr[3:0]` | gate commands |
| `vr_state`, `vr_de`, `vr_duty`, `vr_skip`, `vr_int_sel`, `ctrl_clk` | observation |
| `pfd_clk`, `ro_ibias_a_ua`, `ro_ibias_b_ua` | modulator comparator clock and ring biases |
| `ro_pwm[15:0]`, `ro_level[15:0][1:0]`, `ro_sat[15:0]` | modulator outputs |

The DPWM and modulator rings run freely, so the controller clock runs during
reset. The ADC rings are started and stopped by the ADC.

## Simulation

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing -Irtl -y rtl -y tb rtl/vr_pkg.sv tb/tb_vr_pwm_top.sv \
          --top-module tb_vr_pwm_top -o sim && obj_dir/sim
```

### End-to-end test: `tb_vr_pwm_top`

It runs the top at its default parameters.

**Plant.** A four-phase buck model in real arithmetic:

- 12 V in, 1.3 V reference;
- 300 nH per phase;
- 1000 µF with a 0.6 µs ESR time constant;
- a body diode on each phase.

The testbench also models the ADC front end (with a 1 % ring mismatch), the
load-current and feedforward sensing, and the modulator's minor loop.

**Sequence.**
1. Soft start at 10 A.
2. Deadtime table writes.
3. Load steps 10 → 50 → 10 A.
4. Light load at 0.1 A with a long SR turn-on dead time (DCM).
5. `dmin` raised to 400 (pulse skipping).
6. Two-phase reconfiguration.
7. Controller disabled, `ramp_step` set to 8, then restarted. A second soft
   start follows.

A testbench run takes a few seconds for about 2.5 ms of simulated time.

**Mechanism counters.** Each of these must occur at least once, or the test
counts a failure:

- calibration, ramp and run (twice);
- pulse skip;
- DCM;
- integrator switching;
- feedforward;
- phase reconfiguration;
- MICROWIRE writes;
- modulator lock.

**Results.**

| condition | result |
|---|---|
| 10 A and 50 A | within ±8 mV of 1.3 V |
| 40 A step up | undershoot about 60 mV |
| step down | overshoot about 70 mV |
| two-phase mode | phases 512 ns apart |

### Unit tests

- `tb_ring_osc`: period, tap spacing, duty and state reset of the ring model.
- `tb_ring_adc`: exact counts against the ring frequencies, calibration,
  shift, clipping and rate.
- `tb_dpwm_edge`, `tb_dpwm_phase`, `tb_dpwm_multiphase`, `tb_dpwm_dither`:
  edge times to the nanosecond, dead times, DCM SR width, skip, enables,
  dither average and phase spacing.
- `tb_soft_start_ctrl`, `tb_integrator_array`, `tb_pid_compensator`,
  `tb_duty_combiner`, `tb_deadtime_lut`: each is compared against a
  reference model written in the testbench.
- `tb_microwire_regs`: defaults, read-back of every register, table writes,
  monitors and aborted frames.
- `tb_pfd_fsm`: duty = lag/period, and saturation for a faster A or B.
- `tb_ro_pwm_detector`: closed minor loop; every channel at the commanded
  duty, 1/16-period spacing, and step response.
- `tb_vr_controller`: controller with an averaged plant. Checks the sequence,
  regulation, pulse widths, phase spacing, that PWM and SR are never on
  together, the monitor read and disable.

## Departures from the reference design and limits

- **Sizes this design chose.** The reference design gives no value for
  these:
  - ring-oscillator gain;
  - ADC window, counter widths and 8-tap ADC rings;
  - integrator count (8) and width (16);
  - load-code scaling;
  - Q8.2 gain format;
  - register map and MICROWIRE frame;
  - deadtime table layout;
  - `dmin` default;
  - soft-start step-limit mechanism;
  - calibration length.
- **Edge generator and SR.** The sampler arrangement and its 48-LSB latency,
  the XOR-of-toggles gate, and the 959/1024 duty limit are this design's.
- **Phase-offset sign.** Offsets delay a phase; the reference design adds
  the offset to the counter, which advances it.
- **Synchronous comparator.** The comparator is synchronous to an
  oversampling clock instead of edge-triggered.
- **Not included.**
  - The embedded microcontroller, its memories and I²C/PMBus port are not
    included. The register file and table are written directly over
    MICROWIRE.
  - All analog circuits are outside the RTL. Only the ring oscillators are
    modelled.
