# Digital LLRF loop for a 2856 MHz electron linac control unit

A low-level RF (LLRF) system holds the accelerating field of each klystron
station at a set amplitude and phase. In this design each station's RF
front end mixes the 2856 MHz cavity pickup down to an intermediate frequency
(IF) of 23.8 MHz. It also supplies a 95.2 MHz clock, exactly four times the
IF. An FPGA on the digitiser board samples the pickup IF and measures its
amplitude and phase. It compares them with set points in two PI controllers,
adds a feed-forward waveform and synthesises the drive IF for a DAC. The
front end mixes that drive up to 2856 MHz for the klystron. A host reads and
writes everything through registers behind a PCI bridge.

This repository holds synthesizable SystemVerilog for that FPGA: one control
unit. A linac with six klystrons uses six of them. It also holds a small fast
RF interlock. The analog parts, the PCI bridge chip and the host software are
not included (see *What is outside this RTL*).

The block structure and rates follow the LLRF prototype built for the NSC
KIPT neutron source linac (IPAC 2015, paper MOPTY012). That description gives
the blocks and what they do but not their insides. Word widths, the register
map, the control law and the timing here are this implementation's own
(listed under *Design choices made here*). The prototype reported detection
only; the drive path was future work there.

```
            +-----------+  I,Q  +--------+ amp  +------------+ drive amp  +-----+
 adc_data ->| iq_demod  |------>| cordic |----->| pi_ff_ctrl |----------->|     |
 (14 bit)   | (IF=fs/4) |       | _vec   |      |  amplitude |            | dds |--> dac_data
            +-----------+       |        | pha  +------------+ drive pha  |     |    (14 bit)
                                |        |----->| pi_ff_ctrl |----------->|     |
                                +--------+      |  phase     |            +-----+
                                     |          +------------+               ^ tuning word
                                     v               ^  ^ tables, gains      |
                              +--------------+       |  |                    |
                              | wave_capture |   +---------------------------+--+
                              +--------------+-->|  pci_ctrl  (BAR0 registers)  |<--> local bus
                                                 +------------------------------+     (PCI bridge)
 trig (pulse start) ---> table index, integrators, capture
 il_* ---> rf_interlock ---> il_rf_permit, il_trip_loss, il_trip_rev
```

## Sampling at four times the IF

Every signal-processing choice here follows from one fact: the sample clock
is exactly four times the IF. A pickup `A*cos(wt + phi)` sampled at
`fs = 4*f_IF` gives the repeating sequence

| sample n mod 4 | value           |
|----------------|-----------------|
| 0              | `+A cos(phi)`   |
| 1              | `-A sin(phi)`   |
| 2              | `-A cos(phi)`   |
| 3              | `+A sin(phi)`   |

So `iq_demod` needs no multipliers and no local oscillator. After every
group of four samples it outputs `I = x0 - x2 = 2A cos(phi)` and
`Q = x3 - x1 = 2A sin(phi)`. The subtraction also cancels any DC offset of
the ADC. The result is one I/Q pair every fourth clock, 23.8 M pairs per
second. The whole control path runs at that rate.

The phase is measured against the demodulator's own sample counter, and the
counter starts at reset. The DDS phase accumulator starts at the same reset
edge with a tuning word of `2^30` (also fs/4). The DDS output is therefore
`cos(pi/2*(n-2) + drive_phase)`, so transmit and receive share one phase
reference inside the FPGA. Relative to the RF reference, the measured phase
still contains a constant set by cables, mixers and the pipeline. The
controller sees that constant as part of the plant. It plays no role in
closed loop, and in open loop the host calibrates it away.

Units used throughout:

* **Phase** is an unsigned 16-bit fraction of a turn (65536 = 360 degrees,
  1 LSB = 0.0055 degrees).
* **Measured amplitude** is `|I + jQ|`, which is twice the IF amplitude in
  ADC counts. A full-scale 14-bit sine reads about 16383.
* **Drive amplitude** is a 16-bit word. 65535 gives a full-scale DAC sine
  (±8191). When the DAC output is looped straight back into the ADC, the
  measured amplitude is about drive/4.

## Amplitude and phase: the CORDIC

`cordic_vec` is a 16-stage vectoring CORDIC with one stage per clock. It
first folds the vector into the right half plane, rotating by 180 degrees
when I < 0. Each stage then rotates it by ±atan(2^-k) to drive Q to zero,
and sums the rotation angles in a 32-bit accumulator. At the end, the x
component is multiplied by round(2^16/1.64676) = 39797 to remove the CORDIC
gain. Four fraction guard bits keep the rounding error below one output LSB.
Measured errors are within 2 counts of amplitude and 3 LSB of phase (about
0.016 degrees) for vectors of useful size. For very small vectors, where
phase has little meaning, the error is larger.

## The two PI / feed-forward channels

`pi_ff_ctrl` is written once and instantiated twice. For each measurement it
computes

```
e      = set point - measurement              (phase: wrapped to +/- half a turn)
integ  = integ + Ki*e                         (held at +/- 2^38)
u      = FF[k]*ff_en + ((Kp*e + integ) >>> 8)*fb_en
```

`k` counts measurements since the last trigger and stops at the last table
entry. The feed-forward table therefore plays a drive waveform across the RF
pulse. That waveform can be the flat-top drive, or a shaped one that cancels
the beam-loading droop. Kp and Ki are signed 16-bit values with 8 fraction
bits, so 256 means a gain of 1.

* **Amplitude channel.** `u` is clamped to 0..65535 and `sat` is raised while
  it is clamped. The integrator stops growing in the direction of the clamp
  (anti-windup).
* **Phase channel.** `u` is taken modulo one turn, so the drive phase can
  wrap freely through 0/360 degrees.
* **Trigger.** `trig`, or the soft trigger in CTRL, clears the integrators
  and restarts the table. The integrators are also held at zero while
  feedback is off.

Loop stability is set by the gains and the loop delay. From a pickup sample
to the drive change it causes takes about 27 clocks: demodulator 1 to 4,
CORDIC 18, controller 2, DDS 2. Add the external RF path and there are
roughly 8 controller updates of dead time. With that delay an integral-only
loop with per-update gain g is stable up to g of about 0.18 and settles
without overshoot below about 0.04. The
end-to-end test uses Ki = 32 on amplitude and Ki = 8 on phase. With the
looped-back plant (amplitude gain 1/4, phase gain 1), both give g = 1/32.

The drive phase resolution is one step of the 4096-entry cosine table in the
DDS: 360/4096 = 0.088 degrees. In closed loop the integrator dithers between
neighbouring steps, and the mean phase lands on the set point (within a
fraction of an LSB in simulation). Raise `LUT_AW` in `dds` for a finer step.

## Drive synthesis (DDS)

`dds` adds the drive phase, shifted to the top of a 32-bit word, to the
accumulator. The top 12 bits address a cosine ROM holding
`round(32767*cos(2*pi*n/4096))`, and the value is multiplied by the drive
amplitude. The product is shifted right by 18 bits, which maps amplitude
65535 to ±8191. The ROM is filled from `$cos` at elaboration, so no data
file is needed. Amplitude and phase changes both reach `dac_data` two
clocks later.

## Host access: BAR0 register map

The PCI bridge chip presents BAR0 to the host. On its local side `pci_ctrl`
sees one-clock read and write strobes with a 12-bit word address and 32-bit
data. Read data returns with `lb_rvalid` two clocks after `lb_rd`. The bus is
taken to run on the processing clock.

| word address  | name      | access | contents                                                                 |
|---------------|-----------|--------|--------------------------------------------------------------------------|
| 0x000         | ID        | R      | 0x4C4C5246 ("LLRF")                                                       |
| 0x001         | CTRL      | R/W    | bit0 amp feedback, bit1 phase feedback, bit2 amp FF, bit3 phase FF; writing bit4 gives a soft trigger (reads 0) |
| 0x002         | AMP_SP    | R/W    | amplitude set point [15:0]                                               |
| 0x003         | PHA_SP    | R/W    | phase set point [15:0]                                                   |
| 0x004..0x007  | KP_AMP, KI_AMP, KP_PHA, KI_PHA | R/W | signed gains [15:0], 8 fraction bits                   |
| 0x008         | DDS_FTW   | R/W    | tuning word, reset value 0x40000000 (fs/4)                                |
| 0x010         | IQ        | R      | {Q, I}, sign-extended to 16 bits each                                    |
| 0x011         | AMPPHA    | R      | {phase, amplitude} of the pickup, latest value                           |
| 0x012         | DRIVE     | R      | {drive phase, drive amplitude}                                           |
| 0x013         | STATUS    | R      | bit0 waveform captured, bit1 amplitude clamped, bit2 reserved (0)       |
| 0x400..0x7FF  | FF_AMP    | W      | amplitude feed-forward table, entry = address - 0x400                    |
| 0x800..0xBFF  | FF_PHA    | W      | phase feed-forward table                                                 |
| 0xC00..0xFFF  | WAVE      | R      | captured {phase, amplitude}, one per measurement after the trigger       |

All settings reset to 0, except the tuning word. At reset both loops and
both tables are off and the DAC outputs zero. `wave_capture` records 1024
measurements after each trigger (43 µs) and then stops. STATUS bit 0 tells
the host when the buffer can be read.

## Fast RF interlock

`rf_interlock` gives the two protections required of the LLRF system:

* **Loss of power.** The forward power stays below `fwd_min` for 4
  consecutive samples while the RF window `rf_on` is open.
* **Reverse power over limit.** A single sample of reverse power is above
  `rev_max`.

Either trip latches, with its cause, and drops `rf_permit` one clock after
the offending sample. Only `clear` releases it. The interlock belongs to the
system rather than to the control loop. In the top it has its own `il_*`
ports: what supplies the power samples and what the permit switches off
depend on the installation.

## Latency and rates (95.2 MHz clock)

| path                                   | clocks |
|----------------------------------------|--------|
| 4th sample of a group -> I/Q            | 1      |
| I/Q -> amplitude/phase (CORDIC)         | 18     |
| measurement -> controller output        | 2      |
| drive amplitude/phase -> `dac_data`     | 2      |
| measurement rate                        | 1 per 4 clocks (23.8 MS/s) |
| local-bus read                          | 2      |

## What is outside this RTL

The following parts of the full LLRF system have no RTL here:

* the 2856 MHz master oscillator and reference distribution;
* the RF front end (frequency generator, down- and up-converters);
* the ADC and DAC chips;
* the PCI bridge chip and its 64-bit / 66 MHz PCI side with DMA;
* the separate 4-channel digitiser board that monitors forward and reverse
  power;
* the embedded x86 controller with its EPICS IOC and PCI driver.

The top's `adc_data`, `dac_data` and local-bus ports are where the converters
and the bridge connect.

## Design choices made here

The processing chain and its rates are fixed: demodulator, CORDIC, two
separate PI channels with a feed-forward table, DDS, PCI register access and
an IF at one quarter of the 95.2 MHz clock. The following were chosen for
this implementation, and a user may want to revisit them:

* **Word sizes and rates.** All internal word widths, 16 CORDIC stages, and
  1024-entry feed-forward tables and waveform buffer.
* **Demodulator.** Non-overlapping four-sample I/Q groups, which give one
  measurement per IF period. A sliding window could give one per sample.
* **Trigger.** A trigger input (`trig`) marks the RF pulse start.
* **Control law.** The gain format, amplitude clamp with anti-windup, and
  integrator reset at each trigger.
* **Local bus.** The register map and protocol. The whole design uses one
  clock, bus included. If the bridge's local bus runs on its own clock, put
  a clock-domain crossing in front of `pci_ctrl`.
* **Unused converters.** Only one ADC and one DAC are used. The board's
  second ADC and DAC are left free.
* **Interlock.** Its thresholds come in as ports and the loss-of-power count
  is 4.

## Files

| file                       | contents |
|----------------------------|----------|
| `rtl/llrf_pkg.sv`          | widths, register map, `settings_t`/`readback_t` structs |
| `rtl/iq_demod.sv`          | fs/4 I/Q demodulator |
| `rtl/cordic_vec.sv`        | pipelined vectoring CORDIC |
| `rtl/pi_ff_ctrl.sv`        | PI + feed-forward channel (amplitude or phase mode) |
| `rtl/dds.sv`               | phase accumulator, cosine ROM, amplitude scaling |
| `rtl/pci_ctrl.sv`          | BAR0 register map on the local bus |
| `rtl/wave_capture.sv`      | pulse waveform buffer |
| `rtl/rf_interlock.sv`      | fast interlock |
| `rtl/llrf_fpga_top.sv`     | top level of one control unit |
| `tb/tb_<block>.sv`         | self-checking testbench per block |
| `tb/tb_llrf_fpga_top.sv`   | end-to-end test at full size with DAC-to-ADC loopback |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself. To
build and run one with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_llrf_fpga_top \
    -y rtl -y tb +libext+.sv -Irtl rtl/llrf_pkg.sv tb/tb_llrf_fpga_top.sv
./obj_dir/Vtb_llrf_fpga_top
```

Replace the name to run another testbench. The end-to-end bench runs the
top at its default sizes in well under a second. It loops `dac_data` back
into `adc_data` through a 5-clock delay with ±3 counts of uniform noise, and
runs five phases:

1. **Open loop, feed-forward only.** The drive steps half-way through the
   table. The measured amplitude and phase must follow it, both live and in
   the captured waveform.
2. **Closed loop on both channels.** The phase output must wrap through zero
   to reach the set point. Amplitude and phase must settle on their set
   points.
3. **Unreachable amplitude set point.** The drive must clamp and the status
   flag must show it.
4. **Detection resolution.** With a large open-loop drive, the rms spread of
   960 captured samples is about 0.011 degrees and 0.02 %. The check
   requires less than 0.03 degrees rms and 0.1 % rms.
5. **Interlock.** Both trip kinds must occur, and clear must restore the
   permit.

The bench counts each of these events and fails if any never happens. The
block testbenches compare against independent reference calculations: real
arithmetic for the demodulator, CORDIC and DDS, and an integer model of the
control law for `pi_ff_ctrl`. They also check each block's latency.

The detection-resolution figure depends on the noise assumed at the ADC. The
noise level in the bench is illustrative, not a measurement of any front
end.
