# Digital BPM processor firmware: stripline and cavity position in the FPGA

A beam position monitor (BPM) on a free-electron-laser linac produces, for
every electron bunch, a short burst of RF on each of its pickups. This RTL is
the FPGA firmware of a four-channel digital BPM processor that turns those
bursts into a beam position per bunch entirely in logic, so that the
embedded host only configures it and reads results. One firmware serves two
kinds of BPM:

* **stripline BPMs** – position from the difference over the sum of the
  signal amplitudes of opposite electrodes;
* **cavity BPMs** – position from the ratio of a position-cavity amplitude to
  a reference-cavity amplitude, with the side of the beam taken from their
  phase difference.

The structure (trigger sources, a two-stage capture FIFO that centres the
bunch in a 512-sample window, a store for 1024 successive triggered
waveforms, and the two processing chains) follows the published
description of the DCLS/SXFEL digital BPM processor after its firmware
upgrade. Everything that description leaves open – widths, fixed-point
formats, FFT size and architecture, handshakes, the host bus and register
map – is this implementation's own choice and is listed below.

## Signal flow for one bunch

```
 ADC ch0..3 (4 x 16 bit, one set per clock)
   |                         \
   |                          self_trigger --\
   v                          period_trigger -+-> trigger_mux --> trig
 pretrigger_fifo  (4 x 256, constant 256-sample delay)  ext_trig --/   |
   |                                                                    v
 capture_gate (ON/OFF: 512 samples after an accepted trigger) <---------+
   |
 window_buffer (4 x 512: one window, trigger near the centre)
   |  drained once, one sample per clock, when the selected chain is ready
   +--> capture_ram   (1024 successive windows, host readable)
   +--> stripline_dsp (4 x channel_amplitude, 2 x stripline_position)
   +--> cavity_dsp    (3 x cavity_channel = FFT/CORDIC/max search,
   |                   2 x cavity_position)
   +--> host port: the held window, read sample by sample
 result: pos_valid + pos_x/pos_y (+ phase differences) stream out and are
         latched in control_regs, together with amplitudes and phases
```

Everything runs in one clock domain, the ADC sample clock (117.28 MHz from
the on-board oscillator in the reference hardware; up to 125 MHz for the
ADCs). `adc_valid` qualifies each sample set.

## Triggering and the centred capture window

Three trigger sources exist, and `CTRL[1:0]` picks one (0 external,
1 self, 2 period, 3 none):

* **external** – `ext_trig` is asynchronous; it is synchronised with two
  flip-flops and each rising edge gives one pulse;
* **self** – fires on the first sample set in which any channel's |x|
  exceeds `THRESHOLD`; it re-arms only after 64 consecutive quiet sample
  sets, so a ringing burst yields one trigger;
* **period** – a counter pulses every `PERIOD` clocks, for tests without
  beam.

The trigger should sit in the middle of the captured data, so that both the
baseline before the bunch and the whole burst are seen. The first FIFO
stage is therefore not an ordinary FIFO: once it has seen 256 samples it
stays at that fill level, writing one sample and reading the oldest each
clock, so its output is the ADC stream delayed by exactly 256 samples. When
a trigger opens the ON/OFF gate, the gate copies the next 512 delayed
samples into the second stage. The window thus holds about 256 samples from
before the trigger and 256 from after it. With the pipeline latencies of
this design, the sample that fired the self-trigger lands at window index
**254**.

A trigger is accepted only when the first stage is primed, the gate is OFF
and the second stage is free; any other trigger is dropped and counted
(`TRIGS[31:16]`, accepted in `TRIGS[15:0]`). The second stage is free again
once its window has been drained to the processing chains, unless the host
has set `CTRL[3]` (hold): then the window stays frozen for host readout and
new triggers are dropped until the bit is cleared. This is how the host
gets single triggered waveforms at its own, lower rate.

The capture RAM records, after an arm pulse (`CTRL[4]`), every drained
window into the next of 1024 slots and stops when all are filled
(`STATUS[2]`), keeping 1024 successive triggered waveforms (32 Mbit) for the
host. In the reference hardware this lives in the board's external memory;
here it is an on-chip array with one synchronous read port.

## Stripline BPM chain

For each electrode the amplitude is

    V = floor( sqrt( sum_{i=s..e} x_i^2 ) )

over the window indices `s..e` (`INDEX` register), so the baseline outside
the burst can be excluded. The squares are accumulated exactly in 42 bits
while the window streams past; a digit-by-digit square root (21 cycles)
follows. Then

    x = k_x * (V_A - V_C) / (V_A + V_C),   y = k_y * (V_B - V_D) / (V_B + V_D)

with ch0..ch3 = A, B, C, D. The ratio is formed by a restoring divider with
16 fractional bits (truncated), multiplied by the 32-bit factor k and
shifted back; the sign of the difference is applied last. `k` is a
geometry factor set by the pickup diameter; the position comes out in the
unit of k per unit ratio (e.g. k in nm gives x in nm). A stripline result
appears about 65 clocks after the last window sample.

## Cavity BPM chain

This is the more involved part. Channel use: ch0 = X position cavity,
ch1 = Y position cavity, ch2 = reference cavity (ch3 unused). Each of the
three signals goes through the same column:

1. **FFT** (`fft_r2`): a 512-point radix-2 decimation-in-time FFT, in place,
   one butterfly per clock. Samples are written at bit-reversed addresses as
   they arrive; then 9 stages x 256 butterflies = 2304 clocks; then bins
   0..255 stream out. Nothing is scaled: 16-bit samples grow to at most 26
   bits in the 28-bit data path. Twiddles are 16-bit values with 14
   fraction bits, built at elaboration from `$cos`/`$sin`.
2. **CORDIC** (`cordic_vec`): an 18-stage pipelined vectoring CORDIC turns
   each bin into magnitude (gain-compensated) and phase. The phase is a
   16-bit binary angle: 65536 counts per turn, read as signed, so
   -32768 = -pi. Four guard bits keep weak bins accurate.
3. **Max search**: the bin with the largest magnitude inside
   `[lo_bin, hi_bin]` (`BINS` register, default 1..255, which excludes DC)
   gives the cavity amplitude v and phase theta.

The three columns run in lockstep. Then, per plane,

    |x| = k * v_x / v_r
    d   = theta_x - theta_r + theta_rot      (wraps modulo 2 pi)
    x   = +|x| if |d| < theta_thr, else -|x|

The position cavity's dipole signal flips phase by pi when the beam
crosses the cavity axis, so after removing the fixed cable and electronics
phase (`ROT` register, one value per plane), d sits near 0 on one side and
near pi on the other; the threshold (`PH_THR`, default pi/2) separates the
two. Which side counts as positive is this design's convention; swap it by
adding pi to the rotation. k, the rotation and the threshold are
calibration constants found with beam. The rotated difference itself is
also streamed (`ph_diff_x/y`) and readable (`CAV_DIFF`), which is what one
needs to set the rotation. `x` saturates at +/-(2^31 - 1).

A cavity result appears 2304 + 256 + 21 + 48 clocks after the last window
sample. While the FFTs are busy the window buffer waits before draining the
next window.

## Host register map

A simple synchronous bus (`host_wr`, `host_rd`, 8-bit word address, 32-bit
data; read data one clock after `host_rd`, with `host_rvalid`). In the
reference hardware the host is an ARM board reached over PCIe; the PCIe
endpoint is not part of this RTL.

| addr | name | contents |
|---|---|---|
| 0x00 | CTRL | [1:0] trigger mode, [2] BPM type (0 stripline, 1 cavity), [3] hold window, [4] arm capture RAM (write 1, self-clearing) |
| 0x01 | THRESHOLD | [15:0] self-trigger threshold (reset 1000) |
| 0x02 | PERIOD | period trigger, clocks (reset 1,172,800 = 100 Hz) |
| 0x03 | INDEX | [8:0] s, [24:16] e (reset 0, 511) |
| 0x04/05 | K_X / K_Y | position factors |
| 0x06 | BINS | [8:0] lo bin, [24:16] hi bin (reset 1, 255) |
| 0x07 | ROT | [15:0] rotation x, [31:16] rotation y (binary angle) |
| 0x08 | PH_THR | [15:0] phase threshold (reset 16384 = pi/2) |
| 0x09 | WIN_ADDR | read address in the held window |
| 0x0A | RAM_ADDR | capture RAM read address {slot[9:0], sample[8:0]} |
| 0x10 | STATUS | [0] window held, [1] RAM recording, [2] RAM full, [3] gate ON |
| 0x11 | TRIGS | [15:0] accepted, [31:16] dropped triggers |
| 0x12 | RESULTS | results produced |
| 0x13/14 | POS_X / POS_Y | latest position |
| 0x15-0x18 | AMP | stripline V_A..V_D |
| 0x19-0x1B | CAV_AMP | cavity v_x, v_y, v_r |
| 0x1C/1D | CAV_PH | theta_x, theta_y / theta_r |
| 0x1E | CAV_DIFF | rotated differences x, y |
| 0x20/21 | WIN_LO/HI | held-window sample {ch1,ch0} / {ch3,ch2} |
| 0x22/23 | RAM_LO/HI | capture-RAM sample, same packing |
| 0x24 | RAM_CNT | windows stored |

Write the read address first; the data registers show that sample from the
next clock on.

## Timing and throughput

| step | clocks |
|---|---|
| trigger to gate ON (self / period) | 2; external: about 4 after the edge |
| capture | 512 |
| drain to DSP and RAM | 512 |
| stripline processing after the last sample | ~65 |
| cavity processing after the last sample | ~2630 |

The window buffer is free again as soon as it has been drained, so the next
capture overlaps the processing. A stripline BPM can therefore take a trigger
about every 1,030 clocks. A cavity BPM is limited by the FFT: about 3,080
clocks from one drain to the next. At 117.28 MHz that is roughly 114 kHz and
38 kHz respectively. The bunch rates the processor was built for
(10 Hz, 50 Hz, and the 120 Hz it reached) leave the logic idle almost all
of the time; the earlier 10 Hz limit of the reference system came from doing
this arithmetic in host software. A future 1 MHz bunch rate would not fit:
117 clocks per bunch is less than one 512-sample capture.

`tb_bpm_rates` runs these rates at full size: three stripline bunches
977,333 clocks apart (120 Hz), two 2,345,600 clocks apart (50 Hz) and three
cavity bunches at 120 Hz, each giving exactly one correct result with no
dropped trigger; then 200 triggers 117 clocks apart (1 MHz), of which about
one in nine is processed and the rest are counted as dropped, i.e. about
115 kHz sustained. It simulates about 12 M clocks in roughly 15 s.

## Departures from the reference system and what is not here

* The capture RAM is an on-chip array, not the board's SRAM/DDR2 with
  their controllers.
* The host side is a plain register bus; the PCIe endpoint, ARM driver,
  EPICS IOC and operator panels are software or vendor IP.
* The SPI interface that the control logic drives in the reference
  system is not included: its target and protocol are not described.
* The RF front end, ADCs, clock selection, CPLD and board peripherals are
  hardware outside the FPGA; the top brings out the ADC samples, the clock
  and the external trigger as ports.
* Both processing chains are always present; the BPM type bit only chooses
  which one receives windows and reports.
* Own choices with no counterpart in the source: the FFT length (the whole
  512-sample window), radix-2 architecture and fixed-point formats; the
  CORDIC precision; the bin-search range; the "below threshold = positive"
  sign rule; separate k and rotation per plane; the y plane from B/D; the
  self-trigger holdoff; drop counting; the hold and arm protocols; the
  register map and reset values.
* Timing closure at 117-125 MHz has not been checked. The FFT reads and
  writes two operands per clock from one array, and the butterfly is not
  pipelined. On an FPGA this wants a dual-port RAM arrangement and a few
  pipeline registers.

## Files

`rtl/` – one module per file; `bpm_pkg.sv` holds the shared types,
constants, the configuration/status structs and the register map.
Top: `bpm_processor`. Each file opens with a description of its function,
interface and latency.

`tb/` – one self-checking testbench per module (`tb_<module>.sv`). Each
prints `TB_RESULT checks=N failures=M` and ends with a watchdog.
`tb_bpm_processor` runs the whole processor at its default sizes through
self, external and period triggering, hold and drop, filling all 1024
capture-RAM slots, a BPM-type switch and both cavity signs. It counts each
of these and fails if one never happened. Reference values are computed
independently in the testbenches: exact integer sums and roots for the
stripline path, direct DFTs and analytic tone amplitudes and phases for the
cavity path.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb rtl/bpm_pkg.sv \
          tb/tb_bpm_processor.sv --top tb_bpm_processor
./obj_dir/Vtb_bpm_processor
```

Replace the testbench name to run any other. The full-size end-to-end test
takes a few seconds (about 1.7 M clocks). For lint: `verilator --lint-only
-Wall -y rtl rtl/bpm_pkg.sv rtl/bpm_processor.sv`. The remaining warnings
are unused package constants and deliberately open output pins.

Sizes are parameters (`bpm_pkg` constants and module parameters):
`PRE_DEPTH` 256, `WIN_LEN` 512, `NUM_TRIG` 1024, FFT `N` = window length.
The 16-bit ADC width and 4 channels are fixed by the sample-word packing.
