# DDPM DAC: a digital-to-analog converter made of a counter, a priority multiplexer and an RC filter

A pulse-width-modulated bit stream is the cheapest DAC there is: a counter, a
comparator, one output pin and a low-pass filter. At high resolution it is
unusable on chip, because an N-bit PWM period puts its largest ripple at
f_clk/2^N, and a filter that removes it to 16-bit accuracy needs a corner
frequency far below a hertz.

Dyadic digital pulse modulation (DDPM) keeps the hardware just as small but
rearranges the ones of each 2^N-slot frame. Bit i of the code owns 2^i slots
spaced 2^(N-i) apart: the MSB toggles on every other slot, the next bit on
every fourth, and so on down to the LSB, which owns one slot per frame. The
frame still holds exactly `code` ones, so its mean is code/2^N, but the large
bits now produce energy near f_clk/2 and f_clk/4 instead of at f_clk/2^N. The
ripple that is left at the frame rate comes only from the low bits and is
small. A first-order RC filter with its corner at about f_clk/2^N/√3
suppresses every tone below half an LSB. For a 16-bit DAC at 100 MHz that
corner is about 880 Hz (180 kΩ, 1 nF). A PWM stream with the same accuracy
would need a corner near 0.04 Hz.

This repository holds the synthesizable SystemVerilog of such a DAC. Its
default size is 16 bits. Besides the modulator it contains a digital slope
correction for edge-asymmetry errors and a ramp-and-trigger pattern for
measuring the static characteristic.

## The dyadic slot pattern

Number the slots of a frame c = 0 … 2^N−1. Slot 0 is always 0. For c > 0, let
k be the index of the lowest set bit of c. The slot carries code bit N−1−k.
Equivalently, bit i of the code is sent in the slots

    c = 2^(N-i) * h + 2^(N-i-1),   h = 0 … 2^i − 1

These sets do not overlap, and together with slot 0 they cover the frame. For
N = 4 and code 10 (binary 1010):

| slot          | 0 | 1 | 2 | 3 | 4 | 5 | 6 | 7 | 8 | 9 | 10 | 11 | 12 | 13 | 14 | 15 |
|---------------|---|---|---|---|---|---|---|---|---|---|----|----|----|----|----|----|
| bit sent      | – | 3 | 2 | 3 | 1 | 3 | 2 | 3 | 0 | 3 | 2  | 3  | 1  | 3  | 2  | 3  |
| output        | 0 | 1 | 0 | 1 | 1 | 1 | 0 | 1 | 0 | 1 | 0  | 1  | 1  | 1  | 0  | 1  |

The frame holds ten ones, so its mean is 10/16.

Two properties matter for linearity:

* **Below mid-scale** (MSB = 0), every MSB slot is 0. Each one-pulse therefore
  stands alone, as in a return-to-zero stream, and the frame has exactly
  h = n separate pulses.
* **At mid-scale and above** (MSB = 1), the MSB slots are 1. Each further
  one fills a gap and joins two pulses, so h = 2^N − n.

## Priority-multiplexer modulator (`ddpm_modulator`)

"Lowest set bit of the slot number selects the code bit" is exactly what a
priority multiplexer does when a binary counter drives its select lines. The
modulator has four parts:

* `ddpm_counter`: a free-running N-bit counter at f_clk. Its value is the slot
  number. `frame_last` is high in slot 2^N−1.
* `ddpm_data_register`: holds the code. It loads once per frame, on the edge
  that ends slot 2^N−1, so a code always governs a whole frame. The sample
  rate is f_clk/2^N, which is 1526 S/s at 16 bits and 100 MHz.
* `priority_mux`: computes

      x = OR_i ( d[N-1-i] & s[i] & ~s[i-1] & … & ~s[0] )

  This is two-level logic with N product terms. With all select bits at zero
  (slot 0) the output is 0.
* An output flip-flop. It retimes the mux output so that the pin is glitch-free.
  The only logic between two registers is the mux.

Timing, with the counter holding c in cycle t:

```
cycle            T (cnt=2^N-1)   T+1 (cnt=0)     T+2 (cnt=1)    ...
sample_tick            1              0               0
code_q              old code       new code        new code
ddpm_out         slot 2^N-2 old   slot 2^N-1 old   slot 0 new     slot 1 new ...
frame_start            0              0               1
```

`dac_in` is taken at the end of cycle T. `ddpm_out` shows slot c one clock
after the counter holds c. `frame_start` marks slot 0 on `ddpm_out`. After
reset, the first frame converts code 0.

## Shift-register modulator (`piso_ddpm_modulator`)

This is the other way to build the same stream. A 2^N-bit parallel-in,
serial-out register is loaded once per frame from wires laid out in the
slot pattern, then shifted out one bit per clock. There is no gate at all
between the data register and the pin. The cost is 2^N flip-flops, so it is
reasonable only for a few bits. Its default is N = 4. It has its own `load`
input: the data register captures `din` on that edge, and the shift register
takes the pattern one clock later. `frame_start` marks slot 0. `load` must
come every 2^N clocks. In the top it runs beside the main modulator, timed by
its own 4-bit counter.

## Slope errors and their correction (`slope_calibration`)

A real output pin does not draw rectangles. Rising and falling edges differ,
so each separate pulse carries a small extra area. Write that area as a
fraction a of one full clock slot. The mean output is then
(ones + a·h)/2^N. Because h = n below mid-scale and h = 2^N − n above, the
characteristic is

    V(n) = n/2^N · (1 + a)          for n <  2^(N-1)
    V(n) = n/2^N · (1 − a) + a      for n >= 2^(N-1)

Each half is a straight line, but the two slopes differ (double-slope error).
Supply drops that follow the DDPM pattern add further breaks at multiples of
2^N/2^p (multiple-slope error). In an FPGA prototype the uncorrected
characteristic reached about 110 LSB of INL. Two segments brought it to
about 15 LSB, and 16 segments to under 2 LSB.

Both errors are removed by mapping the wanted value n to the code n′ that
produces it:

    n' = round( (n − OFS_j) · GAIN_j ),   clipped to [0, 2^N − 1]

`slope_calibration` holds a table of `SEGS` entries (default 16). Each entry
is {threshold, offset, gain}. The segment j used for n is the highest entry
whose threshold is ≤ n, so thresholds must rise with the index. A threshold of
2^N disables an entry. The number formats are:

* threshold: N+1 bits;
* offset: signed, 8 fraction bits;
* gain: unsigned, 16 fraction bits, range [0, 4).

Rounding goes to the nearest value, with ties rounded up. The result is
registered, so the stage adds one clock of latency. With `enable` low the
stage only delays its input. After reset the table is the identity. Entries
are written one per clock through `cal_we`/`cal_addr`.

Table settings:

* **Double slope** (two entries). Entry 0: threshold 0, offset 0,
  gain 1/(1+a). Entry 1: threshold 2^(N−1)·(1+a), offset 2^N·a,
  gain 1/(1−a). Disable the rest. This offset is the one that makes the
  corrected output equal n/2^N and continuous at the threshold. An offset of
  2^(N−1)·a leaves a step of a/2, which is 6.4 LSB in the 8-bit test below.
* **Multiple slope** (2^p entries). Thresholds i·2^N/2^p. The offset and gain
  of each entry come from a linear fit of the measured characteristic over
  that segment.

The coefficients come from a measurement of the analog output. The hardware
only applies them.

## Measurement ramp (`ramp_trigger_gen`)

To measure the static characteristic, the code is stepped 0, 1, …, 2^N−1
(then wraps to 0). Each code is held `HOLD` clocks: 2·10^8 by default, which
is 2 s at 100 MHz, or 36 hours for a 16-bit sweep. One `trigger` pulse is
sent per code for an external meter. The pulse is `TRIG_WIDTH` clocks long
(100 by default) and starts `TRIG_DELAY` clocks after the code changes (by
default half the hold time). By then the modulator has taken the new code
(at most 2^N clocks) and the RC filter has settled, which takes milliseconds.
`step` is high in the cycle before the code increments. With `enable` low the
ramp holds its state.

## Top level (`ddpm_dac_top`)

```
dac_in ──┐
         ├─ src_sel ─► slope_calibration ─► ddpm_modulator ─► ddpm_out ─► pad buffer ─► R ─┬─► V_out
ramp ────┘            (1 clock, cal_en)     (frame = 2^N clk)                              C
(ramp_trigger_gen ─► trigger)                                                             ─┴─
piso_din ─► piso_ddpm_modulator ─► piso_out      (own 2^PISO_N-clock frame)
```

| parameter    | default     | meaning                                   |
|--------------|-------------|-------------------------------------------|
| `N`          | 16          | code width; frame = 2^N clocks            |
| `SEGS`       | 16          | correction table entries                  |
| `RAMP_HOLD`  | 200 000 000 | clocks per ramp code (2 s at 100 MHz)     |
| `TRIG_DELAY` | 100 000 000 | code change to trigger, clocks            |
| `TRIG_WIDTH` | 100         | trigger pulse length, clocks              |
| `PISO_N`     | 4           | width of the shift-register modulator     |

Shared constants and the `code_src_e` source-select type are in
`rtl/ddpm_pkg.sv`. All registers reset synchronously while `rst_n` is low. A
code on `dac_in` reaches the modulator one clock later and takes effect at
the next frame boundary.

The pad buffer and the RC filter are analog and not part of the RTL.
`ddpm_out` is where they connect. The corner frequency should be at most
about f_clk/2^N/√3. For a time-varying input, where the zero-order-hold
images at the sample rate must also be removed, the corner must be lower
still.

## How far it can be trusted

All of the following is verified in simulation:

* The stream equals the slot pattern, slot for slot.
* Every frame holds exactly `code` ones, and frames are 2^N clocks long.
* The correction agrees with a floating-point model for all 2^16 codes.
* The pulse-count property (h = n, then 2^N − n) holds for every 8-bit code.
* With a modelled pulse-area error, the corrected characteristic is within
  0.5 LSB.

Not verified: anything analog, timing closure at 100 MHz or above, and the
correction against real measured coefficients. The modulator alone
synthesizes to 34 flip-flops and a few dozen gates at 16 bits.

Choices made in this design rather than taken from the original
description:

* one clock with load enables, instead of a separate frame-rate data clock;
* the load position at the last slot;
* the output-register latency and the `frame_start` and `sample_tick` flags;
* the correction table's layout, number formats, programmable thresholds,
  clipping and write port;
* the trigger position and width, and the ramp wrap;
* the external/ramp source select;
* synchronous reset.

The PWM baseline (counter and comparator) that DDPM is usually compared with
is not included.

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and stops with
`$finish`. Each has a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/ddpm_pkg.sv tb/ddpm_ref_pkg.sv tb/tb_ddpm_dac_top.sv \
    --top-module tb_ddpm_dac_top -o sim && obj_dir/sim
```

| testbench                | what it runs                                                                  |
|--------------------------|-------------------------------------------------------------------------------|
| `tb_priority_mux`        | 4-bit exhaustive, 16-bit directed and random vectors                          |
| `tb_ddpm_counter`        | two 16-bit frames, wrap and `frame_last` period                               |
| `tb_ddpm_data_register`  | random load enables                                                           |
| `tb_ddpm_modulator`      | 16-bit and 4-bit modulators, every slot, sample-rate spacing                  |
| `tb_piso_ddpm_modulator` | 4-bit and 5-bit shift-register modulators, all codes                          |
| `tb_slope_calibration`   | identity, bypass, double-slope over all 2^16 codes, 16 random segments        |
| `tb_ramp_trigger_gen`    | short ramp through a wrap with enable gaps, closed-form expectations          |
| `tb_ddpm_dac_top`        | 6-bit top end to end: both sources, correction on/off, all segments, ramp wrap, triggers, shift-register modulator |
| `tb_static_sweep`        | 8-bit static sweep with a pulse-area error model, uncorrected and corrected   |
| `tb_sine_workload`       | 16-bit full-swing sine at 16 and 64 samples per period                        |
| `tb_ddpm_dac_full`       | 16-bit top at default parameters: single codes (0x72D6, 0xAAAA, …), double-slope correction, ramp up to its first 2 s step (2·10^8 clocks, a few minutes) |

`tb/ddpm_ref_pkg.sv` builds reference frames from the slot formula.
`tb/ddpm_stream_checker.sv` is the frame-by-frame monitor that most
testbenches use.
