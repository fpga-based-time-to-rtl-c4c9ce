# Self-calibrating FPGA time-to-digital converter (16 channels)

A time-to-digital converter (TDC) records *when* an input edge happened.
This design time-stamps rising edges on 16 inputs with a 48-bit fixed-point
tag: 36 bits count system-clock cycles since the measurement started, and
12 bits give the position of the edge inside that cycle in units of
T_CLK / 4096. At the intended 131.25 MHz clock (T_CLK = 7.62 ns) one LSB is
1.86 ps and the range is about 524 s.

The position inside the clock cycle comes from a tapped delay line built on
the FPGA carry chain. Such a line is very non-linear: its taps differ in
delay, some have nearly zero width (missing codes), and where the chain
crosses slice boundaries some are several times wider than the rest. The
main idea of the design is that every channel calibrates itself in hardware,
using one dual-port block RAM and almost no other logic:

1. the RAM is cleared;
2. an oscillator that is unrelated to the system clock is fed into the delay
   line, and the RAM counts how often each delay-line code occurs (2^20 hits);
   because the oscillator's edges fall at uniformly random points of the clock
   period, each count is proportional to that bin's width;
3. the RAM is rewritten in place with the running sum of the counts (the
   cumulative distribution, which is the line's transfer function);
4. in normal operation the RAM is a look-up table from delay-line code to
   calibrated fine time.

Because the number of calibration hits is a power of two, the running sum
is already a binary fraction of the clock period: its top 12 bits are the
fine time, and the tag is just `{coarse, fine}`, with no multiplier and no
division.

## Block diagram

```
            cal_clk ─────────────┐
 ch_in[c] ─► input mux ─► carry-chain delay line ─► resync ─► edge ─► priority ─► calibrator ─► tag[c]
              ▲           + sampling flip-flops     register   detect   encoder     (dual-port
              │              (512 taps)                                              RAM 512x21)
 cmd_* ─► controller (top-level state machine) ──── mode ─────────────────────────────┘
              └─► coarse counter (36 bit) ── coarse ─────────────────────────────────► tag[c]
```

`tdc_top` holds one `tdc_controller`, one `tdc_coarse_counter` shared by all
channels, and `N_CH` instances of `tdc_channel`. A channel is
`tdc_input_mux` → `tdc_delay_line` → resynchronising register and rising-edge
detector → `tdc_priority_encoder` → `tdc_calibrator` (which contains
`tdc_dpram`). Shared constants and the mode type are in `tdc_pkg`.

## From an input edge to a tag

**Delay line and bin code.** A rising edge enters the line and ripples
along it; at every rising clock edge all 512 taps are sampled. The sampled
word is a thermometer code: ones from tap 0 up to the last tap the edge has
reached. The longer ago the edge arrived, the more ones. The priority
encoder finds the highest tap that is one, `h`, and outputs the bin code
`511 - h` (for a 512-tap line simply `~h`). With this orientation the code
*grows* with the arrival time inside the period, which is what lets the fine
time be appended to the coarse count. Taking the highest one also ignores
bubbles (isolated zeros below the front).

**Hit detection.** The sampled word is registered a second time (against
metastability). A hit is a cycle in which tap 0 is 1 and was 0 one cycle
before. Two hits on one channel are therefore always at least two clock
cycles apart, which the histogram read-modify-write relies on. Only rising
edges are time-stamped; an input pulse must be longer than the delay line
(about one clock period) to be seen correctly.

**Which cycle.** The coarse part of the tag is the count of the clock period
in which the edge arrived, i.e. the period that ends at the sampling clock
edge. When the hit is detected the shared counter is already two ahead, so
the channel captures `coarse - 2`. The coarse count is 0 in the period that
starts at the clock edge where the counter was cleared, which is the time
origin of a measurement; there is no per-event start signal.

**Latency.** With the input edge sampled at clock edge k: resynchronising
register at k+1, code at k+2, RAM read at k+3, fine time at k+4, `tag` and
the one-cycle `tag_valid` at k+5.

## The calibrator: one RAM, four jobs

`tdc_calibrator` owns a true dual-port RAM of 512 words × 21 bits
(`HITS_LOG2 + 1` bits, so that a single bin could hold every hit). Its job is
chosen by `mode` from the controller; `done` rises when the job is finished.

| mode | port A | port B | length |
|---|---|---|---|
| `MODE_CLEAR` | – | writes 0 to word j in cycle j | 512 cycles |
| `MODE_HIST` | reads H(code) for a hit | next cycle writes H(code)+1 back | until 2^20 hits, further hits ignored |
| `MODE_CDF` | reads H(j) in cycle j | next cycle writes `acc + H(j)` to word j, `acc` keeps the running sum | 513 cycles |
| `MODE_RUN` | reads CDF(code) for a hit | – | 2 cycles per look-up |

After the CDF pass, word j holds H(0)+…+H(j): the fraction of the clock
period, scaled to 2^20, that lies at or before the end of bin j. The fine
time is that value shifted right by `HITS_LOG2 - FINE_W` = 8. The last word
equals 2^20 exactly, which does not fit in 12 bits, and is saturated to 4095.

Things worth knowing when changing it:

* The histogram update reads on port A and writes on port B one cycle later.
  A hit two cycles after the previous one reads the word after it has been
  written, so no forwarding is needed; an assertion checks the spacing.
* The look-up value is the *end* of the bin the edge fell into, so a tag is
  on average half a bin late and at most one bin late (with the model's
  widest 60 ps bin, 32 LSB). Using the start of the bin instead would mean
  reading word code-1; the in-place inclusive sum was kept as the simplest
  form of the iterative sum.
* The delay in front of tap 0 (input routing) is invisible to code-density
  calibration; it appears as a constant per-channel offset, as it would in
  hardware.
* Calibration can be repeated at any time (to follow temperature and voltage
  drift). While it runs the channels give no tags.

## Controller

`tdc_controller` is driven by three one-cycle commands from the host:

* `cmd_calibrate` (from idle, ready or running): CLEAR → HIST → CDF → READY.
  Each step waits until every channel reports `done` (the AND of all
  channels). The delay-line input multiplexers select `cal_clk` during CLEAR
  and HIST.
* `cmd_start` (ready or running): RUN, clearing the coarse counter, which
  sets the time origin. Ignored before the first calibration.
* `cmd_stop`: back to READY.

`calibrated` is high between a completed calibration and the start of the
next one. `mode` is a port so that the host can watch the state.

## The delay-line model

The carry chain and its sampling flip-flops (`tdc_delay_line`) are a
behavioural model, not synthesizable RTL: their function depends on
picosecond propagation delays. On an FPGA this module is replaced by the
carry-chain primitive and a flip-flop per tap, placed by hand. The model
gives tap i a cumulative delay D(i); at a clock edge at time t it samples
the input as it was at t − D(i). Tap widths are deterministic per `SEED`
(each channel gets its own) and imitate a real chain: mostly 10–24 ps, every
eighth tap zero (missing code), every 64th 60 ps (slice crossing). The line
is about 7.9 ns long, a little more than one 7.62 ns period, so that it
always covers a full period; its mean width over a period is about 15 ps.
The model remembers only the last two input transitions, hence the minimum
pulse width.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `N_CH` | 16 | channels (`tdc_top`) |
| `N` | 512 | delay-line taps and RAM words; code width is log2(N) = 9 |
| `HITS_LOG2` | 20 | calibration hits per channel = 2^HITS_LOG2 |
| `FINE_W` | 12 | fine-time bits; must not exceed `HITS_LOG2` |
| `COARSE_W` | 36 | coarse counter bits |
| `SEED` | 1 | delay-line model variation (`tdc_channel` gets c+1 from the top) |

The defaults live in `tdc_pkg`. All files use `` `timescale 1ps/1fs``.

## Simulating

Every testbench is self-checking and ends with a line
`TB_RESULT checks=N failures=M`. With Verilator 5, for example:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
          -Irtl rtl/tdc_pkg.sv tb/tb_tdc_top.sv --top-module tb_tdc_top -o sim
./obj_dir/sim
```

| testbench | what it does |
|---|---|
| `tb_tdc_input_mux` | all input combinations |
| `tb_tdc_coarse_counter` | random clear/enable against a reference, 36 and 4 bits (wrap) |
| `tb_tdc_dpram` | random traffic on both ports, read latency and read-first |
| `tb_tdc_priority_encoder` | every thermometer length, plus bubbles |
| `tb_tdc_delay_line` | edges at known times: sampled word, coverage of one period, mean tap width |
| `tb_tdc_calibrator` | two calibrations with an uneven code distribution (2^14 hits), every look-up compared with a reference CDF, phase lengths, latency, hit cap |
| `tb_tdc_controller` | command sequences, mux select, coarse clear, recalibration |
| `tb_tdc_channel` | one channel, 2^16 hits, 2000 edges at random times: each tag against the ideal time, latency |
| `tb_tdc_top` | 4 channels, 2^14 hits: calibrate, start, 300 events fed to all channels at once, stop, recalibrate, start, 300 more; tags, per-pair spread, every mechanism counted |
| `tb_tdc_top_full` | the top with its defaults (16 channels, 2^20 hits each): one calibration and 200 events; about one minute |
| `tb_tdc_scdt_crystal` | one full-size channel calibrated from a 1.8432 MHz oscillator against the 131.25 MHz clock; bin widths from the histogram, W(i) = H(i)·T_CLK/2^20, compared with the model's true widths; DNL and INL; 500 tags |
| `tb_tdc_ssp` | a pair of full-size channels, 2,000,000 common edges; RMS of the tag difference (single-shot precision of the pair) |

Results with the model: tags lie between 8 LSB early and one bin late
(mean about 5 LSB late, i.e. half a mean bin). Bin widths measured by the
histogram agree with the model's within 0.03 ps; with the ideal bin taken as
T_CLK/512 = 14.88 ps the model line shows DNL up to 3.0 and INL up to about
28. The RMS difference between two channels that see the same edge is about
12.75 ps over two million events (quantisation only: the model has no
jitter, so real hardware will be worse). The full-size runs take 30–80 s each.

## Where this design makes its own choices

The overall structure, the sizes (16 channels, 512 taps, 2^20 hits, 12-bit
fine and 36-bit coarse time) and the calibration procedure in one dual-port
RAM follow the published description of the instrument. The following are
this design's own:

* the bin-code orientation and the "highest one" encoding;
* the second register stage and the tap-0 rising-edge detector;
* inclusive running sum as look-up value (end of bin), saturation of the
  last value, 21-bit RAM words, a register for the running sum;
* the controller's states and the three host commands;
* ignoring calibration hits beyond 2^20;
* asynchronous active-low reset everywhere; the RAM is not reset but cleared
  by the CLEAR phase;
* the delay-line model's tap-width distribution.

Not included: the USB host interface and the merging of the 16 tag streams
for it (tags are per-channel ports), the clock manager and jitter cleaner,
the calibration crystal, the input discriminators and the trigger outputs.
These are outside the FPGA logic or not specified. Histogram-based
DNL/INL analysis is a host-side computation and is not part of the RTL
(`tb_tdc_scdt_crystal` shows how to do it from the RAM contents).
