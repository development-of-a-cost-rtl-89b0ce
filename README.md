# 64-channel multi-phase clock TDC

This is a time-to-digital converter (TDC) for 64 detector channels that fits in a
small, inexpensive FPGA (an Artix-7 XC7A50T class device). It does not use a carry-chain
delay line, which would need calibration. Instead it reaches 1/16 of a clock period by
sampling with 16 phases of one clock: 312.5 ps per LSB with a 200 MHz clock, or 125 ps with
500 MHz. Each hit input gets timestamps for its leading edge and, in the 312.5 ps
configuration, its trailing edge. A trigger input is timestamped the same way. For every
trigger the design reports all hits inside a programmable matching window, as times
relative to the window start. The output needs no calibration.

The RTL describes the logic. The original implementation gets its precision from a
hand-placed, hand-routed sampling register whose enable skew is equalised to about
±13 ps. No RTL can express that. See [What is not in the RTL](#what-is-not-in-the-rtl).

## How one edge becomes a timestamp

### The sampling register (`fine_timing_unit`)

A clock manager supplies eight copies of the coarse clock, `clk_ph[0..7]`, shifted by 0,
22.5, …, 157.5 degrees. Sixteen flip-flops are clocked on the rising edges of these
clocks (`q[0..7]`) and on their falling edges (`q[8..15]`, 180 … 337.5 degrees). So
`q[i]` samples at phase `i × 22.5°`, and the 16 sampling instants divide the coarse
period into 16 equal bins.

All 16 flip-flops sample the **same** signal: the LSB of the coarse counter, which
toggles once per coarse period (a 0101… pattern). All 16 share one clock enable, which
is the hit signal:

* the leading-edge unit has `CE = ~hit`;
* the trailing-edge unit has `CE = hit`.

While the enable is high, the register follows the toggle. At the hit edge the enable
falls and every flip-flop keeps its last sample. The toggle changes just after phase 0
of each period, so:

* `q[0]` always holds the value from *before* the last toggle;
* `q[1] … q[m]` hold the *new* value, where `m` is the number of phases that passed
  between the toggle and the hit;
* `q[m+1] … q[15]` still hold the old value.

Example: the hit arrives 4.4 phase steps after the phase-0 edge and the toggle went
0 → 1. The frozen pattern, `q[0]` first, is `0 1111 00000000000`.

### Encoding (`fine_encoder`)

The position is the number of samples among `q[15:1]` that differ from `q[0]`. Counting
the mismatches, rather than searching for the transition, also tolerates a single
out-of-place bit. The new toggle value, `~q[0]`, is the LSB of the coarse count during
the hit, and it becomes bit 4:

    code = 16 · ~q[0] + popcount(q[15:1] ^ q[0])        (0 … 31)

The code is therefore the hit time modulo **two** coarse periods, in fine LSBs. A pattern
and its complement give the same position and differ only in the bit worth 16.

### Joining coarse and fine (`coarse_fine_align`)

The hit is also passed through a two-flip-flop synchroniser into the coarse clock domain.
When the synchronised level changes, the channel latches its copy of the coarse counter
and the frozen pattern together. The latched count is late by a fixed number of cycles,
and in hardware it can be one cycle later still when the edge meets the synchroniser at a
bad moment. The fine code, in contrast, is exact but only known modulo 32. The two are
combined in two steps:

1. Add the alignment constant `FINE_ALIGN = 26` modulo 32. This lines the fine code up
   with the coarse-counter LSB.
2. Take the value congruent to that code that lies nearest `16 × coarse`:

       t = 16·coarse + signed5((code + 26) − 16·coarse  mod 32)

Any coarse error between −16 and +15 fine LSBs is corrected. Bins at the edge of a coarse
cycle move to the neighbouring cycle; in a plot of fine code against coarse LSB they
appear at −1 and 32.

With ideal clocks, an edge in the coarse cycle where the counter reads `n`, `m` phases in,
gets `t = 16·n + m + 26`. The constant is the same for every channel, so it cancels in
hit − trigger.

### The channel (`tdc_channel`)

A channel holds:

* a coarse-counter copy, whose LSB drives the D inputs;
* the leading-edge unit and, with `TRAILING = 1`, the trailing-edge unit;
* the synchroniser;
* two register stages (capture, then encode and align).

A word `{channel, trailing, t}` appears with a one-cycle `valid` four coarse cycles after
the edge. The pattern is captured three cycles after the edge, so **a pulse must stay
high, and then low, for more than three coarse periods**. That is 15 ns at 200 MHz and
6 ns at 500 MHz. A shorter pulse re-enables its unit before the pattern is read.

## From timestamps to events

    64 x tdc_channel ─► 64 x sync_fifo ─► 16 x fifo_merger (4→1) ─► 16 x matching_filter ─► 16 output streams
    trigger ─► tdc_channel (leading only) ─► register ─► broadcast to all 16 filters

* **Groups** (`hit_group`). The channels form eight groups of eight. In a group, channels
  0–3 and channels 4–7 each feed one merger and one matching filter.
* **Merging** (`fifo_merger`). Each cycle, one non-empty channel FIFO is chosen by round
  robin, and its word is written into the filter's buffer. The merged stream carries one
  word per coarse cycle: 200 M words/s at 200 MHz, eight times the 25 MHz per four
  channels the original design is specified for. A channel at its fastest (just over
  three cycles high and three low) gives two words per six-plus cycles, so four such
  channels together can briefly exceed one word per cycle. The 16-word channel FIFOs
  absorb such bursts. If the overload lasts, the full FIFO drops the new word, and an
  assertion flags this in simulation.
* **Matching** (`matching_filter`). The filter writes every word into a ring buffer
  (4096 words). Trigger timestamps wait in a 16-entry queue. For trigger time `T` the
  window is

      [T − win_offset, T − win_offset + win_width)

  and each hit `h` inside it is reported as `h − T + win_offset`, its distance from the
  window start. The filter waits until its coarse time is 32 cycles past the window end,
  so that every hit in the window has reached the buffer. It then scans the buffer
  backwards, two cycles per word, from the newest word stored at the moment the window
  closed. (A trigger still waiting behind an earlier one has that position recorded for
  it, so words that arrive during the earlier scan cannot push its own words out of
  reach.) The scan stops at the first word more
  than 256 fine LSBs older than the window start, at the oldest stored word, or before it
  could reach a word overwritten meanwhile. The merged stream is in time order to within
  a few cycles, which is why a stop with a small slack is safe. After the last match the
  filter sends an end-of-event word carrying the event number.
* **Multi-hit and overlapping windows.** All hits of a channel inside a window are
  reported. When windows of successive triggers overlap, a hit is reported in each of
  them.
* **Wrap-around.** Timestamps are 20 bits and wrap; every comparison uses signed
  differences. After 16384 cycles without a new word, the buffer is marked empty, so an
  old word can never alias into a later window.

The output word (`tdc_pkg::out_word_t`) is
`{is_end, ch[5:0], trailing, value[19:0]}`. In a data word, `value` is the time from the
window start in fine LSBs. In an end-of-event word, `value` is the event number. Within
an event, the words come newest first.

## Configurations

| | 312.5 ps LSB | 125 ps LSB |
|---|---|---|
| coarse clock | 200 MHz | 500 MHz |
| `TRAILING` | 1 (default) | 0 |
| fine units | 64 leading + 64 trailing + 1 trigger | 64 leading + 1 trigger |

In the original design, the 125 ps version registers coarse + fine data in a 250 MHz
domain. Here all logic except the sampling flip-flops runs on `clk_ph[0]` in both
versions. That is simpler, but whether it closes timing at 500 MHz has not been checked.

Parameters of `tdc64_top`:

| parameter | default | meaning |
|---|---|---|
| `N_GROUPS` | 8 | groups of 8 channels (64 channels) |
| `TRAILING` | 1 | add trailing-edge units |
| `FINE_ALIGN` | 26 | fine-to-coarse alignment constant (mod 32) |
| `CH_FIFO_DEPTH` | 16 | words per channel FIFO |
| `RING_DEPTH` | 4096 | words per matching-filter buffer |
| `TRIG_FIFO_DEPTH` | 16 | pending triggers per filter |

Shared constants, such as the 20-bit timestamp width and the word types, are in
`rtl/tdc_pkg.sv`. `FINE_ALIGN` compensates for the real delays between the coarse and
fine clocks and has to be measured on hardware. With ideal clocks, any value from 16 to 31, or 0, works, and 26 falls inside that range.

## Interface of `tdc64_top`

| port | dir | width | |
|---|---|---|---|
| `clk_ph` | in | 8 | phase clocks, `clk_ph[0]` is the system clock |
| `rst` | in | 1 | synchronous reset, active high |
| `hit` | in | 64 | hit inputs (after the LVDS receivers) |
| `trigger` | in | 1 | trigger input |
| `win_offset`, `win_width` | in | 20 each | matching window in fine LSBs; hold stable while triggers are pending |
| `out_valid`, `out_ready` | out, in | 16 each | one valid/ready stream per matching filter |
| `out_word` | out | 16 × `out_word_t` | |

A trigger must also be high, and then low, for more than three coarse periods. If a
filter's 16-entry trigger queue fills up, a further trigger is lost, and an assertion
flags this in simulation. As long as a filter's output is held off, that filter scans no
further, but its buffer keeps accepting hits.

## What is not in the RTL

* **Placement and routing of the sampling register.** The resolution depends on all 16
  flip-flops seeing the hit enable at nearly the same moment. The original design places
  them by hand in neighbouring slices and routes the enable net by hand, reusing a few
  routing patterns. Automatic routing gave about ±335 ps of skew; the hand-routed version
  gives about ±13 ps. The measured result is below 156 ps RMS at 312.5 ps LSB and below
  72.4 ps RMS at 125 ps LSB. Anyone using this RTL on an FPGA has to recreate those
  constraints.
* **Clock manager.** The eight phase clocks are inputs. `tb/mmcm_model.sv` is a
  behavioural stand-in for simulation.
* **LVDS receivers, Ethernet readout and the clock-synchronisation link** of the board.
  Their signals are the top-level ports.
* **Per-combination corrections.** The original design notes that jitter calls for extra
  corrections for some sampling patterns. They are not specified, so they are not
  implemented.

## Departures from the original design

* The bit order and reference bit of the fine code are this design's own. In the
  original description a pattern and its complement decode to the same position, with a
  polarity bit worth 16; that property holds here, but the numbers printed for its
  examples use a different bit order.
* The synchroniser depth, the pipeline, the three-period minimum pulse width, the buffer
  sizes, the matching-filter algorithm, the end-of-event word and the single clock domain
  are design choices here. The original does not specify them. Its hit-rate limit of
  25 MHz per four channels comes from a matching procedure it does not describe. This
  implementation accepts a word every cycle on each merged stream.

## Simulating

The testbenches need Verilator 5 with `--timing`. From the repository root:

    verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
      -y rtl -y tb +libext+.sv -Irtl rtl/tdc_pkg.sv tb/tb_tdc64_top.sv \
      --top-module tb_tdc64_top
    ./obj_dir/Vtb_tdc64_top

Each testbench ends by printing `TB_RESULT checks=N failures=M`. Replace `tb_tdc64_top` with
any other testbench:

| testbench | what it checks |
|---|---|
| `tb_fine_timing_unit` | frozen pattern for every hit position, hold while frozen, tracking after release |
| `tb_fine_encoder` | code for all 32 (polarity, position) pairs, complement symmetry, single-bit bubbles |
| `tb_coarse_fine_align` | 2000 random times with coarse errors, against a brute-force nearest-value search |
| `tb_coarse_counter` | reset, increment, wrap |
| `tb_tdc_channel` | leading and trailing timestamps at every phase, four-cycle latency |
| `tb_sync_fifo`, `tb_fifo_merger` | queue model; round-robin fairness and no lost words |
| `tb_matching_filter` | 60 triggers against a reference window model, with back-pressure, multi-hit, overlapping windows, queued triggers |
| `tb_hit_group` | one group end to end |
| `tb_tdc64_top` | whole design at default parameters (312.5 ps, 200 MHz), 64 channels, 12 triggers, all 16 filters |
| `tb_tdc64_top_125ps` | whole design at 500 MHz with `TRAILING = 0` |
| `tb_tdc64_top_rate` | every channel at 25 MHz, which fills each merged stream to one word per cycle; no word may be lost |
| `tb_tdc64_top_codedensity` | the two bench measurements with ideal clocks: one pulse on all hits and the trigger must give the same value on every channel at every phase; hits at random picosecond offsets must fill all 16 fine bins equally (DNL within ±15 %; about ±6 % is typical) |

The end-to-end tests (`tdc64_env.sv`) place every edge at a random phase and predict its
timestamp independently, as `16·n + m + 26`. They compare each event of each filter with
the hits that fall in its window. They also count how often each of these happened:

* leading edges and trailing edges;
* several words merged in one cycle;
* multi-hit windows;
* rejected hits;
* overlapping windows;
* queued triggers;
* output stalls.

A test fails if any of them never happened. The default-size test runs in well under a
second.
