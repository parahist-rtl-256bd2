# ParaHist: a parallel event-based histogram generator

An event camera (DVS) does not send frames. Each pixel reports on its own, as
an address-event: pixel coordinates, polarity and a microsecond timestamp.
Optical flow on such a stream needs, for every new event, to know how much
recent activity its neighbourhood holds. This design computes that. For each
incoming event at pixel (x, y) it produces a histogram with one bin per pixel
of the (2R+1)x(2R+1) neighbourhood. A bin is the number of events that pixel
fired within a time threshold of the new event. The histograms are handed to a
gradient / optical-flow stage, which is not part of this design.

Two ideas make it cheap and fast:

* **Time-difference compression.** Each pixel keeps a short history in a single
  memory line, but not as a list of 32-bit timestamps. The line holds the low
  bits of the newest timestamp plus small differences between consecutive
  events. A parallel prefix adder turns the differences back into absolute
  times in one step.
* **Banked neighbourhood access.** Pixels are spread over an 8x8 array of RAM
  banks by the three low bits of x and y. Any window of up to 8x8 pixels
  therefore hits each bank at most once, and the whole neighbourhood is read in
  one cycle. The design accepts one event per clock.

All RTL is SystemVerilog-2017 under `rtl/`; self-checking testbenches are
under `tb/`.

## The per-pixel ring buffer

Every pixel owns one memory line of `LINE_W = W_DATA * PN` bits (72 by
default). The fields are, from the most significant end:

```
| size (SIZE_W) | tsp (W_TS) | dt[0] (W_DT) | dt[1] | ... | dt[HS-1] |
```

* `SIZE_W = floor(log2(HS))` bits: how many events the line holds, counting
  the newest one. 0 means the pixel has no history.
* `W_TS = LINE_W - HS*W_DT - SIZE_W` bits: the low bits of the newest event's
  time, `tsp`.
* `HS` difference fields of `W_DT` bits each. `dt[0]` is the gap between the
  newest event and the one before it, `dt[1]` the gap before that, and so on.

With the defaults (`HS = 16`, `W_DT = 4`, 72-bit lines) the sizes are
72 = 4 + 4 + 16x4. So only 4 bits of the newest timestamp are stored. A line
holds at most `CAP = min(HS+1, 2^SIZE_W - 1)` events: 15 by default, which
means the newest event plus 14 differences. The last two difference slots stay
zero at this size. Widen `SIZE_W` if you need them.

### Decompression (stages 3 and 4, one lane per neighbour)

For current time `tsc` and outlier threshold `thr`, a lane does the following:

1. **Recover the newest time.** `age = (tsc - tsp) mod 2^W_TS` and
   `tsp_full = tsc - age`. This is exact as long as the pixel's newest event
   is less than `2^W_TS` time units old. An older event aliases and looks
   recent, which is the price of a narrow field. Pick `W_TS`, `TS_SHIFT` and
   the thresholds together.
2. **Prefix adder** (`prefix_adder`, radix-4 Sklansky). It computes
   `sum[i] = dt[0] + ... + dt[i]` for all i in ceil(log4 HS) levels: two for
   HS = 16.
3. **Decompression unit.** It computes `ts[i] = tsp_full - sum[i]`.
4. **Compare and shift.** An entry is kept if `(tsc - thr) - t <= 0`, that is,
   if it is at most `thr` old. The stored times fall along the ring, so the
   kept entries are always a prefix. The newest stored event is also dropped
   if its age does not fit in `W_DT` bits, because that gap could not be
   stored.
5. **Histogram counter.** The lane's bin is the number of kept events, the
   newest one included.

The pixel that fired also gets its line rewritten, shifted right by one:
`tsp' = tsc`, `dt'[0] = age`, `dt'[i+1] = dt[i]` for the kept entries and 0
for outliers. `size' = min(kept + 1, CAP)`.

Worked example (checked in `tb_compare_shift`, `tb_decompress_unit` and,
through a packed line, `tb_region_unit`):
`tsp = 200`, `dt = 0, 1, 2, ..., 15`, `tsc = 210`, `thr = 50`.

| step | values |
|---|---|
| prefix sums | 0 1 3 6 10 15 21 28 36 45 55 66 78 91 105 120 |
| decompressed | 200 199 197 194 190 185 179 172 164 155 145 134 122 109 95 80 |
| 160 - t | -40 -39 -37 -34 -30 -25 -19 -12 -4 5 15 26 38 51 65 80 |
| new ring | tsp' = 210, dt' = 10 0 1 2 3 4 5 6 7 8 0 0 0 0 0 0 |

The bin for this pixel is 10: the newest event plus nine older ones.

## Pixel-to-bank mapping (stage 1)

`addr_demapper` maps a pixel to its bank and line. The bank is
`{y[2:0], x[2:0]}`. The line is `(y/8) * ceil(W/8) + x/8`, which gives 690
lines per bank for the default 240x180 sensor.

`nbr_addr_mapper` (NAM) drives the 64 banks for one event. For bank column
`bx`, the neighbour offset is `dx = (bx - x) mod 8`, wrapped into -4..3;
likewise `dy`. If both offsets are within R and the neighbour lies on the
sensor, the bank is read at that neighbour's line. Because `2R+1 <= 8`,
R may be 1, 2 or 3.

`nbr_data_mapper` (NDM) undoes the rotation. Neighbour region
`k = (dy+R)*(2R+1) + (dx+R)` takes bank `{(y+dy)[2:0], (x+dx)[2:0]}`. A
neighbour that is off the sensor gets an empty line.

## Noise removal (stage 2)

This is a background activity filter over the 3x3 neighbourhood, the event's
own pixel included. A neighbour is "recent" if it holds an event and
`(tsc - tsp) mod 2^W_TS < cfg_dtn`. The event passes if any neighbour is
recent. A noise event still updates its own pixel's history, so a new object
can start a trail. It produces no histogram and is counted in `stat_noise`.

## Pipeline and timing

```
 stage 1                                            stage 2              stages 3-4                 stage 6
packet buffer -> input FIFO -> NAM -> 64 banks -> NDM -> noise filter -> [reg] -> (2R+1)^2 lanes -> per-region FIFOs
  (EP + CNT)      (64 bit)              ^                                         PA -> DU -> CS -> HS
                                        |                                              |
                                        +------- stage 5: write back (DDM) <-----------+ event's own lane
```

* **Cycle t.** The event at the head of the input FIFO is popped. The NAM
  issues the bank reads.
* **Cycle t+1.** The lines arrive and the NDM puts them in neighbourhood
  order. The noise filter runs, and lines and verdict are registered.
* **Cycle t+2.** Decompression, comparison, counting and the write back are
  combinational in this cycle. At its end the event's own line is written to
  its bank and, if the event is not noise, the bins are pushed into the output
  FIFOs. They can be popped from cycle t+3.
* **Throughput.** One event per clock. The end-to-end test measures 300 events
  in 305 cycles.
* **Forwarding.** Two events are in flight after the read. The one a step
  ahead writes its line at the end of the cycle in which the next event's
  lines arrive. A region that holds that pixel takes the line being written
  instead of the RAM output. The one two steps ahead wrote at the very edge
  where the banks were read (the RAM is read-first). `event_memory` keeps that
  last write in a register and returns it on an address match. Back-to-back
  events in the same neighbourhood are therefore exact (`stat_bypass` counts
  both cases). The read-modify-write loop of a pixel has to close in one
  cycle, so stages 3-5 cannot be split without stalling.
* **Back-pressure.** The input FIFO is not popped while the output FIFOs lack
  room for the event in flight plus a new one (`stat_stall`). The packet
  buffer stops when the input FIFO is full.
* **Off-sensor events.** Events whose coordinates lie off the sensor are popped
  and dropped (`stat_offsensor`).

## Interface of `parahist_top`

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock, asynchronous active-low reset |
| `ld_en`, `ld_addr`, `ld_data` | in | write one AEDAT 2.0 event (`parahist_pkg::aer_event_t`) into the packet buffer |
| `start`, `pkt_len` | in | stream the first `pkt_len` buffered events |
| `pkt_busy`, `pkt_done` | out | packet reader state |
| `cfg_threshold` | in | outlier threshold, in time units of `2^TS_SHIFT` us |
| `cfg_dtn` | in | noise threshold, same units |
| `hist_valid`, `hist_bin[NR]`, `hist_pop` | out/out/in | head of the output FIFOs; all pop together |
| `idle` | out | nothing buffered or in flight |
| `stat_*` | out | event, noise, off-sensor, bypass and stall counters |

The AEDAT 2.0 word is laid out as follows. Bits 31:0 are the timestamp. Bit
63 is polarity, then 9 bits of y, 10 bits of x, 2 APS-read bits and a 10-bit
ADC sample. Only x, y and the timestamp are used.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `R` | 1 | search radius (1, 2, 3: 3x3, 5x5, 7x7) |
| `HS` | 16 | difference slots per ring buffer |
| `W_DT` | 4 | bits per difference |
| `W_DATA`, `PN` | 72, 1 | line width is `W_DATA*PN` (72, 144, 216, 288 were studied) |
| `SIZE_W` | floor(log2 HS) | size field |
| `SENSOR_W`, `SENSOR_H` | 240, 180 | pixel array |
| `TS_SHIFT` | 0 | timestamps are divided by `2^TS_SHIFT` before use |
| `IN_FIFO_DEPTH`, `OUT_FIFO_DEPTH` | 16, 16 | FIFO depths |
| `PKT_DEPTH` | 90000 | packet buffer size, in events |

`W_TS` must come out positive; `region_unit` stops elaboration otherwise.

## What follows the architecture and what is this design's own

These parts follow the source architecture:

* the six stages and their blocks;
* 64 banks selected by the low three bits of x and y;
* storage of differences instead of absolute times, and the line layout with
  its field widths;
* the radix-4 Sklansky prefix adder;
* decompression by subtracting prefix sums from the previous time;
* outlier removal against `tsc - threshold`, and the shift by one slot;
* counting of kept entries;
* the 3x3 noise comparison `tsc - tsp < dtn`;
* a throughput of one event per clock;
* the 72-bit, HS = 16, 4-bit-difference example configuration;
* the 90000-event packet.

These are choices made here, where the source says nothing or is unclear:

* **One register between stage 2 and stage 3**, with stages 3-5 sharing a
  cycle, and the two forwarding paths. The source draws separate pipeline
  stages but gives no register placement or hazard handling. Splitting stages
  3-5 would need either forwarding of lines not yet computed or stalls on
  neighbourhood conflicts.
* **The size field** counts events including the newest one, and is capped at
  CAP.
* **Modular recovery of the newest time** from `W_TS` stored bits, and
  treating ages that do not fit `W_DT` as outliers.
* **The control unit is an OR** of the nine noise comparisons.
* **Noise events are still stored.**
* **The multiplexer after the control unit** in the source's block diagram
  (inputs labelled with the current and next timestamp) is not built, because
  its role is not described.
* **Only the event's own pixel is written back.** The diagram draws a gating
  path from every lane into the write-back demapper.
* **Bins count the newest stored event too.** The description speaks only of
  counting the kept older entries.
* **Comparison sign.** The source's text and its figure caption disagree on
  which sign of `(tsc - thr) - t` marks a kept entry. The figure's numbers are
  followed.
* **Defaults not given by the source:** sensor size, FIFO depths, handshakes,
  reset, the packet load port and `TS_SHIFT`.

Not covered:

* clock frequency, power and FPGA resource figures;
* the software baselines the source compares against;
* the gradient / optical-flow stage that consumes the histograms.

## Verification

Every module has a self-checking testbench `tb/tb_<module>.sv` that prints
`TB_RESULT checks=N failures=M`. The system-level tests are these:

* `tb_parahist_top` runs the top at its default parameters. It uses two
  packets, 4300 events in all, against a behavioural model that keeps, per
  pixel, a list of event times. Every bin of every histogram is compared. It
  checks the one-event-per-cycle rate. It also requires that stalls, bypasses,
  noise removal, outlier removal, ring-buffer capacity, off-sensor events and
  border pixels all occur.
* `tb_parahist_workloads` runs six other configurations against the same
  model: R = 1/2/3, HS = 8/12/16, line widths of 72-288 bits, and one run
  with timestamps quantised to 8 us (`TS_SHIFT = 3`). Each configuration
  first checks the one-event-per-cycle rate on a drained output, then runs a
  packet with the histogram reader stalling at random.
* `tb_region_unit` checks one processing lane (the `region_unit` helper)
  on packed lines, including a stored time that wraps.

To simulate, for example, the end-to-end test with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb rtl/parahist_pkg.sv \
    $(ls rtl/*.sv | grep -v parahist_pkg) tb/tb_parahist_top.sv \
    --top-module tb_parahist_top
./obj_dir/Vtb_parahist_top
```

Replace the testbench file and top name for any other test.
`tb_parahist_workloads` also needs `tb/tb_parahist_cfg.sv`. Adding `-Itb` and
`-y rtl -y tb` lets Verilator find helpers by name.
