# FHTF: a Hough-transform track filter for eight detector layers

This is synthesizable SystemVerilog for a track filter of the kind proposed for
the ATLAS Event Filter: the Flexible Hough Transform on FPGA (FHTF). An event
brings up to 200 hits on each of eight cylindrical tracker layers. Each hit is
a radius `r`, an azimuth `phi` and an 18-bit cluster identifier. The filter
finds the (qA/pT, phi0) track parameters that are shared by hits on at least
7 of the 8 layers. For each such parameter pair (a *road*) it returns the
cluster identifiers of the hits that produced it. Confirming the track is left
to software downstream.

For small angles, a charged track through the barrel satisfies

    qA/pT = (phi0 - phi) / r        so        phi0 = phi + r * qA/pT

So each hit is a straight line in the (qA/pT, phi0) plane, the Hough space.
Hits from one track give lines that cross in one bin. The filter:

1. draws the line of every hit into that layer's accumulator (168 qA/pT bins
   by 48 phi0 bins);
2. counts, bin by bin, how many of the eight accumulators were crossed, and
   keeps the bins that reach the threshold and are the local maximum of a
   five-bin window along phi0;
3. for every kept bin, applies the line rule again with qA/pT fixed and scans
   all the stored hits. A hit belongs to the road if its line falls in the
   bin's phi0 column.

Two event banks let event n+1 be loaded while event n is read out. The input,
the processing and the output run on separate clocks joined by
independent-clock FIFOs.

## Module map

| module | role |
|---|---|
| `fhtf_pkg` | sizes, `hit_t`, `in_word_t`, `road_t`, `out_rec_t`, binning functions |
| `fhtf_top` | input FIFO, `fhtf_core` and output FIFO, on three clocks |
| `fhtf_core` | two banks, bank control, and the shared engines below |
| `line_drawer` | one per layer: the line of one hit per clock, 168 bins at once |
| `line_drawer_phi0` | the same line drawn the other way: 48 phi0 bins at once (`LOOP_PHI0 = 1`) |
| `accumulator` | one per layer and bank: a 168 x 48 bit array |
| `hit_store` | one per bank: 8 x 200 hits, read 4 per layer per clock |
| `peak_finder` | row scan, layer count, threshold, five-bin window, road stream |
| `hit_recovery` | 32 hits per clock against one road, result records |
| `async_fifo` | Gray-pointer dual-clock FIFO |

## The binning arithmetic

Everything is integer arithmetic that rounds down, in the same way when
accumulators are filled and when hits are recovered. For bin `n`:

    q(n) = Q_MIN + n * Q_STEP                      signed qA/pT of bin n
    P    = phi * 2^QSHIFT + r * q(n)               phi0, scaled by 2^QSHIFT
    col  = (P - PHI0_MIN * 2^QSHIFT) >>> (QSHIFT + PHI0_SHIFT)

The crossing counts only when `0 <= col < 48`. `phi` is 16 bits and `r` is 12
bits, both unsigned. With the defaults (`Q_MIN = -2672`, `Q_STEP = 32`,
`QSHIFT = 12`, `PHI0_MIN = 16384`, `PHI0_SHIFT = 6`):

- the phi0 window covers `phi` units 16384 to 19455, with 64 units per bin;
- at the largest radius a line moves about 42 bins across the qA/pT range.

These constants are this implementation's own choice. Map the detector's real
units onto them by setting the five parameters of `fhtf_top`.
`fhtf_pkg::hit_p` and `fhtf_pkg::p_to_bin` are the single definition used by
both the line drawer and the hit recovery. This matters: a hit is recovered
exactly when its line was drawn through the bin.

## Drawing a line with few multipliers

A full line needs 168 products `r * q(n)`. `P` grows linearly with `n`, so
`line_drawer` multiplies out only the first `SEG_LEN` (8) bins. It also forms
one step `D = r * SEG_LEN * Q_STEP`. Each later segment of 8 bins is the
previous segment plus `D`: the first part of the line is copied along its
slope by one addition per bin. The sum is exact, so the result equals the
direct formula bit for bit. The unit test checks all 168 bins of every hit
against the direct formula.

The additions form a pipeline of 21 stages:

- segment `s` (bins `8s .. 8s+7`) leaves `s + 1` clocks after its hit enters;
- one new hit per layer can enter on every clock;
- each output bin carries the bank bit of its hit, so the tail of one event
  can still be written while the next event starts filling the other bank.

### The other direction: looping over phi0

Lines can also be drawn by stepping through the 48 phi0 bins and computing the
qA/pT bin of each, `qA/pT = (phi0 - phi) / r`. Setting `LOOP_PHI0 = 1` on
`fhtf_top` selects this form: `line_drawer_phi0` replaces `line_drawer` and
`hit_recovery` tests hits with the same rule. For phi0 bin `m` with centre
`c(m)` the arithmetic, with `ZF` (8) fraction bits, is:

    Z0(m) = ((c(m) - phi) << (QSHIFT + ZF)) / r            first 8 bins, divided
    DZ    = (SEG_LEN << (PHI0_SHIFT + QSHIFT + ZF)) / r    step per segment
    Z(m)  = Z0(m mod 8) + (m div 8) * DZ
    row   = (Z - ((Q_MIN << ZF) - (Q_STEP << ZF) / 2)) >>> (ZF + log2 Q_STEP)

The crossing counts when `0 <= row < 168`; a hit with `r = 0` draws nothing.
The divisions round down and `DZ` is rounded once, so a later segment can
sit up to one `2^-ZF` unit per segment away from a direct division. Drawing
and recovery share `fhtf_pkg::z_first`, `z_step` and `z_to_row`, so a hit is
still recovered exactly when its line was drawn through the bin. `Q_STEP` must
be a power of two in this mode. One line sets one bin per phi0 column, so a
steep line can leave gaps between qA/pT rows that the default direction would
fill. The accumulators take both kinds of write: per row (`set_*`) and per
column (`col_*`).

### Storage

Accumulators are flip-flop arrays, because all 168 rows may be written in the
same clock. A bin holds one bit, "crossed", because the threshold counts
layers, not lines.

## Selecting roads

`peak_finder` reads one qA/pT row of all eight accumulators per clock. For
each of the 48 phi0 bins it adds the eight bits. A bin is a candidate when
all of the following hold:

- its count is at least `THRESHOLD` (7);
- its count is strictly greater than each of the two bins on its left;
- its count is no lower than either of the two bins on its right.

Bins outside the accumulator count as 0. The asymmetric comparison makes a
flat top of equal counts give one candidate rather than two. The five-bin
window follows the published design; the exact comparison is this
implementation's choice.

Candidates of a row leave one per clock, lowest phi0 first, through a
valid/ready handshake, and the scan waits while they are pending. A full scan
takes `168 + R + 1` clocks for `R` roads when the consumer never stalls; the
last clock is the end-of-event token. Only the phi0 direction is windowed, so
one track usually yields roads in several neighbouring qA/pT rows. The filter
reports them all.

## Recovering the hits of a road

`hit_store` keeps each layer as rows of four hits, so one read returns
4 x 8 = 32 hits. For each road, `hit_recovery` walks these rows:

- there are `ceil(max hits in a layer / 4)` rows, at most 50;
- on each row it evaluates the line rule for all 32 hits with the road's
  `q(n)`;
- it compares the result with the road's phi0 bin.

A road takes one clock to accept plus one clock per row. With 200 hits in the
fullest layer that is 51 clocks per road.

Each row with a match produces an output record, and so does the last row.
The record holds:

- a 32-bit lane mask;
- 32 cluster identifiers, with `18'h3ffff` on empty lanes;
- `road_last` on the road's final record.

After the last road, a record with `event_last = 1` closes the event.

## Two events in flight

`fhtf_core` holds two banks. A bank is eight accumulators plus a hit store.
Each bank runs through these states:

| state | what happens |
|---|---|
| FREE | empty, waiting for an event |
| FILL | accepts words until `eof` |
| DRAIN | waits 22 clocks for the line pipeline to empty |
| READY | waits its turn for the peak finder and hit recovery |
| READ | is scanned and recovered |

When its end-of-event record is issued, the bank is cleared in one clock and
returns to FREE. Banks are filled and read in strict alternation, so results
come out in event order. The two banks share one set of line drawers, one
peak finder and one hit recovery.

A new event waits, with `in_ready` low, only while the bank it would use
still holds an earlier event. Words that arrive outside an event (no `sof` while no event is
open) are dropped. A layer that brings more than 200 hits keeps the first 200
and raises `overflow` until its bank is freed.

## Clock domains and ports of `fhtf_top`

| domain | ports |
|---|---|
| `clk_in` | `in_valid`, `in_ready`, `in_word` (`in_word_t`) |
| `clk_core` | processing; status `bank_busy`, `overflow`, `cnt_roads`, `cnt_hits` |
| `clk_out` | `out_valid`, `out_ready`, `out_rec` (`out_rec_t`) |

There are three active-low resets, one per domain, and they are asserted
together.

`in_word_t` is 378 bits:

- `sof` marks the first word of an event and `eof` the last;
- `hv[7:0]` says which layer slots hold a hit;
- there are eight `{r, phi, clu}` slots, one per layer;
- an event with no hits is a single word with `sof = eof = 1` and `hv = 0`.

`out_rec_t` is 632 bits: an event id (assigned in order from 0, 8 bits), the
road's `qbin` (8 bits) and `pbin` (6 bits), `road_last`, `event_last`, the
lane mask and 32 cluster ids. Lane `4*l + k` is hit `k` of the row on layer
`l`.

Generating the clocks (MMCMs or PLLs) and the host link (PCI Express in the
published system) are outside this RTL.

## Timing summary (clocks of `clk_core`)

| phase | clocks |
|---|---|
| fill | one word per clock, so `max hits per layer` clocks, then 22 to drain |
| scan | `168 + R + 1` |
| recovery | `R * (ceil(max hits per layer / 4) + 1)`, interleaved with the scan |

The goal of the published design is under 5 µs per event at 400 MHz, which is
2000 clocks. Here an event with 200 hits per layer meets it for up to about
30 roads. The end-to-end test's first event (4 tracks, 31 hits per layer)
finishes in 224 clocks. In `tb_fhtf_occupancy`, a full event of 1600 hits
giving 17 roads leaves after 1141 clocks. The next full event (16 roads),
which queues behind it, leaves 1851 clocks after its own first word.

## Parameters of `fhtf_top`

| parameter | default | meaning |
|---|---|---|
| `THRESHOLD` | 7 | layers that must be crossed |
| `SEG_LEN` | 8 | bins multiplied out per line; must divide 168 |
| `DEPTH` | 200 | hits kept per layer |
| `FIFO_AW` | 4 | log2 of both FIFO depths |
| `Q_MIN`, `Q_STEP`, `QSHIFT`, `PHI0_MIN`, `PHI0_SHIFT` | see above | binning |
| `LOOP_PHI0` | 0 | 1 draws lines by looping over the phi0 bins |
| `ZF` | 8 | fraction bits of the qA/pT value in the phi0 loop |

The accumulator size (168 x 48), the layer count (8) and the 32 recovery lanes
are constants in `fhtf_pkg`.

## Where this departs from the published design

- The published design describes both drawing directions and does not
  settle which one is the main one. Both are built. The qA/pT loop is the
  default because it needs no divider and matches the line equation as
  usually written. The phi0 loop uses a plain combinational divider for its
  first eight bins, and its timing is not claimed.
- The following are this implementation's own choices: the numeric scaling,
  the segment length, the window comparison, the record format, the
  hit-store row width (taken as 32 lanes), the FIFO depths and which blocks
  share a clock.
- The published firmware splits into five clock regions. Here there are
  three.
- Resource use and 400 MHz timing are not claimed for this RTL.

## Simulation

Each testbench prints `TB_RESULT checks=N failures=M`:

| testbench | what it checks |
|---|---|
| `tb_line_drawer` | every bin of every hit against the direct formula; latency per segment |
| `tb_line_drawer_phi0` | every phi0 bin of every hit against a separate model of the phi0-loop rule; latency per segment; `r = 0` |
| `tb_accumulator` | bank-tagged writes, row reads and clear against a bit model |
| `tb_hit_store` | writes, counts, overflow, row reads, clear |
| `tb_peak_finder` | roads against a direct rule evaluation; scan clock count; random back-pressure |
| `tb_hit_recovery` | records against the reference model; clocks per road; event_done |
| `tb_async_fifo` | order and integrity across two clocks; full and empty |
| `tb_fhtf_core` | six events end to end, one clock (see below) |
| `tb_fhtf_top` | the same six events on three clocks at default sizes; also requires both FIFOs to fill |
| `tb_fhtf_phi0` | the six events with `LOOP_PHI0 = 1`, plus a second track in the same qA/pT row |
| `tb_fhtf_occupancy` | two full events, 200 hits on every layer, against the model and the 2000-clock goal |

The six events of the end-to-end tests cover:

- tracks on all eight layers;
- a track missing one layer;
- an empty event;
- a layer overflow;
- noise only.

These tests compare every output record with `tb/fhtf_ref_pkg.sv`, a
separate model that evaluates the line rule directly with 64-bit integers.
They also require that each of these happened at least once: two events in
flight, input held for a free bank, roads waiting for hit recovery, output
back-pressure and overflow.

Run a testbench with verilator, for example:

    verilator --binary --timing --assert -Irtl -Itb rtl/fhtf_pkg.sv \
        tb/fhtf_ref_pkg.sv rtl/*.sv tb/tb_fhtf_top.sv --top-module tb_fhtf_top
    ./obj_dir/Vtb_fhtf_top

Each runs in well under a second.
