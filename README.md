# Readout Driver logic for high-rate cathode strip chambers

A cathode strip chamber (CSC) in a forward muon spectrometer is read out at
every first-level trigger (LVL1 Accept, up to 100 kHz). Each chamber has four
layers of 192 precision strips and 192 transverse strips. Every strip
delivers four 12-bit samples taken 50 ns apart. That is far more data than
the event carries: a muon leaves a small group of strips in each of the four
layers, and neutrons leave isolated hits in a single layer. The Readout Driver
(ROD) reduces the raw samples to a short list of clusters before sending the
event to the data acquisition system. It does this in three steps:

1. **Sparsification.** Per ASM board (192 strips), keep only strips above
   threshold and their neighbours. Group them into clusters, and keep a cluster
   only if its peaking time lies in a 35 ns wide window.
2. **Neutron rejection.** Per chamber, keep a cluster only if a cluster of
   another layer overlaps it in strip position.
3. **Event building.** Send a header, the surviving clusters of both chambers,
   and a trailer on the Readout Link.

The ROD also runs the cell bookkeeping for the switched-capacitor analog
memories (SCA) on the chambers. It decides which cell stores each sample, and
which cells are read out after a trigger.

In the original system these steps are software on DSP modules. Here every
step is synchronous logic. The same structure is kept: ten sparsification
units (SPU), two rejection units (RPU), one event builder (the host
processing unit's data path, HPU), the Data Exchange bus and the
interconnect. The top module is `rod_top`. It serves one ROD, meaning two
chambers and ten ASM boards.

## Clock and timing

There is one clock, the 80 MHz backplane line clock. `bc_en` is high on every
second cycle and marks the 40 MHz bunch crossing. That is also the rate of
the G-Link words. `l1a`, `bcid` and the link words are sampled on cycles with
`bc_en` high. The analog memory is written once every 50 ns, which is every
second bunch crossing. Reset is asynchronous and active low.

| Step                          | Time per event                     |
|-------------------------------|------------------------------------|
| Link transfer, one ASM board  | 384 word periods = 9.6 µs          |
| SPU scan                      | 192 channels + about 8 cycles = 2.5 µs |
| RPU search                    | one cycle per stored cluster       |
| Event builder                 | 4 + 2 per cluster + 2 words        |

The link transfer is the slowest step. It fits the 10 µs between triggers at
100 kHz. The SPU input is double buffered, so an SPU can receive event n+1
while it scans event n.

## From G-Links to backplane lines (`tm_link_mux`, `rod_interconnect`)

Each ASM board sends two 16-bit words (links A and B) per bunch crossing,
which is 160 Mbyte/s. The Transition Module puts them on 17 backplane lines
at twice the word rate:

* Lines 15:0 carry link A in the first half of the word period and link B in
  the second half.
* Line 16 is high during the first half of every valid word pair. It frames
  the two halves, and its absence marks idle.

Ten boards × 17 lines = 170 lines. `rod_interconnect` routes any of its 192
input lines, or any of 221 test lines (17 per DSP slot), to each of the
13 × 17 DSP-slot input lines. It has one source register per output line and
one register stage. After reset, TM line i goes to slot line i for the first
170 lines. Writing a source number ≥ 413 turns an output line off.

## Event format on the links

The links use a format chosen for this design:

* An event is 384 word periods long.
* In each word period, link A carries channels 0..95 and link B carries
  channels 96..191.
* Each channel sends its four samples in time order.
* A sample is in bits 11:0 of the 16-bit word.

`gpu_input` rebuilds the 32-bit word `{B, A}` and writes whole events into a
buffer. The default is `NUM_BUFS = 2` events. Afterwards the SPU reads one
channel (four samples) per cycle. If no buffer is free when an event starts,
the whole event is dropped and counted. It is never half-written.

## Sparsification unit (`spu`, `spu_threshold`, `spu_cluster`)

This is the core of the data reduction. One channel enters per cycle.

**Threshold and timing cut (`spu_threshold`).** With samples s0..s3:

```
pk   = max(s1, s2)
hit  = pk > thr[ch]  &&  pk > s0  &&  pk > s3
flag = hit(ch-1) | hit(ch) | hit(ch+1)      (same layer only)
corr = ((s - ped[ch]) * gain[ch]) >>> 12    (each sample, gain 4096 = 1.0)
```

The peak falls on s1 or s2 depending on the trigger phase, so the threshold
is applied to the larger of the two. Requiring that value to exceed both
outer samples is the 75 ns timing cut. The threshold compares raw values, so
the threshold table includes the pedestal. A channel's flag depends on the
next channel, so the unit holds one channel back and outputs it one cycle
later.

**Clusters and peaking time (`spu_cluster`).** A cluster is a run of
flagged channels in one layer. The channel with the largest `max(c1, c2)` is
the peak (the first one on a tie). With k = 2 if c2 > c1 and k = 1 otherwise,
a parabola through c[k-1], c[k], c[k+1] gives the peak time:

```
t = 50*k + 25*(c[k+1] - c[k-1]) / (2*c[k] - c[k-1] - c[k+1])   [ns]
```

The division truncates toward zero. The offset is 0 if the denominator is
≤ 0. t is clamped to −512..511. A cluster is kept only if t lies in a window 35 ns wide centred on 75 ns (58 ≤ t ≤ 92 with integer t). Kept
clusters leave as a `cluster_t` record with these fields: axis, layer,
first/last/peak strip, amplitude c[k], and t in ns.

**Layers.** A precision SPU serves one layer of 192 strips (`LAYER_BASE`
gives the layer number). The transverse SPU (`AXIS = AXIS_TRANS`,
`STRIPS_PER_LAYER = 48`) serves four layers of 48 strips. Clusters and
neighbour flags never cross a layer boundary.

**Flow.** A scan starts only when the output FIFO has room for the largest
possible number of clusters plus the end record (STRIPS/2 + 5 entries; the FIFO holds STRIPS/2 + 8). This means a scan never stalls
halfway. After the clusters, the SPU writes an end-of-event record
(`is_end = 1`).

The tables are written through `cfg_we/cfg_sel/cfg_addr/cfg_data`, with
`cfg_sel` 0 = threshold, 1 = pedestal, 2 = gain. In `rod_top`,
`spu_cfg_unit` selects the SPU. Reset values are threshold `DEFAULT_THR`
(100), pedestal 0 and gain 1.0.

## Data Exchange and neutron rejection (`dx_arbiter`, `rpu`)

Each chamber's five SPUs share one `dx_arbiter`. It is a round-robin
valid/ready arbiter, and the granted record moves when valid and ready are
both high. The RPU stores up to `MAX_CLUSTERS` (128) records until it has seen
five end-of-event records. It then takes one stored cluster per cycle and
compares it in parallel with all the others. A cluster is kept if another
cluster has the same axis, lies in a different layer, and has a strip range
[first, last] that intersects its own, widened by `OVERLAP_TOL` (0). A
muon crossing all four layers survives. A neutron hit alone in one layer does
not. Kept records go to an output FIFO, followed by `evt_done`. Clusters
beyond `MAX_CLUSTERS` are counted and dropped.

**Track monitoring.** During the search the RPU also records the tracks it
sees, which is what chamber efficiency is measured with. A kept cluster with
no overlapping partner earlier in arrival order starts a track. That track
consists of the cluster and every cluster that overlaps it. For each track,
`n_tracks[axis]` counts up by one. `trk_layer_hits[axis][layer]` counts up by
one for each layer in which the track has a cluster, so
`trk_layer_hits / n_tracks` is the per-layer efficiency. The grouping uses
direct overlaps with the first cluster only, and is not a full transitive
closure. With partially overlapping chains, the count therefore depends on
the arrival order from the Data Exchange.

## Event fragment on the Readout Link (`hpu_event_builder`)

Every LVL1 Accept pushes `{L1ID, BCID}` into a queue. When the queue is not
empty and both RPUs have signalled `evt_done`, the builder sends the fragment
below on a 32-bit valid/ready port. `rol_ctrl` marks header and trailer words.

| Word          | Contents                                                   |
|---------------|------------------------------------------------------------|
| header 0..3   | `0xEE1234EE`, `SOURCE_ID` (0x00690000), `{8'h0, L1ID}`, `{20'h0, BCID}` |
| per cluster 0 | `{4'hC, axis, layer[1:0], 1'b0, peak[7:0], first[7:0], last[7:0]}` |
| per cluster 1 | `{amp[15:0], 6'h0, t_ns[9:0]}` (t signed)                  |
| trailer 0..1  | `{16'h0, status}`, `{16'h0, number of cluster words}`      |

Clusters of RPU 0 (chamber 0) come first, then those of RPU 1. Status bits:

* 0: an SPU dropped an event
* 1: an RPU overflowed
* 2: the SCA controller refused a trigger
* 3: an SCA sample found no free cell
* 4: the builder's trigger queue overflowed

## SCA cell management (`sca_controller`)

The analog memory has `N_CELLS` = 144 cells. Every 50 ns the controller takes
a cell from a free-list FIFO and writes it into a latency line of
`LATENCY_SAMPLES` + 1 = 51 entries (2.5 µs). A cell leaving the latency line
goes back to the free list, unless a trigger holds it.

On an LVL1 Accept, the four cells written 50, 49, 48 and 47 samples earlier
(oldest first) are marked for readout. This needs all four to be valid, so
the first samples after reset cannot be triggered. Each cell has a reference
count, so overlapping triggers can share cells. Queued triggers are read out
one after the other. Each readout sends the four cell addresses with the read
strobe and then waits `READ_BC` (400) crossings for the boards to ship the
data. After that the cells are released.

The 17-bit control word goes out every crossing:

* bit 16: read strobe
* bits 15:8: read cell
* bits 7:0: cell written at this sample

`busy` rises when the trigger queue is full or few free cells remain.

## Where this design departs from the described system

* The SPU, RPU and HPU are logic, not DSP programs. The SPU handles one
  channel per clock instead of four channels per four DSP clocks.
* The following are this design's own choices, not given by the system
  description:
  * the link event format and the 17-line backplane format
  * the cluster record and the fragment header/trailer layout (the marker
    word follows common ATLAS practice)
  * the SCA control word layout
  * the cell count and the 2.5 µs latency
  * the buffer depths and the window centre of 75 ns
* The timing window is fixed. It is not moved with the trigger phase relative
  to the 50 ns sampling clock.
* These parts of the full system are not built: monitoring histograms
  beyond the RPU track counters; the HPU's VME command handling,
  histogram and error-count services; and the VME, TIM, crate-controller,
  G-Link and S-Link hardware. The latter appear only as ports.
* `rod_interconnect` is a single router. The real system builds it from an
  array of FPGAs.

## Files

`rtl/csc_pkg.sv` holds shared constants and the `cluster_t`/`axis_e` types.
`rtl/sync_fifo.sv` is the first-word-fall-through FIFO that all blocks use.
Each block has a self-checking testbench `tb/tb_<module>.sv`. The testbenches
share a reference model of the clustering algorithm in `tb/tb_ref_pkg.sv`.
`tb/tb_rod_top.sv` runs the full-size ROD with default parameters and checks
the Readout Link output against the reference model. It covers four events
with muon tracks, neutron hits, out-of-time pulses, Readout Link back-pressure
and re-routing through the test lines. It also checks the SCA read strobes.

Simulating with Verilator, for example the top-level test:

```
verilator --binary --timing -Wno-fatal -Irtl -Itb --top-module tb_rod_top \
    rtl/csc_pkg.sv $(ls rtl/*.sv | grep -v csc_pkg) \
    tb/tb_ref_pkg.sv tb/tb_rod_top.sv
./obj_dir/Vtb_rod_top
```

Every testbench ends with a line `TB_RESULT checks=N failures=M`. The
full-size top-level test takes about a minute to build and run.

## Parameters worth changing

| Module            | Parameter                                   | Default         |
|-------------------|---------------------------------------------|-----------------|
| `rod_top`         | `N_ASM`, `STRIPS`, `DEFAULT_THR`            | 10, 192, 100    |
| `spu`             | `NUM_BUFS`, `T_CENTER_NS`, `WINDOW_NS`      | 2, 75, 35       |
| `rpu`             | `MAX_CLUSTERS`, `OVERLAP_TOL`               | 128, 0          |
| `sca_controller`  | `N_CELLS`, `LATENCY_SAMPLES`, `READ_BC`, `TRIG_DEPTH`, `BUSY_LEVEL` | 144, 50, 400, 8, 8 |
| `hpu_event_builder` | `SOURCE_ID`, `TRIG_DEPTH`                 | 0x00690000, 16  |
