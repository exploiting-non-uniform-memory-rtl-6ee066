# Segmented-bitline L1 cache with access-driven set remapping

In an ordinary SRAM cache, every read or write charges or discharges the
whole length of each bitline. That is true even when the accessed row sits
right next to the sense amplifiers. The bitline is a large share of an L1
cache's dynamic power.

This design cuts each bitline into segments with transmission-gate
*segmenters*. An access to a row near the sense amplifiers then swings only
a short piece of wire. An access to a far row goes through every segmenter
on the way, which adds delay and some power. Cache accesses are very uneven,
so a few sets get most of the traffic. The design exploits this by moving
the busiest sets into the segment nearest the sense amplifiers. The mapping
from sets to segments is kept in a small configuration register in front of
the row decoder. It is rebuilt from per-cluster access counters at context
switches and at fixed intervals.

The RTL is a complete, simulatable 16 KB, 4-way, 64-byte-line cache built
around this idea. Its defaults are 64 sets and eight bitline segments of
eight rows each.

## Bitline segments and segmenters

The data array has one row per set. A row holds 4 ways × 512 bits = 2048
bit columns. Each column is a bitline pair (BL, nBL), cut into `NSEG` equal
segments. Segment 0 is next to the precharge / sense / write circuitry.
Segmenter `sc[j]` joins segment `j` to segment `j+1`.

Segmenter operation in each cycle:

| phase | segmenters |
|---|---|
| precharge (no access) | all on, so the whole bitline is precharged |
| access to segment `s` | `sc[0..s-1]` on (the path from segment `s` to the sense amplifier); all others off, so the far part of the line is isolated |

For example, with four segments, a read of segment 0 turns every segmenter
off. A read of segment 3 keeps all three on. `segmenter_ctrl` computes this
thermometer code from the decoded physical segment.

`seg_bitline_array` models the bitlines at logic level. This is this
design's stand-in for the analog circuits:

- Both lines of a pair rest high (precharged).
- The selected cell pulls one of the two lines low (a wired AND).
- Segments joined by conducting segmenters form one net. The sense amplifier
  sees the net that contains segment 0.
- A column *resolves* only when exactly one of its two lines is low. The
  `sense_ok` output is the AND of this over all columns.
- A write drives the same net. A row whose segment is cut off from that net
  keeps its old contents.

So a wrong segmenter setting does not fail silently. A read from an isolated
segment is flagged, and a write to it is lost. The cache asserts that every
read hit resolves, and reports `sense_err` if one does not.

Not modelled: discharge voltage, delay, power, and reliability, which all
depend on the number of segmenters in the path.

### Unequal segments

Every segmenter between a far row and the sense amplifier slows the
discharge. At high clock rates that lowers the bitline swing, and with it
the read margin, of the far rows. Fewer segmenters can keep one short, cheap
segment near the sense amplifiers without penalising the rest of the array.

The `SEGMENTER_PRESENT` parameter (one bit per group boundary, default all
ones) leaves out segmenters. The array is still organised as `NSEG` equal
row groups, one cluster per group. At a boundary without a segmenter the two
groups are one continuous wire, and its `sc` bit reads as constant 1. With
the default eight groups of 8 rows:

| `SEGMENTER_PRESENT` | segments (rows) | segmenters passed by the farthest row |
|---|---|---|
| `7'h7f` (default) | 8 × 8 | 7 |
| `7'b0000001` | 8 / 56 | 1 |
| `7'b0000101` | 8 / 16 / 40 | 2 |
| `7'b0001111` | 8 / 8 / 8 / 8 / 32 | 4 |

The mapping logic is unchanged. The busiest clusters still go to the lowest
groups, which lie in the cheapest segments.

## Clusters and the remapping decoder

The 6-bit set index is split in two:

- **Cluster:** the top `log2(NSEG)` bits (3 bits at the default). The 8 sets
  of a cluster always share a segment.
- **Row in segment:** the remaining bits.

`seg_addr_decoder` uses the cluster number to select an entry of the
configuration register (`seg_config_reg`). That entry is the physical
segment. The physical row is `{segment, row-in-segment}`, and its wordline
is raised. The only logic added on the decoder path is this mux in front of
the segment bits. At `NSEG=4` it is two 4:1 muxes driven by A4 and A5.

Clustering is fixed to the index MSBs. The alternative, choosing any subset
of address bits, would put a crossbar into the decoder path.

The tag array (`tag_array`) is indexed by the same physical row, so a set's
tags always sit beside its data. The tag array is not segmented itself. It
only needs to know which rows form a segment, so that it can invalidate
them.

## Choosing the map: static, dcf and dncf

`cluster_counters` holds one saturating 32-bit counter per cluster. It is
incremented once per processor request to that cluster. The replay after a
refill is not counted again.

`remap_ctrl` chooses the map according to `map_mode`:

| mode | how the map is chosen | counters at a re-mapping |
|---|---|---|
| `MAP_STATIC` | Software loads a map, for example one from a profile run, with `sw_load`/`sw_map`. Hardware never changes it, and context switches are ignored. | untouched |
| `MAP_DCF` (dynamic, counter flush) | The clusters are ranked by count, and the rank-k cluster is mapped to segment k. | cleared, so each map reflects only the last interval |
| `MAP_DNCF` (dynamic, no counter flush) | Same ranking. | kept, so counts are cumulative since reset |

In the dynamic modes, the ranking uses the most-accessed cluster first. Ties
go to the lower cluster number. The rank of every cluster is computed in one
cycle with NSEG·(NSEG−1) comparators.

A dynamic re-mapping is requested in two ways:

- by a `context_switch` pulse;
- every `REMAP_INTERVAL` cycles (default 1,000,000). Set it to 0 to re-map
  only at context switches.

**Invalidation instead of copying.** A cluster that moves leaves its old
rows holding another cluster's data. Copying whole segments would cost far
more energy than it saves, so the affected lines are dropped instead. With
every map change, each physical segment whose owning cluster changed is
flagged on `inval_seg`. All valid bits of that segment's rows are then
cleared in the same cycle.

The cache is write-through with no write allocation, so no line is ever
dirty and dropping one never loses data. This policy is a choice of this
design. It is the simplest one under which invalidation is free of
write-backs.

**When the change takes effect.** A request to re-map waits until the cache
is idle. In that cycle the configuration register, the valid bits and (for
dcf) the counters all change together. `req_ready` is held low for that one
cycle.

## Cache interface and timing (`seg_bitline_cache`)

**Processor port.** Requests use a valid/ready handshake:
`req_addr` (byte address), `req_we`, a 64-bit `req_wdata` and `req_wstrb`.
Each request gets exactly one `resp_valid` pulse, with `resp_rdata` and
`resp_hit`.

| operation | latency |
|---|---|
| read hit | accepted at edge *n*, looked up in the next cycle, response registered at edge *n+2* |
| read miss | requests the whole line, fills the first invalid way or else the LRU way, replays the lookup, and responds with `resp_hit=0` |
| write | updates the array on a hit; always forwarded to memory; acknowledged once memory accepts it |

**Memory port.** `mem_req_valid/ready`, with `mem_req_we=0` for a
line-aligned line read or `1` for a word write with byte strobes. A refill
comes back on `mem_resp_valid` with the 512-bit `mem_resp_line`. Any latency
and any backpressure are allowed.

**Mapping port.**
- Inputs: `map_mode`, `context_switch`, `sw_load`, `sw_map`.
- Outputs: `cur_map` (the configuration register), `cluster_count`,
  `remap_done`, `inval_seg`.

**Observation.** `acc_valid` and `acc_segment` mark every data-array access
and its physical segment. `sc` shows the segmenter controls. These are what
a power estimate would count: each access weighted by the cost of its
segment.

**Address split** (defaults):
- tag: `[31:12]`
- set index: `[11:6]`, of which the cluster is `[11:9]`
- word in line: `[5:3]`

## Files

| file | contents |
|---|---|
| `rtl/sbc_pkg.sv` | default sizes, `map_mode_e` |
| `rtl/seg_bitline_cache.sv` | top: control FSM, refill and write-through paths, wiring |
| `rtl/seg_bitline_array.sv` | segmented data array |
| `rtl/segmenter_ctrl.sv` | SC generation |
| `rtl/seg_addr_decoder.sv` | cluster mux and wordline decoder |
| `rtl/seg_config_reg.sv` | cluster-to-segment map |
| `rtl/cluster_counters.sv` | per-cluster access counters |
| `rtl/remap_ctrl.sv` | ranking, triggers, invalidation mask |
| `rtl/tag_array.sv` | tags, valid bits, LRU |
| `tb/tb_<module>.sv` | self-checking test of each module |
| `tb/tb_seg_bitline_cache_full.sv` | the top at default parameters |
| `tb/cache_tb_body.svh` | stimulus and checks shared by the two top-level tests |
| `tb/tb_segment_activity.sv`, `tb/seg_activity_run.sv` | workload test: per-segment access distribution for 2, 4 and 8 equal segments and the three unequal layouts, under each mapping |

## Parameters

| parameter | default | notes |
|---|---|---|
| `NSETS` | 64 | 16 KB / (4 × 64 B) |
| `WAYS` | 4 | |
| `LINE_BYTES` | 64 | |
| `NSEG` | 8 | any power of two dividing `NSETS`; 2 and 4 are the other equal-segment configurations of interest |
| `ADDR_W`, `WORD_W` | 32, 64 | own choice |
| `CNT_W` | 32 | own choice, saturating |
| `REMAP_INTERVAL` | 1,000,000 | cycles between automatic re-mappings; 0 = context switches only |
| `SEGMENTER_PRESENT` | all ones | which of the `NSEG-1` group boundaries have a segmenter (unequal segments) |

## Simulating

Each test prints `TB_RESULT checks=N failures=M` and exits. For example, run
this from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl +libext+.sv \
    rtl/sbc_pkg.sv tb/tb_seg_bitline_cache.sv --top-module tb_seg_bitline_cache
./obj_dir/Vtb_seg_bitline_cache
```

Every module in `rtl/` also lints cleanly with `verilator --lint-only -Wall`.
The one exception is a warning that `rst_n` is used both as an asynchronous
reset and in an assertion's `disable iff`, which is intended.

## Verification

The block tests compare each module with models written independently in
the testbench:
- the expected thermometer codes;
- remapped rows and wordlines for random permutations;
- counter values;
- the ranking, computed by a sort;
- an LRU recency list;
- a reference memory, including cut-path reads and writes.

The top-level test (`cache_tb_body.svh`) runs four phases:
1. dcf with a context switch;
2. dcf with a new hot cluster, followed by interval re-mappings;
3. dncf;
4. a static map loaded by software.

Its synthetic workload sends about 60 % of accesses to one hot cluster.
On every request it checks:
- read data against a memory model;
- read-hit latency (2 cycles);
- that the segment used matches `cur_map`;
- that the SC code matches that segment;
- that nothing went unresolved.

At every re-mapping it checks:
- the ranking;
- counter flush (dcf) or retention (dncf);
- that every invalidated segment really lost its valid bits;
- that the hot cluster ends up in segment 0.

The test counts every mechanism and fails if one never happened: hit, miss,
eviction, write hit and write miss, memory stall, re-map stall, and
context-switch, interval, dcf, dncf and static re-mappings.

`tb_seg_bitline_cache_full` runs the same test with no parameter overrides.
It covers two full 1,000,000-cycle intervals, about 2.5 million cycles, in a
few seconds.

## How much the remapping moves traffic

`tb_segment_activity` runs one synthetic skewed stream through caches with
2, 4 and 8 equal segments and through the three unequal layouts above. Each
cache gets four mappings.

The stream has 6000 requests:
- three hot sets take about 20 % each;
- six warm sets share 15 %;
- the rest is spread over all sets;
- the hot and warm sets change halfway through.

The four mappings are:
- the identity map;
- a static map, profiled on a first pass of the same stream;
- dcf;
- dncf.

dcf and dncf re-map at a context switch every 500 requests.

The figure of merit is where the requests are served. The *mean segment
number* counts the segmenters an average access passes through; lower means
less bitline switched. Typical results for one seed:

| segments | mapping | share in segment 0 | mean segment |
|---|---|---|---|
| 8 | identity | 4 % | 4.25 |
| 8 | static (profiled) | 25 % | 2.32 |
| 8 | dcf | 22 % | 2.21 |
| 8 | dncf | 24 % | 2.49 |
| 4 | identity | 10 % | 1.83 |
| 4 | static / dcf / dncf | 28–31 % | 1.17–1.23 |
| 2 | identity | 41 % | 0.60 |
| 2 | static / dcf / dncf | 59–61 % | 0.39–0.41 |
| 8 / 56 | identity → static / dcf / dncf | 4 % → 21–26 % | 0.95 → 0.74–0.79 |
| 8 / 16 / 40 | identity → static / dcf / dncf | 4 % → 23–25 % | 1.71 → 1.07–1.23 |
| 8 / 8 / 8 / 8 / 32 | identity → static / dcf / dncf | 5 % → 22–26 % | 3.23 → 1.91–2.18 |

Neither dynamic scheme needs a profile. dcf follows the phase change
fastest: it has the lowest mean segment at eight segments. dncf keeps the
whole history, so it still favours the first phase's clusters for a while.

The test checks these orderings only for 4 and 8 segments and for the
unequal layouts:
- all three mappings give a lower mean segment than identity;
- static and dcf also give a larger segment-0 share.

These numbers only show how the access distribution shifts. Turning them
into power needs per-segment energies for a particular process and bitline
length, and the RTL does not model those.

## Limits and departures

- **Bitline physics.** Power, delay, discharge voltage, reliability and the
  100 MHz / 500 MHz behaviour are outside a logic model. The array only
  captures connectivity: which segments share a net with the sense
  amplifier.
- **Precharge phase.** In the circuit, precharge happens while the clock is
  low. Here it is a signal that is high whenever the array is not being
  accessed. Accesses are whole-cycle events on the rising edge.
- **Unequal segments on a group grid.** Unequal layouts are built from
  equal row groups, so a segment boundary can only fall on a group
  boundary, which is a multiple of `NSETS/NSEG` rows. The 8-row grid of the
  default covers 8/56, 8/16/40 and 8/8/8/8/32.
- **Fixed clustering.** Only the MSB mapping is built. Clustering with
  arbitrary address bits, and an ideal per-set ("oracle") clustering, are
  not.
- **Own choices.** The tag array, LRU replacement, the write-through policy,
  the handshakes, the widths, and the rule that re-mapping waits for an
  idle cycle.
