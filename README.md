# 18 × 64 NOR CAM with pipelined match lines and hierarchical search lines

A content-addressable memory compares a search key against every stored word
at once, and most of its energy goes into that: every match line is
precharged and discharged, and every search line toggles, on every search.
This design cuts both costs for an 18-bit × 64-word NOR CAM:

* **Pipelined match lines.** Each 18-bit word is split into three 6-bit
  segments evaluated one after the other, one clock cycle each. A segment is
  only sensed if all segments before it matched. Most stored words differ
  from a key in their first six bits, so for most words only the first
  segment does any work.
* **Hierarchical search lines.** The 64 words form 8 *layers* of 8 words.
  The key travels on global search lines; each layer has its own local
  search lines per segment, driven from the global ones by receivers. A
  layer turns on the local search lines of segment 2 (or 3) only if at least
  one of its 8 words is still matching after segment 1 (or 2). Layers with
  no candidate keep their later search lines quiet.

The cost is latency: a search result appears 3 cycles after the key. The
pipeline accepts a new key every cycle, so throughput is one search per
cycle (200 MHz is the target clock).

## Array organisation

```
cam_18x64                       18 bits x 64 words
 ├─ gsl_pipe                    key skew register (global search lines)
 └─ ml_layer  x8                18 bits x 8 words
     ├─ low_swing_receiver x3   local search-line driver, one per segment
     └─ ml_row  x8              one 18-bit word = one match line
         └─ ml_stage x3         6-bit segment: 6 cells + sense amp + flip-flop
             ├─ cam_cell x6     NOR CAM bit
             └─ mlsa            match-line sense amplifier
```

Key bits map to segments least-significant first: segment 1 compares
bits [5:0], segment 2 bits [11:6], segment 3 bits [17:12]. Word `a` lives in
layer `a / 8`, line `a % 8`.

## How a segment decides

`cam_cell` stores a bit *D* and sees a dual-rail search line (*SL*, *SL̄*).
It has two pull-down paths on the match line, (*SL*, *D̄*) and (*SL̄*, *D*),
so it discharges the line exactly when the searched bit differs from the
stored bit. With both rails low — a receiver that is switched off — neither
path conducts.

In `ml_stage` the six cells share one match-line segment, a wired-AND: it
stays high only if no cell discharges it. `mlsa` turns it into a logic
level, but only when the segment is enabled and not in precharge:

| pre_n | enable | match line | sense output |
|-------|--------|------------|--------------|
| 0     | x      | x          | 0            |
| 1     | 0      | x          | 0            |
| 1     | 1      | 0 (miss)   | 0            |
| 1     | 1      | 1 (match)  | 1            |

The sense output is registered at the rising edge. The registered value is
the segment's result *and* the enable of the next segment (Enable2,
Enable3 in `ml_row`). Segment 1's enable (Enable1) is the search request.

## Timing of a search

Because segment *s* works *s* cycles after segment 1, it must see the key
bits of the search that entered *s* cycles earlier, not those of the newest
one. `gsl_pipe` delays the segment-2 bits by one cycle and the segment-3
bits by two, and delays the search-valid flag by three:

```
edge      t           t+1           t+2           t+3
key       K presented
seg 1     compares K[5:0]  -> stage_out[*][0]
seg 2                 compares K[11:6] -> stage_out[*][1]
seg 3                               compares K[17:12] -> stage_out[*][2] = match
match_valid                                         1 (for one cycle)
```

`search_en`/`search_key` are sampled at edge *t*; `match` and
`match_valid` are valid after edge *t+3*. A new key may be presented at
every edge.

## Layer gating (hierarchical search lines)

In `ml_layer`, the receiver of segment 1 is on whenever a search is
presented. The receiver of segment *s+1* is on when any of the layer's 8
registered segment-*s* results is 1. Those results come from the same
flip-flops that enable the next segment, so receiver enable and segment
enable change at the same edge. When a receiver is off, the layer's local
search lines for that segment stay at 0/0. Nothing is lost: every word of
that layer is already disabled in that segment and reports 0.

The `lsl_en` output (8 layers × 3 segments) shows which receivers are on in
the current cycle. `stage_out` (64 words × 3 segments) shows which segments
produced a match. Together they show how much of the array a key actually
activated.

## Ports of `cam_18x64`

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk` | in | 1 | clock |
| `rst_n` | in | 1 | synchronous active-low reset of the pipeline flip-flops (stored words are kept) |
| `pre_n` | in | 1 | precharge, active low: forces every sense output to 0 |
| `search_en` | in | 1 | a key is presented this cycle |
| `search_key` | in | 18 | the key |
| `match` | out | 64 | per-word match of the key presented 3 cycles ago |
| `match_valid` | out | 1 | `match` belongs to a search |
| `we`, `waddr`, `wdata` | in | 1, 6, 18 | write one word at the rising edge |
| `stage_out` | out | 64×3 | registered per-word, per-segment results |
| `lsl_en` | out | 8×3 | per-layer, per-segment receiver enable |

A write takes effect at the edge that samples it. Searches already in the
pipeline see the new contents in the segments they evaluate after that
edge.

## What is modelled, and what is this design's own

The array organisation (18 × 64, three 6-bit segments, 8 × 8 hierarchy),
the NOR cell's comparison, the sense-amplifier rules, the segment-enables-
next-segment chaining and the gating of local search lines follow the
original circuit description. The following are choices made here, where
that description is silent:

* the key skew register, which lets a new search start every cycle;
* the write port, and the absence of a read port and of a priority encoder
  (the output is the raw match vector);
* the order in which key bits map to segments;
* synchronous reset of the pipeline flip-flops; stored words have no reset;
* the rule that turns on a layer's later receivers: the OR of the layer's
  results from the previous segment;
* both local rails held low while a receiver is off.

The original is a transistor-level circuit in 28 nm CMOS at 0.9 V. This RTL
keeps only its logic. Not represented:

* the low-swing global search lines (biased at 0.5 V), and the clocked
  sense stage and latch of the receiver. `low_swing_receiver` here is a
  gated dual-rail driver.
* precharge as a phase of each clock cycle. `pre_n` is a single input that
  forces the sense outputs low.
* the keeper and sensing circuit of the sense amplifier. `mlsa` is
  combinational logic.
* power. The circuit's reported figures are about 0.54 µW per cell and
  78 µW for an 18 × 8 layer at 200 MHz. Here, power savings show up only
  as activity on `stage_out` and `lsl_en`.

## Verification

Each module has a self-checking testbench in `tb/`. Each testbench prints
`TB_RESULT checks=N failures=M` and stops itself after a fixed number of
cycles if it hangs.

* `tb_cam_cell`, `tb_mlsa`, `tb_low_swing_receiver`: exhaustive truth tables.
* `tb_ml_stage`: random words, keys, enables and precharge. Checks the
  one-cycle latency.
* `tb_ml_row`: single keys that agree with 3, 2, 1 and 0 leading segments of
  the stored word, then back-to-back random keys with writes. A word-level
  reference model checks all three segment results every cycle.
* `tb_ml_layer`: a reference pattern whose eight words match 3, 2, 1, 0, 1,
  0, 1, 0 leading segments, then random traffic. Receiver enables are
  checked every cycle.
* `tb_cam_18x64`: the full 18 × 64 array at its default parameters. It runs
  the four single-word patterns (with the 3-cycle latency checked), then
  20 000 cycles of random back-to-back searches, writes and precharge
  cycles against a reference model. The test fails if any of these never
  happened: segment 2 or 3 switched off, a layer's receivers off during a
  search, no-match / single-match / multi-match searches, back-to-back
  searches, writes during a search, precharge suppressing a match.

* `tb_cam_activity`: the activity that sets the power. On the full array it
  runs the four single-word patterns and the fixed 8-word pattern. For each
  segment it counts the enabled sense amplifiers and the layers with
  receivers on. Expected counts: 64/1/1, 64/1/1, 64/1/0 and 64/0/0 for
  keys that match 3, 2, 1 and 0 segments of one word, and 64/5/2 amplifiers
  with 8/1/1 layers for the 8-word pattern.

Simulating with Verilator, for example the full array:

```
verilator --binary --timing --assert rtl/cam_pkg.sv rtl/*.sv tb/tb_cam_18x64.sv \
          --top-module tb_cam_18x64 -Mdir obj
./obj/Vtb_cam_18x64
```

This also works for any other testbench (`--top-module tb_<module>`).

## Changing the size

Shared sizes are in `rtl/cam_pkg.sv`. `cam_18x64` takes `ROWS` (words),
`LROWS` (words per layer), `NSTAGES` and `SBITS` (segments and bits per
segment; the key is `NSTAGES*SBITS` bits) as parameters. `ROWS` must be a
multiple of `LROWS`, and `NSTAGES` must be at least 2. Search latency equals
`NSTAGES` cycles.
