# Pipelined hierarchical-search CAM

A content-addressable memory (CAM) compares a search word against every stored
word at once and returns the addresses that match. Done the conventional way,
every search charges and discharges every match-line and toggles every
search-line in the array, so energy per search grows with the size of the array.
This design uses two ideas to switch far less of the array on:

* **Pipelined match-lines.** Each 144-bit word is compared in five pieces, one
  per clock cycle: first 8 bits, then four pieces of 34 bits. A word goes on to
  its next piece only if every earlier piece matched. With random contents
  almost every word already differs in the first 8 bits (a random word matches
  8 given bits with probability 1/256). So the wide 34-bit pieces of only a
  handful of words are ever switched on.
* **Hierarchical search-lines.** The search word is sent across the array on
  *global* search-lines. In silicon these swing only a small voltage. Every
  block of 64 words has its own short *local* search-lines, with an amplifier
  that copies the global value. That amplifier fires only when at least one of
  the block's 64 words is still in the running for that piece. Blocks whose
  words have all dropped out keep their local lines still.

The RTL is a synthesizable, cycle-accurate logic model of this organisation.
The default size is 1024 words × 144 bits. It takes one search per cycle and
gives the result five cycles later: a bit per word, plus the lowest matching
address. The electrical side is not modelled: low-swing signalling,
precharge-low sensing with a current source, the 0.45 V global supply. What the
RTL keeps is the logic those circuits produce. It also shows which parts of the
array are active in each cycle: the `lsl_active` output reports every local
block whose amplifiers fire.

## Array organisation

```
             segment 0   segment 1   segment 2   segment 3   segment 4
  bits        [7:0]       [41:8]      [75:42]     [109:76]    [143:110]
            +---------+-----------+-----------+-----------+-----------+
  block 0   |  64x8   |  64x34    |  64x34    |  64x34    |  64x34    |
  (64 rows) |         |           |           |           |           |
            +---------+-----------+-----------+-----------+-----------+
  block 1   |   ...   |   ...     |   ...     |   ...     |   ...     |
    ...     +---------+-----------+-----------+-----------+-----------+
  block 15  |         |           |           |           |           |
            +---------+-----------+-----------+-----------+-----------+
               ^ gsl0     ^ gsl1      ^ gsl2      ^ gsl3      ^ gsl4   global search-lines
```

One tile of this grid is a `cam_block`. It is 64 words tall and one segment
wide. It holds a local search-line receiver (`lsl_receiver`) and 64
`ml_segment`s. An `ml_segment` is one word's piece of match-line: the stored
bits, the XOR compare, the sense decision, and the flip-flop at the segment's
end. Each segment column has one `gsl_driver`, the flip-flop that drives its
global search-lines. Segment 0 holds the low bits of the word.

| module | role |
|---|---|
| `pipelined_cam` | top: write port and valid bits, stage enables, segment columns, result |
| `gsl_driver` | global search-line flip-flop of one segment, with the skew delay of its stage |
| `cam_block` | one 64-row × one-segment tile with its local search-lines |
| `lsl_receiver` | falling-edge receiver that drives the local search-lines when the tile is enabled |
| `ml_segment` | stored bits, compare, sense and segment flip-flop of one word's segment |
| `match_encoder` | lowest matching address, hit and multiple-match flags |
| `cam_pkg` | default sizes and the segment width/offset functions |

## A search through the pipeline

This is the part that needs the most care. Call the rising edge that samples
`search_valid`/`search_key` edge *t0*. Segment *k* of that search is handled
in cycle *t0+k*, the cycle after edge *t0+k*:

| edge / phase | what happens for the search sampled at t0 |
|---|---|
| rising t0 | `gsl_driver` 0 loads key bits [7:0]. Segment k's slice enters a k-deep skew chain. Stage-0 enables = entry valid bits |
| falling, cycle t0 | segment-0 receivers copy the global lines onto the local lines. The sense result for segment 0 settles |
| rising t0+1 | segment-0 flip-flops capture *valid ∧ match[7:0]*. These are the enables of segment 1. `gsl_driver` 1 loads bits [41:8] |
| falling, cycle t0+1 | a segment-1 block's receiver fires only if one of its 64 enables is set |
| rising t0+k+1 | segment-k flip-flops capture *enable ∧ match of segment k* |
| rising t0+5 | segment-4 flip-flops hold the full match vector. `result_valid` is high and `match_addr` is valid |

So the latency is five cycles (N_SEG) and the throughput is one search per
cycle. Five searches can be in flight at once, each in a different segment.
The skew chains in `gsl_driver` delay segment *k*'s bits by *k* cycles. That
way each segment sees the bits of the search whose enables have just arrived.

A segment that is not enabled reads as a mismatch, whatever its stored bits
and local lines hold. This models the precharge-low sense scheme: a
match-line starts each cycle at ground, and only an enabled line with no
mismatching cell collects enough charge to trip its sense amplifier. This
gating makes the design correct even though a gated block's local
search-lines hold stale data from an earlier search.

The global flip-flop loads at the rising edge and the receivers sample at
the falling edge. So the global lines have half a cycle to settle. In the
circuit this design follows, both are clocked at the start of the cycle, and
the receiver takes the value loaded one cycle earlier. The order of events is
the same; only the settling time differs.

## Local search-line gating

`lsl_receiver` has a parameter `HIER`. With `HIER=1`, the receiver's enable
is the OR of its block's 64 segment enables. When that enable is low, the
local lines keep their value and do not toggle. With `HIER=0`, the lines
follow the global lines every cycle. This is the conventional
(non-hierarchical) arrangement, and its `lsl_active` bit is constantly 1.

The top-level `HIER_MASK` picks the scheme per segment. The default
`5'b11110` gates segments 1–4 and leaves segment 0 conventional. Segment 0
is enabled for every valid word on every search, so gating it would save
nothing. A test-chip arrangement gates only the second and third segments,
so the two schemes can be compared side by side. That is
`N_ENTRIES=256, HIER_MASK=5'b00110`.

With random contents, an expected 1024/256 = 4 words survive segment 0 per
search. That is at most 4 of the 16 blocks in segment 1, and almost no
blocks beyond it. The end-to-end tests print these counts per segment.

## Interface of `pipelined_cam`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `search_valid`, `search_key` | in | 1, 144 | one search per cycle, sampled at the rising edge |
| `wr_en`, `wr_addr`, `wr_data`, `wr_entry_valid` | in | 1, 10, 144, 1 | write one word and set its valid bit, or clear the valid bit (`wr_entry_valid=0`) |
| `result_valid` | out | 1 | the search sampled N_SEG edges earlier has its result |
| `match_vec` | out | 1024 | one bit per word |
| `match_hit`, `match_multi`, `match_addr` | out | 1, 1, 10 | any match, more than one match, lowest matching address (0 if none) |
| `lsl_active[k][b]` | out | 5×16 | local search-lines of segment k, block b are driven in this cycle |

Reset clears the valid bits, the pipeline and the local search-lines. Stored
words are not reset, just as an SRAM is not. A write takes effect at the
next rising edge. A search already in the pipeline compares its remaining
segments against the new data. Drain the pipeline (N_SEG idle cycles)
before writing if that matters.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `N_ENTRIES` | 1024 | words; must be a multiple of `BLOCK_ROWS` |
| `N_SEG` | 5 | match-line segments = pipeline stages = latency |
| `FIRST_SEG_W` | 8 | width of segment 0 |
| `SEG_W` | 34 | width of each later segment (word = 8 + 4×34 = 144 bits) |
| `BLOCK_ROWS` | 64 | words sharing one set of local search-lines |
| `HIER_MASK` | `5'b11110` | bit k set: segment k has gated local search-lines |

## What is modelled and what is not

Everything in the table above is logic and is in the RTL. The following are
electrical and are represented only by their logic result:

* the low-swing (0.45 V) global search-lines and their separate supply;
* the precharge-low match-line sensing. In silicon it uses a current source
  whose current scales with segment length, and a threshold sense amplifier;
* energy itself. `lsl_active` and the segment enables show *what* switches,
  and a power model can weight these counts.

The following are this design's own choices, not fixed by the
architecture: the write port and per-word valid bits; the skew chains;
lowest-address priority and the multiple-match flag; the reset behaviour;
and the default `HIER_MASK`. The cycle time (7 ns in 1.8 V 180 nm CMOS for
the full-custom version) is a property of the circuit and the process, not
of this RTL.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`:

* `tb_gsl_driver`: skew of 0 and 3 cycles against a history of applied keys.
* `tb_lsl_receiver`: gated and conventional receivers, with random enables.
* `tb_ml_segment`: match, single-bit mismatch in every position, and disabled segment.
* `tb_cam_block`: 64-row tile with duplicate words, checking the flip-flops
  and the receiver activity.
* `tb_match_encoder`: 1024-bit vectors and every seventh 16-bit vector.
* `tb_pipelined_cam`: end to end in the 256-word test-chip arrangement,
  3000 search slots.
* `tb_pipelined_cam_full`: end to end at the default size, 1500 search slots.
* `tb_activated_blocks`: sweeps the number of fired gated blocks from 0 to 8
  in the test-chip arrangement.

The two end-to-end testbenches share `tb/cam_driver.sv`. It fills the array
with uniformly random words, some duplicated and some invalid. It then
searches back to back, with bubbles. Keys are stored words, stored words
with a bit flipped in a chosen segment, random words, and words of invalid
entries. A write phase runs in the middle. A word-level reference model
predicts:

* the match vector, flags and address of every search;
* the five-cycle latency;
* the exact `lsl_active` pattern of every cycle.

The driver also counts each mechanism and fails if one never occurred:
single, multiple and no match; drop-out in each of the five segments;
gated and fired blocks; bubbles; back-to-back searches; writes; and
invalidations.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb --top-module tb_pipelined_cam_full \
    rtl/cam_pkg.sv tb/tb_pipelined_cam_full.sv -o sim
./obj_dir/sim
```

Replace the top module with any other testbench name. The full-size run
takes well under a minute. `rtl/cam_pkg.sv` must come first, because the top
imports it. The other files are found through `-I`.
