# Parallel multiresolution motion estimation for H.264 at 1080p

This is an H.264/AVC luma motion-estimation engine sized for 1080p at 60
frames per second, with a ±128 search range. A wide search usually means a
large reference buffer and a lot of memory traffic. This design avoids that
with three ideas.

1. **Parallel multiresolution integer search (PMRME).** There are three
   search levels, and all of them run at the same time, not one after the
   other:
   - a fine level, full resolution, ±8 around the motion-vector predictor;
   - a coarse level, 2:1 subsampled, covering ±32;
   - a coarser level, 4:1 subsampled, covering ±128.

   Most true motion vectors lie near the predictor. The fine level is a full
   search there. The coarse levels only need to catch the rare large motions.
   The coarse levels are centred on (0,0), so along a macroblock row their
   windows just slide: each new macroblock brings in a narrow strip of new
   columns.
2. **Mode filtering.** The integer stage passes only two partition modes to
   the fractional stage, not all 41 partitions. That is 3 to 18 motion
   vectors to refine.
3. **Single-iteration fractional search (SIFME).** Each partition is refined
   in one step that tests six quarter-pel candidates in parallel. The
   conventional method uses two steps of nine points each.

The two stages form a macroblock pipeline. The level-0 reference data is
shared between them: three level-0 SRAMs rotate roles, so the fractional
stage reads the same window the integer stage searched one step earlier.

## Block structure

```
me_top
├── l0_pingpong          three 37x37x8 level-0 banks (IME / FME / load)
│   └── ref_sram x3
├── ref_sram  u_l1       level-1 window, 39 x 40 samples, 6 bits
├── ref_sram  u_l2       level-2 window, 67 x 68 samples, 6 bits
├── ref_sram  u_sec      second reference SRAM for FME, 22 x 22 x 8
├── ime_stage
│   ├── ime_level #(0)   1 search-point module, 41 partitions
│   ├── ime_level #(1)   4 search-point modules, modes 1-4
│   ├── ime_level #(2)   16 search-point modules, 16x16 only
│   │     each: sp_module (-> row_sad -> sad4p), sad_tree, running minimum
│   └── mode_select      merge levels, choose two modes
└── fme_stage
    ├── fme_interp       6-tap half-pel grid of one 4x4 block
    ├── fme_qpel x6      quarter-pel prediction per candidate
    ├── fme_pu   x6      residual + 4x4 Hadamard -> SATD
    └── mv_cost  x6      lambda x Exp-Golomb length of the MV difference
```

`me_pkg` holds the shared types: `mv_t`, `part_best_t` and `part_geom_t`. It
also holds the partition geometry function and the Exp-Golomb length
function.

### Partition numbering

Every module uses one flat list of the 41 H.264 partitions:

| Index | Partitions |
|---|---|
| 0 | 16x16 |
| 1-2 | 16x8 |
| 3-4 | 8x16 |
| 5-8 | 8x8, quadrants in raster order |
| 9-16 | 8x4: 9 + 2q + s |
| 17-24 | 4x8: 17 + 2q + s |
| 25-40 | 4x4: 25 + 4q + s |

Mode numbers:

| Mode | Meaning |
|---|---|
| 1, 2, 3 | 16x16, 16x8, 8x16 |
| 4 to 7 | 8x8, 8x4, 4x8 and 4x4 inside an 8x8 quadrant |
| 8 | The 8x8 macroblock mode: each quadrant carries its own best sub-mode 4 to 7 |

## Integer search: the three levels

`ime_level` is one module with a `LEVEL` parameter.

| | Level 0 | Level 1 | Level 2 |
|---|---|---|---|
| Subsampling | none | 2:1 per direction | 4:1 per direction |
| Current block held | 16x16 | 8x8 | 4x4 |
| Positions | 16x16, [-8,7] around the predictor | 32x32, [-32,31] around (0,0) | 64x64, [-128,127] around (0,0) |
| Positions per cycle | 1 | 4 | 16 |
| 4-pixel SAD units | 64 | 4 x 16 | 16 x 4 |
| Partitions | all 41 | 9 (modes 1-4) | 1 (16x16) |
| Buffer row | 37 (31 used) | 40 | 68 |
| Window-register row | 31 | 39 | 67 |
| Column-mux output | 16 | 11 | 19 |

Every level has 64 four-pixel SAD units. Every level finishes its search in
256 compute cycles.

**How a level scans.** A level holds BLK window rows in registers, where BLK
is 16, 8 or 4. For each vertical offset, it steps across the positions in
groups of NSP adjacent positions (NSP is 1, 4 or 16). A column mux takes
NSP+BLK−1 samples from every held row. The NSP candidate blocks are cut from
those samples.

When an offset is done, the rows shift up by one. The next buffer row, which
was prefetched during that offset, enters at the bottom. After the first BLK
rows are loaded, no cycle is lost.

**SAD datapath.**
- `sad4p` sums four absolute differences.
- `row_sad` groups four `sad4p` outputs into one 4x4-sample block SAD.
- `sp_module` stacks row SAD modules into the grid of block SADs of one
  candidate and registers it.
- `sad_tree` adds the block SADs into partition SADs: 41 of them at level 0,
  9 at level 1.
- A minimum over the NSP positions, followed by a running minimum, keeps the
  best position per partition. Ties go to the first position in scan order.

**Common scale.** The coarse levels compare fewer samples, and those samples
have lower precision. So their SADs are shifted left by 2·LEVEL plus the
number of truncated bits before the levels are compared. Best MVs leave the
level as absolute integer-pel vectors.

**Mode filtering (`mode_select`).**
- For each partition, the result of the level with the smallest scaled SAD
  is kept.
- A mode's cost is the sum of its partitions' SADs.
- `mode_a` is the cheapest of modes 1-3.
- `mode_b` is the cheapest of the other two of modes 1-3 and mode 8.
  - Mode 8 gives each quadrant the cheapest of its sub-modes 4-7.
  - So only the best sub-partitioning takes part in the final decision.

## Fractional search: six candidates per partition

`fme_stage` works through the partitions of `mode_a`, then those of
`mode_b`. Each partition has an integer MV `m`. The quarter-pel predictor
gives a fractional guess:

    frac_pred = (mvp − 4·m) mod 4, taken as a signed value in −2..1 per axis

The six candidates, as quarter-pel offsets from `4·m`, are:
- (0,0);
- `frac_pred`;
- the four diamond neighbours of `frac_pred`, at ±1 in x and ±1 in y.

A partition is cut into 4x4 blocks. For each block:
1. The 10x10 integer patch around the block is read one row per cycle.
2. `fme_interp` makes the 11x11 half-pel grid with the H.264 6-tap filter
   (1, −5, 20, 20, −5, 1).
3. Six `fme_qpel` instances build the six quarter-pel predictions by
   H.264-style rounded averaging.
4. Six `fme_pu` instances produce the Hadamard SATDs.

SATDs add up over the partition. `mv_cost` adds λ times the signed
Exp-Golomb lengths of the MV difference from the predictor. The cheapest
candidate is stored in the SB buffer. After both modes, the mode with the
smaller total cost is the answer: `best_mode`, `best_sub`, `best_npart`,
`best_mv[]` in partition order, and `best_cost`.

**Where the patches come from.** If every patch of a partition lies inside
the level-0 window, the partition reads the shared level-0 bank. This is the
common case. Otherwise the stage raises `sec_req` with the partition area's
origin. The outside memory controller then fills the 22x22 second reference
SRAM and pulses `sec_done`. That costs a stall of whatever the controller
needs.

## Top-level protocol (`me_top`)

The outside controller fills the buffers through 16-sample (128-bit) masked
write ports:

| Port | What it loads |
|---|---|
| `cur_*` | The next macroblock: 16 rows |
| `l0_*` | The next 37x37 level-0 window into the loading bank. Window pixel (0,0) sits at macroblock origin + (mvp_q >>> 2) − 10. |
| `l1_*`, `l2_*` | Subsampled 8-bit samples, stored as their top 6 bits. See the rules below. |
| `sec_*` | The 22x22 patch requested by `sec_req`, placed relative to the FME macroblock |

Rules for `l1_*` and `l2_*`:
- At the start of a macroblock row, load the whole window into columns
  0..38 or 0..66, and pulse `mb_row_start` with that macroblock's `mb_go`.
- Otherwise load only the new strip of 8 or 4 columns. It goes at physical
  columns (base + 39 + i) mod 40 or (base + 67 + i) mod 68, where base is
  the `l1_base` or `l2_base` output.
- These buffers have a single bank. Write them only after `ime_done`.

Pipeline control:
- `mb_go`, taken when `ready` is high, is one pipeline step. It rotates the
  level-0 banks, moves the IME result and the current block to FME, starts
  FME, and starts IME on the new macroblock if `mb_valid` is high.
- `mb_valid = 0` drains the last macroblock.
- `fme_done` reports the macroblock that entered one step earlier.

## Timing

| Part | Cycles | Notes |
|---|---|---|
| IME stage | 276 per macroblock | 17 window-fill cycles + 256 search cycles + pipeline, merge and mode register. The search alone takes 256. |
| FME stage | 12 per 4x4 block, 2 per partition, 1 at the end | 391 to 426 cycles per macroblock in the tests, plus any second-SRAM stall |

The FME figures compare with a 264 (best) to 432 (worst) cycle range quoted
for the original design. The IME stage is therefore never the bottleneck.
For 1080p60 (8160 macroblocks × 60 = 489,600 per second) at up to about 426
cycles per step, the clock would need about 209 MHz. The design the engine follows
reached 1080p60 at 128.8 MHz, which is about 263 cycles per macroblock. This
implementation does not reach that: its FME processes one 4x4 block at a
time, with a serial patch read.

## What follows the source design and what does not

Taken from the source design:
- the three levels' ranges, centres, subsampling, module counts and
  256-cycle schedule;
- the 37x37 level-0 window, which includes the interpolation margin;
- the 39x40 and 67x68 coarse windows, with 6-bit truncated samples (the
  1080p setting);
- the three rotating level-0 banks;
- two-mode filtering;
- the six-point single-iteration fractional search with its fractional
  prediction formula;
- six parallel PUs;
- the compare unit and SB buffer;
- the 128-bit load width.

This implementation's own choices:
- **Subsampling** is plain decimation, with no filter.
- **One predictor per macroblock** is used for the level-0 centre and for
  the MV cost.
- **IME has no MV cost term.** Pure SAD decides.
- **SAD normalisation.** Coarse samples are stored as their top bits,
  right-aligned, so the scaling shift includes the truncated bits. This gives
  the same result as keeping truncated samples in their original bit
  positions and shifting by 2·LEVEL only.
- **Mode 8** is how the best sub-partitioned 8x8 case is represented.
- **Interpolation and SATD.** The H.264 6-tap and averaging rules are used.
  SATD is not halved.
- **Second SRAM.** It is 22x22 (one 16x16 partition plus filter margin) and
  is requested per partition with a request/done handshake.
- **Edge clamping.** Level-0 patch rows and columns outside the window are
  clamped to the edge.
- **Current block for FME.** The source design loads a separate current-block
  register for FME from memory. Here the IME copy is copied across at each
  pipeline step instead.
- **Handshakes.** All of these are assumed: `mb_go`, `ready`, `mb_valid`,
  the write ports, and the circular-base convention.

Not built:
- the external memory controller, which appears only as ports;
- the chroma reference and current storage;
- the residue output.

## Simulation

Every block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog. The
reference models in `tb/tb_pkg.sv` are written independently of the RTL: a
hashed test frame, 6-tap interpolation, matrix-product SATD and Exp-Golomb
lengths. The testbenches compare against them or against brute-force
searches.

To run one with Verilator 5:

    verilator --binary --timing -Wno-fatal -y rtl -y tb \
        rtl/me_pkg.sv tb/tb_pkg.sv tb/tb_me_top.sv --top-module tb_me_top
    ./obj_dir/Vtb_me_top

`tb_me_top` runs the complete engine at its default parameters, in about 15
seconds. `tb_me_top_720p` runs the same sequence with 5-bit coarse samples,
the 720p buffer budget. Both are thin wrappers with a watchdog around
`tb_me_run`, which holds the stimulus and the checks.

`tb_me_run` sends 8 macroblocks over two macroblock rows and then drains the
pipeline. The macroblocks are of four kinds:
- A: the whole macroblock moves by a small integer MV, so mode 1 is found
  by level 0 and served from the shared bank;
- B: a large MV that only level 2 can reach, which needs a second-SRAM load;
- C: four quadrants with different MVs, so mode 8 is chosen;
- D: a medium MV that only level 1 can reach.

The contents are built so the outcome is known exactly: the right mode has
zero SATD, and its cost is only the MV rate cost. For every macroblock the
testbench checks the modes, the MVs and the cost. It also counts each
mechanism and fails if any never happened: bank rotations, level-1 and level-2 wins, second-SRAM loads,
partitions served from the shared level-0 bank, mode-8 decisions, strip
updates, row restarts and the drain.

Useful parameters:
- `ime_level #(.LEVEL, .TRUNC_W)`;
- `ref_sram #(.ROWS, .COLS, .W)`;
- `me_top #(.TRUNC_W)`: 6 (the default) matches the 1080p buffer budget, and
  5 matches the 720p budget.
