# Segment-based motion estimation on a block-based engine

Block-based motion estimation gives one motion vector per fixed square block. At object
edges this is wrong: a block that straddles two objects gets one vector for both.
Segment-based motion estimation gives one vector per image *segment* instead. A segment
is a region of similar colour with an arbitrary shape, so motion edges fall at their true
pixel positions. The difficulty is hardware: fetching arbitrary shapes from frame memory
either wastes bandwidth or breaks burst-friendly addressing.

This RTL follows the approach of Meuwissen, Sethuraman, Ernst, Peters and Peset Llopis,
"Segment-Based Motion Estimation Using a Block-Based Engine" (Philips Research). Its key
observation: a segment's match penalty for a candidate vector is a sum over its pixels,
and that sum can be taken in any order. So the frame is walked in ordinary 16x16
macro-blocks, as a block matcher would do. Each macro-block holds the parts of at most
four segments (its *sub-segments*). For every sub-segment and each of its candidate
vectors, the engine computes a SAD over only that sub-segment's pixels, using a per-pixel
mask. The partial SADs of a segment, from all the macro-blocks it touches, are then added
into the segment's match penalty. The best candidate is chosen per segment, never per
block. Every pixel fetched is used, and all memory traffic is block-aligned.

The design has two layers:

- **`sbme_asip`, the macro-block engine.** It holds the current block, its sub-segment
  map and its 48x32 search area in three small caches. It streams 16 pixels per cycle
  through a masked SAD unit. It emits one result per (sub-segment, candidate).
- **`mp_accum`, the match-penalty accumulator.** It adds those results per (segment,
  candidate) over a whole frame. It then selects the best candidate of every segment and
  reports whether the frame's total penalty still improved, which is the convergence
  test of the iterative algorithm.

`sbme_engine` is the top level and joins the two.

## The algorithm the hardware serves

One frame is estimated iteratively:

1. **Refine the segmentation (software).** Lay the 16x16 grid over the segmented frame.
   In each block keep the four segments with the most pixels. The pixels of any other
   segment get weight 0 and are ignored in that block. This keeps a block to four passes.
2. **Choose candidates (software).** Each segment gets up to 8 candidates. These are its
   own current vector, that vector with a random update, and the vectors of up to five
   neighbouring segments, some with random updates; in the first iteration the zero vector
   is also tried. Neighbour vectors come from the *previous* iteration, so all segments are
   independent within an iteration and can be processed in any order or in parallel.
3. **Evaluate (hardware).** For every block, every sub-segment and every candidate, compute
   the masked SAD

       SAD(ss, v) = sum over the 16x16 block of |I0(x,y) - I1(x+vx, y+vy)| * mask(x,y; ss)

   where mask(x,y; ss) is 1 when pixel (x,y) belongs to sub-segment ss and has a non-zero
   weight. Add it to the penalty of (segment of ss, candidate v).
4. **Select and check convergence (hardware here).** Each segment takes its candidate with
   the lowest total penalty. Iterating stops when the total penalty no longer decreases,
   or after a fixed iteration budget (12 in the original experiments).

Steps 1 and 2 and the iteration budget belong to the controlling host and are not in
this RTL. A candidate index must mean the same vector in every block of a segment. The
host writes the segment's candidate list for each of its sub-segments.

## The macro-block engine (`sbme_asip`)

```
            MB cache (16x16 I0) ──────── cur line ───────┐
  rd_row ─┬─────────────────────────────────────────────►│
          ├► MB wcache (2-bit id + weight) ── mask line ►│ sad_unit ── SAD, pixel count
          │      cssid ─────────────────────────────────►│  (3 stages)      │
          └► L0 cache (48x32 I1) ─ line at (16+vx, 8+vy+row) ──►│           ▼
                                                      kernel_ctrl ─► result_buf ─► out
  cand_buf (4 x 8 vectors) ──► kernel_ctrl (loops over sub-segments, vectors, rows)
```

All three caches are read in the same cycle with the same row index and answer one cycle
later, so their lines reach the SAD unit together.

| Unit | What it holds / does | Size |
|---|---|---|
| `mb_cache` | current macro-block of the current frame | 16 lines x 16 pixels x 8 bit |
| `mb_wcache` | per pixel a 2-bit sub-segment id and a 1-bit weight; turns a line plus `cssid` into the 16-bit mask | 16 x 16 x 3 bit |
| `l0_cache` | the whole search area of the reference frame; returns 16 pixels starting at any column 0..32 of any row | 32 rows x 48 pixels |
| `sad_unit` | masked absolute differences, adder tree, accumulation over 16 lines; also counts masked-in pixels | 16 pixels/cycle |
| `cand_buf` | up to 8 candidate vectors per sub-segment, and their count | 4 x 8 x 12 bit |
| `kernel_ctrl` | the loop nest: sub-segment, vector, row | — |
| `result_buf` | FIFO of results, valid/ready | 32 x 42 bit |

**Search window.** The macro-block sits in the middle of the search area, at column 16
and row 8. A vector (vx, vy) therefore reads reference lines from column 16+vx and row
8+vy+r. The reachable range is vx in [-16, +16] and vy in [-8, +8]. Vectors are 6-bit
two's complement per component. A vector outside the range is clamped to the border. The
clamped vector is the one evaluated and reported, and `clamped` pulses for one cycle.
Candidates should normally be inside the range. Clamping only keeps the reads legal.

**Masking and excluded pixels.** The mask bit of a pixel is 1 when the stored id equals
`cssid` and the stored weight is 1. Pixels dropped by the refinement step are written
with weight 0, so no pass counts them, whatever their id. Plain block matching is the
special case of one sub-segment (`nss = 1`) with every pixel in sub-segment 0 at weight 1.
The weights also leave the wcache unchanged (`rd_wgt`), ready for a weighted SAD. The
SAD unit does not use them yet.

**Result word** (`sbme_pkg::result_t`, 42 bits, most significant first): `ssid` (2),
`vidx` (3), `mv` (x 6, y 6, after clamping), `sad` (16), `wsum` (9, number of pixels of
the sub-segment in the block).

### Timing

- The SAD unit takes one line per cycle. A block's result appears 3 cycles after its last
  line.
- Each candidate takes **22 cycles**:
  - 1 cycle to fetch the vector;
  - 16 cycles of line reads;
  - 1 cycle of cache latency;
  - 3 cycles of SAD pipeline;
  - 1 cycle to hand the result to the FIFO.
- One vector is finished before the next starts. The throughput is therefore 16 pixels
  per cycle while lines are streaming, and about 11.6 pixels per cycle overall.
- A block with `k` candidates in total takes `22*k + 1` cycles from the `start` cycle to
  the `done` cycle.
- When the result FIFO is full, the sequencer holds its result and waits.
- A sub-segment with zero candidates costs one cycle and is skipped.

### Using the engine

1. Fill the caches while `busy` is low:
   - the search area with `l0_wr_*`, one 16-pixel group per write (3 per row, 96 writes);
   - the block and its id/weight map with `mb_wr_*` and `wc_wr_*`, one line per write;
   - the candidates with `cand_wr_*`, then the count of each sub-segment with
     `cand_cnt_*`. Counts above 8 are limited to 8.
2. Pulse `start` with `nss` = number of sub-segments (1..4; 0 is taken as 1, above 4 as 4).
3. Read the results from `res_*` (valid/ready). `done` pulses when the last result has
   entered the FIFO.

## Match-penalty accumulation (`mp_accum`)

A buffer of 1024 segments x 8 candidates holds, per entry, a 32-bit penalty, the vector
and a valid bit. One frame iteration works as follows:

1. `clear` empties the buffer, one segment per cycle (1024 cycles, `busy_acc` high).
2. Before each block, the host writes the segment number of each sub-segment (`map_*`).
   Each result arriving from the engine adds its SAD to entry (map[ssid], vidx).
   One result is taken per cycle, so the engine's FIFO never fills in this configuration.
3. `select` with `nseg` scans segments 0..nseg-1, one per cycle. For each segment it
   emits `best_valid` with the lowest-penalty valid candidate (`best_idx`, `best_mv`,
   `best_mp`); a tie goes to the lower index. A segment that received no result has
   `best_found = 0`. The winning penalties are summed into `total_mp`.
4. At `select_done`, `converged` is 1 when `total_mp` is not lower than the previous
   selection's total. It is always 0 on the first selection after reset. With a fixed
   number of segments this equals "the average penalty no longer improves". The
   per-pixel count `wsum` is not used.

Do not rewrite the segment map until `res_pending` is low, because queued results are
mapped as they leave the FIFO.

## Where this RTL departs from the original design

- **No VLIW processor.** In the original, a VLIW ASIP runs the kernel loops as a program.
  Its general-purpose units (ALU, multiplier, address unit) and the special units hang
  off that processor, and it fills the caches itself from off-chip memory (stored as 8x8
  blocks), synchronising with the host once per row of macro-blocks. Its instruction set
  is not published. Here a hardwired sequencer (`kernel_ctrl`) runs the same loops, and
  the host fills the caches through plain write ports, one macro-block at a time.
- **Segment integration in hardware.** The original leaves SAD integration, best-vector
  selection and the convergence check to the host. `mp_accum` does them here. The
  1024-segment capacity and 32-bit penalties are this design's choice.
- **No sub-pixel interpolation.** The original plans a bilinear interpolator between the
  L0 cache and the SAD unit for quarter-pixel vectors. It would need 17-pixel L0 lines
  and add 2 cycles. It is not described in enough detail to build, and all vectors here
  are integer-pel.
- **Own choices where the original is silent:**
  - 8-bit pixels;
  - 6-bit vector components;
  - the centred window and clamping;
  - the 3-stage SAD pipeline, and so the 22-cycle loop (the original says only "slightly
    more than 16 cycles");
  - the 1-bit weight;
  - the result word layout;
  - the 32-entry result FIFO;
  - active-low asynchronous reset of control state only (cache contents are not reset).
- **Not included:** choosing candidates, refining the segmentation, skipping candidates
  already tried in earlier iterations (which the original reports saves about 75% of the
  work), the iteration budget, and the off-chip memory.

## Performance

The original reports 55 ms per CIF frame (about 18 frames/s) at 100 MHz in 0.18 um, with
at most 12 iterations. For this RTL, the worst case per block and iteration is about 852
cycles:

- 96 cycles of L0 fill;
- 16 cycles of block and map fill;
- 36 candidate writes;
- 32 candidates x 22 cycles = 704 cycles.

Over 396 CIF blocks and 12 iterations that is about 4.1 M cycles, or 41 ms at 100 MHz.
This assumes cache fills do not overlap computation. In the CIF workload testbench, with
about 300 segments and typically 7 candidates each, an iteration took 250k-280k cycles,
about 34 ms for 12 iterations. Clock rate and area have not been
checked by synthesis to a technology.

## Files

| File | Contents |
|---|---|
| `rtl/sbme_pkg.sv` | sizes, `mv_t`, `result_t` |
| `rtl/mb_cache.sv`, `rtl/mb_wcache.sv`, `rtl/l0_cache.sv` | the three caches |
| `rtl/sad_unit.sv` | masked SAD unit |
| `rtl/cand_buf.sv`, `rtl/result_buf.sv` | candidate store, result FIFO |
| `rtl/kernel_ctrl.sv` | loop sequencer |
| `rtl/sbme_asip.sv` | macro-block engine |
| `rtl/mp_accum.sv` | penalty accumulation, selection, convergence |
| `rtl/sbme_engine.sv` | top level |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_cif_frame.sv` | full-frame CIF workload |

## Verification

Every module has a self-checking testbench. Each compares against values computed
independently in the testbench, has a watchdog, and ends with a
`TB_RESULT checks=N failures=M` line.

- `tb_sad_unit` checks the SAD, the pixel count and the 3-cycle latency. Blocks arrive
  back to back and with gaps.
- `tb_kernel_ctrl` checks every cache address, the SAD flags, every result, the 22-cycle
  period, clamping, empty sub-segments and stalls.
- `tb_sbme_asip` runs six macro-blocks with random segment maps and true motions. It
  covers excluded pixels, plain block matching, clamping and a full result FIFO that
  stalls the sequencer. It checks every SAD and that the true motion wins in every region.
- `tb_sbme_engine` runs the whole flow at default parameters. The frame is 3x2
  macro-blocks with 8 irregular segments. It includes a block with more than four
  segments and refines it as described above. It runs three iterations: without the true
  motions, with them (penalty falls to 0, every segment picks its true motion), and
  repeated (converged). Every selected vector, penalty and total is checked against
  penalties computed from the frames.

- `tb_cif_frame` is the CIF workload: one 352x288 frame (396 macro-blocks) with about
  300 segments in four moving objects, estimated iteratively for up to 12 iterations.
  The testbench chooses candidates as the algorithm prescribes: own vector, its random
  update, five neighbours by luminance similarity, and zero in the first pass. It checks
  every selection against penalties computed from the frames, and that the total never
  rises. It checks that 12 iterations fit in 5.5 million cycles (55 ms at 100 MHz). A
  typical run uses 250k-280k cycles per iteration (33.6 ms for 12 iterations) and ends
  with 299 of 300 segments at their true motion.

All testbenches pass with Verilator 5. The CIF workload takes a few seconds; the others
take under a second each.

## Simulating

With plain Verilator, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert --top-module tb_sbme_engine \
    -y rtl -y tb rtl/sbme_pkg.sv tb/tb_sbme_engine.sv -o sim
./obj_dir/sim
```

Replace `tb_sbme_engine` with any other testbench name. Lint a module with
`verilator --lint-only -Wall -y rtl rtl/sbme_pkg.sv rtl/<module>.sv`.

Sizes are parameters:

- `N`, `W` and `H` on the caches, the sequencer and `sbme_asip` set the block and
  search-area sizes;
- `MAX_VEC_P` and `RES_DEPTH` on `sbme_asip` set the candidate count and FIFO depth;
- `MAX_SEG` on `sbme_engine` sets the segment capacity.

The shared defaults live in `sbme_pkg`. The result word is sized for 16x16 blocks. Widen
`SAD_W` and `WSUM_W` there if you grow `N`.
