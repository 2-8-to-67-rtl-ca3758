# Low-power, power-scalable H.264 motion-estimation and mode-decision core

Motion estimation uses most of the power in an H.264 encoder. This RTL builds the prediction half of a
mobile encoder around three ideas:

1. **Integer motion estimation reuses its data.** A fast search pattern, the four-step search, is
   run on a systolic register array that moves one pixel at a time. Each candidate then needs only one
   new row or column of reference pixels from memory. The search-window memory uses a "ladder"
   layout, so that any 16 adjacent pixels in a row *or* a column can be read in one cycle.
2. **Fractional motion estimation works in one pass.** All 25 half- and quarter-pel candidates around
   the best integer position are scored in parallel:
   - 9 half-pel candidates from one shared 6-tap interpolator;
   - 16 quarter-pel candidates made without any interpolation or transform. Each one averages two
     half-pel residues that are already Hadamard-transformed, which works because the transform is linear.
3. **A three-stage macroblock (MB) pipeline can trade quality for power.** The stages are coarse
   prediction, fine prediction and block engine. Engines are not owned by a stage:
   - the fractional engine also serves the first stage, which lets a *pre-skip* test end the work on
     an MB early;
   - a clock gate per engine stops the clock of whatever is idle;
   - a parameter register file sets how much search is done per MB.

The published chip this follows adds intra prediction, reconstruction, entropy coding and deblocking
behind the same pipeline. Its description names those engines but does not describe them. Here they sit
outside the core, behind a start/done handshake.

## Block map

```
 host bus ──► sys_bus_if ──► sys_ctl (parameter RF, tick sequencer) ──► go / stage_valid
                  │                                  ▲ stage_done
                  ├──► current-MB buffer ──┐         │
                  └──► swlm_lsda (search window, 2 refs, 16 banks)
                          │ port A (row/col)      │ port B (rows)
 stage 1  mbp_s1_ctl ──► ime_engine ◄─┘            │
   pre-skip ──────────────────────────► fme_engine ◄┘   (shared, stage 1 has priority)
 stage 2  mbp_s2_ctl ──► fme_engine ──► fme_best_buf ──► MB result
 stage 3  mbp_s3_ctl ──► external block engine (be_start / be_done) ──► out_valid, out_res
 gated_clock_ctl: clocks of ime_engine, fme_engine and the parameter RF
```

`ime_engine` contains:
- the current-MB registers;
- `ime_sra` (the 16x16 systolic register array);
- `ime_pe_array` (256 absolute differences);
- 16 × `ime_sub_tree` (4x4 SADs);
- `ime_vbs_tree` (the 41 SADs of all H.264 block sizes);
- `ime_best_info` (best cost and MV per block);
- `ime_fss_ctl` (the search controller).

`fme_engine` contains `fme_interp`, 9 × `fme_half_pu` (each with an `fme_hadamard`),
`fme_qbilinear`, 16 × `fme_quarter_pu` and `fme_rdo_md`. `enc_pkg` holds the shared types, sizes,
register map and the 41-block index layout.

## The integer search: how the systolic array and the ladder memory work together

This part is the hardest to follow in the code.

**Search range and window.** MVs range over x ∈ [-32,+31] and y ∈ [-16,+15]. The window is therefore
80 × 48 pixels per reference, with MV (0,0) at window position (32,16).

**Ladder arrangement (`swlm_lsda`).** Pixel (x,y) of the window sits in bank `(x+y) mod 16`, at word
`(ref·48 + y)·5 + x/16`:
- along a row, 16 consecutive pixels fall in 16 different banks;
- down a column, the bank also changes by one per row.

So both a row slice and a column slice are one access. Each bank gets its own address, and the output
is rotated back into pixel order. Port A serves the integer search (row or column). Port B serves the
fractional engine (rows). Reads take one cycle.

**Systolic array (`ime_sra`).** The array holds the 16x16 reference block of the current candidate.
One shift moves the candidate by one pixel. For example, `MV_DOWN` moves the candidate down: all rows
move up and the window row below enters at the bottom. The other three directions work the same way
with the new row or column at the matching edge. Every cycle, the 256 absolute differences and all 41
block SADs of the candidate in the array are formed combinationally.

**Search flow (`ime_fss_ctl`).** Candidates of the four-step search are not adjacent, so the controller
walks the array between them, one pixel per cycle:

- **Start.** At an initial point, 16 row reads fill the array. The last read puts the array on the pattern centre.
- **Coarse steps.** A 3x3 pattern with spacing 2 is visited: first the centre, then the ring
  (-1,0), (-1,-1), (0,-1), (1,-1), (1,0), (1,1), (0,1), (-1,1). Each move goes along x first, then y.
  Only the moments when the array sits on a pattern point count as candidates. At those moments:
  - all 41 best-info registers compare their SAD plus MV rate;
  - a separate local 16x16 best steers the search.
- **Step decision.** If the best 16x16 candidate is not the centre, the pattern moves there, up to three
  coarse steps. Then a spacing-1 pattern around the best ends the search.
- **Out-of-range points** are passed over, not clamped.
- **Several initial points** can be searched one after the other. The best registers keep the overall
  winner; they are not cleared between points.

**Timing.** A move decided in cycle *t* reads memory in *t*, shifts the array at the end of *t+1*, and
its SAD is compared at the end of *t+2*. Before each step decision the controller waits three cycles for
that pipeline to drain. One initial point costs about 90–130 cycles, depending on how many coarse steps
are taken.

**MV rate in the costs.** The integer costs use `λ·(bits(4·Δx) + bits(4·Δy))`, where `bits` is the
signed Exp-Golomb length and Δ is the difference from the MV predictor.

## The one-pass fractional search

`fme_engine` refines one partition (16x16, 16x8, 8x16 or 8x8) around its integer MV, one 4x4 block at a
time. Each block takes 12 cycles:
- 10 row reads of a 10x10 window around the block (one more cycle to capture);
- `fme_interp` makes the 9 half-pel predictions (the integer one and 8 half positions) with the standard
  6-tap filter, rounding and clipping;
- each `fme_half_pu` forms the residue, Hadamard-transforms it and adds up |coefficients| (SATD);
- `fme_qbilinear` averages pairs of transformed half residues (`(a+b)>>>1`) into the 16 quarter-pel
  transformed residues. The pairs follow the standard's quarter-sample rule, with the usual diagonal
  pairing;
- the `fme_quarter_pu`s accumulate those.

A 16x16 partition therefore takes 193 cycles, and an 8x8 partition 49.

Rounding differs slightly from the standard. The standard averages *pixels* with rounding. Here,
transform coefficients are averaged with truncation. The resulting quarter-pel costs are close to the
real ones but not identical; this is the price of skipping quarter-pel interpolation.

**Choosing the candidate.** `fme_rdo_md` adds `λ·(se(Δx)+se(Δy)+ref bits+mode bits)` in quarter-pel
units and keeps the lowest cost. Ties go to the lower index: half-pel candidates come before quarter-pel
ones, in raster order.

**Window edges.** Window pixels outside the 80x48 window are replaced by the nearest edge pixel.

## MB pipeline, pre-skip and the shared fractional engine

**Ticks (`sys_ctl`).** The pipeline advances in ticks. A tick begins (`go`) when:
- all three stages have reported done; and
- the host has announced the next MB by writing `RA_MBRDY` (not needed while draining).

A run of N MBs takes N+2 ticks. Stage s holds MB t−s in tick t.

**Stage 1 (`mbp_s1_ctl`).**
- With pre-skip on, it first borrows the fractional engine. It scores the 16x16 block at the integer
  MV predictor (centre candidate, with rate).
- If that cost is below `TH`, the MB is marked skip, and the integer search and all fractional work are
  dropped.
- Otherwise the integer search runs from up to four initial points, in this order: the predictor,
  (0,0), (−16,0), (+16,0).
- With two references, the whole search runs once on reference 0 and then on reference 1. For each of
  the nine blocks of the 16x16 … 8x8 modes, the cheaper reference is kept with its MV (ties go to
  reference 0). The reference index travels with the MV to stage 2 and into the MB result
  (`ref_idx`). Skip always means reference 0, as in H.264.
- A pre-mode decision then ranks the four partition modes by their summed integer costs and keeps the
  best `n_vbs`.

**MV predictor.** The predictor is the first-partition MV of the MB two places earlier: the newest
result available when the MB enters stage 1. It is (0,0) for the first two MBs of a run. MB positions
in the frame are not modelled, so there is no neighbour median.

**Stage 2 (`mbp_s2_ctl`).**
- For every selected mode and partition, it runs the fractional engine around that partition's integer
  MV, in that partition's reference, and writes the result into `fme_best_buf`.
- The mode with the lowest total cost wins (Lagrangian decision). Mode bits are 1/3/3/7 for
  16x16/16x8/8x16/8x8, counted once per MB.
- A skip MB becomes `PM_SKIP` with all MVs at the predictor.
- Stage 2 starts the fractional engine only while stage 1 is not holding it. Stage 1's pre-skip test
  thus cuts into stage 2's time, which is the sharing the architecture is built for.

**Stage 3 (`mbp_s3_ctl`).** It passes the decision and the deblocking enable to the external block
engine, and presents `out_valid`/`out_res` when `be_done` returns.

**Clock gating (`gated_clock_ctl`, `clk_gate`).** Each gate is a latch that is transparent while the
clock is low, followed by an AND. Enables:

| Domain | Enabled while |
|---|---|
| integer engine | loading an MB, or busy |
| fractional engine | started or busy |
| parameter RF | being written |

Each gate counts the clock edges it removed, which is useful for power estimates.

## Power-scalability parameters and host interface

All transfers are single-cycle writes on a 16-bit address / 128-bit data bus. Register reads are
combinational on `bus_rdata`.

| Address | Meaning |
|---|---|
| `0x0000` | `RA_CTRL`: write 1 to start a run |
| `0x0001` | `RA_NUMMB`: MBs in the run |
| `0x0002` | `RA_TH`: pre-skip threshold (cost must be below it) |
| `0x0003` | `RA_NINIT`: initial points of the integer search, 1–4 |
| `0x0004` | `RA_NREF`: reference frames searched, 1–2 |
| `0x0005` | `RA_NVBS`: partition modes refined by the fractional search, 1–4 |
| `0x0006` | `RA_LAMBDA`: Lagrange multiplier |
| `0x0007` | `RA_ENABLE`: bit0 pre-skip, bit1 intra 4x4, bit2 intra 16x16, bit3 deblocking |
| `0x0008` | `RA_MBRDY`: the current-MB buffer holds the next MB |
| `0x0009` | `RA_STATUS` (read) |
| `0x10rr` | row `rr` (0–15) of the current MB: pixel i in bits 8i+7..8i |
| `0x4000 \| ref<<10 \| y<<3 \| g` | 16 pixels of search-window row y, x = 16g … 16g+15, g < 5 |

**Current MB.** Stage 1 copies the current-MB buffer when its tick starts (`mb_take`). The host may
refill the buffer after that.

**Reset values.** One MB, λ = 4, one initial point, one reference, one mode, deblocking on, pre-skip
off, `TH` = 0.

## Throughput

One MB tick lasts as long as its slowest stage:
- stage 1: about 110 cycles per initial point and reference, plus 193 cycles for pre-skip;
- stage 2: 193 cycles per 16x16 partition, up to 777 cycles for all four modes, plus waits for stage 1.

The end-to-end test measures 848 cycles for the longest tick, with two references, four initial points
and all modes refined. The worst case can be estimated from the numbers above:
- one reference: about 970 cycles;
- two references: about 1070 cycles.

Budgets per MB at 30 frames/s:

| Format | Clock | MBs per frame | Cycles per MB |
|---|---|---|---|
| SDTV, one reference | 54 MHz | 1350 | 1333 |
| CIF, one reference | 13.5 MHz | 396 | 1136 |
| CIF, two references | 27 MHz | 396 | 2272 |
| QCIF, one reference | 3.125 MHz | 99 | 1052 |
| QCIF, two references | 6.25 MHz | 99 | 2104 |

The core meets all of them.

## How this differs from the published chip

- **References searched in sequence.** With two references they are searched in turn, not jointly.
  The better reference is picked per block for the 16x16 … 8x8 modes only.
- **No in-module clock gating.** The integer engine is gated as a whole. Its pipeline registers are not
  gated individually.
- **No intra, reconstruction, entropy coding or deblocking.** Their enables and the stage-3 handshake
  are ports. Intra prediction would run beside the fractional search in stage 2.
- **Choices made in this RTL:**
  - the search pattern's order and walk;
  - the number and choice of initial points;
  - the predictor;
  - all cost formulas;
  - the register map and bus;
  - the edge handling of the fractional search;
  - the pipeline handshakes.

  Only what the blocks do and how they connect follows the published design.
- **Sub-8x8 partitions.** Their integer search results are kept (all 41 blocks), but they are not
  refined or chosen.
- **Quarter-pel rounding.** Quarter-pel costs come from transform-domain averaging; see above.

## Simulation

Every testbench is self-checking and prints `TB_RESULT checks=N failures=M`. Example for the whole core:

```
verilator --binary --timing --assert -Wno-fatal -y rtl rtl/enc_pkg.sv tb/tb_ref_pkg.sv \
    rtl/h264_enc_top.sv tb/tb_h264_enc_top.sv --top-module tb_h264_enc_top
./obj_dir/Vtb_h264_enc_top
```

Unit testbenches build the same way, with their own module and `tb_<module>.sv`.

**Reference model.** `tb_ref_pkg` is an independent model: exact half-sample formula, matrix Hadamard,
the full four-step search and the 25-candidate fractional search.

**`tb_h264_enc_top`** runs the core at its default sizes:
1. loads two textured reference windows over the bus;
2. encodes two runs (6 and 5 MBs) with different parameter settings;
3. compares every MB's mode, MVs and cost with the reference chain;
4. checks the tick length against the SDTV budget.

It fails if any of these never happened:
- a pre-skip hit, and an integer search;
- stage 1 borrowing the fractional engine while stage 2 waits;
- a full three-MB pipeline;
- the pipeline waiting for the host;
- clock gating in each domain;
- several initial points, and several modes refined;
- a quarter-pel winner, and a partition smaller than 16x16 winning;
- the second reference winning.

**Unit testbenches** use random stimulus against the same reference functions. Where a latency is
defined, they check it:
- 12·blocks+1 cycles for the fractional engine;
- the fill and walk cycles of the search controller.
