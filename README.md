# H.264 baseline decoder engines for a hybrid hardware/software mobile decoder

This RTL holds the dedicated hardware engines of a single-chip H.264 baseline-profile video
decoder. The decoder uses a hybrid design: a 32-bit RISC processor runs scheduling, high-level
entropy decoding and syntax parsing, and fixed-function engines do the sample processing.
The engines are inverse quantisation/transform, intra prediction, motion compensation,
reconstruction and deblocking, plus a DMA controller that moves data between the engines'
local memories and the external frame memory. The target is CIF video (352x288, 396
macroblocks) at 30 frames/s with a 54 MHz clock.

The RTL covers the engines, the DMA controller, a local memory and the macroblock pipeline
controller. It wires them into one subsystem, `h264_dec_top`. The processor, the system bus,
the stream input, the video output, the low-level entropy decoder, motion-vector decoding
and the SDRAM are outside this RTL. Their connections are ports of the top.

## The cycle budget, and why everything is built around 3600 clocks

Everything in the design follows from the clock budget:

* At 54 MHz and 29.97 frames/s, one frame period is **1,801,801 clocks**. `mb_pipe_ctrl`
  raises `frame_tick` once per period.
* A CIF frame has 396 macroblocks. Dividing the period evenly would give 4,550 clocks per
  macroblock. The design instead gives each pipeline stage a **3600-clock slot**. The
  remaining ~20 % is margin for the processor's control and firmware work.
* Decoding is a **three-stage macroblock pipeline**:

  | stage | work | engines |
  |---|---|---|
  | 0 | entropy decoding | processor (high level) + LENT (low level) |
  | 1 | prediction and residual | IPRED, ITIQ; MC with motion-vector decoding for inter macroblocks |
  | 2 | reconstruction and loop filter | REC, DB |

  While stage 2 handles macroblock *n*, stage 1 handles *n+1* and stage 0 handles *n+2*.
  A frame needs 396 + 2 slots = 1,432,800 clocks. This fits in the 1,801,801-clock period.

`mb_pipe_ctrl` enforces this schedule:

* At the end of each slot, if every occupied stage has reported `stage_done`, the
  macroblocks move on one stage. Each stage then gets a `stage_start` pulse with its
  macroblock number on `stage_mb`.
* If a stage has not finished, the slot stretches until it does. This is a stall, and
  `overrun_cnt` counts it.
* A frame tick that arrives while the previous frame is still decoding is dropped and
  counted in `late_frames`.
* Without stalls a frame takes exactly (NUM_MB + 2) x SLOT_CYCLES + 2 clocks from its tick
  to `frame_done`.

The engines are far faster than the slot: ITIQ and both intra predictors take 1 clock per 4x4 block, MC 16
clocks, REC 1 clock and DB 192 clocks per macroblock. So the slot length is set by the
software stages and the memory traffic, not by these datapaths.

## Engines

### ITIQ — inverse quantisation and inverse transform (`itiq`)
One block per clock, with the result registered one clock after `start`. The `mode` input
selects one of three transforms:

* `TR_4X4`: a 4x4 residual block. Each coefficient is scaled by v(QP%6, position class)
  and shifted left by QP/6. The integer core transform is applied to rows and then to
  columns, with the ½ shifts on the odd inputs. The result is rounded as (x+32)>>6.
  With `use_dc`, position (0,0) takes the already scaled `dc_in` instead.
* `TR_LUMA_DC`: the 4x4 Hadamard transform of the 16 luma DC values of an Intra 16x16
  macroblock, followed by its own scaling rule. Below QP 12 that rule rounds and shifts
  right.
* `TR_CHROMA_DC`: the 2x2 transform of the four chroma DC values. The results are in
  `res_out[0..3]`.

The two DC modes produce values that go back in as `dc_in` of the ordinary blocks. Outputs
are 16-bit signed.

### IPRED — intra 4x4 prediction (`ipred4x4`)
All nine Intra_4x4 luma modes. The 13 neighbouring samples are laid out on one "edge line":
left column bottom-to-top, then the corner, then the top and above-right row. Each
directional mode then becomes a 2-tap or [1 2 1] 3-tap filter at some offset along this
line, which is where most of the module's indexing comes from. Rules at the edges:

* If the above-right samples are unavailable, they are replaced by T3.
* DC uses whichever of top and left is available, or 128 if neither is.

### IPRED, large blocks — Intra 16x16 luma and chroma prediction (`ipred16x16`)
The four modes of whole-macroblock luma prediction and of 8x8 chroma prediction: vertical,
horizontal, DC and plane. The module has no state. Each request names one 4x4 sub-block
(`bx`, `by`) of the 16x16 (or 8x8, with `chroma` = 1) block and returns its 16 samples one
clock later. This lets the output share the 4x4 reconstruction path with the other
predictors. The caller keeps the 16 top and 16 left neighbours and the corner steady for
the whole block; in chroma only the first 8 of each are used.

* DC, luma: the mean of all 32 neighbours, or of the 16 available ones, or 128.
* DC, chroma: each 4x4 quadrant has its own mean. The top-left and bottom-right quadrants
  use both their top and left neighbours. The top-right quadrant prefers its top
  neighbours and the bottom-left quadrant its left neighbours, with the other side as a
  fallback.
* Plane: gradients H and V are weighted sums of differences across the corner. The slopes
  are b = (5H+32)>>6 in luma and (34H+32)>>6 in chroma (the same for c and V), and each
  sample is clip((a + b(x−c0) + c(y−c0) + 16)>>5), with c0 = 7 in luma and 3 in chroma.
* The mode numbering (`lp_mode_e`: V, H, DC, plane) is this design's. The chroma syntax
  numbers DC as 0, so the caller maps it.

### MC — motion-compensated prediction (`mc_pred4x4`)
Produces one 4x4 prediction from a 9x9 reference window (rows and columns -2..6 around the
integer motion-vector position), one sample per clock, with `done` after 16 clocks.

* Luma has quarter-sample accuracy. Half-sample values come from the 6-tap filter
  (1,-5,20,20,-5,1). The centre position j filters the unrounded horizontal half-sample
  values and rounds with (x+512)>>10. Quarter-sample values are rounded averages of the
  two nearest integer or half samples.
* Chroma (`chroma=1`) uses eighth-sample bilinear weights on the 2x2 neighbourhood.

The window either comes in on `mc_win`, or `mc_win_fetch` reads it from the MC local
memory (`mc_use_lm` at the top). That memory holds a reference area filled by the DMA. For
luma the area is 21x21 samples: a 16x16 macroblock plus the 5 extra rows and columns the
6-tap filter reaches. It is stored as 21 rows of 6 words (24 samples, four per word, the
first in bits 7:0), which uses 126 of the 128 words of the 4,096-bit memory. A window
starting at any sample offset covers at most 3 words per row, so a fetch is 27 reads, one
per clock. `done` comes 29 clocks after the request, and the interpolation then starts by
itself with the chroma flag and fractions latched at the request. Nothing arbitrates
between a fetch and a DMA transfer into the local memory, so the controller must not run
both at once.

### REC — reconstruction (`rec4x4`)
Prediction plus residual, clipped to 0..255, one 4x4 block per clock.

### DB — deblocking (`deblock_mb`, filter core `db_filter`)
The engine filters a macroblock held in its own buffer. The luma buffer is 20x20 samples:
the 16x16 macroblock, plus the 4 bottom rows of the macroblock above and the 4 right
columns of the macroblock to the left. Each chroma component has a 12x12 buffer laid out
the same way. The neighbours are in the buffer because filtering the current macroblock's
top and left edges also changes samples of those neighbours.

The engine filters one line of 8 samples (p3..p0 | q0..q3) per clock, in this order:

1. luma vertical edges, left to right, 16 lines each;
2. luma horizontal edges, top to bottom;
3. Cb, then Cr, each with 2 vertical and then 2 horizontal edges of 8 lines.

Because the horizontal pass reads what the vertical pass wrote, the order changes the
result. Edge 0 on a picture boundary (`left_avail`/`top_avail` = 0) is skipped and costs
no clocks. A run therefore takes 192 clocks, 160 at a left or top picture edge, or 128 at
both.

`db_filter` is the standard line filter:

* The line is filtered only if bS ≠ 0, |p0−q0| < α and |p1−p0|, |q1−q0| < β.
* For bS 1..3, p0 and q0 move by a delta clipped to ±tc. In luma, p1 and q1 are also
  corrected when |p2−p0| < β (and likewise on the q side).
* bS 4 is the strong filter. In luma it changes up to three samples on each side, when
  the sides are smooth enough.
* α, β and tC0 are computed by functions in `h264_pkg`, so there is no table file.

Boundary strengths arrive per edge and per 4-line segment (`bs_v`, `bs_h`). A chroma
line uses the strength of the luma segment it covers. Internal edges use this
macroblock's QP. Edge 0 uses the rounded average (qp + qp_nb + 1) >> 1 with the QP of the
left or upper neighbour, given on `qp_left_*` / `qp_top_*`.

`db_bs` derives the strengths from what the decoder knows about each pair of adjacent 4x4
blocks. It is combinational:

| bS | condition (first match wins) |
|---|---|
| 4 | macroblock edge, and either side is intra |
| 3 | internal edge of an intra macroblock |
| 2 | either block has non-zero coefficients |
| 1 | different reference pictures, or a motion-vector difference of 4 or more quarter samples in x or y |
| 0 | none of these; the edge is not filtered |

The inputs are the intra flags of the macroblock and its two neighbours, plus these
per-block facts: a non-zero-coefficient flag, the motion vector and a 4-bit
reference-picture id. They cover the 16 blocks of the macroblock, the right-hand column of
the left neighbour and the bottom row of the neighbour above.

### DMAC — DMA controller (`dmac`)
One channel with **dual addressing**: the channel holds explicit source and destination
addresses, and there is **no buffer memory**. A word read in one clock is written to the
destination in the next clock, directly from the read data. A transfer of N words
therefore ends N+2 clocks after the start command (one word per clock).

There are two modes:

* packet mode: COUNT consecutive words;
* burst block mode: ROWS rows of COUNT words, with separate source and destination
  strides, for example a 16x16 macroblock cut out of a frame.

Registers: 0 SRC, 1 DST, 2 COUNT, 3 ROWS, 4 SRC_STRIDE, 5 DST_STRIDE, 6 CTRL (bit 0 start,
bit 1 mode). `gnt` = 0 holds back the next read.

### LM — local memory (`lm_sram`)
A single-port synchronous RAM with the capacity in bits as parameter (`BITS`, default
4096), 32-bit words and a one-clock read. The engine capacities of the reference
implementation are:

| engine | IPRED | DB | REC | LENT | ITIQ | MC |
|---|---|---|---|---|---|---|
| bits | 864 | 5120 | 3904 | 2176 | 7040 | 4096 |

## How `h264_dec_top` connects them

```
 coefficients ──► itiq ──► residual ──┐
 intra 4x4 ──────► ipred4x4 ────┐     ├─► rec4x4 ──► deblock_mb buffer ──► db_rd_* (filtered samples)
 intra 16x16 ────► ipred16x16 ──┤     │                ▲ db_wr_* (neighbours)
 inter request ──► mc_pred4x4 ──┴ pred┘                ▲ bs_v/bs_h
      mc_use_lm ─► mc_win_fetch ─► window (reads lm_sram)  │
 block facts (db_nz, db_mv_*, db_ref, intra) ─► db_bs ─┘ (also out on db_bs_v/h)
 dma_cfg_* ─► dmac ◄──► fm_* (frame memory, address bit 31 = 1)
                  ◄──► lm_sram (MC local memory, bit 31 = 0) ──► lm_rd_* (engine side)
 stage_done ─► mb_pipe_ctrl ─► stage_start / stage_mb / frame_tick / counters
```

Reconstruction starts by itself once both a residual (a `TR_4X4` result) and a prediction
(from whichever of the three predictors delivered last) are ready. The reconstructed block is written
into the deblocking buffer at the position (`blk_comp`, `blk_bx`, `blk_by`) given with its
coefficients, in 4x4-block units of the extended grid: luma 1..4 for the macroblock itself,
0 for the neighbours. DC-mode results of ITIQ are not reconstructed. They appear on
`res`/`res_valid` for the controller to feed back as `coef_dc`.

The DMA can move data between the frame memory and the local memory in either direction,
or within the frame memory. A copy from one local-memory address to another is not
supported, because the local memory has a single port.

## What is not here, and where this RTL departs from the reference design

* **Not built:**
  * the low-level entropy decoder (LENT);
  * motion-vector decoding;
  * stream input and video output;
  * host interface, clock generator, AMBA AHB/APB buses and peripherals;
  * the processor and its SRAMs;
  * the SDRAM interface.

  For these, either only the name and size of the block are known, or the block is a
  standard or licensed part.
* **Motion compensation** works on 4x4 blocks. Splitting 16x16, 16x8, 8x16 and 8x8
  partitions into 4x4 requests, each with its vector and window position, is left to the
  controller. So is placing the reference area in the local memory by DMA.
* **Deblocking**: the per-block facts that the strengths are derived from (intra flags,
  coefficient flags, motion vectors, reference ids) and the neighbour QPs come from
  outside, because the entropy decoder and motion-vector decoder that know them are not
  built. The slice-level filter offsets for α and β are fixed at zero, and the
  slice-level switch that turns the filter off is left to the controller, which simply
  does not start a run. The chroma QP of each side comes in ready-made; it is not looked
  up from the luma QP.
* **Differences from the reference chip**, found by going through its description part by part:
  * Its text gives both an even division of the frame (4,550 clocks per macroblock) and a
    3,600-clock limit per pipeline stage. The RTL uses 3,600 (`SLOT_CYCLES`) and shows that
    a whole frame then fits with about 20 % spare.
  * Its deblocking memory is 5,120 bits. The buffer here is 5,504 bits (20x20 + 2x12x12
    bytes). It also holds the unused above-left corner, which keeps the addressing a
    plain 20-wide or 12-wide grid.
  * Of its six local memories (see the table above), only the motion-compensation one is a
    RAM here (`lm_sram`, 4,096 bits). The other engines take their operands on ports or
    keep them in registers. So the DMA serves one local memory, and copies between two
    local memories are not possible.
  * It states quarter-sample motion accuracy for luma and chroma. In 4:2:0 video the same
    vector falls on eighth-sample positions of the half-density chroma grid. That is what
    `mc_pred4x4` implements.
  * Its gate counts per engine are not comparable with the generic-cell counts of a
    synthesis of this RTL.
* **Own choices**, since the reference gives no details for them: widths, handshakes,
  the register map and address map, the one-block-per-clock engine schedules, the DMA
  mode definitions, and the stall and frame-drop rules of the pipeline controller.
* The H.264 arithmetic follows the ITU-T H.264 baseline definitions: the scaling tables,
  the transforms, the interpolation filters and the deblocking thresholds and tables.

## Simulating

Every testbench in `tb/` is self-checking. Each prints `TB_RESULT checks=N failures=M` and
has a watchdog. With Verilator 5:

```
verilator --binary --timing -Irtl -Itb rtl/h264_pkg.sv tb/h264_ref_pkg.sv \
    -y rtl -y tb tb/tb_h264_dec_top.sv --top-module tb_h264_dec_top -o sim
./obj_dir/sim
```

Use the same command for any other testbench, replacing the file and top name.
`h264_ref_pkg` is needed only by the deblocking and top-level testbenches.

| testbench | what it shows |
|---|---|
| `tb_h264_dec_top` | full parameters: one whole 396-macroblock frame through the pipeline controller, with one stall. Macroblock 0 goes through DMA, ITIQ (all three modes), intra 4x4, Intra 16x16 and chroma intra prediction, inter prediction (luma and chroma, one luma window fetched from the local memory), reconstruction, boundary-strength derivation (strengths 4, 2, 1 and 0) and deblocking with neighbour-QP averaging, inside the picture and at a picture edge. Every mechanism is counted. About 1.4 M clocks. |
| `tb_itiq`, `tb_ipred4x4`, `tb_ipred16x16`, `tb_mc_pred4x4`, `tb_rec4x4` | random and hand-worked blocks against independent reference models; Intra 16x16 and chroma in every mode and availability combination, including clipped plane ramps |
| `tb_mc_win_fetch` | the window fetch at all 169 positions of a 21x21 area, with exact read count and latency, and a request while busy |
| `tb_db_bs` | boundary strengths: hand cases at the thresholds (motion difference 3 and 4) and 6000 random neighbourhoods; each of the strengths 0..4 must occur |
| `tb_db_filter`, `tb_deblock_mb` | the line filter over 20,000 random lines; whole-macroblock filtering in the prescribed edge order, with all picture-edge combinations, random neighbour QPs and exact cycle counts |
| `tb_mb_pipe_ctrl` | reduced sizes: macroblock order through the stages, slot lengths, exact frame length, stalls and dropped frame ticks |
| `tb_dmac`, `tb_lm_sram` | both DMA modes, strides, one word per clock, grant throttling; memory read/write |

The reference models in the testbenches are written independently of the RTL, but from
the same understanding of the H.264 definitions. They therefore catch implementation
slips, not a misreading of the standard.

## Files

* `rtl/h264_pkg.sv`: shared types (sample, coefficient, mode enums) and the constant
  tables as functions.
* `rtl/h264_dec_top.sv`: the top level.
* The other files in `rtl/` are the engines and helpers described above.
* `tb/`: one testbench per module, plus `h264_ref_pkg.sv` (a reference deblocking filter).
