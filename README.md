# Multi-stream H.264 intra 4x4 encoder pipeline

An H.264 intra encoder has a hard data dependency: a 4x4 block can only be
predicted once its left and upper neighbours have been predicted, transformed,
quantised and reconstructed. A deep pipeline working on one picture therefore
runs mostly empty. This design keeps a 19-stage pipeline full by interleaving
32 independent video streams block by block. Once a stream's block enters, the
next 31 slots go to the other streams. When that stream's turn comes round again,
32 cycles later, its previous block has left the pipeline and its reconstructed
pixels are waiting in memory.

The datapath takes one 4x4 block per clock. It evaluates all nine luma intra
4x4 modes in parallel and picks the cheapest by sum of absolute differences
(SAD), preferring the most probable mode on ties. It then transforms,
quantises, dequantises, inverse-transforms and reconstructs the block. A
clock of about 204 MHz is enough for 32 streams of 1920x1080 at 30 frames/s.
Chroma is coded with the DC mode only.

The architecture is the one described in "Fast H.264 intra prediction for
network video processing" (Stratix IV implementation, 32 HD streams). That
description gives the block structure, the slot order and the cycle budget. The
arithmetic comes from the H.264 standard. Word formats, stage split, memory
organisation and other details are this implementation's own choices. They are
listed under [Departures and own choices](#departures-and-own-choices).

## The slot schedule

Everything hinges on a fixed schedule, run by `control_logic`. One
*macroblock period* is `26 * NS` cycles (832 for `NS = 32`):

| slots | content |
|---|---|
| `NS` | the header of stream 0, 1, ..., NS-1 |
| `16 * NS` | luma block 0 of streams 0..NS-1, then luma block 1 of streams 0..NS-1, ... up to block 15 |
| `9 * NS` | for stream 0: a placeholder, then chroma C0..C7; then the same for stream 1, ... |

Then the next headers are due. Each stream therefore spends 26 slots per
macroblock: header, 16 luma, placeholder and 8 chroma. That gives
32 macroblocks every 832 cycles, or 38.5 macroblocks per 1000 cycles.

Why the two parts differ:

* **Luma** blocks of one stream depend on each other: the block to the left,
  above and above-right. So the stream index runs fastest. Block *b* of stream
  *s* enters NS cycles after block *b-1*, and the pipeline is 19 deep. The
  block is written to memory 19 cycles after it entered. It sits there 13
  cycles until the next block of the stream reads it. This is why `NS` must
  exceed 19 (an assertion in the top checks it).
* **Chroma** blocks (DC prediction) use only the pixels above and to the left
  of the whole 8x8 chroma macroblock, never other blocks of the same macroblock.
  So the 8 chroma blocks of one stream can go back to back. They run per stream
  because the four DC coefficients of each plane (U: C0..C3, V: C4..C7) must be
  collected for the 2x2 Hadamard transform. The *placeholder* slot in front of
  them is the output word that will carry the chroma DC levels (see below).

Luma blocks 0..15 are in the standard's zig-zag order of 4x4 blocks: block
index bits `{y1, x1, y0, x0}`. Chroma blocks are in raster order within each
plane.

## The pipeline

Register stages are counted from the cycle a block enters; a block entering in
cycle *t* leaves in cycle *t + 19*.

| stage | module | cycles | cumulative | what happens |
|---|---|---|---|---|
| entry | `control_logic`, `input_mux`, `recon_memory` | 0 | 0 | slot decided, stream word taken, neighbours read |
| PRED | `intra_pred` | 2 | 2 | nine predictions (or chroma DC) |
| SAD | `sad_unit` | 1 | 3 | nine residual blocks and SADs; chroma DC term (point **b**) |
| MINIMUM | `find_minimum` | 4 | 7 | comparator tree 4-2-1-1 |
| T | `fwd_transform` | 2 | 9 | forward core transform (point **a**) |
| Q | `quantizer` | 3 | 12 | quantisation with the stream's QP |
| Q^-1 | `dequantizer` | 2 | 14 | rescaling (point **c**) |
| T^-1 | `inv_transform` | 3 | 17 | inverse transform, chroma DC merged at its input |
| post | `recon_adder` | 2 | 19 | prediction + residual, clip; memory write; output |

The prediction of the chosen mode travels from MINIMUM to post in a
`pipe_delay` line (10 stages). The quantised levels travel from Q to the output
in another (7 stages). All other per-block information travels in a 32-bit
sideband record, `blk_meta_t`: valid, slot kind, stream, block index,
line-buffer column, QP and chosen mode. Every stage passes it along.

### Mode decision

`intra_pred` computes all nine 4x4 modes from one edge array
`{L3..L0, M, T0..T7}`. When the above-right pixels are unavailable they are
replaced by T3, as the standard does. A mode whose neighbours are missing is
disabled: `sad_unit` gives it SAD 0xFFFF. DC (mode 2) is always enabled.

`find_minimum` compares pairs 0-1, 2-3, 4-5 and 6-7, then the two pairs of
winners, then the two remaining winners, and finally that winner against
mode 8. Each comparator keeps the lower SAD. On equal SADs it keeps the most
probable mode if that is one of the two, else the lower mode number. The net
rule is: lowest SAD; on a tie, the most probable mode if it is among the tied
modes, else the lowest-numbered tied mode.

The most probable mode is `min(mode left, mode above)` when both neighbours
exist, else DC. `control_logic` forms it from the neighbour modes stored in the
memory alongside the pixels.

### Chroma DC side path

For a chroma block, the forward transform's DC coefficient is simply the sum of
the 16 residuals. `sad_unit` forms it at point **b**, 6 cycles before the
transform would. `chroma_dc_path` collects the four terms of a plane. One cycle
after the fourth arrives it applies the 2x2 Hadamard transform H, then DC
quantisation Q_DC (2 cycles), DC rescaling Q_DC^-1 and the inverse Hadamard
H^-1. The result is one reconstructed DC value per block, held in one register
set per plane.

When each chroma block reaches point **c**, after Q^-1, its (0,0) coefficient
is replaced by that value. Then the normal inverse transform runs. The timing
that makes this work:

* The main path from **b** to **c** is 11 cycles.
* The side path needs 3 cycles of collection plus 5.
* The first block of a plane therefore finds its value ready 3 cycles early.
* The U registers are overwritten by the next stream's U values 2 cycles after
  the last U block has read them. V has the same margin.

The quantised DC levels go to `output_mux`, which keeps them per stream. They
are inserted into the stream's placeholder word as it leaves the pipeline.

## Reconstructed-pixel memory

`recon_memory` holds, per stream:

* **luma line buffer** (`MAX_WIDTH/4` entries): for every 4-pixel column of the
  frame, the bottom row of the most recent block coded in that column, its
  mode, and the corner pixel to its lower left;
* **luma left columns** (4 entries): for each block row of the macroblock, the
  right column and mode of the most recent block in that row;
* **chroma line buffer** (`MAX_WIDTH/8` entries per plane) and **chroma left
  columns** (2 per plane): bottom row and right column of the neighbouring
  macroblocks.

Because a stream's blocks are written in coding order, "most recent in this
column / row" is always the neighbour the standard asks for. The controller
decides whether that neighbour exists. The corner pixel M of a block is stored
with the block above it. It is copied from the left-column entry at the moment
the block above is written. Because of this, no separate corner memory is
needed.

Reads are asynchronous and addressed in the entry cycle. The write is one clock
edge at the end of the pipeline. At the defaults the arrays hold about
1.18 Mbit.

## Headers, availability and stream formats

**Input.** `in_word_i[s]` (128 bits) is stream *s*'s current word. `pop_o[s]`
is high in the cycle the word is taken; the source must present the next word
from the following cycle on. The design never stalls, so sources must always
be ready. Per macroblock a stream supplies, in order:

* a **header**: bits `[5:0]` QP luma, `[13:8]` QP chroma, `[16]` new_frame,
  `[17]` new_line, `[18]` end_line, other bits ignored;
* 16 **luma blocks**, pixel (x,y) at bits `[8*(4*y+x) +: 8]`;
* a **placeholder** (content ignored);
* 8 **chroma blocks** (U raster, then V raster).

The controller keeps per stream the header, the macroblock column and whether
the first macroblock row of the frame is being coded:

* new_frame resets both;
* new_line resets the column and leaves the first row;
* any other header advances the column.

From these it derives neighbour availability:

* **left macroblock**: unless new_frame or new_line;
* **above row**: unless in the first row;
* **above-right macroblock**: if the above row exists and end_line is clear;
* **within the macroblock**: the standard's rules. For example, the top-right
  of blocks 3, 7, 11, 13 and 15 is never available.

Each stream may have its own frame size and QPs. A frame must be at most
`MAX_WIDTH` pixels wide (checked by an assertion).

**Output.** One word per cycle on a shared bus. `out_valid_o` is one-hot on the
stream it belongs to. `out_kind_o` gives the slot kind. Each stream sees its
words in the same order it supplied them:

| kind | `out_data_o` | `out_mode_o` |
|---|---|---|
| header | `[18:0]` the header as received | 0 |
| luma | 16 quantised levels, level of coefficient (row *i*, column *j*) at `[16*(4i+j) +: 16]` | chosen mode |
| placeholder | `[127:0]` chroma DC levels U f00 f01 f10 f11, then V; `[191:128]` the 16 chosen luma modes, block *b* at `[128+4b +: 4]` | 0 |
| chroma | 16 levels with lane 0 zero (the DC is in the placeholder) | 2 |

## Arithmetic

All of it follows H.264 for 8-bit 4:2:0 video with flat scaling matrices:

* **Forward transform:** `Cf X Cf^T`.
* **Quantisation:** `|Z| = (|W| MF + 2^qbits/3) >> qbits`, with
  `qbits = 15 + QP/6`. MF is the standard's multiplier table, indexed by
  `QP%6` and coefficient position.
* **Rescaling:** `Z V << QP/6`.
* **Inverse transform:** the standard's butterfly with `(x+32) >> 6`.
* **Chroma DC quantisation:** `(|f| MF00 + 2^(qbits+1)/3) >> (qbits+1)`.
* **Chroma DC reconstruction:** `((H(z) * 16 V00) << QP/6) >> 5`.

The 2^qbits/3 rounding offset for intra blocks is a choice, the one
reference encoders use. The tables are functions in `h264_pkg`.

## Sizes and performance

| quantity | value |
|---|---|
| streams `NS` | 32 |
| widest frame `MAX_WIDTH` | 1920 pixels (120 macroblocks) |
| pipeline depth | 19 stages, plus 13 cycles in memory = 32 |
| macroblock period | 26 x 32 = 832 cycles |
| 32 x 1920x1080 @ 30 fps | 32 x 8160 MB x 30 x 26 = 203.7 M cycles/s |
| pixel rate at 220 MHz | 16 px x 24/26 x 220 MHz = 3.25 Gpixel/s |
| memory | ~1.18 Mbit reconstruction memory, plus 6 kbit of output records |

No clock frequency has been measured for this RTL. The figures above are
cycle counts.

## Departures and own choices

* **Selected modes.** The original description puts the selected modes in the
  macroblock header on output. Here the header word leaves the pipeline before
  any of its macroblock's modes are known. So the 16 luma modes go into the
  placeholder word instead, the first word after the last luma block. Each
  luma word also carries its own mode.
* **Memory size.** The original memory is stated as about 435 kbit, with no
  organisation given. This design uses full-width line buffers per stream,
  about 1.18 Mbit. It is simple and certainly sufficient, but larger.
* **Stage split.** The cycle counts per stage are this design's. They are
  chosen so that the total is 19 and point **b** is 6 cycles before **a**, as
  described.
* **Not modelled:**
  * slices: new_frame is the only picture boundary;
  * chroma modes other than DC (the original supports only DC too);
  * intra 16x16 luma modes (not in the original either);
  * the luma-to-chroma QP mapping: the header supplies the chroma QP directly;
  * flow control.
* **Entropy coding.** The entropy coder that consumes the output streams is
  not part of this design.
* **Multipliers.** The original maps its multiplications to DSP blocks in the
  transform part. Here the transforms use adders and shifts only. The
  quantiser, the rescaler and the chroma DC path use plain `*`, and synthesis
  decides where the products go.

## Simulating

Every module has a self-checking testbench in `tb/`, named `tb_<module>.sv`.
Each prints `TB_RESULT checks=N failures=M`. `tb/h264_ref_pkg.sv` holds the
reference arithmetic the testbenches compare against. It is written
independently of the RTL: matrix products for the transforms, and the
standard's per-mode equations on a neighbour function.

`tb_h264_intra_top` runs the whole design at its default size (32 streams,
1920-pixel line buffers) for 24 macroblock periods. Each stream has its own
frame size (1 to 4 macroblocks wide, 2 to 3 high), so it goes through several
frames. Picture patterns vary per frame and QP varies per macroblock. A
behavioural reference encoder works on whole frames and decides availability
from pixel coordinates. The testbench compares every output word, checks the
19-cycle latency and checks that an output leaves every cycle. It also counts
that each mechanism occurred: all nine modes chosen, most-probable-mode ties,
missing top-right at line ends, new frames and lines, and non-zero chroma DC.

`tb_h264_hd_workload` runs the same checks on streams of full HD line
width. 24 of the 32 streams are 1920 pixels wide and the others 720. Frames
are two macroblock rows high, and the run lasts 250 macroblock periods. It also
measures the rate. It counts 7904 macroblocks in 205504 cycles, which is 38.46
per 1000 cycles. For 32 streams of 1920x1080 at a 220 MHz clock, that rate is
32.4 frames/s. The test takes about 3 seconds. Full 1080-line frames were not
simulated. The line buffers do not depend on the frame height.

With plain Verilator, from the top folder:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
  rtl/h264_pkg.sv tb/h264_ref_pkg.sv rtl/*.sv tb/tb_h264_intra_top.sv \
  --top-module tb_h264_intra_top -o sim
./obj_dir/sim
```

For a unit testbench, replace the last file and the top module name, e.g.
`rtl/h264_pkg.sv tb/h264_ref_pkg.sv rtl/quantizer.sv tb/tb_quantizer.sv
--top-module tb_quantizer`. The end-to-end run takes well under a second.
Verilator reports width warnings, e.g. array indices narrower than the
stream-number field. They are harmless. `-Wno-fatal` keeps them from stopping
the build.

## Files

`rtl/`:

* `h264_pkg.sv`: shared types, the sideband record, the tables;
* `h264_intra_top.sv`: the top;
* `control_logic.sv`, `input_mux.sv`, `intra_pred.sv`, `sad_unit.sv`,
  `find_minimum.sv`, `fwd_transform.sv`, `quantizer.sv`, `dequantizer.sv`,
  `inv_transform.sv`, `chroma_dc_path.sv`, `recon_adder.sv`,
  `recon_memory.sv`, `output_mux.sv`: the blocks, in pipeline order;
* `pipe_delay.sv`: a shift-register helper.

`tb/`: one testbench per module, plus `h264_ref_pkg.sv`.
