# Low-bandwidth inter-layer prediction for an H.264/SVC decoder

Decoding a scalable (SVC) H.264 stream costs much more external-memory bandwidth
than decoding plain H.264. The enhancement layer predicts from the base layer, and
a straightforward decoder moves that inter-layer prediction (ILP) data through
DRAM several times:

* **Spatial scalability.** The conventional flow decodes the base layer, runs a
  frame-level padding pass, then a frame-level upsampling pass, and only then
  decodes the enhancement layer. Each pass reads and writes whole frames.
* **Quality scalability (CGS/MGS).** The conventional flow decodes whole layers
  one after another, so the base-layer coefficients and texture of every
  macroblock (MB) go out to DRAM and come back for the next layer.

This RTL implements the hardware that removes that traffic in a three-stage
MB-pipeline decoder:

1. **On-the-fly padding.** Padding runs per MB next to the deblocking filter while
   the base layer is decoded.
2. **On-line upsampling.** Upsampling runs per MB in the first pipeline stage
   while the enhancement layer is decoded. Only the padded base-layer texture and
   the base-layer residual cross the memory bus. The upsampled frame never does.
3. **Layer-interleaved decoding** for quality scalability. All layers of one MB
   are decoded back to back. The lower layer's data of that MB stays in on-chip
   pipeline buffers that can be reconfigured for this. The CABAC context models of
   every layer are kept in an on-chip N-layer context SRAM. The neighbour side
   information of every layer is kept in a per-layer buffer. So is the
   bitstream of every layer.

The standard H.264 blocks around this logic are not part of this RTL: the
entropy decoders (CABAD/CAVLD), IQ/IT, motion compensation, intra prediction,
reconstruction, deblocking and the memory controller. They
connect to the top module `svc_lowbw_top` through ports, grouped by block.

## The MB pipeline and its schedule

| stage | standard decoder work | framework logic in this RTL |
|---|---|---|
| 1 | entropy + texture decoding | `upsample_engine` (spatial EL), context store, side-information and bitstream buffers, ILP reads of the buffers |
| 2 | MC / intra prediction / reconstruction | reads the Residual and UP Data SRAMs |
| 3 | deblocking | `padding_engine` (spatial BL), reads the REC Data SRAM |

`layer_interleave_ctrl` moves all three stages forward together. A *step* happens
only when every stage that holds a job is ready. At a step, stage 3 takes stage
2's job, stage 2 takes stage 1's, and stage 1 takes the next `(MB, layer)` job.
The step pulse is also the bank swap of the three `recfg_buffer`s.

* **Sequential mode** (`interleave=0`): used for H.264 and for spatial
  scalability. All MBs of one layer are issued in raster order.
* **Interleaved mode** (`interleave=1`): used for quality scalability. The order
  is BL MB0, EL1 MB0, EL2 MB0, EL3 MB0, BL MB1, and so on, with up to four
  layers.

In the top:

* Stage 1 counts as ready only when the external `ed_td_ready` is set and the
  upsampling engine is idle.
* Stage 3 counts as ready only when `db_ready` is set and the padding engine is
  idle.
* One cycle after a step, the upsampling engine starts if the new stage-1 job is
  an enhancement-layer MB of a sequential frame and `up_need` is set.
* In the same cycle, the padding engine starts if the new stage-3 job is a
  base-layer MB and `pad_en` is set.
* No step can follow in the cycle right after a step, so an engine always gets
  the chance to go busy before the next step.

## Upsampling engine (`upsample_engine`, `upsample_filter`, `bl_data_sram`)

Only the dyadic ratio (2x in each direction) is built. An enhancement-layer
sample at index `e` maps to base-layer position `e/2 - 1/4`. Even outputs
therefore sit 3/4 of the way between two base-layer samples, and odd outputs 1/4
of the way. Weights are on a 1/32 scale:

| job | 1/4 phase | 3/4 phase | at a transform-block edge |
|---|---|---|---|
| luma intra (ILIP) | -3, 28, 8, -1 | -1, 8, 28, -3 | filtered across |
| chroma intra (ILIP) | 0, 24, 8, 0 | 0, 8, 24, 0 | filtered across |
| residual (ILRP) | 0, 24, 8, 0 | 0, 8, 24, 0 | 32 on the sample inside the block |

The filter is separable. The horizontal pass keeps full precision. The result is
`(V + 512) >> 10`. Intra results are clipped to [0,255]; residual results are not
clipped. The weight values are the SVC standard's dyadic filters. The split into
a 4-tap luma filter, a 2-tap chroma filter and a residual filter that never reads
across a transform block follows the source design.

**Filter array.** One row of six base-layer samples (columns k-2 .. k+3) enters
per push.

* Four horizontal FIR cells produce output columns 2k .. 2k+3.
* Each column keeps its last four horizontal results in a shift register.
* Four vertical FIR cells filter those registers, so four output samples leave
  per cycle.
* One pushed row supports two output rows: the 3/4 phase of one row pair and the
  1/4 phase of the next. The schedule therefore alternates between "output 3/4
  and push" and "output 1/4", which gives 4 samples every cycle after a 4-row
  fill.
* Residual jobs drive per-cell clamp flags into the tap generators instead of
  changing the data path. The edge can only fall left of the first cell or right
  of the last one, because the k of a column group is even.

**Per-MB schedule.** Planes are processed in the order Y, Cb, Cr.

* A plane whose base-layer block is N samples wide has N/2 column groups.
* Each group takes 4 + 2N cycles.
* Luma: 4 groups x 20 cycles. Each chroma plane: 2 groups x 12 cycles.
* Total: 128 issue cycles plus a 2-cycle drain, so 130 cycles per MB.

**Memories.**

* `bl_data_sram` has two banks of 28 words. Each word is one row of twelve 9-bit
  samples.
  * Rows 0..11 hold the 12x12 luma window: an 8x8 block plus 2 samples of margin
    on each side.
  * Rows 12..19 hold the Cb window and rows 20..27 the Cr window (each 4x4 plus 2).
* `start` swaps the banks. The memory controller writes the next MB's window
  while the current MB is filtered.
* The window must arrive already padded. At the picture edge, the memory
  controller extends it.
* Output words go to the UP Data SRAM. Luma row r, group g goes to address
  `4r+g`; Cb to `64+2r+g`; Cr to `80+2r+g`.

## Padding engine (`padding_engine`, `pad_boundary_buf`, `pad_filter`)

Inter-layer intra prediction filters base-layer intra texture across block
edges. Where a neighbouring 8x8 block is inter-coded, its samples must first be
made up by border extension from the intra side. Padding the current MB's own
blocks would need neighbours that are not decoded yet. The engine therefore pads
the four 8x8 blocks around the MB's **top-left corner**, all of whose neighbours
are already decoded:

* B0: bottom-right 8x8 of TL
* B1: bottom-left 8x8 of T
* B2: top-right 8x8 of L
* B3: top-left 8x8 of C

**Boundary lines.** Twelve 4x1 pixel lines carry the pixels next to the MB edges:

* V0..V5 run down the vertical edge: V0,V1 beside B0/B1, V2,V3 beside B2/B3, V4
  below them. V5 is the bottom of T's right column.
* H0..H5 run along the horizontal edge: H0,H1 under B0, H2,H3 over B3, H4,H5 over
  C's right half.

Which neighbour each line is copied from depends on the intra flags of
(TL,T,L,C). Only an intra side is useful:

| line | source |
|---|---|
| V1 | T's left column if T is intra, else the previous MB's V5 if TL is intra |
| V2..V4 | L's right column if L is intra, else C's left column if C is intra |
| V5 | T's right column, rows 12..15 |
| H0 | previous MB's H4 if L or TL is intra |
| H1 | L's top row, columns 12..15 (after deblocking) if L is intra, else the previous MB's H5 if TL is intra |
| H2..H5 | C's top row if C is intra, else T's bottom row if T is intra |
| V0 | read from external memory: the V4 that the MB above stored (`v4_we`/`v4_data`) |

The "previous MB" values are simply the line registers before the load, because
MBs are padded in raster order. At the first MB column, `left_edge` suppresses
B0/B2, and TL/L must be presented as inter.

**Padding filter.** The filter makes one 8-pixel row per cycle: 32 cycles for four
blocks, plus a load cycle. A block is written only if its MB is inter and at
least one neighbour is intra. The block's neighbour across the vertical line is
`h`, across the horizontal line `v`, and across the corner `d`:

| intra neighbours | padded pixel |
|---|---|
| `h` only | copies the vertical line (horizontal extension) |
| `v` only | copies the horizontal line (vertical extension) |
| `h` and `v` | copies the nearer line; on the diagonal, `(V+H+1)>>1` |
| `d` only | copies the diagonal neighbour's corner pixel |

The source design says only that the filter "acts like intra prediction". These
rules are this design's reading of the border-extension picture. They are the
part of the padding engine most likely to differ from a bit-exact SVC
implementation.

Picture edges beyond the last MB column or row need one more pass with the
missing neighbours marked inter. That pass is not sequenced here.

## Layer interleaving (`recfg_buffer`, `ctx_model_store`, `el_side_info_buf`, `layer_bitstream_buf`)

**Reconfigurable buffers.** Each `recfg_buffer` is two one-MB banks, 96 words of
four 9-bit samples. The top instantiates three of them: Residual SRAM, UP Data
SRAM and REC Data SRAM.

* As a **pipeline buffer**, the producer writes one bank while the consumer reads
  the other, and the step swaps them.
* In the **interleaved configuration**, the producer can also read the *other*
  bank through its `ilp_*` port. That bank holds layer n-1 of the same MB while
  layer n is decoded, because it was written one step earlier and is being
  consumed now. No separate ILP buffer is needed, and nothing goes to DRAM.
* On sequential frames the upsampling engine owns the UP Data SRAM write port. On
  interleaved frames the texture decoder does (`upd_*`).

**Context store.** `ctx_model_store` holds 4 layers x 460 CABAC contexts of 7 bits
(`{valMPS, pStateIdx}`) in one SRAM.

* A 16-entry direct-mapped write-back cache sits in front. It is tagged by
  (layer, context index).
* A hit answers in 1 cycle. A miss answers in 3 cycles: the victim write-back and
  the fill share the SRAM's two ports.
* Contexts are initialised by writes at slice start.
* In the top, the layer of every access is the layer of the stage-1 job.

**Side-information buffer.** CABAC selects many contexts from the left and upper
MBs' side information (MB type, skip, coded block pattern, chroma intra mode).
When the decoder changes layer every MB, each layer needs its own copy of that
information. `el_side_info_buf` holds, for each of the 4 layers:

* a left register;
* a line of 120 words for the upper row (the width of a 1920-sample picture).

All lines share one SRAM at address `layer*120 + mb_x`. A read returns both
neighbours one cycle later. A write stores the current MB as the next MB's left
neighbour and as the next row's upper neighbour. The 16-bit word is opaque to
the buffer. Deciding availability (picture and slice edges) is left to the
entropy decoder.

**Bitstream buffers.** The entropy decoder resumes a different layer's slice
every MB, so `layer_bitstream_buf` keeps one FIFO of 32 words (32 bits each)
per layer.

* All four FIFOs share one SRAM, each with its own pointers.
* The memory controller appends words to any layer that is not `full`.
* It is asked to do so through `refill`, which is set while a FIFO is at most
  half full.
* The entropy decoder reads the layer of the stage-1 job. The word arrives one
  cycle after the read.
* Assertions reject writes to a full FIFO and reads from an empty one.

## Top-level interface (`svc_lowbw_top`)

The top has no parameters. Its port groups:

* Frame control and job outputs: `frame_start`, `interleave`, `num_layers`,
  `layer`, `num_mbs`, `s1/s2/s3_job`, `step`, `frame_done`.
* Stage readiness: `ed_td_ready`, `rec_ready`, `db_ready`.
* Upsampling: `up_need`/`up_ilrp`/`up_t8x8` and the `bl_ld_*` window loader.
* Padding: the 17 source lines A..Q, the MB intra flags, the `pad_v0_ext` input,
  and the `pad_v4_*` and `pad_*` outputs to the memory controller.
* Buffers: producer, ILP and consumer ports of the three buffers, as 36-bit words
  of four samples.
* Contexts, side information and bitstream: the `ctx_*`, `si_*` and `bs_*`
  ports.

Reset is asynchronous and active low throughout. Shared types (`sample_t`,
`line4_t`, `mb_job_t`, mode enums) are in `svc_pkg`.

## How far to trust it, and where it departs from the source design

* Every block has a self-checking testbench against an independently written
  model, and each testbench has been seen to fail on a deliberately broken copy of
  its block.
  * The upsampling testbenches compute each output from the sample-position
    formula, not from the hardware schedule.
  * The padding testbenches work in picture coordinates, and the line-assignment
    test holds a cell-by-cell copy of the mode table.
* The end-to-end test (`tb_svc_lowbw_top`) runs the top at its only
  configuration. It covers:
  * a padded base-layer frame;
  * an upsampled enhancement-layer frame with intra, residual 4x4 and residual
    8x8 MBs;
  * a 4-layer interleaved quality frame.

  It requires each of these to have happened at least once: padding, both kinds
  of upsampling, stalls from both engines, bank swaps, ILP reads, context hits and
  misses, side-information and bitstream reads, and layer switches.
* **Not built or different:**
  * Extended spatial scalability (non-dyadic ratios such as 1080p over 720p)
    needs a per-sample position and phase generator. It is not included, so only
    2x ratios are supported.
  * The filter weights come from the SVC standard. The padding extension rules
    are an interpretation (see above).
  * The memories are larger than the source design's totals:
    * BL data SRAM: 756 bytes, against about 0.38 KB quoted.
    * Context SRAM plus side-information SRAM: 1.6 KB + 0.96 KB, against
      0.67 KB quoted for all entropy-decoder additions.
    * The source does not give its organisation.
  * The source design only names the per-layer side-information buffers and
    bitstream buffers. Their content and organisation here are an
    interpretation.
  * Cycle counts (130 per MB for upsampling, 33 per MB for padding) are this
    design's. The source gives only "four output pixels per cycle after a 2-4
    cycle fill".
* **Throughput.** `tb_svc_workloads` runs one MB row of each target
  configuration through the top. The other decoder blocks are modelled as always
  ready, so every measured cycle is spent in this RTL.

  | row | measured | budget |
  |---|---|---|
  | 16CIF enhancement row (88 MBs), every MB upsampled | 132 cycles per MB | 392 per MB (98 MHz, 30 fps, CIF+4CIF+16CIF) |
  | 4CIF base row (44 MBs), every MB padded | 34 cycles per MB | same 392 per MB |
  | 1080p row (120 MBs) with 4 interleaved quality layers | 2 cycles per MB-layer step | 122 per step (120 MHz, 30 fps) |

  The 1080p-over-720p spatial case cannot run, because its ratio of 1.5 is not
  dyadic.

## Simulating

Every file holds one module or package, named after the file, so Verilator
finds the modules with `-y rtl`. The package goes first on the command line:

```
verilator --binary --timing --assert -y rtl rtl/svc_pkg.sv tb/tb_svc_lowbw_top.sv \
          --top-module tb_svc_lowbw_top -o sim && ./obj_dir/sim
```

The same pattern works for any testbench in `tb/`: `tb_upsample_engine`,
`tb_upsample_filter`, `tb_bl_data_sram`, `tb_padding_engine`,
`tb_pad_boundary_buf`, `tb_pad_filter`, `tb_recfg_buffer`,
`tb_layer_interleave_ctrl`, `tb_ctx_model_store`, `tb_el_side_info_buf`,
`tb_layer_bitstream_buf`,
`tb_svc_workloads`. Each prints one line
`TB_RESULT checks=N failures=M` and stops itself with a watchdog if the design
hangs. The full end-to-end test needs a few seconds.
