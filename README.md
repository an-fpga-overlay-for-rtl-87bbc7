# A reconfigurable CNN inference overlay

This is a single hardware pipeline that runs every convolution layer of a
CNN. You do not build a new accelerator for each network. The pipeline stays
fixed, and before each *batch* of work the host writes a few dozen control
words that set:

- the kernel size K and the stride S;
- how many output feature maps are computed side by side (filter
  parallelism, FP);
- how many vertically adjacent output pixels of each map are computed side
  by side (surface parallelism, SP);
- for 1x1 layers, how many input channels are read side by side (channel
  parallelism, CP).

The main idea is that FP x SP x K² multiplications happen every cycle for
almost any mix of K, FP and SP. Two structures make this possible:

- A *programmable line buffer* turns a row-major pixel stream into SP
  stacked K x K windows per cycle, for any stride.
- A *processing engine* (PE) spreads those windows over one large multiplier
  array without padding them to powers of two. A configurable distribution
  tree, a binary reduction tree and a shift-and-accumulate pipeline do this.

The defaults give the Virtex7-690t configuration of the published design:

- 3072 multipliers;
- a 16-row line buffer;
- up to 735 outputs per cycle, which is the number of lanes the output-memory
  budget allows.

All datapaths are 16-bit signed fixed point. Products and sums are 32 bits.

## Data flow and interfaces

```
 control words ─► ctrl_mem ─────────────── configuration of every block
 pixels ───────► line_buffer ──W──► pe: dist_tree ─► mult_array ─► red_tree ─► shift_acc
 weights ──────► weight_regs ─────────────────────────┘ (2 banks)                 │
                                                                        out_accum (Mem 1,
                                                                        2 buffers, channel sum)
                                                                                   │
 output pixels ◄── out_fifo (Mem 2) ◄── post_ops (shift, saturate, ReLU, 2x2 max pool)
 overlay_ctrl sequences channels, weight banks and the Mem 1 buffer swap
```

The top module is `cnn_overlay` (`rtl/cnn_overlay.sv`). Its ports are plain
valid/ready streams, so a DMA engine, a PCIe bridge or a testbench can drive
it directly:

| stream | width per beat | content |
|---|---|---|
| `cw_*` | 14-bit address, 16-bit word | control words; refused (`cw_ready` low) while a batch runs |
| `cfg_commit` / `cfg_ack` | strobe | start the batch just configured |
| `px_*` | NF pixels | image rows, in the order described below |
| `wt_*` | WPC = 8 weights (16 bytes) | weights for one input channel per weight set |
| `out_*` | 1 pixel | final output, map by map, in raster order |
| `perf` | struct of 32-bit counters | busy, PE active, pixel/weight/flush/output stall cycles, batches |

A batch computes FP output maps over all of its input channels. The channel
loop inside a batch works like this:

1. The sequencer waits until the weights of channel c are complete in one
   weight bank. The host is meanwhile loading channel c+1 into the other
   bank.
2. It starts the line buffer on channel c. A tag with the weight bank and a
   "first channel" flag travels with every window.
3. A few cycles after the last window it releases the bank. The next channel
   starts one cycle after the release.
4. After the last channel it waits for the pipeline to empty, then for the
   previous batch's drain to finish.
5. It then swaps the two halves of Mem 1 and starts draining the finished
   batch. The next batch can be configured and run while that drain goes on.

The waits in steps 1 and 4 are the two stalls the architecture is designed
to avoid. They are counted in `perf.weight_stall` and `perf.flush_stall`.

## The programmable line buffer (`line_buffer`)

The line buffer has NF = 16 row FIFOs. Each FIFO is one block RAM of MAX_L
entries plus BREG = 11 registers holding the newest columns. SP windows of
size K with stride S share rows, and together need Z = K + S(SP-1) rows. For
each input channel:

- **Initial loading.** Rows 0..Z-1 arrive one pixel per beat and fill FIFOs
  0..Z-1.
- **Lateral loading.** Each beat now carries S·SP pixels: column c of the
  next S·SP rows. All FIFOs are read at column c.
  - The new pixels go into FIFOs K-S..Z-1.
  - The value read from FIFO i is written back into FIFO i-S·SP. This keeps
    the K-S rows that consecutive bands share.
  - This FIFO-to-FIFO routing is what S and SP reprogram.
  - The column just read is shifted into the register section, which then
    holds a Z x BREG base window.
- **Window extraction.** This happens on every S-th column from column K-1
  on.
  - Copy register s takes the K rows starting at `row_off[s]`, a control word
    the host sets to s·S.
  - It keeps K of the BREG columns.
  - It writes the window row-major into the aggregate vector W, with W_1 at
    index 0.

A window vector W of SP·K² values leaves three cycles after the beat that
completes it. With S = 1 that is one vector per beat.

In pointwise mode (K = 1) the buffer is bypassed. Each beat carries one pixel
from each of CP adjacent channels, and that beat is W. The `sp` field then
holds CP.

Host contract:

- Send Z·IL initial beats, then n_bands·IL lateral beats, per channel.
- Send zeros for rows past the bottom of the image.
- Add border padding to the image before sending it; the buffer has no
  border logic.
- The output size is OL = (IL-K)/S + 1.
- K ≥ S, Z ≤ NF and K ≤ BREG are required. The hardware does not check them.

## The processing engine: fitting odd window sizes onto a binary tree

This is the least obvious part of the design. A binary adder tree can only
reduce groups of 2ⁿ products, but K² is rarely a power of two. Padding every
window to 16 (for 3x3) wastes almost half of the multipliers. Instead:

1. **Partitioning.** Each window of K² values is split into one partition
   per set bit of K². For example, 9 = 8 + 1 and 25 = 16 + 8 + 1.
2. **Layout.** There are FP x SP windows, one per filter f and window s,
   numbered j = f·SP + s. Partitions of the same size from all windows sit
   next to each other, with the largest size first. Each group starts on a
   multiple of its size. Every partition then occupies exactly one subtree of
   the reduction tree, and its sum appears at one node.
3. **Distribution tree** (`dist_tree`, 4096 leaves for 3072 multipliers).
   - The tree copies W to the leaves, and every edge shifts the vector by a
     configured amount.
   - Multiplier i receives element `off(i)` of W, where `off(i)` is the sum
     of the shifts on its root-to-leaf path.
   - The hardware computes `off(i)` from the edge shifts and selects that
     element directly. This produces the same mapping as shifting the whole
     vector at every node, with far less wiring. It also makes the FP copies
     of W.
   - Leaves past the end of W get zero.
4. **Multipliers** (`mult_array`). Each multiplier uses the weight register
   wired to it. The weight bank is chosen by the window's tag, so the next
   channel's weights can be loaded while this one computes.
5. **Reduction tree** (`red_tree`). This is a complete adder tree with one
   register per level, and every node is visible. The sum of a size-2ⁿ
   partition is a node of level n, so the sums of the largest partitions sit
   at the lowest indices of level n.
6. **Shift and accumulate** (`shift_acc`). This is H+1 pipelined units, one
   per tree level.
   - Unit i adds to its running vector the LANES nodes of level i that start
     at a configured position, or nothing if level i is disabled.
   - The start position aligns the partition sums of window j with lane j.
   - Unit i works one cycle after unit i-1, matching the reduction-tree
     pipeline.
   - Lane j of the result is the finished convolution for window j.

The engine takes one vector per cycle. Its results appear H+3 = 15 cycles
later (12 tree levels, plus leaf select, multiply and output register). The
edge shifts, level enables and start positions are all control words, so a
new (K, FP, SP) mix needs only new words. The host computes them. The
testbench package `tb/tb_host_pkg.sv` shows how:

- `pe_layout` lays out the partitions and returns the per-level enables and
  positions.
- `edge_shifts` finds a set of edge shifts that gives every leaf its element.
  It assigns each edge the smallest offset found in its subtree.

The host also sends the weights in multiplier order. Multiplier i must get
the weight that multiplies element `off(i)` of W for filter f(i).

## Mem 1: channel summation and double buffering (`out_accum`)

Mem 1 has two buffers of LANES banks each, with M1_DEPTH = 1024 words per
bank. Lane j always writes bank j. Output map f is therefore interleaved over
SP banks: row y = band·SP + s, column x sits in bank f·SP + (y mod SP) at
address band·OL + x.

- The first input channel of a batch writes. Later channels add to the stored
  value, which sums the partial maps over the input channels.
- Rows past OL are not written, and neither are lanes past FP·SP. This covers
  the unused windows of the last band.
- While one buffer accumulates, the other is read out, one 32-bit sum per
  cycle, in map / row / column order.
- The drain latches its own FP, SP and OL, so the next batch may use
  different ones.

A map needs OL·ceil(OL/SP) words per bank, so large early layers must be
split into vertical tiles by the host.

## Output stages (`post_ops`, `out_fifo`)

The post-ops apply, in order:

1. an arithmetic right shift by `qshift`, which sets the output fixed-point
   format;
2. saturation to 16 bits;
3. ReLU (optional);
4. 2x2 stride-2 max pooling (optional), which uses a one-row buffer of
   horizontal maxima.

Mem 2 (`out_fifo`, 512 entries) decouples the output from the host link.
Back-pressure on `out_ready` travels up through Mem 2 and the post-ops into
the Mem 1 drain. If the drain is still busy when the next batch finishes, the
sequencer waits (flush stall).

## Control-word map (`rtl/overlay_pkg.sv`)

| address | content |
|---|---|
| 0 | mode: bit 0 pointwise, bit 1 ReLU, bit 2 max pool |
| 1–10 | K, S, SP (CP), FP, IL, OL, input channels, row bands, lanes in use (FP·SP), requantising shift |
| 16–31 | copy-register row offsets (s·S) |
| 32–63 | shift-accumulate: word 32+2i enable of level i, 33+2i its start position |
| 64… | distribution-tree edge shifts; word 64+e is the edge into heap node e+2 |

## Where this design departs from the published one

- **Distribution tree.** It is built as per-leaf offset selection rather than
  a tree of vector shifters. The multipliers receive the same values.
- **Weight layout.** Weights arrive already laid out per multiplier, including
  the replicas each window's partitions need. The host, not the array,
  arranges them.
- **Drain rate.** Mem 1 drains one value per cycle. The published design
  writes 16 bytes per cycle, so flush stalls come sooner here. Widening the
  drain is a local change in `out_accum` and `post_ops`.
- **Arithmetic.** Products and sums are 32-bit and wrap on overflow. The
  output format is set by one shift per batch.
- **No border logic.** The line buffer has no image-border padding, needs
  K ≥ S, and expects zero rows past the image.
- **Not built.** The auxiliary MAC units for depthwise layers (run
  back-to-back with the preceding convolution) and the second line buffer for
  element-wise additions of two branches are absent. Depthwise layers and
  residual additions therefore need the host. Fully connected layers can be
  run as pointwise layers on a 1x1 image, but were not tested.
- **This design's own choices.** The following are not in the published
  design:
  - the control-word encoding;
  - the host stream formats;
  - the controller state machine;
  - the performance counters;
  - the pipeline latencies;
  - the depth of Mem 2.

## Verification

Every block has a self-checking testbench in `tb/`. Each compares against a
model written independently of the RTL and prints
`TB_RESULT checks=N failures=M`:

| testbench | what it checks |
|---|---|
| `tb_line_buffer` | Every window element for four (K, S, SP, IL) cases and a pointwise case, the window count, the done pulse and one window per beat at S = 1. |
| `tb_pe` | Five (K², FP, SP) mixes. Results are compared with direct dot products, and the latency is checked. |
| `tb_dist_tree`, `tb_red_tree`, `tb_shift_acc`, `tb_mult_array` | Cycle-accurate models of each pipeline stage. |
| `tb_weight_regs` | Prefetch into the free bank, and that a bank in use is never overwritten. |
| `tb_out_accum` | Three batches, with draining overlapped with accumulation and random back-pressure. |
| `tb_post_ops` | Saturation corners, ReLU, and pooling on even and odd sizes. |
| `tb_out_fifo`, `tb_ctrl_mem`, `tb_overlay_ctrl`, `tb_overlay_pkg` | The handshakes, the channel and bank sequence, and the decoders. |
| `tb_cnn_overlay` | End to end, see below. |
| `tb_cnn_overlay_full` | End to end at the default size, see below. |

`tb_cnn_overlay` runs five batches at reduced size: 64 multipliers, 8 rows
and 16 lanes. The batches are:

- a 3x3 layer with ReLU;
- a 3x3 stride-2 layer with pooling;
- a pointwise layer with CP = 3;
- a 5x5 layer whose windows span three tree levels;
- a 2x2 stride-2 layer.

Every output pixel is compared with a reference convolution. The test also
counts each mechanism and fails if one never happens: buffer swaps, weight
stalls, pixel stalls, flush stalls, output back-pressure, pointwise mode,
stride > 1, pooling, multi-level windows and ReLU clipping.

`tb_cnn_overlay_full` instantiates the top with no parameter overrides and
runs three small batches: a 3x3 layer over two channels, a pointwise layer
and a stride-2 layer. It checks every output. It takes about 4 minutes in
Verilator. Its batches are too short for the weight and flush stalls to
occur, so it reports the stall counts without requiring them.

To run one testbench:

```
verilator --binary --timing --assert -Irtl -Itb rtl/overlay_pkg.sv tb/tb_host_pkg.sv \
    -y rtl -y tb tb/tb_cnn_overlay.sv --top-module tb_cnn_overlay -o sim
./obj_dir/sim
```

The testbenches use two-state semantics and initialise everything they read.
Stimulus is applied on the falling clock edge.

## Changing the size

All sizes are parameters of `cnn_overlay`:

- N_MULT, NF, MAX_L, BREG, LANES, M1_DEPTH, WPC and M2_DEPTH are the main
  sizes.
- WLEN, NLEAF, H and CM_DEPTH follow from them.

WLEN, the longest window vector, is the largest K²(NF-K+1) over K ≤ BREG:
726 for the defaults. The multiplier count does not have to be a power of
two, because the tree is rounded up and the extra leaves read zero. Control
words needed for a given (K, S, FP, SP) must respect these limits:

- FP·SP·K² ≤ N_MULT;
- FP·SP ≤ LANES;
- Z ≤ NF;
- OL·ceil(OL/SP) ≤ M1_DEPTH.
