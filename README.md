# Quadrant-tree colour image compressor with adaptive DPCM

This is synthesizable SystemVerilog for a small image compressor aimed at
low-bandwidth links such as ZigBee or Bluetooth, or an in-body camera. It
reads an 8x8 colour image (three 8-bit components per pixel) and works in
two steps:

1. **Adaptive DPCM.** Each colour component goes through a 1-bit
   differential quantizer with an adaptive step size. The tree is built on
   the reconstructed values this produces.
2. **Quadrant tree decomposition (QTD).** The image is split recursively
   into quadrants. A quadrant whose pixel range (max − min) is within a
   threshold in every component counts as uniform, and is sent as a single
   pixel. Any other quadrant is split again, down to single pixels.

The tree is built in a single scan of the image, while the pixels are being
quantized. It is then *trimmed* in one clock cycle, so that only the largest
uniform block on each path from the root survives. Next the trimmed flag
bits are sent. Finally the image is scanned again. A purely combinational
decoder (the "wave decoder") skips every pixel that a uniform block already
covers, and the pixels that remain are quantized and sent.

The design follows a published architecture: one-pass QTD on a
Morton-ordered scan, single-cycle trimming, and register-free decoding to
save area. That description leaves many details open, and the sections
below say which parts are this design's own choices.

## Block diagram

```
 load_* ──► frame_store ──rd_data──► adpcm_quantizer x3 ──recon──► qtd_tree ──flags──┐
 (camera     (64 x 24 bit)   ▲            (1 per colour)              (21 flags)       │
  side)                      │                 │ code, recon                           ▼
                       zscan_2d1d              └──────────► output ◄── wave_decoder ◄──┘
                     (tree-order scan)                       register     (send/skip,
                             ▲                                            block layer)
                          qtd_ctrl  (phases, Const/Trim, quantizer clear, flag index)
```

| module | role |
|---|---|
| `qtd_pkg` | sizes (`IMG_LOG2`, `PIX_W`, `NCOMP`), flag-index helpers, the phase enum |
| `frame_store` | image memory: 1 write port and 1 synchronous read port, addressed by row and column |
| `zscan_2d1d` | scan counter: walks the tree addresses and gives the row and column of each |
| `adpcm_quantizer` | 1-bit backward-adaptive DPCM (one instance per colour component) |
| `qtd_tree` | flag bits of every block at every layer; construction mode and trim mode |
| `wave_decoder` | combinational send/skip decision for the read-out pass |
| `qtd_ctrl` | control state machine |
| `qtd_compressor_top` | wires it all together |

## Tree addresses: why one scan is enough

Each pixel has a *tree address* of `2*IMG_LOG2` bits (6 bits for 8x8). The
most significant pair of bits picks the quadrant of the whole image, the
next pair the quadrant within that, and so on. Inside each pair, the low bit
is a row bit and the high bit a column bit. Put another way, **row bit k is
address bit 2k (the even bits) and column bit k is address bit 2k+1 (the odd
bits)**. The quadrant order at every level is therefore top-left,
bottom-left, top-right, bottom-right.

Counting the address from 0 to 63 makes every block of every layer a run of
consecutive pixels. A 2x2 block is 4 consecutive addresses, a 4x4 block is
16, and the whole image is 64. So `qtd_tree` needs only **one running
min/max pair per layer and per component**:

- The pixel whose offset inside its layer-l block is 0 restarts that
  layer's pair.
- The pixel whose offset is all ones completes the block, and its flag is
  written in that same cycle.

All layers update in parallel, so the whole tree is ready one clock after
the last pixel. No image buffer and no second pass is needed to build it.

## Flags, layers and trimming

The flags sit in one vector, root first, then each layer in tree order.
Layer `l` has `4**l` flags and starts at index `(4**l-1)/3`. An 8x8 image
has 3 layers, 1 + 4 + 16 = 21 flags:

| layer | blocks | block size | flag indices |
|---|---|---|---|
| 0 | 1 | 8x8 | 0 |
| 1 | 4 | 4x4 | 1..4 |
| 2 | 16 | 2x2 | 5..20 |
| 3 | — | single pixels | no flag |

A flag of **1** means the block is uniform: in every component,
`max − min <= threshold`, using the reconstructed values. A flag of 0 means
the block is split. With `threshold = 0` the test is plain equality.

Range tests are monotone: if a block passes, so does every block inside it.
So right after construction, a uniform 4x4 block also has its four 2x2 flags
set. **Trimming** clears every flag whose parent flag is 1. It happens in a
single cycle, while `const_trim` is 0, for the whole tree at once. After
trimming, each path from the root to a pixel holds at most one set flag, and
that flag marks the largest uniform block containing the pixel. Trimming a
second time changes nothing.

## Read-out and the wave decoder

In the read-out pass the scan runs through tree addresses 0..63 again. For
each address, `wave_decoder` looks up in parallel the flag of the block that
holds the pixel at every layer:

- **No flag set:** the pixel is sent on its own (`level = IMG_LOG2`).
- **A flag set at layer `l`:** only the block's first pixel in tree order is
  sent (`level = l`), standing for the whole block. The other pixels of the
  block are skipped.

The decoder is pure logic between the flag registers and the output
register, with no pipeline or synchronising flip-flops. This is the
area-saving "wave decoding" idea: replace registers by plain gates and
buffers wherever the data cannot collide.

The quantizers are cleared at the start of read-out and advance only on the
pixels that are sent. A receiver that runs the same DPCM recursion over the
received codes therefore stays in step with the transmitter.

## Adaptive DPCM quantizer

The quantizer keeps three registers R1, R2, R3 (newest first) of previous
*reconstructed* values, so the prediction is backward-adaptive and needs no
side information. For each pixel x:

```
pred  = (2*R1 + R2 + R3) / 4
code  = (x >= pred)                          1-bit quantizer, boundary = pred
step  = (code == previous code) ? min(2*step_prev, STEP_MAX) : STEP_INIT
recon = clamp(code ? pred + step : pred - step, 0, 2**PIX_W - 1)
R3 <= R2, R2 <= R1, R1 <= recon
```

The step rule is the core idea. While the code stays the same, the step is
too small to keep up, so it grows. When the code flips, the step is near the
right size and goes back to its initial value. The first pixel after
`clear` uses `STEP_INIT`.

Outputs are combinational in the current pixel and state, and the state
advances on `valid`. After `clear` the history holds mid-grey (128).

## Interface and timing of `qtd_compressor_top`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `load_en`, `load_row`, `load_col`, `load_data` | in | 1, 3, 3, 3x8 | write one pixel (all components) into the frame store |
| `start` | in | 1 | start a run; ignored while `busy` |
| `threshold` | in | 8 | QTD threshold, sampled at `start` |
| `busy` | out | 1 | a run is in progress |
| `done` | out | 1 | high for one cycle at the end of the run, in the cycle the word for address 63 appears if that pixel is sent |
| `out_valid` | out | 1 | an output word is present (one cycle, no back-pressure) |
| `out_is_flag` | out | 1 | 1: flag word, 0: pixel word |
| `out_flag` | out | 1 | trimmed flag bit (flag words) |
| `out_code` | out | 3 | 1-bit DPCM code of each component (pixel words) |
| `out_pixel` | out | 3x8 | reconstructed components (pixel words) |
| `out_addr` | out | 6 | flag index, or tree address of the pixel |
| `out_level` | out | 2 | layer of the block the pixel stands for (3 = single pixel) |

The stream for one image is 21 flag words (index 0 first) followed by the
pixel words in tree order. Counting from the clock edge that samples
`start`:

| clocks after the `start` edge | event |
|---|---|
| 0..63 | construction scan (one pixel per clock) |
| 64 | drain |
| 65 | trim |
| 67..87 | flag words on the output |
| 89..152 | pixel words (only those sent) |
| 152 | `done` goes high |

A run always takes `2*NPIX + NF + 3` = 152 clocks, whatever the image. Load
the next image only after `done`, because read-out re-reads the frame store.

Each pixel word carries the layer of its block in 2 bits, which is enough
for the 3 layers of an 8x8 image. A 7-bit "levels of subdivision" field, as
in the published number format, would be needed only for far larger images.

**Decoding at the receiver.** Read the 21 flags. A pixel word with
`level = l < 3` paints the whole layer-l block that starts at `out_addr`. A
word with `level = 3` paints one pixel. `out_addr` and `out_level` are given
for convenience; a receiver can also derive them from the flags.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `IMG_LOG2` | 3 | image is `2**IMG_LOG2` pixels square (8x8) |
| `PIX_W` | 8 | bits per colour component |
| `NCOMP` | 3 | colour components per pixel |
| `STEP_INIT` | 4 | initial DPCM step (own choice) |
| `STEP_MAX` | 64 | DPCM step saturation (own choice) |

The modules are written for any `IMG_LOG2`. For larger images, mind that
the frame store grows as `4**IMG_LOG2` words and the flag vector as
`(4**IMG_LOG2-1)/3` bits. The end-to-end test has been run at 4x4, 8x8
(default) and 16x16.

## What follows the source and what is this design's own choice

**Follows the published description:**

- The processing chain: 2-D to 1-D scan, adaptive DPCM, QTD, wave decoding.
- Three registers of reconstructed pixels feeding a backward predictor.
- A 1-bit quantizer.
- The step rule: grow while the quantization interval repeats, reset when it
  changes.
- The min/max-versus-threshold split criterion, with a comparator for
  multi-bit pixels (equality when the threshold is 0).
- Construction of all layers of the tree in one scan.
- Row and column taken from the even and odd bits of the tree address.
- A Const/Trim mode signal, 0 meaning trim.
- Single-cycle trimming driven by the parent flag, with flag 1 meaning "not
  divided".
- Flags sent before pixels.
- A second read-out pass that skips compressed pixels and re-runs the
  quantizer only on the pixels sent.
- A decoder without synchronising registers.

**Choices made here** (the description is silent):

- The predictor weights (2, 1, 1)/4.
- The step factor 2, `STEP_INIT` and `STEP_MAX`.
- Mid-grey reset of the quantizer history.
- Building the tree on the reconstructed values rather than the raw pixels.
- Colour handling: one tree shared by the three components, where a block
  must be uniform in all of them, with a separate quantizer per component.
- The frame store as a clocked memory with a one-cycle read.
- The first pixel of a uniform block as its representative.
- The flag order.
- The output word format.
- The start/busy/done handshake, plus the drain and flush cycles.

**Not built:**

- The image sensor itself. Pixels enter through the `load_*` port.
- The bit-serial depth-first tree code ("1 = split, 0 = leaf followed by its
  colour"). The source gives it as one possible way to encode a tree; the
  hardware here sends the trimmed flag vector instead.
- A gate-level netlist in which buffers replace flip-flops. Here that idea
  is expressed at RTL level: the decoder and the flag tests are
  combinational and unregistered. Actual area depends on the synthesis tool
  and target.
- A decompressor. The testbench reference model plays that role for
  checking.

## Verification

Every module has a self-checking testbench in `tb/`. Each one compares the
module against reference models in `tb/qtd_ref_pkg.sv`. Those models work
from rows, columns and square blocks rather than from address bit slicing,
so they are independent of the RTL.

| testbench | what it covers |
|---|---|
| `frame_store_tb` | random image; scrambled read order; 1-cycle read latency; hold |
| `zscan_2d1d_tb` | address-to-row/column mapping, `last`, wrap, hold, clear priority |
| `adpcm_quantizer_tb` | flat areas, ramps, both range ends and random input against the model. Requires that step growth, step reset, saturation and clamping at both ends each occur. Also tests `clear` and the idle hold |
| `qtd_tree_tb` | 24 three-component images with uniform patches, outliers in one component and several thresholds. Checks raw flags and trimmed flags, and that a second trim changes nothing. Requires a uniform block in every layer, a split block and a trimmed flag |
| `wave_decoder_tb` | 200 flag sets, trimmed and untrimmed: send, covered and level for every pixel, and the sent-pixel count |
| `qtd_ctrl_tb` | exact phase sequence, cycle by cycle; `start` ignored while busy; back-to-back runs |
| `qtd_compressor_top_tb` | the whole design at default parameters. 12 colour images × 5 thresholds; bit-exact stream against the reference; cycle of the first flag and of `done`. Counts blocks sent per layer, skipped pixels, trimmed flags, step growth and reset, and clamps, and fails if any of them never happens |
| `qtd_compressor_4x4_tb`, `qtd_compressor_16x16_tb` | the same end-to-end test with `IMG_LOG2` = 2 (5 flags) and 4 (85 flags) |

`qtd_ctrl` also carries concurrent assertions: trimming lasts one cycle, a run
ends in idle, and the frame store is read only during the scans. They are
active in every simulation that includes the controller (Verilator
`--assert`).

Each testbench prints `TB_RESULT checks=N failures=M` and has a watchdog. To
run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl \
  rtl/qtd_pkg.sv tb/qtd_ref_pkg.sv rtl/*.sv tb/qtd_compressor_top_tb.sv \
  --top-module qtd_compressor_top_tb -Mdir obj && ./obj/Vqtd_compressor_top_tb
```

For a single block, replace `rtl/*.sv` with that block's file and use its
testbench. The end-to-end test takes well under a second.

**How far to trust it:** every module lints clean under
`verilator -Wall`, apart from unused-signal notes. Each module also
elaborates in a second SystemVerilog front end and synthesises to generic
cells. At the default size that is about 440 word-level cells, 330
flip-flop bits and a 64x24-bit memory. Mapped generically to 4-input LUTs,
it needs about 2,700 LUTs plus the memory. Each testbench has been shown to fail on a deliberately
broken copy of its module. The reference models encode this design's
reading of the algorithm, so they confirm that the RTL matches that
reading. They do not show that the reading matches the original authors'
implementation in every unstated detail listed above.
