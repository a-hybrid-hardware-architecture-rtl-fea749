# Overdrive frame-buffer compression for LCD panels

LCD overdrive speeds up the liquid crystal response. It drives each pixel past its target for one frame, and how far past depends on the pixel's value in the previous frame. So the controller has to keep the whole previous frame. At full HD that is 6 MB of RGB888 per frame, which would normally sit in external SDRAM.

This design compresses every frame to exactly one sixth of its raw size, so that the frame buffer is small enough to live on chip. It combines two coders, chosen per 4x4 pixel block:

- **DCT mode**, for natural (camera) content:
  - colour conversion to YCbCr;
  - 4x4 integer DCT;
  - quantization;
  - run/level variable-length coding.
- **Silhouette mode**, for synthetic content such as text, graphics and game images. The block is coded as two colours plus a 16-bit map saying which pixel takes which colour. This is a block-truncation-style coder that keeps sharp two-level edges exactly, where a DCT would ring.

A rate controller picks the mode and the quantizer step so that every fixed-size segment of blocks fits its memory slot. The compressed previous frame is then decoded again while the current frame is being written. Each block stored in memory is decoded twice:

- once right after encoding, the *reconstruction*, which is what the frame will look like when read back;
- once a frame later, by the second decoder.

The overdrive stage therefore sees two versions of the same data: the current reconstruction and the decoded previous frame. Both carry the same coding error. This is the "dual decoder" arrangement, and it keeps coding error from being mistaken for motion.

The overdrive lookup table itself is not part of this design. The top brings out both block streams where it would connect.

## Data path at a glance

```
pix (RGB888, 1/clk) ─► block_former ─► od_encoder ──code──► segment_buffer ─► frame_memory
                       (3 line bufs)     │ stage A: csc_forward, dct4x4 x3, chroma_mode,
                                         │          silhouette_detector, palette lookup
                                         │ stage B: quantizer x8 qp, vlc_length,
                                         │          rate_controller, vlc_encoder
                                         │ stage C: dequantizer, idct4x4, csc_inverse
                                         ▼          (reconstruction = first decoder)
                                    cur_blk / cur_idx

frame_memory ─► od_decoder (segment copy, vlc_decoder 2 symbols/clk, palette,
                block_reconstruct) ─► prev_blk / prev_idx
```

Everything runs in the video clock domain with one pixel per clock. A block arrives every 16 clocks on average. Within a 4-row strip, though, blocks arrive in bursts of one every 4 clocks. This is why the encoder is fully parallel per block: all eight quantizer steps are tried at once.

## Block coding

### Colour and transform

`csc_forward` converts to YCbCr with 8-bit fixed-point weights (BT.601, full range), with samples centred on zero. `dct4x4` is the H.264-style integer transform with this matrix:

```
C = [1 1 1 1; 2 1 -1 -2; 1 -1 -1 1; 1 -2 2 -1]
```

Its rows are not normalised. The per-position scale factors are 1024, 648 and 410 (in units of 1/4096). They are folded into the quantizer and the dequantizer, so neither transform needs a multiplier. `idct4x4` computes (Cᵀ·W·C + 2048) >> 12.

### Chroma down-sampling

`chroma_mode` adds up the normalised high-frequency energy of Cb and Cr, that is, every coefficient outside the top-left 2x2. If the sum is at most TH = 16, the block is marked `cdown`. The quantizer then keeps only the four low coefficients of each chroma component, which is the same as 2:1 down-sampling in both directions, and the bits saved go to luma. The decision is made per block, so colourful edges keep full chroma.

### Quantizer

For each coefficient, `quantizer` computes:

```
level = (|c| · nscale + 2^(10+qp)) >> (12+qp)
```

The level is clamped to 1023. The rounding is 1/4 step (dead-zone style). Coefficients are read in zigzag order, and after MAX_NZ = 6 non-zero levels per component the rest are dropped. A flag `truncated` reports that this happened.

qp runs from 0 to 7, and each step doubles the step size. The dequantizer rebuilds (|l| << qp) + (2^qp >> 2), then scales it by nscale.

### Silhouette detector and palette

`silhouette_detector` works as follows:

1. It splits the 16 pixels at the block's mean luma.
2. It takes the rounded RGB mean of each group as the low and high colour.
3. It calls the block synthetic when the luma gap between the two colours is at least GAP_TH = 48 and no pixel lies more than NOISE_TH = 12 from its own group's colour on any channel.

A flat block is also synthetic: it has one group, and both colours are equal.

`color_palette` holds the last 8 colours coded in silhouette mode. A colour found there costs 4 bits instead of 25:

- Both colours are looked up before the palette is updated.
- The low colour is inserted before the high colour.
- Replacement is round-robin.
- The palette is cleared at the start of every segment, so that each segment can be decoded on its own.

### Code format (MSB first)

```
DCT block:        0 | qp[3] | cdown | for Y, Cb, Cr: nnz[3] then nnz symbols
  symbol:         run[4] | size prefix: (s-1) ones then 0 (no 0 when s = 10)
                  | s-1 mantissa bits below the leading one | sign
Silhouette block: 1 | low: hit, idx[3] or 0, rgb[24] | high: same | bitmap[16]
```

A symbol is at most 23 bits. The shortest block code is 14 bits: a DCT block with no coefficients.

### Rate control

The frame is split into segments of SEG_BLOCKS = 8 consecutive blocks along a strip. Each segment gets a fixed slot of 8 × 64 = 512 bits. `vlc_length` gives the exact length of all eight qp candidates at once. For each block, `rate_controller` then computes a limit from the bits remaining in the segment (`rem`) and the blocks still to code, including this one (`left`):

```
hard  = rem − (left−1)·14                // always leave room for the later blocks
fair  = rem/left + (rem/left)/8          // do not starve them either
limit = min(hard, fair)
```

The controller chooses, in this order:

1. silhouette mode, if its code fits in `limit`;
2. otherwise the smallest qp whose code fits;
3. otherwise the 14-bit DCT code with no coefficients at all. It is the last resort and rebuilds the block as mid-grey.

The choice among qp values and modes is this design's own. The published description only says that the controller measures code lengths and keeps each segment within its budget. Because `hard` always leaves room for the later blocks, a segment can never overflow. This is checked by an assertion in the rate controller and another in the segment buffer.

## Memory organisation and the two-frame schedule

`segment_buffer` places each block's code at its bit offset inside a 512-bit buffer. When a segment is complete, it writes the segment to `frame_memory` as a burst of 16 words of 32 bits, at the segment's fixed slot. There are three buffers:

- one being filled;
- one being written;
- one spare.

The spare is needed because the writer must sometimes wait for the reader (see below).

Slot addresses depend only on the block position, so a slot of the new frame overwrites the same slot of the previous one. The read and write rules are:

- **Reading.** `od_decoder` may read slot r once the current frame has reached the strip that holds r (`allow` in `od_top`). From then on, strip n of the previous frame is decoded while strip n of the current frame is coming in.
- **Writing.** The writer may not overwrite a slot the decoder has not yet copied (`seg_hold`).

The decoder copies a whole segment into a local buffer first, so a slot is free as soon as it has been copied. `vlc_decoder` then parses up to two symbols per clock. A DCT block takes at most 13 clocks, well below the 16-clock average.

At 1920x1080 the frame memory holds 129600 blocks × 64 bits = 259200 words of 32 bits, about 1 MB. Without compression this would take 6.2 MB.

## Interfaces

### od_top

| Port | Dir | Meaning |
|---|---|---|
| `clk`, `rst_n` | in | video clock; asynchronous active-low reset |
| `pix_valid`, `sof`, `pix` | in | raster RGB888, one pixel per clock; `sof` on the first pixel of a frame |
| `cur_valid`, `cur_blk`, `cur_idx` | out | reconstruction of the current frame, one 4x4 block (16 × RGB) with its row-major block number; 3 clocks after the coded block |
| `prev_valid`, `prev_blk`, `prev_idx` | out | decoded previous frame, same format; trails `cur_*` by up to one strip |
| `code_*` | out | per-block statistics: silhouette, qp, cdown, zero fallback, truncation, palette hits, code length |
| `seg_hold`, `overflow` | out | writer waiting for the decoder; sticky error if a segment was lost (never expected) |

Constraints:

- H_ACTIVE must be a multiple of 4 × SEG_BLOCKS (32 by default).
- V_ACTIVE must be a multiple of 4.
- No blanking is required: the testbenches send frames back to back with no gaps. The block former emits a block one clock after its last pixel.

Line and segment timing for each submodule is given in the opening comment of its file.

## Verification

Each module in `rtl/` has a self-checking testbench `tb/tb_<module>.sv`. The testbenches compare the module against bit-exact reference functions in `tb/od_ref_pkg.sv`, using random and corner-case stimulus. Each prints `TB_RESULT checks=N failures=M` and has a watchdog.

End-to-end tests:

- **`tb_od_top`** encodes and decodes three frames of 128x32. The picture has four bands: a gradient, two-colour text, binary noise and stripes. The test checks three things:
  - the decoded previous frame is bit-identical to the reconstruction made when it was encoded;
  - the PSNR over the gradient and text bands is at least 35 dB;
  - every mechanism occurs at least once: silhouette, palette hit, cdown, raised qp, zero fallback and truncation.
- **`tb_od_top_full`** runs the same test at the default 1920x1080 for two frames and takes about half a minute with Verilator.

Any testbench can be run like this:

```
verilator --binary --timing --assert -Wno-fatal rtl/od_pkg.sv tb/od_ref_pkg.sv \
    $(ls rtl/*.sv | grep -v od_pkg) tb/tb_od_top.sv --top-module tb_od_top
./obj_dir/Vtb_od_top
```

The packages must come first.

## Where the design follows its source and where it chooses

These points follow the published architecture:

- hybrid DCT / silhouette coding;
- a DCT on small macroblocks fed by line buffers;
- colour space conversion with chroma down-sampling chosen per block;
- scan, quantization and a limit on non-zero coefficients;
- a length-limited VLC;
- a local colour palette;
- a rate controller that works from exact code lengths and fixed segments;
- a triple segment buffer with burst writes;
- dual decoders;
- a single clock domain;
- a compression ratio of 1/6;
- an embedded frame memory as the alternative to SDRAM.

These are this design's own choices, because no values or insides were available for them:

- 4x4 blocks;
- the integer transform and its scaling;
- the colour matrix;
- the quantizer formula and the qp range 0..7;
- MAX_NZ = 6;
- chroma TH = 16;
- GAP_TH = 48 and NOISE_TH = 12;
- an 8-entry round-robin palette;
- the exact code format and the prefix code for level sizes;
- 8 blocks per segment;
- the rate-control limit rule;
- 32-bit memory words.

These points depart from the published architecture:

- **Noise measure of the silhouette detector.** The published design measures the noise within each group with a first-order difference, which is more immune to noise. Its form is not given. Here the measure is the largest deviation of a pixel from its own group's colour.
- **Purpose of the third segment buffer.** The published design uses the third buffer to keep picture quality smooth across segment boundaries, and does not say how. Here it only decouples the writer from the decoder. The rate controller still treats every segment on its own.
- **Number of codecs.** The published design runs several VLC encoders and decoders in parallel at a lower clock. This design has one of each, running at the pixel clock.

These parts are not built:

- **Prediction / inverse prediction stage.** Its function is not specified. Coefficients are coded directly.
- **Packetised linked lists** for several parallel VLC codecs sharing one memory. One encoder and one decoder with fixed slots are enough at one pixel per clock.
- **External SDRAM controller.** The on-chip frame memory replaces it.
- **The overdrive lookup table.**

The design has been checked for functional correctness in simulation. Its picture quality has not been measured on the standard test images (Lena, Baboon and others). The PSNR figure above comes from the synthetic test picture only.

## Changing it

- The main knobs are in `od_pkg.sv`:
  - `MAX_NZ`;
  - `QP_N`;
  - `PAL_N`;
  - the code-format constants.
- The thresholds are parameters of `od_encoder`:
  - `CHROMA_TH`;
  - `GAP_TH`;
  - `NOISE_TH`.
- Changing `BLK_BITS` changes the compression ratio: 64 gives 1/6 and 96 gives 1/4. Change it in `od_top` and it propagates down.
- After changing the code format, change the reference encoder in `tb/od_ref_pkg.sv` to match. Otherwise the unit testbenches will report mismatches.
