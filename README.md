# BiDE: a streaming engine for binarized encoder-decoder segmentation

This is synthesizable SystemVerilog for an engine that labels every pixel of
an image with a class (semantic segmentation). It runs BEDN, an 11-layer
encoder-decoder network in which weights and activations are single bits.
Every layer has its own piece of hardware, and the layers are chained by
small FIFOs. The image streams in pixel by pixel and class indices stream out
pixel by pixel. No feature map is ever stored whole; each layer keeps only
the few image rows its 3x3 windows need.

Upsampling is what makes a segmentation network hard to binarize. The decoder
uses x2 deconvolution, which places a zero between input pixels. A ±1
activation cannot be zero. This engine never forms those zeros. It also never
forms the zero padding at image edges. Every window lists only the taps that
read a real pixel ("zero-aware"). The threshold that replaces batch
normalisation is then corrected at run time for the number of taps that took
part (the "fan-in threshold").

The hardest parts are:

- the zero-aware window walk;
- the fan-in threshold;
- the streaming scheme that keeps 11 layers busy at once.

Most of this document is about those three.

## The network

All kernels are 3x3. The defaults target 480x360 RGB images and 11 classes.

| layer | operation | in channels | out channels | input size |
|---|---|---|---|---|
| 1 | conv, stride 1. 8-bit pixels × binary weights | 3 | 64 | 480×360 |
| 2 | conv, stride 1 | 64 | 64 | 480×360 |
| 3 | conv, stride 2 | 64 | 128 | 480×360 |
| 4 | conv, stride 1 | 128 | 128 | 240×180 |
| 5 | conv, stride 2 | 128 | 256 | 240×180 |
| 6 | conv, stride 1 | 256 | 256 | 120×90 |
| 7 | deconv, x2 | 256 | 128 | 120×90 |
| 8 | conv, stride 1 | 128 | 128 | 240×180 |
| 9 | deconv, x2 | 128 | 64 | 240×180 |
| 10 | conv, stride 1 | 64 | 64 | 480×360 |
| 11 | conv, stride 1. 24-bit class scores | 64 | 11 | 480×360 |

The pixel classifier follows layer 11 and outputs a 4-bit class index per
pixel.

Stride-1 layers pad one pixel on every side. Stride-2 layers pad only the
bottom row and the right column, so output (y,x) reads input rows 2y..2y+2.

The network has no skip connections. Each layer reads only the output of the
layer before it, and this is what makes pure streaming possible.

## Streaming: one compute array per layer

`bide_top` builds 11 `compute_array`s and a `pixel_classifier`. Each compute
array is a chain:

    input FIFO -> sliding window unit (swu) -> window FIFO -> matrix-vector thresholding unit (mvtu)

Every link uses a valid/ready handshake. The stream between two layers is the
feature map in raster order. Each pixel is sent as ICH/S words, and each word
holds S channels: word j carries channels j·S to j·S+S−1, and bit i of the
word is channel j·S+i. S is the SIMD lane count of the layer that consumes
the stream. The producing layer therefore packs its results into words of
the next layer's width.

A layer with S lanes and P processing elements (PEs) needs this many cycles
per output pixel:

    (nonzero taps) × (ICH/S) × (OCH/P)

These values are the defaults (the "quad" configuration, 29,568 lanes):

| layer | 1 | 2 | 3 | 4 | 5 | 6 | 7 | 8 | 9 | 10 | 11 |
|---|---|---|---|---|---|---|---|---|---|---|---|
| S | 3 | 64 | 32 | 64 | 32 | 64 | 32 | 64 | 32 | 64 | 64 |
| P | 64 | 64 | 64 | 64 | 64 | 64 | 64 | 64 | 64 | 64 | 11 |

They balance the pipeline: every layer needs 1,555,200 cycles per 480×360
frame, with interior windows counted at their full 9 taps. Edge windows and
deconvolution windows have fewer taps, so the real per-layer work is a little
lower. All layers overlap, so one frame takes about one layer's time plus the
pipeline fill.

There are two places where a layer deliberately waits:

- **Line buffer full.** The SWU holds only a few input rows. It stops
  accepting words that would overwrite a row the current windows still need
  (see below).
- **Output vector buffer busy.** The MVTU collects a window's OCH results and
  sends them as OCH/OUT_S words. If the next window finishes before the
  previous result has left, the MVTU holds its input. With balanced shapes
  this never happens, because a window always takes longer than its result
  takes to drain.

Back-pressure propagates upstream through the FIFOs. The FIFOs are 4 words
deep; the depth is a parameter of `compute_array` and has no effect on
correctness.

## The zero-aware sliding window (`window_tap_gen`, `swu`)

`window_tap_gen` is a counter machine. It walks the output positions (oy,ox)
in raster order. For each position it lists the words the window needs:

- in tap order ky, kx;
- channel fold f fastest;
- only for taps that land on a real input pixel.

For each tap it computes the input row and column:

- **stride 1:** iy = oy + ky − 1.
- **stride 2:** iy = 2·oy + ky.
- **x2 deconvolution:** consider the upsampled coordinate u = oy + ky − 1. The
  tap is real only when u is odd, and then iy = (u − 1)/2.

A tap outside the image is skipped in every geometry.

For deconvolution, the parity of the output position decides how many taps
survive, which gives four window patterns:

| output (row, col) | pattern | real input pixels | fan-in |
|---|---|---|---|
| odd, odd | 1 | 1 | ICH |
| odd, even | 2 | 2 | 2·ICH |
| even, odd | 3 | 2 | 2·ICH |
| even, even | 4 | 4 | 4·ICH |

Rows and columns are numbered from 0. Edge positions lose further taps.

Two copies of the same generator run in each compute array:

- The SWU turns (iy, ix, f) into line-buffer addresses.
- The MVTU turns (tap, f) into weight addresses.

Both walk the same sequence, so the stream carries no side information, and
the MVTU still knows where each window ends and which pattern it has.

The SWU's line buffer holds the input feature map (IFM) in a memory of ROWS
rows used circularly:

- ROWS = 4 for convolution: three window rows plus one being filled.
- ROWS = 3 for x2 deconvolution: a window covers at most two real rows.

Deconvolution also stores only real rows. The zero rows and columns never
exist anywhere.

Two gates control the SWU:

- **Writer.** A word of input row r is written only when
  r < (lowest row the current output row needs) + ROWS.
- **Reader.** A word is read only after it has been written.

Overlapping windows re-read the memory rather than keeping a window register.

At the end of a frame, the writer waits until the reader has finished the
frame. This leaves a bubble of a few rows between frames.

## The fan-in threshold (`mvtu_pe`)

With ±1 values, a dot product over n taps equals 2·pop − n, where pop is the
XNOR popcount. Batch normalisation followed by sign becomes a comparison
against a threshold th_old fixed after training:

    2·pop − n ≥ th_old   ⇔   pop ≥ (th_old + n) / 2

In an ordinary convolution n is a constant. Here n is the number of nonzero
activations in the window, and it changes with:

- the deconvolution pattern (ICH, 2·ICH or 4·ICH);
- every edge.

Each PE therefore has a fan-in counter. It starts at 0 with a window and adds
S for every word accumulated. When the window ends, the PE forms

    th_new = (th_old + fan_in) >>> 1

and outputs the bit `pop ≥ th_new`. Only th_old is stored, one 16-bit value
per output channel. The shift rounds down; the offline threshold computation
has to account for that when th_old + fan_in is odd.

The first and last layers work differently:

- **Layer 1** (`KIND_FIRST`) multiplies 8-bit unsigned pixels by ±1 weights,
  i.e. it adds or subtracts each pixel. The sum is already on the threshold's
  scale, so the output bit is `acc ≥ th_old` with no fan-in correction.
- **Layer 11** (`KIND_LAST`) keeps the correction but outputs a score,
  ((pop − th_new) × λ) >>> 16, as 24 bits. λ is a per-channel unsigned 24-bit
  scale with 16 fractional bits. The usual factor ½ of the batch-norm scale is
  left out, because scaling all classes equally does not change which class
  wins.

Inside a PE:

- cycle t: the weight, threshold and scale memories are read.
- cycle t+1: the word is accumulated.
- cycle t+2: the result of a window's last word appears.

A new word can enter every cycle.

## Folding, replay and output packing (`mvtu`)

Output channel o belongs to PE o % P, as its neuron fold o / P. When OCH > P
the window's words are replayed from an input vector buffer for each further
fold. The buffer holds one window, at most 9 × ICH/S words, so the previous
layer is not asked for them again.

Weight word address inside a PE:

    nf · 9·(ICH/S) + tap · (ICH/S) + f

Here tap = 3·ky + kx counts the taps of the full 3×3 window, including
skipped ones. The results of all PEs and folds are collected and sent on as
the next layer's words. The last layer sends its 11 scores as one 264-bit
word.

## Pixel classifier

The pixel classifier is an 11-stage pipeline. Stage k holds one pixel's
scores together with the best score and index among classes 0..k−1, and it
compares class k. The classes of a pixel are therefore compared one after
the other, while up to 11 pixels are in flight. One pixel enters and one
index leaves every cycle. The latency is 10 cycles.

On a tie the lower index wins. When the output is not taken, the whole
pipeline stalls.

## Loading a network

The engine has no weight ROMs. Before the first image, every PE memory is
written through the `cfg_*` port, one word per cycle:

- `cfg_layer` (0..10) and `cfg_pe` select the PE.
- `cfg_sel` selects the weight, threshold or scale memory.
- `cfg_addr` is the address: the weight word address above, or nf for the
  threshold and scale memories.

Weight bit i of a word is input channel f·S+i. A bit value of 1 means +1.

Deconvolution weights must be stored already flipped. The hardware applies
tap (ky,kx) of the stored kernel at window position (ky,kx).

Total parameter storage at the defaults:

- 1,703,808 weight bits (about 213 kB);
- 1,291 thresholds of 16 bits;
- 11 scales of 24 bits.

The line buffers add 1,213,440 bits. Synthesis reports about 2.95 Mbit of
memory in all.

## Simulating

Everything is plain SystemVerilog (IEEE 1800-2017) and simulates with
Verilator 5. Run from the directory that holds `rtl/` and `tb/`. For example,
the end-to-end test:

    verilator --binary --timing --assert -y rtl -y tb \
        rtl/bide_pkg.sv tb/bide_ref_pkg.sv tb/tb_bide_top.sv \
        --top-module tb_bide_top -Mdir obj_top -o sim
    ./obj_top/sim

Every testbench ends with a line `TB_RESULT checks=N failures=M`. Replace the
testbench name for the others:

| testbench | what it tests |
|---|---|
| `tb_stream_fifo` | the FIFO |
| `tb_window_tap_gen` | all three geometries, including worked address examples of the four deconvolution patterns |
| `tb_swu` | the SWU in all three geometries, with a rate check |
| `tb_mvtu_pe` | the PE in all three kinds, with a latency check |
| `tb_mvtu` | the MVTU with folds and replay, with a rate bound |
| `tb_compute_array` | a stride-2 layer |
| `tb_pixel_classifier` | the classifier |
| `tb_bide_top` | the whole engine at reduced sizes |
| `tb_bide_full` | one full 480×360 frame at the defaults |

`tb_bide_top` runs the whole engine at reduced sizes: an 8×8 image, 3 to 8
channels, two frames. It compares every link, every score and every class
index with a behavioural model (`bide_ref_pkg`). It also counts each
mechanism and fails if any never happened:

- the four deconvolution patterns;
- edge skips;
- stride-2 windows;
- fold replays;
- back-pressure.

`tb_bide_full` runs one complete 480×360 frame with no parameter overrides:

- It loads a random network, about 45,600 configuration writes.
- It streams a random image.
- It records every stream between layers.
- It recomputes all channels at the four corners and at 24 random pixels of
  every layer, using that layer's recorded input.
- It checks all 172,800 class indices against the recorded scores.

One run needs 1,637,533 cycles from the first pixel in to the last class
index out. That is 114.5 frames/s at 187.5 MHz. The testbench's own bound is
the slowest layer's 1,555,200 cycles plus two input rows per layer for
pipeline fill. Simulating it takes roughly 5 to 6 minutes in Verilator, plus
1 to 3 minutes to build.

To change the network size or the configuration, override `IMG_H`, `IMG_W`,
`CH`, `LANES` and `PES` on `bide_top`. S must divide ICH, and P must divide
OCH.

## How far it can be trusted

- Every block has a self-checking testbench with independently computed
  expectations. Each testbench was also run against a deliberately broken copy
  of its module, and each copy failed.
- The reduced end-to-end test checks bit-exact agreement with a reference that
  knows nothing about words, folds or stream order.
- The full-size frame checks every class index against the recorded scores
  and every layer at sampled pixels. It does not check every pixel of every
  layer.
- The whole design passes Verilator lint and the slang front end. Yosys
  synthesises it at full size (about 58k cells plus memories).
- No FPGA build and no timing closure have been done. No trained network has
  been run; all tests use random weights and thresholds.

## Departures and own choices

These points are choices of this design:

- The `cfg_*` loading port and its address layout.
- The λ format: unsigned, 16 fractional bits.
- The 16-bit threshold width.
- The tie rule of the classifier.
- The FIFO depths.

The engine it follows keeps images and class-index maps in off-chip memory, with its
controller in front of the first layer and behind the classifier. They are not part of this RTL.
`img_*` and `cls_*` are the points where they would connect.

Deconvolution weights are flipped offline, not in hardware.

The SWU pauses at each frame boundary until the previous frame has left the
line buffer. Consecutive frames therefore do not overlap inside a layer.

For its quad configuration, the described engine reports 25.89 frames/s at
187.5 MHz, i.e. about 7.24 M cycles per frame. This design's balanced layers
need about 1.56 M cycles per frame at the same sizes. The measured count is
1.64 M including pipeline fill, about 4.4 times faster.

The reported figure includes whatever the real device loses outside the
compute arrays, and this RTL cannot show where that time goes. Here each
compute array works every cycle it has a word, and nothing limits the image
input or the index output. Neither the memory system nor the clock rate of a
real device is modelled.

Every deconvolution output position follows the parity rule above, including
the first row and column. At (0,0), for example, only input pixel (0,0) takes
part: edge padding removes the other three taps of its even/even pattern.
