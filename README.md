# Streaming preprocessing and HOG/LBP feature accelerators for facial-expression recognition

This is the programmable-logic half of a hardware/software split for
recognising facial expressions in still grey-level images on a Zynq-7020
class SoC. Software on the ARM cores finds the face (Viola-Jones), selects
a handful of features (Relief) and classifies them (a small
back-propagation neural network into seven expressions). The two steps that
dominate the run time on the CPU are moved into logic:

1. **Preprocessing**: Gaussian smoothing, cropping to the face box,
   resizing to 100x100 and intensity normalisation.
2. **Feature description**: HOG (histogram of oriented gradients, 16x16
   cells, 0-180 degrees, 900 values) and LBP (local binary patterns)
   computed on the 100x100 face.

Both accelerators work on pixel streams at one pixel per clock, use row
buffers instead of frame stores wherever the algorithm allows, and talk to
memory through stream ports that a DMA engine would drive. The processor
chains them: image -> preprocessing -> memory -> feature description ->
memory. The target clock is 166.67 MHz and the throughput target is at
least 20 (design point 27.5) images per second.

## Top level: `fer_accel_top`

```
             roi_x/y/w/h (face box from software face detection)
                    |
 pre_s_* ──> preproc_accel ──> pre_m_*         256x256 px in, 100x100 px out
 feat_s_* ─> feature_accel ──> feat_m_*        100x100 px in, 959 words out
```

| parameter | default | meaning |
|---|---|---|
| `W`, `H` | 256, 256 | input image size |
| `N` | 100 | face size after resizing |

Every stream is valid/ready: a beat moves on a rising clock edge where both
are high; `*_m_last` marks the final beat of a face or feature vector.
Pixels are 8-bit unsigned, in raster order (row by row, left to right).
Feature words are 16 bits. `rst_n` is an asynchronous, active-low reset.
Frames are delimited by counting pixels: every input image must be exactly
`W*H` pixels and every face exactly `N*N`.

The two accelerators are deliberately not connected to each other: as in
the system they come from, each reads from and writes to memory. Feeding
`pre_m_*` straight into `feat_s_*` works too and would save a round trip
through memory.

Shared constants, types and small pure functions (LBP code and bin, an
integer square root, the HOG bin boundary constants) are in
`rtl/fer_pkg.sv`.

## Preprocessing accelerator (`preproc_accel`)

Three stages joined by valid/ready streams:

**`gaussian_filter`** smooths with the 3x3 binomial kernel
`[1 2 1; 2 4 2; 1 2 1]/16`, rounded to nearest. It gets its 3x3
neighbourhood from `window3x3`, which keeps the two previous rows in
`row_buffer` (two 256-byte memories) and shifts a 3x3 register window
along. Only pixels whose window lies inside the image are produced, so
254x254 filtered pixels leave per image, each tagged with its image
coordinates.

**`crop_resize`** keeps the pixels that nearest-neighbour resizing of the
face box to 100x100 needs. Face pixel (i, j) is image pixel
`(roi_x + floor(j*roi_w/100), roi_y + floor(i*roi_h/100))`. Because the
box is at least 100 pixels on a side (smaller boxes are treated as 100),
the wanted columns and rows strictly increase. So the block just watches
the stream go by and picks them out, with no buffer. The
`floor(k*size/100)` terms are tracked as quotient plus remainder, so no
divider is needed. The box is sampled with the first pixel of each image,
so software may write the next box as soon as an image has been sent. The
box must lie in 1..254 (the filtered area).

**`intensity_normalize`** stretches the face to the full 0..255 range:
`out = round((p - min) * 255 / (max - min))`. A flat face comes out all
zero. The minimum and maximum are known only after the last face pixel, so
this stage stores the 100x100 face (10,000 bytes) while it tracks them.
It then computes `recip = floor(255*2^16/(max-min))` once, with a
sequential divider (24 cycles). Finally it reads the face out as
`((p-min)*recip + 2^15) >> 16`. While it drains, it refuses input, and the
back-pressure reaches the image input through the other two stages.

Timing: an image enters at one pixel per cycle (65,536 cycles) as long as
the previous face has finished draining. The face leaves at one pixel per
cycle starting about 26 cycles after its last pixel was selected.

## Feature accelerator (`feature_accel`)

One `window3x3` over the 100x100 face feeds two histogram units in
parallel. Each pixel then costs one cycle. States:

| state | what happens | cycles |
|---|---|---|
| CLEAR | both histograms zeroed, one address per cycle (also after reset) | 324 |
| ACCUM | one face pixel per cycle is taken in | 10,000 |
| FLUSH | the last histogram updates land | 3 |
| HOG | `hog_block_norm` streams the 900 HOG words | about 34,000 |
| LBP | the 59 LBP counts are streamed | 59 |

Input is accepted only in ACCUM.

### Output vector

| words | content | format |
|---|---|---|
| 0 .. 899 | HOG, block by block in raster order (5x5 blocks); in each block the cells top-left, top-right, bottom-left, bottom-right, each with bins 0..8 | unsigned, 16 fraction bits (value/65536, always below 1.0) |
| 900 .. 958 | LBP histogram: bin 0 = code 0x00, bins 1..56 = uniform codes, bin 57 = code 0xFF, bin 58 = all non-uniform codes | count, at most 9,604 |

### HOG (`hog_gradient`, `hog_cell_hist`, `hog_block_norm`)

For every interior pixel, `hog_gradient` forms `gx = right - left` and
`gy = below - above`. The magnitude is `floor(sqrt(gx^2+gy^2))`, from an
unrolled bit-by-bit square root. The orientation is unsigned (0..180
degrees) and falls into nine 20-degree bins. No arctangent is computed:

* First the gradient is folded into the upper half-plane, by negating both
  components when `gy < 0`, or when `gy == 0` and `gx < 0`.
* For a folded angle theta and a boundary beta, theta >= beta holds
  exactly when `gy*cos(beta) - gx*sin(beta) >= 0`.
* The bin is the count of the eight boundaries 20, 40 ... 160 degrees
  that pass this test.

cos and sin are constants rounded to 16 fraction bits (`fer_pkg`). The
test therefore agrees with `floor(atan2/20)` except for gradients less than a thousandth of a degree
from a boundary.

`hog_cell_hist` adds the magnitude to bin `b` of the pixel's 16x16 cell.
It registers one cycle, then does a read-modify-write in the next cycle,
so back-to-back updates of the same entry need no forwarding. A 100x100
face has 6x6 whole cells covering pixels 0..95; rows and columns 96..99,
and the face border, contribute nothing. Entries are 17 bits.

`hog_block_norm` visits the 5x5 overlapping 2x2-cell blocks (36 values
each). For each block it:

* sums the squares of the 36 values (36 cycles);
* takes `r = floor(sqrt(sum))` with a sequential square root (20 cycles);
* outputs each value as `floor(v * 2^16 / (r + 1))`, using a sequential
  divider (34 cycles per value plus the output handshake).

Because `v <= r`, every result is below 1.0. The `+1` keeps an empty block
at zero without a special case.

### LBP (`lbp_unit`)

Bit i of the 8-bit code is set when neighbour i is at least as bright as
the centre pixel. Neighbours are numbered clockwise from the top-left
corner, so bit 0 is top-left, bit 3 right and bit 7 left. A code is
*uniform* when it has at most two 0/1 changes around the circle.
Uniform codes with k ones (1 <= k <= 7) whose run of ones starts at bit s
go to bin `1 + 8*(k-1) + s`. The codes 0x00 and 0xFF have bins 0 and 57,
and all others share bin 58. A registered bin index and a read-modify-write
of the 14-bit count follow, as in the HOG unit.

## What follows the reference design and what is this implementation's

Taken from the reference design: the split between processor and logic;
which functions are accelerated; the 256x256 input and the 100x100 face;
streaming through row buffers rather than frame stores; the Gaussian
filter and normalisation steps; LBP as 8-neighbour comparisons with the
centre; HOG with 16x16 cells, orientations over 0..180 degrees and a
900-value vector; the combined HOG+LBP vector; fixed-point arithmetic;
pipelined one-pixel-per-cycle processing; the 166.67 MHz clock target.

Chosen here, because the reference leaves them open:

* the stream protocol and reset;
* the Gaussian kernel and its rounding;
* nearest-neighbour resizing, down-scaling only;
* the min-max normalisation rule;
* the face store in the normaliser;
* central differences, hard binning and 9 bins for HOG;
* 2x2-cell blocks with L2 normalisation and the `+1` guard;
* LBP with ties counted as 1, weights 2^0..2^7, and the 59-bin uniform
  histogram with its own bin order;
* the word layout and number formats of the output vector.

Where the reference sets 9 bins and 2x2 blocks is not stated. They are the
values that, with 16x16 cells on a 100x100 face, give exactly 900 values.

Departures to be aware of:

* The normaliser stores one 100x100 face, while the reference stresses
  avoiding whole-image storage. No input frame is ever stored, but a
  min-max rule cannot be computed in a single pass without the face.
* HOG here has no bilinear vote interpolation and no L2-Hys clipping, so
  its values differ from common software HOG implementations. Software
  that selects features must be trained on this accelerator's output.
* The DMA engine, the generated interconnect between the processor and the
  accelerators, DDR memory and the processor are not part of this RTL.
  Timing closure at 166.67 MHz has not been checked; the longest paths are
  the 3x3 sum in `gaussian_filter` and the combinational gradient, square
  root and bin logic before the register in `hog_cell_hist`.

## Performance

At the default sizes, with random back-pressure on both outputs, one image
took 129,030 and 140,412 clock cycles in simulation, from its first input
pixel to its last feature word (both accelerators, excluding DMA and
software). At 166.67 MHz that is under 1 ms, against a budget of
6,060,606 cycles per image at 27.5 images/s.

Storage: 2x256 + 2x100 bytes of row buffers, 10,000 bytes of face store,
324x17 bits of HOG cell histograms and 59x14 bits of LBP histogram.

## Files

`rtl/` holds one module or package per file:

| file | role |
|---|---|
| `fer_pkg.sv` | constants, types, LBP and square-root functions |
| `fer_accel_top.sv` | top: both accelerators |
| `preproc_accel.sv` | Gaussian -> crop/resize -> normalise |
| `gaussian_filter.sv`, `crop_resize.sv`, `intensity_normalize.sv` | its stages |
| `feature_accel.sv` | HOG + LBP accelerator with its state machine |
| `hog_gradient.sv`, `hog_cell_hist.sv`, `hog_block_norm.sv` | HOG |
| `lbp_unit.sv` | LBP |
| `window3x3.sv`, `row_buffer.sv` | 3x3 window on two row buffers |
| `seq_divider.sv`, `seq_isqrt.sv` | one-bit-per-cycle divider and square root |

`tb/` holds one self-checking testbench per module (`tb_<module>.sv`) and
`fer_ref_pkg.sv`. That package is a behavioural reference of the whole
algorithm, written from the definitions above rather than from the RTL.
Each testbench prints `TB_RESULT checks=<n> failures=<n>` and stops itself
with a watchdog.

`tb_fer_accel_top` runs the top at its default sizes. It sends two
synthetic 256x256 face images with different face boxes, compares both
100x100 faces and all feature vectors with the reference, and sends the
last face twice so that it has to wait. It checks the input rate and the
per-image cycle budget. It also counts the situations it is meant to
exercise: input gaps, stalls at both inputs, back-pressure at both
outputs, resize skipping, contrast stretching, non-uniform LBP codes and
non-zero HOG values. It takes about a second.

Simulating with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/fer_pkg.sv tb/fer_ref_pkg.sv tb/tb_fer_accel_top.sv \
    --top-module tb_fer_accel_top -o sim
./obj_dir/sim
```

Replace the testbench name to run any other. Lint a module with
`verilator --lint-only -Wall -Irtl -y rtl rtl/fer_pkg.sv rtl/<module>.sv`.
The block testbenches override sizes (for example a 48x48 face for
`feature_accel`) to stay short. The RTL defaults are the design sizes.
