# HOG feature-extraction co-processor

This is synthesizable SystemVerilog for the programmable-logic half of a
handwritten-digit recognizer on an ARM + FPGA system-on-chip. The processor
does what is sequential or needs a library: camera capture, thresholding and
contour analysis, resizing each digit into a 128x128 window, and the
linear-SVM classifier. It hands the most expensive step to the logic:
extracting **Histogram of Oriented Gradients (HOG)** features.

The design is built around three cheap substitutes for the costly maths in HOG:

| HOG step | Exact form | What the hardware does |
|---|---|---|
| Gradient magnitude | `sqrt(dx² + dy²)` | `max(a - (a>>3) + (b>>1), a)`, with `a = max(|dx|,|dy|)` and `b = min(|dx|,|dy|)` |
| Orientation bin | `atan(dy/dx)`, then quantise | compare `dy` with `dx·tan θ` at θ = 10°, 30°, 50°, 70°; mirror the second quadrant |
| Block normalisation | `1/sqrt(E)` | IEEE754 "magic constant" seed `0x5F3759DF - (bits(E) >> 1)`, then one Newton step `y(3 - E·y²)/2` |

The scheme these substitutes come from reports about 90 % fewer resources than
library maths, at a loss of under one point of recognition accuracy.

## What goes in and what comes out

For each frame the host writes **4096 32-bit words** into the write FIFO. Each
word packs four 8-bit grayscale pixels, lowest byte first. The pixels are in
raster order: row 0 left to right, then row 1, and so on. Packing cuts the
traffic across the processor–logic boundary by four.

For each frame the host then reads **8100 words** from the read FIFO. Each is
one feature, an IEEE754 single-precision float in `[0, 0.2]`. The layout is:

* cells of 8x8 pixels, giving 16x16 cells;
* blocks of 2x2 cells that overlap by one cell, giving 15x15 blocks;
* 36 features per block: four cells of 9 bins each.

Blocks come in raster order (block row 0 left to right, then row 1, …).
Inside a block the cells come top-left, top-right, bottom-left, bottom-right.
Inside a cell the bins come 0..8. Bin *i* holds orientations within ±10° of
*i*·20°. Orientation is unsigned (0–180°), and bin 0 wraps around 0°/180°.

A frame is worked on in three phases, one after the other. The `phase` output
shows which one is running (0, 1 or 2). The next frame's words are taken only
after the last feature has left, so the host may queue frames back to back.

## The datapath, stage by stage

### Loading (`pixel_unpack`, `hog_frame_buf`)
`pixel_unpack` takes a word, then emits its four bytes one per cycle. Each
byte is written to the frame buffer. Loading a frame takes 16384 cycles when
the FIFO never runs dry.

The frame buffer holds the image in three banks of `sdp_ram` (synchronous
read). Row *r* lives in bank *r* mod 3. Any three consecutive rows therefore
sit in three different banks, so one request returns a whole 3-pixel column:
rows y-1, y and y+1, one cycle later. At the top and bottom of the image the
missing row is replaced by row y.

### Gradients, bins and cells (`hog_gradient_scan`)
This stage is a pipeline. It visits the cells in raster order, and each cell
row by row. For one 8-pixel row of a cell it requests ten columns, one per
cycle: from one left of the cell to one right of it, clamped at the image
edge. It keeps a window of the last three columns. When column x+1 arrives,
pixel x has all four neighbours, and the stage forms centred differences:

    dx = I(x+1, y) - I(x-1, y)        dy = I(x, y+1) - I(x, y-1)

At the image edge the missing neighbour is replaced by the edge pixel. The
pixel votes its magnitude into one bin of the cell's 9-bin register
histogram in the same cycle. After the 64th pixel the cell's energy is
formed: its 9 bins are squared in parallel and summed into 29 bits. The
histogram (9 x 16 bits) and the energy are written together to the cell
buffer (256 x 173-bit `sdp_ram`, one `cell_rec_t` per cell), and the
histogram is cleared.
Requests never pause, so 8 pixels take 10 cycles and a frame takes 20480
cycles.

**Magnitude (`hog_grad_mag`).** This is shift-and-add only. The shifts
truncate. Over all `dx, dy` in -255..255 the mean absolute error against the
Euclidean length is 1.9075 and the mean relative error 0.98 %. The error runs
from about -3 % to +12 %. The outer `max(…, a)` applies when the smaller
component is under a quarter of the larger. A cell bin holds at most
64 x 351 = 22464, so 16 bits are enough.

**Binning (`hog_orient_bin`).** No angle is computed. First, if `dy < 0`,
both signs are flipped; this rotates the gradient by 180° and leaves an
unsigned orientation unchanged. Then `k` (0..4) counts the edges
θ ∈ {10°, 30°, 50°, 70°} for which `dy·2¹⁶ ≥ |dx|·round(tan θ·2¹⁶)`:

* if `dx > 0`, the bin is `k`;
* otherwise the gradient is in the second quadrant, `dx` is negated, and the
  bin is `9 - k` (or 0 when `k = 0`).

This makes a vertical gradient land in bin 5, and a zero gradient in bin 0,
where it adds nothing. For every `dx, dy` in range, the Q.16 tangents give
exactly the bin that exact tangents would. Each pixel votes its whole
magnitude into one bin; there is no interpolation between neighbouring bins.

### Blocks, normalisation and truncation (`hog_block_norm`)
For every block the unit goes through three steps:

1. **READ** (5 cycles). Reads the four cells: their histograms go into 36
   registers, and their stored energies are added into the 32-bit block
   energy `E`. `E` cannot overflow: a cell's bins add up to at most 22464,
   so a cell's energy is at most 22464².
2. **ISR** (1 cycle). Registers `1/sqrt(E)` from `hog_inv_sqrt`.
3. **OUT** (36 cycles). Sends `h · (1/sqrt E)` for each bin, computed by
   `hog_feat_scale`. Any feature above 0.2 is replaced by 0.2. Because both
   values are positive floats, that test is an unsigned compare of the bit
   patterns.

A block takes 42 cycles if the reader keeps up, and 225 blocks take 9450
cycles. While the read FIFO is full the stream simply stalls.

**Inverse square root (`hog_inv_sqrt`)** is the part that needs the most
care:

1. `E` is turned into a single-precision pattern. The leading one gives the
   exponent, and the mantissa is truncated to 23 bits.
2. `0x5F3759DF - (pattern >> 1)` is read back as a float `y₀` (exponent `Ey`,
   24-bit mantissa `My`). `y₀` lies within about 3.5 % of the true value.
3. The Newton step avoids floating-point units. It computes `t = E·y₀²`
   as `Mx · (My² >> 24)`, shifted by `269 - e - 2·Ey` into a Q.30 number near 1.
   From that it forms `f = 1.5 - t/2` and multiplies `My · f`. The 56-bit
   product is renormalised into the result float.

The result is within 0.175 % of `1/sqrt(E)` for every 32-bit `E`. The
testbench checks this against a 0.2 % bound. `E = 0` (an empty block) gives 0,
so an empty block yields 36 zero features. The whole unit is combinational,
between two registers.

## Timing

| Phase | Cycles per 128x128 frame |
|---|---|
| Load (1 pixel / cycle) | 16 384 |
| Gradients and cells (10 cycles / 8 pixels) | 20 480 |
| Blocks (42 cycles / block) | 9 450 |
| Read latency and hand-over between phases | 4 |
| Total, first word to `frame_done` | **46 318** |

At the board's 125 MHz that is 0.37 ms per digit. The HLS design this follows
reports an initiation interval of 90 672 cycles (0.72 ms), so this schedule
needs about half the cycles. It does its phases strictly in sequence and does
not overlap loading with computation. Loading is now the longest phase.
No timing analysis has been done on this RTL, so the clock it reaches is not
known. The longest combinational paths are the inverse square root (three
multipliers in series) and, in the gradient stage, a vote followed by the
9-bin squared sum of the cell energy.

## Module map

```
hog_pl_top                  write FIFO -> accelerator -> read FIFO
├── sync_fifo  (x2)         32-bit, 512 deep, first-word fall-through
└── hog_core                phase control: LOAD -> GRAD -> NORM
    ├── pixel_unpack        word -> 4 pixels
    ├── hog_frame_buf       frame buffer, 3 row banks
    │   └── sdp_ram (x3)    5504 x 8 each
    ├── hog_gradient_scan   pipelined dx/dy, votes, cell histograms
    │   ├── hog_grad_mag
    │   └── hog_orient_bin
    ├── sdp_ram             cell buffer 256 x 173
    └── hog_block_norm      energy, 1/sqrt, scale, truncate
        ├── hog_inv_sqrt
        └── hog_feat_scale
hog_pkg                     widths, tangent constants, magic constant
```

The top's ports are the host ends of the two FIFOs, plus status signals:
`phase`, `frame_done`, and `feat_clipped`, which is high while the feature on
offer has been truncated. The bus bridge that connects these FIFOs to the
processor is not part of this RTL. Neither are the processor, the display
controller, or the software stages (pre-processing and the SVM).

## Where this RTL makes its own choices

The following come from the source design: the three approximations; the
magic constant; 8x8 cells, 2x2-cell overlapping blocks and 9 bins over 0–180°;
a cell energy computed once per cell and block energies summed from them;
the 128x128 window; four pixels per 32-bit word; a pair of FIFOs between
processor and logic; and pipelining the per-pixel work and unrolling the
per-bin loops as the means of speed-up.

The following were chosen here and are worth checking before reuse:

* Centred `[-1 0 1]` differences and a repeated border pixel.
* Bin edges at odd multiples of 10°, and one bin per vote.
* Reading the seed as `0x5F3759DF - (bits >> 1)`, the standard form of the
  method.
* The Newton step done in fixed point on mantissas.
* Truncation at 0.2, with no renormalisation afterwards (parameter `CLIP`).
* Features returned as IEEE754 singles, one per word, in the order given above.
* Byte order inside the packed word.
* FIFO depth (512) and first-word-fall-through reads.
* The sequential phase schedule, the three-bank frame buffer and the
  10-cycle schedule for 8 pixels.
* Reset: an asynchronous active-low `rst_n`. RAM contents are never reset;
  each word is written before it is read.

## Simulating

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and stops itself through a watchdog. The
testbenches share two packages:

* `tb_util_pkg`: float-to-real conversion and tolerance tests.
* `tb_hog_ref_pkg`: an independent reference model. It uses real-valued
  tangents and an exact square root, and counts how often each special case
  occurs.

An example, building and running the end-to-end test at full size:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/hog_pkg.sv tb/tb_util_pkg.sv tb/tb_hog_ref_pkg.sv tb/tb_hog_pl_top.sv \
    --top-module tb_hog_pl_top -o sim
./obj_dir/sim
```

`tb_hog_pl_top` runs the top with its default parameters. It pushes two
128x128 frames through the FIFOs, a drawn "4" and a noisy ramp, and checks
all 16 200 features against the model to within 0.3 %. It also requires each
of these mechanisms to happen, and counts them:

* the host waiting on a full write FIFO;
* the accelerator stalling on a full read FIFO;
* truncation;
* zero-energy blocks;
* second-quadrant mirroring;
* the outer `max` of the magnitude;
* every phase change.

`tb_hog_digit_run` sends 20 digit windows back to back, the digits 0 to 9
drawn twice from seven-segment strokes, and reads the features as they appear.
It checks all 162 000 features, and checks that every frame takes exactly
46 318 cycles inside the accelerator. The whole run, from first word in to
last feature out, takes 926 361 cycles: 7.4 ms at 125 MHz, against the 14.4 ms
(20 x 0.72 ms) of the HLS design.

`tb_hog_core` runs a 32x24 image and checks the exact
cycle count `W·H + 10·(W/8)·H + 42·blocks + 4` with no back-pressure. The unit
testbenches are exhaustive where that is possible: the magnitude and binning
tests cover all 261 121 gradient pairs.

To change the image size, set `IMG_W` and `IMG_H`, which must be multiples
of 8, on `hog_pl_top` or `hog_core`. The RAMs and counters follow. The
truncation level is the `CLIP` parameter, as an IEEE754 bit pattern.
