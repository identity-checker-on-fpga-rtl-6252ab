# Viola-Jones face detector behind a UART link

This is the FPGA half of a camera-based identity checker. A laptop takes a
photo, shrinks it to 160x120 pixels, turns it to 8-bit gray, and sends it over
a serial link. The FPGA finds the most face-like square in the frame and sends
that square's coordinates back. The laptop then crops the face and identifies
the person (eigenfaces against a small database). The identification step
runs on the laptop and is not part of this RTL.

Detection uses the Viola-Jones method:

* the frame is looked at on several scales (an **image pyramid**, each level
  1.2 times smaller than the one before);
* each level is turned into an **integral image**, so that the sum of any
  rectangle of pixels takes four memory reads;
* a **24x24 window** visits every position of every level, and a **cascade**
  of stages decides whether the window holds a face. Each stage adds up the
  scores of a few rectangle-contrast features and compares the sum with a
  threshold. Most windows fail the first stage and cost only a few cycles;
* of all windows that pass every stage, the one with the **highest total
  score** is reported, scaled back to frame coordinates.

The cascade itself (the trained weights) is data. It sits in a block RAM that
is loaded through a configuration port before frames are sent.

## Data flow

```
uart_rxd -> uart_rx -> image_buffer (160x120x8 block RAM)
                             |  frame_ready
                             v
            face_detector -------------------------> rect_fifo -> rect_sender -> uart_tx -> uart_txd
              pyramid_scaler -> integral_image -> integral RAM
              cascade_classifier <-> cascade_weights (block RAM, cfg_* load port)
```

`identity_checker_fpga` is the top. Its pins:

| port | dir | width | use |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | 200 MHz clock, synchronous active-low reset |
| `uart_rxd` / `uart_txd` | in / out | 1 | serial link, 921600 baud, 8N1 |
| `cfg_we`, `cfg_sel`, `cfg_addr`, `cfg_wdata` | in | 1, 2, 12, 136 | loading the cascade (see below) |
| `busy` | out | 1 | detector is working on a frame |
| `frames_done` | out | 16 | results handed to the output queue |
| `faces_found` | out | 16 | windows that passed all stages in the last frame |
| `rx_error` | out | 1 | pulse: a received byte had a low stop bit and was dropped |

Parameters: `CLKS_PER_BIT` (217 = 200 MHz / 921600), `FIFO_DEPTH` (4),
`MAX_STAGES` (25), `MAX_FEATURES` (2913). The frame size, window size and
scale step are constants in `fd_pkg`.

## The serial protocol

* **Host to FPGA:** one frame is 19,200 bytes, one per pixel, row 0 first,
  left to right. Each byte is framed with one start and one stop bit, LSB
  first, no parity. After the last byte the detector starts by itself. There
  is no header, so the host must start at a frame boundary and must not send
  the next frame while `busy` is high.
* **FPGA to host:** four bytes `x, y, w, h` of the best face in frame pixels.
  `w = h = 0` means no window passed the cascade.

At 921600 baud a frame takes 19,200 x 10 / 921,600 = 0.208 s to arrive. That
is far longer than the detection itself, so the link sets the frame rate.

## Image pyramid

Level L is the frame sampled at `(floor(x*s), floor(y*s))` with `s = 1.2^L`
(nearest neighbour, always from the original frame). `s` is kept in Q16 fixed
point, built at elaboration as 65536 multiplied by 6/5 L times with
truncation. A level's width is the number of `x` with `floor(x*s) < 160`.
Levels are used while both sides are at least 24. For 160x120 this gives
10 levels:

| L | 0 | 1 | 2 | 3 | 4 | 5 | 6 | 7 | 8 | 9 |
|---|---|---|---|---|---|---|---|---|---|---|
| size | 160x120 | 134x101 | 112x84 | 93x70 | 78x58 | 65x49 | 54x41 | 45x34 | 38x28 | 32x24 |
| windows | 13289 | 8658 | 5429 | 3290 | 1925 | 1092 | 558 | 242 | 75 | 9 |

That is 34,567 windows per frame. `pyramid_scaler` steps two Q16 accumulators
instead of multiplying, and streams one pixel per cycle.

## Integral image

`integral_image` computes `II(x,y)` = the sum of all pixels in rows `<= y` and
columns `<= x`. It does this on the fly as
`II(x,y) = II(x,y-1) + rowsum(x,y)`: the running row sum restarts at each row,
and a one-row line buffer holds `II(.,y-1)`. Values are 23 bits wide, since
160 x 120 x 255 < 2^23. Every level is stored with a row pitch of 160, so the
address is always `y*160 + x`.

The classifier reads corners in padded coordinates. A corner `(cx, cy)` with
`cx = 0` or `cy = 0` lies on the zero border and is not read. Any other corner
reads `II(cx-1, cy-1)`. A rectangle `(x, y, w, h)` relative to a window at
`(wx, wy)` sums to

```
S = P(wx+x+w, wy+y+h) - P(wx+x+w, wy+y) - P(wx+x, wy+y+h) + P(wx+x, wy+y)
```

## The cascade and its memory format

This is the part to understand before loading real weights.

**Feature** (`haar_feature_t`, 136 bits):

| field | bits | meaning |
|---|---|---|
| `r[2]`, `r[1]`, `r[0]` | 3 x 24 | rectangles: `x, y, w, h` (5 bits each, within the 24x24 window, `x+w <= 24`), `wt` (signed 4 bits; 0 disables the rectangle) |
| `thr` | 32 signed | threshold on the weighted sum |
| `left` | 16 signed | score when `sum(wt_i * S_i) < thr` |
| `right` | 16 signed | score otherwise |

`r[2]` holds the most significant bits of the entry.

**Stage** (`haar_stage_t`, 44 bits): `first` (12 bits, index of the stage's
first feature), `count` (8 bits, number of features; a stage with none
passes when its threshold is 0 or less), `thr` (24-bit signed). The stage passes when the sum of its feature scores is
`>= thr`.

**Evaluation** (`cascade_classifier`): stages run in order. The first stage
that fails ends the window as "not a face". A window that passes all
`num_stages` stages is a face. Its score is the sum of the scores of every
feature evaluated. A feature issues 12 integral reads, one per cycle (four
corners of each of three rectangles). As the data returns it accumulates
`wt * (+/-corner)`. Then the feature's score is picked.

**Loading** (`cfg_*` port of the top, one write per cycle):

| `cfg_sel` | `cfg_addr` | `cfg_wdata` |
|---|---|---|
| 0 | stage index | stage entry in bits [43:0] |
| 1 | feature index | feature entry |
| 2 | - | number of stages in bits [7:0] (limited to `MAX_STAGES`) |

Writes beyond the table sizes are ignored.

**Using trained weights.** The memory is sized for the common OpenCV 24x24
frontal-face cascade: 25 stages, 2913 features, at most 211 per stage, two or
three rectangles per feature with weights such as -1, 2 and 3. Its floating
point thresholds and scores must be converted to this integer format. OpenCV
also scales each feature threshold by the window's standard deviation. This
design does **not** normalise for lighting. The thresholds must be fixed for
the expected image contrast, or the variance step must be added (a second
integral image of squared pixels). No trained weights are shipped. The
testbenches use a small hand-made three-stage cascade (see `tb/vj_ref_pkg.sv`).

## Choosing the best face

`face_detector` keeps the best window seen so far. A later face replaces it
only with a strictly higher score, so on a tie the first face in scan order
wins. The scan order is level 0 first, then row by row and left to right. The
reported square is `x = floor(wx*s)`, `y = floor(wy*s)`,
`w = h = floor(24*s)`. Neighbouring window positions usually pass too (the
test frames give 70 to 190 passing windows for 1 or 2 faces). The
highest-score rule picks one of them, and no merging of overlapping
detections is done.

## Timing

All numbers are in clock cycles at 200 MHz:

* scaler plus integral image: `lw*lh + 3` per level, about 60,000 per frame;
* classifier, one window: `1 + sum over evaluated stages of (3 + 16*features)`,
  plus 1 cycle in the controller. A window rejected by a one-feature first
  stage costs 21 cycles;
* frame transfer: 19,200 x 10 x 217 = 41,664,000 (0.208 s).

With the three-stage test cascade a frame takes 824,020 cycles (4.1 ms) of
detection. A real 25-stage cascade spends most windows in its first stages.
The exact time depends on how many features the early stages have and how
many windows get past them. The classifier is sequential: one integral read
per cycle, and no features evaluated in parallel.

## What is fixed by the described system and what is chosen here

Taken from the system description:

* the 160x120 8-bit gray frame sent over UART at 921600 baud, one start and
  one stop bit per byte;
* the Viola-Jones pipeline: a pyramid with scale step 1.2, integral images,
  a 24x24 window, and stages of features with a threshold on each stage sum;
* choosing the face with the highest total score;
* the cascade weights held in block RAM;
* a queue for face rectangles;
* a 200 MHz clock.

Chosen here:

* nearest-neighbour resampling;
* a one-pixel window step;
* the feature score rule (`left`/`right` against a threshold);
* the integer entry formats;
* no variance normalisation;
* the byte order and the "no face" encoding of the result;
* 8N1 with LSB first;
* the queue depth of 4;
* the synchronous reset;
* loading the weights through a port instead of a bitstream initial value.

The described system generated its detector with a high-level synthesis tool
from C code. This RTL is written by hand, so its cycle counts are its own.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`.

`tb/vj_ref_pkg.sv` is an independent software model of the whole detection.
It resamples plainly, builds a zero-bordered integral image with the
textbook recurrence, evaluates the cascade, and selects the best face. It
also draws test frames: textured background, schematic faces (dark eyes, a
bright bridge, bright cheeks) and "decoys" that pass stage 0 and fail
stage 1.

| testbench | what it establishes |
|---|---|
| `tb_uart_rx`, `tb_uart_tx` | framing, bit order, exact bit timing, bad stop bit, glitch rejection |
| `tb_image_buffer` | raster fill, `frame_ready` timing, read latency, pointer clear |
| `tb_pyramid_scaler` | every pixel of all 10 levels, order, last flag, cycle count |
| `tb_integral_image` | every integral value of four image sizes against direct sums |
| `tb_cascade_weights` | load and read back of the full tables, latency, stage-count limit |
| `tb_cascade_classifier` | ~600 windows (faces, stage-0 and later rejects) against the model, exact cycle counts |
| `tb_face_detector` | three whole frames: rectangle, face count, exact run time, hand-off |
| `tb_rect_fifo`, `tb_rect_sender` | queue against a model, byte order under back-pressure |
| `tb_identity_checker_fpga` | three frames through the pins (bit time shortened to 4 clocks) |
| `tb_identity_checker_fpga_full` | one frame with every parameter at its default (real bit time) |

The frames in `tb_identity_checker_fpga` are two faces plus a decoy, one
large face found on a coarse level, and no face. The test counts pyramid
levels, first-stage and later-stage rejections, accepted faces, best-face
replacements, "no face" answers and queued rectangles. It fails if any of
them never occurs.

Not verified: behaviour with real trained weights and real photographs,
timing closure at 200 MHz, and recovery when a frame is cut short. For the
last case, the top never clears `image_buffer`'s write pointer.

## Simulating

With Verilator 5 (`--timing` is needed by the testbenches):

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/fd_pkg.sv tb/vj_ref_pkg.sv tb/tb_identity_checker_fpga.sv \
  --top-module tb_identity_checker_fpga -o sim
./obj_dir/sim
```

Verilator finds the modules in `rtl/` through `-Irtl` by their file names;
only the two packages need to be listed, ahead of the testbench. Any other
testbench builds the same way with its own name. The end-to-end test takes a
few seconds. The full-size test takes under a minute, almost all of it spent
shifting the frame in at the real baud rate.

To change the frame size, edit `IMG_W`/`IMG_H` in `fd_pkg`. The level table,
address widths and window counts follow from them, but `II_W` must still hold
`W*H*255`. The coordinate fields of the result are 8 bits wide.
