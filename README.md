# Streaming Sobel edge detector

This is synthesizable SystemVerilog for an edge detector that works on a live pixel stream. It takes
RGB pixels in raster order, one per clock, and turns each into an 8-bit gray level. It then computes
the Sobel gradient magnitude `|Gx| + |Gy|` over the 3×3 neighbourhood of every pixel, and optionally
reduces that to a black/white edge map. The result comes out as an RGB stream of the same size, also one
pixel per clock. The image is never stored whole. Two line FIFOs keep the previous two rows, and
nine registers form the 3×3 window. So an image 640 pixels wide needs about 1.4 KB of line memory,
whatever its height.

The architecture follows a published FPGA/ASIC study of Sobel edge detection. That study describes:

- the block chain and the 3×3 kernels;
- the fixed-point gray conversion;
- the FIFO line buffers and the 9-register window;
- the partial-sum pipeline;
- a four-state controller;
- zero padding at the borders.

It gives no RTL for most of these blocks. The handshakes, widths, latencies and end-of-frame handling
here are this implementation's own, and the section "Departures and own choices" lists them.

## Data path

```
 red_i/green_i/blue_i, done_i
        │
   rgb2gray         Y = (307R + 604G + 113B) >> 10                     1 clock
        │ gray, done
   sobel_kernel ─┬─ sobel_ctrl        FSM, row/column counters, flush      (comb.)
                 ├─ sobel_fifo        two line FIFOs -> 3 rows of a column 1 clock
                 │    ├─ sobel_fifo_buffer (FIFO 1)
                 │    └─ sobel_fifo_buffer (FIFO 2)
                 └─ sobel_calc        P1..P9 window, |Gx|+|Gy|             4 clocks
        │ magnitude, done
   edge_threshold   >threshold -> 255 else 0, or pass-through          1 clock
        │
   gray2rgb         R = G = B = value                                  1 clock
        │
 red_o/green_o/blue_o, done_o
```

`done` travels with every pixel as its valid strobe, and all stages advance only on valid pixels.
Throughput is one pixel per clock. The output for pixel (x, y) leaves `sobel_top` 8 clocks after
input pixel (x+1, y+1) enters it, because that pixel completes the window.

## How the window is formed

This is the part that needs the most care. Number the input pixels of a frame n = y·W + x.

**Line buffer.** `sobel_fifo_buffer` is a circular buffer of `DEPTH` words with a write pointer, a read
pointer and a fill count. Until it holds `ROW_LEN` (= W) pixels a write only fills it. From then on,
every write also pops the oldest word. Its output is therefore always the pixel written exactly W writes
earlier. The read is show-ahead: the oldest word is visible combinationally. This lets FIFO 2 take FIFO 1's
output in the same clock that FIFO 1 pops it. `sobel_fifo` cascades the two FIFOs and registers three
bytes per write:

| output | content | window row |
|---|---|---|
| `d0_o` | pixel n (being written) | bottom, y+1 |
| `d1_o` | pixel n−W (from FIFO 1) | middle, y |
| `d2_o` | pixel n−2W (from FIFO 2) | top, y−1 |

A FIFO that has not filled a whole row reads as 0.

**Window registers.** `sobel_calc` shifts each valid column into three 3-register chains:
`d0 → P9 → P8 → P7`, `d1 → P6 → P5 → P4`, `d2 → P3 → P2 → P1`. After write n the window
holds pixels n−W−1 ± 1 column and ± 1 row, so **write n completes the window centred on pixel m = n−W−1**.
P1..P9 are the window read row by row (top-left P1, centre P5, bottom-right P9).

**Borders (zero padding).** The window chains run straight across row ends, so the pixels at the left
and right of a window can belong to the neighbouring row. The controller knows the centre position
(x, y) of the window each write completes. It sends four flags with it: top (y = 0), bottom (y = H−1),
left (x = 0) and right (x = W−1). The calculator replaces the flagged row or column of the window by
zeros. This gives the same result as convolving an image surrounded by a black frame. The output
frame therefore has exactly the input's size, W × H.

**Gradient pipeline** (`sobel_calc`, one pixel per clock), with d0..d8 = P1..P9 after padding:

| stage | computes |
|---|---|
| S0 | window shift, flags latched |
| S1 | `gx_p = d0 + 2·d3 + d6`, `gx_n = d2 + 2·d5 + d8`, `gy_p = d0 + 2·d1 + d2`, `gy_n = d6 + 2·d7 + d8` (10 bits each) |
| S2 | `|gx| = gx_p − gx_n` or `gx_n − gx_p`, whichever is not negative (compare, then subtract); same for y |
| S3 | `|G| = |gx| + |gy|` (0..2040), saturated to 255 |

The four sums are the Sobel kernels `Gx = [-1 0 1; -2 0 2; -1 0 1]` and `Gy = [-1 -2 -1; 0 0 0; 1 2 1]`
split into their positive and negative halves. The kernels' signs do not matter after the absolute value.

## The frame controller

`sobel_ctrl` counts the pixels of a frame in a column counter and a row counter. Its four states follow the
rows:

| state | while | windows produced |
|---|---|---|
| `ST_IDLE` | row 0 arrives (into FIFO 1) | none |
| `ST_ROW_FILL` | row 1 arrives (row 0 moves on to FIFO 2) | centres in row 0, from the 2nd pixel of row 1 on |
| `ST_PROCESS` | rows 2..H−1 arrive | one per pixel |
| `ST_EOF` | no input accepted | the last W+1 windows |

The windows of the last row need a row below the image. At the end of a frame, the controller itself
writes W+1 zero pixels into the line buffer (the padding row, plus one to complete the last window),
then returns to `ST_IDLE`. During those W+1 clocks `ready_o` is low, and the source must hold its
next pixel. Every frame therefore yields exactly W·H outputs and takes W·H + W+1 clocks at full rate.
The line FIFOs need no reset between frames: the border flags hide everything left in them from the
previous frame.

`sobel_kernel` exports both `ready_o` (accepting now) and `ready_next_o` (accepting next clock).
`sobel_top` uses `ready_next_o` because its gray stage is one register ahead of the kernel. An
assertion in `sobel_top` (and one in `sobel_ctrl`) flags a pixel presented while not ready.

## Gray conversion and output

`rgb2gray` uses the weights 0.3, 0.59 and 0.11 scaled by 1024: `Y = (307R + 604G + 113B) >> 10`. The
weights sum to 1024, so Y never exceeds 255.

`edge_threshold` has two modes:

- With `thresh_en_i = 1`, a magnitude strictly greater than `threshold_i` gives 255 (white edge), and any
  other magnitude gives 0 (black).
- With `thresh_en_i = 0`, the saturated magnitude passes unchanged, giving a gray-level edge map.

`gray2rgb` copies the value into R, G and B. The threshold inputs are meant to be static while a frame is in
flight. A change applies to whatever pixel reaches the threshold stage next.

## Interface of `sobel_top`

| port | dir | width | meaning |
|---|---|---|---|
| `sys_clk_i` | in | 1 | pixel clock |
| `sys_rst_i` | in | 1 | synchronous reset, active high |
| `red_i`, `green_i`, `blue_i` | in | 8 each | input pixel |
| `done_i` | in | 1 | input pixel valid |
| `ready_o` | out | 1 | input may be presented this clock (low for W+1 clocks after each frame's last pixel) |
| `thresh_en_i` | in | 1 | 1: binary edge map, 0: gray-level magnitude |
| `threshold_i` | in | 8 | edge threshold |
| `red_o`, `green_o`, `blue_o` | out | 8 each | edge image pixel (R = G = B) |
| `done_o` | out | 1 | output pixel valid |

Parameters (in `sobel_pkg` and on `sobel_top`/`sobel_kernel`):

| parameter | default | meaning |
|---|---|---|
| `WIDTH` | 640 | pixels per row |
| `HEIGHT` | 427 | rows per frame |
| `DEPTH` | 699 | words per line FIFO; `WIDTH` may be anything from 2 to `DEPTH` |

The defaults are the original study's test image (640 × 427, 24-bit RGB) and the size of its two
699 × 8-bit line RAMs. At the defaults the design holds 2 × 699 × 8 bits of line memory. Frame size is
fixed at elaboration: to process another size, set `WIDTH`/`HEIGHT` (and `DEPTH` if wider than 699).
Reset clears the valid strobes, counters and FIFO pointers, not the pixel data.

## Departures and own choices

- **Output size and the top row.** The original description says the operator is applied once two rows
  and the first two pixels of the third are buffered. It also says zero padding keeps the image's
  dimensions. This design follows the second statement. The row-0 windows, whose upper row is padding,
  are computed during `ST_ROW_FILL`, so the output is W × H.
- **Finishing the last row.** The original only says the end-of-frame state processes the last row. The
  W+1-pixel zero flush and the `ready_o` handshake are this design's own.
- **Magnitude.** One pipeline diagram of the original writes the final stage as `|gx_d| − |gy_d|`.
  Everywhere else it is `|Gx| + |Gy|`, and this design uses the sum. Saturating it to 8 bits is this
  design's choice.
- **Thresholding.** The original calls for a threshold with white edges and black background, but
  gives no threshold value. Its own simulation shows gray-level outputs. Both modes are provided, and
  the threshold is a run-time input.
- **FIFO depth vs. row length.** The original says each FIFO is as deep as the image width, yet its
  RAMs are 699 words deep for a 640-pixel-wide image. The RAM size and the row delay are separate
  parameters here.
- **Latencies** (1 + 1 + 4 + 1 + 1 clocks) and the synchronous active-high reset are this design's own.
- Not included: reading the BMP test images, the camera and the display. They are outside the
  hardware, and the testbenches generate their images instead.

## Verification

Each module has a self-checking testbench in `tb/`. Each testbench prints
`TB_RESULT checks=N failures=M` and has a cycle watchdog. `tb/sobel_ref_pkg.sv` holds the reference
model:

- a direct convolution of the zero-padded image with the two kernels;
- the gray formula, computed as `floor((307R+604G+113B)/1024)`;
- an image generator that mixes flat areas, steps, ramps, a checkerboard and noise.

| testbench | what it checks |
|---|---|
| `tb_rgb2gray`, `tb_gray2rgb`, `tb_edge_threshold` | values against formulas, both threshold modes, the equal-to-threshold case, 1-clock latency |
| `tb_sobel_fifo_buffer` | one-row delay against a queue model, full-depth pointer wrap, mid-stream reset |
| `tb_sobel_fifo` | three column-aligned rows, zeros before the FIFOs fill |
| `tb_sobel_ctrl` | state order, W·H window flags in raster order, W+1 zero flush, `ready_o`/`ready_next_o` timing |
| `tb_sobel_calc` | magnitudes of random and saturating images, border padding, 4-clock latency |
| `tb_sobel_kernel` | four back-to-back 12 × 7 frames with gaps and ready stalls, 5-clock latency |
| `tb_sobel_top` | five 16 × 9 frames end to end, with 8-clock latency and mechanism counters |
| `tb_sobel_top_full` | two full 640 × 427 frames at the default parameters, every pixel checked (about 1 s) |

`tb_sobel_top` counts these mechanisms and fails if any never occurs:

- input gaps;
- ready stalls during the flush;
- each controller state;
- border pixels;
- saturated magnitudes;
- edge and non-edge decisions;
- threshold bypass.

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/sobel_pkg.sv tb/sobel_ref_pkg.sv tb/tb_sobel_top.sv --top-module tb_sobel_top
./obj_dir/Vtb_sobel_top
```

Replace `tb_sobel_top` with any other testbench name. All testbenches drive every input and reset every
state they read, so they also run with random initial values (`+verilator+rand+reset+2`).

## Changing the design

- **Another frame size:** override `WIDTH`, `HEIGHT` and `DEPTH` on `sobel_top`. The counter widths follow.
- **Replicate border pixels instead of zero padding:** change the masking loop in `sobel_calc`, which
  gets all four border flags.
- **True Euclidean magnitude or a wider output:** replace stage S3 of `sobel_calc`.
- **Other gray weights:** change `GRAY_WR/WG/WB` in `sobel_pkg`. Keep their sum at 1024 or add
  saturation in `rgb2gray`.
