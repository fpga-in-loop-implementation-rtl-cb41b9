# Streaming Sobel edge detector

A pipelined Sobel edge-detection core for raster-scan video. Colour pixels go in one per
clock, and an edge image of the same size comes out at the same rate after a fixed delay.
Each pixel is reduced to grey. Its 3×3 neighbourhood is filtered with the two Sobel masks,
and the gradient magnitude √(X² + Y²) is computed exactly in integers. The magnitude is
then compared with a programmable threshold. Three control inputs choose what the output
shows: the edge map, the edge map inverted, the raw gradient magnitude, or the grey input.

The core follows the Sobel hardware block of the FPGA-in-the-loop study by M. Veer and
R. U. Shekokar ("FPGA in Loop Implementation using Sobel Algorithm on Detected Object").
In that study a host model streams 1920×1080 frames to the FPGA over Gigabit Ethernet.
The frames come from a scene where a separate software step had located objects. This
repository holds only the FPGA core. The port names and widths, the 8-bit threshold, the
frame size, the grey conversion step, the 3×3 window, the two masks and the exact norm all
come from that design. The rest is this implementation's own: pixel packing, stream and
border conventions, the meaning of the three mode controls, pipeline depths and reset
behaviour. Each choice is listed under "Design choices" below.

## Ports

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock |
| `reset` | in | 1 | synchronous, active high |
| `clk_enable` | in | 1 | one pixel enters, and every register advances, on each clock where this is high |
| `Video_in` | in | 32 | `{spare[7:0], R[7:0], G[7:0], B[7:0]}`; the spare byte is ignored |
| `Threshold` | in | 8 | a pixel is an edge when its gradient magnitude is greater than this |
| `Sobel_Enable` | in | 1 | 1: edge image; 0: the grey image is passed through |
| `Background_Color` | in | 1 | with `Sobel_Enable`=1: 0 gives light edges on black, 1 gives dark edges on white |
| `Show_Gradient` | in | 1 | with `Sobel_Enable`=1: output the magnitude (saturated at 255) instead of the 0/255 edge decision |
| `ce_out` | out | 1 | copy of `clk_enable`: high on the clocks where `Video_out` advances |
| `Video_out` | out | 32 | `{8'hFF, v, v, v}`: a grey pixel in the same 32-bit colour format |

Parameters of `sobel_hw`: `IMG_W = 1920`, `IMG_H = 1080`. The frame size is fixed when
the core is built.

## The stream and its timing

The stream carries no sync or valid signals. The first pixel accepted after reset (the
first clock with `clk_enable` high) is pixel (0, 0) of a frame. Further pixels follow in
raster order, and frames follow back to back with no blanking. Pulling `clk_enable` low
freezes the whole core, output included. This is the only form of flow control.

The delay is **`IMG_W + 17` enabled clocks**. If a pixel is on `Video_in` during enabled
clock *n*, its result is on `Video_out` during enabled clock *n* + `IMG_W` + 17. At
1920 pixels per row that is 1937 clocks. The delay is made up as follows:

| stage | enabled clocks |
|---|---|
| grey conversion register | 1 |
| window register | 1 |
| waiting for the row below and the pixel to the right | `IMG_W` + 1 |
| Sobel sums X, Y | 1 |
| X² + Y² | 1 |
| square root, one bit per stage | 11 |
| output formatting | 1 |

The last row of a frame can only be finished once the first row of the next frame
arrives. In a continuous stream this happens by itself. To drain a single frame, feed
`IMG_W + 17` more pixels of any value. The first `IMG_W + 17` outputs after reset belong to
no frame and should be discarded.

## How the window is built

This is the part of the core that needs the most care. The masks need the pixel above and
below each pixel, but the pixels arrive one row at a time. `sobel_window` therefore keeps
the two previous rows in one memory of `IMG_W` words of 16 bits. Word *c* holds
{pixel (r−2, c), pixel (r−1, c)}. When pixel (r, c) arrives, three things happen on the
same clock:

* word *c* is read;
* the column {(r−2,c), (r−1,c), (r,c)} is shifted into the right of a 3×3 register window;
* word *c* is rewritten as {(r−1,c), (r,c)}.

There is one read and one write per clock at the same address, with the read returning
the old value, so the memory maps onto a single block RAM. At 1920 columns it holds
30,720 bits.

After the clock that takes in pixel *k* (counting in raster order), the centre a5 of the
window is pixel *k* − `IMG_W` − 1, so the window trails the input by one row and one
pixel. The window does not work out the centre's position from *k*. Two counters, reset to
the right negative offset and wrapping at the frame size, track the centre's row and
column directly. The `LEAD` parameter adds the delay of any register ahead of the window;
the core sets it to 1 for its grey register. Without it, every border decision would be
one pixel off.

Where the centre lies on the first or last row or column, part of the window lies outside
the image. The window then holds pixels from the other edge of the image, or from the
neighbouring frame. Such a pixel has no valid gradient and comes out as background: 0, or
255 when inverted. So the output image keeps the input's full 1920×1080 size, and a
one-pixel frame of background surrounds the valid edge map. The line memory is never
cleared. Its stale contents after reset only ever reach border positions.

## Arithmetic

* **Grey:** `gray = (77 R + 150 G + 29 B + 128) >> 8`. These are the BT.601 luma weights
  in 1/256 steps, rounded to nearest and never above 255. The core uses three constant
  multipliers.
* **Sobel sums:** with a1 a2 a3 / a4 a5 a6 / a7 a8 a9 the window rows,
  `X = (a3 + 2a6 + a9) − (a1 + 2a4 + a7)` and `Y = (a1 + 2a2 + a3) − (a7 + 2a8 + a9)`.
  Both lie in ±1020 (11-bit signed). The doublings are shifts.
* **Magnitude:** `X² + Y²` (at most 2,080,800, 21 bits) feeds a digit-by-digit integer
  square root. Each of the 11 stages brings down two radicand bits, tries to subtract
  `4·root + 1`, and decides one root bit. The result is ⌊√(X² + Y²)⌋, from 0 to 1442.
  The root is exact, so `root > T` holds exactly when the real norm is above T. The integer
  result thresholds exactly like the floating-point formula it replaces, with no
  |X| + |Y| approximation.

## Output modes

`sobel_output` forms the output grey level *v*:

| `Sobel_Enable` | `Show_Gradient` | `Background_Color` | *v* (interior pixel) | *v* (border pixel) |
|---|---|---|---|---|
| 0 | – | – | grey level of the pixel | grey level of the pixel |
| 1 | 0 | 0 | 255 if magnitude > `Threshold`, else 0 | 0 |
| 1 | 0 | 1 | 0 if magnitude > `Threshold`, else 255 | 255 |
| 1 | 1 | 0 | min(magnitude, 255) | 0 |
| 1 | 1 | 1 | 255 − min(magnitude, 255) | 255 |

The controls take effect on the pixel leaving the core on that clock. Changing them in
the middle of a frame switches the mode from the next output pixel onwards. No frame
boundary is waited for.

## Files

`rtl/`:

* `sobel_pkg.sv`: pixel and window types, widths, grey weights, stage depths and
  `core_latency()`.
* `sobel_hw.sv`: the core (top level).
* `rgb2gray.sv`, `sobel_window.sv`, `sobel_kernel.sv`, `sobel_magnitude.sv`,
  `sobel_output.sv`: the pipeline stages.
* `isqrt_pipe.sv`: the square root, with a parameterised radicand width.
* `delay_line.sv`: a 13-stage shift register. It carries the border flag and the centre
  grey level beside the arithmetic.

`tb/`: one self-checking testbench per stage, plus three for the whole core. Each prints
`TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|---|---|
| `tb_rgb2gray` | fixed-point grey against the formula, and within 1 of the real-valued BT.601 luma; hold under `ce`=0 |
| `tb_sobel_window` | 7×5 image, four frames, random stalls: centre position, border flag, all nine window taps |
| `tb_sobel_kernel` | X, Y against the mask tables, including the ±1020 extremes |
| `tb_sobel_magnitude` | ⌊√⌋ against a corrected real square root; the 12-clock depth |
| `tb_sobel_output` | every mode combination, threshold equality and threshold + 1, saturation |
| `tb_sobel_hw` | eight 24×12 frames with random stalls and a mode change per frame and mid-frame; every pixel against a reference model, and the `IMG_W + 17` delay. It counts stalls, border, edge, non-edge, pass-through, inverted, gradient, saturated and mode-change cases, and fails if any never occurs |
| `tb_sobel_hw_full` | one full 1920×1080 frame at the default parameters (a synthetic scene of ramps, rectangles, a disc and noise, threshold 100): all 2,073,600 pixels checked; about 2 s in Verilator |
| `tb_sobel_hw_1080x1020` | the same scene and checks on a core built with `IMG_W=1080, IMG_H=1020` |

Running one, for example the end-to-end test:

```
verilator --binary --timing -Wno-fatal -y rtl rtl/sobel_pkg.sv tb/tb_sobel_hw.sv \
          --top-module tb_sobel_hw
./obj_dir/Vtb_sobel_hw
```

The simulator has two states. Everything the testbenches read is reset or initialised,
except the line memory. Its contents only ever reach border pixels, which are masked.

## Resources

At the default size the core needs:

* 30,720 bits of block RAM (one 36 Kbit RAM on 7-series or Virtex-5 parts);
* two 11×11 multipliers for the squares and three constant multipliers for grey;
* about 450 flip-flops, mostly in the square-root pipeline;
* 79 signal pins, if the ports were taken straight to pins.

The study built its design, wrapped for FPGA-in-the-loop, on three devices. It reported
1005 LUTs / 1145 registers / 5 memories / 3 DSPs on a Zynq xc7z010. On a Virtex-5
xc5vlx50t the figures were 3514 / 2207 / 24 / 1, and on a Virtex-4 xc4vlx25
4570 / 2203 / 24 / 1. This core fits each device with a wide margin. Those figures
include the Ethernet communication wrapper, so they cannot be compared directly with the
core alone.

## Design choices

These points are not fixed by the original design. Review them before relying on the
core:

* **Pixel packing:** the 32-bit input is taken as {spare, R, G, B}. The output is the grey
  level repeated in the three low bytes, with an all-ones top byte.
* **Grey weights:** BT.601.
* **Mode controls:** the control inputs are named in the original, but what they do is
  not defined. The table above is this core's interpretation.
* **Threshold comparison:** strictly greater than.
* **Stream:** no synchronisation signals; the frame start is defined by reset.
* **Image border:** output as background at the full input size. The published software
  model instead returned only the (W−2)×(H−2) valid region.
* **Frame size:** set at elaboration. The study's summary also mentions 1080×1020 images.
  Those need a core rebuilt with `IMG_W=1080, IMG_H=1020`, which uses a smaller line
  memory.
* **Reset:** synchronous, active high.
* **Pipeline depths:** this implementation's own.

## Not included

* **Object detection:** SURF features, descriptor matching and MSAC outlier rejection.
  The study runs these as software on the host to find the objects in the scene that is
  then edge-filtered, and gives no hardware for them.
* **FPGA-in-the-loop communication channel:** the Gigabit Ethernet link and its wrapper,
  generated by vendor tools. Connect the core's ports to whatever transport is used.
* **Host-side blocks:** colour-format conversion, serialisation and deserialisation, and
  the image viewers. The testbenches pack frames into the 32-bit stream and unpack the
  results themselves.
* **Clock management:** the core uses a single clock.
