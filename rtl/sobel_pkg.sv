// sobel_pkg: types and constants shared by the streaming Sobel edge-detection core.
//
// The core works on a raster-scan stream of 32-bit colour pixels, one pixel per enabled
// clock. The pixel word is {spare, R, G, B} with 8 bits per field; the output word is
// {8'hFF, v, v, v}, a grey pixel with all-ones in the top byte. The 32-bit width and the
// all-ones top byte of the output follow the core's waveform; the order of the colour
// fields is this design's choice.
//
// Widths of the arithmetic: a grey level is 8 bits, a Sobel sum X or Y lies in
// [-1020, 1020] (11 bits signed), X^2 + Y^2 is at most 2,080,800 (21 bits, padded to 22 for
// the two-bits-per-step square root) and its root is at most 1442 (11 bits).
package sobel_pkg;

  typedef logic [7:0] gray_t;

  typedef struct packed {
    logic [7:0] spare;
    logic [7:0] r;
    logic [7:0] g;
    logic [7:0] b;
  } pixel_t;

  // 3x3 window, element [row][col]; [0][0] is a1, [0][1] is a2 ... [2][2] is a9.
  typedef gray_t [2:0][2:0] window_t;

  localparam int unsigned GRAD_W = 11;  // signed width of X and Y
  localparam int unsigned SUMSQ_W = 22;  // X^2 + Y^2, padded to an even width
  localparam int unsigned MAG_W = SUMSQ_W / 2;  // floor(sqrt(X^2 + Y^2))

  typedef logic signed [GRAD_W-1:0] grad_t;
  typedef logic [MAG_W-1:0] mag_t;

  // Grey conversion weights, in 1/256 (ITU-R BT.601 luma, rounded so they sum to 256).
  localparam int unsigned GRAY_WR = 77;
  localparam int unsigned GRAY_WG = 150;
  localparam int unsigned GRAY_WB = 29;

  // Pipeline depths in enabled clocks.
  localparam int unsigned GRAY_LAT = 1;  // rgb2gray
  localparam int unsigned KERNEL_LAT = 1;  // sobel_kernel
  localparam int unsigned MAG_LAT = 1 + MAG_W;  // sobel_magnitude: squares, then one root bit per stage
  localparam int unsigned OUT_LAT = 1;  // sobel_output

  // Latency from a pixel on Video_in to the same pixel position on Video_out, in enabled
  // clocks, for an image IMG_W pixels wide. The window adds one clock for its register and
  // IMG_W + 1 clocks waiting for the row below and the column to the right.
  function automatic int unsigned core_latency(int unsigned img_w);
    return GRAY_LAT + 1 + img_w + 1 + KERNEL_LAT + MAG_LAT + OUT_LAT;
  endfunction

endpackage
