// sobel_hw: streaming Sobel edge-detection core.
//
// A raster-scan colour video stream enters on Video_in, one pixel per clock on which
// clk_enable is high, and the edge image leaves on Video_out at the same rate, pixel for
// pixel, after a fixed latency. The chain is:
//   rgb2gray         colour pixel to 8-bit grey level                       (1 clock)
//   sobel_window     two-row line buffer and the 3x3 window a1..a9         (1 clock + one
//                                                                           row + 1 pixel)
//   sobel_kernel     X and Y Sobel sums                                     (1 clock)
//   sobel_magnitude  floor(sqrt(X^2 + Y^2))                                 (12 clocks)
//   sobel_output     threshold and output controls                          (1 clock)
// The border flag and the centre grey level from the window travel beside the arithmetic in
// a delay line. From a pixel on Video_in in one enabled clock to the same pixel position
// on Video_out takes core_latency(IMG_W) = IMG_W + 17 enabled clocks. Every register
// advances only when clk_enable is high, so holding clk_enable low stalls the whole core;
// ce_out repeats clk_enable and marks the clocks on which Video_out advances.
//
// The stream carries no synchronisation: the first enabled pixel after reset is pixel
// (0, 0) of a frame of IMG_W x IMG_H pixels, and frames follow back to back. The output of
// the last row of a frame therefore leaves while the next frame is entering; to drain a
// single frame, feed IMG_W + 17 more pixels of any value. Pixels on the image border come
// out as background. Video_in is {spare, R, G, B}; Video_out is {8'hFF, v, v, v}.
//
// From the document: the port names, the 8-bit Threshold, the 32-bit video words, the
// 1920 x 1080 frame, grey conversion, the 3x3 window, the two Sobel masks and the exact
// sqrt(X^2 + Y^2). This design's choices: grey weights, the stream and border conventions,
// the meaning of the three mode controls (see sobel_output), the pipeline depths and the
// synchronous active-high reset.
module sobel_hw
  import sobel_pkg::*;
#(
  parameter int unsigned IMG_W = 1920,
  parameter int unsigned IMG_H = 1080
) (
  input  logic        clk,
  input  logic        reset,
  input  logic        clk_enable,
  input  logic [31:0] Video_in,
  input  logic [7:0]  Threshold,
  input  logic        Sobel_Enable,
  input  logic        Background_Color,
  input  logic        Show_Gradient,
  output logic        ce_out,
  output logic [31:0] Video_out
);

  localparam int unsigned SIDE_LAT = KERNEL_LAT + MAG_LAT;

  gray_t   gray;
  window_t win;
  logic    win_border;
  grad_t   gx, gy;
  mag_t    mag;
  logic    out_border;
  gray_t   out_centre;
  pixel_t  pixel_out;

  rgb2gray u_gray (
    .clk,
    .rst     (reset),
    .ce      (clk_enable),
    .pixel_in(pixel_t'(Video_in)),
    .gray_out(gray)
  );

  sobel_window #(
    .IMG_W(IMG_W),
    .IMG_H(IMG_H),
    .LEAD (GRAY_LAT)
  ) u_window (
    .clk,
    .rst    (reset),
    .ce     (clk_enable),
    .gray_in(gray),
    .win,
    .border (win_border),
    .cen_row(),
    .cen_col()
  );

  sobel_kernel u_kernel (
    .clk,
    .rst(reset),
    .ce (clk_enable),
    .win,
    .gx,
    .gy
  );

  sobel_magnitude u_mag (
    .clk,
    .rst(reset),
    .ce (clk_enable),
    .gx,
    .gy,
    .mag
  );

  delay_line #(
    .WIDTH(1 + $bits(gray_t)),
    .DEPTH(SIDE_LAT)
  ) u_side (
    .clk,
    .rst (reset),
    .ce  (clk_enable),
    .din ({win_border, win[1][1]}),
    .dout({out_border, out_centre})
  );

  sobel_output u_out (
    .clk,
    .rst             (reset),
    .ce              (clk_enable),
    .mag,
    .border          (out_border),
    .centre          (out_centre),
    .threshold       (Threshold),
    .sobel_enable    (Sobel_Enable),
    .background_color(Background_Color),
    .show_gradient   (Show_Gradient),
    .pixel_out
  );

  assign ce_out = clk_enable;
  assign Video_out = pixel_out;

endmodule
