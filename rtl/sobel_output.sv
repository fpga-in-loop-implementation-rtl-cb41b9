// sobel_output: threshold decision and output-pixel formatting of the Sobel core.
//
// The core's control inputs are Threshold, Sobel_Enable, Background_Color and Show_Gradient
// (their names and the 8-bit Threshold come from the core's model and waveform); what each
// does is this design's reading of those names:
//   Sobel_Enable = 0    the grey image passes through: v = centre grey level a5.
//   Sobel_Enable = 1    edge image. Normally v = 255 where the gradient magnitude is above
//                       Threshold and 0 elsewhere; with Show_Gradient = 1, v is the gradient
//                       magnitude itself, saturated at 255.
//   Background_Color    with Sobel_Enable = 1, 1 inverts the edge image (v -> 255 - v), so
//                       edges are dark on a white background instead of light on black.
// Pixels whose 3x3 window reaches outside the image (border = 1) have no gradient and are
// background. The output word is {8'hFF, v, v, v}, a grey pixel in the colour format.
// The control inputs are used as they stand on the clock that registers the pixel.
//
// Interface: mag, border and centre with ce; pixel_out is registered, OUT_LAT = 1 enabled
// clock later. Synchronous active-high reset clears it.
module sobel_output
  import sobel_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       ce,
  input  mag_t       mag,
  input  logic       border,
  input  gray_t      centre,
  input  logic [7:0] threshold,
  input  logic       sobel_enable,
  input  logic       background_color,
  input  logic       show_gradient,
  output pixel_t     pixel_out
);

  gray_t strength;  // edge strength before the background choice
  gray_t v;

  always_comb begin
    if (border) strength = '0;
    else if (show_gradient) strength = (mag > mag_t'(8'hFF)) ? 8'hFF : mag[7:0];
    else strength = (mag > mag_t'(threshold)) ? 8'hFF : 8'h00;

    if (!sobel_enable) v = centre;
    else if (background_color) v = ~strength;
    else v = strength;
  end

  always_ff @(posedge clk) begin
    if (rst) pixel_out <= '0;
    else if (ce) pixel_out <= '{spare: 8'hFF, r: v, g: v, b: v};
  end

endmodule
