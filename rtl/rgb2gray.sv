// rgb2gray: colour-to-grey conversion at the input of the Sobel core.
//
// The edge detector works on grey levels, so each incoming colour pixel is first reduced to
// one 8-bit luma value. The weights are the ITU-R BT.601 luma weights in 1/256 steps
// (77, 150, 29, which sum to 256), so gray = (77 R + 150 G + 29 B + 128) >> 8, rounded to
// nearest and never above 255. The document asks only for a conversion to grey; the weights,
// the rounding and the field order of the pixel word are this design's choices. Three
// constant multipliers are used, one per colour.
//
// Interface: pixel_in with ce (clock enable); gray_out is registered and changes only on
// clocks where ce is high, GRAY_LAT = 1 enabled clock after its pixel. Synchronous,
// active-high reset clears the output.
module rgb2gray
  import sobel_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  logic   ce,
  input  pixel_t pixel_in,
  output gray_t  gray_out
);

  logic [15:0] weighted;  // at most 256 * 255 + 128 = 65408

  always_comb begin
    weighted = 16'(GRAY_WR * pixel_in.r) + 16'(GRAY_WG * pixel_in.g)
             + 16'(GRAY_WB * pixel_in.b) + 16'd128;
  end

  always_ff @(posedge clk) begin
    if (rst) gray_out <= '0;
    else if (ce) gray_out <= weighted[15:8];
  end

endmodule
