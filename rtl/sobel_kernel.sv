// sobel_kernel: the two Sobel masks applied to a 3x3 grey window.
//
// With the window a1..a9 laid out as
//     a1 a2 a3
//     a4 a5 a6
//     a7 a8 a9
// the horizontal-derivative mask gives X = -a1 + a3 - 2 a4 + 2 a6 - a7 + a9 (vertical edges)
// and the vertical-derivative mask gives Y = a1 + 2 a2 + a3 - a7 - 2 a8 - a9 (horizontal
// edges). Both masks and their signs are the document's. The multiplications by two are
// shifts, so the kernel is a pair of small adder trees; the results lie in [-1020, 1020]
// and are held in 11-bit signed registers.
//
// Interface: win with ce; gx and gy are registered, KERNEL_LAT = 1 enabled clock after the
// window. Synchronous active-high reset clears them.
module sobel_kernel
  import sobel_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  logic    ce,
  input  window_t win,
  output grad_t   gx,
  output grad_t   gy
);

  grad_t a1, a2, a3, a4, a6, a7, a8, a9;
  grad_t x_sum, y_sum;

  always_comb begin
    a1 = grad_t'(win[0][0]);
    a2 = grad_t'(win[0][1]);
    a3 = grad_t'(win[0][2]);
    a4 = grad_t'(win[1][0]);
    a6 = grad_t'(win[1][2]);
    a7 = grad_t'(win[2][0]);
    a8 = grad_t'(win[2][1]);
    a9 = grad_t'(win[2][2]);
    x_sum = (a3 + (a6 <<< 1) + a9) - (a1 + (a4 <<< 1) + a7);
    y_sum = (a1 + (a2 <<< 1) + a3) - (a7 + (a8 <<< 1) + a9);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      gx <= '0;
      gy <= '0;
    end else if (ce) begin
      gx <= x_sum;
      gy <= y_sum;
    end
  end

endmodule
