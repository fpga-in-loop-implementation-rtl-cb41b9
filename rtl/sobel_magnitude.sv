// sobel_magnitude: gradient magnitude sqrt(X^2 + Y^2) of the two Sobel sums.
//
// The document defines the Sobel gradient as the Euclidean norm of X and Y, computed with
// squares and a square root, not with the |X| + |Y| approximation. This block does exactly
// that in integers: one pipeline stage squares X and Y (two multipliers) and adds them,
// then isqrt_pipe takes floor(sqrt(.)) one root bit per stage. The result, 0..1442, is
// exact: comparing it against an integer threshold T gives the same answer as comparing
// the real-valued norm, since floor(sqrt(s)) > T exactly when sqrt(s) > T.
// The pipelined square root is this design's choice.
//
// Interface: gx, gy with ce; mag appears MAG_LAT = 1 + MAG_W = 12 enabled clocks later,
// and a new pair may enter on every enabled clock. Synchronous active-high reset.
module sobel_magnitude
  import sobel_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  logic  ce,
  input  grad_t gx,
  input  grad_t gy,
  output mag_t  mag
);

  logic signed [2*GRAD_W-1:0] gx_sq, gy_sq;
  logic [SUMSQ_W-1:0] sum_sq;

  always_comb begin
    gx_sq = gx * gx;
    gy_sq = gy * gy;
  end

  always_ff @(posedge clk) begin
    if (rst) sum_sq <= '0;
    else if (ce) sum_sq <= SUMSQ_W'(gx_sq) + SUMSQ_W'(gy_sq);
  end

  isqrt_pipe #(
    .IN_W(SUMSQ_W)
  ) u_isqrt (
    .clk,
    .rst,
    .ce,
    .radicand(sum_sq),
    .root    (mag)
  );

endmodule
