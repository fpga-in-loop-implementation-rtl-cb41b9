// sobel_window: line buffer and 3x3 filter window over a raster-scan grey stream.
//
// The Sobel masks need, for every pixel, the 3x3 neighbourhood a1..a9 (a1 a2 a3 on the row
// above, a4 a5 a6 on the pixel's own row, a7 a8 a9 on the row below). Pixels arrive one per
// enabled clock in raster order, so the two previous rows are kept in a line memory of
// IMG_W words of 16 bits: word c holds {pixel (r-2, c), pixel (r-1, c)}. When pixel (r, c)
// arrives, word c is read, the new column {(r-2,c), (r-1,c), (r,c)} is shifted into the
// right of the window, and word c is rewritten as {(r-1,c), (r,c)}. The memory is read and
// written at one address per clock (read-before-write), so it maps to one block RAM.
//
// After the clock that takes in pixel k (raster index), the window centre a5 is pixel
// k - IMG_W - 1. The centre position is tracked by its own row and column counters, which
// wrap at the frame size; border is high when the centre lies on the first or last row or
// column, where part of the window lies outside the image. The stream has no frame sync:
// pixel (0, 0) is the first pixel after reset, or the one LEAD enabled clocks later when
// an upstream stage (the grey conversion register) delays the stream, and frames follow
// back to back.
//
// The 3x3 window follows the document; the line-memory organisation, the position
// counters and the frame-start-at-reset convention are this design's own.
//
// Interface: gray_in with ce; win, border, cen_row and cen_col are registered and change on
// enabled clocks only. Synchronous active-high reset clears the window and counters but not
// the line memory, whose stale contents only reach border positions.
module sobel_window
  import sobel_pkg::*;
#(
  parameter int unsigned IMG_W = 1920,
  parameter int unsigned IMG_H = 1080,
  parameter int unsigned LEAD = 0  // enabled clocks from reset until pixel (0, 0) is on gray_in
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic                       ce,
  input  gray_t                      gray_in,
  output window_t                    win,
  output logic                       border,
  output logic [$clog2(IMG_H)-1:0]   cen_row,
  output logic [$clog2(IMG_W)-1:0]   cen_col
);

  localparam int unsigned COL_W = $clog2(IMG_W);
  localparam int unsigned ROW_W = $clog2(IMG_H);
  // Raster index of the centre at reset: -(IMG_W + 2 + LEAD), modulo the frame size.
  localparam int unsigned CEN_RESET = IMG_W * IMG_H - (IMG_W + 2 + LEAD);

  if (IMG_W < 3 || IMG_H < 3 || LEAD > IMG_W) begin : g_size_check
    $error("sobel_window: the image must be at least 3x3 pixels and LEAD at most IMG_W");
  end

  logic [15:0] line_mem[IMG_W];  // {row r-2, row r-1} per column
  logic [COL_W-1:0] in_col;  // column of the incoming pixel

  // Incoming column counter.
  always_ff @(posedge clk) begin
    if (rst) in_col <= '0;
    else if (ce) in_col <= (in_col == COL_W'(IMG_W - 1)) ? '0 : in_col + 1'b1;
  end

  // Line memory and window shift register.
  always_ff @(posedge clk) begin
    if (ce) begin
      line_mem[in_col] <= {line_mem[in_col][7:0], gray_in};
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      win <= '0;
    end else if (ce) begin
      for (int r = 0; r < 3; r++) begin
        win[r][0] <= win[r][1];
        win[r][1] <= win[r][2];
      end
      win[0][2] <= line_mem[in_col][15:8];
      win[1][2] <= line_mem[in_col][7:0];
      win[2][2] <= gray_in;
    end
  end

  // Centre position: reset so that it reads -(IMG_W + 1) after the clock that takes in
  // pixel 0, which is LEAD enabled clocks after the first.
  always_ff @(posedge clk) begin
    if (rst) begin
      cen_row <= ROW_W'(CEN_RESET / IMG_W);
      cen_col <= COL_W'(CEN_RESET % IMG_W);
    end else if (ce) begin
      if (cen_col == COL_W'(IMG_W - 1)) begin
        cen_col <= '0;
        cen_row <= (cen_row == ROW_W'(IMG_H - 1)) ? '0 : cen_row + 1'b1;
      end else begin
        cen_col <= cen_col + 1'b1;
      end
    end
  end

  // The position counters never leave the frame.
  always_ff @(posedge clk) begin
    if (!rst) begin
      assert (cen_col < COL_W'(IMG_W) && cen_row < ROW_W'(IMG_H))
      else $error("sobel_window: centre position outside the frame");
    end
  end

  always_comb begin
    border = (cen_row == '0) || (cen_row == ROW_W'(IMG_H - 1))
          || (cen_col == '0) || (cen_col == COL_W'(IMG_W - 1));
  end

endmodule
