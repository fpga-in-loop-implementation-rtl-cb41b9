// tb_sobel_window: checks the line buffer and 3x3 window on a small 7 x 5 image.
// Four frames of random grey pixels are streamed with a random clock enable. After every
// enabled clock that takes in pixel k, the window centre must be pixel j = k - 8
// (k - IMG_W - 1): its row and column counters, the border flag, the centre a5 and, away
// from the border, all nine window elements are compared with the stored stream.
module tb_sobel_window;
  import sobel_pkg::*;

  localparam int W = 7;
  localparam int H = 5;
  localparam int FRAMES = 4;
  localparam int N = W * H * FRAMES;

  logic clk = 1'b0, rst = 1'b1, ce = 1'b0;
  gray_t gray_in;
  window_t win;
  logic border;
  logic [$clog2(H)-1:0] cen_row;
  logic [$clog2(W)-1:0] cen_col;
  int checks = 0, failures = 0;
  int interior = 0, borders = 0, stalls = 0;

  sobel_window #(.IMG_W(W), .IMG_H(H)) dut (.clk, .rst, .ce, .gray_in, .win, .border, .cen_row,
                                            .cen_col);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what, int j);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("mismatch: %s at centre index %0d", what, j);
    end
  endtask

  initial begin
    gray_t stream[N];
    window_t held;
    int k, j, p, r, c;
    bit exp_border;
    foreach (stream[i]) stream[i] = gray_t'($urandom);
    gray_in = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    k = 0;
    while (k < N) begin
      @(negedge clk);
      ce = ($urandom_range(0, 3) != 0);
      gray_in = stream[k];
      held = win;
      @(posedge clk);
      #1;
      if (!ce) begin
        stalls++;
        check(win == held, "window moved while ce was low", k);
        continue;
      end
      j = k - W - 1;
      k++;
      if (j < 0) continue;
      p = j % (W * H);
      r = p / W;
      c = p % W;
      exp_border = (r == 0) || (r == H - 1) || (c == 0) || (c == W - 1);
      check(int'(cen_row) == r && int'(cen_col) == c, "centre position", j);
      check(border == exp_border, "border flag", j);
      check(win[1][1] == stream[j], "centre a5", j);
      if (!exp_border) begin
        interior++;
        for (int dr = -1; dr <= 1; dr++)
          for (int dc = -1; dc <= 1; dc++)
            check(win[dr+1][dc+1] == stream[j + dr * W + dc], "window element", j);
      end else borders++;
    end
    check(interior > 0 && borders > 0 && stalls > 0, "coverage", 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
