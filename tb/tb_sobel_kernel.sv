// tb_sobel_kernel: checks X and Y of the Sobel kernel against the two 3x3 masks.
// Random and extreme windows (all-zero, all-255, half planes in each direction) are applied;
// the expected sums come from multiplying the window by the mask tables element by element.
// The result must appear one enabled clock after the window and hold while ce is low.
module tb_sobel_kernel;
  import sobel_pkg::*;

  logic clk = 1'b0, rst = 1'b1, ce = 1'b0;
  window_t win;
  grad_t gx, gy;
  int checks = 0, failures = 0;

  sobel_kernel dut (.clk, .rst, .ce, .win, .gx, .gy);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Mask tables, [row][col] with row 0 at the top.
  const int MX[3][3] = '{'{-1, 0, 1}, '{-2, 0, 2}, '{-1, 0, 1}};
  const int MY[3][3] = '{'{1, 2, 1}, '{0, 0, 0}, '{-1, -2, -1}};

  initial begin
    window_t w;
    grad_t hx, hy;
    int ex, ey;
    win = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      for (int r = 0; r < 3; r++)
        for (int c = 0; c < 3; c++)
          case (i)
            0: w[r][c] = 8'h00;
            1: w[r][c] = 8'hFF;
            2: w[r][c] = (c == 2) ? 8'hFF : 8'h00;  // X = +1020
            3: w[r][c] = (c == 0) ? 8'hFF : 8'h00;  // X = -1020
            4: w[r][c] = (r == 0) ? 8'hFF : 8'h00;  // Y = +1020
            5: w[r][c] = (r == 2) ? 8'hFF : 8'h00;  // Y = -1020
            default: w[r][c] = 8'($urandom);
          endcase
      win = w;
      ce = (i < 6) || ($urandom_range(0, 3) != 0);
      hx = gx;
      hy = gy;
      @(posedge clk);
      #1;
      ex = 0;
      ey = 0;
      for (int r = 0; r < 3; r++)
        for (int c = 0; c < 3; c++) begin
          ex += MX[r][c] * int'(w[r][c]);
          ey += MY[r][c] * int'(w[r][c]);
        end
      checks++;
      if (ce ? (int'(gx) != ex || int'(gy) != ey) : (gx != hx || gy != hy)) begin
        failures++;
        if (failures < 10) $display("mismatch %0d: ce=%0b got %0d %0d want %0d %0d", i, ce, gx, gy, ex, ey);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
