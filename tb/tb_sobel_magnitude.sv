// tb_sobel_magnitude: checks floor(sqrt(X^2 + Y^2)) and the 12-clock pipeline depth.
// A stream of random and extreme (X, Y) pairs is applied with a random clock enable; each
// result must come out exactly 12 enabled clocks later. The expected root is found from
// the real square root and corrected so that root^2 <= s < (root + 1)^2.
module tb_sobel_magnitude;
  import sobel_pkg::*;

  localparam int LAT = 12;  // one squaring stage and eleven root stages
  localparam int N = 6000;

  logic clk = 1'b0, rst = 1'b1, ce = 1'b0;
  grad_t gx, gy;
  mag_t mag;
  int checks = 0, failures = 0;
  int exp_q[$];

  sobel_magnitude dut (.clk, .rst, .ce, .gx, .gy, .mag);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_root(int x, int y);
    longint s = longint'(x) * x + longint'(y) * y;
    longint q = longint'($floor($sqrt(real'(s))));
    while (q * q > s) q--;
    while ((q + 1) * (q + 1) <= s) q++;
    return int'(q);
  endfunction

  initial begin
    int x, y, e, sent, hist[$];
    mag_t held;
    gx = '0;
    gy = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    sent = 0;
    while (sent < N + LAT) begin
      @(negedge clk);
      ce = (sent < 20) || ($urandom_range(0, 4) != 0);
      case (sent)
        0: begin x = 1020; y = 1020; end
        1: begin x = -1020; y = -1020; end
        2: begin x = 0; y = 0; end
        3: begin x = -1020; y = 0; end
        4: begin x = 3; y = 4; end
        5: begin x = 1; y = 0; end
        default: begin
          x = $urandom_range(0, 2040) - 1020;
          y = $urandom_range(0, 2040) - 1020;
          if (sent % 3 == 0) begin x = x / 16; y = y / 16; end
        end
      endcase
      gx = grad_t'(x);
      gy = grad_t'(y);
      held = mag;
      @(posedge clk);
      #1;
      if (ce) begin
        hist.push_back(ref_root(x, y));
        if (hist.size() >= LAT) begin  // entry n - (LAT - 1) is on mag after the edge that takes entry n
          e = hist.pop_front();
          checks++;
          if (int'(mag) != e) begin
            failures++;
            if (failures < 10) $display("mismatch at %0d: got %0d want %0d", sent, mag, e);
          end
        end
        sent++;
      end else begin
        checks++;
        if (mag != held) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
