// tb_rgb2gray: checks the colour-to-grey conversion against the BT.601 luma of each pixel.
// Random and corner pixels are applied with a random clock enable; each result is checked
// one enabled clock later against round(0.299 R + 0.587 G + 0.114 B) computed in real
// arithmetic (within one grey level, since the hardware weights are 8-bit) and exactly
// against the 8-bit fixed-point definition. A held clock enable must freeze the output.
module tb_rgb2gray;
  import sobel_pkg::*;

  logic clk = 1'b0, rst = 1'b1, ce = 1'b0;
  pixel_t pixel_in;
  gray_t gray_out;
  int checks = 0, failures = 0;

  rgb2gray dut (.clk, .rst, .ce, .pixel_in, .gray_out);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int fixed_gray(pixel_t p);
    return (77 * int'(p.r) + 150 * int'(p.g) + 29 * int'(p.b) + 128) / 256;
  endfunction

  function automatic int real_gray(pixel_t p);
    real y;
    y = 0.299 * p.r + 0.587 * p.g + 0.114 * p.b;
    return int'($floor(y + 0.5));
  endfunction

  initial begin
    pixel_t p, last;
    gray_t held;
    int exp_fixed, exp_real;
    pixel_in = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      if (i < 8) p = '{spare: 8'($urandom), r: (i & 1) ? 8'hFF : 8'h00, g: (i & 2) ? 8'hFF : 8'h00,
                       b: (i & 4) ? 8'hFF : 8'h00};
      else p = pixel_t'($urandom);
      pixel_in = p;
      ce = ($urandom_range(0, 3) != 0);
      held = gray_out;
      @(posedge clk);
      #1;
      if (ce) begin
        exp_fixed = fixed_gray(p);
        exp_real = real_gray(p);
        checks++;
        if (int'(gray_out) != exp_fixed || (int'(gray_out) - exp_real) > 1 ||
            (exp_real - int'(gray_out)) > 1) begin
          failures++;
          if (failures < 10)
            $display("mismatch: rgb=%h %h %h got %0d want %0d (real %0d)", p.r, p.g, p.b,
                     gray_out, exp_fixed, exp_real);
        end
        last = p;
      end else begin
        checks++;
        if (gray_out != held) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
