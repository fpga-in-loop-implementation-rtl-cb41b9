// tb_sobel_output: checks the threshold decision and the output formatting for every
// combination of Sobel_Enable, Background_Color, Show_Gradient and the border flag, with
// random magnitudes, thresholds and centre levels, including magnitudes at the threshold,
// one above it, and above 255 for saturation.
module tb_sobel_output;
  import sobel_pkg::*;

  logic clk = 1'b0, rst = 1'b1, ce = 1'b0;
  mag_t mag;
  logic border;
  gray_t centre;
  logic [7:0] threshold;
  logic sobel_enable, background_color, show_gradient;
  pixel_t pixel_out;
  int checks = 0, failures = 0;

  sobel_output dut (.clk, .rst, .ce, .mag, .border, .centre, .threshold, .sobel_enable,
                    .background_color, .show_gradient, .pixel_out);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_level(int m, bit b, int c, int t, bit en, bit bg, bit sg);
    int s;
    if (!en) return c;
    if (b) s = 0;
    else if (sg) s = (m > 255) ? 255 : m;
    else s = (m > t) ? 255 : 0;
    return bg ? 255 - s : s;
  endfunction

  initial begin
    int m, t, c, v;
    bit b, en, bg, sg;
    pixel_t held;
    mag = '0; border = 0; centre = '0; threshold = '0;
    sobel_enable = 0; background_color = 0; show_gradient = 0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int i = 0; i < 8000; i++) begin
      @(negedge clk);
      {en, bg, sg, b} = 4'(i);
      t = $urandom_range(0, 255);
      case ((i / 16) % 5)
        0: m = t;
        1: m = t + 1;
        2: m = $urandom_range(256, 1442);
        default: m = $urandom_range(0, 1442);
      endcase
      c = $urandom_range(0, 255);
      mag = mag_t'(m); border = b; centre = gray_t'(c); threshold = 8'(t);
      sobel_enable = en; background_color = bg; show_gradient = sg;
      ce = ($urandom_range(0, 5) != 0);
      held = pixel_out;
      @(posedge clk);
      #1;
      checks++;
      if (ce) begin
        v = ref_level(m, b, c, t, en, bg, sg);
        if (pixel_out != {8'hFF, 8'(v), 8'(v), 8'(v)}) begin
          failures++;
          if (failures < 10)
            $display("mismatch: m=%0d t=%0d c=%0d b=%0b en=%0b bg=%0b sg=%0b got %h want %0d",
                     m, t, c, b, en, bg, sg, pixel_out, v);
        end
      end else if (pixel_out != held) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
