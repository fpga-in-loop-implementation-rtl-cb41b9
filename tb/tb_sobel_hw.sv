// tb_sobel_hw: end-to-end test of the Sobel core on a sequence of small frames.
//
// Eight 24 x 12 colour frames are streamed back to back with a random clock enable, then
// drained with IMG_W + 17 filler pixels. The mode inputs change from frame to frame, timed
// so that each frame leaves the core under its own mode: thresholded edges at several
// thresholds, inverted background, gradient display, the grey pass-through, and a change
// of mode in the middle of a frame. Each output pixel is compared with a reference model
// that converts to grey with the BT.601 weights, applies the two Sobel masks and the exact
// norm floor(sqrt(X^2 + Y^2)), and formats the result; the pixel must appear exactly
// IMG_W + 17 enabled clocks after it entered, and the output must hold while clk_enable
// is low. The frames mix flat blocks, sharp steps and noise so that every case occurs;
// each is counted, and a case that never occurs counts as a failure.
module tb_sobel_hw;
  localparam int W = 24;
  localparam int H = 12;
  localparam int FRAMES = 8;
  localparam int N = W * H * FRAMES;
  localparam int LAT = W + 17;

  typedef struct {
    bit en, bg, sg;
    int th;
  } mode_t;

  logic clk = 1'b0, reset = 1'b1, clk_enable = 1'b0;
  logic [31:0] Video_in, Video_out;
  logic [7:0] Threshold;
  logic Sobel_Enable, Background_Color, Show_Gradient, ce_out;
  int checks = 0, failures = 0;

  // Counts of each mechanism seen at the output.
  int n_stall = 0, n_border = 0, n_edge = 0, n_flat = 0, n_bypass = 0, n_invert = 0;
  int n_gradient = 0, n_saturate = 0, n_mode_change = 0;

  sobel_hw #(.IMG_W(W), .IMG_H(H)) dut (.clk, .reset, .clk_enable, .Video_in, .Threshold,
                                        .Sobel_Enable, .Background_Color, .Show_Gradient,
                                        .ce_out, .Video_out);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] pix[N];
  int gray[N];

  function automatic mode_t mode_of(int j);
    int f = j / (W * H);
    int p = j % (W * H);
    case (f)
      0: return '{1, 0, 0, 100};
      1: return '{1, 1, 0, 60};
      2: return '{1, 0, 1, 0};
      3: return '{0, 0, 0, 100};
      4: return '{1, 1, 1, 0};
      5: return (p < W * H / 2) ? '{1, 0, 0, 30} : '{1, 0, 0, 200};  // change mid-frame
      6: return '{0, 1, 1, 100};
      default: return '{1, 0, 0, 0};
    endcase
  endfunction

  // Reference output grey level for pixel j; also reports which case it is.
  function automatic int ref_level(int j, output int kind, output int m);
    mode_t md = mode_of(j);
    int base = j - (j % (W * H));
    int p = j % (W * H);
    int r = p / W, c = p % W;
    int x = 0, y = 0, s;
    longint sq;
    m = 0;
    if (!md.en) begin
      kind = 0;
      return gray[j];
    end
    if (r == 0 || r == H - 1 || c == 0 || c == W - 1) begin
      kind = 1;
      s = 0;
    end else begin
      int a[3][3];
      for (int dr = 0; dr < 3; dr++)
        for (int dc = 0; dc < 3; dc++) a[dr][dc] = gray[base + (r + dr - 1) * W + (c + dc - 1)];
      x = (a[0][2] + 2 * a[1][2] + a[2][2]) - (a[0][0] + 2 * a[1][0] + a[2][0]);
      y = (a[0][0] + 2 * a[0][1] + a[0][2]) - (a[2][0] + 2 * a[2][1] + a[2][2]);
      sq = longint'(x) * x + longint'(y) * y;
      m = int'($floor($sqrt(real'(sq))));
      while (longint'(m) * m > sq) m--;
      while (longint'(m + 1) * (m + 1) <= sq) m++;
      if (md.sg) begin
        kind = (m > 255) ? 4 : 3;
        s = (m > 255) ? 255 : m;
      end else begin
        kind = (m > md.th) ? 2 : 5;
        s = (m > md.th) ? 255 : 0;
      end
    end
    return md.bg ? 255 - s : s;
  endfunction

  initial begin
    int i, k, j, v, kind, m, blk;
    logic [31:0] held;
    mode_t md, prev_md;
    bit first = 1;
    // Frames: flat blocks of random colour, some noisy blocks.
    for (int f = 0; f < FRAMES; f++)
      for (int r = 0; r < H; r++)
        for (int c = 0; c < W; c++) begin
          i = (f * H + r) * W + c;
          blk = ((c / 6) + 3 * (r / 4) + 5 * f) % 4;
          if (blk == 0) pix[i] = $urandom;
          else pix[i] = {8'h00, 8'(40 * blk + 17 * f), 8'(90 * blk), 8'(255 - 60 * blk)};
          gray[i] = (77 * int'(pix[i][23:16]) + 150 * int'(pix[i][15:8]) +
                     29 * int'(pix[i][7:0]) + 128) / 256;
        end
    Video_in = '0; Threshold = '0; Sobel_Enable = 0; Background_Color = 0; Show_Gradient = 0;
    repeat (3) @(negedge clk);
    reset = 1'b0;
    k = 0;
    while (k < N + LAT - 1) begin
      @(negedge clk);
      clk_enable = ($urandom_range(0, 4) != 0);
      Video_in = (k < N) ? pix[k] : $urandom;
      j = k - (LAT - 1);  // the pixel registered at the output on this clock
      if (j >= 0) begin
        md = mode_of(j);
        if (!first && md != prev_md && clk_enable) n_mode_change++;
        Sobel_Enable = md.en; Background_Color = md.bg; Show_Gradient = md.sg;
        Threshold = 8'(md.th);
      end
      held = Video_out;
      @(posedge clk);
      #1;
      checks++;
      if (ce_out != clk_enable) failures++;
      if (!clk_enable) begin
        n_stall++;
        checks++;
        if (Video_out != held) failures++;
        continue;
      end
      k++;
      if (j < 0) continue;
      first = 0;
      prev_md = md;
      v = ref_level(j, kind, m);
      case (kind)
        0: n_bypass++;
        1: n_border++;
        2: n_edge++;
        3: n_gradient++;
        4: begin n_gradient++; n_saturate++; end
        default: n_flat++;
      endcase
      if (md.en && md.bg) n_invert++;
      checks++;
      if (Video_out != {8'hFF, 8'(v), 8'(v), 8'(v)}) begin
        failures++;
        if (failures < 10)
          $display("mismatch at pixel %0d (frame %0d row %0d col %0d): got %h want %0d kind %0d mag %0d",
                   j, j / (W * H), (j % (W * H)) / W, j % W, Video_out, v, kind, m);
      end
    end
    $display("stalls %0d border %0d edge %0d non-edge %0d bypass %0d inverted %0d gradient %0d saturated %0d mode changes %0d",
             n_stall, n_border, n_edge, n_flat, n_bypass, n_invert, n_gradient, n_saturate, n_mode_change);
    checks++; if (n_stall == 0) failures++;
    checks++; if (n_border == 0) failures++;
    checks++; if (n_edge == 0) failures++;
    checks++; if (n_flat == 0) failures++;
    checks++; if (n_bypass == 0) failures++;
    checks++; if (n_invert == 0) failures++;
    checks++; if (n_gradient == 0) failures++;
    checks++; if (n_saturate == 0) failures++;
    checks++; if (n_mode_change == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
