// tb_sobel_hw_full: one full 1920 x 1080 frame through the Sobel core at its default size.
//
// A synthetic scene is generated: a smooth diagonal ramp as background (gradient below
// the threshold), filled rectangles and a disc of different colours (sharp edges), and a
// noisy patch. It is streamed with the threshold at 100 and edge display on, with the clock
// enable dropped on one clock in 61, then drained with IMG_W + 17 filler pixels. Every
// output pixel is checked against a reference model (BT.601 grey, Sobel masks, exact norm,
// threshold) and must appear IMG_W + 17 enabled clocks after its input pixel. Edge,
// non-edge, border and stall cases are counted and each must occur.
module tb_sobel_hw_full;
  localparam int W = 1920;
  localparam int H = 1080;
  localparam int N = W * H;
  localparam int LAT = W + 17;
  localparam int TH = 100;

  logic clk = 1'b0, reset = 1'b1, clk_enable = 1'b0;
  logic [31:0] Video_in, Video_out;
  logic [7:0] Threshold;
  logic Sobel_Enable, Background_Color, Show_Gradient, ce_out;
  int checks = 0, failures = 0;
  int n_stall = 0, n_border = 0, n_edge = 0, n_flat = 0;

  sobel_hw dut (.clk, .reset, .clk_enable, .Video_in, .Threshold, .Sobel_Enable,
                .Background_Color, .Show_Gradient, .ce_out, .Video_out);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] pix[];
  byte unsigned gray[];

  function automatic logic [31:0] scene(int r, int c);
    int dr, dc;
    if (r >= 200 && r < 500 && c >= 300 && c < 900) return 32'h00_C0_30_20;  // rectangle
    if (r >= 600 && r < 1000 && c >= 1200 && c < 1700) return 32'h00_20_40_E0;  // rectangle
    dr = r - 700;
    dc = c - 600;
    if (dr * dr + dc * dc < 200 * 200) return 32'h00_F0_F0_40;  // disc
    if (r >= 100 && r < 300 && c >= 1300 && c < 1600) return $urandom;  // noise patch
    return {8'h00, 8'((r + c) / 12), 8'((r + c) / 12), 8'((r + c) / 12)};  // smooth ramp
  endfunction

  function automatic int ref_level(int j, output int kind);
    int r = j / W, c = j % W;
    int x, y, m;
    longint sq;
    if (r == 0 || r == H - 1 || c == 0 || c == W - 1) begin
      kind = 1;
      return 0;
    end
    x = (int'(gray[j - W + 1]) + 2 * int'(gray[j + 1]) + int'(gray[j + W + 1]))
      - (int'(gray[j - W - 1]) + 2 * int'(gray[j - 1]) + int'(gray[j + W - 1]));
    y = (int'(gray[j - W - 1]) + 2 * int'(gray[j - W]) + int'(gray[j - W + 1]))
      - (int'(gray[j + W - 1]) + 2 * int'(gray[j + W]) + int'(gray[j + W + 1]));
    sq = longint'(x) * x + longint'(y) * y;
    m = int'($floor($sqrt(real'(sq))));
    while (longint'(m) * m > sq) m--;
    while (longint'(m + 1) * (m + 1) <= sq) m++;
    kind = (m > TH) ? 2 : 3;
    return (m > TH) ? 255 : 0;
  endfunction

  initial begin
    int k, j, v, kind, cyc;
    logic [31:0] held;
    pix = new[N];
    gray = new[N];
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++) begin
        j = r * W + c;
        pix[j] = scene(r, c);
        gray[j] = 8'((77 * int'(pix[j][23:16]) + 150 * int'(pix[j][15:8]) +
                      29 * int'(pix[j][7:0]) + 128) / 256);
      end
    Video_in = '0;
    Threshold = 8'(TH);
    Sobel_Enable = 1'b1;
    Background_Color = 1'b0;
    Show_Gradient = 1'b0;
    repeat (3) @(negedge clk);
    reset = 1'b0;
    k = 0;
    cyc = 0;
    while (k < N + LAT - 1) begin
      @(negedge clk);
      cyc++;
      clk_enable = (cyc % 61 != 0);
      Video_in = (k < N) ? pix[k] : 32'h0;
      held = Video_out;
      @(posedge clk);
      #1;
      if (!clk_enable) begin
        n_stall++;
        checks++;
        if (Video_out != held || ce_out) failures++;
        continue;
      end
      j = k - (LAT - 1);
      k++;
      if (j < 0) continue;
      v = ref_level(j, kind);
      case (kind)
        1: n_border++;
        2: n_edge++;
        default: n_flat++;
      endcase
      checks++;
      if (Video_out != {8'hFF, 8'(v), 8'(v), 8'(v)}) begin
        failures++;
        if (failures < 10)
          $display("mismatch at row %0d col %0d: got %h want %0d", j / W, j % W, Video_out, v);
      end
    end
    $display("pixels %0d stalls %0d border %0d edge %0d non-edge %0d", N, n_stall, n_border,
             n_edge, n_flat);
    checks++; if (n_stall == 0) failures++;
    checks++; if (n_border != 2 * W + 2 * (H - 2)) failures++;
    checks++; if (n_edge == 0) failures++;
    checks++; if (n_flat == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
