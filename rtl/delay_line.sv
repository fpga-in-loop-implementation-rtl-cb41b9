// delay_line: a clock-enabled shift register that delays a bus by DEPTH enabled clocks.
// Used to carry side information (the border flag and centre grey level) alongside the
// arithmetic pipeline so that it reaches the output stage with its pixel.
// Synchronous active-high reset clears every stage.
module delay_line #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 1
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             ce,
  input  logic [WIDTH-1:0] din,
  output logic [WIDTH-1:0] dout
);

  if (DEPTH < 1) begin : g_depth_check
    $error("delay_line: DEPTH must be at least 1");
  end

  logic [WIDTH-1:0] stage[DEPTH];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < DEPTH; i++) stage[i] <= '0;
    end else if (ce) begin
      stage[0] <= din;
      for (int i = 1; i < DEPTH; i++) stage[i] <= stage[i-1];
    end
  end

  assign dout = stage[DEPTH-1];

endmodule
