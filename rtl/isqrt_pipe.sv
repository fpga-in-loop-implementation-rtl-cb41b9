// isqrt_pipe: pipelined integer square root, root = floor(sqrt(radicand)).
//
// Digit-by-digit (restoring) method, one root bit per stage from the most significant:
// each stage brings down the next two radicand bits into the partial remainder, tries to
// subtract (4 * root_so_far + 1), and sets the new root bit when the subtraction does not
// go negative. With IN_W radicand bits (IN_W even) there are IN_W/2 stages and a new
// radicand may enter on every enabled clock.
//
// Interface: radicand with ce; root appears IN_W/2 enabled clocks later. Synchronous
// active-high reset clears the pipeline.
module isqrt_pipe #(
  parameter int unsigned IN_W = 22
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                ce,
  input  logic [IN_W-1:0]     radicand,
  output logic [IN_W/2-1:0]   root
);

  localparam int unsigned N = IN_W / 2;  // root bits, one per stage
  localparam int unsigned REM_W = N + 2;  // partial remainder width

  if (IN_W % 2 != 0 || IN_W < 4) begin : g_width_check
    $error("isqrt_pipe: IN_W must be even and at least 4");
  end

  // Stage s holds the root bits found so far, the remainder, and the radicand bits not yet used.
  logic [N-1:0]     q_r  [N+1];
  logic [REM_W-1:0] rem_r[N+1];
  logic [IN_W-1:0]  rad_r[N+1];

  always_comb begin
    q_r[0] = '0;
    rem_r[0] = '0;
    rad_r[0] = radicand;
  end

  for (genvar s = 0; s < N; s++) begin : g_stage
    logic [REM_W-1:0] rem_in;
    logic [REM_W-1:0] trial;
    logic             take;

    always_comb begin
      rem_in = {rem_r[s][REM_W-3:0], rad_r[s][IN_W-1 -: 2]};
      trial = {q_r[s], 2'b01};
      take = rem_in >= trial;
    end

    always_ff @(posedge clk) begin
      if (rst) begin
        q_r[s+1] <= '0;
        rem_r[s+1] <= '0;
        rad_r[s+1] <= '0;
      end else if (ce) begin
        q_r[s+1] <= {q_r[s][N-2:0], take};
        rem_r[s+1] <= take ? rem_in - trial : rem_in;
        rad_r[s+1] <= rad_r[s] << 2;
      end
    end
  end

  assign root = q_r[N];

endmodule
