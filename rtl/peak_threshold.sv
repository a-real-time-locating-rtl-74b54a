// peak_threshold: window maximum search and threshold decision.
//
// The block keeps a moving window of WIN (512) preamble correlation results,
// eight new ones per clock, and finds the window maximum with a binary tree
// of comparisons: 512 values -> 256 -> ... -> 1 in log2(512) = 9 registered
// levels. Because the tree pairs neighbours, level 3 holds the maximum of
// each group of eight results that arrived in the same clock. The maximum of
// the group at the window centre is taken from level 3 and delayed to meet
// the root. Thresh is raised when that centre-group maximum equals the
// window maximum (the peak sits in the centre of the window) and is at least
// the threshold. Each group passes the centre in exactly one clock, so one
// peak gives one Thresh pulse.
//
// Interface: in_corr[k] is result k of the group (0 oldest); thr is the
// threshold in use; thresh pulses for one clock; peak is the window maximum
// at that time and peak_lane the position (0..7) of the maximum inside the
// centre group. Timing: LATENCY = 1 (window register) + 9 (tree) + 1
// (decision) clocks after the centre group's entry into the centre slot;
// the centre group entered the block NG/2 + 1 clocks before that.
//
// From the system description: the 512-result window, the 9-level
// comparison tree, the centre and threshold conditions. This design's own
// choice: "centre" is the group of eight whose oldest result has index
// WIN/2 counting from the newest, and a full window is required first.
`timescale 1ns / 1ps
module peak_threshold
  import rtls_pkg::*;
#(
  parameter int unsigned N   = N_LANES,
  parameter int unsigned WIN = 512
) (
  input  logic          clk,
  input  logic          rst_n,
  input  corr_t [N-1:0] in_corr,
  input  logic          in_valid,
  input  thr_t          thr,
  output logic          thresh,
  output corr_t         peak,
  output logic [$clog2(N)-1:0] peak_lane
);

  localparam int unsigned L      = $clog2(WIN);        // 9 levels
  localparam int unsigned LG     = $clog2(N);          // level of group maxima
  localparam int unsigned NG     = WIN / N;            // groups in window
  localparam int unsigned CENTER = NG / 2 - 1;         // group index from oldest

  // Window, lv[0][0] oldest result.
  corr_t lv [L+1][WIN];
  logic [L:0] vld;
  logic [$clog2(NG+1)-1:0] fill;

  always_ff @(posedge clk) begin
    if (in_valid) begin
      for (int i = 0; i < WIN - N; i++) lv[0][i] <= lv[0][i+N];
      for (int k = 0; k < N; k++) lv[0][WIN-N+k] <= in_corr[k];
    end
  end

  for (genvar l = 1; l <= L; l++) begin : g_lvl
    always_ff @(posedge clk) begin
      for (int i = 0; i < (WIN >> l); i++)
        lv[l][i] <= (lv[l-1][2*i] >= lv[l-1][2*i+1]) ? lv[l-1][2*i] : lv[l-1][2*i+1];
    end
  end

  // Centre group: its maximum and the lane of that maximum, delayed from
  // level LG to level L.
  corr_t                 cmax_d [L-LG+1];
  logic [$clog2(N)-1:0]  clane  [L-LG+1];
  logic [$clog2(N)-1:0]  lane_now;

  // Lane of the centre group's maximum, found from the window register one
  // clock after the window moved; it travels with the level pipeline.
  logic [$clog2(N)-1:0]  lane_pipe [LG];
  always_comb begin
    corr_t best;
    best     = lv[0][CENTER*N];
    lane_now = '0;
    for (int k = 1; k < N; k++)
      if (lv[0][CENTER*N+k] > best) begin
        best     = lv[0][CENTER*N+k];
        lane_now = ($clog2(N))'(k);
      end
  end
  always_ff @(posedge clk) begin
    lane_pipe[0] <= lane_now;
    for (int i = 1; i < LG; i++) lane_pipe[i] <= lane_pipe[i-1];
  end

  always_comb begin
    cmax_d[0] = lv[LG][CENTER];
    clane[0]  = lane_pipe[LG-1];
  end
  for (genvar d = 1; d <= L - LG; d++) begin : g_dly
    always_ff @(posedge clk) begin
      cmax_d[d] <= cmax_d[d-1];
      clane[d]  <= clane[d-1];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fill      <= '0;
      vld       <= '0;
      thresh    <= 1'b0;
      peak      <= '0;
      peak_lane <= '0;
    end else begin
      if (in_valid && fill != ($bits(fill))'(NG)) fill <= fill + 1'b1;
      // vld[0]: the window register holds a full, freshly shifted window.
      vld[0] <= in_valid && (fill >= ($bits(fill))'(NG - 1));
      vld[L:1] <= vld[L-1:0];
      thresh    <= vld[L] && (cmax_d[L-LG] == lv[L][0]) &&
                   (thr_t'(cmax_d[L-LG]) >= thr);
      peak      <= lv[L][0];
      peak_lane <= clane[L-LG];
    end
  end

endmodule
