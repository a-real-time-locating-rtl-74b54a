// symbol_correlator: correlation of the sample stream with the symbol mask.
//
// For every sample position p it computes
//     Del[p] = sum_{j=0}^{SW-1} x[p+j] * MASK[j]
// where MASK is a 0/1 pattern, a 2-sample (2 ns) rectangular pulse in a
// 50-sample (50 ns) symbol. Eight new samples arrive per clock, so the block
// keeps the last SW-1 samples plus the eight new ones (57 samples) and runs
// eight mask-and-add instances in parallel, instance k on the buffer shifted
// by k samples. Each instance sums its 50 products with a pipelined tree of
// two-input adders of depth ceil(log2 50) = 6.
//
// Interface: in_data[8k+7:8k] is signed sample k of the group (0 oldest).
// out_del[k] is Del for the window whose last sample is new sample k, i.e.
// the window starting SW-1 samples before it. out_valid rises once the
// buffer holds a full window. Timing: LATENCY = 1 + 6 clocks from in_data
// to out_del, one result group per clock.
//
// From the system description: Eq. (3.1), the 50-sample mask of a 2 ns
// pulse, eight parallel instances and the 6-level adder tree. This design's
// own choice: the pulse position inside the mask (MASK default, centre of
// the symbol, as in the processor's alignment mask) and the output widths.
`timescale 1ns / 1ps
module symbol_correlator
  import rtls_pkg::*;
#(
  parameter int unsigned  N  = N_LANES,
  parameter int unsigned  L_SW = SW,
  parameter logic [L_SW-1:0] MASK = L_SW'(2'b11) << (L_SW/2 - 1)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [8*N-1:0]     in_data,
  input  logic               in_valid,
  output del_t [N-1:0]       out_del,
  output logic               out_valid
);

  localparam int unsigned DEPTH   = $clog2(L_SW);
  localparam int unsigned LATENCY = 1 + DEPTH;
  localparam int unsigned BUF     = L_SW - 1 + N;

  sample_t buffer [BUF];   // buffer[0] oldest; new samples at L_SW-1 .. BUF-1
  logic [LATENCY-1:0] vpipe;

  always_ff @(posedge clk) begin
    if (in_valid) begin
      for (int i = 0; i < L_SW - 1; i++) buffer[i] <= buffer[i+N];
      for (int k = 0; k < N; k++) buffer[L_SW-1+k] <= sample_t'(in_data[8*k +: 8]);
    end
  end

  // Groups needed before the first window is complete.
  localparam int unsigned FILL = (L_SW - 1 + N - 1) / N + 1;
  logic [$clog2(FILL+1)-1:0] fill;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vpipe <= '0;
      fill  <= '0;
    end else begin
      if (in_valid && fill != ($bits(fill))'(FILL)) fill <= fill + 1'b1;
      vpipe <= {vpipe[LATENCY-2:0], in_valid && (fill >= ($bits(fill))'(FILL - 1))};
    end
  end
  assign out_valid = vpipe[LATENCY-1];

  for (genvar k = 0; k < N; k++) begin : g_inst
    logic signed [L_SW-1:0][SAMPLE_W-1:0] prod;
    always_comb begin
      for (int j = 0; j < L_SW; j++) prod[j] = MASK[j] ? buffer[k+j] : '0;
    end
    adder_tree #(.N(L_SW), .W_IN(SAMPLE_W), .W_OUT(DEL_W)) u_tree (
      .clk (clk),
      .in  (prod),
      .sum (out_del[k])
    );
  end

endmodule
