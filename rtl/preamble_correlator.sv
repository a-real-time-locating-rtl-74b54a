// preamble_correlator: full preamble correlation from symbol correlations.
//
// Every preamble symbol has the same 50-sample length, so the correlation of
// the stream with the whole preamble is the sum of seven symbol correlations
// taken 50 samples apart, added for a preamble bit 1 and subtracted for a
// bit 0:
//     C[p] = sum_{i=0}^{6} (PREAMBLE bit i ? +1 : -1) * Del[p + 50 i]
// where bit 0 is the first transmitted symbol. The block keeps a history of
// 6*50 + 8 symbol correlations and produces eight results per clock.
//
// Interface: in_del[k] is Del at position q+k for the group's first position
// q; out_corr[k] is C at position q+k-300 of the group that entered
// LATENCY clocks earlier, i.e. the preamble start 300 samples before the
// newest symbol correlation. out_valid rises once the history spans a whole
// preamble. Timing: LATENCY = 2 clocks.
//
// From the system description: the add/subtract reconstruction and the
// parallelism of eight. This design's own choice: the register stages.
`timescale 1ns / 1ps
module preamble_correlator
  import rtls_pkg::*;
#(
  parameter int unsigned         N   = N_LANES,
  parameter int unsigned         L_SW = SW,
  parameter int unsigned         P_LEN = PRE_LEN,
  parameter logic [P_LEN-1:0]    P_CODE = PREAMBLE
) (
  input  logic          clk,
  input  logic          rst_n,
  input  del_t [N-1:0]  in_del,
  input  logic          in_valid,
  output corr_t [N-1:0] out_corr,
  output logic          out_valid
);

  localparam int unsigned SPAN = (P_LEN - 1) * L_SW;  // 300
  localparam int unsigned HIST = SPAN + N;

  del_t hist [HIST];   // hist[0] oldest
  logic [1:0] vpipe;

  always_ff @(posedge clk) begin
    if (in_valid) begin
      for (int i = 0; i < SPAN; i++) hist[i] <= hist[i+N];
      for (int k = 0; k < N; k++) hist[SPAN+k] <= in_del[k];
    end
  end

  always_ff @(posedge clk) begin
    for (int k = 0; k < N; k++) begin
      corr_t acc;
      acc = '0;
      for (int i = 0; i < P_LEN; i++) begin
        if (P_CODE[P_LEN-1-i]) acc = acc + CORR_W'(hist[k + i*L_SW]);
        else                   acc = acc - CORR_W'(hist[k + i*L_SW]);
      end
      out_corr[k] <= acc;
    end
  end

  // Groups needed before the history spans a whole preamble.
  localparam int unsigned FILL = (SPAN + N - 1) / N + 1;
  logic [$clog2(FILL+1)-1:0] fill;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vpipe <= '0;
      fill  <= '0;
    end else begin
      if (in_valid && fill != ($bits(fill))'(FILL)) fill <= fill + 1'b1;
      vpipe <= {vpipe[0], in_valid && (fill >= ($bits(fill))'(FILL - 1))};
    end
  end
  assign out_valid = vpipe[1];

endmodule
