// adder_tree: pipelined binary tree of two-input adders.
//
// Sums N signed inputs in $clog2(N) levels, one register per level, as the
// symbol correlator requires (50 inputs give a depth of 6). Inputs are
// padded with zeros up to the next power of two. Every level uses the output
// width W_OUT, which must hold the full sum. Latency: $clog2(N) clocks; a
// new set of inputs is accepted every clock.
//
// The tree of two-input adders and its depth follow the system description;
// the register after every level is this design's choice.
`timescale 1ns / 1ps
module adder_tree #(
  parameter int unsigned N     = 50,
  parameter int unsigned W_IN  = 8,
  parameter int unsigned W_OUT = W_IN + $clog2(N)
) (
  input  logic                          clk,
  input  logic signed [N-1:0][W_IN-1:0] in,
  output logic signed [W_OUT-1:0]       sum
);

  localparam int unsigned L  = (N > 1) ? $clog2(N) : 1;
  localparam int unsigned NP = 1 << L;

  logic signed [W_OUT-1:0] lv [L+1][NP];

  always_comb begin
    for (int i = 0; i < NP; i++)
      lv[0][i] = (i < N) ? W_OUT'(signed'(in[i])) : '0;
  end

  for (genvar l = 1; l <= L; l++) begin : g_lvl
    always_ff @(posedge clk) begin
      for (int i = 0; i < (NP >> l); i++) lv[l][i] <= lv[l-1][2*i] + lv[l-1][2*i+1];
    end
  end

  assign sum = lv[L][0];

endmodule
