// data_delay_line: shift register that re-aligns the raw ADC words.
//
// The raw 64-bit ADC words take a second path, next to the correlation
// path, through this shift register. Its length equals the latency of the
// detection (correlation, window and decision) plus a margin, so that when
// the detection fires, the word at the output is from a known number of
// words before the start of the detected sequence.
//
// Interface: in_data/in_valid enter every clock; out_data/out_valid are the
// same stream DEPTH clocks later. Timing: latency DEPTH clocks, throughput
// one word per clock.
//
// From the system description: a shift register on the second data path,
// sized to the correlation latency. This design's own choice: DEPTH is set
// by the instantiating module from the latencies of its blocks.
`timescale 1ns / 1ps
module data_delay_line #(
  parameter int unsigned W     = 64,
  parameter int unsigned DEPTH = 96
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] in_data,
  input  logic         in_valid,
  output logic [W-1:0] out_data,
  output logic         out_valid
);

  logic [W-1:0] sr [DEPTH];
  logic [DEPTH-1:0] vsr;

  always_ff @(posedge clk) begin
    sr[0] <= in_data;
    for (int i = 1; i < DEPTH; i++) sr[i] <= sr[i-1];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vsr <= '0;
    else        vsr <= {vsr[DEPTH-2:0], in_valid};
  end

  assign out_data  = sr[DEPTH-1];
  assign out_valid = vsr[DEPTH-1];

endmodule
