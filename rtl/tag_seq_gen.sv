// tag_seq_gen: hardwired Tag sequence, parallel in, serial out.
//
// Three cascaded 8-bit shift registers (24 bits) are loaded in parallel
// with the Tag sequence set by resistors, first symbol in bit 23: the 7-bit
// preamble 1110010 followed by the 8-bit Tag ID (and 8 more payload bits for
// a 23-symbol sequence). While shift_en is high the register shifts one
// position per 20 MHz clock, filling with zeros, so each symbol is on the
// serial output for one 50 ns bit period. The serial output is qualified
// with shift_en so no symbol is sent outside the transmission.
//
// Interface: seq is the hardwired sequence; load_n (active low) and shift_en
// come from tag_srf_gen; ser_out is the symbol of the current bit period.
// Timing: ser_out shows symbol 0 in the clock after load_n is low.
//
// From the system description: three cascaded shift registers loaded in
// parallel from resistors, serial output of the last one. This design's own
// choice: the bit order (first symbol in the MSB).
`timescale 1ns / 1ps
module tag_seq_gen #(
  parameter int unsigned SEQ_W = 24
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [SEQ_W-1:0] seq,
  input  logic             load_n,
  input  logic             shift_en,
  output logic             ser_out
);

  logic [SEQ_W-1:0] sr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        sr <= '0;
    else if (!load_n)  sr <= seq;
    else if (shift_en) sr <= {sr[SEQ_W-2:0], 1'b0};
  end

  assign ser_out = sr[SEQ_W-1] & shift_en;

endmodule
