// tag_digital: digital board of the first Tag prototype.
//
// Generates the oscillator drive DRV: tag_srf_gen times the sequence
// repetition from the 20 MHz clock, tag_seq_gen shifts out the hardwired
// on-off keyed sequence (preamble 1110010 + Tag ID), one symbol per 50 ns,
// and the tag_pulse_gen model turns every 1 symbol into a 2 ns low pulse on
// DRV, which switches the 7 GHz oscillator on.
//
// Interface: clk is the 20 MHz reference clock, rst_n a power-on reset;
// sri, seq and len23 are the resistor-set configuration; drv drives the
// oscillator; tx_active, ser_out, seq_sig (the gated
// sequence signal) and sym_idx show the transmission for monitoring.
// Timing: a sequence of 15 (or 23) symbols starts every sri * 65536 + 1
// clocks.
//
// The three parts and their connections follow the description of the
// first Tag prototype; the configuration as ports instead of resistors and
// the monitor outputs are this design's choice.
`timescale 1ns / 1ps
module tag_digital (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [7:0]  sri,
  input  logic [23:0] seq,
  input  logic        len23,
  output logic        drv,
  output logic        tx_active,
  output logic        ser_out,
  output logic        seq_sig,
  output logic [4:0]  sym_idx
);

  logic       load_n, shift_en;

  tag_srf_gen u_srf (
    .clk, .rst_n, .sri, .len23,
    .load_n, .shift_en, .sym_idx
  );

  tag_seq_gen u_seq (
    .clk, .rst_n, .seq, .load_n, .shift_en, .ser_out
  );

  tag_pulse_gen u_pulse (
    .clk, .ser_out, .load_n, .seq_sig, .drv
  );

  assign tx_active = shift_en;

endmodule
