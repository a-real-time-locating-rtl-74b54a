// tag_pulse_gen: behavioural model of the Tag's 2 ns pulse generator.
//
// Behavioural model (not synthesizable logic): the circuit relies on gate
// and RC delays, which are modelled with delays. The 20 MHz clock is
// delayed by two cascaded inverters of about 1 ns each; the serial sequence
// bit, the shift-register load signal (inactive high) and the delayed clock
// are ANDed into the "sequence signal", which is high in the first half of
// every bit period whose symbol is 1. The pulse generator feeds the sequence
// signal to two inverters, U1 and U2; U2 is loaded by a capacitor that adds
// about 2 ns of delay. XOR U5 of the two inverter outputs is high for 2 ns
// after every edge of the sequence signal; AND U4 with the sequence signal
// keeps only the pulse after the rising edge, and inverter U3 drives the
// oscillator. drv is therefore normally high and low for 2 ns at the start
// of each bit period whose symbol is 1.
//
// Interface: clk (20 MHz), ser_out and load_n from the digital sequence
// generator; seq_sig is the sequence signal; drv the oscillator drive.
// Timing: drv falls about 2 ns (clock delay) after the rising clock edge of
// a 1 symbol and rises 2 ns later.
//
// From the system description: the two-inverter clock delay of about 2 ns,
// the three-input AND, the gates U1, U2, U5, U4, U3 and the 2 ns delay set
// by C1. This model's own choice: gate delays other than those two are
// taken as zero.
`timescale 1ns / 1ps
module tag_pulse_gen #(
  parameter realtime CLK_DLY = 2.0ns,   // two inverters, ~1 ns each
  parameter realtime C1_DLY  = 2.0ns    // extra delay of U2 loaded by C1
) (
  input  logic clk,
  input  logic ser_out,
  input  logic load_n,
  output logic seq_sig,
  output logic drv
);

  logic clk_d, u1, u2, u5, u4;

  assign #(CLK_DLY) clk_d = clk;
  assign seq_sig = ser_out & load_n & clk_d;
  assign u1 = ~seq_sig;
  assign #(C1_DLY) u2 = ~seq_sig;
  assign u5 = u1 ^ u2;
  assign u4 = u5 & seq_sig;
  assign drv = ~u4;

endmodule
