// rtls_pkg: types and constants shared by the Sensor FPGA datapath.
//
// The Sensor digitises the UWB receiver output at 1 GS/s with 8-bit signed
// samples and processes eight samples per 125 MHz clock. One Tag symbol lasts
// 50 samples (50 ns at 1 GS/s) and the common preamble is the on-off keyed
// Barker-7 code 1110010. These numbers come from the system description; the
// internal word widths below are this design's choice, sized so that no sum
// can overflow.
`timescale 1ns / 1ps
package rtls_pkg;

  localparam int unsigned N_LANES  = 8;    // samples per 125 MHz clock
  localparam int unsigned SAMPLE_W = 8;    // ADC resolution
  localparam int unsigned SW       = 50;   // symbol length in samples
  localparam int unsigned PRE_LEN  = 7;    // preamble symbols

  // Symbol correlation: sum of up to 50 samples -> 8 + 6 bits.
  localparam int unsigned DEL_W  = SAMPLE_W + $clog2(SW);
  // Preamble correlation: signed sum of 7 symbol correlations -> +3 bits.
  localparam int unsigned CORR_W = DEL_W + $clog2(PRE_LEN);
  // Threshold: average + k * standard deviation needs a few more bits.
  localparam int unsigned THR_W  = CORR_W + 4;

  typedef logic signed [SAMPLE_W-1:0] sample_t;
  typedef logic signed [DEL_W-1:0]    del_t;
  typedef logic signed [CORR_W-1:0]   corr_t;
  typedef logic signed [THR_W-1:0]    thr_t;

  // Preamble, first transmitted symbol in the MSB.
  localparam logic [PRE_LEN-1:0] PREAMBLE = 7'b1110010;

endpackage
