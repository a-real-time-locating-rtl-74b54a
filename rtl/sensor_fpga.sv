// sensor_fpga: preamble detector and data capture of the UWB Sensor.
//
// The Sensor samples the UWB receiver output at 1 GS/s and must find, in a
// continuous stream, the 15-symbol on-off keyed sequences sent by the Tags,
// time-stamp them and hand 2048-sample snapshots to the processor. This
// block is the logic between the deserialized ADC lanes and the DMA, all at
// eight samples per 125 MHz clock:
//
//   lane words -> lvds_frame_align -> symbol_correlator (Del, 50-sample mask)
//     -> preamble_correlator (+/- Del spaced 50 samples, Barker-7 on/off)
//     -> peak_threshold (512-result window, max tree, centre + threshold)
//        with auto_threshold (mean + K * std, or manual)
//     -> TRIGGER -> fifo_write_ctrl (TOA word, then 255 data words)
//   lane words -> data_delay_line ---------------^
//   fifo_write_ctrl -> async_fifo_w2r (64 -> 512 bits) -> axis_fifo_reader
//
// The delay line is DELAY clocks long, the sum of the detection latency and
// PRE_WORDS words of margin, so that every packet starts PRE_WORDS words
// (PRE_WORDS * 8 samples) before the first pulse of the detected preamble,
// to within one word. A packet is one TOA word (TOA in bits 31:0, unit
// 8 ns) followed by 255 data words, sample 0 of each word in bits 7:0; on
// the stream it is 32 words of 512 bits with TLAST on the last.
//
// A trigger is taken only once the delay line holds valid data (after
// DELAY clocks from reset). wait_trigger and fifo_full are status flags of
// the write process and of the FIFO.
//
// Clocks: data_clk (125 MHz, from the LVDS receiver) for everything up to
// the FIFO write port; axis_aclk for the FIFO read side and the stream.
//
// From the system description: the chain of blocks, the rates, the 512
// window, the packet size and the TOA-first order. This design's own
// choices: PRE_WORDS, the TOA word format and the configuration ports,
// which a processor would drive through its GPIO peripheral.
//
// Lint reports axis_aresetn as used both as an asynchronous reset and
// synchronously: the synchronous use is the "disable iff" of the AXI-Stream
// assertion in axis_fifo_reader, not logic.
`timescale 1ns / 1ps
module sensor_fpga
  import rtls_pkg::*;
#(
  parameter int unsigned WIN       = 512,
  parameter int unsigned LOG2_AVG  = 10,
  parameter int unsigned K_STD     = 8,
  parameter int unsigned PKT_WORDS64 = 256,
  parameter int unsigned FIFO_DEPTH_R = 64,
  parameter int unsigned PRE_WORDS = 16
) (
  input  logic                 data_clk,
  input  logic                 data_rst_n,
  input  logic [N_LANES:0][7:0] lane_raw,
  input  thr_t                 thr_manual,
  input  logic                 thr_auto_en,

  input  logic                 axis_aclk,
  input  logic                 axis_aresetn,
  output logic [511:0]         m_axis_tdata,
  output logic                 m_axis_tvalid,
  input  logic                 m_axis_tready,
  output logic                 m_axis_tlast,
  output logic [63:0]          m_axis_tstrb,

  output logic                 locked,
  output logic                 slip_evt,
  output logic [2:0]           slip,
  output logic                 trigger,
  output corr_t                peak,
  output logic [2:0]           peak_lane,
  output logic                 stats_valid,
  output thr_t                 thr_in_use,
  output corr_t                corr_mean,
  output thr_t                 corr_std,
  output logic                 pkt_drop,
  output logic                 bind_tmstmp,
  output logic                 wait_trigger,
  output logic                 fifo_full,
  output logic [31:0]          toa_count
);

  // Latencies of the detection path, in clocks (see each block).
  localparam int unsigned L_SYM  = 1 + $clog2(SW);
  localparam int unsigned L_PRE  = 2;
  localparam int unsigned L_PEAK = 1 + WIN / N_LANES / 2 + $clog2(WIN) + 1;
  // Groups between the first pulse and the newest sample of its preamble
  // correlation (the mask pulse sits SW/2-1 samples into the symbol).
  localparam int unsigned L_SPAN = ((PRE_LEN - 1) * SW + SW - 1 - (SW/2 - 1) + N_LANES - 1) / N_LANES;
  // The first data word is written two clocks after the trigger.
  localparam int unsigned DELAY  = L_SYM + L_PRE + L_PEAK + L_SPAN + 2 + PRE_WORDS;

  logic [8*N_LANES-1:0] adc_data;
  logic                 adc_valid;

  lvds_frame_align u_align (
    .clk(data_clk), .rst_n(data_rst_n), .lane_raw,
    .out_data(adc_data), .out_valid(adc_valid), .locked, .slip, .slip_evt
  );

  del_t [N_LANES-1:0] del;
  logic               del_valid;
  symbol_correlator u_sym (
    .clk(data_clk), .rst_n(data_rst_n), .in_data(adc_data), .in_valid(adc_valid),
    .out_del(del), .out_valid(del_valid)
  );

  corr_t [N_LANES-1:0] corr;
  logic                corr_valid;
  preamble_correlator u_pre (
    .clk(data_clk), .rst_n(data_rst_n), .in_del(del), .in_valid(del_valid),
    .out_corr(corr), .out_valid(corr_valid)
  );

  auto_threshold #(.LOG2_N(LOG2_AVG), .K(K_STD)) u_thr (
    .clk(data_clk), .rst_n(data_rst_n), .in_corr(corr), .in_valid(corr_valid),
    .auto_en(thr_auto_en), .thr_manual, .thr(thr_in_use),
    .mean(corr_mean), .stdev(corr_std), .stats_valid
  );

  peak_threshold #(.WIN(WIN)) u_peak (
    .clk(data_clk), .rst_n(data_rst_n), .in_corr(corr), .in_valid(corr_valid),
    .thr(thr_in_use), .thresh(trigger), .peak, .peak_lane
  );

  logic [63:0] dly_data;
  logic        dly_valid;
  data_delay_line #(.W(64), .DEPTH(DELAY)) u_dly (
    .clk(data_clk), .rst_n(data_rst_n), .in_data(adc_data), .in_valid(adc_valid),
    .out_data(dly_data), .out_valid(dly_valid)
  );

  logic        fifo_wren, rd_empty, rd_en;
  logic [63:0] fifo_din;
  logic [15:0] wr_free;
  logic [511:0] rd_data;

  fifo_write_ctrl #(.PKT_WORDS(PKT_WORDS64)) u_wr (
    .clk(data_clk), .rst_n(data_rst_n), .trigger(trigger & dly_valid), .in_data(dly_data),
    .wr_free, .fifo_wren, .fifo_din, .wait_trigger, .bind_tmstmp,
    .drop(pkt_drop), .toa_count
  );

  async_fifo_w2r #(.DEPTH_R(FIFO_DEPTH_R)) u_fifo (
    .wr_clk(data_clk), .wr_rst_n(data_rst_n), .wr_en(fifo_wren), .wr_data(fifo_din),
    .wr_free, .wr_full(fifo_full),
    .rd_clk(axis_aclk), .rd_rst_n(axis_aresetn), .rd_en, .rd_data, .rd_empty
  );

  axis_fifo_reader #(.PKT_WORDS(PKT_WORDS64 / 8)) u_rd (
    .aclk(axis_aclk), .aresetn(axis_aresetn), .rd_empty, .rd_en, .rd_data,
    .m_axis_tdata, .m_axis_tvalid, .m_axis_tready, .m_axis_tlast, .m_axis_tstrb
  );

endmodule
