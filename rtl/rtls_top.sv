// rtls_top: the digital hardware of the UWB real-time locating system.
//
// A Tag sends, every few tens of milliseconds, a 15-symbol on-off keyed
// sequence of 2 ns, 7 GHz pulses (50 ns per symbol): the Barker-7 preamble
// 1110010 and an 8-bit Tag ID. Sensors with independent clocks sample the
// detected envelope at 1 GS/s, find the preamble and time-stamp it; a
// reference Tag at a known position lets the host compare the times of
// arrival between Sensors without a wired common clock.
//
// This top holds the two digital parts side by side: sensor_fpga, the
// Sensor's detection and capture logic, and tag_digital, the Tag's sequence
// and pulse generator. They meet only over the radio path (oscillator,
// antennas, RF receiver, ADC), which has no logic function, so each part
// keeps its own ports.
//
// Both parts and their roles follow the system description. Bringing the
// Sensor's status and configuration out as top-level ports (in the real
// system they go to the processor) is this design's choice.
//
// Lint reports axis_aresetn as used both as an asynchronous reset and
// synchronously: the synchronous use is the "disable iff" of the AXI-Stream
// assertion in axis_fifo_reader, not logic.
`timescale 1ns / 1ps
module rtls_top
  import rtls_pkg::*;
(
  // Sensor
  input  logic                  data_clk,
  input  logic                  data_rst_n,
  input  logic [N_LANES:0][7:0] lane_raw,
  input  thr_t                  thr_manual,
  input  logic                  thr_auto_en,
  input  logic                  axis_aclk,
  input  logic                  axis_aresetn,
  output logic [511:0]          m_axis_tdata,
  output logic                  m_axis_tvalid,
  input  logic                  m_axis_tready,
  output logic                  m_axis_tlast,
  output logic [63:0]           m_axis_tstrb,
  output logic                  sensor_locked,
  output logic                  sensor_slip,
  output logic                  sensor_trigger,
  output logic [2:0]            sensor_slip_pos,
  output corr_t                 sensor_peak,
  output logic [2:0]            sensor_peak_lane,
  output logic                  sensor_stats_valid,
  output thr_t                  sensor_thr,
  output corr_t                 sensor_mean,
  output thr_t                  sensor_std,
  output logic                  sensor_drop,
  output logic                  sensor_bind,
  output logic                  sensor_wait_trigger,
  output logic                  sensor_fifo_full,
  output logic [31:0]           sensor_toa_count,
  // Tag
  input  logic                  tag_clk,
  input  logic                  tag_rst_n,
  input  logic [7:0]            tag_sri,
  input  logic [23:0]           tag_seq,
  input  logic                  tag_len23,
  output logic                  tag_drv,
  output logic                  tag_tx_active,
  output logic                  tag_ser_out,
  output logic                  tag_seq_sig,
  output logic [4:0]            tag_sym_idx
);

  sensor_fpga u_sensor (
    .data_clk, .data_rst_n, .lane_raw, .thr_manual, .thr_auto_en,
    .axis_aclk, .axis_aresetn,
    .m_axis_tdata, .m_axis_tvalid, .m_axis_tready, .m_axis_tlast, .m_axis_tstrb,
    .locked(sensor_locked), .slip_evt(sensor_slip), .slip(sensor_slip_pos), .trigger(sensor_trigger),
    .peak(sensor_peak), .peak_lane(sensor_peak_lane), .stats_valid(sensor_stats_valid), .thr_in_use(sensor_thr), .corr_mean(sensor_mean),
    .corr_std(sensor_std), .pkt_drop(sensor_drop), .bind_tmstmp(sensor_bind),
    .wait_trigger(sensor_wait_trigger), .fifo_full(sensor_fifo_full),
    .toa_count(sensor_toa_count)
  );

  tag_digital u_tag (
    .clk(tag_clk), .rst_n(tag_rst_n), .sri(tag_sri), .seq(tag_seq),
    .len23(tag_len23), .drv(tag_drv), .tx_active(tag_tx_active),
    .ser_out(tag_ser_out), .seq_sig(tag_seq_sig), .sym_idx(tag_sym_idx)
  );

endmodule
