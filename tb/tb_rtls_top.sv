// tb_rtls_top: end-to-end test of the whole system at its default sizes.
//
// The Tag part transmits and the Sensor part receives it. A simple channel
// model sits between them in this testbench: every falling edge of the Tag
// pulse-generator output (tag_drv, one 2 ns UWB pulse) puts a two-sample
// pulse of amplitude 60 into a 1 GS/s sample stream, CH_DELAY samples
// later; every other sample is deterministic pseudo-random noise in
// [-8, 8], a function of the sample index only. The stream is serialized
// onto the eight LVDS data lanes and the FCLK lane at a bit offset, as the
// ADC would send it. The Tag runs from its own 20 MHz clock with SRI = 1,
// i.e. one sequence every 65537 clocks (3.277 ms); the Sensor runs at
// 125 MHz; its AXI-Stream side runs from a second 125 MHz clock with its
// own phase, as the write and read clocks of the system are separate
// clocks of equal frequency.
//
// Scenario (one Tag sequence per phase):
//   1. 15-symbol sequence, manual threshold: detected and captured.
//   2. 23-symbol sequence, automatic threshold (mean + 8 std).
//   3. TREADY held low: two packets wait in the FIFO, the third is dropped
//      because the FIFO has no room for a whole packet.
//   4. TREADY released: the two waiting packets arrive.
// Checks: each packet is 32 beats with TLAST on the last; its 255 data
// words equal the sample stream starting 16 words before the first pulse
// of a transmitted sequence (within one word); the TOA words of successive
// packets differ by exactly the distance of their data in the stream;
// the Tag period seen by the Sensor is 65537 * 50 ns; every transmission is
// captured or (in phase 3) dropped. Each mechanism (bitslip lock,
// 15- and 23-symbol transmission, manual and automatic detection,
// back-pressure, drop) is counted and must happen at least once.
`timescale 1ns / 1ps
module tb_rtls_top;
  import rtls_pkg::*;

  localparam int CH_DELAY = 100;      // samples from drv edge to ADC sample
  localparam int PRE      = 16;       // words of the packet before the pulse
  localparam int OFFSET   = 3;        // LVDS bit offset
  localparam real TAG_PERIOD_NS = 65537.0 * 50.0;

  logic data_clk = 0, data_rst_n = 0, axis_aclk = 0, axis_aresetn = 0;
  logic tag_clk = 0, tag_rst_n = 0;
  logic [N_LANES:0][7:0] lane_raw = '0;
  thr_t thr_manual;
  logic thr_auto_en;
  logic [511:0] m_axis_tdata;
  logic m_axis_tvalid, m_axis_tready, m_axis_tlast;
  logic [63:0] m_axis_tstrb;
  logic sensor_locked, sensor_slip, sensor_trigger, sensor_stats_valid;
  logic sensor_drop, sensor_bind, sensor_wait_trigger, sensor_fifo_full;
  logic [2:0] sensor_slip_pos, sensor_peak_lane;
  corr_t sensor_peak, sensor_mean;
  thr_t sensor_thr, sensor_std;
  logic [31:0] sensor_toa_count;
  logic [7:0] tag_sri;
  logic [23:0] tag_seq;
  logic tag_len23;
  logic tag_drv, tag_tx_active, tag_ser_out, tag_seq_sig;
  logic [4:0] tag_sym_idx;

  rtls_top dut (.*);

  always #4  data_clk  = ~data_clk;
  initial begin
    #1.3;
    forever #4 axis_aclk = ~axis_aclk;   // 125 MHz, own phase
  end
  always #25 tag_clk   = ~tag_clk;

  int checks = 0, failures = 0;
  task automatic fail(string s);
    failures++;
    if (failures < 10) $display("FAIL %s", s);
  endtask

  // ---------------- channel model ----------------
  bit pulse [int];
  int tx_first [$];             // first pulse sample of each transmission
  int tx_len [$];
  int tx_pulses = 0, in_tx = 0;
  int n_tx15 = 0, n_tx23 = 0;

  always @(negedge tag_drv) begin
    int s;
    s = int'($floor($realtime)) + CH_DELAY;
    pulse[s] = 1'b1;
    pulse[s + 1] = 1'b1;
    if (tx_pulses == 0) tx_first.push_back(s);
    tx_pulses++;
  end
  always @(posedge tag_tx_active) begin
    tx_pulses = 0;
    tx_len.push_back(tag_len23 ? 23 : 15);
    if (tag_len23) n_tx23++; else n_tx15++;
  end

  function automatic byte sample(int s);
    logic [31:0] x;
    if (pulse.exists(s)) return 8'sd60;
    x = 32'(s) * 32'h9E37_79B1;
    x = x ^ (x >> 15);
    return byte'((x >> 8) % 17) - 8'sd8;
  endfunction

  // Bit p of the serial lanes; sample index (p / 8) * 8 + lane, LSB first.
  function automatic logic lane_bit(int lane, int p);
    byte v;
    if (lane == N_LANES) return (p % 8) < 4;
    v = sample((p / 8) * 8 + lane);
    return v[p % 8];
  endfunction

  int cyc = 0;
  always_ff @(posedge data_clk) begin
    cyc <= cyc + 1;
    for (int l = 0; l <= N_LANES; l++)
      for (int i = 0; i < 8; i++) lane_raw[l][i] <= lane_bit(l, 8 * (cyc - 1) + OFFSET + i);
  end

  // ---------------- monitors ----------------
  int n_slip = 0, n_trig = 0, n_man = 0, n_auto = 0, n_drop = 0, n_bind = 0, n_stall = 0;
  always @(posedge data_clk) if (data_rst_n) begin
    if (sensor_slip) n_slip++;
    if (sensor_trigger) begin
      n_trig++;
      if (thr_auto_en) n_auto++; else n_man++;
    end
    if (sensor_drop) n_drop++;
    if (sensor_bind) n_bind++;
  end

  logic [63:0] pkt [256];
  int beat = 0, n_pkt = 0;
  int tx_used [int];
  int last_toa = -1, last_start = 0, last_tx = -1;
  always @(posedge axis_aclk) if (axis_aresetn) begin
    if (m_axis_tvalid && !m_axis_tready) n_stall++;
    if (m_axis_tvalid && m_axis_tready) begin
      checks++;
      if (m_axis_tstrb != '1) fail("tstrb");
      if (m_axis_tlast != (beat == 31)) fail($sformatf("tlast at beat %0d", beat));
      for (int w = 0; w < 8; w++) pkt[beat * 8 + w] = m_axis_tdata[64 * w +: 64];
      beat = (beat + 1) % 32;
      if (beat == 0) check_packet();
    end
  end

  task automatic check_packet();
    int found = -1, start = -1, toa;
    n_pkt++;
    toa = int'(pkt[0][31:0]);
    for (int j = 0; j < tx_first.size(); j++)
      for (int st = (tx_first[j] / 8 - PRE - 1) * 8; st <= (tx_first[j] / 8 - PRE + 1) * 8; st += 8) begin
        logic ok = 1'b1;
        for (int w = 1; w < 256 && ok; w++)
          for (int k = 0; k < 8; k++)
            if (pkt[w][8 * k +: 8] != sample(st + 8 * (w - 1) + k)) ok = 1'b0;
        if (ok) begin found = j; start = st; end
      end
    checks++;
    if (found < 0) begin
      fail($sformatf("packet %0d (TOA %0d) matches no transmission", n_pkt, toa));
      return;
    end
    $display("packet %0d: transmission %0d (%0d symbols), TOA %0d", n_pkt, found, tx_len[found], toa);
    checks++;
    if (tx_used.exists(found)) fail("transmission captured twice");
    tx_used[found] = 1;
    if (last_tx >= 0) begin
      real dt_tag;
      checks += 2;
      if ((toa - last_toa) * 8 != start - last_start)
        fail($sformatf("TOA difference %0d does not match the data (%0d samples)", toa - last_toa, start - last_start));
      dt_tag = real'(tx_first[found] - tx_first[last_tx]) / real'(found - last_tx);
      if (dt_tag < TAG_PERIOD_NS - 2.0 || dt_tag > TAG_PERIOD_NS + 2.0)
        fail($sformatf("Tag period seen by the Sensor %0.1f ns", dt_tag));
    end
    last_toa = toa; last_start = start; last_tx = found;
  endtask

  // ---------------- scenario ----------------
  logic hold_ready = 0;
  initial begin
    fork
      forever begin
        @(negedge axis_aclk);
        m_axis_tready = hold_ready ? 1'b0 : ($urandom_range(0, 3) != 0);
      end
    join_none
    thr_manual = 21'sd300; thr_auto_en = 0;
    tag_sri = 8'd1; tag_len23 = 0;
    tag_seq = {7'b1110010, 8'd2, 9'd0};
    #100 data_rst_n = 1; axis_aresetn = 1; tag_rst_n = 1;
    // 1: 15 symbols, manual threshold.
    @(negedge tag_tx_active);
    checks++;
    if (!sensor_locked) fail("LVDS lanes not locked");
    tag_len23 = 1; tag_seq = {7'b1110010, 8'd4, 8'd1, 1'b0};
    wait (n_pkt == 1);
    // 2: 23 symbols, automatic threshold.
    checks++;
    if (!sensor_stats_valid) fail("no noise statistics");
    thr_auto_en = 1;
    @(negedge tag_tx_active);
    tag_len23 = 0; tag_seq = {7'b1110010, 8'd1, 9'd0};
    wait (n_pkt == 2);
    // 3: back-pressure over three transmissions.
    hold_ready = 1;
    repeat (3) @(negedge tag_tx_active);
    #20us;
    // 4: release.
    hold_ready = 0;
    wait (n_pkt == 4);
    #10us;
    checks++;
    if (tx_used.size() + n_drop != tx_first.size())
      fail($sformatf("%0d transmissions, %0d captured, %0d dropped", tx_first.size(), tx_used.size(), n_drop));
    checks++;
    if (n_bind != n_pkt) fail($sformatf("%0d packets written, %0d received", n_bind, n_pkt));
    checks += 7;
    if (n_slip == 0) fail("no bitslip");
    if (n_tx15 == 0) fail("no 15-symbol transmission");
    if (n_tx23 == 0) fail("no 23-symbol transmission");
    if (n_man == 0)  fail("no detection with manual threshold");
    if (n_auto == 0) fail("no detection with automatic threshold");
    if (n_stall == 0) fail("no back-pressure");
    if (n_drop == 0) fail("no dropped packet");
    $display("transmissions %0d (15: %0d, 23: %0d) packets %0d drops %0d triggers %0d (manual %0d, auto %0d) slips %0d stalls %0d thr %0d",
             tx_first.size(), n_tx15, n_tx23, n_pkt, n_drop, n_trig, n_man, n_auto, n_slip, n_stall, sensor_thr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #25ms;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
