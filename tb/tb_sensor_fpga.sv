// tb_sensor_fpga: end-to-end test of the Sensor detection and capture path.
//
// A synthetic 1 GS/s sample stream holds small uniform noise and Tag
// sequences (15 on-off keyed symbols of 50 samples, a 2-sample pulse per 1
// symbol, preamble 1110010 then the Tag ID) at known positions. The stream
// is serialized onto eight data lanes and the FCLK lane, cut into raw 8-bit
// words at a bit offset, and fed to the block. The AXI-Stream output is
// collected with a random TREADY. Checks:
//   * every packet is 32 beats with TLAST on the last one only;
//   * its 255 data words equal the input stream exactly, starting 16 words
//     (128 samples) before the first pulse of a sent sequence, within one
//     word, and every sent sequence gives one packet (no false detection);
//   * TOA words differ by the sequence spacing in 8-sample units (+-1);
//   * mechanisms: bitslip lock, manual threshold, automatic threshold,
//     FIFO back-pressure (TREADY held low) and a packet dropped because the
//     FIFO had no room; each must happen at least once.
`timescale 1ns / 1ps
module tb_sensor_fpga;
  import rtls_pkg::*;

  localparam int NCYC    = 16000;
  localparam int SPACING = 600;       // clocks between sequences
  localparam int PRE     = 16;        // words before the first pulse
  localparam int RELOCK_CYC = 11000;  // the lane bit offset jumps here

  logic data_clk = 0, data_rst_n = 0, axis_aclk = 0, axis_aresetn = 0;
  logic [8:0][7:0] lane_raw;
  thr_t thr_manual;
  logic thr_auto_en;
  logic [511:0] m_axis_tdata;
  logic m_axis_tvalid, m_axis_tready, m_axis_tlast;
  logic [63:0] m_axis_tstrb;
  logic locked, slip_evt, trigger, pkt_drop, bind_tmstmp, stats_valid, wait_trigger, fifo_full;
  logic [2:0] slip, peak_lane;
  corr_t peak, corr_mean;
  thr_t thr_in_use, corr_std;
  logic [31:0] toa_count;

  sensor_fpga dut (.*);

  always #4 data_clk  = ~data_clk;
  always #5 axis_aclk = ~axis_aclk;

  int checks = 0, failures = 0;
  byte stream [];
  int  seq_pos [$];        // first pulse sample of each sequence
  int  seq_used [$];
  int  cyc = 0;
  int  offset = 5;
  int  n_slip = 0, n_trig = 0, n_drop = 0, n_stall = 0, n_auto_det = 0, n_man_det = 0;
  int  n_pkt = 0, n_bind = 0, n_relock_pkt = 0;
  logic [7:0] ids [4] = '{8'd85, 8'd135, 8'd1, 8'd200};

  task automatic fail(string s);
    failures++;
    if (failures < 10) $display("FAIL %s", s);
  endtask

  // ---------------- stream ----------------
  initial begin
    stream = new[(NCYC + 2000) * 8];
    foreach (stream[i]) stream[i] = byte'($urandom_range(0, 16)) - 8'sd8;
    for (int s = 0; s < (NCYC - 1000) / SPACING; s++) begin
      int base;
      logic [14:0] bits;
      base = (800 + s * SPACING) * 8 + int'($urandom_range(0, 49));
      bits = {7'b1110010, ids[s % 4]};
      for (int i = 0; i < 15; i++) if (bits[14 - i]) begin
        stream[base + 50 * i]     = 8'sd60;
        stream[base + 50 * i + 1] = 8'sd60;
      end
      seq_pos.push_back(base);
      seq_used.push_back(0);
    end
  end

  function automatic logic stream_bit(int lane, int p);
    if (p < 0) return 1'b0;
    if (lane == 8) return (p % 8) < 4;
    return stream[(p / 8) * 8 + lane][p % 8];
  endfunction

  always_ff @(posedge data_clk) begin
    cyc <= cyc + 1;
    for (int l = 0; l <= 8; l++)
      for (int i = 0; i < 8; i++) lane_raw[l][i] <= stream_bit(l, 8 * (cyc - 1) + offset + i);
  end

  // ---------------- monitors ----------------
  always @(posedge data_clk) if (data_rst_n) begin
    if (slip_evt) n_slip++;
    if (trigger) begin
      n_trig++;
      if (thr_auto_en) n_auto_det++; else n_man_det++;
    end
    if (pkt_drop) n_drop++;
    if (bind_tmstmp) n_bind++;
  end

  // ---------------- packet collection ----------------
  logic [63:0] pkt [256];
  int beat = 0;
  int last_toa = -1, last_seq = -1;
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
    // Which sequence? The data must equal the stream at start = 8 * m.
    for (int s = 0; s < seq_pos.size(); s++) begin
      for (int st = (seq_pos[s] / 8 - PRE - 1) * 8; st <= (seq_pos[s] / 8 - PRE + 1) * 8; st += 8) begin
        logic ok = 1'b1;
        if (st < 0) continue;
        for (int w = 1; w < 256 && ok; w++)
          for (int k = 0; k < 8; k++)
            if (pkt[w][8 * k +: 8] != stream[st + 8 * (w - 1) + k]) ok = 1'b0;
        if (ok) begin found = s; start = st; end
      end
    end
    checks++;
    if (found < 0) begin
      // Data taken while the lanes were re-locking is not checked.
      if (toa > RELOCK_CYC - 100 && toa < RELOCK_CYC + 300) begin n_relock_pkt++; return; end
      fail($sformatf("packet %0d (TOA %0d) matches no sequence", n_pkt, toa));
      return;
    end
    seq_used[found]++;
    checks++;
    if (seq_used[found] != 1) fail("sequence captured twice");
    if (last_seq >= 0) begin
      int dt;
      dt = toa - last_toa - (start - last_start) / 8;
      checks++;
      if (dt != 0) fail($sformatf("TOA %0d does not follow the data position (off by %0d)", toa, dt));
    end
    last_toa = toa; last_seq = found; last_start = start;
  endtask
  int last_start = 0;

  // ---------------- control ----------------
  initial begin
    thr_manual = 21'sd300; thr_auto_en = 0; m_axis_tready = 1;
    #40 data_rst_n = 1; axis_aresetn = 1;
    // Phase 1: manual threshold, random TREADY.
    fork
      forever begin
        @(negedge axis_aclk);
        if (!hold_ready) m_axis_tready = ($urandom_range(0, 3) != 0);
      end
    join_none
    wait (cyc == 5000);
    // Phase 2: TREADY held low for a while: FIFO fills, one packet dropped.
    hold_ready = 1; m_axis_tready = 0;
    wait (cyc == 7500);
    hold_ready = 0;
    // Phase 3: automatic threshold.
    thr_auto_en = 1;
    wait (cyc == RELOCK_CYC);
    // Phase 4: the lanes jump by one bit: the aligner must lock again.
    offset = 2;
    wait (cyc == NCYC);
    repeat (400) @(posedge axis_aclk);
    begin
      int missed = 0;
      for (int s = 0; s < seq_pos.size(); s++)
        if (seq_used[s] == 0 && !(seq_pos[s] / 8 > 5000 && seq_pos[s] / 8 < 7500) &&
            !(seq_pos[s] / 8 > RELOCK_CYC - 50 && seq_pos[s] / 8 < RELOCK_CYC + 100)) missed++;
      checks++;
      if (missed != 0) fail($sformatf("%0d sequences not captured", missed));
    end
    checks++;
    if (n_pkt != n_bind || n_pkt + n_drop > n_trig)
      fail($sformatf("%0d triggers, %0d packets written, %0d received, %0d drops", n_trig, n_bind, n_pkt, n_drop));
    checks += 5;
    if (n_slip == 0)     fail("no bitslip");
    if (n_man_det == 0)  fail("no detection with manual threshold");
    if (n_auto_det == 0) fail("no detection with automatic threshold");
    if (n_stall == 0)    fail("no back-pressure");
    if (n_drop == 0)     fail("no dropped packet");
    $display("relock packets %0d", n_relock_pkt);
    $display("sequences %0d packets %0d triggers %0d drops %0d slips %0d manual %0d auto %0d stalls %0d thr %0d",
             seq_pos.size(), n_pkt, n_trig, n_drop, n_slip, n_man_det, n_auto_det, n_stall, thr_in_use);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  logic hold_ready = 0;

  initial begin
    #1ms;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
