// tb_lvds_frame_align: self-checking test of the LVDS frame alignment.
//
// Builds the serial bit stream of eight data lanes (sample k of frame f on
// lane k, LSB first) and of the FCLK lane (high for the first four bits of
// every frame), cuts it into 8-bit raw words at a chosen bit offset, and
// checks that the block locks, that every valid output frame holds the
// eight samples of one frame and that consecutive outputs are consecutive
// frames. The offset is changed while running to force a re-lock; the test
// runs all eight offsets. Sample 0 and 1 of frame f carry f itself, the
// others a hash of f, so any slip error shows.
`timescale 1ns / 1ps
module tb_lvds_frame_align;
  logic clk = 0, rst_n = 0;
  logic [8:0][7:0] lane_raw;
  logic [63:0] out_data;
  logic out_valid, locked, slip_evt;
  logic [2:0] slip;
  int checks = 0, failures = 0;
  int offset = 3;
  int cyc = 0;
  int last_f = -1;
  int slips = 0, relocks = 0;
  int chg_cyc = 0;   // an offset jump corrupts the frames around it

  lvds_frame_align dut (.*);

  always #4 clk = ~clk;

  function automatic logic [7:0] samp(int f, int k);
    if (k == 0) return f[7:0];
    if (k == 1) return f[15:8];
    return 8'((f * 37 + k * 101) ^ (f >> 3));
  endfunction

  function automatic logic stream_bit(int lane, int p);
    int f, b;
    f = p / 8;
    b = p % 8;
    if (lane == 8) return (b < 4);
    return samp(f, lane)[b];
  endfunction

  // Raw words at cycle c: stream bits 8c + offset .. 8c + offset + 7.
  always_ff @(posedge clk) begin
    cyc <= cyc + 1;
    for (int l = 0; l <= 8; l++)
      for (int i = 0; i < 8; i++) lane_raw[l][i] <= stream_bit(l, 8 * (cyc + 1) + offset + i);
  end

  always @(posedge clk) if (rst_n) begin
    if (slip_evt) slips++;
    if (out_valid && cyc > chg_cyc + 3) begin
      int f;
      logic ok;
      f  = {16'b0, out_data[15:8], out_data[7:0]};
      ok = 1'b1;
      for (int k = 2; k < 8; k++) if (out_data[8*k +: 8] != samp(f, k)) ok = 1'b0;
      if (last_f >= 0 && f != ((last_f + 1) & 16'hFFFF)) ok = 1'b0;
      checks++;
      if (!ok) begin
        failures++;
        if (failures < 5) $display("FAIL frame %0d (last %0d) data %h", f, last_f, out_data);
      end
      last_f = f;
    end else last_f = -1;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int o = 0; o < 8; o++) begin
      offset = (3 + o * 5) % 8;
      chg_cyc = cyc;
      @(posedge clk);
      // Lock must be reached within 8 slips * 2 clocks + LOCK_CNT + margin.
      repeat (40) @(posedge clk);
      checks++;
      if (!locked) begin failures++; $display("FAIL no lock at offset %0d", offset); end
      else relocks++;
      repeat (200) @(posedge clk);
    end
    checks++;
    if (slips == 0 || relocks != 8) begin failures++; $display("FAIL slips=%0d relocks=%0d", slips, relocks); end
    $display("slips=%0d relocks=%0d", slips, relocks);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
