// tb_auto_threshold: self-checking test of the manual/automatic threshold.
//
// Checks that the manual threshold passes through, that the automatic one
// is not used before the 1024-result window has filled, and then, for
// several input distributions (offsets and spreads), that after the stream
// pauses the block settles to the reference values computed over the last
// 1024 inputs:
//   mean = floor(S / 1024), var = floor(Q / 1024) - mean^2,
//   std = floor(sqrt(var)), thr = mean + 8 * std.
// It also checks the switch back to manual mode.
`timescale 1ns / 1ps
module tb_auto_threshold;
  import rtls_pkg::*;

  logic clk = 0, rst_n = 0;
  corr_t [7:0] in_corr;
  logic in_valid, auto_en;
  thr_t thr_manual, thr, stdev;
  corr_t mean;
  logic stats_valid;
  int checks = 0, failures = 0;

  auto_threshold dut (.*);

  always #4 clk = ~clk;

  longint hist [$];

  function automatic longint isqrt(longint v);
    longint r = 0;
    while ((r + 1) * (r + 1) <= v) r++;
    return r;
  endfunction

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic feed(int groups, int off, int spread);
    for (int n = 0; n < groups; n++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 5) != 0);
      if (in_valid) for (int k = 0; k < 8; k++) begin
        int v;
        v = off + int'($urandom_range(0, 2 * spread)) - spread;
        in_corr[k] = corr_t'(v);
        hist.push_back(longint'(v));
      end
    end
    @(negedge clk) in_valid = 0;
  endtask

  task automatic settle_and_check();
    longint s = 0, q = 0, m, vr, sd, t;
    int n;
    repeat (60) @(negedge clk);
    n = hist.size();
    for (int i = n - 1024; i < n; i++) begin s += hist[i]; q += hist[i] * hist[i]; end
    m  = s >>> 10;
    vr = (q >>> 10) - m * m;
    if (vr < 0) vr = 0;
    sd = isqrt(vr);
    t  = m + 8 * sd;
    if (t > 1048575) t = 1048575;
    check("mean", longint'(mean), m);
    check("stdev", longint'(stdev), sd);
    check("thr", longint'(thr), t);
    $display("mean %0d std %0d thr %0d", m, sd, t);
  endtask

  initial begin
    in_valid = 0; auto_en = 0; thr_manual = 21'sd12345;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (3) @(negedge clk);
    check("manual", longint'(thr), 12345);
    auto_en = 1;
    feed(60, 0, 100);      // fewer than 128 groups: window not full yet
    repeat (40) @(negedge clk);
    check("not ready", longint'(stats_valid), 0);
    check("manual before fill", longint'(thr), 12345);
    feed(200, 0, 100);
    check("ready", longint'(stats_valid), 1);
    settle_and_check();
    feed(300, 500, 50);
    settle_and_check();
    feed(300, -2000, 3000);
    settle_and_check();
    feed(300, 0, 65535);    // full correlation range
    settle_and_check();
    feed(150, 20, 0);       // constant input, zero deviation
    settle_and_check();
    auto_en = 0; thr_manual = -21'sd77;
    repeat (2) @(negedge clk);
    check("manual again", longint'(thr), -77);
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
