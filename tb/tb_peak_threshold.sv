// tb_peak_threshold: self-checking test of the window maximum / threshold.
//
// Feeds noise-like correlation results with isolated large peaks, and long
// stretches where the threshold is below the noise so that the centre
// condition alone decides. A reference model keeps every input, and for each
// input group computes, over the 512-result window after that group, the
// window maximum, the maximum of the centre group (group 31 counted from the
// oldest) and its first position. Thresh must equal
//   (centre max == window max) && (centre max >= thr)
// exactly 11 clocks after the group entered, with peak and peak_lane
// matching. The threshold changes only during idle stretches. Counts of
// detections with and without peaks are checked to be non-zero.
`timescale 1ns / 1ps
module tb_peak_threshold;
  import rtls_pkg::*;
  localparam int LAT = 11;

  logic clk = 0, rst_n = 0;
  corr_t [7:0] in_corr;
  logic in_valid;
  thr_t thr;
  logic thresh;
  corr_t peak;
  logic [2:0] peak_lane;
  int checks = 0, failures = 0, cyc = 0;
  int n_det = 0, n_peak_det = 0;

  peak_threshold dut (.*);

  always #4 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  int hist [$];
  int exp_cyc [$], exp_t [$], exp_pk [$], exp_ln [$];

  task automatic model(int thr_v);
    int n, wmax, cmax, cln, base;
    n = hist.size();
    base = n - 512;
    wmax = hist[base];
    for (int i = 1; i < 512; i++) if (hist[base + i] > wmax) wmax = hist[base + i];
    cmax = hist[base + 31 * 8];
    cln  = 0;
    for (int k = 1; k < 8; k++) if (hist[base + 31 * 8 + k] > cmax) begin cmax = hist[base + 31 * 8 + k]; cln = k; end
    exp_cyc.push_back(cyc + LAT);
    exp_t.push_back((cmax == wmax) && (cmax >= thr_v));
    exp_pk.push_back(wmax);
    exp_ln.push_back(cln);
  endtask

  initial begin
    in_valid = 0;
    thr = 21'sd2000;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int phase = 0; phase < 4; phase++) begin
      @(negedge clk);
      in_valid = 0;
      repeat (LAT + 3) @(negedge clk);
      thr = (phase % 2) ? -21'sd100000 : 21'sd2000;
      repeat (LAT + 3) @(negedge clk);
      for (int n = 0; n < 1500; n++) begin
        @(negedge clk);
        if ($urandom_range(0, 15) == 0) in_valid = 0;
        else begin
          in_valid = 1;
          for (int k = 0; k < 8; k++) begin
            int v;
            v = int'($urandom_range(0, 600)) - 300;
            if ($urandom_range(0, 599) == 0) v = 3000 + int'($urandom_range(0, 20000));
            in_corr[k] = corr_t'(v);
            hist.push_back(v);
          end
          if (hist.size() >= 512) model(int'(thr));
        end
      end
    end
    @(negedge clk) in_valid = 0;
    repeat (20) @(posedge clk);
    checks += 3;
    if (exp_cyc.size() != 0) begin failures++; $display("FAIL outputs missing"); end
    if (n_det == 0) begin failures++; $display("FAIL no detection"); end
    if (n_peak_det == 0) begin failures++; $display("FAIL no peak detection"); end
    $display("detections=%0d above-2000=%0d", n_det, n_peak_det);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (exp_cyc.size() != 0 && exp_cyc[0] == cyc) begin
      int t, pk, ln;
      void'(exp_cyc.pop_front());
      t = exp_t.pop_front(); pk = exp_pk.pop_front(); ln = exp_ln.pop_front();
      checks++;
      if (thresh != t[0] || (t[0] && (int'(peak) != pk || int'(peak_lane) != ln))) begin
        failures++;
        if (failures < 5) $display("FAIL at %0d thresh %0b exp %0b peak %0d exp %0d lane %0d exp %0d",
                                   cyc, thresh, t[0], peak, pk, peak_lane, ln);
      end
      if (thresh) begin n_det++; if (pk >= 2000) n_peak_det++; end
    end else if (thresh) begin
      checks++;
      failures++;
      if (failures < 5) $display("FAIL spurious thresh at %0d", cyc);
    end
  end

  initial begin
    #200000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
