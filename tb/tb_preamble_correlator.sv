// tb_preamble_correlator: self-checking test of the preamble correlator.
//
// Drives random symbol correlation values, eight per clock, with idle
// clocks in between, and checks every output group against
//   C[p] = sum_i (+1 if preamble bit i is 1, else -1) * Del[p + 50 i]
// with preamble 1110010 (first symbol first), computed from the stored
// inputs, at exactly LATENCY = 2 clocks after the group that completes it.
`timescale 1ns / 1ps
module tb_preamble_correlator;
  import rtls_pkg::*;
  localparam int LAT = 2;
  localparam int SIGN [7] = '{1, 1, 1, -1, -1, 1, -1};

  logic clk = 0, rst_n = 0;
  del_t [7:0] in_del;
  logic in_valid;
  corr_t [7:0] out_corr;
  logic out_valid;
  int checks = 0, failures = 0, cyc = 0;

  preamble_correlator dut (.*);

  always #4 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  int hist [$];
  int exp_cyc [$];
  int exp_base [$];

  function automatic int c_ref(int p);
    int s = 0;
    for (int i = 0; i < 7; i++) s += SIGN[i] * hist[p + 50 * i];
    return s;
  endfunction

  initial begin
    in_valid = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      if ($urandom_range(0, 7) == 0) in_valid = 0;
      else begin
        in_valid = 1;
        for (int k = 0; k < 8; k++) begin
          int v;
          v = int'($urandom_range(0, 16383)) - 8192;
          if (n % 700 < 40) v = (k % 3 == 0) ? -8192 : 8191;
          in_del[k] = del_t'(v);
          hist.push_back(v);
        end
        if (hist.size() >= 308) begin
          exp_cyc.push_back(cyc + LAT);
          exp_base.push_back(hist.size() - 308);
        end
      end
    end
    @(negedge clk) in_valid = 0;
    repeat (10) @(posedge clk);
    checks++;
    if (exp_cyc.size() != 0) begin failures++; $display("FAIL outputs missing"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (out_valid) begin
      checks++;
      if (exp_cyc.size() == 0 || exp_cyc[0] != cyc) begin
        failures++;
        if (failures < 5) $display("FAIL unexpected output at %0d", cyc);
        if (exp_cyc.size() != 0 && exp_cyc[0] <= cyc) begin void'(exp_cyc.pop_front()); void'(exp_base.pop_front()); end
      end else begin
        int b;
        b = exp_base.pop_front();
        void'(exp_cyc.pop_front());
        for (int k = 0; k < 8; k++) begin
          checks++;
          if (int'(out_corr[k]) != c_ref(b + k)) begin
            failures++;
            if (failures < 5) $display("FAIL corr[%0d] %0d exp %0d", k, out_corr[k], c_ref(b + k));
          end
        end
      end
    end else if (exp_cyc.size() != 0 && exp_cyc[0] == cyc) begin
      failures++;
      $display("FAIL missing output at %0d", cyc);
      void'(exp_cyc.pop_front()); void'(exp_base.pop_front());
    end
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
