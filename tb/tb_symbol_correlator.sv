// tb_symbol_correlator: self-checking test of the symbol correlator.
//
// Drives random signed samples, eight per clock, with occasional idle
// clocks, into two instances: one with the default mask (2-sample pulse in
// the middle of the 50-sample symbol) and one with a random 50-bit mask.
// For every complete window the expected Del values are computed directly
// from the stored samples and must appear exactly LATENCY = 7 clocks later.
`timescale 1ns / 1ps
module tb_symbol_correlator;
  import rtls_pkg::*;
  localparam logic [49:0] MASK2 = 50'h2_D3A5_96C3_0F1E;
  localparam logic [49:0] MASK1 = 50'b11 << 24;
  localparam int LAT = 7;

  logic clk = 0, rst_n = 0;
  logic [63:0] in_data;
  logic in_valid;
  del_t [7:0] d1, d2;
  logic v1, v2;
  int checks = 0, failures = 0, cyc = 0;

  symbol_correlator dut1 (.clk, .rst_n, .in_data, .in_valid, .out_del(d1), .out_valid(v1));
  symbol_correlator #(.MASK(MASK2)) dut2 (.clk, .rst_n, .in_data, .in_valid, .out_del(d2), .out_valid(v2));

  always #4 clk = ~clk;

  sample_t hist [$];          // all samples sent
  int      exp_cyc [$];       // cycle at which an output group is due
  int      exp_base [$];      // index of the first window start

  function automatic int del_ref(int p, logic [49:0] m);
    int s = 0;
    for (int j = 0; j < 50; j++) if (m[j]) s += int'(hist[p + j]);
    return s;
  endfunction

  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    in_valid = 0;
    in_data  = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      if ($urandom_range(0, 9) == 0) begin
        in_valid = 0;
      end else begin
        in_valid = 1;
        for (int k = 0; k < 8; k++) begin
          sample_t s;
          s = sample_t'($urandom);
          if (n % 500 < 20) s = (k % 2) ? 8'sd127 : -8'sd128;   // extremes
          in_data[8*k +: 8] = s;
          hist.push_back(s);
        end
        if (hist.size() >= 57) begin
          exp_cyc.push_back(cyc + LAT);
          exp_base.push_back(hist.size() - 57);
        end
      end
    end
    @(negedge clk) in_valid = 0;
    repeat (20) @(posedge clk);
    checks++;
    if (exp_cyc.size() != 0) begin failures++; $display("FAIL %0d outputs missing", exp_cyc.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (v1 || v2) begin
      checks++;
      if (exp_cyc.size() == 0 || exp_cyc[0] != cyc || !v1 || !v2) begin
        failures++;
        if (failures < 5) $display("FAIL unexpected output at %0d", cyc);
        if (exp_cyc.size() != 0 && exp_cyc[0] <= cyc) begin void'(exp_cyc.pop_front()); void'(exp_base.pop_front()); end
      end else begin
        int b;
        b = exp_base.pop_front();
        void'(exp_cyc.pop_front());
        for (int k = 0; k < 8; k++) begin
          checks += 2;
          if (int'(d1[k]) != del_ref(b + k, MASK1)) begin failures++; if (failures < 5) $display("FAIL d1[%0d] %0d exp %0d", k, d1[k], del_ref(b + k, MASK1)); end
          if (int'(d2[k]) != del_ref(b + k, MASK2)) begin failures++; if (failures < 5) $display("FAIL d2[%0d] %0d exp %0d", k, d2[k], del_ref(b + k, MASK2)); end
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
