// tb_tag_srf_gen: self-checking test of the Tag repetition timing.
//
// For SRI = 1 and SRI = 2 it measures the distance between load pulses,
// which must be SRI * 65536 + 1 clocks, checks that load_n is low for
// exactly one clock, and that shift_en is high for exactly 15 clocks (or 23
// with len23) starting the clock after the load, with sym_idx counting
// 0, 1, 2, ... meanwhile. A last phase runs the operating point of the
// deployed system, SRI = 15: two periods of 983041 clocks (49.15 ms, about
// 20 sequences per second) are measured in the same way.
`timescale 1ns / 1ps
module tb_tag_srf_gen;
  logic clk = 0, rst_n = 0;
  logic [7:0] sri;
  logic len23;
  logic load_n, shift_en;
  logic [4:0] sym_idx;
  int checks = 0, failures = 0, cyc = 0;
  int last_load = -1, run_len = 0, loads = 0;
  int exp_len;
  int sri_15_periods = 0;
  logic skip_period = 0;   // the period in which SRI changed is not checked

  tag_srf_gen dut (.*);

  always #25 clk = ~clk;   // 20 MHz

  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    if (!load_n) begin
      if (last_load >= 0 && !skip_period) begin
        checks++;
        if (sri == 8'd15) sri_15_periods++;
        if (cyc - last_load != int'(sri) * 65536 + 1) begin
          failures++;
          $display("FAIL period %0d for sri %0d", cyc - last_load, sri);
        end
      end
      last_load = cyc;
      skip_period = 0;
      loads++;
    end
    if (shift_en) begin
      checks++;
      if (int'(sym_idx) != run_len || cyc - last_load != run_len + 1) begin
        failures++;
        if (failures < 5) $display("FAIL sym_idx %0d run %0d", sym_idx, run_len);
      end
      run_len++;
    end else if (run_len != 0) begin
      checks++;
      if (run_len != exp_len) begin failures++; $display("FAIL sequence length %0d, expected %0d", run_len, exp_len); end
      run_len = 0;
    end
  end

  always @(posedge clk) if (rst_n && !load_n) begin
    @(posedge clk);
    checks++;
    if (!load_n) begin failures++; $display("FAIL load longer than one clock"); end
  end

  initial begin
    sri = 8'd1; len23 = 0; exp_len = 15;
    #100 rst_n = 1;
    wait (loads == 3);
    @(negedge clk);
    len23 = 1; exp_len = 23;
    wait (loads == 5);
    @(negedge clk);
    sri = 8'd2;
    skip_period = 1;
    wait (loads == 8);
    // 20 Hz operating point.
    @(negedge clk);
    sri = 8'd15;
    skip_period = 1;
    wait (loads == 11);
    checks++;
    if (sri_15_periods != 2) begin failures++; $display("FAIL %0d periods of SRI 15 measured", sri_15_periods); end
    repeat (30) @(posedge clk);
    $display("loads %0d", loads);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200ms;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
