// tb_tag_pulse_gen: self-checking test of the 2 ns pulse generator model.
//
// Drives a 20 MHz clock and a serial symbol pattern that changes on the
// rising clock edge, with load_n high, and a stretch with load_n low. Every
// falling edge of drv is timed against the last rising clock edge (about
// 2 ns, the clock delay) and every low pulse must last about 2 ns. The
// number of pulses must equal the number of 1 symbols sent with load_n high.
`timescale 1ns / 1ps
module tb_tag_pulse_gen;
  logic clk = 0, ser_out = 0, load_n = 1;
  logic seq_sig, drv;
  int checks = 0, failures = 0;
  int ones = 0, pulses = 0;
  realtime t_clk = 0, t_fall = 0;

  tag_pulse_gen dut (.*);

  always #25 clk = ~clk;

  always @(posedge clk) t_clk = $realtime;
  always @(negedge drv) begin
    t_fall = $realtime;
    checks++;
    if (t_fall - t_clk < 1.5 || t_fall - t_clk > 2.5) begin
      failures++; $display("FAIL pulse starts %0.2f ns after the clock", t_fall - t_clk);
    end
  end
  always @(posedge drv) if ($realtime > 0) begin
    checks++;
    pulses++;
    if ($realtime - t_fall < 1.5 || $realtime - t_fall > 2.5) begin
      failures++; $display("FAIL pulse width %0.2f ns", $realtime - t_fall);
    end
  end

  initial begin
    #10;
    for (int i = 0; i < 300; i++) begin
      @(posedge clk);
      ser_out <= $urandom_range(0, 1);
      load_n  <= !(i >= 200 && i < 220);
      #0.1;
      if (ser_out && load_n) ones++;
    end
    @(posedge clk) ser_out <= 0;
    repeat (3) @(posedge clk);
    checks++;
    if (pulses != ones || ones == 0) begin failures++; $display("FAIL %0d pulses for %0d ones", pulses, ones); end
    $display("pulses %0d", pulses);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100us;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
