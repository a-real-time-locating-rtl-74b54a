// tb_tag_digital: self-checking test of the Tag digital board.
//
// With SRI = 1 the Tag must send a sequence every 65537 clocks of 20 MHz.
// The test decodes drv: every 2 ns low pulse is a 1 symbol in the bit
// period in which it occurs (its position counted from the start of the
// transmission, 50 ns per symbol), and compares the decoded symbols with
// the hardwired sequence: preamble 1110010 and Tag ID 85 (01010101) for 15
// symbols, then a 23-symbol sequence. Periods between sequences are
// checked too.
`timescale 1ns / 1ps
module tb_tag_digital;
  logic clk = 0, rst_n = 0;
  logic [7:0] sri = 8'd1;
  logic [23:0] seq;
  logic len23 = 0;
  logic drv, tx_active, ser_out, seq_sig;
  logic [4:0] sym_idx;
  int checks = 0, failures = 0;
  int seqs = 0;
  realtime t_start = 0, t_prev_start = -1;
  logic [22:0] got;
  int n_exp;

  tag_digital dut (.*);

  always #25 clk = ~clk;

  // Transmission window from tx_active.
  always @(posedge tx_active) begin
    t_start = $realtime;
    got = '0;
    if (t_prev_start >= 0) begin
      checks++;
      if ($realtime - t_prev_start != 65537.0 * 50.0) begin
        failures++; $display("FAIL period %0.1f ns", $realtime - t_prev_start);
      end
    end
    t_prev_start = $realtime;
  end
  always @(negedge drv) begin
    int idx;
    idx = int'(($realtime - t_start) / 50.0 - 0.49);
    if (idx >= 0 && idx < 23) got[22 - idx] = 1'b1;
    else begin checks++; failures++; $display("FAIL pulse outside a transmission"); end
  end
  always @(negedge tx_active) begin
    logic [22:0] e;
    #10;
    e = seq[23 -: 23];
    if (n_exp == 15) e = {e[22:8], 8'b0};
    checks++;
    if (got != e) begin failures++; $display("FAIL sequence %b expected %b", got, e); end
    seqs++;
  end

  initial begin
    seq = {7'b1110010, 8'b01010101, 9'b0}; n_exp = 15;
    #100 rst_n = 1;
    wait (seqs == 3);
    @(negedge clk);
    len23 = 1; n_exp = 23;
    seq = {7'b1110010, 8'b10000111, 8'b11001011, 1'b0};
    wait (seqs == 5);
    $display("sequences %0d", seqs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #30ms;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
