// tb_tag_seq_gen: self-checking test of the Tag sequence shift register.
//
// Loads random 24-bit sequences, shifts for a random number of symbols up
// to 24 and checks that ser_out shows bit 23, 22, ... of the loaded value,
// one per clock starting the clock after the load, and 0 whenever shift_en
// is low.
`timescale 1ns / 1ps
module tb_tag_seq_gen;
  logic clk = 0, rst_n = 0;
  logic [23:0] seq;
  logic load_n, shift_en, ser_out;
  int checks = 0, failures = 0;

  tag_seq_gen dut (.*);

  always #25 clk = ~clk;

  initial begin
    load_n = 1; shift_en = 0; seq = '0;
    #60 rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      int n;
      logic [23:0] v;
      v = 24'($urandom);
      n = $urandom_range(1, 24);
      @(negedge clk);
      seq = v; load_n = 0;
      checks++;
      if (ser_out) begin failures++; $display("FAIL output during load"); end
      @(negedge clk);
      load_n = 1; seq = ~v;   // the register must not follow seq after the load
      for (int i = 0; i < n; i++) begin
        shift_en = 1;
        #1;
        checks++;
        if (ser_out != v[23 - i]) begin failures++; if (failures < 5) $display("FAIL symbol %0d", i); end
        @(negedge clk);
      end
      shift_en = 0;
      #1;
      checks++;
      if (ser_out) begin failures++; $display("FAIL output after the sequence"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2ms;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
