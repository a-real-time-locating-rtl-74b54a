// tb_data_delay_line: self-checking test of the alignment shift register.
//
// Sends random words with a random valid pattern into the default instance
// (DEPTH 96) and a short one (DEPTH 5) and checks that each output equals
// the input of exactly DEPTH clocks earlier, valid included.
`timescale 1ns / 1ps
module tb_data_delay_line;
  logic clk = 0, rst_n = 0;
  logic [63:0] in_data, o1, o2;
  logic in_valid, v1, v2;
  int checks = 0, failures = 0, cyc = 0;
  logic [64:0] hist [int];

  data_delay_line dut1 (.clk, .rst_n, .in_data, .in_valid, .out_data(o1), .out_valid(v1));
  data_delay_line #(.DEPTH(5)) dut2 (.clk, .rst_n, .in_data, .in_valid, .out_data(o2), .out_valid(v2));

  always #4 clk = ~clk;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    hist[cyc] = {in_valid, in_data};
    if (cyc > 100) begin
      checks += 2;
      if ({v1, o1} != hist[cyc - 96]) begin failures++; if (failures < 5) $display("FAIL depth 96 at %0d", cyc); end
      if ({v2, o2} != hist[cyc - 5])  begin failures++; if (failures < 5) $display("FAIL depth 5 at %0d", cyc); end
    end
  end

  initial begin
    in_valid = 0; in_data = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (1000) begin
      @(negedge clk);
      in_valid = $urandom_range(0, 3) != 0;
      in_data  = {$urandom, $urandom};
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
