// tb_fifo_write_ctrl: self-checking test of the FIFO write process.
//
// in_data is the cycle number, so every written word tells when it was
// taken. For each trigger the test expects, starting the next clock, the
// TOA word (the TOA counter value at the trigger clock, which equals the
// number of clocks since reset) followed by 255 consecutive data words,
// with BIND_TMSTMP high for the first word only and WAIT_TRIGGER low
// throughout. Triggers during a packet are ignored; a trigger with less
// than 256 free words is dropped (drop pulse, nothing written).
`timescale 1ns / 1ps
module tb_fifo_write_ctrl;
  logic clk = 0, rst_n = 0;
  logic trigger;
  logic [63:0] in_data;
  logic [15:0] wr_free;
  logic fifo_wren, wait_trigger, bind_tmstmp, drop;
  logic [63:0] fifo_din;
  logic [31:0] toa_count;
  int checks = 0, failures = 0, cyc = 0;
  int rst_cyc = 0;
  int pkts = 0, drops = 0;

  fifo_write_ctrl dut (.*);

  always #4 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  assign in_data = 64'(cyc);


  initial begin
    trigger = 0; wr_free = 16'd512;
    repeat (2) @(negedge clk);
    rst_n = 1;
    rst_cyc = cyc;
    for (int i = 0; i < 6; i++) begin
      repeat ($urandom_range(1, 40)) @(negedge clk);
      checks++;
      if (fifo_wren || !wait_trigger) begin failures++; $display("FAIL write while idle"); end
      wr_free = (i == 3) ? 16'd255 : 16'd256 + 16'($urandom_range(0, 200));
      trigger = 1;
      @(negedge clk);
      trigger = 0;
      if (i == 3) begin
        checks += 2;
        if (!drop) begin failures++; $display("FAIL no drop"); end else drops++;
        @(negedge clk);
        if (fifo_wren) begin failures++; $display("FAIL write after drop"); end
      end else begin
        int tcyc;
        tcyc = cyc - 1;
        // First word is due in this clock: step back into the check loop.
        checks++;
        if (!fifo_wren || !bind_tmstmp || fifo_din != 64'(tcyc - rst_cyc)) begin
          failures++;
          $display("FAIL TOA word %0d expected %0d", fifo_din, tcyc - rst_cyc);
        end
        for (int w = 1; w < 256; w++) begin
          @(negedge clk);
          checks++;
          if (!fifo_wren || wait_trigger || bind_tmstmp || fifo_din != 64'(cyc)) begin
            failures++;
            if (failures < 5) $display("FAIL word %0d din %0d", w, fifo_din);
          end
          trigger = (w == 100);
        end
        trigger = 0;
        @(negedge clk);
        checks++;
        if (fifo_wren || !wait_trigger) begin failures++; $display("FAIL packet too long"); end
        pkts++;
      end
    end
    checks++;
    if (pkts != 5 || drops != 1) begin failures++; $display("FAIL pkts %0d drops %0d", pkts, drops); end
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
