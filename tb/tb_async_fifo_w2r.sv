// tb_async_fifo_w2r: self-checking test of the 64-to-512-bit dual-clock FIFO.
//
// Write clock 8 ns, read clock 11 ns (unrelated). The writer sends random
// 64-bit words whenever wr_free allows, in bursts; the reader reads at
// random. Every 512-bit word read must be the next eight written words,
// first in the low bits. The test fills the FIFO until wr_full (and checks
// that wr_free never promised more room than there was), drains it until
// empty, and checks the total count.
`timescale 1ns / 1ps
module tb_async_fifo_w2r;
  logic wr_clk = 0, rd_clk = 0, wr_rst_n = 0, rd_rst_n = 0;
  logic wr_en, wr_full, rd_en, rd_empty;
  logic [63:0] wr_data;
  logic [15:0] wr_free;
  logic [511:0] rd_data;
  int checks = 0, failures = 0;
  logic [63:0] sent [$];
  int n_read = 0, n_written = 0, saw_full = 0;
  logic rd_phase = 0;   // 0: slow reader, 1: fast reader
  logic stop_rd = 0;

  async_fifo_w2r dut (.*);

  always #4   wr_clk = ~wr_clk;
  always #5.5 rd_clk = ~rd_clk;

  // Writer
  always @(negedge wr_clk) begin
    if (wr_rst_n && wr_free != 0 && $urandom_range(0, 3) != 0 && n_written < 4000) begin
      wr_en   <= 1;
      wr_data <= {$urandom, $urandom};
    end else wr_en <= 0;
  end
  always @(posedge wr_clk) begin
    if (wr_en) begin
      checks++;
      if (wr_full) begin failures++; $display("FAIL write while full"); end
      sent.push_back(wr_data);
      n_written++;
    end
    if (wr_full) saw_full++;
  end

  // Reader
  logic rd_pend = 0;
  always @(negedge rd_clk) rd_en <= rd_rst_n && !rd_empty && !stop_rd &&
                                    (rd_phase ? 1'b1 : ($urandom_range(0, 9) == 0));
  always @(posedge rd_clk) begin
    if (rd_pend) begin
      logic [511:0] e;
      checks++;
      if (sent.size() < 8) begin failures++; $display("FAIL read without data"); end
      else begin
        for (int i = 0; i < 8; i++) e[64*i +: 64] = sent.pop_front();
        if (rd_data !== e) begin failures++; if (failures < 5) $display("FAIL data word %0d", n_read); end
      end
      n_read++;
    end
    rd_pend <= rd_en && !rd_empty;
  end

  initial begin
    wr_en = 0; rd_en = 0;
    #20 wr_rst_n = 1; rd_rst_n = 1;
    // Slow reader: the FIFO fills up.
    stop_rd = 1;
    #10000;
    stop_rd = 0;
    #20000;
    rd_phase = 1;
    #60000;
    checks += 3;
    if (saw_full == 0) begin failures++; $display("FAIL never full"); end
    if (!rd_empty) begin failures++; $display("FAIL not empty at end"); end
    if (n_read != n_written / 8) begin failures++; $display("FAIL read %0d words of %0d", n_read, n_written); end
    $display("written %0d read %0d full-cycles %0d", n_written, n_read, saw_full);
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
