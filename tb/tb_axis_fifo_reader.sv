// tb_axis_fifo_reader: self-checking test of the AXI-Stream read process.
//
// A behavioural standard-mode FIFO (data one clock after rd_en) holds
// numbered 512-bit words. TREADY is driven at random, then held high. The
// test checks that the stream carries every word once and in order, that
// TLAST marks every 32nd word and only it, that TSTRB is all ones, that a
// word offered and not accepted stays unchanged, and that with TREADY high
// and data available a word is accepted in every clock (full rate).
`timescale 1ns / 1ps
module tb_axis_fifo_reader;
  logic aclk = 0, aresetn = 0;
  logic rd_empty, rd_en;
  logic [511:0] rd_data;
  logic [511:0] m_axis_tdata;
  logic m_axis_tvalid, m_axis_tready, m_axis_tlast;
  logic [63:0] m_axis_tstrb;
  int checks = 0, failures = 0;
  int fifo_q [$];
  int next_in = 0, next_out = 0;
  int beats_fast = 0, cycles_fast = 0;
  logic fast = 0;
  logic [512:0] held;
  logic was_stalled = 0;

  axis_fifo_reader dut (.*);

  always #4 aclk = ~aclk;

  assign rd_empty = (fifo_q.size() == 0);
  always @(posedge aclk) begin
    if (rd_en) begin
      if (rd_empty) begin checks++; failures++; $display("FAIL read from empty FIFO"); end
      else rd_data <= {16{32'(fifo_q.pop_front())}};
    end
    // Producer: fill the FIFO model.
    if (fifo_q.size() < 20 && next_in < 3200 && (fast || $urandom_range(0, 2) == 0)) begin
      fifo_q.push_back(next_in);
      next_in++;
    end
  end

  always @(negedge aclk) m_axis_tready <= fast ? 1'b1 : ($urandom_range(0, 2) != 0);

  always @(posedge aclk) if (aresetn) begin
    if (was_stalled) begin
      checks++;
      if (!m_axis_tvalid || {m_axis_tlast, m_axis_tdata} != held) begin failures++; $display("FAIL word changed while stalled"); end
    end
    was_stalled = m_axis_tvalid && !m_axis_tready;
    held = {m_axis_tlast, m_axis_tdata};
    if (fast && next_out > 1700 && next_out < 3000) begin
      cycles_fast++;
      if (m_axis_tvalid && m_axis_tready) beats_fast++;
    end
    if (m_axis_tvalid && m_axis_tready) begin
      checks += 3;
      if (m_axis_tdata != {16{32'(next_out)}}) begin failures++; if (failures < 5) $display("FAIL word %0d got %0d", next_out, m_axis_tdata[31:0]); end
      if (m_axis_tlast != (next_out % 32 == 31)) begin failures++; if (failures < 5) $display("FAIL tlast at %0d", next_out); end
      if (m_axis_tstrb != '1) begin failures++; $display("FAIL tstrb"); end
      next_out++;
    end
  end

  initial begin
    m_axis_tready = 0;
    #20 aresetn = 1;
    wait (next_out >= 1600);
    fast = 1;
    wait (next_out >= 3200);
    repeat (5) @(posedge aclk);
    checks += 2;
    if (beats_fast != cycles_fast) begin failures++; $display("FAIL full rate: %0d beats in %0d clocks", beats_fast, cycles_fast); end
    if (m_axis_tvalid) begin failures++; $display("FAIL extra word"); end
    $display("words %0d, full-rate beats %0d/%0d", next_out, beats_fast, cycles_fast);
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
