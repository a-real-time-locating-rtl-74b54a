// axis_fifo_reader: FIFO read process feeding the DMA over AXI-Stream.
//
// Whenever the FIFO holds data and the output can take it, the block raises
// the FIFO read enable. Words read from the FIFO go into a two-entry output
// queue whose head drives TDATA/TVALID, so a word is offered every clock
// while TREADY is high and nothing is lost while TREADY is low. A word
// counter (DATA_Counter) keeps TLAST low until the PKT_WORDS-th word of a
// packet (32 words of 512 bits = 2048 samples), raises it with that word,
// and starts again. TSTRB is all ones: every byte is a data byte.
//
// Interface: AXI-Stream master (aclk, aresetn, tdata, tvalid, tready,
// tlast, tstrb) and the read port of a standard-mode FIFO (rd_empty, rd_en,
// rd_data valid one clock after rd_en). Timing: two clocks from a non-empty
// FIFO to TVALID, then one word per clock while TREADY is high.
//
// From the system description: the signal set, read enable on TREADY and
// available data, TLAST after 32 words, TSTRB fixed to one. This design's
// own choice: the output queue that keeps the stream at full rate.
//
// The assertion a_hold checks the AXI-Stream rule that a word offered with
// TVALID stays unchanged until TREADY takes it. Its "disable iff" reads
// aresetn, so lint reports aresetn as used both as an asynchronous reset
// and synchronously; the second use is the assertion only, not logic.
`timescale 1ns / 1ps
module axis_fifo_reader #(
  parameter int unsigned W         = 512,
  parameter int unsigned PKT_WORDS = 32
) (
  input  logic           aclk,
  input  logic           aresetn,
  input  logic           rd_empty,
  output logic           rd_en,
  input  logic [W-1:0]   rd_data,
  output logic [W-1:0]   m_axis_tdata,
  output logic           m_axis_tvalid,
  input  logic           m_axis_tready,
  output logic           m_axis_tlast,
  output logic [W/8-1:0] m_axis_tstrb
);

  logic [W-1:0] q [2];
  logic [1:0]   q_cnt;        // words in the queue
  logic         rd_pend;      // a FIFO read is in flight
  logic [$clog2(PKT_WORDS)-1:0] data_counter;

  wire pop  = m_axis_tvalid && m_axis_tready;
  // Room counts the queue, the word in flight and the word leaving now.
  assign rd_en = !rd_empty && ((q_cnt + {1'b0, rd_pend} - {1'b0, pop}) < 2'd2);

  always_ff @(posedge aclk) begin
    if (pop) begin
      q[0] <= q[1];
      if (rd_pend) q[q_cnt[1]] <= rd_data;   // q_cnt is 1 or 2
    end else if (rd_pend) begin
      q[q_cnt[0]] <= rd_data;                // q_cnt is 0 or 1
    end
  end

  always_ff @(posedge aclk or negedge aresetn) begin
    if (!aresetn) begin
      q_cnt        <= '0;
      rd_pend      <= 1'b0;
      data_counter <= '0;
    end else begin
      rd_pend <= rd_en;
      q_cnt   <= q_cnt + {1'b0, rd_pend} - {1'b0, pop};
      if (pop) data_counter <= (data_counter == ($bits(data_counter))'(PKT_WORDS - 1))
                               ? '0 : data_counter + 1'b1;
    end
  end

  assign m_axis_tdata  = q[0];
  assign m_axis_tvalid = (q_cnt != 2'd0);
  assign m_axis_tlast  = m_axis_tvalid && (data_counter == ($bits(data_counter))'(PKT_WORDS - 1));
  assign m_axis_tstrb  = '1;

  // AXI-Stream rule: a word offered and not taken stays unchanged.
  property p_hold;
    @(posedge aclk) disable iff (!aresetn)
      (m_axis_tvalid && !m_axis_tready) |=> (m_axis_tvalid && $stable(m_axis_tdata) && $stable(m_axis_tlast));
  endproperty
  a_hold: assert property (p_hold) else $error("AXI-Stream word changed before it was accepted");

endmodule
