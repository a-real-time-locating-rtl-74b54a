// fifo_write_ctrl: FIFO write process with time-of-arrival binding.
//
// A free-running time-of-arrival (TOA) counter counts 125 MHz clocks, so its
// unit is eight samples (8 ns). The write process waits for TRIGGER (the
// threshold decision). On a trigger it leaves WAIT_TRIGGER, samples the TOA
// counter (BIND_TMSTMP) and writes the sampled value as the first FIFO word,
// then keeps FIFO_WREN high and counts with DATA_Counter while the delayed
// ADC words follow, until PKT_WORDS words (2048 bytes) are in the FIFO. It
// then returns to WAIT_TRIGGER. A trigger that arrives while a packet is
// being written is ignored; one that finds less than PKT_WORDS free words
// in the FIFO is dropped and reported on drop, so the FIFO never overflows
// and never holds a partial packet.
//
// Interface: trigger from peak_threshold; in_data the delayed ADC word;
// wr_free the free space of the FIFO in 64-bit words; fifo_wren/fifo_din the
// FIFO write port. The first word carries the TOA in bits 31:0 and zeros
// above. Timing: the TOA word is written in the clock after the trigger and
// the data words in the following PKT_WORDS-1 clocks, one per clock.
//
// From the system description: the signal names, the order (TOA first), the
// 2048-sample packet and the TOA counter. This design's own choices: the
// 32-bit TOA width (four bytes, as in the Sensor's UDP report), that the TOA
// word counts towards the 2048 bytes, and the drop rule.
`timescale 1ns / 1ps
module fifo_write_ctrl #(
  parameter int unsigned W         = 64,
  parameter int unsigned PKT_WORDS = 256,
  parameter int unsigned TOA_W     = 32,
  parameter int unsigned FREE_W    = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              trigger,
  input  logic [W-1:0]      in_data,
  input  logic [FREE_W-1:0] wr_free,
  output logic              fifo_wren,
  output logic [W-1:0]      fifo_din,
  output logic              wait_trigger,
  output logic              bind_tmstmp,
  output logic              drop,
  output logic [TOA_W-1:0]  toa_count
);

  typedef enum logic [1:0] {WAIT_TRIG, BIND, WRITE} state_t;

  state_t                       state;
  logic [$clog2(PKT_WORDS)-1:0] data_counter;
  logic [TOA_W-1:0]             toa_sample;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) toa_count <= '0;
    else        toa_count <= toa_count + 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= WAIT_TRIG;
      data_counter <= '0;
      toa_sample   <= '0;
      drop         <= 1'b0;
    end else begin
      drop <= 1'b0;
      unique case (state)
        WAIT_TRIG: if (trigger) begin
          if (wr_free >= FREE_W'(PKT_WORDS)) begin
            toa_sample <= toa_count;
            state      <= BIND;
          end else begin
            drop <= 1'b1;
          end
        end
        BIND: begin
          data_counter <= ($bits(data_counter))'(1);
          state        <= WRITE;
        end
        WRITE: begin
          data_counter <= data_counter + 1'b1;
          if (data_counter == ($bits(data_counter))'(PKT_WORDS - 1)) state <= WAIT_TRIG;
        end
        default: state <= WAIT_TRIG;
      endcase
    end
  end

  assign wait_trigger = (state == WAIT_TRIG);
  assign bind_tmstmp  = (state == BIND);
  assign fifo_wren    = (state == BIND) || (state == WRITE);
  assign fifo_din     = (state == BIND) ? W'(toa_sample) : in_data;

endmodule
