// tag_srf_gen: sequence repetition timing of the Tag (first prototype).
//
// The 20 MHz reference clock is divided by two cascaded 12-bit counters:
// the second counter advances once per full cycle of the first one (on the
// falling edge of the first counter's MSB, i.e. when the first counter
// wraps). The 8 most significant bits of
// the second counter are compared with the 8-bit Sequence Repetition
// Interval SRI, hardwired by resistors. On a match the comparator output
// not(P=Q) goes low for one clock; that pulse clears the divider and the
// bit counter, and loads the sequence shift register (load_n low). The bit
// counter then counts transmitted symbols, one per clock, and ends the
// transmission after 15 or 23 of them (len23 selects 23).
//
// The sequence therefore repeats every SRI * 2^16 + 1 clocks (SRI * 3.28 ms
// at 20 MHz; SRI = 15 gives about 20 sequences per second). SRI = 0 is not a
// valid setting.
//
// Interface: clk is the 20 MHz clock; load_n is the active-low parallel
// load of the sequence register; shift_en is high while symbols are being
// sent, one per clock after the load; sym_idx is the number of symbols
// already sent. Timing: the first symbol is presented in the clock after
// load_n.
//
// From the system description: the two 12-bit counters, the 8-bit
// comparator against the second counter, the one-clock pulse, the bit
// counter and the 15/23-symbol choice. This design's own choices: which 8
// bits of the second counter are compared (its 8 MSBs), that the match also
// clears the divider (which makes SRI set the period),
// and a synchronous enable in place of clocking the second counter from the
// first counter's MSB (falling edge, as in a negative-edge ripple counter).
`timescale 1ns / 1ps
module tag_srf_gen #(
  parameter int unsigned CNT_W = 12
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] sri,
  input  logic       len23,
  output logic       load_n,
  output logic       shift_en,
  output logic [4:0] sym_idx
);

  logic [CNT_W-1:0] cnt1, cnt2;
  logic [4:0]       bit_cnt;
  logic             active;

  wire pq    = (cnt2[CNT_W-1 -: 8] == sri);      // P = Q
  wire [4:0] n_sym = len23 ? 5'd23 : 5'd15;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt1 <= '0;
      cnt2 <= '0;
    end else if (pq) begin
      cnt1 <= '0;
      cnt2 <= '0;
    end else begin
      cnt1 <= cnt1 + 1'b1;
      if (cnt1 == '1) cnt2 <= cnt2 + 1'b1;   // first counter wraps, its MSB falls
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      load_n  <= 1'b1;
      bit_cnt <= '0;
      active  <= 1'b0;
    end else begin
      load_n <= !pq;
      if (!load_n) begin
        bit_cnt <= '0;
        active  <= 1'b1;
      end else if (active) begin
        bit_cnt <= bit_cnt + 1'b1;
        if (bit_cnt == n_sym - 5'd1) active <= 1'b0;
      end
    end
  end

  assign shift_en = active;
  assign sym_idx  = bit_cnt;

endmodule
