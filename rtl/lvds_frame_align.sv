// lvds_frame_align: frame alignment (bitslip) of the deserialized ADC lanes.
//
// The ADC sends each 8-bit sample LSB first on one of eight LVDS data lanes,
// and a ninth lane carries the frame clock FCLK, which toggles once per
// sample frame. The SerDes primitives in front of this block hand over, per
// lane and per 125 MHz clock, the last eight received bits in arrival order
// (bit 0 earliest), but with an arbitrary offset from the frame boundary.
// This block keeps the previous raw word of every lane, forms a 16-bit
// window and picks the 8 bits starting at a common slip position. A small
// state machine searches the slip at which the FCLK lane reads FCLK_PATTERN
// (high for the first half of the frame, i.e. the frame starts on the FCLK
// rising edge), declares lock after LOCK_CNT consecutive matches and starts
// searching again if the pattern is lost.
//
// Interface: lane_raw[N_LANES] is the FCLK lane, lane_raw[0..N_LANES-1] the
// data lanes. Data lane k carries sample k of the frame (sample 0 oldest);
// out_data[8k+7:8k] is that sample. out_valid is high while locked.
// Timing: out_data is registered, one clock after the raw word that
// completes the frame.
//
// From the system description: eight data lanes plus FCLK, LSB first,
// eight samples per 125 MHz clock on a 64-bit bus, locking on the FCLK
// rising edge. This design's own choices: the lane-to-sample order, the
// 16-bit window bitslip instead of the vendor SerDes BITSLIP port, and
// LOCK_CNT.
`timescale 1ns / 1ps
module lvds_frame_align
  import rtls_pkg::*;
#(
  parameter int unsigned        N = N_LANES,
  parameter logic [7:0]         FCLK_PATTERN = 8'h0F,
  parameter int unsigned        LOCK_CNT = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [N:0][7:0]  lane_raw,
  output logic [8*N-1:0]   out_data,
  output logic             out_valid,
  output logic             locked,
  output logic [2:0]       slip,
  output logic             slip_evt    // one pulse per bitslip step
);

  typedef enum logic [1:0] {SEARCH, SETTLE, LOCKED} state_t;

  state_t                state;
  logic [N:0][7:0]       prev;
  logic [N:0][7:0]       frame;
  logic [$clog2(LOCK_CNT+1)-1:0] hits;

  always_ff @(posedge clk) prev <= lane_raw;

  // Bits earlier in time sit in prev, later ones in lane_raw.
  always_comb begin
    for (int l = 0; l <= N; l++) frame[l] = 8'({lane_raw[l], prev[l]} >> slip);
  end

  wire fclk_ok = (frame[N] == FCLK_PATTERN);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= SEARCH;
      slip     <= '0;
      hits     <= '0;
      slip_evt <= 1'b0;
    end else begin
      slip_evt <= 1'b0;
      unique case (state)
        SEARCH: begin
          if (fclk_ok) begin
            if (hits == ($bits(hits))'(LOCK_CNT - 1)) state <= LOCKED;
            hits <= hits + 1'b1;
          end else begin
            slip     <= slip + 1'b1;
            slip_evt <= 1'b1;
            hits     <= '0;
            state    <= SETTLE;
          end
        end
        SETTLE: state <= SEARCH;   // one clock for the new slip to take effect
        LOCKED: if (!fclk_ok) begin
          hits  <= '0;
          state <= SEARCH;
        end
        default: state <= SEARCH;
      endcase
    end
  end

  assign locked = (state == LOCKED);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_data  <= '0;
      out_valid <= 1'b0;
    end else begin
      for (int k = 0; k < N; k++) out_data[8*k +: 8] <= frame[k];
      out_valid <= (state == LOCKED) && fclk_ok;
    end
  end

endmodule
