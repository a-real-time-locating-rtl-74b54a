// async_fifo_w2r: dual-clock FIFO, 64-bit write port, 512-bit read port.
//
// The write side packs RATIO consecutive write words into one read word,
// the first written word in the least significant bits, and stores the full
// read word in a dual-port memory of DEPTH_R entries. Write and read
// pointers cross between the clock domains as Gray codes through two-flop
// synchronisers, so the two clocks may be unrelated. A read word becomes
// visible only when all RATIO of its write words have been written.
//
// Write side: wr_en/wr_data; wr_free is the number of write words that can
// still be accepted (conservative, as it uses the synchronised read
// pointer); wr_full = (wr_free == 0). A write while full is ignored.
// Read side (standard, not first-word-fall-through): rd_en while !rd_empty
// presents the next word on rd_data in the following clock. Both resets are
// asynchronous, active low, and must be applied together.
//
// From the system description: independent write and read clocks, 64-bit
// write and 512-bit read widths. This design's own choices: the depth, the
// packing order and the standard read mode.
`timescale 1ns / 1ps
module async_fifo_w2r #(
  parameter int unsigned W_WR    = 64,
  parameter int unsigned RATIO   = 8,
  parameter int unsigned DEPTH_R = 64,
  parameter int unsigned FREE_W  = 16
) (
  input  logic                    wr_clk,
  input  logic                    wr_rst_n,
  input  logic                    wr_en,
  input  logic [W_WR-1:0]         wr_data,
  output logic [FREE_W-1:0]       wr_free,
  output logic                    wr_full,

  input  logic                    rd_clk,
  input  logic                    rd_rst_n,
  input  logic                    rd_en,
  output logic [W_WR*RATIO-1:0]   rd_data,
  output logic                    rd_empty
);

  localparam int unsigned AW   = $clog2(DEPTH_R);
  localparam int unsigned W_RD = W_WR * RATIO;

  logic [W_RD-1:0] mem [DEPTH_R];
  logic [AW:0]     rptr_bin, rptr_gray;   // read domain
  logic [AW:0]     wptr_bin, wptr_gray;   // write domain

  // ---------------- write domain ----------------
  logic [AW:0]              rptr_gray_s1, rptr_gray_s2, rptr_bin_w;
  logic [$clog2(RATIO)-1:0] pack_cnt;
  logic [W_RD-1:0]          pack;
  logic [AW:0]              used_w;

  function automatic logic [AW:0] gray2bin(input logic [AW:0] g);
    logic [AW:0] b;
    b[AW] = g[AW];
    for (int i = AW - 1; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  always_ff @(posedge wr_clk or negedge wr_rst_n) begin
    if (!wr_rst_n) begin
      rptr_gray_s1 <= '0;
      rptr_gray_s2 <= '0;
    end else begin
      rptr_gray_s1 <= rptr_gray;
      rptr_gray_s2 <= rptr_gray_s1;
    end
  end
  assign rptr_bin_w = gray2bin(rptr_gray_s2);
  assign used_w     = wptr_bin - rptr_bin_w;
  assign wr_free    = FREE_W'((DEPTH_R - 32'(used_w)) * RATIO - 32'(pack_cnt));
  assign wr_full    = (wr_free == '0);

  wire wr_do   = wr_en && !wr_full;
  wire wr_last = wr_do && (pack_cnt == ($bits(pack_cnt))'(RATIO - 1));

  always_ff @(posedge wr_clk) begin
    if (wr_do) pack[pack_cnt*W_WR +: W_WR] <= wr_data;
    if (wr_last) begin
      for (int i = 0; i < RATIO - 1; i++)
        mem[wptr_bin[AW-1:0]][i*W_WR +: W_WR] <= pack[i*W_WR +: W_WR];
      mem[wptr_bin[AW-1:0]][(RATIO-1)*W_WR +: W_WR] <= wr_data;
    end
  end

  always_ff @(posedge wr_clk or negedge wr_rst_n) begin
    if (!wr_rst_n) begin
      pack_cnt  <= '0;
      wptr_bin  <= '0;
      wptr_gray <= '0;
    end else if (wr_do) begin
      pack_cnt <= pack_cnt + 1'b1;
      if (wr_last) begin
        wptr_bin  <= wptr_bin + 1'b1;
        wptr_gray <= (wptr_bin + 1'b1) ^ ((wptr_bin + 1'b1) >> 1);
      end
    end
  end

  // ---------------- read domain ----------------
  logic [AW:0] wptr_gray_s1, wptr_gray_s2;

  always_ff @(posedge rd_clk or negedge rd_rst_n) begin
    if (!rd_rst_n) begin
      wptr_gray_s1 <= '0;
      wptr_gray_s2 <= '0;
    end else begin
      wptr_gray_s1 <= wptr_gray;
      wptr_gray_s2 <= wptr_gray_s1;
    end
  end
  assign rd_empty = (rptr_gray == wptr_gray_s2);

  wire rd_do = rd_en && !rd_empty;

  always_ff @(posedge rd_clk) begin
    if (rd_do) rd_data <= mem[rptr_bin[AW-1:0]];
  end

  always_ff @(posedge rd_clk or negedge rd_rst_n) begin
    if (!rd_rst_n) begin
      rptr_bin  <= '0;
      rptr_gray <= '0;
    end else if (rd_do) begin
      rptr_bin  <= rptr_bin + 1'b1;
      rptr_gray <= (rptr_bin + 1'b1) ^ ((rptr_bin + 1'b1) >> 1);
    end
  end

endmodule
