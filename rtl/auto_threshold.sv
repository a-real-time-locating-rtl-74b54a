// auto_threshold: manual or automatic detection threshold.
//
// The automatic threshold is the moving average of the correlation results
// plus K times their moving standard deviation. Both moving statistics are
// accumulators to which the newest data is added and from which the oldest
// is subtracted; with a power-of-two window of 2**LOG2_N results the scaling
// is a right shift. Eight results arrive per clock, so the block adds the
// eight values (and their eight squares) per clock and keeps those group
// sums in a ring of 2**LOG2_N / 8 entries to subtract them again when they
// leave the window. The variance is E[x^2] - E[x]^2; a digit-by-digit
// integer square root, one result bit per clock, runs continuously on the
// latest variance and gives the standard deviation.
//
// Interface: in_corr/in_valid is the correlation stream; auto_en selects the
// automatic threshold, otherwise thr_manual is passed through; thr is the
// threshold in use, mean and stdev the current statistics (the threshold
// saturates at the largest thr_t value). Timing: the
// statistics follow the stream three clocks behind; the square root adds
// SQRT_ITER + 1 clocks; thr is registered and is held at thr_manual until
// the window has filled once.
//
// From the system description: manual/automatic choice, moving average as an
// add-newest/subtract-oldest accumulator, power-of-two shift, standard
// deviation by the same principle, threshold = average + k * std (k = 8).
// This design's own choices: the window length, computing the deviation as
// the square root of the moving variance, and the word widths.
`timescale 1ns / 1ps
module auto_threshold
  import rtls_pkg::*;
#(
  parameter int unsigned N      = N_LANES,
  parameter int unsigned LOG2_N = 10,     // window of 1024 results
  parameter int unsigned K      = 8
) (
  input  logic          clk,
  input  logic          rst_n,
  input  corr_t [N-1:0] in_corr,
  input  logic          in_valid,
  input  logic          auto_en,
  input  thr_t          thr_manual,
  output thr_t          thr,
  output corr_t         mean,
  output thr_t          stdev,
  output logic          stats_valid
);

  localparam int unsigned GROUPS = (1 << LOG2_N) / N;
  localparam int unsigned GS_W   = CORR_W + $clog2(N);          // group sum
  localparam int unsigned GQ_W   = 2 * CORR_W + $clog2(N);      // group sum of squares
  localparam int unsigned S_W    = CORR_W + LOG2_N + 1;
  localparam int unsigned Q_W    = 2 * CORR_W + LOG2_N + 1;
  localparam int unsigned V_W    = 2 * CORR_W + 2;              // even radicand width
  localparam int unsigned SQRT_ITER = V_W / 2;

  // Stage 1: group sums.
  logic signed [GS_W-1:0] gs;
  logic        [GQ_W-1:0] gq;
  logic                   g_vld;
  logic signed [GS_W-1:0] gs_n;
  logic        [GQ_W-1:0] gq_n;
  always_comb begin
    gs_n = '0;
    gq_n = '0;
    for (int k = 0; k < N; k++) begin
      gs_n = gs_n + GS_W'(in_corr[k]);
      gq_n = gq_n + GQ_W'(unsigned'((2*CORR_W)'(in_corr[k]) * (2*CORR_W)'(in_corr[k])));
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      gs    <= '0;
      gq    <= '0;
      g_vld <= 1'b0;
    end else begin
      gs    <= gs_n;
      gq    <= gq_n;
      g_vld <= in_valid;
    end
  end

  // Stage 2: moving sums over the ring.
  logic signed [GS_W-1:0] ring_s [GROUPS];
  logic        [GQ_W-1:0] ring_q [GROUPS];
  logic [$clog2(GROUPS)-1:0] wptr;
  logic                      full;
  logic signed [S_W-1:0]     acc_s;
  logic        [Q_W-1:0]     acc_q;

  always_ff @(posedge clk) begin
    if (g_vld) begin
      ring_s[wptr] <= gs;
      ring_q[wptr] <= gq;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr  <= '0;
      full  <= 1'b0;
      acc_s <= '0;
      acc_q <= '0;
    end else if (g_vld) begin
      acc_s <= acc_s + S_W'(gs) - (full ? S_W'(ring_s[wptr]) : '0);
      acc_q <= acc_q + Q_W'(gq) - (full ? Q_W'(ring_q[wptr]) : '0);
      wptr  <= wptr + 1'b1;
      if (wptr == ($bits(wptr))'(GROUPS - 1)) full <= 1'b1;
    end
  end

  // Stage 3: mean and variance.
  logic signed [V_W-1:0] var_r;
  logic                  var_vld;
  logic signed [S_W-1:0] m_n;
  logic signed [V_W-1:0] v_n;
  always_comb begin
    m_n = acc_s >>> LOG2_N;
    v_n = V_W'(acc_q >> LOG2_N) - V_W'(m_n) * V_W'(m_n);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mean    <= '0;
      var_r   <= '0;
      var_vld <= 1'b0;
    end else begin
      mean    <= corr_t'(m_n);
      var_r   <= (v_n < 0) ? '0 : v_n;
      var_vld <= full;
    end
  end

  // Iterative square root.
  logic [V_W-1:0]         sq_x;
  logic [V_W/2:0]         sq_rem;   // never above 2 * root
  logic [V_W/2-1:0]       sq_root;
  logic [$clog2(SQRT_ITER+1)-1:0] sq_cnt;
  logic [V_W/2+2:0]       sq_r, sq_t;
  always_comb begin
    sq_r = {sq_rem[V_W/2:0], sq_x[V_W-1 -: 2]};
    sq_t = (V_W/2+3)'({sq_root, 2'b01});
  end
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sq_x        <= '0;
      sq_rem      <= '0;
      sq_root     <= '0;
      sq_cnt      <= '0;
      stdev       <= '0;
      stats_valid <= 1'b0;
    end else if (sq_cnt == 0) begin
      // Load the latest variance.
      sq_x    <= var_r;
      sq_rem  <= '0;
      sq_root <= '0;
      sq_cnt  <= ($bits(sq_cnt))'(SQRT_ITER);
      stats_valid <= stats_valid | var_vld;
    end else begin
      if (sq_r >= sq_t) begin
        sq_rem  <= (V_W/2+1)'(sq_r - sq_t);
        sq_root <= {sq_root[V_W/2-2:0], 1'b1};
      end else begin
        sq_rem  <= (V_W/2+1)'(sq_r);
        sq_root <= {sq_root[V_W/2-2:0], 1'b0};
      end
      sq_x   <= sq_x << 2;
      sq_cnt <= sq_cnt - 1'b1;
      if (sq_cnt == 1) stdev <= thr_t'({sq_root[V_W/2-2:0], sq_r >= sq_t});
    end
  end

  // mean + K * std, saturated instead of wrapping for a very noisy input.
  logic signed [THR_W+8:0] thr_sum;
  assign thr_sum = (THR_W+9)'(mean) + (THR_W+9)'(K) * (THR_W+9)'(stdev);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) thr <= '0;
    else if (auto_en && stats_valid) begin
      if (thr_sum > (THR_W+9)'({1'b0, {(THR_W-1){1'b1}}})) thr <= {1'b0, {(THR_W-1){1'b1}}};
      else                                                 thr <= thr_t'(thr_sum);
    end else thr <= thr_manual;
  end

endmodule
