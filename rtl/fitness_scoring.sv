// fitness_scoring: pipelined fitness score of one affine hypothesis.
//
// For every point pair (x1,y1) -> (x2,y2) it forms the residual of the
// hypothesis
//     dx = x2 - (x1*H0 + y1*H1 + H2),   dy = y2 - (x1*H3 + y1*H4 + H5)
// and adds min(dx^2 + dy^2, thdist^2) to an accumulator, so that an inlier
// costs its squared distance and an outlier a fixed penalty; a perfect fit
// scores 0. One point is accepted every cycle.
//
// Pipeline (as in the design's fitness-scoring datapath):
//   stage 1 registers the four products right after the multipliers,
//   stage 2 registers |dx| and |dy| just before the squarers,
//   stage 3 registers the two squares,
//   then min-with-threshold and the accumulator.
// A point presented in cycle c is therefore in the accumulator from cycle
// c+4. `clear` zeroes the accumulator (one per hypothesis); the hypothesis
// and threshold inputs must be held stable while points are in flight.
//
// Fixed point: coordinates are unsigned 11-bit integers, H0,H1,H3,H4 are
// signed Q4.12, H2,H5 signed Q11.5, thdist^2 and the score Q9.12 (the
// design's precision table). The residual is truncated to 6 fraction bits
// before squaring so that the square has the score's 12, and clamped to
// 5 integer bits: any larger residual squares past the largest score, so
// the clamp never changes the min(). Where the 9 integer bits of the score
// are exceeded, the accumulator saturates at its maximum; the truncation
// point and the saturation are this design's choices.
module fitness_scoring
  import ransac_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    clear,        // zero the accumulator (new hypothesis)
  input  logic    in_valid,     // in_point is a point to score
  input  point_t  in_point,
  input  affine_t hyp,          // hypothesis H0..H5
  input  score_t  thdist2,      // outlier penalty thdist^2, Q9.12
  output logic [2:0] stage_valid, // valid bits of pipeline stages 1..3
  output score_t  score          // accumulated fitness score, Q9.12
);

  localparam int unsigned PROD_W = COORD_W + 1 + PARAM_W;   // 28, signed
  localparam int unsigned SUM_W  = PROD_W + 3;              // 31, signed
  localparam int unsigned SQ_W   = 2 * DIFF_W;              // 22, Q10.12
  localparam int unsigned SHIFT  = LIN_FRAC - DIFF_FRAC;    // 6

  // ---------------- stage 1: products --------------------------------------
  logic                     s1_valid;
  logic signed [PROD_W-1:0] s1_x1h0, s1_y1h1, s1_x1h3, s1_y1h4;
  coord_t                   s1_x2, s1_y2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid <= 1'b0;
      s1_x1h0  <= '0;
      s1_y1h1  <= '0;
      s1_x1h3  <= '0;
      s1_y1h4  <= '0;
      s1_x2    <= '0;
      s1_y2    <= '0;
    end else begin
      s1_valid <= in_valid;
      s1_x1h0  <= $signed({1'b0, in_point.x1}) * hyp.h0;
      s1_y1h1  <= $signed({1'b0, in_point.y1}) * hyp.h1;
      s1_x1h3  <= $signed({1'b0, in_point.x1}) * hyp.h3;
      s1_y1h4  <= $signed({1'b0, in_point.y1}) * hyp.h4;
      s1_x2    <= in_point.x2;
      s1_y2    <= in_point.y2;
    end
  end

  // ---------------- stage 2: residual magnitudes ---------------------------
  // Everything is aligned to LIN_FRAC (12) fraction bits here.
  logic signed [SUM_W-1:0] fit_x, fit_y, res_x, res_y;
  logic        [SUM_W-1:0] mag_x, mag_y;
  logic        [DIFF_W-1:0] abs_x, abs_y;

  // Truncate to DIFF_FRAC fraction bits and clamp to DIFF_W bits.
  function automatic logic [DIFF_W-1:0] trunc_clamp(input logic [SUM_W-1:0] m);
    logic [SUM_W-1:0] t;
    t = m >> SHIFT;
    if (t > SUM_W'({DIFF_W{1'b1}})) return {DIFF_W{1'b1}};
    return t[DIFF_W-1:0];
  endfunction

  always_comb begin
    fit_x = SUM_W'(s1_x1h0) + SUM_W'(s1_y1h1)
          + (SUM_W'(hyp.h2) <<< (LIN_FRAC - TRN_FRAC));
    fit_y = SUM_W'(s1_x1h3) + SUM_W'(s1_y1h4)
          + (SUM_W'(hyp.h5) <<< (LIN_FRAC - TRN_FRAC));
    res_x = $signed({{(SUM_W-COORD_W-LIN_FRAC){1'b0}}, s1_x2, {LIN_FRAC{1'b0}}}) - fit_x;
    res_y = $signed({{(SUM_W-COORD_W-LIN_FRAC){1'b0}}, s1_y2, {LIN_FRAC{1'b0}}}) - fit_y;
    mag_x = res_x[SUM_W-1] ? SUM_W'(-res_x) : SUM_W'(res_x);
    mag_y = res_y[SUM_W-1] ? SUM_W'(-res_y) : SUM_W'(res_y);
    abs_x = trunc_clamp(mag_x);
    abs_y = trunc_clamp(mag_y);
  end

  logic              s2_valid;
  logic [DIFF_W-1:0] s2_abs_x, s2_abs_y;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s2_valid <= 1'b0;
      s2_abs_x <= '0;
      s2_abs_y <= '0;
    end else begin
      s2_valid <= s1_valid;
      s2_abs_x <= abs_x;
      s2_abs_y <= abs_y;
    end
  end

  // ---------------- stage 3: squares ---------------------------------------
  logic            s3_valid;
  logic [SQ_W-1:0] s3_sq_x, s3_sq_y;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s3_valid <= 1'b0;
      s3_sq_x  <= '0;
      s3_sq_y  <= '0;
    end else begin
      s3_valid <= s2_valid;
      s3_sq_x  <= SQ_W'(s2_abs_x) * SQ_W'(s2_abs_x);
      s3_sq_y  <= SQ_W'(s2_abs_y) * SQ_W'(s2_abs_y);
    end
  end

  // ---------------- threshold and accumulator ------------------------------
  logic [SQ_W:0]    dist2;
  score_t           pt_score;
  logic [SCORE_W:0] acc_sum;

  always_comb begin
    dist2    = {1'b0, s3_sq_x} + {1'b0, s3_sq_y};
    pt_score = (dist2 < (SQ_W+1)'(thdist2)) ? dist2[SCORE_W-1:0] : thdist2;
    acc_sum  = {1'b0, score} + {1'b0, pt_score};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         score <= '0;
    else if (clear)     score <= '0;
    else if (s3_valid)  score <= acc_sum[SCORE_W] ? {SCORE_W{1'b1}} : acc_sum[SCORE_W-1:0];
  end

  assign stage_valid = {s3_valid, s2_valid, s1_valid};

endmodule
