// max4: the MAX4 macro-block, the local alignment score of a PE.
//
// Inputs are three signed candidates of the Smith-Waterman recurrence: the
// diagonal one (score of the previous row and column plus the substitution
// score), the vertical one (score from the previous PE less a gap penalty)
// and the horizontal one (this PE's own previous score less a gap penalty).
// The fourth input is the constant zero of local alignment. Three
// subtracters compare the candidates pairwise in parallel. The largest is
// then clamped to zero when negative (its sign bit) and saturated to the
// 8-bit score range.
//
// src tells which candidate won. It is the control signal that goes round
// loop-1 with the score and selects the gap penalty of the next column. Ties
// go to diagonal, then vertical, then horizontal. A result of zero is
// reported as SRC_ZERO. Both are this design's choices. Combinational.
module max4
  import sw_pkg::*;
(
  input  cand_t  c_diag,
  input  cand_t  c_up,
  input  cand_t  c_left,
  output score_t h,
  output src_e   src
);
  localparam cand_t SAT = cand_t'((1 << SCORE_W) - 1);

  logic signed [CAND_W:0] d_du, d_dl, d_ul;
  cand_t best;
  src_e  best_src;

  always_comb begin
    d_du = c_diag - c_up;
    d_dl = c_diag - c_left;
    d_ul = c_up   - c_left;
    if (!d_du[CAND_W] && !d_dl[CAND_W]) begin
      best = c_diag; best_src = SRC_DIAG;
    end else if (d_du[CAND_W] && !d_ul[CAND_W]) begin
      best = c_up;   best_src = SRC_UP;
    end else begin
      best = c_left; best_src = SRC_LEFT;
    end

    if (best <= 0) begin
      h = '0;  src = SRC_ZERO;
    end else if (best > SAT) begin
      h = '1;  src = best_src;
    end else begin
      h = score_t'(best);  src = best_src;
    end
  end
endmodule
