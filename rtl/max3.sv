// max3: the MAX3 macro-block, the running maximum of the alignment score.
//
// It compares the local score of this PE (h), the maximum found by the
// previous PEs (m_in) and this PE's own maximum from the previous slot of the
// same lane (m_prev), and returns the largest. Like MAX4 it uses three
// subtracters working in parallel; their borrow bits select the winner.
// Purely combinational; the surrounding PE gives it its timing.
module max3
  import sw_pkg::*;
(
  input  score_t h,
  input  score_t m_in,
  input  score_t m_prev,
  output score_t m_out
);
  logic [SCORE_W:0] d_hi, d_hp, d_ip;   // one extra bit holds the borrow
  logic h_ge_i, h_ge_p, i_ge_p;

  always_comb begin
    d_hi   = {1'b0, h}    - {1'b0, m_in};
    d_hp   = {1'b0, h}    - {1'b0, m_prev};
    d_ip   = {1'b0, m_in} - {1'b0, m_prev};
    h_ge_i = !d_hi[SCORE_W];
    h_ge_p = !d_hp[SCORE_W];
    i_ge_p = !d_ip[SCORE_W];
    if (h_ge_i && h_ge_p) m_out = h;
    else if (i_ge_p)      m_out = m_in;
    else                  m_out = m_prev;
  end
endmodule
