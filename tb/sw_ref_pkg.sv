// sw_ref_pkg: software reference for the Smith-Waterman array testbenches.
//
// sw_columns() evaluates the local-alignment recurrence of the array for one
// query and one subject, cell by cell, in plain integer arithmetic. It
// returns, per subject position j, the running maximum M(last row, j) that
// the last PE must deliver. The gap penalty of a candidate is gap_ext when
// the score it extends came through a gap in the same direction, else
// gap_open. Ties go to diagonal, vertical, horizontal. Scores saturate at
// 255 and clamp at zero. The counters record which cases the stimuli
// reached, so testbenches can check their coverage.
package sw_ref_pkg;
  typedef int int_q[$];

  localparam int R_ZERO = 0, R_DIAG = 1, R_UP = 2, R_LEFT = 3;

  int ev_zero, ev_diag, ev_up, ev_left, ev_ext, ev_sat, ev_keep_max;

  function automatic int_q sw_columns(int_q query, int_q subj,
                                      ref int tab[32][32],
                                      input int gap_open, input int gap_ext);
    int n = query.size();
    int h_prev[], s_prev[], m_prev[];   // column j-1, per row
    int h_cur[],  s_cur[],  m_cur[];
    int_q out;
    h_prev = new[n]; s_prev = new[n]; m_prev = new[n];
    h_cur  = new[n]; s_cur  = new[n]; m_cur  = new[n];
    foreach (h_prev[i]) begin h_prev[i] = 0; s_prev[i] = R_ZERO; m_prev[i] = 0; end
    foreach (subj[j]) begin
      for (int i = 0; i < n; i++) begin
        int diag, up_h, up_s, up_m, c_d, c_u, c_l, best, bsrc, pen_u, pen_l, m;
        diag = (i == 0) ? 0 : h_prev[i-1];
        up_h = (i == 0) ? 0 : h_cur[i-1];
        up_s = (i == 0) ? R_ZERO : s_cur[i-1];
        up_m = (i == 0) ? 0 : m_cur[i-1];
        pen_u = (up_s == R_UP)        ? gap_ext : gap_open;
        pen_l = (s_prev[i] == R_LEFT) ? gap_ext : gap_open;
        c_d = diag + tab[query[i]][subj[j]];
        c_u = up_h - pen_u;
        c_l = h_prev[i] - pen_l;
        if (c_d >= c_u && c_d >= c_l) begin best = c_d; bsrc = R_DIAG; end
        else if (c_u >= c_l)          begin best = c_u; bsrc = R_UP;   end
        else                          begin best = c_l; bsrc = R_LEFT; end
        if (best <= 0) begin best = 0; bsrc = R_ZERO; end
        else if (best > 255) begin best = 255; ev_sat++; end
        case (bsrc)
          R_ZERO: ev_zero++;
          R_DIAG: ev_diag++;
          R_UP:   begin ev_up++;   if (pen_u == gap_ext) ev_ext++; end
          default: begin ev_left++; if (pen_l == gap_ext) ev_ext++; end
        endcase
        m = best;
        if (up_m > m) m = up_m;
        if (m_prev[i] > m) m = m_prev[i];
        if (m > best) ev_keep_max++;
        h_cur[i] = best; s_cur[i] = bsrc; m_cur[i] = m;
      end
      out.push_back(m_cur[n-1]);
      for (int i = 0; i < n; i++) begin
        h_prev[i] = h_cur[i]; s_prev[i] = s_cur[i]; m_prev[i] = m_cur[i];
      end
    end
    return out;
  endfunction
endpackage
