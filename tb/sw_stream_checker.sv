// sw_stream_checker: stimulus and checking for a whole Smith-Waterman array.
//
// It plays the host in four phases.
//  1. Loads a random query and a random substitution table through the
//     configuration chain, then feeds two subjects to every lane at full
//     interleaving, with random stalls.
//  2. Level 1, no interleaving: one lane, checked to advance exactly one
//     amino acid per LOOP_LEN cycles.
//  3. Level 3 (when at least 3 lanes exist): each lane again one amino acid
//     per LOOP_LEN cycles.
//  4. Reloads a query of one repeated amino acid with a self score of 100, so
//     a matching subject drives the score into saturation.
// Subjects are random, or copies of the query with amino acids inserted or
// deleted, which produce vertical and horizontal gaps. Every result slot is
// compared with sw_ref_pkg::sw_columns for its lane and column: score, flags
// and the arrival cycle (N_PE*PE_LAT + 1 after acceptance). The mechanism
// counters (interleaved frames, stalls, subject restarts, gap extensions,
// zero clamps, saturations, kept maxima, level switches, reconfigurations)
// must all be non-zero at the end.
module sw_stream_checker
  import sw_pkg::*;
  import sw_ref_pkg::*;
#(
  parameter int N_PE      = 4,
  parameter int LOOP_LEN  = 7,
  parameter int MAX_LANES = 7,
  parameter int PE_LAT    = 1,
  parameter int GAP_OPEN  = 8,
  parameter int GAP_EXT   = 2,
  localparam int LANE_W   = (MAX_LANES > 1) ? $clog2(MAX_LANES) : 1,
  localparam int LVL_W    = $clog2(MAX_LANES + 1)
) (
  input  logic              clk,
  input  logic              rst,
  output cfg_t              cfg_in,
  output logic [LVL_W-1:0]  level,
  output logic              lane_valid [MAX_LANES],
  output logic              lane_first [MAX_LANES],
  output logic              lane_last  [MAX_LANES],
  output aa_t               lane_aa    [MAX_LANES],
  input  logic              lane_ready [MAX_LANES],
  input  logic              res_valid,
  input  logic              res_first,
  input  logic              res_last,
  input  logic [LANE_W-1:0] res_lane,
  input  score_t            res_score,
  output logic              done,
  output int                checks,
  output int                failures
);
  localparam int LAT = N_PE * PE_LAT + 1;

  typedef struct { int aa; bit first; bit last; int score; } item_t;
  typedef struct { int score; bit first; bit last; int due; } exp_t;

  int   tab [32][32];
  int_q query;
  item_t pend [MAX_LANES][$];     // amino acids waiting to enter, per lane
  exp_t  expq [MAX_LANES][$];     // results expected, per lane
  int    last_issue [MAX_LANES];
  int    cyc = 0;
  int    stall_pct = 0;
  bit    check_spacing = 0;

  int n_interleaved = 0, n_stall = 0, n_restart = 0, n_levels = 0, n_reconfig = 0;
  int n_spacing = 0, n_results = 0;

  always @(posedge clk) if (!rst) cyc <= cyc + 1;

  function automatic int_q make_subject(int kind);
    int_q s;
    int len;
    case (kind)
      0: begin
        len = $urandom_range(3, 10);
        repeat (len) s.push_back($urandom_range(0, 19));
      end
      1: begin   // query with one or two amino acids inserted in the middle
        foreach (query[i]) begin
          s.push_back(query[i]);
          if (i == query.size() / 2 - 1)
            repeat ($urandom_range(1, 2)) s.push_back($urandom_range(0, 19));
        end
      end
      2: begin   // query with one or two amino acids deleted from the middle
        int del = $urandom_range(1, 2);
        foreach (query[i])
          if (!(i >= query.size() / 2 && i < query.size() / 2 + del)) s.push_back(query[i]);
        if (s.size() == 0) s.push_back(query[0]);
      end
      default: begin  // random flanks around the query
        repeat ($urandom_range(0, 3)) s.push_back($urandom_range(0, 19));
        foreach (query[i]) s.push_back(query[i]);
        repeat ($urandom_range(0, 3)) s.push_back($urandom_range(0, 19));
      end
    endcase
    return s;
  endfunction

  task automatic add_subject(int lane, int_q s);
    int_q sc = sw_columns(query, s, tab, GAP_OPEN, GAP_EXT);
    foreach (s[j]) begin
      item_t it;
      it.aa = s[j]; it.first = (j == 0); it.last = (j == s.size() - 1); it.score = sc[j];
      pend[lane].push_back(it);
    end
  endtask

  task automatic load_config();
    @(negedge clk);
    for (int p = 0; p < N_PE; p++)
      for (int a = 0; a < 32; a++) begin
        cfg_in = '{valid: 1'b1, pe: pe_idx_t'(p), addr: aa_t'(a), data: sub_t'(tab[query[p]][a])};
        @(negedge clk);
      end
    cfg_in = '0;
    repeat (N_PE + 2) @(negedge clk);
    n_reconfig++;
  endtask

  function automatic bit all_idle();
    for (int k = 0; k < MAX_LANES; k++)
      if (pend[k].size() != 0 || expq[k].size() != 0) return 0;
    return 1;
  endfunction

  // one cycle of driving and checking, at the falling edge
  int frame_lanes = 0;
  task automatic step();
    @(negedge clk);
    // results
    if (res_valid) begin
      int k = int'(res_lane);
      checks++; n_results++;
      if (k >= MAX_LANES || expq[k].size() == 0) begin
        failures++; $display("FAIL cyc %0d: unexpected result on lane %0d", cyc, k);
      end else begin
        exp_t e = expq[k].pop_front();
        if (int'(res_score) != e.score || res_first != e.first || res_last != e.last || cyc != e.due) begin
          failures++;
          $display("FAIL cyc %0d lane %0d: score %0d first %b last %b, expected %0d %b %b due %0d",
                   cyc, k, res_score, res_first, res_last, e.score, e.first, e.last, e.due);
        end
      end
    end
    for (int k = 0; k < MAX_LANES; k++)
      if (expq[k].size() != 0 && expq[k][0].due < cyc) begin
        failures++; $display("FAIL cyc %0d lane %0d: result missing", cyc, k);
        void'(expq[k].pop_front());
      end
    // inputs
    if (cyc % LOOP_LEN == 0) begin
      if (frame_lanes >= 2) n_interleaved++;
      frame_lanes = 0;
    end
    for (int k = 0; k < MAX_LANES; k++) begin
      bit offer = pend[k].size() != 0 && $urandom_range(1, 100) > stall_pct;
      lane_valid[k] = offer;
      lane_aa[k]    = offer ? aa_t'(pend[k][0].aa) : '0;
      lane_first[k] = offer && pend[k][0].first;
      lane_last[k]  = offer && pend[k][0].last;
    end
    #1;
    for (int k = 0; k < MAX_LANES; k++) begin
      if (lane_ready[k]) begin
        item_t it;
        exp_t e;
        if (!lane_valid[k]) begin failures++; $display("FAIL ready without valid on lane %0d", k); continue; end
        it = pend[k].pop_front();
        e.score = it.score; e.first = it.first; e.last = it.last; e.due = cyc + LAT;
        expq[k].push_back(e);
        if (it.first) n_restart++;
        if (check_spacing && !it.first) begin
          checks++; n_spacing++;
          if (cyc - last_issue[k] != LOOP_LEN) begin
            failures++; $display("FAIL lane %0d: amino acids %0d cycles apart", k, cyc - last_issue[k]);
          end
        end
        last_issue[k] = cyc;
        frame_lanes++;
      end else if (pend[k].size() != 0 && !lane_valid[k]) begin
        n_stall++;   // counted every cycle the lane holds back; a bubble when its slot comes
      end
    end
  endtask

  task automatic run_until_idle(int max_cycles);
    int n = 0;
    while (!all_idle() && n < max_cycles) begin step(); n++; end
    if (!all_idle()) begin failures++; $display("FAIL phase did not drain"); end
    repeat (LOOP_LEN) step();
  endtask

  task automatic set_level(int l);
    // change only between frames with nothing in flight
    while (cyc % LOOP_LEN != LOOP_LEN - 1) step();
    level = LVL_W'(l);
    n_levels++;
    repeat (LOOP_LEN) step();
  endtask

  initial begin
    done = 0; checks = 0; failures = 0;
    cfg_in = '0; level = LVL_W'(MAX_LANES);
    for (int k = 0; k < MAX_LANES; k++) begin
      lane_valid[k] = 0; lane_first[k] = 0; lane_last[k] = 0; lane_aa[k] = '0; last_issue[k] = 0;
    end
    ev_zero = 0; ev_diag = 0; ev_up = 0; ev_left = 0; ev_ext = 0; ev_sat = 0; ev_keep_max = 0;
    for (int a = 0; a < 32; a++)
      for (int b = a; b < 32; b++) begin
        tab[a][b] = (a == b) ? $urandom_range(4, 11) : $signed($urandom_range(0, 6)) - 4;
        tab[b][a] = tab[a][b];
      end
    repeat (N_PE) query.push_back($urandom_range(0, 19));
    @(negedge clk);
    while (rst) @(negedge clk);

    // 1. full interleaving with stalls
    load_config();
    set_level(MAX_LANES);
    for (int k = 0; k < MAX_LANES; k++)
      for (int s = 0; s < 2; s++) add_subject(k, make_subject((k + s) % 4));
    stall_pct = 10;
    run_until_idle(LOOP_LEN * 40);
    stall_pct = 0;

    // 2. no interleaving
    set_level(1);
    check_spacing = 1;
    add_subject(0, make_subject(3));
    add_subject(0, make_subject(1));
    run_until_idle(LOOP_LEN * 40);

    // 3. interleaving level 3
    if (MAX_LANES >= 3) begin
      set_level(3);
      for (int k = 0; k < 3; k++) add_subject(k, make_subject(k + 1));
      run_until_idle(LOOP_LEN * 40);
    end
    check_spacing = 0;

    // 4. reconfiguration and saturation
    for (int i = 0; i < N_PE; i++) query[i] = 7;
    tab[7][7] = 100;
    load_config();
    set_level(MAX_LANES >= 2 ? 2 : 1);
    begin
      int_q s;
      repeat (N_PE + 2) s.push_back(7);
      add_subject(0, s);
      if (MAX_LANES >= 2) add_subject(1, make_subject(0));
    end
    run_until_idle(LOOP_LEN * 40);

    $display("mechanisms: interleaved_frames=%0d stalls=%0d restarts=%0d level_switches=%0d reconfigs=%0d spacing_checks=%0d",
             n_interleaved, n_stall, n_restart, n_levels, n_reconfig, n_spacing);
    $display("cells: diag=%0d up=%0d left=%0d gap_extend=%0d zero=%0d saturated=%0d max_kept=%0d results=%0d",
             ev_diag, ev_up, ev_left, ev_ext, ev_zero, ev_sat, ev_keep_max, n_results);
    checks++; if (n_interleaved == 0) begin failures++; $display("FAIL no interleaved frame"); end
    checks++; if (n_stall == 0)       begin failures++; $display("FAIL no stall"); end
    checks++; if (n_restart < 2)      begin failures++; $display("FAIL no subject restart"); end
    checks++; if (n_levels < 2)       begin failures++; $display("FAIL no level switch"); end
    checks++; if (n_reconfig < 2)     begin failures++; $display("FAIL no reconfiguration"); end
    checks++; if (n_spacing == 0)     begin failures++; $display("FAIL no spacing check"); end
    checks++; if (ev_up == 0 || ev_left == 0 || ev_diag == 0) begin failures++; $display("FAIL a MAX4 source never won"); end
    checks++; if (ev_ext == 0)        begin failures++; $display("FAIL no gap extension"); end
    checks++; if (ev_zero == 0)       begin failures++; $display("FAIL no zero clamp"); end
    checks++; if (ev_sat == 0)        begin failures++; $display("FAIL no saturation"); end
    checks++; if (ev_keep_max == 0)   begin failures++; $display("FAIL running maximum never kept"); end
    done = 1;
  end
endmodule
