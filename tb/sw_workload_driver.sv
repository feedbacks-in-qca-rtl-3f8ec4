// sw_workload_driver: host model for the database-scan workloads.
//
// Loads the query T-E-L-K-D-D into a 6-PE array. The substitution table is
// +5 for identical amino acids and -3 otherwise, over the codes
// A R N D C Q E G H I L K M F P S T W Y V = 0..19. The driver then scans
// N_SUBJ subjects of SUBJ_LEN amino acids each, with interleaving level
// LEVEL: lane k takes subjects k, k+LEVEL, k+2*LEVEL, ... one after another.
// Subjects are pseudo-random (a fixed hash of subject and position, so every
// instance sees the same database). Subjects 12 and 13 carry a copy of the
// query with one substitution, and 13 an exact one as well. For each subject
// the driver checks the final score against sw_ref_pkg, and checks that a
// lane's amino acids are exactly LOOP_LEN cycles apart. It reports the scan
// time in cycles, from the first amino acid accepted to one frame after the
// last.
module sw_workload_driver
  import sw_pkg::*;
  import sw_ref_pkg::*;
#(
  parameter int LOOP_LEN  = 208,
  parameter int MAX_LANES = 3,
  parameter int LEVEL     = 1,
  parameter int N_SUBJ    = 14,
  parameter int SUBJ_LEN  = 103,
  localparam int N_PE     = 6,
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
  output longint            scan_cycles,
  output int                checks,
  output int                failures
);
  int   tab [32][32];
  int_q query;
  int_q subj [N_SUBJ];
  int   exp_score [N_SUBJ];
  int   next_subj [MAX_LANES];   // subject index the lane is on, -1 when finished
  int   pos [MAX_LANES];         // next amino acid of that subject
  int   res_subj [MAX_LANES][$]; // subjects whose final score is awaited
  longint cyc = 0, first_accept = -1, last_accept = 0;
  longint last_issue [MAX_LANES];
  int   finished = 0;

  always @(posedge clk) if (!rst) cyc <= cyc + 1;

  function automatic int hash_aa(int s, int j);
    int unsigned x = (s * 7919 + j * 104729 + 12345) * 2654435761;
    x = x ^ (x >> 15);
    return int'(x % 20);
  endfunction

  initial begin
    int_q q, sc;
    int k, s;
    done = 0; checks = 0; failures = 0; scan_cycles = 0;
    cfg_in = '0; level = LVL_W'(LEVEL);
    for (int k = 0; k < MAX_LANES; k++) begin
      lane_valid[k] = 0; lane_first[k] = 0; lane_last[k] = 0; lane_aa[k] = '0;
      next_subj[k] = (k < LEVEL && k < N_SUBJ) ? k : -1; pos[k] = 0; last_issue[k] = 0;
    end
    for (int a = 0; a < 32; a++)
      for (int b = 0; b < 32; b++) tab[a][b] = (a == b) ? 5 : -3;
    q = '{16, 6, 10, 11, 3, 3};           // T E L K D D
    query = q;
    for (int s = 0; s < N_SUBJ; s++) begin
      for (int j = 0; j < SUBJ_LEN; j++) subj[s].push_back(hash_aa(s, j));
      if (s == 12 || s == 13)
        for (int i = 0; i < N_PE; i++)
          subj[s][SUBJ_LEN / 2 + i] = (s == 12 && i == 2) ? 9 : query[i];
      if (s == 13)
        for (int i = 0; i < N_PE; i++) subj[s][SUBJ_LEN / 4 + i] = query[i];
      sc = sw_columns(query, subj[s], tab, 8, 2);
      exp_score[s] = sc[SUBJ_LEN - 1];
    end
    @(negedge clk);
    while (rst) @(negedge clk);
    for (int p = 0; p < N_PE; p++)
      for (int a = 0; a < 32; a++) begin
        cfg_in = '{valid: 1'b1, pe: pe_idx_t'(p), addr: aa_t'(a), data: sub_t'(tab[query[p]][a])};
        @(negedge clk);
      end
    cfg_in = '0;
    // start on a frame boundary so the level is applied from the first slot
    while (cyc % longint'(LOOP_LEN) != longint'(LOOP_LEN) - 1) @(negedge clk);
    while (finished < N_SUBJ) begin
      @(negedge clk);
      if (res_valid && res_last) begin
        k = int'(res_lane);
        checks++;
        if (res_subj[k].size() == 0) begin
          failures++; $display("FAIL unexpected final score on lane %0d", k);
        end else begin
          s = res_subj[k].pop_front();
          if (int'(res_score) != exp_score[s]) begin
            failures++; $display("FAIL subject %0d score %0d, expected %0d", s, res_score, exp_score[s]);
          end
          $display("  loop %0d level %0d: subject %0d score %0d", LOOP_LEN, LEVEL, s + 1, res_score);
        end
        finished++;
      end
      for (k = 0; k < MAX_LANES; k++) begin
        s = next_subj[k];
        lane_valid[k] = (s >= 0);
        lane_aa[k]    = (s >= 0) ? aa_t'(subj[s][pos[k]]) : '0;
        lane_first[k] = (s >= 0) && pos[k] == 0;
        lane_last[k]  = (s >= 0) && pos[k] == SUBJ_LEN - 1;
      end
      #1;
      for (k = 0; k < MAX_LANES; k++)
        if (lane_ready[k]) begin
          s = next_subj[k];
          if (first_accept < 0) first_accept = cyc;
          else if (last_issue[k] != 0) begin
            checks++;
            if (cyc - last_issue[k] != longint'(LOOP_LEN)) begin
              failures++; $display("FAIL lane %0d: %0d cycles between amino acids", k, cyc - last_issue[k]);
            end
          end
          last_issue[k] = cyc;
          last_accept = cyc;
          pos[k]++;
          if (pos[k] == SUBJ_LEN) begin
            res_subj[k].push_back(s);
            pos[k] = 0;
            next_subj[k] = (s + LEVEL < N_SUBJ) ? s + LEVEL : -1;
          end
        end
    end
    scan_cycles = last_accept - first_accept + longint'(LOOP_LEN);
    done = 1;
  end
endmodule
