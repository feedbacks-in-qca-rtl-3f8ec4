// tb_workload_scan: the database-scan timing comparison. Fourteen subjects of
// 103 amino acids each are scanned against the 6-amino-acid query T-E-L-K-D-D
// by three arrays at once:
//   A  straight PE, 208-cycle loops, no interleaving;
//   B  U-shaped PE, 141-cycle loops, no interleaving;
//   C  straight PE, 208-cycle loops, interleaving level 3.
// At 100 MHz, 14 subjects of 824 amino acids take 14 x 824 x 208 cycles, the
// 24 ms of the straight design, and 14 x 824 x 141 cycles, about 16 ms. The
// length 824 is derived from those figures. The scan here uses one eighth of
// it to keep the simulation short, so the reported times are one eighth of the
// full ones (3.0 ms and 2.0 ms). Level 3 runs three subjects at a time. Every final score is
// checked against the software reference, every lane's spacing against the
// loop length, and each scan time against its exact cycle count.
module tb_workload_scan;
  import sw_pkg::*;
  localparam int N_SUBJ = 14, SUBJ_LEN = 103, MAX_LANES = 3;
  localparam int LANE_W = $clog2(MAX_LANES), LVL_W = $clog2(MAX_LANES + 1);

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  cfg_t   cfg [3];
  logic [LVL_W-1:0] level [3];
  logic   lv [3][MAX_LANES], lf [3][MAX_LANES], ll [3][MAX_LANES], lr [3][MAX_LANES];
  aa_t    la [3][MAX_LANES];
  logic   rv [3], rf [3], rl [3], dn [3];
  logic [LANE_W-1:0] rla [3];
  score_t rs [3];
  longint cycles [3];
  int     ck [3], fl [3];

  localparam int LOOPS [3]  = '{208, 141, 208};
  localparam int LEVELS [3] = '{1, 1, 3};

  for (genvar g = 0; g < 3; g++) begin : g_run
    sw_array #(.N_PE(6), .LOOP_LEN(LOOPS[g]), .MAX_LANES(MAX_LANES)) dut (
      .clk, .rst, .cfg_in(cfg[g]), .level(level[g]),
      .lane_valid(lv[g]), .lane_first(lf[g]), .lane_last(ll[g]), .lane_aa(la[g]), .lane_ready(lr[g]),
      .res_valid(rv[g]), .res_first(rf[g]), .res_last(rl[g]), .res_lane(rla[g]), .res_score(rs[g]));
    sw_workload_driver #(.LOOP_LEN(LOOPS[g]), .MAX_LANES(MAX_LANES), .LEVEL(LEVELS[g]),
                         .N_SUBJ(N_SUBJ), .SUBJ_LEN(SUBJ_LEN)) drv (
      .clk, .rst, .cfg_in(cfg[g]), .level(level[g]),
      .lane_valid(lv[g]), .lane_first(lf[g]), .lane_last(ll[g]), .lane_aa(la[g]), .lane_ready(lr[g]),
      .res_valid(rv[g]), .res_first(rf[g]), .res_last(rl[g]), .res_lane(rla[g]), .res_score(rs[g]),
      .done(dn[g]), .scan_cycles(cycles[g]), .checks(ck[g]), .failures(fl[g]));
  end

  int checks = 0, failures = 0;

  initial begin
    repeat (400000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", ck[0] + ck[1] + ck[2], fl[0] + fl[1] + fl[2] + 1);
    $finish;
  end

  initial begin
    longint exp_c [3];
    int rounds, last_lane, offset;
    repeat (3) @(negedge clk);
    rst = 0;
    wait (dn[0] && dn[1] && dn[2]);
    for (int g = 0; g < 3; g++) begin
      // the lane that finishes last starts its slot ceil(k*LOOP/LEVEL) into the frame
      rounds    = (N_SUBJ + LEVELS[g] - 1) / LEVELS[g];
      last_lane = (N_SUBJ - 1) % LEVELS[g];
      offset    = (last_lane * LOOPS[g] + LEVELS[g] - 1) / LEVELS[g];
      exp_c[g]  = longint'(rounds) * SUBJ_LEN * LOOPS[g] + longint'(offset);
      checks += ck[g] + 1; failures += fl[g];
      $display("run %s: loop %0d, level %0d: %0d cycles = %0.2f ms at 100 MHz (expected %0d)",
               g == 0 ? "A" : g == 1 ? "B" : "C", LOOPS[g], LEVELS[g], cycles[g], cycles[g] / 1.0e5, exp_c[g]);
      if (cycles[g] != exp_c[g]) begin failures++; $display("FAIL scan time"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
