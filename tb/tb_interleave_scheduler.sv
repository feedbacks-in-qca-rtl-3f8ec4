// tb_interleave_scheduler: runs the input scheduler with a 208-cycle frame
// and 8 lanes. For every cycle it predicts which lane owns the slot: lane k
// of L active lanes owns slot ceil(k*208/L). It checks lane_ready, then the
// registered slot on s_out one cycle later (amino acid, flags, lane number).
// Stimulus covers levels 3 (slots 0, 70, 139), 1, 8, 0 (clamped to 1) and
// 9 (clamped to 8), plus random lane stalls that must turn into bubbles.
module tb_interleave_scheduler;
  import sw_pkg::*;
  localparam int LOOP_LEN = 208, MAX_LANES = 8;
  localparam int LANE_W = $clog2(MAX_LANES), LVL_W = $clog2(MAX_LANES + 1);

  logic clk = 0, rst = 1;
  logic [LVL_W-1:0] level;
  logic lane_valid [MAX_LANES], lane_first [MAX_LANES], lane_last [MAX_LANES];
  aa_t  lane_aa [MAX_LANES];
  logic lane_ready [MAX_LANES];
  stream_t s_out;
  logic [LANE_W-1:0] s_lane;

  interleave_scheduler #(.LOOP_LEN(LOOP_LEN), .MAX_LANES(MAX_LANES)) dut (
    .clk, .rst, .level, .lane_valid, .lane_first, .lane_last, .lane_aa, .lane_ready, .s_out, .s_lane);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, issued = 0, bubbles = 0;
  int cyc = 0;            // rising edges since reset was released
  int eff_level = 3;      // level present when the first frame starts
  int cnt [MAX_LANES];
  int exp_lane;           // lane expected on s_out after the edge, -1 = bubble
  aa_t exp_aa; logic exp_first, exp_last;
  int spacing_last [MAX_LANES];

  always @(posedge clk) if (!rst) cyc <= cyc + 1;

  initial begin
    #20000000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int owner(int slot, int lvl);
    for (int k = 0; k < lvl; k++)
      if (slot == (k * LOOP_LEN + lvl - 1) / lvl) return k;
    return -1;
  endfunction

  task automatic run_frames(int lvl_in, int frames, int stall_pct);
    for (int k = 0; k < MAX_LANES; k++) spacing_last[k] = -1;
    for (int f = 0; f < frames * LOOP_LEN; f++) begin
      int slot, own;
      @(negedge clk);
      // check the slot registered at the last edge
      if (exp_lane >= 0) begin
        checks++;
        if (!s_out.valid || s_out.aa != exp_aa || s_out.first != exp_first ||
            s_out.last != exp_last || int'(s_lane) != exp_lane) begin
          failures++;
          $display("FAIL cyc %0d: s_out %p lane %0d, expected lane %0d aa %0d", cyc, s_out, s_lane, exp_lane, exp_aa);
        end
      end else begin
        checks++;
        if (s_out.valid) begin failures++; $display("FAIL cyc %0d: unexpected valid slot", cyc); end
      end
      slot = cyc % LOOP_LEN;
      level = LVL_W'(lvl_in);
      if (slot == 0) eff_level = (lvl_in == 0) ? 1 : (lvl_in > MAX_LANES ? MAX_LANES : lvl_in);
      for (int k = 0; k < MAX_LANES; k++) begin
        lane_valid[k] = 1'($urandom_range(1, 100) > stall_pct);
        lane_aa[k]    = aa_t'(cnt[k]);
        lane_first[k] = (cnt[k] % 5 == 0);
        lane_last[k]  = (cnt[k] % 5 == 4);
      end
      #1;
      own = owner(slot, eff_level);
      for (int k = 0; k < MAX_LANES; k++) begin
        logic exp_r = (own == k) && lane_valid[k];
        checks++;
        if (lane_ready[k] != exp_r) begin
          failures++;
          $display("FAIL cyc %0d slot %0d lane %0d ready=%b expected %b", cyc, slot, k, lane_ready[k], exp_r);
        end
      end
      exp_lane = -1;
      if (own >= 0) begin
        if (lane_valid[own]) begin
          exp_lane = own; exp_aa = lane_aa[own];
          exp_first = lane_first[own]; exp_last = lane_last[own];
          if (stall_pct == 0 && spacing_last[own] >= 0) begin
            checks++;
            if (cyc - spacing_last[own] != LOOP_LEN) begin
              failures++; $display("FAIL lane %0d spacing %0d", own, cyc - spacing_last[own]);
            end
          end
          spacing_last[own] = cyc;
          cnt[own]++; issued++;
        end else bubbles++;
      end
    end
  endtask

  initial begin
    level = LVL_W'(3); exp_lane = -1;
    for (int k = 0; k < MAX_LANES; k++) begin
      cnt[k] = 0; lane_valid[k] = 0; lane_first[k] = 0; lane_last[k] = 0; lane_aa[k] = '0;
      spacing_last[k] = -1;
    end
    repeat (2) @(negedge clk);
    rst = 0;
    // frame 0 must start with the level applied at reset release
    run_frames(3, 4, 0);
    checks++;
    if (owner(70, 3) != 1 || owner(139, 3) != 2) begin failures++; $display("FAIL slot table"); end
    run_frames(3, 4, 30);
    run_frames(1, 3, 0);
    run_frames(8, 3, 0);
    run_frames(8, 2, 40);
    run_frames(0, 2, 0);
    run_frames(9, 2, 0);
    @(negedge clk);
    checks++;
    if (issued == 0 || bubbles == 0) begin failures++; $display("FAIL coverage issued=%0d bubbles=%0d", issued, bubbles); end
    $display("scheduler: %0d amino acids issued, %0d stalled slots", issued, bubbles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
