// interleave_scheduler: the input stage that interleaves subject sequences.
//
// A loop of LOOP_LEN cycles in every PE means the next amino acid of one
// subject may enter only LOOP_LEN cycles after the previous one. The
// scheduler divides time into frames of LOOP_LEN slots and gives each of the
// `level` active lanes (1..MAX_LANES) one slot per frame. Lane k owns slot
// ceil(k*LOOP_LEN/level), found with an error accumulator as in line
// drawing, so the lanes are spread as evenly as the frame length allows.
// For example, 208 cycles and 3 lanes give slots 0, 70 and 139. level = 1 is
// the non-interleaved case, with one amino acid every LOOP_LEN cycles;
// level = LOOP_LEN fills every slot.
//
// Interface: lane k offers an amino acid with lane_valid[k]. In lane k's
// slot the scheduler registers it onto s_out and pulses lane_ready[k] in the
// same cycle (valid/ready transfer). If lane k has nothing to offer, the
// slot becomes a bubble: valid low, and the lane's state in the PEs is held
// (a stall). Slots owned by no lane are bubbles too. s_lane is the owning
// lane of the slot on s_out. `level` is sampled at the start of every frame
// and must only change while no subject is in flight; values outside
// 1..MAX_LANES are clamped. The slot placement and the handshake are this
// design's choices.
module interleave_scheduler
  import sw_pkg::*;
#(
  parameter int LOOP_LEN  = 141,
  parameter int MAX_LANES = LOOP_LEN,
  localparam int LANE_W   = (MAX_LANES > 1) ? $clog2(MAX_LANES) : 1,
  localparam int LVL_W    = $clog2(MAX_LANES + 1),
  localparam int SLOT_W   = (LOOP_LEN > 1) ? $clog2(LOOP_LEN) : 1,
  localparam int ERR_W    = $clog2(LOOP_LEN + MAX_LANES + 1) + 2
) (
  input  logic               clk,
  input  logic               rst,
  input  logic [LVL_W-1:0]   level,
  input  logic               lane_valid [MAX_LANES],
  input  logic               lane_first [MAX_LANES],
  input  logic               lane_last  [MAX_LANES],
  input  aa_t                lane_aa    [MAX_LANES],
  output logic               lane_ready [MAX_LANES],
  output stream_t            s_out,
  output logic [LANE_W-1:0]  s_lane
);
  logic [SLOT_W-1:0]       slot;
  logic [LVL_W-1:0]        lvl_q, lvl;
  logic [LVL_W-1:0]        k_q, k;
  logic signed [ERR_W-1:0] err_q, err;
  logic                    issue, take;
  logic [LANE_W-1:0]       lane;

  always_comb begin
    if (slot == '0) begin
      if (level == '0)                           lvl = LVL_W'(1);
      else if (int'(level) > MAX_LANES)          lvl = LVL_W'(MAX_LANES);
      else                                       lvl = level;
      k   = '0;
      err = '0;
    end else begin
      lvl = lvl_q;
      k   = k_q;
      err = err_q;
    end
    issue = (k < lvl) && (err >= 0);
    lane  = LANE_W'(k);
    take  = issue && lane_valid[lane];
    for (int i = 0; i < MAX_LANES; i++)
      lane_ready[i] = take && (lane == LANE_W'(i));
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      slot        <= '0;
      lvl_q       <= LVL_W'(1);
      k_q         <= '0;
      err_q       <= '0;
      s_out       <= '0;
      s_lane      <= '0;
    end else begin
      slot  <= (slot == SLOT_W'(LOOP_LEN - 1)) ? '0 : slot + 1'b1;
      lvl_q <= lvl;
      k_q   <= k + LVL_W'(issue);
      err_q <= err + ERR_W'(lvl) - (issue ? ERR_W'(LOOP_LEN) : '0);
      s_out <= '{valid: take,
                 first: take && lane_first[lane],
                 last:  take && lane_last[lane],
                 aa:    take ? lane_aa[lane] : '0,
                 h: '0, src: SRC_ZERO, m: '0};
      s_lane      <= lane;
    end
  end

  // Handshake rules: at most one lane is served per cycle, and only a lane
  // that offers an amino acid.
  logic [MAX_LANES-1:0] ready_vec, valid_vec;
  always_comb
    for (int i = 0; i < MAX_LANES; i++) begin
      ready_vec[i] = lane_ready[i];
      valid_vec[i] = lane_valid[i];
    end

  a_one_ready: assert property (@(posedge clk) disable iff (rst)
    (ready_vec & (ready_vec - 1'b1)) == '0);
  a_ready_valid: assert property (@(posedge clk) disable iff (rst)
    (ready_vec & ~valid_vec) == '0);

  initial assert (MAX_LANES >= 1 && MAX_LANES <= LOOP_LEN)
    else $error("interleave_scheduler: MAX_LANES must be 1..LOOP_LEN");
endmodule
