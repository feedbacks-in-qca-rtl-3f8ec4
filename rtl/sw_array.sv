// sw_array: the Smith-Waterman systolic array for protein database search.
//
// The query sequence is held one amino acid per PE in a linear chain of N_PE
// identical PEs. Subject sequences from the database enter at the left, one
// amino acid per slot, and pass through the whole chain. The last PE
// delivers, for every slot, the maximum local-alignment score found so far
// for that subject. On a subject's last amino acid this is its final score.
//
// Feedback loops inside each PE are LOOP_LEN cycles long, so one subject can
// advance only one amino acid per LOOP_LEN cycles. The interleave_scheduler
// therefore feeds up to MAX_LANES independent subjects in turn, one lane per
// slot of the LOOP_LEN-cycle frame. With level = 1 the array takes one amino
// acid every LOOP_LEN cycles. With level = LOOP_LEN it takes one every
// cycle.
//
// Configuration: words on cfg_in (PE index, subject code, score) travel down
// the chain and load the query rows into the PE memories. A word for PE p
// takes effect p+1 cycles after it is presented. Load before streaming.
//
// Output timing: a slot leaves the array N_PE*PE_LAT + 1 cycles after
// lane_ready was high for it. res_lane tells which lane it belongs to.
// res_valid low marks a bubble.
//
// LOOP_LEN defaults to 141, the loop length of the U-shaped PE (208 for the
// straight one). The default chain of 6 PEs is the length drawn in the
// array's overview; the score and amino-acid widths come from sw_pkg.
module sw_array
  import sw_pkg::*;
#(
  parameter int N_PE      = 6,
  parameter int LOOP_LEN  = 141,
  parameter int MAX_LANES = LOOP_LEN,
  parameter int PE_LAT    = 1,
  parameter int GAP_OPEN  = 8,
  parameter int GAP_EXT   = 2,
  localparam int LANE_W   = (MAX_LANES > 1) ? $clog2(MAX_LANES) : 1,
  localparam int LVL_W    = $clog2(MAX_LANES + 1)
) (
  input  logic              clk,
  input  logic              rst,
  // configuration chain
  input  cfg_t              cfg_in,
  // interleaved subject lanes
  input  logic [LVL_W-1:0]  level,
  input  logic              lane_valid [MAX_LANES],
  input  logic              lane_first [MAX_LANES],
  input  logic              lane_last  [MAX_LANES],
  input  aa_t               lane_aa    [MAX_LANES],
  output logic              lane_ready [MAX_LANES],
  // scores
  output logic              res_valid,
  output logic              res_first,
  output logic              res_last,
  output logic [LANE_W-1:0] res_lane,
  output score_t            res_score
);
  localparam int DEPTH = N_PE * PE_LAT;

  stream_t           s   [N_PE+1];
  cfg_t              cfg [N_PE+1];
  logic [LANE_W-1:0] lane_in;
  logic [LANE_W-1:0] lane_pipe [DEPTH];

  interleave_scheduler #(.LOOP_LEN(LOOP_LEN), .MAX_LANES(MAX_LANES)) u_sched (
    .clk, .rst, .level,
    .lane_valid, .lane_first, .lane_last, .lane_aa, .lane_ready,
    .s_out(s[0]), .s_lane(lane_in)
  );

  assign cfg[0] = cfg_in;

  for (genvar p = 0; p < N_PE; p++) begin : g_pe
    sw_pe #(
      .PE_INDEX(p), .LOOP_LEN(LOOP_LEN), .PE_LAT(PE_LAT),
      .GAP_OPEN(GAP_OPEN), .GAP_EXT(GAP_EXT)
    ) u_pe (
      .clk, .rst,
      .cfg_in(cfg[p]), .cfg_out(cfg[p+1]),
      .s_in(s[p]),     .s_out(s[p+1])
    );
  end

  // The lane number travels beside the chain with the same latency.
  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < DEPTH; i++) lane_pipe[i] <= '0;
    end else begin
      lane_pipe[0] <= lane_in;
      for (int i = 1; i < DEPTH; i++) lane_pipe[i] <= lane_pipe[i-1];
    end
  end

  assign res_valid = s[N_PE].valid;
  assign res_first = s[N_PE].first;
  assign res_last  = s[N_PE].last;
  assign res_score = s[N_PE].m;
  assign res_lane  = lane_pipe[DEPTH-1];

  initial assert (N_PE >= 1 && N_PE <= (1 << PE_IDX_W))
    else $error("sw_array: N_PE out of range");
endmodule
