// qca_sw_top: top level. Two designs sit side by side, each with its own
// ports.
//  * sw_array: the Smith-Waterman systolic array, with PE loops of
//    LOOP_LEN = 141 cycles and up to LOOP_LEN interleaved subject lanes.
//  * loop_accumulator: the small feedback example, an adder with a
//    4-cycle loop, usable stalled or with 4 interleaved sums.
// Timing and interfaces are those of the two modules; see their headers.
module qca_sw_top
  import sw_pkg::*;
#(
  parameter int N_PE      = 6,
  parameter int LOOP_LEN  = 141,
  parameter int MAX_LANES = LOOP_LEN,
  parameter int ACC_LOOP  = 4,
  parameter int ACC_W     = 8,
  localparam int LANE_W   = (MAX_LANES > 1) ? $clog2(MAX_LANES) : 1,
  localparam int LVL_W    = $clog2(MAX_LANES + 1)
) (
  input  logic              clk,
  input  logic              rst,
  // Smith-Waterman array
  input  cfg_t              cfg_in,
  input  logic [LVL_W-1:0]  level,
  input  logic              lane_valid [MAX_LANES],
  input  logic              lane_first [MAX_LANES],
  input  logic              lane_last  [MAX_LANES],
  input  aa_t               lane_aa    [MAX_LANES],
  output logic              lane_ready [MAX_LANES],
  output logic              res_valid,
  output logic              res_first,
  output logic              res_last,
  output logic [LANE_W-1:0] res_lane,
  output score_t            res_score,
  // loop accumulator example
  input  logic              acc_in_valid,
  input  logic              acc_in_first,
  input  logic [ACC_W-1:0]  acc_in_data,
  output logic              acc_out_valid,
  output logic [ACC_W-1:0]  acc_out_sum
);
  sw_array #(.N_PE(N_PE), .LOOP_LEN(LOOP_LEN), .MAX_LANES(MAX_LANES)) u_sw (
    .clk, .rst, .cfg_in, .level,
    .lane_valid, .lane_first, .lane_last, .lane_aa, .lane_ready,
    .res_valid, .res_first, .res_last, .res_lane, .res_score
  );

  loop_accumulator #(.LOOP(ACC_LOOP), .W(ACC_W)) u_acc (
    .clk, .rst,
    .in_valid(acc_in_valid), .in_first(acc_in_first), .in_data(acc_in_data),
    .out_valid(acc_out_valid), .out_sum(acc_out_sum)
  );
endmodule
