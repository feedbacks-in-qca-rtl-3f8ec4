// tb_sw_array: the systolic array at reduced size (4 PEs, 7-cycle loops,
// 7 lanes, 2-cycle PE latency), driven and checked by sw_stream_checker.
module tb_sw_array;
  import sw_pkg::*;
  localparam int N_PE = 4, LOOP_LEN = 7, MAX_LANES = 7, PE_LAT = 2;
  localparam int LANE_W = $clog2(MAX_LANES), LVL_W = $clog2(MAX_LANES + 1);

  logic clk = 0, rst = 1;
  cfg_t cfg_in;
  logic [LVL_W-1:0] level;
  logic lane_valid [MAX_LANES], lane_first [MAX_LANES], lane_last [MAX_LANES], lane_ready [MAX_LANES];
  aa_t  lane_aa [MAX_LANES];
  logic res_valid, res_first, res_last, done;
  logic [LANE_W-1:0] res_lane;
  score_t res_score;
  int checks, failures;

  always #5 clk = ~clk;

  sw_array #(.N_PE(N_PE), .LOOP_LEN(LOOP_LEN), .MAX_LANES(MAX_LANES), .PE_LAT(PE_LAT)) dut (
    .clk, .rst, .cfg_in, .level, .lane_valid, .lane_first, .lane_last, .lane_aa, .lane_ready,
    .res_valid, .res_first, .res_last, .res_lane, .res_score);

  sw_stream_checker #(.N_PE(N_PE), .LOOP_LEN(LOOP_LEN), .MAX_LANES(MAX_LANES), .PE_LAT(PE_LAT)) chk (
    .clk, .rst, .cfg_in, .level, .lane_valid, .lane_first, .lane_last, .lane_aa, .lane_ready,
    .res_valid, .res_first, .res_last, .res_lane, .res_score, .done, .checks, .failures);

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    wait (done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
