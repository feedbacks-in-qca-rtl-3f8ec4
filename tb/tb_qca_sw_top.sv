// tb_qca_sw_top: end-to-end test of the top level at its default size:
// 6 PEs, 141-cycle loops and 141 interleaved lanes, plus the 4-cycle-loop
// accumulator.
// The array part is sw_stream_checker: full interleaving with stalls, no
// interleaving, level 3, reconfiguration and saturation, every result checked
// against the software recurrence and its arrival cycle. The accumulator part
// runs one stalled sum and then four interleaved sums, checking each output.
// Every mechanism must occur at least once.
module tb_qca_sw_top;
  import sw_pkg::*;
  localparam int N_PE = 6, LOOP_LEN = 141, MAX_LANES = 141, ACC_LOOP = 4, ACC_W = 8;
  localparam int LANE_W = $clog2(MAX_LANES), LVL_W = $clog2(MAX_LANES + 1);

  logic clk = 0, rst = 1;
  cfg_t cfg_in;
  logic [LVL_W-1:0] level;
  logic lane_valid [MAX_LANES], lane_first [MAX_LANES], lane_last [MAX_LANES], lane_ready [MAX_LANES];
  aa_t  lane_aa [MAX_LANES];
  logic res_valid, res_first, res_last, done;
  logic [LANE_W-1:0] res_lane;
  score_t res_score;
  logic acc_in_valid, acc_in_first, acc_out_valid;
  logic [ACC_W-1:0] acc_in_data, acc_out_sum;
  int sw_checks, sw_failures;
  int acc_checks = 0, acc_failures = 0, acc_stalled = 0, acc_interleaved = 0;

  always #5 clk = ~clk;

  qca_sw_top dut (
    .clk, .rst, .cfg_in, .level, .lane_valid, .lane_first, .lane_last, .lane_aa, .lane_ready,
    .res_valid, .res_first, .res_last, .res_lane, .res_score,
    .acc_in_valid, .acc_in_first, .acc_in_data, .acc_out_valid, .acc_out_sum);

  sw_stream_checker #(.N_PE(N_PE), .LOOP_LEN(LOOP_LEN), .MAX_LANES(MAX_LANES), .PE_LAT(1)) chk (
    .clk, .rst, .cfg_in, .level, .lane_valid, .lane_first, .lane_last, .lane_aa, .lane_ready,
    .res_valid, .res_first, .res_last, .res_lane, .res_score, .done, .checks(sw_checks), .failures(sw_failures));

  initial begin
    repeat (400000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", sw_checks + acc_checks, sw_failures + acc_failures + 1);
    $finish;
  end

  task automatic acc_check(int exp);
    acc_checks++;
    if (!acc_out_valid || int'(acc_out_sum) != exp) begin
      acc_failures++; $display("FAIL accumulator %0d, expected %0d", acc_out_sum, exp);
    end
  endtask

  // accumulator, alongside the array
  initial begin
    int acc [ACC_LOOP];
    int x, total;
    total = 0;
    acc_in_valid = 0; acc_in_first = 0; acc_in_data = '0;
    repeat (4) @(negedge clk);
    // stalled: one input every ACC_LOOP cycles
    for (int n = 0; n < 8; n++) begin
      x = $urandom_range(0, 30);
      total = (total + x) % 256;
      acc_in_valid = 1; acc_in_first = (n == 0); acc_in_data = ACC_W'(x);
      @(negedge clk);
      acc_in_valid = 0; acc_in_first = 0;
      acc_check(total); acc_stalled++;
      repeat (ACC_LOOP - 1) @(negedge clk);
    end
    // interleaved: ACC_LOOP sums, one input per cycle
    for (int r = 0; r < 6; r++)
      for (int k = 0; k < ACC_LOOP; k++) begin
        x = $urandom_range(0, 30);
        acc[k] = (r == 0) ? x : (acc[k] + x) % 256;
        acc_in_valid = 1; acc_in_first = (r == 0); acc_in_data = ACC_W'(x);
        @(negedge clk);
        acc_check(acc[k]); acc_interleaved++;
      end
    acc_in_valid = 0; acc_in_first = 0;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    wait (done);
    repeat (10) @(negedge clk);
    $display("accumulator: stalled inputs=%0d interleaved inputs=%0d", acc_stalled, acc_interleaved);
    acc_checks++;
    if (acc_stalled == 0 || acc_interleaved == 0) begin acc_failures++; $display("FAIL accumulator coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", sw_checks + acc_checks, sw_failures + acc_failures);
    $finish;
  end
endmodule
