// tb_loop_accumulator: runs the 4-cycle-loop accumulator in both ways the
// loop allows and checks every sum.
//  1. Stalled: one sum, a new input every 4 cycles, bubbles in between.
//  2. Interleaved: four independent sums, inputs sent in turn every cycle.
//  3. Misuse: one sum fed every cycle. The test checks that the result differs
//     from the true total: a stale partial sum is added, as expected of a
//     4-cycle loop.
// It also checks the one-cycle output latency.
module tb_loop_accumulator;
  localparam int LOOP = 4, W = 8;
  logic clk = 0, rst = 1;
  logic in_valid, in_first;
  logic [W-1:0] in_data, out_sum;
  logic out_valid;
  int checks = 0, failures = 0;

  loop_accumulator #(.LOOP(LOOP), .W(W)) dut (.clk, .rst, .in_valid, .in_first, .in_data, .out_valid, .out_sum);

  always #5 clk = ~clk;

  initial begin
    #500000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // send one input; one cycle later the sum must be on the output
  task automatic send(logic v, logic f, int x, int exp, logic chk);
    @(negedge clk); in_valid = v; in_first = f; in_data = W'(x);
    @(negedge clk); in_valid = 0; in_first = 0;
    if (chk) begin
      checks++;
      if (!out_valid || int'(out_sum) != exp) begin
        failures++; $display("FAIL sum=%0d valid=%b expected %0d", out_sum, out_valid, exp);
      end
    end
  endtask

  initial begin
    int acc [LOOP];
    int x, total;
    in_valid = 0; in_first = 0; in_data = '0;
    repeat (2) @(negedge clk);
    rst = 0;
    // 1. stalled single operation
    total = 0;
    for (int n = 0; n < 12; n++) begin
      x = $urandom_range(0, 20);
      total = (total + x) % 256;
      send(1, n == 0, x, total, 1);
      repeat (LOOP - 2) @(negedge clk);   // bubbles: 4 cycles per input
    end
    // 2. four interleaved operations, one input per cycle
    @(negedge clk);
    for (int r = 0; r < 10; r++)
      for (int k = 0; k < LOOP; k++) begin
        x = $urandom_range(0, 20);
        acc[k] = (r == 0) ? x : (acc[k] + x) % 256;
        in_valid = 1; in_first = (r == 0); in_data = W'(x);
        @(negedge clk);
        checks++;
        if (!out_valid || int'(out_sum) != acc[k]) begin
          failures++; $display("FAIL lane %0d sum=%0d expected %0d", k, out_sum, acc[k]);
        end
      end
    in_valid = 0; in_first = 0;
    repeat (LOOP) @(negedge clk);
    // 3. one operation fed every cycle goes wrong
    total = 0;
    for (int n = 0; n < 8; n++) begin
      in_valid = 1; in_first = (n == 0); in_data = W'(n + 1);
      total += n + 1;
      @(negedge clk);
    end
    in_valid = 0;
    checks++;
    if (int'(out_sum) == total) begin failures++; $display("FAIL back-to-back inputs gave the true total"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
