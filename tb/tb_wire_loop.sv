// tb_wire_loop: drives a 5-cycle wire loop with random data and random
// enables. The model is a 5-entry FIFO: each cycle it shifts in either the
// new value (enable high) or the value coming out (enable low). The test
// checks the output every cycle and that a held value stays put for a frame.
module tb_wire_loop;
  localparam int LEN = 5;
  logic clk = 0, rst = 1, en;
  logic [7:0] d, q;
  logic [7:0] model [$];
  int checks = 0, failures = 0, holds = 0;

  wire_loop #(.LEN(LEN), .T(logic [7:0])) dut (.clk, .rst, .en, .d, .q);

  always #5 clk = ~clk;

  initial begin
    #200000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 0; d = '0;
    repeat (LEN) model.push_back(8'h00);
    repeat (2) @(negedge clk);
    rst = 0;
    repeat (1000) begin
      @(negedge clk);
      checks++;
      if (q != model[0]) begin
        failures++; $display("FAIL q=%h expected %h", q, model[0]);
      end
      en = 1'($urandom_range(0, 2) != 0);
      d  = 8'($urandom);
      if (!en) holds++;
      model.push_back(en ? d : model[0]);
      void'(model.pop_front());
    end
    checks++;
    if (holds == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
