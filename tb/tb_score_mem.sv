// tb_score_mem: fills the PE score memory with random signed scores, reads
// every entry back, overwrites some and checks that only those changed.
module tb_score_mem;
  import sw_pkg::*;
  logic clk = 0;
  logic we;
  aa_t  waddr, raddr;
  sub_t wdata, rdata;
  int   model [AA_CODES];
  int checks = 0, failures = 0;

  score_mem dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  always #5 clk = ~clk;

  initial begin
    #200000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write(int a, int d);
    @(negedge clk); we = 1; waddr = aa_t'(a); wdata = sub_t'(d);
    @(negedge clk); we = 0;
    model[a] = d;
  endtask

  task automatic read_all();
    for (int a = 0; a < AA_CODES; a++) begin
      raddr = aa_t'(a); #1;
      checks++;
      if (int'(rdata) != model[a]) begin
        failures++;
        $display("FAIL mem[%0d] = %0d, expected %0d", a, rdata, model[a]);
      end
    end
  endtask

  initial begin
    we = 0; waddr = '0; wdata = '0; raddr = '0;
    for (int a = 0; a < AA_CODES; a++) write(a, $signed($urandom_range(0, 255)) - 128);
    read_all();
    repeat (40) write($urandom_range(0, AA_CODES - 1), $signed($urandom_range(0, 255)) - 128);
    read_all();
    // with we low, data on the write port must not be stored
    @(negedge clk); waddr = 5'd3; wdata = sub_t'(model[3] + 1);
    @(negedge clk);
    read_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
