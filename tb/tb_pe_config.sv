// tb_pe_config: sends random configuration words through one configuration
// stage (index 3). Checks that the stage forwards each word one cycle later,
// and that it raises the memory write only for words addressed to it.
module tb_pe_config;
  import sw_pkg::*;
  localparam int IDX = 3;
  logic clk = 0, rst = 1;
  cfg_t cfg_in, cfg_out, prev;
  logic mem_we;
  aa_t  mem_addr;
  sub_t mem_data;
  int checks = 0, failures = 0, hits = 0;

  pe_config #(.PE_INDEX(IDX)) dut (.clk, .rst, .cfg_in, .cfg_out, .mem_we, .mem_addr, .mem_data);

  always #5 clk = ~clk;

  initial begin
    #200000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cfg_in = '0; prev = '0;
    repeat (2) @(negedge clk);
    rst = 0;
    repeat (500) begin
      @(negedge clk);
      // output now shows the word applied in the previous cycle
      checks++;
      if (cfg_out != prev) begin
        failures++; $display("FAIL forward: %h, expected %h", cfg_out, prev);
      end
      cfg_in.valid = 1'($urandom_range(0, 3) != 0);
      cfg_in.pe    = pe_idx_t'(($urandom_range(0, 1) != 0) ? IDX : int'($urandom_range(0, 7)));
      cfg_in.addr  = aa_t'($urandom);
      cfg_in.data  = sub_t'($urandom);
      #1;
      checks++;
      if (mem_we != (cfg_in.valid && int'(cfg_in.pe) == IDX) ||
          (mem_we && (mem_addr != cfg_in.addr || mem_data != cfg_in.data))) begin
        failures++; $display("FAIL decode: we=%b word=%h", mem_we, cfg_in);
      end
      if (mem_we) hits++;
      prev = cfg_in;
    end
    checks++;
    if (hits == 0) begin failures++; $display("FAIL no write decoded"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
