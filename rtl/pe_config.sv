// pe_config: the configuration part of a PE.
//
// Configuration words (PE index, subject amino-acid code, score) move down
// the chain of PEs one register per PE, alongside the systolic data path.
// The stage decodes the word at its input: when it is valid and addressed to
// PE_INDEX it raises mem_we for one cycle, with the address and data routed
// to the PE memory (the demultiplexer). In the same cycle it registers the
// word on to the next PE. The word format and the addressing by PE index are
// this design's choices. Reset clears the outgoing valid bit.
module pe_config
  import sw_pkg::*;
#(
  parameter int PE_INDEX = 0
) (
  input  logic clk,
  input  logic rst,
  input  cfg_t cfg_in,
  output cfg_t cfg_out,
  output logic mem_we,
  output aa_t  mem_addr,
  output sub_t mem_data
);
  always_ff @(posedge clk) begin
    if (rst) cfg_out <= '0;
    else     cfg_out <= cfg_in;
  end

  assign mem_we   = cfg_in.valid && (cfg_in.pe == pe_idx_t'(PE_INDEX));
  assign mem_addr = cfg_in.addr;
  assign mem_data = cfg_in.data;
endmodule
