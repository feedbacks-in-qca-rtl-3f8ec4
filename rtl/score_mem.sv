// score_mem: the MEMORY of a PE, holding the stored query amino acid as its
// row of substitution scores.
//
// Entry a holds the score for aligning the stored query amino acid with a
// subject amino acid of code a. Storing the row rather than the bare amino-acid
// code, so the score is read straight out, is this design's reading of the
// memory, decoder and OR blocks of the PE.
// Writes are synchronous: a decoder turns waddr into one-hot word enables.
// Reads are combinational: a decoder selects one word, and an OR tree merges
// the gated words onto rdata.
module score_mem
  import sw_pkg::*;
#(
  parameter int DEPTH = AA_CODES
) (
  input  logic clk,
  input  logic we,
  input  aa_t  waddr,
  input  sub_t wdata,
  input  aa_t  raddr,
  output sub_t rdata
);
  sub_t word [DEPTH];
  logic [DEPTH-1:0] wsel, rsel;

  always_comb begin
    for (int i = 0; i < DEPTH; i++) begin
      wsel[i] = we && (waddr == aa_t'(i));
      rsel[i] = (raddr == aa_t'(i));
    end
  end

  always_ff @(posedge clk) begin
    for (int i = 0; i < DEPTH; i++)
      if (wsel[i]) word[i] <= wdata;
  end

  always_comb begin
    rdata = '0;
    for (int i = 0; i < DEPTH; i++)
      rdata = rdata | (word[i] & {SCORE_W{rsel[i]}});
  end
endmodule
