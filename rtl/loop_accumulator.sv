// loop_accumulator: an accumulator in an intrinsically pipelined technology.
//
// The adder's output reaches its own input again only after LOOP clock
// cycles, because the wire back is a chain of clock zones (LOOP registers).
// A sum whose inputs arrive more often than once per LOOP cycles adds to a
// stale value. Correct use is either
//  * stalling: one operation, with a new input only every LOOP cycles (the
//    cycles in between are bubbles, in_valid low); or
//  * interleaving: LOOP independent sums, their inputs sent in turn, one
//    per cycle, which restores full throughput.
// Interface: on a cycle with in_valid, sum = in_data + (in_first ? 0 :
// the value LOOP cycles back). The sum appears on out_sum with out_valid
// one cycle later. On bubbles the loop recirculates, so every operation
// keeps its partial sum. The loop length of 4 follows the description. The
// width, the in_first clear and the bubble hold are this design's choices.
module loop_accumulator #(
  parameter int LOOP = 4,
  parameter int W    = 8
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         in_valid,
  input  logic         in_first,
  input  logic [W-1:0] in_data,
  output logic         out_valid,
  output logic [W-1:0] out_sum
);
  logic [W-1:0] fb, sum;

  assign sum = in_data + (in_first ? '0 : fb);

  wire_loop #(.LEN(LOOP), .T(logic [W-1:0])) u_loop (
    .clk, .rst, .en(in_valid), .d(sum), .q(fb)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      out_sum   <= '0;
    end else begin
      out_valid <= in_valid;
      out_sum   <= sum;
    end
  end
endmodule
