// wire_loop: a feedback wire of LEN clock cycles, as a chain of registers.
//
// In an intrinsically pipelined technology a wire is a shift register: each
// clock-zone triple adds one cycle. A loop whose length equals the frame
// length LEN returns, at the moment a lane's next slot arrives, exactly the
// value that lane wrote one slot earlier. That makes the loop a per-lane
// state store for LEN interleaved lanes, and lets a "wire loop" stand for the
// one extra register a conventional design would put on a signal.
//
// Interface: on every cycle q is the value that entered LEN cycles earlier.
// When en is high the loop takes d; when en is low it takes its own output
// back, so a stalled lane keeps its state (this hold on bubbles is this
// design's choice). Reset clears every stage.
module wire_loop #(
  parameter int  LEN = 141,
  parameter type T   = logic [7:0]
) (
  input  logic clk,
  input  logic rst,
  input  logic en,
  input  T     d,
  output T     q
);
  T stage [LEN];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < LEN; i++) stage[i] <= T'(0);
    end else begin
      stage[0] <= en ? d : stage[LEN-1];
      for (int i = 1; i < LEN; i++) stage[i] <= stage[i-1];
    end
  end

  assign q = stage[LEN-1];

  initial assert (LEN >= 1) else $error("wire_loop: LEN must be at least 1");
endmodule
