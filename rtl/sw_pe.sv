// sw_pe: one processing element of the Smith-Waterman systolic array.
//
// The PE holds one amino acid of the query, stored as its row of substitution
// scores in score_mem, which pe_config loads. Each clock cycle it takes one
// slot of the subject stream from its left neighbour and computes the cell
// H(i,j) of the local-alignment matrix for the lane that owns the slot:
//
//   H(i,j) = max(0, H(i-1,j-1) + S(q_i, d_j),   diagonal  (sync loop)
//                   H(i-1,j)   - gap(src_up),   vertical  (MAX_IN)
//                   H(i,j-1)   - gap(src_left)) horizontal (loop-1)
//   M(i,j) = max(H(i,j), M(i-1,j), M(i,j-1))                (loop-2)
//
// gap(src) is GAP_EXT when the score it is taken from was itself reached
// through a gap in the same direction, and GAP_OPEN otherwise. That is the
// MAX4 control signal driving the multiplexer in front of the adder.
//
// Loops. Values from the lane's previous slot come back through three wire
// loops of exactly LOOP_LEN cycles, the frame length of the array:
//  * loop-1 carries the MAX4 score and its control signal together, so the
//    two nested loops (data and multiplexer select) have the same length;
//  * loop-2 returns the MAX3 running maximum;
//  * the synchronization loop delays MAX_IN (H(i-1,j)) by one frame, so it
//    serves as H(i-1,j-1) in the next slot of the lane.
// Because every loop is one frame long, up to LOOP_LEN independent subjects
// can be interleaved, one per slot. A slot with valid low is a bubble: all
// loops recirculate and the lane keeps its state. A slot with first high
// starts a new subject. The loop values read in that slot are taken as zero.
//
// Timing: the result of a slot leaves on s_out PE_LAT cycles after the slot
// entered on s_in. The loop length, the loop structure and the 8-bit
// datapath follow the design description. The gap scheme, the gap values,
// the forward latency and the bubble handling are this design's choices.
module sw_pe
  import sw_pkg::*;
#(
  parameter int PE_INDEX = 0,
  parameter int LOOP_LEN = 141,
  parameter int PE_LAT   = 1,
  parameter int GAP_OPEN = 8,
  parameter int GAP_EXT  = 2
) (
  input  logic    clk,
  input  logic    rst,
  input  cfg_t    cfg_in,
  output cfg_t    cfg_out,
  input  stream_t s_in,
  output stream_t s_out
);
  // ---------------------------------------------------------------- PE_CONFIG
  logic mem_we;
  aa_t  mem_addr;
  sub_t mem_data;
  sub_t sub;

  pe_config #(.PE_INDEX(PE_INDEX)) u_cfg (
    .clk, .rst, .cfg_in, .cfg_out,
    .mem_we, .mem_addr, .mem_data
  );

  score_mem u_mem (
    .clk, .we(mem_we), .waddr(mem_addr), .wdata(mem_data),
    .raddr(s_in.aa), .rdata(sub)
  );

  // ------------------------------------------------------------------ PE_CALC
  cell_t  loop1_q, left;      // loop-1: H(i,j-1) with its control signal
  score_t loop2_q, m_left;    // loop-2: M(i,j-1)
  score_t sync_q,  diag;      // synchronization loop: H(i-1,j-1)
  cand_t  c_diag, c_up, c_left;
  score_t h_new, m_new;
  src_e   src_new;

  always_comb begin
    if (s_in.first) begin
      left   = '{h: '0, src: SRC_ZERO};
      m_left = '0;
      diag   = '0;
    end else begin
      left   = loop1_q;
      m_left = loop2_q;
      diag   = sync_q;
    end
  end

  // Adders in front of MAX4. The horizontal one sits on loop-1; its
  // multiplexer picks the penalty with the control signal that came round
  // the loop with the score.
  always_comb begin
    c_diag = cand_t'(diag) + cand_t'(sub);
    c_up   = cand_t'(s_in.h)
           - cand_t'((s_in.src == SRC_UP)   ? GAP_EXT : GAP_OPEN);
    c_left = cand_t'(left.h)
           - cand_t'((left.src == SRC_LEFT) ? GAP_EXT : GAP_OPEN);
  end

  max4 u_max4 (.c_diag, .c_up, .c_left, .h(h_new), .src(src_new));

  max3 u_max3 (.h(h_new), .m_in(s_in.m), .m_prev(m_left), .m_out(m_new));

  wire_loop #(.LEN(LOOP_LEN), .T(cell_t)) u_loop1 (
    .clk, .rst, .en(s_in.valid), .d('{h: h_new, src: src_new}), .q(loop1_q)
  );

  wire_loop #(.LEN(LOOP_LEN), .T(score_t)) u_loop2 (
    .clk, .rst, .en(s_in.valid), .d(m_new), .q(loop2_q)
  );

  wire_loop #(.LEN(LOOP_LEN), .T(score_t)) u_sync (
    .clk, .rst, .en(s_in.valid), .d(s_in.h), .q(sync_q)
  );

  // ------------------------------------------------------- forward pipeline
  stream_t res;
  stream_t pipe [PE_LAT];

  always_comb begin
    res       = s_in;
    res.h     = h_new;
    res.src   = src_new;
    res.m     = m_new;
    if (!s_in.valid) begin
      res.h   = '0;
      res.src = SRC_ZERO;
      res.m   = '0;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < PE_LAT; i++) pipe[i] <= '0;
    end else begin
      pipe[0] <= res;
      for (int i = 1; i < PE_LAT; i++) pipe[i] <= pipe[i-1];
    end
  end

  assign s_out = pipe[PE_LAT-1];

  initial begin
    assert (PE_LAT >= 1)   else $error("sw_pe: PE_LAT must be at least 1");
    assert (LOOP_LEN >= 1) else $error("sw_pe: LOOP_LEN must be at least 1");
    assert (GAP_OPEN >= 0 && GAP_EXT >= 0) else $error("sw_pe: negative gap penalty");
  end
endmodule
