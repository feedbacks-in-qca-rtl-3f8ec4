// sw_pkg: types and constants shared by the Smith-Waterman systolic array.
//
// The array works on 8-bit scores (the datapath parallelism of the design)
// and on 5-bit amino-acid codes (20 amino acids plus spare codes; the code
// assignment is this design's choice). A PE passes one stream_t per clock
// cycle to its neighbour. Every slot of the LOOP_LEN-cycle frame belongs to
// one interleaved subject lane. Configuration words travel along the chain
// as cfg_t.
package sw_pkg;

  localparam int AA_W       = 5;            // amino-acid code width
  localparam int AA_CODES   = 1 << AA_W;    // entries of a PE score memory
  localparam int SCORE_W    = 8;            // datapath parallelism
  localparam int PE_IDX_W   = 8;            // up to 256 PEs addressable
  localparam int CAND_W     = SCORE_W + 4;  // signed width of MAX4 candidates

  typedef logic [AA_W-1:0]           aa_t;
  typedef logic [SCORE_W-1:0]        score_t;   // non-negative alignment score
  typedef logic signed [SCORE_W-1:0] sub_t;     // signed substitution score
  typedef logic signed [CAND_W-1:0]  cand_t;    // MAX4 candidate
  typedef logic [PE_IDX_W-1:0]       pe_idx_t;

  // Which MAX4 candidate produced a score; the control signal of loop-1.
  typedef enum logic [1:0] {
    SRC_ZERO = 2'd0,   // clamped to zero: a local alignment starts here
    SRC_DIAG = 2'd1,   // diagonal: previous row and column plus substitution
    SRC_UP   = 2'd2,   // vertical gap: from the previous PE
    SRC_LEFT = 2'd3    // horizontal gap: from this PE's own previous result
  } src_e;

  // Content of loop-1: the MAX4 score and its control signal travel together.
  typedef struct packed {
    score_t h;
    src_e   src;
  } cell_t;

  // One slot of the stream between neighbouring PEs.
  typedef struct packed {
    logic   valid;   // slot carries a subject amino acid (else a bubble)
    logic   first;   // first amino acid of a subject: lane state restarts
    logic   last;    // last amino acid of a subject: m is its final score
    aa_t    aa;      // subject amino acid
    score_t h;       // local score of the previous PE (MAX_IN of MAX4)
    src_e   src;     // which candidate produced h
    score_t m;       // running maximum of the previous PEs (MAX_IN of MAX3)
  } stream_t;

  // One configuration word: score `data` for subject code `addr` in PE `pe`.
  typedef struct packed {
    logic    valid;
    pe_idx_t pe;
    aa_t     addr;
    sub_t    data;
  } cfg_t;

endpackage
