// tb_sw_pe: one PE (index 2, 5-cycle loops, 2-cycle forward latency).
// The test first loads a random score row through the configuration port,
// plus words for other PEs that must be ignored. It then drives a random
// interleaved stream: five lanes (one per slot), random bubbles, random
// starts of new subjects and arbitrary MAX_IN values from an imaginary left
// neighbour. A per-lane model keeps the three loop values (left score and
// its source, running maximum, previous MAX_IN). Each output slot is checked
// against the recurrence exactly PE_LAT cycles after its input.
module tb_sw_pe;
  import sw_pkg::*;
  localparam int IDX = 2, LOOP_LEN = 5, PE_LAT = 2, GO = 8, GE = 2;

  logic clk = 0, rst = 1;
  cfg_t cfg_in, cfg_out;
  stream_t s_in, s_out;

  sw_pe #(.PE_INDEX(IDX), .LOOP_LEN(LOOP_LEN), .PE_LAT(PE_LAT), .GAP_OPEN(GO), .GAP_EXT(GE)) dut (
    .clk, .rst, .cfg_in, .cfg_out, .s_in, .s_out);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int row [AA_CODES];
  int st_h [LOOP_LEN], st_s [LOOP_LEN], st_m [LOOP_LEN], st_d [LOOP_LEN];
  stream_t expq [$];
  int n_ext = 0, n_zero = 0, n_bubble = 0, n_first = 0, n_left = 0, n_up = 0, n_diag = 0;

  initial begin
    #2000000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic stream_t model(stream_t x, int slot);
    stream_t r = x;
    int hl, sl, ml, dg, cd, cu, cl, best, m;
    src_e bs;
    if (!x.valid) begin
      r.h = '0; r.src = SRC_ZERO; r.m = '0;
      return r;
    end
    hl = x.first ? 0 : st_h[slot];
    sl = x.first ? 0 : st_s[slot];
    ml = x.first ? 0 : st_m[slot];
    dg = x.first ? 0 : st_d[slot];
    cd = dg + row[x.aa];
    cu = int'(x.h) - ((x.src == SRC_UP) ? GE : GO);
    cl = hl - ((sl == int'(SRC_LEFT)) ? GE : GO);
    if (cd >= cu && cd >= cl) begin best = cd; bs = SRC_DIAG; end
    else if (cu >= cl)        begin best = cu; bs = SRC_UP; if (x.src == SRC_UP) n_ext++; end
    else                      begin best = cl; bs = SRC_LEFT; if (sl == int'(SRC_LEFT)) n_ext++; end
    if (best <= 0) begin best = 0; bs = SRC_ZERO; n_zero++; end
    if (best > 255) best = 255;
    case (bs) SRC_DIAG: n_diag++; SRC_UP: n_up++; SRC_LEFT: n_left++; default: ; endcase
    m = best;
    if (int'(x.m) > m) m = int'(x.m);
    if (ml > m) m = ml;
    st_h[slot] = best; st_s[slot] = int'(bs); st_m[slot] = m; st_d[slot] = int'(x.h);
    r.h = score_t'(best); r.src = bs; r.m = score_t'(m);
    return r;
  endfunction

  initial begin
    int cyc;
    cyc = 0;
    cfg_in = '0; s_in = '0;
    for (int i = 0; i < LOOP_LEN; i++) begin st_h[i] = 0; st_s[i] = 0; st_m[i] = 0; st_d[i] = 0; end
    repeat (2) @(negedge clk);
    rst = 0;
    // load the row of this PE, interleaved with words for other PEs
    for (int a = 0; a < AA_CODES; a++) begin
      row[a] = $signed($urandom_range(0, 24)) - 12;
      @(negedge clk);
      cfg_in = '{valid: 1, pe: pe_idx_t'(IDX), addr: aa_t'(a), data: sub_t'(row[a])};
      @(negedge clk);
      checks++;
      if (cfg_out != cfg_in) begin failures++; $display("FAIL cfg_out not forwarded"); end
      cfg_in = '{valid: 1, pe: pe_idx_t'(IDX + 1), addr: aa_t'(a), data: sub_t'(99)};
    end
    @(negedge clk); cfg_in = '0;
    for (int i = 0; i < PE_LAT; i++) expq.push_back('0);
    // stream
    repeat (4000) begin
      stream_t x;
      @(negedge clk);
      checks++;
      if (s_out != expq[0]) begin
        failures++;
        $display("FAIL cyc %0d: out %p expected %p", cyc, s_out, expq[0]);
      end
      void'(expq.pop_front());
      x = '0;
      x.valid = 1'($urandom_range(0, 9) != 0);
      if (x.valid) begin
        x.first = 1'($urandom_range(0, 14) == 0);
        x.last  = 1'($urandom_range(0, 14) == 0);
        x.aa    = aa_t'($urandom_range(0, AA_CODES - 1));
        x.h     = score_t'($urandom_range(0, 3) == 0 ? $urandom_range(0, 255) : $urandom_range(0, 30));
        x.src   = src_e'($urandom_range(0, 3));
        x.m     = ($urandom_range(0, 1) != 0) ? x.h : score_t'($urandom_range(0, 255));
        if (x.first) n_first++;
      end else n_bubble++;
      s_in = x;
      expq.push_back(model(x, cyc % LOOP_LEN));
      cyc++;
    end
    $display("pe coverage: diag=%0d up=%0d left=%0d extend=%0d zero=%0d bubbles=%0d starts=%0d",
             n_diag, n_up, n_left, n_ext, n_zero, n_bubble, n_first);
    checks++;
    if (n_diag == 0 || n_up == 0 || n_left == 0 || n_ext == 0 || n_zero == 0 || n_bubble == 0 || n_first == 0) begin
      failures++; $display("FAIL coverage");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
