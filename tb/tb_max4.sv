// tb_max4: checks the MAX4 local-score block. Expected values come from the
// recurrence written out in integers: largest candidate with ties to
// diagonal, then vertical, then horizontal; zero (source "zero") when the
// largest is not positive; saturation at 255.
module tb_max4;
  import sw_pkg::*;
  cand_t  c_diag, c_up, c_left;
  score_t h;
  src_e   src;
  int checks = 0, failures = 0;

  max4 dut (.c_diag, .c_up, .c_left, .h, .src);

  task automatic check(int d, int u, int l);
    int best; src_e bs;
    c_diag = cand_t'(d); c_up = cand_t'(u); c_left = cand_t'(l);
    #1;
    if (d >= u && d >= l) begin best = d; bs = SRC_DIAG; end
    else if (u >= l)      begin best = u; bs = SRC_UP;   end
    else                  begin best = l; bs = SRC_LEFT; end
    if (best <= 0) begin best = 0; bs = SRC_ZERO; end
    else if (best > 255) best = 255;
    checks++;
    if (int'(h) != best || src != bs) begin
      failures++;
      $display("FAIL max4(%0d,%0d,%0d) = %0d/%s, expected %0d/%s", d, u, l, h, src.name(), best, bs.name());
    end
  endtask

  initial begin
    #100000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(5, 5, 5);     check(4, 5, 5);   check(4, 5, 6);   check(6, 5, 4);
    check(0, -3, -8);   check(-1, -1, -1); check(382, 10, 0); check(256, 255, 0);
    check(-128, 255, 254); check(1, 0, 0); check(0, 0, 1);   check(10, 20, 20);
    repeat (5000)
      check($signed($urandom_range(0, 510)) - 128, $signed($urandom_range(0, 263)) - 8,
            $signed($urandom_range(0, 263)) - 8);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
