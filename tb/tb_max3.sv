// tb_max3: checks the MAX3 running-maximum block against the integer
// maximum of its three inputs, on corner cases and random vectors.
module tb_max3;
  import sw_pkg::*;
  score_t h, m_in, m_prev, m_out;
  int checks = 0, failures = 0;

  max3 dut (.h, .m_in, .m_prev, .m_out);

  task automatic check(int a, int b, int c);
    int exp;
    h = score_t'(a); m_in = score_t'(b); m_prev = score_t'(c);
    #1;
    exp = a; if (b > exp) exp = b; if (c > exp) exp = c;
    checks++;
    if (int'(m_out) != exp) begin
      failures++;
      $display("FAIL max3(%0d,%0d,%0d) = %0d, expected %0d", a, b, c, m_out, exp);
    end
  endtask

  initial begin
    #100000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(0, 0, 0);  check(255, 0, 0); check(0, 255, 0); check(0, 0, 255);
    check(7, 7, 3);  check(3, 7, 7);   check(7, 3, 7);   check(128, 127, 129);
    repeat (3000) check($urandom_range(0, 255), $urandom_range(0, 255), $urandom_range(0, 255));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
