// tb_he_pkg: checks the nearest-integer division function of he_pkg against a
// floating-point reference (round half away from zero), including negative
// operands, exact ties and a zero divisor.
module tb_he_pkg;
  import he_pkg::*;
  int checks = 0, failures = 0;

  function automatic longint ref_div(longint a, int w);
    real q;
    if (w == 0) return 0;
    q = real'(a) / real'(w);
    return (q < 0) ? -longint'($floor(-q + 0.5)) : longint'($floor(q + 0.5));
  endfunction

  task automatic check(longint a, int w);
    elem_t got;
    longint exp;
    got = nint_div(prod_t'(a), elem_t'(w));
    exp = ref_div(a, w);
    checks++;
    if (longint'(got) != exp) begin
      failures++;
      $display("FAIL nint_div(%0d, %0d) = %0d, expected %0d", a, w, got, exp);
    end
  endtask

  initial begin
    check(7, 2);  check(-7, 2);  check(5, 2);  check(-5, 2);   // ties
    check(6, 4);  check(-6, 4);  check(10, -4); check(-10, -4);
    check(1, 3);  check(2, 3);   check(-2, 3); check(0, 5);
    check(123, 0);
    check(64'sd3 * 65536 * 65536 + 12345, 65536);
    for (int i = 0; i < 2000; i++) begin
      longint a;
      int w;
      // quotients stay inside the 32-bit result range
      w = int'($urandom_range(1, 1 << 20)) * ($urandom_range(0, 1) ? 1 : -1);
      a = longint'(int'($urandom) / 2) * longint'(w) + longint'(int'($urandom_range(0, 2 << 20))) - (1 << 20);
      check(a, w);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
