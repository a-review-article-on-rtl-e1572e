// tb_diff_carry: exhaustive self-checking testbench for the duplicated carry gate.
//
// Applies all 64 combinations of the six input rails. Expected values come
// from counting ones: the carry of three bits is 1 when at least two are 1.
//  - cout must always equal the carry of the true rails alone, and cout_n
//    the carry of the complement rails alone: the two copies are separate,
//    so a fault on one rail set can never reach the other output.
//  - For valid code inputs, (cout, cout_n) and (g, g_n) must be
//    complementary and cout must equal the arithmetic carry of a + b + c.
module tb_diff_carry;

  logic a, a_n, b, b_n, c, c_n;
  logic cout, cout_n, g, g_n;
  int checks = 0, failures = 0;

  diff_carry dut (
    .a(a), .a_n(a_n), .b(b), .b_n(b_n), .c(c), .c_n(c_n),
    .cout(cout), .cout_n(cout_n), .g(g), .g_n(g_n)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: in=%b%b%b%b%b%b cout=%b cout_n=%b g=%b g_n=%b",
               what, a, a_n, b, b_n, c, c_n, cout, cout_n, g, g_n);
    end
  endtask

  initial begin : watchdog
    #10000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 64; v++) begin
      {a, a_n, b, b_n, c, c_n} = 6'(v);
      #1;
      check(cout   == ((int'(a) + int'(b) + int'(c)) >= 2),       "true copy carry");
      check(cout_n == ((int'(a_n) + int'(b_n) + int'(c_n)) >= 2), "complement copy carry");
      if (a != a_n && b != b_n && c != c_n) begin
        int total;
        total = int'(a) + int'(b) + int'(c);
        check(cout == 1'(total / 2), "arithmetic carry");
        check(cout_n == !cout, "carry pair complementary");
        check(g == (a && b), "generate");
        check(g_n == !g, "generate pair complementary");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
