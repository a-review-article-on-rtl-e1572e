// tb_diff_sum: exhaustive self-checking testbench for the differential sum gate.
//
// Applies all 64 combinations of the six input rails. For valid code
// inputs, s must be (a + b + c) % 2 and s_n its complement. For any input
// with a non-code pair, the sum pair must be non-code (s == s_n): the two
// XOR stages pass a non-code operand on as a non-code result.
module tb_diff_sum;

  logic a, a_n, b, b_n, c, c_n, s, s_n;
  int checks = 0, failures = 0;

  diff_sum dut (
    .a(a), .a_n(a_n), .b(b), .b_n(b_n), .c(c), .c_n(c_n), .s(s), .s_n(s_n)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: in=%b%b%b%b%b%b s=%b s_n=%b", what, a, a_n, b, b_n, c, c_n, s, s_n);
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
      if (a != a_n && b != b_n && c != c_n) begin
        int total;
        total = int'(a) + int'(b) + int'(c);
        check(s == 1'(total % 2), "sum value");
        check(s_n == !s, "sum pair complementary");
      end else begin
        check(s == s_n, "non-code input must give non-code sum");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
