// tb_diff_full_adder: exhaustive self-checking testbench for the differential
// full adder.
//
// Applies all 64 combinations of the six input rails.
//  - Valid code inputs (8 of them): {cout, sum} must equal a + b + cin as a
//    two-bit number, with sum_n, cout_n and g_n the complements of sum, cout
//    and g, and g = a AND b.
//  - Non-code inputs (56): the sum pair must be non-code (sum == sum_n), so
//    a checker on the outputs sees every input fault.
module tb_diff_full_adder;

  logic a, a_n, b, b_n, cin, cin_n;
  logic sum, sum_n, cout, cout_n, g, g_n;
  int checks = 0, failures = 0;

  diff_full_adder dut (
    .a(a), .a_n(a_n), .b(b), .b_n(b_n), .cin(cin), .cin_n(cin_n),
    .sum(sum), .sum_n(sum_n), .cout(cout), .cout_n(cout_n), .g(g), .g_n(g_n)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: in=%b%b%b%b%b%b sum=%b%b cout=%b%b g=%b%b",
               what, a, a_n, b, b_n, cin, cin_n, sum, sum_n, cout, cout_n, g, g_n);
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
      {a, a_n, b, b_n, cin, cin_n} = 6'(v);
      #1;
      if (a != a_n && b != b_n && cin != cin_n) begin
        logic [1:0] total;
        total = 2'(a) + 2'(b) + 2'(cin);
        check({cout, sum} == total, "sum and carry value");
        check(sum_n == !sum, "sum pair complementary");
        check(cout_n == !cout, "carry pair complementary");
        check(g == (a && b), "generate");
        check(g_n == !g, "generate pair complementary");
      end else begin
        check(sum == sum_n, "non-code input must give non-code sum");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
