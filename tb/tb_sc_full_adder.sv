// tb_sc_full_adder: end-to-end self-checking testbench for the self-checking
// full adder (the top), run at its default configuration.
//
// It exercises the two behaviours seen at the ports and counts each:
//  1. Fault-free operation: all eight valid inputs; {cout, sum} must equal
//     a + b + cin, every output pair must be complementary and the error
//     indication must be a valid code (err != err_n), and both indication
//     codes must occur.
//  2. Input faults: every non-code input (56 rail patterns, among them the
//     "a_n shorted to a" fault) must raise the error (err == err_n).
// Internal stuck-at faults are covered by tb_sc_fault_campaign.
// Expected sums come from integer arithmetic, not from the design.
module tb_sc_full_adder;

  logic a, a_n, b, b_n, cin, cin_n;
  logic sum, sum_n, cout, cout_n, g, g_n, err, err_n;
  int checks = 0, failures = 0;

  // How often each mechanism was seen.
  int n_fault_free = 0;       // valid input, correct result, no error
  int n_input_fault = 0;      // non-code input flagged
  int n_short_a = 0;          // the a_n = a short flagged
  int n_ind01 = 0, n_ind10 = 0;

  sc_full_adder dut (
    .a(a), .a_n(a_n), .b(b), .b_n(b_n), .cin(cin), .cin_n(cin_n),
    .sum(sum), .sum_n(sum_n), .cout(cout), .cout_n(cout_n),
    .g(g), .g_n(g_n), .err(err), .err_n(err_n)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: in=%b%b%b%b%b%b sum=%b%b cout=%b%b err=%b%b",
               what, a, a_n, b, b_n, cin, cin_n, sum, sum_n, cout, cout_n, err, err_n);
    end
  endtask

  task automatic apply_code(input logic [2:0] v);
    {a, b, cin} = v;
    a_n = !a; b_n = !b; cin_n = !cin;
    #1;
  endtask

  // Expected {cout, sum} of a valid input.
  function automatic logic [1:0] expected(input logic [2:0] v);
    return 2'(v[2]) + 2'(v[1]) + 2'(v[0]);
  endfunction

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // 1. Fault-free operation.
    for (int v = 0; v < 8; v++) begin
      apply_code(3'(v));
      check({cout, sum} == expected(3'(v)), "sum and carry value");
      check(sum_n == !sum && cout_n == !cout && g_n == !g, "output pairs complementary");
      check(g == (a && b), "generate");
      check(err != err_n, "no error on valid input");
      if ({cout, sum} == expected(3'(v)) && err != err_n) n_fault_free++;
      if ({err, err_n} == 2'b01) n_ind01++;
      if ({err, err_n} == 2'b10) n_ind10++;
    end
    check(n_ind01 > 0 && n_ind10 > 0, "both error-indication codes occur");

    // 2. Non-code inputs.
    for (int v = 0; v < 64; v++) begin
      {a, a_n, b, b_n, cin, cin_n} = 6'(v);
      #1;
      if (a == a_n || b == b_n || cin == cin_n) begin
        check(err == err_n, "non-code input flagged");
        if (err == err_n) n_input_fault++;
        if (a == a_n && b != b_n && cin != cin_n && err == err_n) n_short_a++;
      end else begin
        check(err != err_n, "valid input not flagged");
      end
    end

    // Every mechanism must have happened.
    check(n_fault_free == 8, "fault-free additions seen");
    check(n_input_fault == 56, "non-code inputs flagged");
    check(n_short_a > 0, "a_n = a short flagged");
    $display("mechanisms: fault_free=%0d input_faults=%0d short_a=%0d",
             n_fault_free, n_input_fault, n_short_a);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
