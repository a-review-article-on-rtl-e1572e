// tb_sc_fault_campaign: single stuck-at fault campaign on the self-checking
// full adder, checking the two properties that make it totally self-checking.
//
// Each internal net of the adder (both rails of the propagate pair, of the
// unrestored and restored sum, of the carry) and both rails of the error
// indication are forced to 0 and then to 1, one fault at a time. Under each
// fault all eight valid inputs are applied:
//  - fault secure: for every input the outputs are either the correct code
//    or the error is raised (err == err_n);
//  - self-testing: at least one of the eight inputs raises the error.
// Expected sums come from integer arithmetic, not from the design. The
// faults are injected with force/release on hierarchical names, so this
// testbench depends on the instance and net names inside sc_full_adder.
module tb_sc_fault_campaign;

  logic a, a_n, b, b_n, cin, cin_n;
  logic sum, sum_n, cout, cout_n, g, g_n, err, err_n;
  int checks = 0, failures = 0;

  int n_internal_det = 0;     // internal stuck-at faults detected

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

  // Runs the eight valid inputs under whatever fault is currently forced.
  // Checks fault security for each input and self-testing over all eight.
  task automatic run_fault(input string name);
    int detected = 0;
    for (int v = 0; v < 8; v++) begin
      apply_code(3'(v));
      check(g == (a && b) && g_n == !g, {name, ": generate pair untouched"});
      if (err == err_n) detected++;
      else check({cout, sum} == expected(3'(v)) && sum_n == !sum && cout_n == !cout,
                 {name, ": fault secure (wrong code output without error)"});
    end
    check(detected > 0, {name, ": self-testing (never detected)"});
    if (detected > 0) n_internal_det++;
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    force dut.u_adder.u_sum.p = 1'b0;   run_fault("p s-a-0");   release dut.u_adder.u_sum.p;
    force dut.u_adder.u_sum.p = 1'b1;   run_fault("p s-a-1");   release dut.u_adder.u_sum.p;
    force dut.u_adder.u_sum.p_n = 1'b0; run_fault("p_n s-a-0"); release dut.u_adder.u_sum.p_n;
    force dut.u_adder.u_sum.p_n = 1'b1; run_fault("p_n s-a-1"); release dut.u_adder.u_sum.p_n;
    force dut.u_adder.s = 1'b0;         run_fault("s s-a-0");   release dut.u_adder.s;
    force dut.u_adder.s = 1'b1;         run_fault("s s-a-1");   release dut.u_adder.s;
    force dut.u_adder.s_n = 1'b0;       run_fault("s_n s-a-0"); release dut.u_adder.s_n;
    force dut.u_adder.s_n = 1'b1;       run_fault("s_n s-a-1"); release dut.u_adder.s_n;
    force dut.sum = 1'b0;               run_fault("sum s-a-0"); release dut.sum;
    force dut.sum = 1'b1;               run_fault("sum s-a-1"); release dut.sum;
    force dut.sum_n = 1'b0;             run_fault("sum_n s-a-0"); release dut.sum_n;
    force dut.sum_n = 1'b1;             run_fault("sum_n s-a-1"); release dut.sum_n;
    force dut.cout = 1'b0;              run_fault("cout s-a-0"); release dut.cout;
    force dut.cout = 1'b1;              run_fault("cout s-a-1"); release dut.cout;
    force dut.cout_n = 1'b0;            run_fault("cout_n s-a-0"); release dut.cout_n;
    force dut.cout_n = 1'b1;            run_fault("cout_n s-a-1"); release dut.cout_n;
    force dut.err = 1'b0;               run_fault("err s-a-0"); release dut.err;
    force dut.err = 1'b1;               run_fault("err s-a-1"); release dut.err;
    force dut.err_n = 1'b0;             run_fault("err_n s-a-0"); release dut.err_n;
    force dut.err_n = 1'b1;             run_fault("err_n s-a-1"); release dut.err_n;

    // Every mechanism must have happened.
    check(n_internal_det == 20, "internal faults detected");
    $display("internal faults detected: %0d of 20", n_internal_det);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
