// tb_two_rail_checker: exhaustive self-checking testbench for the two-rail checker.
//
// Checks the checker at its default size (two pairs) and at one, three and
// five pairs, over every combination of input rails. The rule checked is
// the checker's contract: the indication (e, e_n) is complementary exactly
// when every input pair is complementary. The testbench works that out
// from the rails directly (counting non-code pairs). It also checks that
// both indication codes (01 and 10) occur under valid inputs, without
// which a stuck indication rail could go unnoticed.
module tb_two_rail_checker;

  int checks = 0, failures = 0;

  logic [1:0] x2, x2_n;  logic e2, e2_n;
  logic [0:0] x1, x1_n;  logic e1, e1_n;
  logic [2:0] x3, x3_n;  logic e3, e3_n;
  logic [4:0] x5, x5_n;  logic e5, e5_n;

  two_rail_checker                 dut2 (.x(x2), .x_n(x2_n), .e(e2), .e_n(e2_n));
  two_rail_checker #(.N_PAIRS(1))  dut1 (.x(x1), .x_n(x1_n), .e(e1), .e_n(e1_n));
  two_rail_checker #(.N_PAIRS(3))  dut3 (.x(x3), .x_n(x3_n), .e(e3), .e_n(e3_n));
  two_rail_checker #(.N_PAIRS(5))  dut5 (.x(x5), .x_n(x5_n), .e(e5), .e_n(e5_n));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // Number of pairs whose rails are equal (non-code).
  function automatic int noncode_pairs(input logic [7:0] t, input logic [7:0] f, input int n);
    int cnt = 0;
    for (int i = 0; i < n; i++) if (t[i] == f[i]) cnt++;
    return cnt;
  endfunction

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int seen01, seen10;
    // Default two-pair checker.
    seen01 = 0; seen10 = 0;
    for (int v = 0; v < 16; v++) begin
      {x2, x2_n} = 4'(v);
      #1;
      check((e2 != e2_n) == (noncode_pairs(8'(x2), 8'(x2_n), 2) == 0),
            $sformatf("N=2 x=%b x_n=%b e=%b e_n=%b", x2, x2_n, e2, e2_n));
      if (e2 == 1'b0 && e2_n == 1'b1) seen01++;
      if (e2 == 1'b1 && e2_n == 1'b0) seen10++;
    end
    check(seen01 > 0 && seen10 > 0, "N=2 both indication codes occur");
    // One pair.
    for (int v = 0; v < 4; v++) begin
      {x1, x1_n} = 2'(v);
      #1;
      check((e1 != e1_n) == (x1 != x1_n), $sformatf("N=1 x=%b x_n=%b", x1, x1_n));
    end
    // Three pairs.
    seen01 = 0; seen10 = 0;
    for (int v = 0; v < 64; v++) begin
      {x3, x3_n} = 6'(v);
      #1;
      check((e3 != e3_n) == (noncode_pairs(8'(x3), 8'(x3_n), 3) == 0),
            $sformatf("N=3 x=%b x_n=%b e=%b e_n=%b", x3, x3_n, e3, e3_n));
      if (e3 == 1'b0 && e3_n == 1'b1) seen01++;
      if (e3 == 1'b1 && e3_n == 1'b0) seen10++;
    end
    check(seen01 > 0 && seen10 > 0, "N=3 both indication codes occur");
    // Five pairs.
    for (int v = 0; v < 1024; v++) begin
      {x5, x5_n} = 10'(v);
      #1;
      check((e5 != e5_n) == (noncode_pairs(8'(x5), 8'(x5_n), 5) == 0),
            $sformatf("N=5 x=%b x_n=%b e=%b e_n=%b", x5, x5_n, e5, e5_n));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
