// sc_full_adder: totally self-checking full adder (top of the design).
//
// A full adder whose every signal is carried in two-rail code, followed by
// a two-rail checker. The functional block is the differential full adder
// (duplicated carry gate plus two differential XORs with restoring
// inverters); the checker watches its two output pairs, (sum, sum_n) and
// (cout, cout_n), and reduces them to a dual-rail error indication
// (err, err_n).
//
//   err != err_n : all checked pairs are valid codes, the result is trusted
//   err == err_n : a fault (or a non-code input) has been detected
//
// Self-checking in operation: for any valid input and any single stuck-at
// fault in the adder, the outputs are either correct or non-code (fault
// secure), and every such fault is exposed by at least one of the eight
// valid inputs (self-testing). A non-code input pair, such as a_n shorted
// to a, always reaches the sum pair as a non-code value and is flagged.
//
// Interface: a/a_n, b/b_n, cin/cin_n in; sum/sum_n, cout/cout_n, the
// generate pair g/g_n and err/err_n out. Purely combinational: there is
// no clock, and the outputs settle one gate path after the inputs.
// The adder-plus-checker arrangement follows the published scheme; that the checker
// watches exactly the sum and carry pairs is this implementation's reading.
module sc_full_adder (
  input  logic a,
  input  logic a_n,
  input  logic b,
  input  logic b_n,
  input  logic cin,
  input  logic cin_n,
  output logic sum,
  output logic sum_n,
  output logic cout,
  output logic cout_n,
  output logic g,
  output logic g_n,
  output logic err,
  output logic err_n
);

  diff_full_adder u_adder (
    .a(a), .a_n(a_n), .b(b), .b_n(b_n), .cin(cin), .cin_n(cin_n),
    .sum(sum), .sum_n(sum_n), .cout(cout), .cout_n(cout_n),
    .g(g), .g_n(g_n)
  );

  two_rail_checker #(.N_PAIRS(2)) u_checker (
    .x  ({cout,   sum}),
    .x_n({cout_n, sum_n}),
    .e  (err),
    .e_n(err_n)
  );

endmodule
