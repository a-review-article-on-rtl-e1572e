// diff_full_adder: differential (fully dual-rail) full adder.
//
// Every signal travels as a two-rail pair (x, x_n) whose rails are
// complementary when fault-free. The adder is the differential carry gate
// (duplicated majority gate) beside the differential sum gate (two
// differential XORs). The sum gate's pass-transistor outputs are degraded,
// so each sum rail is restored by an inverter; the inverters are
// cross-connected (sum = ~s_n, sum_n = ~s) so that the logic function is
// unchanged.
//
// With valid code inputs the outputs are the full-adder sum and carry and
// their complements. A single fault in XOR1 or in either copy of the carry
// gate makes exactly one output pair non-code (00 or 11), which a two-rail
// checker downstream detects.
//
// Interface: a/a_n, b/b_n, cin/cin_n in; sum/sum_n, cout/cout_n and the
// generate pair g/g_n out. Purely combinational; the ripple of a multi-bit
// adder would chain cout/cout_n into the next stage's cin/cin_n.
// The structure (carry gate, sum gate, restoring inverters) follows the
// design; placing the inverters per rail and cross-connected is this
// implementation's choice.
module diff_full_adder (
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
  output logic g_n
);

  logic s, s_n;   // unrestored sum rails

  diff_carry u_carry (
    .a(a), .a_n(a_n), .b(b), .b_n(b_n), .c(cin), .c_n(cin_n),
    .cout(cout), .cout_n(cout_n), .g(g), .g_n(g_n)
  );

  diff_sum u_sum (
    .a(a), .a_n(a_n), .b(b), .b_n(b_n), .c(cin), .c_n(cin_n),
    .s(s), .s_n(s_n)
  );

  // Restoring inverters, one per rail.
  assign sum   = ~s_n;
  assign sum_n = ~s;

endmodule
