// diff_sum: differential sum gate of the dual-rail full adder.
//
// Two differential XOR gates in series. XOR1 takes the dual-rail operands
// a and b and produces the propagate pair (p, p_n) = (a^b, ~(a^b)). XOR2
// takes that pair and the dual-rail carry in (c, c_n) and produces the
// dual-rail sum (s, s_n) = (a^b^c, ~(a^b^c)).
//
// In a pass-transistor realisation the sum rails come out degraded; the
// full adder restores them with inverters (see diff_full_adder), so s and
// s_n here are the unrestored rails.
//
// Interface: a/a_n, b/b_n, c/c_n in; s/s_n out. Combinational.
// The two-XOR structure follows the published scheme.
module diff_sum (
  input  logic a,
  input  logic a_n,
  input  logic b,
  input  logic b_n,
  input  logic c,
  input  logic c_n,
  output logic s,
  output logic s_n
);

  logic p, p_n;  // propagate pair between XOR1 and XOR2

  diff_xor u_xor1 (.x(a), .x_n(a_n), .y(b), .y_n(b_n), .z(p), .z_n(p_n));
  diff_xor u_xor2 (.x(p), .x_n(p_n), .y(c), .y_n(c_n), .z(s), .z_n(s_n));

endmodule
