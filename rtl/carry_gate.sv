// carry_gate: single-rail carry (majority) gate, one copy of the duplicated
// carry gate in diff_carry.
//
// maj = a&b | c&(a|b): the carry is generated when both operands are high and
// propagated from c when either is. Purely combinational.
module carry_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic maj
);

  assign maj = (a & b) | (c & (a | b));

endmodule
