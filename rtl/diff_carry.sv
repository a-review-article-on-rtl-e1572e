// diff_carry: differential (duplicated) carry gate of the dual-rail full adder.
//
// The carry gate is built twice. The true copy works on the true rails a, b, c
// and forms cout = a&b | c&(a|b), the majority of its inputs. The second copy
// is the same gate fed with the complement rails; since majority is a
// self-dual function, it yields exactly ~cout when the inputs are a valid
// two-rail code. The copies share no node, so any single internal fault
// can disturb at most one rail of the carry pair, and the fault shows as a
// non-code (00 or 11) carry: the gate is fault-secure and, since every
// node toggles under the eight code inputs, self-testing.
//
// The gate also brings out the dual-rail generate pair (g, g_n), the
// signals a carry look-ahead would use: g = a&b from the true copy and
// g_n = a_n|b_n, its complement formed from the complement rails.
//
// Interface: a/a_n, b/b_n, c/c_n in; cout/cout_n and g/g_n out.
// Purely combinational. Duplicating the gate to get the carry pair and the
// generate pair follow the published scheme; the generate-or-propagate form of each
// copy and the way g_n is formed are this implementation's choices.
module diff_carry (
  input  logic a,
  input  logic a_n,
  input  logic b,
  input  logic b_n,
  input  logic c,
  input  logic c_n,
  output logic cout,
  output logic cout_n,
  output logic g,
  output logic g_n
);

  // True copy on the true rails.
  carry_gate u_carry_t (.a(a),   .b(b),   .c(c),   .maj(cout));
  // Identical copy on the complement rails gives the complement carry.
  carry_gate u_carry_f (.a(a_n), .b(b_n), .c(c_n), .maj(cout_n));

  assign g   = a & b;
  assign g_n = a_n | b_n;

endmodule
