// diff_xor: dual-rail (differential) XOR/XNOR gate.
//
// Both operands arrive in two-rail code: a true rail and its complement.
// The gate returns their XOR on the true output rail z and their XNOR on
// the complement rail z_n. Each output is a two-way pass selection steered
// by the two rails of x: when x is high the y rails pass crossed, when x_n
// is high they pass straight. That takes four switches in all, which is the
// four-transistor differential XOR the adders are built around.
//
// Because every product term uses one rail of x and one rail of y, a
// non-code operand (both rails equal) yields a non-code output: both
// rails high or both low. That is what makes a stage fed by primary inputs
// self-testing.
//
// Interface: x/x_n, y/y_n in; z/z_n out. Purely combinational, no clock.
// The XOR/XNOR function and its dual-rail use come from the design; the
// pass-selection form of each rail is this implementation's own choice.
module diff_xor (
  input  logic x,
  input  logic x_n,
  input  logic y,
  input  logic y_n,
  output logic z,
  output logic z_n
);

  // x high: pass the crossed y rails; x_n high: pass them straight.
  assign z   = (x & y_n) | (x_n & y);
  assign z_n = (x & y)   | (x_n & y_n);

endmodule
