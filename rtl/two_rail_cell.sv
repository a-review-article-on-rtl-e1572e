// two_rail_cell: the basic totally self-checking two-rail checker cell.
//
// Takes two dual-rail pairs (x0, x0_n) and (x1, x1_n) and produces one
// dual-rail pair (e, e_n):
//   e   = x0&x1   | x0_n&x1_n
//   e_n = x0&x1_n | x0_n&x1
// If both inputs are valid codes (rails complementary), e and e_n are
// complementary; if either input is non-code, e equals e_n. Under the four
// code inputs every gate output takes both values, so a single stuck-at
// fault inside the cell is exposed as a non-code output. Combinational.
module two_rail_cell (
  input  logic x0,
  input  logic x0_n,
  input  logic x1,
  input  logic x1_n,
  output logic e,
  output logic e_n
);

  assign e   = (x0 & x1)   | (x0_n & x1_n);
  assign e_n = (x0 & x1_n) | (x0_n & x1);

endmodule
