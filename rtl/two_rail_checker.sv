// two_rail_checker: totally self-checking checker for N_PAIRS dual-rail pairs.
//
// Compares each true rail x[i] with its complement x_n[i] and folds the
// result into one dual-rail error indication (e, e_n). The indication is a
// valid code (e != e_n) exactly when every checked pair is a valid code;
// any non-code pair, or a single fault inside the checker, makes e == e_n.
// Because the output is itself dual-rail, a checker stuck at "no error" is
// impossible: a stuck output rail shows up as a non-code indication under
// normal operation.
//
// The pairs are folded by a chain of two-rail cells (two_rail_cell): cell i
// combines the running indication with pair i+1. For N_PAIRS = 1 the single
// pair is passed out as the indication.
//
// Interface: x, x_n (N_PAIRS bits each) in; e, e_n out. Combinational.
// The dual-rail checker and its dual-rail error output follow the published scheme;
// the chain of cells and the default N_PAIRS = 2 (sum and carry of one full
// adder) are this implementation's choices.
module two_rail_checker #(
  parameter int unsigned N_PAIRS = 2
) (
  input  logic [N_PAIRS-1:0] x,
  input  logic [N_PAIRS-1:0] x_n,
  output logic               e,
  output logic               e_n
);

  // Running indication after folding pairs 0..i.
  logic [N_PAIRS-1:0] acc, acc_n;

  assign acc[0]   = x[0];
  assign acc_n[0] = x_n[0];

  for (genvar i = 1; i < N_PAIRS; i++) begin : g_cell
    two_rail_cell u_cell (
      .x0(acc[i-1]), .x0_n(acc_n[i-1]),
      .x1(x[i]),     .x1_n(x_n[i]),
      .e(acc[i]),    .e_n(acc_n[i])
    );
  end

  assign e   = acc[N_PAIRS-1];
  assign e_n = acc_n[N_PAIRS-1];

endmodule
