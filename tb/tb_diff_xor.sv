// tb_diff_xor: exhaustive self-checking testbench for the dual-rail XOR gate.
//
// Applies all 16 combinations of the four input rails. For the four valid
// code inputs it checks z = x XOR y and z_n = its complement, with the
// expected value taken from integer arithmetic ((x + y) % 2). For the twelve
// non-code inputs it checks that the output is non-code too (z == z_n),
// which is what lets a downstream two-rail checker see an input fault.
module tb_diff_xor;

  logic x, x_n, y, y_n, z, z_n;
  int checks = 0, failures = 0;

  diff_xor dut (.x(x), .x_n(x_n), .y(y), .y_n(y_n), .z(z), .z_n(z_n));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: x=%b x_n=%b y=%b y_n=%b -> z=%b z_n=%b", what, x, x_n, y, y_n, z, z_n);
    end
  endtask

  initial begin : watchdog
    #10000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      {x, x_n, y, y_n} = 4'(v);
      #1;
      if (x != x_n && y != y_n) begin
        int exp_z;
        exp_z = (int'(x) + int'(y)) % 2;
        check(z == 1'(exp_z), "xor value");
        check(z_n == 1'(1 - exp_z), "xnor value");
      end else begin
        check(z == z_n, "non-code input must give non-code output");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
