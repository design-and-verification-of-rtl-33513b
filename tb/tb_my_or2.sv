// tb_my_or2 -- self-checking test of the two-input OR filler gate.
// All four input combinations, each compared with the OR truth table, then
// the tied-input use (both inputs on one signal) that makes it a buffer.
`include "tb_check.svh"
module tb_my_or2;

  int checks = 0, failures = 0;
  logic i1, i2, o;

  my_or2 dut (.i1(i1), .i2(i2), .o(o));

  initial begin : watchdog
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      {i1, i2} = 2'(v); #1;
      `CHECK_EQ(o, i1 | i2, "OR truth table")
    end
    for (int v = 0; v < 2; v++) begin
      i1 = 1'(v); i2 = 1'(v); #1;
      `CHECK_EQ(o, 1'(v), "tied inputs pass the bit through")
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
