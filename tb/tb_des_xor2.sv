// tb_des_xor2 -- self-checking test of the round output XOR.
// Textbook value L0 ^ f = CC00CCFF ^ 234AA9BB = EF4A6544 (R1), then 1000
// random pairs.
`include "tb_check.svh"
module tb_des_xor2;
  import des_pkg::*;

  int checks = 0, failures = 0;
  half_t d, l, q;

  des_xor2 dut (.d(d), .l(l), .q(q));

  initial begin : watchdog
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = 32'h234aa9bb; l = 32'hcc00ccff; #1;
    `CHECK_EQ(q, 32'hef4a6544, "R1 known value")
    for (int i = 0; i < 1000; i++) begin
      d = $urandom(); l = $urandom(); #1;
      `CHECK_EQ(q, d ^ l, "xor2 random")
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
