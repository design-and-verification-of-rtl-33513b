// tb_des_xp -- self-checking test of the expansion E.
// Textbook value E(F0AAF0AA) = 7A15557A1555, walking-one checks that input
// bit 1 appears at output bits 2 and 48 and bit 32 at bits 1 and 47, and
// 1000 random words against the reference model.
`include "tb_check.svh"
module tb_des_xp;
  import des_pkg::*;
  import des_ref_pkg::*;

  int checks = 0, failures = 0;
  half_t   ri;
  subkey_t e;

  des_xp dut (.ri(ri), .e(e));

  initial begin : watchdog
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ri = 32'hf0aaf0aa; #1;
    `CHECK_EQ(e, 48'h7a15557a1555, "E known value")
    ri = 32'h80000000; #1;
    `CHECK_EQ(e, (48'(1) << 46) | 48'(1), "E bit 1")
    ri = 32'h00000001; #1;
    `CHECK_EQ(e, (48'(1) << 47) | 48'(2), "E bit 32")
    for (int i = 0; i < 1000; i++) begin
      ri = $urandom(); #1;
      `CHECK_EQ(e, ref_e(ri), "E random")
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
