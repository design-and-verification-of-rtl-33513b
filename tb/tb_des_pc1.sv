// tb_des_pc1 -- self-checking test of permuted choice 1.
// Textbook value PC1(133457799BBCDFF1) = F0CCAAF 556678F; parity bits
// (standard bits 8, 16, ..., 64) must not affect the output; 1000 random
// keys against the reference model. A second instance built with the filler
// OR gate must give the same output as the plain one.
`include "tb_check.svh"
module tb_des_pc1;
  import des_pkg::*;
  import des_ref_pkg::*;

  int checks = 0, failures = 0;
  block_t key;
  khalf_t c0, d0;
  khalf_t c0f, d0f;
  logic [55:0] base;

  des_pc1 dut (.key(key), .c0(c0), .d0(d0));
  des_pc1 #(.FILLER_OR(1'b1)) dut_filler (.key(key), .c0(c0f), .d0(d0f));

  initial begin : watchdog
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    key = 64'h133457799bbcdff1; #1;
    `CHECK_EQ({c0, d0}, 56'hf0ccaaf556678f, "PC1 known value")
    for (int i = 0; i < 1000; i++) begin
      key = rand64(); #1;
      `CHECK_EQ({c0, d0}, ref_pc1(key), "PC1 random")
      `CHECK_EQ({c0f, d0f}, {c0, d0}, "PC1 with filler gate")
      base = {c0, d0};
      key = key ^ 64'h0101010101010101; #1;
      `CHECK_EQ({c0, d0}, base, "PC1 ignores parity bits")
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
