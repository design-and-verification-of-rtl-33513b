// tb_des_pc2 -- self-checking test of permuted choice 2.
// Textbook value: C1 = E19955F, D1 = AACCF1E give K1 = 1B02EFFC7072; 1000
// random C/D pairs against the reference model; the eight dropped positions
// (standard bits 9, 18, 22, 25, 35, 38, 43, 54) must not affect the key.
`include "tb_check.svh"
module tb_des_pc2;
  import des_pkg::*;
  import des_ref_pkg::*;

  int checks = 0, failures = 0;
  khalf_t  c, d;
  subkey_t k, base;
  logic [55:0] cd;

  des_pc2 dut (.c(c), .d(d), .k(k));

  initial begin : watchdog
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    c = 28'he19955f; d = 28'haaccf1e; #1;
    `CHECK_EQ(k, 48'h1b02effc7072, "PC2 known value")
    for (int i = 0; i < 1000; i++) begin
      cd = {$urandom(), $urandom()};
      {c, d} = cd; #1;
      `CHECK_EQ(k, ref_pc2(cd), "PC2 random")
      base = k;
      cd ^= (56'(1) << (56-9)) | (56'(1) << (56-18)) | (56'(1) << (56-22)) |
            (56'(1) << (56-25)) | (56'(1) << (56-35)) | (56'(1) << (56-38)) |
            (56'(1) << (56-43)) | (56'(1) << (56-54));
      {c, d} = cd; #1;
      `CHECK_EQ(k, base, "PC2 ignores dropped bits")
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
