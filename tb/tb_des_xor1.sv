// tb_des_xor1 -- self-checking test of the key-mixing XOR.
// Textbook value E(R0) ^ K1 = 6117BA866527 split into 011000 010001 011110
// 111010 100001 100110 010100 100111, then 1000 random pairs.
`include "tb_check.svh"
module tb_des_xor1;
  import des_pkg::*;
  import des_ref_pkg::*;

  int checks = 0, failures = 0;
  subkey_t e, k, x;
  sin_t    b [NUM_SBOX];

  des_xor1 dut (.e(e), .k(k), .b(b));

  initial begin : watchdog
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    e = 48'h7a15557a1555; k = 48'h1b02effc7072; #1;
    `CHECK_EQ(b[0], 6'b011000, "S1 input")
    `CHECK_EQ(b[1], 6'b010001, "S2 input")
    `CHECK_EQ(b[2], 6'b011110, "S3 input")
    `CHECK_EQ(b[3], 6'b111010, "S4 input")
    `CHECK_EQ(b[4], 6'b100001, "S5 input")
    `CHECK_EQ(b[5], 6'b100110, "S6 input")
    `CHECK_EQ(b[6], 6'b010100, "S7 input")
    `CHECK_EQ(b[7], 6'b100111, "S8 input")
    for (int i = 0; i < 1000; i++) begin
      e = 48'({$urandom(), $urandom()});
      k = 48'({$urandom(), $urandom()});
      x = e ^ k;
      #1;
      for (int j = 0; j < NUM_SBOX; j++)
        `CHECK_EQ(b[j], sin_t'(x >> (42 - 6*j)), "xor1 random")
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
