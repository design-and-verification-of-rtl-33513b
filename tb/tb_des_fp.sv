// tb_des_fp -- self-checking test of the final permutation.
// FP must undo IP: for random blocks x, FP(IP(x)) == x with IP taken from
// the reference model. Also checks the textbook pre-output R16L16 =
// 0A4CD995 43423234 giving ciphertext 85E813540F0AB405.
`include "tb_check.svh"
module tb_des_fp;
  import des_pkg::*;
  import des_ref_pkg::*;

  int checks = 0, failures = 0;
  half_t  l, r;
  block_t ct, x, y;

  des_fp dut (.l(l), .r(r), .ct(ct));

  initial begin : watchdog
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    l = 32'h0a4cd995; r = 32'h43423234; #1;
    `CHECK_EQ(ct, 64'h85e813540f0ab405, "FP known value")
    for (int i = 0; i < 1000; i++) begin
      x = rand64();
      y = ref_ip(x);
      l = y[63:32]; r = y[31:0]; #1;
      `CHECK_EQ(ct, x, "FP(IP(x)) == x")
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
