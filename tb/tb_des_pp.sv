// tb_des_pp -- self-checking test of the permutation P.
// Textbook value P(5C82B597) = 234AA9BB, and 1000 random words against the
// reference model.
`include "tb_check.svh"
module tb_des_pp;
  import des_pkg::*;
  import des_ref_pkg::*;

  int checks = 0, failures = 0;
  sout_t so [NUM_SBOX];
  half_t ppo, w;

  des_pp dut (.so(so), .ppo(ppo));

  task automatic apply(half_t v);
    for (int j = 0; j < NUM_SBOX; j++) so[j] = v[31 - 4*j -: 4];
    #1;
  endtask

  initial begin : watchdog
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    apply(32'h5c82b597);
    `CHECK_EQ(ppo, 32'h234aa9bb, "P known value")
    for (int i = 0; i < 1000; i++) begin
      w = $urandom();
      apply(w);
      `CHECK_EQ(ppo, ref_p(w), "P random")
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
