// tb_des_ip -- self-checking test of the initial permutation.
// Checks the textbook value IP(0123456789ABCDEF) = CC00CCFF F0AAF0AA, that a
// single set input bit lands where the table says, and 1000 random blocks
// against the bit-serial reference model.
`include "tb_check.svh"
module tb_des_ip;
  import des_pkg::*;
  import des_ref_pkg::*;

  int checks = 0, failures = 0;
  block_t pt;
  half_t  l0, r0;

  des_ip dut (.pt(pt), .l0(l0), .r0(r0));

  initial begin : watchdog
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pt = 64'h0123456789abcdef; #1;
    `CHECK_EQ({l0, r0}, 64'hcc00ccfff0aaf0aa, "IP known value")
    // standard bit 58 goes to output bit 1, bit 7 to output bit 64
    pt = 64'(1) << (64 - 58); #1;
    `CHECK_EQ({l0, r0}, 64'h8000000000000000, "IP bit 58 -> 1")
    pt = 64'(1) << (64 - 7); #1;
    `CHECK_EQ({l0, r0}, 64'h0000000000000001, "IP bit 7 -> 64")
    for (int i = 0; i < 1000; i++) begin
      pt = rand64(); #1;
      `CHECK_EQ({l0, r0}, ref_ip(pt), "IP random")
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
