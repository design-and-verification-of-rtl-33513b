// tb_des_roundfunc -- self-checking test of one DES round.
// Textbook round 1 (L0 = CC00CCFF, R0 = F0AAF0AA, K1 = 1B02EFFC7072) must give
// L1 = F0AAF0AA and R1 = EF4A6544 one clock after the inputs are applied;
// L_i is combinational, R_i waits for the edge. Then 500 random rounds
// against the reference model, and a 32-bit scan shift through the round.
`include "tb_check.svh"
module tb_des_roundfunc;
  import des_pkg::*;
  import des_ref_pkg::*;

  int checks = 0, failures = 0;
  logic    clk = 0;
  half_t   li, ri, lo, ro, ro_before;
  subkey_t k;
  logic    scan_en = 0, scan_in = 0, scan_out;
  logic [31:0] pattern;

  des_roundfunc dut (.clk(clk), .li(li), .ri(ri), .k(k), .lo(lo), .ro(ro),
                     .scan_en(scan_en), .scan_in(scan_in), .scan_out(scan_out));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    li = 32'h0; ri = 32'h0; k = '0;
    @(negedge clk);
    li = 32'hcc00ccff; ri = 32'hf0aaf0aa; k = 48'h1b02effc7072; #1;
    ro_before = ro;
    `CHECK_EQ(lo, 32'hf0aaf0aa, "L1 is R0 at once")
    `CHECK_EQ(ro_before, 32'hcc00ccff ^ ref_p(ref_s(32'h0, 48'h0)), "R1 still from old S-box value")
    @(posedge clk); #1;
    `CHECK_EQ(ro, 32'hef4a6544, "R1 known value")
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      li = $urandom(); ri = $urandom(); k = 48'({$urandom(), $urandom()});
      @(posedge clk); #1;
      `CHECK_EQ(lo, ri, "L_i = R_{i-1}")
      `CHECK_EQ(ro, li ^ ref_p(ref_s(ri, k)), "R_i random")
    end
    // scan shift
    pattern = $urandom();
    scan_en = 1;
    for (int i = 0; i < 32; i++) begin
      @(negedge clk);
      scan_in = pattern[31 - i];
    end
    for (int i = 0; i < 32; i++) begin
      @(posedge clk); #1;
      `CHECK_EQ(scan_out, pattern[31 - i], "scan out")
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
