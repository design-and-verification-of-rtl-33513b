// tb_desenc_kat -- the known-answer run of the DES core, timed like the
// original verification flow.
//
// Thirty-four key/plaintext pairs are applied one after another; each is held
// for exactly sixteen clock periods of 500 ns (250 ns low, then 250 ns high)
// and ct is compared with the published ciphertext right after the sixteenth
// rising edge. The scan inputs are held at test_se = 0 and test_si = 1, so the
// test also shows that the scan-in pins have no effect in functional mode.
// The whole run must take 34 x 16 x 500 ns = 272,000 ns. A second core,
// built with the filler OR gate of the hierarchical-layout variant
// (FILLER_OR = 1), runs alongside and must give the same ciphertexts.
`include "tb_check.svh"
module tb_desenc_kat;
  import des_pkg::*;
  import des_ref_pkg::*;

  int checks = 0, failures = 0;
  logic   clk = 0;
  block_t pt, key, ct, ct_filler;
  logic   test_so1, test_so2, test_so1_f, test_so2_f;

  desenc dut (
    .clk(clk), .pt(pt), .key(key), .ct(ct),
    .test_se(1'b0), .test_si1(1'b1), .test_so1(test_so1),
    .test_si2(1'b1), .test_so2(test_so2));

  desenc #(.FILLER_OR(1'b1)) dut_filler (
    .clk(clk), .pt(pt), .key(key), .ct(ct_filler),
    .test_se(1'b0), .test_si1(1'b1), .test_so1(test_so1_f),
    .test_si2(1'b1), .test_so2(test_so2_f));

  initial begin : watchdog
    #400us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < NUM_KAT; i++) begin
      key = KAT[i].key;
      pt  = KAT[i].pt;
      for (int j = 0; j < 16; j++) begin
        clk = 1'b0; #250ns;
        clk = 1'b1; #250ns;
      end
      `CHECK_EQ(ct, KAT[i].ct, $sformatf("vector %0d", i))
      `CHECK_EQ(ct_filler, KAT[i].ct, $sformatf("vector %0d, filler variant", i))
    end
    checks++;
    if ($time != 272000) begin
      failures++;
      $display("FAIL run took %0t, expected 272000 ns", $time);
    end
    $display("34 vectors in %0t ns", $time);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
