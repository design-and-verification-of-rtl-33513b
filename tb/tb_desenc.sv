// tb_desenc -- end-to-end test of the DES core at its only configuration.
//
// 1. The 34 known-answer vectors of the classic DES validation set: key and
//    plaintext are applied after a falling edge and held, and ct must equal
//    the published ciphertext after the 16th rising edge. Latency: where the
//    round-16 S-box value of the previous block differs from the new one,
//    ct must still be wrong after the 15th edge. (Consecutive blocks related
//    by DES's complementation property, DES(~k,~p) = ~DES(k,p), leave every
//    S-box input unchanged and are valid early; they are not latency checks.)
// 2. 300 random key/plaintext pairs against the behavioural reference model.
// 3. Scan unload: after an encryption, test_se is raised and both 256-flop
//    chains are shifted out; every bit must match the S-box outputs the
//    reference model computes for rounds 1..8 (chain 1) and 9..16 (chain 2).
//    The bits shifted in meanwhile are random and must reappear at the chain
//    outputs 256 clocks later (scan load / delay-line check).
// 4. Back in functional mode, an encryption must again be correct.
// Every mechanism (functional encryption, latency edge, scan unload, scan
// load, functional/scan mode switch) is counted and must occur.
`include "tb_check.svh"
module tb_desenc;
  import des_pkg::*;
  import des_ref_pkg::*;

  localparam int CHAIN = 256;

  int checks = 0, failures = 0;
  int n_encrypt = 0, n_latency = 0, n_unload = 0, n_load = 0, n_switch = 0;

  logic   clk = 0;
  block_t pt, key, ct;
  logic   test_se = 0, test_si1 = 0, test_si2 = 0, test_so1, test_so2;
  logic [31:0]    sout [16];
  logic [CHAIN-1:0] pat1, pat2;

  desenc dut (
    .clk(clk), .pt(pt), .key(key), .ct(ct),
    .test_se(test_se), .test_si1(test_si1), .test_so1(test_so1),
    .test_si2(test_si2), .test_so2(test_so2));

  always #250 clk = ~clk;   // 500 ns period, as in the original flow

  initial begin : watchdog
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Apply one block, run 16 clocks and check ct; optionally check that it
  // was not yet correct after 15 clocks.
  task automatic encrypt(block_t k, block_t p, block_t expected, bit check_latency, string what);
    @(negedge clk);
    key = k; pt = p;
    repeat (15) @(posedge clk);
    #1;
    if (check_latency) begin
      checks++;
      n_latency++;
      if (ct === expected) begin
        failures++;
        $display("FAIL %s: ciphertext already valid after 15 clocks", what);
      end
    end
    @(posedge clk); #1;
    `CHECK_EQ(ct, expected, what)
    n_encrypt++;
  endtask

  // Ciphertext of the flop at chain position p (0 = next to scan-in) for
  // the rounds covered by one chain, from the reference S-box outputs.
  function automatic logic flop_value(int first_round, int p);
    return sout[first_round + p / 32][31 - p % 32];
  endfunction

  initial begin
    block_t k, p, expected;
    logic [31:0] last_s16;

    // start from a known state so the first latency check is meaningful
    encrypt(KAT[0].key, KAT[0].pt, KAT[0].ct, 1'b0, "initial block");
    void'(ref_des(KAT[0].key, KAT[0].pt, sout));
    last_s16 = sout[15];

    // 1. known-answer vectors
    for (int i = 0; i < NUM_KAT; i++) begin
      void'(ref_des(KAT[i].key, KAT[i].pt, sout));
      encrypt(KAT[i].key, KAT[i].pt, KAT[i].ct, sout[15] != last_s16,
              $sformatf("known-answer vector %0d", i));
      last_s16 = sout[15];
    end

    // 2. random blocks against the reference model
    for (int i = 0; i < 300; i++) begin
      k = rand64(); p = rand64();
      expected = ref_des(k, p, sout);
      encrypt(k, p, expected, sout[15] != last_s16, "random block");
      last_s16 = sout[15];
    end

    // 3. scan unload of the state of the last encryption, load of a pattern
    void'(ref_des(k, p, sout));
    pat1 = {8{$urandom()}} ^ {$urandom(), $urandom(), $urandom(), $urandom(),
                              $urandom(), $urandom(), $urandom(), $urandom()};
    pat2 = {$urandom(), $urandom(), $urandom(), $urandom(),
            $urandom(), $urandom(), $urandom(), $urandom()};
    @(negedge clk);
    test_se = 1; n_switch++;
    for (int t = 0; t < CHAIN; t++) begin
      `CHECK_EQ(test_so1, flop_value(0, CHAIN - 1 - t), $sformatf("chain 1 unload bit %0d", t))
      `CHECK_EQ(test_so2, flop_value(8, CHAIN - 1 - t), $sformatf("chain 2 unload bit %0d", t))
      n_unload++;
      test_si1 = pat1[t]; test_si2 = pat2[t];
      @(negedge clk);
    end
    for (int t = 0; t < CHAIN; t++) begin
      `CHECK_EQ(test_so1, pat1[t], "chain 1 load")
      `CHECK_EQ(test_so2, pat2[t], "chain 2 load")
      n_load++;
      test_si1 = 1'b0; test_si2 = 1'b0;
      @(negedge clk);
    end
    test_se = 0; n_switch++;

    // 4. functional again after scan
    encrypt(64'hfedcba9876543210, 64'hffffffffffffffff, 64'h2a2bb008df97c2f2, 1'b1,
            "encryption after scan");

    if (n_encrypt == 0 || n_latency == 0 || n_unload == 0 || n_load == 0 || n_switch == 0) begin
      failures++;
      $display("FAIL a mechanism was never exercised");
    end
    checks++;
    $display("mechanisms: encryptions=%0d latency_checks=%0d scan_unload_bits=%0d scan_load_bits=%0d mode_switches=%0d",
             n_encrypt, n_latency, n_unload, n_load, n_switch);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
