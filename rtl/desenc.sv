// desenc -- DES encryption core, unrolled over 16 rounds, with full scan.
//
// Function: ct = DES_key(pt). The plaintext goes through the initial
// permutation, sixteen chained round blocks and the final permutation; a
// combinational key schedule supplies K1..K16 to the rounds.
//
// Timing: each round registers only its S-box outputs, and the L/R halves
// pass between rounds as wires. Round i's register therefore holds a correct
// value one clock after round i-1's did, and ct is correct from the 16th
// rising clock edge after pt and key were applied, provided both are held
// steady for those 16 clocks. There is no start, valid or reset signal: the
// ciphertext simply settles. A new block may be applied every 16 clocks. This
// is the operation of the original design; the registers are not a pipeline,
// because the wire paths from earlier rounds would corrupt a second block in
// flight. Those wire paths also set the longest register-to-register path:
// R_i = R_{i-2} xor P(Sreg_i), so round 1's register reaches round 16's S-box
// through eight XOR levels before the key XOR and the S-box look-up.
//
// Test: all 512 S-box flops are multiplexed scan flip-flops in two chains of
// 256. Chain 1 runs test_si1 -> round 1 S1 ... round 8 S8 -> test_so1, chain
// 2 runs test_si2 -> round 9 ... round 16 -> test_so2; within an S-box the
// standard bit 1 of its output is shifted first. test_se high shifts both
// chains by one place per clock; test_se low is normal operation. The scan
// ports and their names follow the original testable ASIC; the chain order
// is this design's choice.
//
// FILLER_OR = 1 selects the original design's hierarchical-layout variant,
// which adds one functionally transparent OR gate in PC-1 (see des_pc1). The
// default (0) leaves it out; the ciphertext is the same either way.
module desenc
  import des_pkg::*;
#(
  parameter bit FILLER_OR = 1'b0  // 1: include the filler OR gate in PC-1
)
(
  input  logic   clk,
  input  block_t pt,        // plaintext, standard bit 1 = pt[63]
  input  block_t key,       // key with parity bits, standard bit 1 = key[63]
  output block_t ct,        // ciphertext, standard bit 1 = ct[63]
  input  logic   test_se,   // scan enable
  input  logic   test_si1,  // scan chain 1 input
  output logic   test_so1,  // scan chain 1 output
  input  logic   test_si2,  // scan chain 2 input
  output logic   test_so2   // scan chain 2 output
);

  localparam int unsigned HALF = ROUNDS / 2;  // rounds per scan chain

  subkey_t k [ROUNDS];
  half_t   l [ROUNDS+1];
  half_t   r [ROUNDS+1];
  logic    chain_in  [ROUNDS];  // scan input of round i+1
  logic    chain_out [ROUNDS];  // scan output of round i+1

  des_keysched #(.FILLER_OR(FILLER_OR)) u_keysched (.key(key), .k(k));
  des_ip       u_ip       (.pt(pt), .l0(l[0]), .r0(r[0]));

  for (genvar i = 0; i < ROUNDS; i++) begin : g_round
    // round HALF starts the second chain
    if (i == 0) begin : g_head1
      assign chain_in[i] = test_si1;
    end else if (i == HALF) begin : g_head2
      assign chain_in[i] = test_si2;
    end else begin : g_link
      assign chain_in[i] = chain_out[i-1];
    end
    des_roundfunc u_round (
      .clk     (clk),
      .li      (l[i]),
      .ri      (r[i]),
      .k       (k[i]),
      .lo      (l[i+1]),
      .ro      (r[i+1]),
      .scan_en (test_se),
      .scan_in (chain_in[i]),
      .scan_out(chain_out[i])
    );
  end

  assign test_so1 = chain_out[HALF-1];
  assign test_so2 = chain_out[ROUNDS-1];

  des_fp u_fp (.l(r[ROUNDS]), .r(l[ROUNDS]), .ct(ct));

endmodule
