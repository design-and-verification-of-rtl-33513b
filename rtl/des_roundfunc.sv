// des_roundfunc -- one DES round (standard building block).
//
// Computes L_i = R_{i-1} and R_i = L_{i-1} xor P(S(E(R_{i-1}) xor K_i)).
// The expansion, key XOR, S-box look-up, P permutation and output XOR are
// separate sub-blocks as in the original design, and the only storage is the
// 32-bit register behind the eight S-boxes. Timing: the S-box register takes
// the value of E(R_{i-1}) xor K_i at each rising edge; R_i is that registered
// value permuted and XORed with the current L_{i-1}, and L_i is a wire.
// Scan: the 32 S-box flops form one segment, scan_in -> S1 ... S8 -> scan_out.
module des_roundfunc
  import des_pkg::*;
(
  input  logic    clk,
  input  half_t   li,        // L_{i-1}
  input  half_t   ri,        // R_{i-1}
  input  subkey_t k,         // K_i
  output half_t   lo,        // L_i
  output half_t   ro,        // R_i
  input  logic    scan_en,
  input  logic    scan_in,
  output logic    scan_out
);

  subkey_t e;
  sin_t    b  [NUM_SBOX];
  sout_t   so [NUM_SBOX];
  half_t   ppo;
  logic [NUM_SBOX:0] chain;

  des_xp   u_xp   (.ri(ri), .e(e));
  des_xor1 u_xor1 (.e(e), .k(k), .b(b));

  assign chain[0] = scan_in;
  for (genvar j = 0; j < NUM_SBOX; j++) begin : g_sbox
    des_sbox #(.BOX(j + 1)) u_s (
      .clk     (clk),
      .b       (b[j]),
      .so      (so[j]),
      .scan_en (scan_en),
      .scan_in (chain[j]),
      .scan_out(chain[j+1])
    );
  end
  assign scan_out = chain[NUM_SBOX];

  des_pp   u_pp   (.so(so), .ppo(ppo));
  des_xor2 u_xor2 (.d(ppo), .l(li), .q(ro));

  assign lo = ri;

endmodule
