// des_fp -- DES final permutation (IP^-1).
//
// Concatenates its two 32-bit inputs as l||r and reorders the 64 bits with
// the standard FP table. The DES top feeds l = R16 and r = L16, which is the
// swap after the last round, so no separate swap stage exists. Pure wiring,
// no clock. The port order (left input first) follows the original design.
module des_fp
  import des_pkg::*;
(
  input  half_t  l,    // upper half of the pre-output block (R16)
  input  half_t  r,    // lower half of the pre-output block (L16)
  output block_t ct    // ciphertext, standard bit 1 = ct[63]
);

  block_t preout;

  assign preout = {l, r};

  always_comb begin
    for (int i = 0; i < 64; i++)
      ct[63-i] = preout[64-FP_T[i]];
  end

endmodule
