// des_xp -- DES expansion permutation E.
//
// Spreads the 32-bit right half over 48 bits: each 4-bit group is flanked
// by the neighbouring bits of the adjacent groups, so 16 bits appear twice.
// Pure wiring, no clock; as in the original design (block XP of the round).
module des_xp
  import des_pkg::*;
(
  input  half_t   ri,  // R_{i-1}
  output subkey_t e    // E(R_{i-1})
);

  always_comb begin
    for (int i = 0; i < 48; i++)
      e[47-i] = ri[32-E_T[i]];
  end

endmodule
