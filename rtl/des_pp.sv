// des_pp -- DES permutation P applied to the S-box outputs.
//
// Concatenates the eight 4-bit S-box outputs (S1 in the most significant
// nibble) and reorders the 32 bits with the P table. Pure wiring, no clock;
// as in the original design (block PP of the round).
module des_pp
  import des_pkg::*;
(
  input  sout_t so [NUM_SBOX],  // so[0] is S1 ... so[7] is S8
  output half_t ppo             // P(S1..S8)
);

  half_t cat;

  always_comb begin
    for (int j = 0; j < NUM_SBOX; j++)
      cat[31-4*j -: 4] = so[j];
    for (int i = 0; i < 32; i++)
      ppo[31-i] = cat[32-P_T[i]];
  end

endmodule
