// des_pc2 -- DES key schedule permuted choice 2.
//
// Selects 48 of the 56 bits of C||D with the PC-2 table to form one round
// key. The key schedule holds sixteen copies, one per round. Pure wiring,
// no clock; as in the original design.
module des_pc2
  import des_pkg::*;
(
  input  khalf_t  c,   // C_i
  input  khalf_t  d,   // D_i
  output subkey_t k    // K_i, standard bit 1 = k[47]
);

  logic [55:0] cd;

  assign cd = {c, d};

  always_comb begin
    for (int i = 0; i < 48; i++)
      k[47-i] = cd[56-PC2_T[i]];
  end

endmodule
