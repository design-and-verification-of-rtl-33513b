// des_ip -- DES initial permutation.
//
// Reorders the 64 plaintext bits according to the standard IP table and
// splits the result into the left half L0 (standard bits 1..32 of the
// permuted block) and the right half R0 (bits 33..64). Pure wiring, no
// clock. The table and the split into two 32-bit outputs follow the
// original design.
module des_ip
  import des_pkg::*;
(
  input  block_t pt,   // plaintext, standard bit 1 = pt[63]
  output half_t  l0,   // L0
  output half_t  r0    // R0
);

  block_t permuted;

  always_comb begin
    for (int i = 0; i < 64; i++)
      permuted[63-i] = pt[64-IP_T[i]];
  end

  assign l0 = permuted[63:32];
  assign r0 = permuted[31:0];

endmodule
