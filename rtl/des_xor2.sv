// des_xor2 -- output XOR of the DES round.
//
// Combines the permuted S-box output f(R_{i-1}, K_i) with L_{i-1} to form
// the new right half R_i. Combinational; as in the original design.
module des_xor2
  import des_pkg::*;
(
  input  half_t d,   // f(R_{i-1}, K_i) from the P permutation
  input  half_t l,   // L_{i-1}
  output half_t q    // R_i
);

  assign q = d ^ l;

endmodule
