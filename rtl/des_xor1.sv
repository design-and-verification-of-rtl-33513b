// des_xor1 -- key mixing of the DES round.
//
// XORs the expanded right half with the 48-bit round key and cuts the result
// into eight 6-bit groups, b[0] feeding S1 (standard bits 1..6) up to b[7]
// feeding S8 (bits 43..48). Combinational; as in the original design.
module des_xor1
  import des_pkg::*;
(
  input  subkey_t e,             // E(R_{i-1})
  input  subkey_t k,             // K_i
  output sin_t    b [NUM_SBOX]   // S-box inputs, b[0] for S1
);

  subkey_t mixed;

  assign mixed = e ^ k;

  always_comb begin
    for (int j = 0; j < NUM_SBOX; j++)
      b[j] = mixed[47-6*j -: 6];
  end

endmodule
