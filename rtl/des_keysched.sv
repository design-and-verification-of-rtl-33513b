// des_keysched -- combinational DES key schedule.
//
// PC-1 splits the key into the 28-bit halves C0 and D0. Sixteen stages of
// fixed left rotations (1, 1, 2, 2, 2, 2, 2, 2, 1, 2, 2, 2, 2, 2, 2, 1 places)
// produce C_i and D_i, and a PC-2 selection per stage gives the round key
// K_i. No registers: the round keys follow the key input combinationally, so
// the key has to be held steady while a block is being encrypted. The
// unrolled, register-free structure follows the original design.
// FILLER_OR is passed to des_pc1 (see there); it does not change the result.
module des_keysched
  import des_pkg::*;
#(
  parameter bit FILLER_OR = 1'b0  // 1: include the filler OR gate in PC-1
)
(
  input  block_t  key,          // 64-bit key including parity bits
  output subkey_t k [ROUNDS]    // k[0] = K1 ... k[15] = K16
);

  khalf_t c [ROUNDS+1];
  khalf_t d [ROUNDS+1];

  des_pc1 #(.FILLER_OR(FILLER_OR)) u_pc1 (.key(key), .c0(c[0]), .d0(d[0]));

  for (genvar i = 0; i < ROUNDS; i++) begin : g_round_key
    assign c[i+1] = rotl28(c[i], ROT_T[i]);
    assign d[i+1] = rotl28(d[i], ROT_T[i]);
    des_pc2 u_pc2 (.c(c[i+1]), .d(d[i+1]), .k(k[i]));
  end

endmodule
