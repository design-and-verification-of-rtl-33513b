// des_pc1 -- DES key schedule permuted choice 1.
//
// Drops the eight parity bits (standard bits 8, 16, ..., 64) of the key and
// reorders the remaining 56 bits with the PC-1 table; the first 28 bits form
// C0 and the last 28 form D0. Pure wiring, no clock; as in the original design.
//
// FILLER_OR = 1 builds the original design's hierarchical-layout variant: the
// first PC-1 output bit (key bit 57) passes through a my_or2 gate whose two
// inputs are both that bit. The result is identical; the gate only gives the
// placement flow a cell to place. The default (0) is plain wiring.
module des_pc1
  import des_pkg::*;
#(
  parameter bit FILLER_OR = 1'b0  // 1: route C0 bit 1 through a my_or2 gate
)
(
  input  block_t key,  // 64-bit key including parity bits
  output khalf_t c0,   // C0
  output khalf_t d0    // D0
);

  logic [55:0] sel;

  always_comb begin
    for (int i = 0; i < 56; i++)
      sel[55-i] = key[64-PC1_T[i]];
  end

  logic c0_msb;  // C0 bit 1, with or without the filler gate

  if (FILLER_OR) begin : g_filler
    my_or2 u_filler (.i1(sel[55]), .i2(sel[55]), .o(c0_msb));
  end else begin : g_wire
    assign c0_msb = sel[55];
  end

  assign c0 = {c0_msb, sel[54:28]};
  assign d0 = sel[27:0];

endmodule
