// my_or2 -- two-input OR gate used as a filler cell.
//
// o = i1 | i2, purely combinational. The original design's hierarchical
// placement variant puts one such gate into PC-1 with both inputs tied to the
// same key bit, so the gate passes that bit through unchanged. Its only purpose
// there is to give the placement flow a standard cell to place at the top
// level; it has no effect on the cipher. Here it is used only when the
// FILLER_OR parameter of des_pc1 (and of des_keysched and desenc above it) is
// set; by default it is left out.
module my_or2 (
  input  logic i1,  // first input
  input  logic i2,  // second input
  output logic o    // i1 OR i2
);

  assign o = i1 | i2;

endmodule
