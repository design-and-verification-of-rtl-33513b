// des_sbox -- one DES substitution box with its output register.
//
// BOX selects which of S1..S8 this instance is. The 6-bit input b1..b6 picks
// row b1b6 and column b2b3b4b5 of the box; the 4-bit result is captured in
// four multiplexed scan flip-flops on the rising clock edge, so the output so
// is the substitution of the input seen one clock earlier. Placing the round's
// only register behind the S-box look-up follows the original design; the
// scan cells reproduce its full-scan testable version. Scan order inside the
// box: scan_in -> so[3] (standard bit 1) -> ... -> so[0] -> scan_out.
module des_sbox
  import des_pkg::*;
#(
  parameter int unsigned BOX = 1   // 1..8: which S-box
) (
  input  logic  clk,
  input  sin_t  b,          // 6-bit input, b1 = b[5]
  output sout_t so,         // registered 4-bit output, standard bit 1 = so[3]
  input  logic  scan_en,
  input  logic  scan_in,
  output logic  scan_out
);

  if (BOX < 1 || BOX > NUM_SBOX) begin : g_bad_box
    $error("des_sbox: BOX must be 1..8");
  end

  sout_t sub;
  logic [4:0] chain;   // chain[4] is scan_in, chain[i] is so[i]

  assign sub      = sbox_lookup(3'(BOX - 1), b);
  assign chain[4] = scan_in;

  for (genvar i = 3; i >= 0; i--) begin : g_ff
    scan_dff u_ff (
      .clk        (clk),
      .d          (sub[i]),
      .scan_in    (chain[i+1]),
      .scan_enable(scan_en),
      .q          (so[i])
    );
    assign chain[i] = so[i];
  end

  assign scan_out = chain[0];

endmodule
