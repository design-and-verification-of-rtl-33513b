// scan_dff -- multiplexed scan flip-flop.
//
// A rising-edge D flip-flop preceded by a 2:1 multiplexer. With scan_enable
// low the flip-flop captures the functional input d; with scan_enable high it
// captures scan_in, so that cells whose q feeds the next cell's scan_in form
// a shift register (scan chain). q serves both as functional output and as
// scan_out. No reset: every flop of this design is rewritten on each clock.
// This is the multiplexed-flip-flop scan style of the original testable
// ASIC; the inverted output of a library cell is not modelled because nothing
// here uses it.
module scan_dff (
  input  logic clk,
  input  logic d,            // functional data
  input  logic scan_in,      // serial scan data
  input  logic scan_enable,  // 1: shift (take scan_in), 0: functional (take d)
  output logic q             // data output, also the scan output
);

  always_ff @(posedge clk)
    q <= scan_enable ? scan_in : d;

endmodule
