// tb_scan_dff -- self-checking test of the multiplexed scan flip-flop.
// Drives random d, scan_in and scan_enable for 2000 clocks and checks that
// after each rising edge q holds scan_in when scan_enable was high and d
// when it was low, and that q does not change between edges.
`include "tb_check.svh"
module tb_scan_dff;
  int checks = 0, failures = 0;
  logic clk = 0;
  logic d, scan_in, scan_enable, q, expected;
  int n_scan = 0, n_func = 0;

  scan_dff dut (.clk(clk), .d(d), .scan_in(scan_in), .scan_enable(scan_enable), .q(q));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      d = 1'($urandom()); scan_in = 1'($urandom()); scan_enable = 1'($urandom());
      expected = scan_enable ? scan_in : d;
      if (scan_enable) n_scan++; else n_func++;
      @(posedge clk); #1;
      `CHECK_EQ(q, expected, "q after edge")
      d = ~d; scan_in = ~scan_in; #1;
      `CHECK_EQ(q, expected, "q holds between edges")
    end
    checks++;
    if (n_scan == 0 || n_func == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
