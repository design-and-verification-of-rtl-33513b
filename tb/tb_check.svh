// tb_check.svh -- check counter and compare macro shared by the testbenches.
// Each testbench declares `int checks, failures;` and uses CHECK_EQ to compare
// an observed value with an expected one, printing the first mismatches.
`ifndef TB_CHECK_SVH
`define TB_CHECK_SVH
`define CHECK_EQ(got, exp, what) \
  begin \
    checks++; \
    if ((got) !== (exp)) begin \
      failures++; \
      if (failures <= 10) $display("FAIL %s: got %h expected %h", what, got, exp); \
    end \
  end
`endif
