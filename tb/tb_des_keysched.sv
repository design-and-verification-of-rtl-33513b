// tb_des_keysched -- self-checking test of the combinational key schedule.
// Checks all sixteen round keys of the textbook key 133457799BBCDFF1 and
// the keys of 200 random keys against the reference model's iterative
// schedule (single-bit rotations, counted separately from the RTL table).
`include "tb_check.svh"
module tb_des_keysched;
  import des_pkg::*;
  import des_ref_pkg::*;

  int checks = 0, failures = 0;
  block_t  key;
  subkey_t k  [ROUNDS];
  logic [47:0] ks [16];

  localparam logic [47:0] KNOWN [16] = '{
    48'h1b02effc7072, 48'h79aed9dbc9e5, 48'h55fc8a42cf99, 48'h72add6db351d,
    48'h7cec07eb53a8, 48'h63a53e507b2f, 48'hec84b7f618bc, 48'hf78a3ac13bfb,
    48'he0dbebede781, 48'hb1f347ba464f, 48'h215fd3ded386, 48'h7571f59467e9,
    48'h97c5d1faba41, 48'h5f43b7f2e73a, 48'hbf918d3d3f0a, 48'hcb3d8b0e17f5};

  des_keysched dut (.key(key), .k(k));

  initial begin : watchdog
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    key = 64'h133457799bbcdff1; #1;
    for (int i = 0; i < 16; i++)
      `CHECK_EQ(k[i], KNOWN[i], $sformatf("K%0d known value", i + 1))
    for (int n = 0; n < 200; n++) begin
      key = rand64(); #1;
      ref_subkeys(key, ks);
      for (int i = 0; i < 16; i++)
        `CHECK_EQ(k[i], ks[i], $sformatf("K%0d random", i + 1))
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
