// tb_des_sbox -- self-checking test of the registered S-boxes S1..S8.
// One instance per box. For all 64 inputs, the output after a rising edge
// must equal the reference look-up (row b1b6, column b2..b5), and must not
// change before that edge. Also checks known entries of the published tables
// (S1(011000) = 0101 ... S8(100111) = 0111 from the textbook round 1), that
// every row of every box is a permutation of 0..15, and a scan shift of the
// 32 flops of all eight boxes chained in order.
`include "tb_check.svh"
module tb_des_sbox;
  import des_pkg::*;
  import des_ref_pkg::*;

  int checks = 0, failures = 0;
  logic  clk = 0;
  logic  scan_en = 0;
  sin_t  b [NUM_SBOX];
  sout_t so [NUM_SBOX];
  logic  [NUM_SBOX:0] chain;
  sout_t prev [NUM_SBOX];
  logic  [31:0] pattern, got;

  localparam logic [5:0] KB [8] = '{6'b011000, 6'b010001, 6'b011110, 6'b111010,
                                    6'b100001, 6'b100110, 6'b010100, 6'b100111};
  localparam logic [3:0] KS [8] = '{4'h5, 4'hc, 4'h8, 4'h2, 4'hb, 4'h5, 4'h9, 4'h7};

  for (genvar j = 0; j < NUM_SBOX; j++) begin : g_dut
    des_sbox #(.BOX(j + 1)) dut (
      .clk(clk), .b(b[j]), .so(so[j]),
      .scan_en(scan_en), .scan_in(chain[j]), .scan_out(chain[j+1]));
  end

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    chain[0] = 0;
    // every row of every box is a permutation of 0..15
    for (int j = 0; j < 8; j++)
      for (int row = 0; row < 4; row++) begin
        automatic logic [15:0] seen = '0;
        for (int col = 0; col < 16; col++) seen[ref_sbox(j, {row[1], 4'(col), row[0]})] = 1'b1;
        `CHECK_EQ(seen, 16'hffff, "S-box row is a permutation")
      end
    // textbook round-1 values
    @(negedge clk);
    for (int j = 0; j < 8; j++) b[j] = KB[j];
    @(posedge clk); #1;
    for (int j = 0; j < 8; j++) `CHECK_EQ(so[j], KS[j], $sformatf("S%0d known value", j + 1))
    // exhaustive, with the one-clock latency
    for (int v = 0; v < 64; v++) begin
      @(negedge clk);
      for (int j = 0; j < 8; j++) begin
        prev[j] = so[j];
        b[j] = 6'(v + 7*j);
      end
      #1;
      for (int j = 0; j < 8; j++) `CHECK_EQ(so[j], prev[j], "output waits for the clock edge")
      @(posedge clk); #1;
      for (int j = 0; j < 8; j++) `CHECK_EQ(so[j], ref_sbox(j, b[j]), $sformatf("S%0d table", j + 1))
    end
    // scan: shift 32 bits through S1..S8, then shift them out again
    pattern = $urandom();
    @(negedge clk);
    scan_en = 1;
    for (int i = 0; i < 32; i++) begin
      chain[0] = pattern[31 - i];
      @(negedge clk);
    end
    // after 32 shifts the first bit in sits in S8's last flop, so the
    // register image is the pattern in reverse bit order
    got = {so[0], so[1], so[2], so[3], so[4], so[5], so[6], so[7]};
    `CHECK_EQ(got, {<<{pattern}}, "scan load")
    for (int i = 0; i < 32; i++) begin
      `CHECK_EQ(chain[8], pattern[31 - i], "scan unload")
      chain[0] = 0;
      @(negedge clk);
    end
    scan_en = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
