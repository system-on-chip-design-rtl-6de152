// tb_luo_switch_encoder: self-checking test of the level-to-gate encoder.
// Levels 0..17 are compared with the 35-level voltage combination table,
// written out here as the mode (+1 add, -1 subtract, 0 bypass) of the 1, 2,
// 7 and 21 V sources. Levels 18..31 (63-level use) are checked for a legal
// pattern whose source voltages sum to the level. Both signs are applied;
// the test checks the reset state, the one-clock latency, the polarity
// switches and the signed level output.
module tb_luo_switch_encoder;
  import luo_pkg::*;

  // {21 V, 7 V, 2 V, 1 V} source modes for levels 0..17
  localparam int TBL [18][4] = '{
    '{ 0,  0,  0,  0},   //  0
    '{ 0,  0,  0,  1},   //  1 = 1
    '{ 0,  0,  1,  0},   //  2 = 2
    '{ 0,  0,  1,  1},   //  3 = 1 + 2
    '{ 0,  1, -1, -1},   //  4 = 7 - 2 - 1
    '{ 0,  1, -1,  0},   //  5 = 7 - 2
    '{ 0,  1,  0, -1},   //  6 = 7 - 1
    '{ 0,  1,  0,  0},   //  7 = 7
    '{ 0,  1,  0,  1},   //  8 = 7 + 1
    '{ 0,  1,  1,  0},   //  9 = 7 + 2
    '{ 0,  1,  1,  1},   // 10 = 7 + 2 + 1
    '{ 1, -1, -1, -1},   // 11 = 21 - 7 - 2 - 1
    '{ 1, -1, -1,  0},   // 12 = 21 - 7 - 2
    '{ 1, -1,  0, -1},   // 13 = 21 - 7 - 1
    '{ 1, -1,  0,  0},   // 14 = 21 - 7
    '{ 1, -1,  0,  1},   // 15 = 21 - 7 + 1
    '{ 1, -1,  1,  0},   // 16 = 21 - 7 + 2
    '{ 1, -1,  1,  1}    // 17 = 21 - 7 + 2 + 1
  };
  localparam int VOLTS [4] = '{21, 7, 2, 1};

  logic              clk = 1'b0;
  logic              rst_n;
  logic [4:0]        mag;
  logic              neg;
  sw_pattern_t       sw;
  logic signed [5:0] level;
  int                checks = 0, failures = 0;

  always #5 clk = ~clk;

  luo_switch_encoder dut (.clk(clk), .rst_n(rst_n), .mag(mag), .neg(neg), .sw(sw), .level(level));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  // mode of source index s (0 = 21 V .. 3 = 1 V) as seen on the gate signals
  function automatic int mode_of(input sw_pattern_t x, input int s);
    src_sw_t g;
    g = x.src[3 - s];
    if (32'(g.p) + 32'(g.n) + 32'(g.d) != 1) return 99;
    return g.p ? 1 : (g.n ? -1 : 0);
  endfunction

  initial begin : watchdog
    #20000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0;
    mag   = 5'd9;
    neg   = 1'b0;
    repeat (2) @(posedge clk);
    #1;
    for (int s = 0; s < 4; s++) check(mode_of(sw, s) == 0, "reset: all sources bypassed");
    check(!sw.swp && !sw.swn && level == 0, "reset: polarity switches open");
    rst_n = 1'b1;
    for (int sgn = 0; sgn < 2; sgn++) begin
      for (int l = 0; l <= 31; l++) begin
        sw_pattern_t held;
        held = sw;
        mag  = 5'(l);
        neg  = sgn[0];
        #1 check(sw == held, $sformatf("latency: pattern changed before the clock, level %0d", l));
        @(posedge clk);
        #1;
        if (l <= 17) begin
          for (int s = 0; s < 4; s++)
            check(mode_of(sw, s) == TBL[l][s], $sformatf("level %0d source %0d V: mode %0d exp %0d", l, VOLTS[s], mode_of(sw, s), TBL[l][s]));
        end else begin
          int sum;
          sum = 0;
          for (int s = 0; s < 4; s++) begin
            check(mode_of(sw, s) != 99, $sformatf("level %0d: illegal gates", l));
            sum += mode_of(sw, s) * VOLTS[s];
          end
          check(sum == l, $sformatf("level %0d: sources sum to %0d", l, sum));
        end
        check(sw.swp == !sgn[0] && sw.swn == sgn[0], $sformatf("polarity level %0d", l));
        check(int'(level) == (sgn ? -l : l), $sformatf("signed level %0d: %0d", l, level));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
