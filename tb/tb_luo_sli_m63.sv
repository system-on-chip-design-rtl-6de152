// tb_luo_sli_m63: the controller configured for 63 levels, the largest
// count the 1, 2, 7 and 21 V sources can make (31 V each way), with a short
// prescaler of 2 clocks per angle count. Over one full output cycle the
// load voltage of the behavioural power stage must equal the signed level
// port, follow the half-height staircase worked out here from the sine, and
// pass through every level from -31 to +31.
module tb_luo_sli_m63;
  localparam int M        = 63;
  localparam int PRESCALE = 2;

  logic clk = 1'b0;
  logic rst_n;
  logic s1p, s1n, s1d, s2p, s2n, s2d, s7p, s7n, s7d, s21p, s21n, s21d, swp, swn;
  logic signed [5:0] level;
  int   v_load;
  logic illegal;
  int   checks = 0, failures = 0;
  int   first_on [(M - 1) / 2];   // first angle count above each level's angle
  int   seen [-31:31];

  always #5 clk = ~clk;

  luo_sli_controller #(.M(M), .PRESCALE(PRESCALE)) dut (
    .clk(clk), .rst_n(rst_n),
    .s1p(s1p), .s1n(s1n), .s1d(s1d), .s2p(s2p), .s2n(s2n), .s2d(s2d),
    .s7p(s7p), .s7n(s7n), .s7d(s7d), .s21p(s21p), .s21n(s21n), .s21d(s21d),
    .swp(swp), .swn(swn), .level(level));

  sli_power_stage_model u_stage (
    .s1p(s1p), .s1n(s1n), .s1d(s1d), .s2p(s2p), .s2n(s2n), .s2d(s2d),
    .s7p(s7p), .s7n(s7n), .s7d(s7d), .s21p(s21p), .s21n(s21n), .s21d(s21d),
    .swp(swp), .swn(swn), .v_load(v_load), .illegal(illegal));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (first_on[i]) begin
      real thr;
      thr = real'(2 * i + 1) / real'(M - 1);
      first_on[i] = 0;
      while ($sin(2.0 * 3.14159265358979 * real'(first_on[i]) / 256.0) <= thr) first_on[i]++;
    end
    foreach (seen[l]) seen[l] = 0;
    rst_n = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int t = 0; t < 256 * PRESCALE; t++) begin
      int c, p, q, lvl;
      @(posedge clk);
      #1;
      c = t / PRESCALE;
      p = c % 128;
      q = (p <= 64) ? p : 128 - p;
      lvl = 0;
      foreach (first_on[i]) if (q >= first_on[i]) lvl++;
      if (c >= 128) lvl = -lvl;
      check(!illegal, $sformatf("illegal gates at count %0d", c));
      check(v_load == lvl && int'(level) == lvl,
            $sformatf("count %0d: load %0d level %0d exp %0d", c, v_load, level, lvl));
      seen[v_load]++;
    end
    for (int l = -31; l <= 31; l++) check(seen[l] > 0, $sformatf("level %0d never produced", l));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
