// tb_luo_sli_controller: end-to-end test of the switching-pattern
// controller at its default parameters (35 levels, 512 clocks per angle
// count, 256 counts per output cycle).
//
// The 14 gate signals drive a behavioural model of the switched ladder
// power stage; the resulting load voltage is compared every clock with a
// reference staircase worked out here from the clock count and the list of
// 17 switching-angle counts. Two full output cycles are run. The test counts
// how often each mechanism happens and fails if one never does: every level
// from -17 to +17, a rise and a fall of the staircase, a polarity reversal,
// the wrap of the angle at the end of a cycle, and a return to reset in the
// middle of a cycle. Over each complete cycle it also computes the RMS value,
// the peak and the fundamental amplitude of the load voltage and the total
// harmonic distortion, and checks them against values expected for these
// angles (RMS 12.03 V, fundamental 17.01 V, peak 17 V).
module tb_luo_sli_controller;
  localparam int unsigned PRESCALE = 512;     // the controller's default
  localparam int unsigned NCOUNT   = 256;
  localparam longint      PERIOD   = longint'(PRESCALE) * NCOUNT;
  localparam int          T35 [17] = '{2, 4, 7, 9, 11, 14, 16, 19, 22, 25, 28, 31, 34, 38, 42, 47, 55};
  localparam real         PI       = 3.14159265358979;

  logic clk = 1'b0;
  logic rst_n;
  logic s1p, s1n, s1d, s2p, s2n, s2d, s7p, s7n, s7d, s21p, s21n, s21d, swp, swn;
  logic signed [5:0] level;
  int   v_load;
  logic illegal;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  luo_sli_controller dut (
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

  // expected load voltage at angle count c
  function automatic int ref_volts(input int c);
    int p, q, lvl;
    p = c % 128;
    q = (p <= 64) ? p : 128 - p;
    lvl = 0;
    foreach (T35[i]) if (q >= T35[i]) lvl++;
    return (c >= 128) ? -lvl : lvl;
  endfunction

  initial begin : watchdog
    repeat (3 * PERIOD + 5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int seen_level [-17:17];
  int n_rise = 0, n_fall = 0, n_polarity = 0, n_wrap = 0, n_reset = 0;

  // run n clocks after reset release, checking each one; measure each
  // complete cycle
  task automatic run_and_check(input longint n_clocks);
    longint t;
    int     prev_v, prev_c;
    logic   prev_swp;
    real    sum_sq, a_cos, a_sin;
    int     vmax, vmin;
    prev_v = 0; prev_c = 0; prev_swp = 1'b1;
    sum_sq = 0.0; a_cos = 0.0; a_sin = 0.0; vmax = 0; vmin = 0;
    for (t = 0; t < n_clocks; t++) begin
      int c, exp_v;
      @(posedge clk);
      #1;
      // the gates registered at clock edge t show the angle count held
      // just before that edge, t / PRESCALE
      c = int'(((t) / PRESCALE) % NCOUNT);
      exp_v = ref_volts(c);
      check(!illegal, $sformatf("illegal gate pattern at clock %0d", t));
      check(v_load == exp_v && int'(level) == exp_v,
            $sformatf("clock %0d count %0d: load %0d level %0d exp %0d", t, c, v_load, level, exp_v));
      if (v_load >= -17 && v_load <= 17) seen_level[v_load]++;
      if (v_load > prev_v) n_rise++;
      if (v_load < prev_v) n_fall++;
      if (swp != prev_swp) n_polarity++;
      if (c == 0 && prev_c == NCOUNT - 1) n_wrap++;
      prev_v = v_load; prev_c = c; prev_swp = swp;
      // one sample per angle count for the cycle measurements
      if (t % PRESCALE == 0) begin
        real ang;
        ang = 2.0 * PI * real'(c) / real'(NCOUNT);
        sum_sq += real'(v_load) ** 2;
        a_cos  += real'(v_load) * $cos(ang);
        a_sin  += real'(v_load) * $sin(ang);
        if (v_load > vmax) vmax = v_load;
        if (v_load < vmin) vmin = v_load;
        if (c == NCOUNT - 1) begin
          real vrms, fund, thd;
          vrms = $sqrt(sum_sq / real'(NCOUNT));
          fund = 2.0 * $sqrt(a_cos ** 2 + a_sin ** 2) / real'(NCOUNT);
          thd  = 100.0 * $sqrt(vrms ** 2 * 2.0 - fund ** 2) / fund;
          $display("cycle: Vrms=%0.3f Vfund=%0.3f Vpeak=%0d/%0d THD=%0.2f%%", vrms, fund, vmax, vmin, thd);
          check(vrms > 12.025 && vrms < 12.035, $sformatf("Vrms %0.3f", vrms));
          check(fund > 17.005 && fund < 17.015, $sformatf("fundamental %0.3f", fund));
          check(vmax == 17 && vmin == -17, "peak +-17 V");
          check(thd < 3.0, $sformatf("THD %0.2f", thd));
          sum_sq = 0.0; a_cos = 0.0; a_sin = 0.0; vmax = 0; vmin = 0;
        end
      end
    end
  endtask

  initial begin
    foreach (seen_level[l]) seen_level[l] = 0;
    rst_n = 1'b0;
    repeat (3) @(posedge clk);
    #1;
    check(v_load == 0 && !swp && !swn && s1d && s2d && s7d && s21d, "reset state: all bypassed, load open");
    rst_n = 1'b1;
    run_and_check(2 * PERIOD + 3 * PRESCALE);
    // reset in the middle of a cycle, then restart from angle 0
    rst_n = 1'b0;
    @(posedge clk);
    #1 check(v_load == 0 && !swp && !swn, "mid-cycle reset");
    n_reset++;
    rst_n = 1'b1;
    run_and_check(20 * PRESCALE);

    for (int l = -17; l <= 17; l++) check(seen_level[l] > 0, $sformatf("level %0d never produced", l));
    check(n_rise > 0 && n_fall > 0, "rise and fall");
    check(n_polarity >= 4, $sformatf("polarity reversals %0d", n_polarity));
    check(n_wrap == 2, $sformatf("cycle wraps %0d", n_wrap));
    check(n_reset == 1, "mid-cycle reset");
    $display("mechanisms: rises=%0d falls=%0d polarity=%0d wraps=%0d resets=%0d levels=35",
             n_rise, n_fall, n_polarity, n_wrap, n_reset);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
