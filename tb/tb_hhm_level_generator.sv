// tb_hhm_level_generator: self-checking test of the switching-angle
// comparator, exhaustive over all 256 angle counts.
// Two instances: the 35-level default, checked against a fixed list of the
// 17 threshold counts, and a 7-level one. For both, the expected level is
// also worked out here from the sine itself: level i is on at count c of
// the first quarter when c is the first count whose sine exceeds
// (2i-1)/(m-1); the second quarter mirrors the first around count 64 and
// the second half is the negative of the first.
module tb_hhm_level_generator;
  // improved half-height thresholds of the 35-level inverter, in counts
  localparam int T35 [17] = '{2, 4, 7, 9, 11, 14, 16, 19, 22, 25, 28, 31, 34, 38, 42, 47, 55};

  logic [7:0] phase;
  logic [4:0] mag35, mag7;
  logic       neg35, neg7;
  int         checks = 0, failures = 0;

  hhm_level_generator #(.M(35)) dut35 (.phase(phase), .mag(mag35), .neg(neg35));
  hhm_level_generator #(.M(7))  dut7  (.phase(phase), .mag(mag7),  .neg(neg7));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  // level by sine search: count of i whose first count above the ideal
  // angle is at or below the folded position q
  function automatic int sine_level(input int q, input int m);
    int lvl = 0;
    for (int i = 1; i <= (m - 1) / 2; i++) begin
      real thr = real'(2 * i - 1) / real'(m - 1);
      int  first = 0;
      while ($sin(2.0 * 3.14159265358979 * real'(first) / 256.0) <= thr) first++;
      if (q >= first) lvl++;
    end
    return lvl;
  endfunction

  function automatic int table_level(input int q);
    int lvl = 0;
    foreach (T35[i]) if (q >= T35[i]) lvl++;
    return lvl;
  endfunction

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int seen_peak = 0;
    for (int c = 0; c < 256; c++) begin
      int p, q;
      phase = 8'(c);
      #1;
      p = c % 128;
      q = (p <= 64) ? p : 128 - p;
      check(int'(mag35) == table_level(q), $sformatf("m=35 c=%0d mag=%0d exp=%0d", c, mag35, table_level(q)));
      check(int'(mag35) == sine_level(q, 35), $sformatf("m=35 c=%0d sine", c));
      check(int'(mag7) == sine_level(q, 7), $sformatf("m=7 c=%0d mag=%0d", c, mag7));
      check(neg35 == (c >= 128) && neg7 == (c >= 128), $sformatf("sign c=%0d", c));
      if (mag35 == 17) seen_peak++;
    end
    // peak level held from count 55 to 73 in each half: 19 counts
    check(seen_peak == 2 * 19, $sformatf("peak counts %0d", seen_peak));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
