// luo_switch_encoder: level-to-gate-pattern encoder of the switched ladder.
//
// Each of the four LUO sources (1, 2, 7, 21 V) contributes +V, -V or 0 to
// the ladder voltage; the polarity switches then apply that voltage to the
// load with either sign. A level magnitude L (0..31) is split into source
// modes from the largest source down, keeping the remainder r (starting at
// L) within what the smaller sources can still reach, R_k = V_1 + .. V_(k-1):
//   add source k if r > R_k, subtract it if r < -R_k, else bypass it;
//   r = r - (its contribution).
// With 1, 2, 7, 21 V the limits are 10 for the 21 V source, 3 for 7 V, 1 for
// 2 V and 0 for 1 V.
// This yields the combinations of the 35-level voltage table (e.g. 4 = 7-2-1,
// 11 = 21-7-2-1, 15 = 21-7+1) and extends them to 31 for 63 levels. Negative
// levels reuse the magnitude pattern with swn on instead of swp.
//
// Interface: mag/neg in (from hhm_level_generator); the 14 gate signals and
// the signed level they produce come out of registers, one clock after the
// inputs. For each source exactly one of p, n, d is high; swp and swn are
// complementary once out of reset. Active-low synchronous reset: all sources bypassed and both
// polarity switches open (no voltage on the load).
//
// From the source design: the source voltages, the p/n/d and swp/swn signal
// set and the per-level combinations. This implementation's choices: the
// output register, the reset state, and keeping the polarity switch on the
// side of the current half cycle at level 0.
module luo_switch_encoder (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic [luo_pkg::MAG_W-1:0]   mag,
  input  logic                        neg,
  output luo_pkg::sw_pattern_t        sw,
  output logic signed [luo_pkg::MAG_W:0] level
);
  import luo_pkg::*;

  src_mode_e   mode [N_SRC];
  sw_pattern_t sw_d;

  // Total voltage the sources below source k (0-based) can reach.
  function automatic int reach_below(input int unsigned k);
    int sum = 0;
    for (int unsigned j = 1; j <= k; j++) sum += int'(luo_voltage(j));
    return sum;
  endfunction

  always_comb begin
    int r;
    r = int'(mag);
    // largest source first: add it when the remainder is beyond what the
    // smaller sources can make, subtract it when below minus that amount
    for (int k = N_SRC - 1; k >= 0; k--) begin
      if (r > reach_below(k)) begin
        mode[k] = SRC_ADD;
        r = r - int'(luo_voltage(k + 1));
      end else if (r < -reach_below(k)) begin
        mode[k] = SRC_SUB;
        r = r + int'(luo_voltage(k + 1));
      end else begin
        mode[k] = SRC_BYPASS;
      end
    end

    for (int k = 0; k < N_SRC; k++) begin
      sw_d.src[k].p = (mode[k] == SRC_ADD);
      sw_d.src[k].n = (mode[k] == SRC_SUB);
      sw_d.src[k].d = (mode[k] == SRC_BYPASS);
    end
    sw_d.swp = !neg;
    sw_d.swn = neg;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sw       <= '0;
      for (int k = 0; k < N_SRC; k++) sw.src[k].d <= 1'b1;
      level    <= '0;
    end else begin
      sw    <= sw_d;
      level <= neg ? -$signed({1'b0, mag}) : $signed({1'b0, mag});
    end
  end

  // Per source, exactly one of add / subtract / bypass.
  for (genvar k = 0; k < N_SRC; k++) begin : g_chk
    a_onehot: assert property (@(posedge clk) disable iff (!rst_n)
      $onehot({sw.src[k].p, sw.src[k].n, sw.src[k].d}));
  end
  // The two polarity switches are never on together.
  a_polarity: assert property (@(posedge clk) !(sw.swp && sw.swn));

endmodule
