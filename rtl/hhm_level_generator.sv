// hhm_level_generator: non-carrier switching-angle comparator.
//
// Turns the angle count of the current position in the AC cycle into the
// signed output level of an M-level inverter ((M-1)/2 positive levels, the
// same number of negative levels and zero). The sine is quarter-wave
// symmetric, so the 7 low bits of the angle are folded into the first
// quarter: q = p for p <= 64 and q = 128 - p above (p = angle mod 128), i.e.
// the thresholds are met in ascending order up to 90 degrees and in reverse
// order after it. The level magnitude is the number of thresholds T_i with
// q >= T_i; the top angle bit gives the half cycle and so the sign.
//
// The thresholds T_i are the improved half-height-method angles of
// luo_pkg::hhm_threshold, fixed at elaboration: for M = 35 they are
// 2, 4, 7, 9, 11, 14, 16, 19, 22, 25, 28, 31, 34, 38, 42, 47, 55.
//
// Interface: purely combinational, phase in, {neg, mag} out. mag is the
// level magnitude (0..(M-1)/2), neg is high in the negative half cycle
// (angle counts 128..255), also while mag is 0.
//
// From the source design: the angle formula, 2^8 resolution, the 35-level
// default and the ascending/reversed order around the quarter. This
// implementation's choices: the fold index and the sign taken from the
// half-cycle bit.
module hhm_level_generator #(
  parameter int unsigned M = 35
) (
  input  logic [luo_pkg::PHASE_W-1:0] phase,
  output logic [luo_pkg::MAG_W-1:0]   mag,
  output logic                        neg
);
  import luo_pkg::*;

  localparam int unsigned NLEV = (M - 1) / 2;

  if (M < 3 || M > MAX_LEVELS || (M % 2) == 0) begin : g_bad_m
    $error("hhm_level_generator: M must be odd and within 3..63");
  end

  logic [PHASE_W-2:0] p;      // position within the half cycle, 0..127
  logic [PHASE_W-2:0] q;      // folded into the first quarter, 0..64
  logic [NLEV-1:0]    above;  // thermometer code: q has passed T_i

  assign p   = phase[PHASE_W-2:0];
  assign neg = phase[PHASE_W-1];

  always_comb begin
    if (p <= (PHASE_W-1)'(QUARTER)) q = p;
    else                            q = (PHASE_W-1)'(2 * QUARTER) - p;
  end

  for (genvar i = 1; i <= NLEV; i++) begin : g_thr
    localparam int unsigned T = hhm_threshold(i, M);
    assign above[i-1] = (int'(q) >= T);
  end

  always_comb begin
    mag = '0;
    for (int i = 0; i < NLEV; i++) mag = mag + MAG_W'(above[i]);
  end

endmodule
