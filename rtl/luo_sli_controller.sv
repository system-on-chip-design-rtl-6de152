// luo_sli_controller: switching-pattern controller (the top level) for an
// M-level LUO progression switched ladder inverter, 35 levels by default.
//
// The chain is: phase_counter steps an 8-bit angle through one AC cycle;
// hhm_level_generator compares the angle with the improved half-height
// switching angles and gives the signed level; luo_switch_encoder turns the
// level into the 14 gate drives of the power stage and registers them. The
// result is a staircase from 0 up to +17 V, back down, to -17 V and back per
// cycle of 256 angle counts (with 1, 2, 7 and 21 V sources).
//
// Interface: clk and an active-low synchronous reset in; the 14 gate signals
// out as single bits, named after the power-stage switches (sKp/sKn/sKd for
// the K-volt source: add, subtract, bypass; swp/swn for the output
// polarity), plus the signed level they select, for monitoring.
// Timing: one angle count every PRESCALE clocks, so one output cycle every
// PRESCALE * 256 clocks; the gate signals follow the angle by one clock.
//
// From the source design: the structure, the 14 outputs and their names,
// 35 levels and the 2^8 angle resolution. This implementation's choices:
// the prescaler length, the reset input and the level monitor port.
module luo_sli_controller #(
  parameter int unsigned M        = 35,
  parameter int unsigned PRESCALE = 512
) (
  input  logic clk,
  input  logic rst_n,
  output logic s1p,  output logic s1n,  output logic s1d,
  output logic s2p,  output logic s2n,  output logic s2d,
  output logic s7p,  output logic s7n,  output logic s7d,
  output logic s21p, output logic s21n, output logic s21d,
  output logic swp,  output logic swn,
  output logic signed [luo_pkg::MAG_W:0] level
);
  import luo_pkg::*;

  logic [PHASE_W-1:0] phase;
  logic               step;
  logic [MAG_W-1:0]   mag;
  logic               neg;
  sw_pattern_t        sw;

  phase_counter #(
    .PHASE_W (PHASE_W),
    .PRESCALE(PRESCALE)
  ) u_phase (
    .clk  (clk),
    .rst_n(rst_n),
    .phase(phase),
    .step (step)
  );

  hhm_level_generator #(
    .M(M)
  ) u_level (
    .phase(phase),
    .mag  (mag),
    .neg  (neg)
  );

  luo_switch_encoder u_enc (
    .clk  (clk),
    .rst_n(rst_n),
    .mag  (mag),
    .neg  (neg),
    .sw   (sw),
    .level(level)
  );

  assign {s1p,  s1n,  s1d}  = sw.src[0];
  assign {s2p,  s2n,  s2d}  = sw.src[1];
  assign {s7p,  s7n,  s7d}  = sw.src[2];
  assign {s21p, s21n, s21d} = sw.src[3];
  assign swp = sw.swp;
  assign swn = sw.swn;

endmodule
