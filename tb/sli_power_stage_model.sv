// sli_power_stage_model: behavioural model of the switched ladder power
// stage, for simulation only.
//
// Four ideal DC sources of 1, 2, 7 and 21 V are each added, subtracted or
// bypassed according to their p/n/d gate signals; the polarity switches
// apply the sum to the load as + (swp) or - (swn). The output is the ideal
// load voltage in volts, with no switching delay or losses. illegal is high
// when a source has not exactly one of p/n/d on, or when swp and swn are
// equal; the load voltage is then reported as 0.
module sli_power_stage_model (
  input  logic s1p,  input logic s1n,  input logic s1d,
  input  logic s2p,  input logic s2n,  input logic s2d,
  input  logic s7p,  input logic s7n,  input logic s7d,
  input  logic s21p, input logic s21n, input logic s21d,
  input  logic swp,  input logic swn,
  output int   v_load,
  output logic illegal
);
  function automatic int stage(input logic p, input logic n, input logic d,
                               input int volts, inout logic bad);
    if ((32'(p) + 32'(n) + 32'(d)) != 1) bad = 1'b1;
    return p ? volts : (n ? -volts : 0);
  endfunction

  always_comb begin
    int   ladder;
    logic bad;
    bad    = 1'b0;
    ladder = stage(s1p, s1n, s1d, 1, bad) + stage(s2p, s2n, s2d, 2, bad)
           + stage(s7p, s7n, s7d, 7, bad) + stage(s21p, s21n, s21d, 21, bad);
    if (swp == swn) bad = 1'b1;
    illegal = bad;
    v_load  = bad ? 0 : (swp ? ladder : -ladder);
  end
endmodule
