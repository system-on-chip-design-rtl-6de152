// luo_pkg: constants, types and elaboration-time functions shared by the
// switching-pattern controller of the LUO progression switched ladder inverter.
//
// The inverter stacks four DC sources whose voltages follow the LUO
// progression V_i = i for i <= 2 and V_i = 7 * 3^(i-2) for i >= 3, i.e.
// 1, 2, 7 and 21 V. Each source can be added (p), subtracted (n) or
// bypassed (d); a pair of polarity switches (swp/swn) then sets the sign of
// the ladder voltage seen by the load. These 4 x 3 + 2 = 14 signals are the
// controller's outputs, named as in the reference block diagram.
//
// Switching angles follow the half-height method (HHM): level i (1..(m-1)/2)
// turns on at alpha_i = asin((2i-1)/(m-1)). One AC cycle is digitised into
// 2^8 angle counts, and the improved method places the threshold one count
// past the truncated angle: T_i = floor(alpha_i * 256 / (2*pi)) + 1. The
// thresholds are computed here at elaboration time with real arithmetic;
// no real-valued logic reaches the hardware.
//
// The voltages, the 2^8 resolution, the switch names and the angle formula
// follow the source design; the exact placement of the integer offset "1"
// (added to the truncated count) is this implementation's reading, chosen
// because it reproduces the published RMS and fundamental values.
package luo_pkg;

  // Number of DC sources in the ladder and the angle resolution.
  localparam int unsigned N_SRC   = 4;
  localparam int unsigned PHASE_W = 8;                 // 2^8 counts per cycle
  localparam int unsigned PHASE_N = 1 << PHASE_W;      // 256
  localparam int unsigned QUARTER = PHASE_N / 4;       // 64 counts = 90 deg

  // Highest level count the four sources can reach: 1+2+7+21 = 31, so at
  // most 2*31+1 = 63 levels; level magnitudes fit in 5 bits.
  localparam int unsigned MAX_LEVELS = 63;
  localparam int unsigned MAG_W      = 5;

  // Source voltage of ladder stage i (1-based), equations (1) and (2).
  function automatic int unsigned luo_voltage(input int unsigned i);
    int unsigned v;
    if (i <= 2) return i;
    v = 7;
    for (int unsigned k = 3; k < i; k++) v = v * 3;
    return v;
  endfunction

  // Contribution of one source to the ladder voltage.
  typedef enum logic [1:0] {
    SRC_BYPASS = 2'b00,   // d: source shorted out of the ladder
    SRC_ADD    = 2'b01,   // p: source inserted with its + terminal up
    SRC_SUB    = 2'b10    // n: source inserted reversed
  } src_mode_e;

  // Gate drives for one source: exactly one of the three is high.
  typedef struct packed {
    logic p;
    logic n;
    logic d;
  } src_sw_t;

  // All 14 gate drives. src[0] is the 1 V source, src[3] the 21 V source.
  typedef struct packed {
    src_sw_t [N_SRC-1:0] src;
    logic                swp;   // polarity: ladder voltage applied as +
    logic                swn;   // polarity: ladder voltage applied as -
  } sw_pattern_t;

  // Improved HHM threshold, in angle counts, of level i (1-based) of an
  // m-level inverter: floor(asin((2i-1)/(m-1)) * 2^PHASE_W / (2*pi)) + 1.
  function automatic int unsigned hhm_threshold(input int unsigned i,
                                                input int unsigned m);
    real ratio, angle;
    ratio = real'(2 * i - 1) / real'(m - 1);
    angle = $asin(ratio) * real'(PHASE_N) / (2.0 * 3.14159265358979323846);
    return int'($floor(angle)) + 1;
  endfunction

endpackage
