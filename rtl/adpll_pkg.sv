// adpll_pkg: sizes and delay figures shared by the ADPLL blocks.
//
// The loop drives a 16-segment coarse delay chain and an 8-segment fine
// delay block with thermometer codes. The controller talks to the two
// thermometer shift registers in 4-bit binary words. These widths follow
// the architecture: 16-bit coarse register, 8-bit fine register, 4-bit
// words from the controller.
//
// The delay figures are the ones the behavioural DCO model uses. They are
// chosen so that the model reproduces the measured post-layout periods:
// with n coarse bits set and no fine bits the period is COARSE_PERIOD_PS[n],
// with m fine bits set and no coarse bits it is FINE_PERIOD_PS[m]. The
// split of the 694 ps base half-period between the enable gate, the five
// fine-block inverters and the coarse multiplexer (60 ps, the multiplexer
// delay the coarse segment is constrained to) is this model's own choice.
// All time values are in picoseconds.
package adpll_pkg;
  timeunit 1ps; timeprecision 1fs;

  localparam int unsigned COARSE_N = 16;  // coarse segments / coarse SR bits
  localparam int unsigned FINE_N   = 8;   // fine segments / fine SR bits
  localparam int unsigned WORD_W   = 4;   // binary word from the controller

  typedef logic [WORD_W-1:0] word_t;
  // Thermometer codes are indexed from 0 at the left: element 0 is the first
  // segment, so the literal 16'b1000_0000_0000_0000 sets one coarse bit.
  typedef logic [0:COARSE_N-1] coarse_therm_t;
  typedef logic [0:FINE_N-1]   fine_therm_t;

  // Measured DCO period against the number of coarse bits set (fine = 0).
  localparam real COARSE_PERIOD_PS [COARSE_N] = '{
    1388.0, 1873.0, 2357.0, 2837.0, 3704.0, 4190.0, 4600.0, 5157.0,
    6027.0, 6519.0, 7004.0, 7477.0, 8361.0, 8848.0, 9330.0, 9817.0};

  // Measured DCO period against the number of fine bits set (coarse = 0).
  localparam real FINE_PERIOD_PS [FINE_N+1] = '{
    1388.0, 1420.0, 1460.0, 1492.0, 1529.0, 1566.0, 1601.0, 1639.0, 1677.0};

  // Period step added by the last coarse segment, which no measured code
  // reaches (a 4-bit word sets at most 15 bits); taken as the mean step.
  localparam real LAST_COARSE_STEP_PS = 487.0;

  localparam real MUX_PS      = 60.0;   // inverting multiplexer of a coarse segment
  localparam real INV_PS      = 120.0;  // one fine-block inverter, unloaded
  localparam real EN_NAND_PS  = 34.0;   // ring enable gate

  // NAND delay of coarse segment i: enabling the segment adds one NAND and
  // one multiplexer to each half period, i.e. half the period step.
  function automatic real coarse_nand_ps(int unsigned i);
    real step;
    step = (i + 1 < COARSE_N) ? COARSE_PERIOD_PS[i+1] - COARSE_PERIOD_PS[i]
                              : LAST_COARSE_STEP_PS;
    return step / 2.0 - MUX_PS;
  endfunction

  // Extra delay that fine segment j adds to each of the four inverters it
  // loads: its period step split over two half periods and four taps.
  function automatic real fine_tap_ps(int unsigned j);
    return (FINE_PERIOD_PS[j+1] - FINE_PERIOD_PS[j]) / 8.0;
  endfunction

  // Number of ones in a thermometer code (counts every set bit).
  function automatic int unsigned ones16(coarse_therm_t t);
    int unsigned n = 0;
    for (int unsigned i = 0; i < COARSE_N; i++) n += int'(t[i]);
    return n;
  endfunction

  function automatic int unsigned ones8(fine_therm_t t);
    int unsigned n = 0;
    for (int unsigned i = 0; i < FINE_N; i++) n += int'(t[i]);
    return n;
  endfunction
endpackage
