// adpll: all-digital phase-locked loop, top level.
//
// The loop locks a ring oscillator (DCO) to a reference clock in the
// 100-720 MHz range. A phase frequency detector compares REF_CLK with the
// DCO output and gives one UP/DOWN level per reference cycle. A stepping
// controller turns those decisions into two 4-bit words: first it sweeps the
// coarse word until the direction reverses, then it tracks with the fine
// word. Two shift registers, 16 bits for the coarse and 8 bits for the fine
// word, turn the words into the thermometer codes that switch the DCO's
// coarse segments and fine varactors.
//
//   REF_CLK --+--> pfd --UP/DOWN--> ref_sync --> controller --4--> therm_sr(16) --+
//             |     ^                                        --4--> therm_sr(8)  --+--> dco --> DCO_CLK
//             +-----|-----------------------------------------------------------------------+
//                   +----------------------------- DCO_CLK <-------------------------------+
//
// CLK paces the controller and the shift registers: it must run at least
// twice as fast as REF_CLK (four times or more keeps the loop delay short).
// ref_sync, which brings the reference edge and UP/DOWN into the CLK domain,
// is this design's own, as is that CLK rate. RESET is asynchronous and
// active high; it stops the DCO and clears both codes (the DCO's fastest
// setting). Lock indication: COARSE_LOCKED rises when the fine stage takes
// over. The remaining status outputs expose the loop's state for test.
//
// The DCO is a behavioural timing model; everything else is synthesizable.
module adpll
  import adpll_pkg::*;
(
  input  logic          RESET,          // asynchronous reset, active high
  input  logic          REF_CLK,        // reference clock
  input  logic          CLK,            // system clock, >= 2x REF_CLK
  output logic          DCO_CLK,        // output clock
  output logic          PFD_UP,         // detector: reference edge first
  output logic          PFD_DN,         // detector: DCO edge first
  output logic          UP_DOWN,        // detector decision (REF_CLK/DCO_CLK domain)
  output logic          COARSE_LOCKED,  // coarse stage finished
  output word_t         COARSE_WORD,    // controller coarse word
  output word_t         FINE_WORD,      // controller fine word
  output coarse_therm_t COARSE_CODE,    // coarse thermometer code at the DCO
  output fine_therm_t   FINE_CODE       // fine thermometer code at the DCO
);
  timeunit 1ps; timeprecision 1fs;

  logic rst_n;
  logic step, up_down_s;

  assign rst_n = ~RESET;

  pfd u_pfd (
    .ref_clk (REF_CLK),
    .dco_clk (DCO_CLK),
    .rst_n   (rst_n),
    .up      (PFD_UP),
    .dn      (PFD_DN),
    .up_down (UP_DOWN)
  );

  ref_sync u_sync (
    .clk       (CLK),
    .rst_n     (rst_n),
    .ref_clk   (REF_CLK),
    .up_down   (UP_DOWN),
    .step      (step),
    .up_down_s (up_down_s)
  );

  controller u_ctrl (
    .clk           (CLK),
    .rst_n         (rst_n),
    .step          (step),
    .up_down       (up_down_s),
    .coarse_word   (COARSE_WORD),
    .fine_word     (FINE_WORD),
    .coarse_locked (COARSE_LOCKED)
  );

  therm_sr #(.N(COARSE_N), .W(WORD_W)) u_coarse_sr (
    .clk    (CLK),
    .rst_n  (rst_n),
    .target (COARSE_WORD),
    .therm  (COARSE_CODE)
  );

  therm_sr #(.N(FINE_N), .W(WORD_W)) u_fine_sr (
    .clk    (CLK),
    .rst_n  (rst_n),
    .target (FINE_WORD),
    .therm  (FINE_CODE)
  );

  dco u_dco (
    .rst_n   (rst_n),
    .coarse  (COARSE_CODE),
    .fine    (FINE_CODE),
    .dco_clk (DCO_CLK)
  );
endmodule
