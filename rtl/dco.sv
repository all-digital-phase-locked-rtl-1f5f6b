// dco: behavioural model of the digitally controlled ring oscillator.
//
// This is a timing model of a custom-layout oscillator, not synthesizable
// logic.
//
// The ring runs through an enable NAND, the fine tuning block and the coarse
// tuning block and back to the NAND. The coarse block adds one coarse step
// per thermometer bit (about 0.49 ns of period per bit, 16 bits), the fine
// block adds 32 to 40 ps of period per bit (8 bits). With both codes at zero
// the period is 1.388 ns (720 MHz); with 15 coarse bits it is 9.817 ns
// (102 MHz). The ring has 2n+7 inversions for n coarse bits, always odd, so
// it oscillates for every code. The period is twice the delay round the
// ring: it reproduces the measured coarse table with the fine code at zero
// and the measured fine table with the coarse code at zero; combined codes
// are taken to add.
//
// Coarse changes reach the ring through the per-segment latches (glitch
// free); fine changes act on the next edge. rst_n low forces the enable
// NAND's output, and so dco_clk, high and stops the ring; the first falling
// edge follows its release. The two tuning blocks and their sizes follow the
// design; the enable NAND, the order of the blocks in the ring and the
// reset follow this model's own choices.
module dco
  import adpll_pkg::*;
(
  input  logic          rst_n,      // low: ring stopped, output high
  input  coarse_therm_t coarse,     // coarse thermometer code
  input  fine_therm_t   fine,       // fine thermometer code
  output logic          dco_clk     // oscillator output
);
  timeunit 1ps; timeprecision 1fs;

  logic en_q;       // enable NAND output, the ring's tap
  logic fine_out;
  logic coarse_out;

  always begin
    en_q <= #(EN_NAND_PS) ~(coarse_out & rst_n);
    @(coarse_out or rst_n);
  end

  dco_fine_block u_fine (
    .ctrl (fine),
    .din  (en_q),
    .dout (fine_out)
  );

  dco_coarse_block u_coarse (
    .ctrl (coarse),
    .din  (fine_out),
    .dout (coarse_out)
  );

  assign dco_clk = en_q;
endmodule
