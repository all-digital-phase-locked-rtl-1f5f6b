// pfd: phase frequency detector with a single UP/DOWN output.
//
// Two flip-flops with D tied high are clocked by the reference clock and by
// the DCO clock. Whichever edge arrives first raises its output (up for the
// reference, dn for the DCO); when the second edge arrives both outputs are
// high, the AND of the two clears both flip-flops and the detector returns to
// its idle state. This is the classic two-flip-flop-and-AND detector, with a
// linear range of -2*pi..2*pi.
//
// A small converter turns the up/dn pulse pair into one level: up_down is
// captured on the first edge of each up/dn pulse. It is 1 when the reference
// edge came first (the DCO must speed up) and 0 when the DCO edge came first
// (the DCO must slow down), and it holds that value until the next pair of
// edges. Capturing on the rising edge of (up | dn) is this design's own
// converter; when both edges arrive together the value is 1.
//
// rst_n clears both flip-flops and up_down asynchronously. The clear path
// has no added delay, so in simulation the pulse of the late input has zero
// width. The combinational loop through the AND gate is the detector itself.
module pfd (
  input  logic ref_clk,   // reference clock
  input  logic dco_clk,   // DCO feedback clock
  input  logic rst_n,     // asynchronous reset, active low
  output logic up,        // reference edge seen, DCO edge not yet
  output logic dn,        // DCO edge seen, reference edge not yet
  output logic up_down    // 1: raise DCO frequency, 0: lower it
);
  timeunit 1ps; timeprecision 1fs;

  logic clr;
  logic any_edge;

  assign clr      = (up & dn) | ~rst_n;
  assign any_edge = up | dn;

  always_ff @(posedge ref_clk or posedge clr) begin
    if (clr) up <= 1'b0;
    else     up <= 1'b1;
  end

  always_ff @(posedge dco_clk or posedge clr) begin
    if (clr) dn <= 1'b0;
    else     dn <= 1'b1;
  end

  // UP/DOWN converter: the flip-flop that rose first decides.
  always_ff @(posedge any_edge or negedge rst_n) begin
    if (!rst_n) up_down <= 1'b0;
    else        up_down <= up;
  end
endmodule
