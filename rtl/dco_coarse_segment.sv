// dco_coarse_segment: behavioural model of one coarse delay segment.
//
// This is a timing model of a custom delay cell, not synthesizable logic.
//
// The coarse block is a ladder of these segments. A rising or falling edge
// travels to the right through the NAND gates (nand_in -> nand_out) and
// comes back to the left through the inverting multiplexers
// (mux_in -> mux_out). The segment's control bit decides where the edge
// turns round:
//   c = 0: the multiplexer passes nand_in, so the edge turns here and sees
//          one multiplexer delay; the NAND output is held high, so the
//          segments to the right stop toggling.
//   c = 1: the NAND passes the inverted edge on to the next segment and the
//          multiplexer passes what comes back on mux_in, adding one NAND and
//          one multiplexer to the path.
// Each half period therefore grows by NAND_PS + MUX_PS per enabled segment.
//
// The control bit enters through a latch that is transparent while mux_out
// is high. A bit that changes while the segment's clock is low is held until
// the clock is high again, which removes the glitch a 0-to-1 change could
// otherwise cut into the low phase. The NAND output passes a second latch
// whose enable is tied high; it is transparent and only matches the load,
// so it is modelled as a plain connection. Both latches, the NAND, the
// inverting multiplexer and their connections follow the segment schematic;
// the delays come from the package (60 ps multiplexer, NAND delay set per
// segment to reproduce the measured period steps).
//
// Each gate process evaluates once at time zero and again on every input
// change, and uses a transport delay.
module dco_coarse_segment #(
  parameter real NAND_PS = 182.5,   // NAND delay
  parameter real MUX_PS  = 60.0     // inverting multiplexer delay
) (
  input  logic c_bit,     // coarse control bit
  input  logic nand_in,   // edge arriving from the segment on the left
  input  logic mux_in,    // edge returning from the segment on the right
  output logic nand_out,  // edge sent to the segment on the right
  output logic mux_out    // edge returned to the segment on the left
);
  timeunit 1ps; timeprecision 1fs;

  logic c_q;     // latched control bit
  logic nand_q;  // NAND output

  // Control latch, enabled by the segment's own output clock. The latch
  // inferred here is the latch of the segment schematic.
  always_latch begin
    if (mux_out) c_q = c_bit;
  end

  always begin
    nand_q <= #(NAND_PS) ~(c_q & nand_in);
    @(c_q or nand_in);
  end

  always begin
    mux_out <= #(MUX_PS) ~(c_q ? mux_in : nand_in);
    @(c_q or nand_in or mux_in);
  end

  // Output latch with its enable tied high: always transparent.
  assign nand_out = nand_q;
endmodule
