// dco_coarse_block: behavioural model of the DCO's coarse tuning block.
//
// This is a timing model of custom delay cells, not synthesizable logic.
//
// Sixteen coarse segments form a ladder. The edge enters at segment 0 on
// nand_in, runs right through the NAND gates of the enabled segments, turns
// round at the first segment whose control bit is 0 and returns left through
// the multiplexers to leave on segment 0's mux_out. With a thermometer code
// of n ones the block's delay is one multiplexer plus n times (NAND +
// multiplexer), so each added bit lengthens the DCO period by one coarse
// step. The segment count and the ladder follow the design; the delays are
// set per segment (package function coarse_nand_ps) so that the DCO
// reproduces the measured coarse period table.
//
// The last segment has no right-hand neighbour: its mux_in takes its own
// NAND output through an inverter with the multiplexer's delay, standing in
// for the turn a seventeenth segment would make. Enabling all sixteen bits thus still gives
// an inverting path. That termination is this model's choice; the
// controller's 4-bit coarse word never sets more than fifteen bits.
module dco_coarse_block
  import adpll_pkg::*;
(
  input  coarse_therm_t ctrl,     // thermometer code, element 0 = segment 0
  input  logic          din,      // edge entering the block
  output logic          dout      // edge leaving the block (inverted)
);
  timeunit 1ps; timeprecision 1fs;

  logic [COARSE_N-1:0] nand_o;
  logic [COARSE_N-1:0] mux_o;

  for (genvar i = 0; i < COARSE_N; i++) begin : g_seg
    logic nin, min;
    if (i == 0) begin : g_first
      assign nin = din;
    end else begin : g_mid
      assign nin = nand_o[i-1];
    end
    if (i == COARSE_N - 1) begin : g_last
      logic term_q;
      always begin
        term_q <= #(MUX_PS) ~nand_o[i];
        @(nand_o[i]);
      end
      assign min = term_q;
    end else begin : g_inner
      assign min = mux_o[i+1];
    end

    dco_coarse_segment #(
      .NAND_PS (coarse_nand_ps(i)),
      .MUX_PS  (MUX_PS)
    ) u_seg (
      .c_bit    (ctrl[i]),
      .nand_in  (nin),
      .mux_in   (min),
      .nand_out (nand_o[i]),
      .mux_out  (mux_o[i])
    );
  end

  assign dout = mux_o[0];
endmodule
