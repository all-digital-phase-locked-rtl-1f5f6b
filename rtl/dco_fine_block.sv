// dco_fine_block: behavioural model of the DCO's fine tuning block.
//
// This is a timing model of custom delay cells, not synthesizable logic.
//
// Five inverters in series carry the ring's edge. The outputs of the first
// four inverters (taps n1..n4) are each loaded by the eight fine segments.
// A fine segment is two NAND gates per tap, used as digitally controlled
// varactors: one input sits on the tap, the other is the segment's enable,
// and the NAND outputs are left open. Raising the enable changes the gate
// capacitance the tap sees, which slows the inverter driving it. Eight
// control bits thus switch 64 NAND varactors, eight per bit.
//
// The model folds the varactors into the inverter delays: each of the first
// four inverters takes INV_PS plus, for every enabled segment j,
// fine_tap_ps(j). Those per-segment figures reproduce the measured fine
// period table. The inverter count, the four taps and the eight segments
// follow the design; the unloaded inverter delay is this model's choice.
// Control changes act on the next edge through each inverter.
module dco_fine_block
  import adpll_pkg::*;
(
  input  fine_therm_t ctrl,   // thermometer code, element 0 = segment f0
  input  logic        din,    // edge entering the block
  output logic        dout    // edge leaving the block (inverted)
);
  timeunit 1ps; timeprecision 1fs;

  logic [5:0] node;   // node[0] = din, node[k] = output of inverter k
  real        load_ps;

  // Extra delay per loaded inverter for the current control code.
  always_comb begin
    load_ps = 0.0;
    for (int unsigned j = 0; j < FINE_N; j++)
      if (ctrl[j]) load_ps += fine_tap_ps(j);
  end

  assign node[0] = din;

  for (genvar k = 1; k <= 5; k++) begin : g_inv
    logic q;
    if (k <= 4) begin : g_tapped
      always begin
        q <= #(INV_PS + load_ps) ~node[k-1];
        @(node[k-1]);
      end
    end else begin : g_plain
      always begin
        q <= #(INV_PS) ~node[k-1];
        @(node[k-1]);
      end
    end
    assign node[k] = q;
  end

  assign dout = node[5];
endmodule
