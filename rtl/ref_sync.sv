// ref_sync: brings the detector's decision into the controller clock domain.
//
// The reference clock and the UP/DOWN level are each passed through two
// flip-flops clocked by clk. A third flip-flop on the reference path detects
// its rising edge: step is high for one clk cycle per reference cycle, two to
// three clk cycles after the reference edge, and up_down_s is the UP/DOWN
// level sampled alongside it. The detector updates UP/DOWN no later than the
// reference edge, so the value seen with step belongs to that edge.
//
// clk must run at least twice as fast as the reference clock. This block is
// this design's own: the architecture names a separate system clock but not
// how the controller is paced.
module ref_sync (
  input  logic clk,
  input  logic rst_n,      // asynchronous reset, active low
  input  logic ref_clk,    // reference clock, asynchronous to clk
  input  logic up_down,    // detector output, asynchronous to clk
  output logic step,       // one pulse per reference cycle
  output logic up_down_s   // up_down, synchronised
);
  timeunit 1ps; timeprecision 1fs;

  logic [2:0] ref_q;
  logic [1:0] ud_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ref_q <= '0;
      ud_q  <= '0;
    end else begin
      ref_q <= {ref_q[1:0], ref_clk};
      ud_q  <= {ud_q[0], up_down};
    end
  end

  assign step      = ref_q[1] & ~ref_q[2];
  assign up_down_s = ud_q[1];
endmodule
