// therm_sr: thermometer-code shift register between controller and DCO.
//
// The register holds a thermometer code, ones from element 0 upwards
// (binary 3 is 1110_0000... for a 16-bit register). It takes the
// controller's binary word as its target and moves one position towards it
// per clock: when it holds fewer ones than the target it shifts towards the
// high end with a 1 entering at element 0; when it holds more it shifts
// towards the low end with a 0 entering at the last element. It never
// overruns its ends: at all zeros or all ones a further decrement or
// increment leaves it unchanged, so a target above N stops at all ones.
//
// The code, the 16-bit and 8-bit sizes and the hold-at-the-ends behaviour
// follow the architecture. Tracking the binary word one shift per clock is
// this design's own reading of how a binary word feeds a shift register:
// the DCO therefore only ever sees one segment switched at a time.
//
// No counter is needed: with a thermometer code, "fewer ones than t" is
// therm[t-1] == 0 and "more ones than t" is therm[t] == 1.
// Reset (asynchronous, active low) clears the register to all zeros. An
// assertion checks that the register never holds a 1 after a 0.
module therm_sr #(
  parameter int unsigned N = 16,  // register length (16 coarse, 8 fine)
  parameter int unsigned W = 4    // width of the binary target word
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] target,    // wanted number of ones
  output logic [0:N-1] therm      // thermometer code to the DCO
);
  timeunit 1ps; timeprecision 1fs;

  logic inc, dec;

  always_comb begin
    inc = 1'b0;
    dec = 1'b0;
    if (int'(target) > 0 && !therm[N-1]) begin
      // fewer ones than the target (capped at N)?
      if (int'(target) >= N) inc = 1'b1;
      else                   inc = !therm[int'(target) - 1];
    end
    if (int'(target) < N) dec = therm[int'(target)];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   therm <= '0;
    else if (inc) therm <= {1'b1, therm[0:N-2]};
    else if (dec) therm <= {therm[1:N-1], 1'b0};
  end

  // The register only ever holds a thermometer code.
  logic code_ok;
  always_comb begin
    code_ok = 1'b1;
    for (int i = 0; i < N - 1; i++)
      if (!therm[i] && therm[i+1]) code_ok = 1'b0;
  end

  a_thermometer: assert property (@(posedge clk) disable iff (!rst_n) code_ok)
    else $error("therm_sr: %b is not a thermometer code", therm);
endmodule
