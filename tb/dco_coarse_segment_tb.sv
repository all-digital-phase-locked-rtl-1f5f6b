// dco_coarse_segment_tb: checks one coarse segment's logic, delays and latch.
//
// With the control bit at 0 the multiplexer must return the inverted
// nand_in after MUX_PS and the NAND output must sit at 1. With the bit at 1
// nand_out must carry the inverted nand_in after NAND_PS and mux_out the
// inverted mux_in after MUX_PS. A control change made while mux_out is low
// must wait until mux_out goes high (the latch), and one made while mux_out
// is high must act at once. Delays are checked to 0.01 ps.
module dco_coarse_segment_tb;
  timeunit 1ps; timeprecision 1fs;

  localparam real NAND_D = 150.0;
  localparam real MUX_D  = 60.0;

  logic c_bit = 1'b0, nand_in = 1'b1, mux_in = 1'b0;
  logic nand_out, mux_out;

  dco_coarse_segment #(.NAND_PS(NAND_D), .MUX_PS(MUX_D)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL at %0t: %s (c_bit %0b nand_in %0b mux_in %0b -> nand_out %0b mux_out %0b)",
               $realtime, what, c_bit, nand_in, mux_in, nand_out, mux_out);
    end
  endtask

  realtime t_nand, t_mux;
  always @(posedge nand_out or negedge nand_out) t_nand = $realtime;
  always @(posedge mux_out or negedge mux_out) t_mux = $realtime;

  function automatic bit near(real a, real b);
    return (a - b) < 0.01 && (b - a) < 0.01;
  endfunction

  initial begin
    realtime t0;
    // c = 0, latch transparent while mux_out is high
    nand_in = 1'b0;
    #1000;
    check(mux_out == 1'b1 && nand_out == 1'b1, "c=0: mux_out = ~nand_in, nand_out = 1");
    t0 = $realtime; nand_in = 1'b1;
    #1000;
    check(mux_out == 1'b0, "c=0: mux_out follows ~nand_in");
    check(near(t_mux - t0, MUX_D), $sformatf("c=0: mux delay %0.2f", t_mux - t0));
    check(nand_out == 1'b1, "c=0: NAND held high");

    // mux_out is low now: a new control bit must wait
    c_bit = 1'b1;
    #500;
    check(nand_out == 1'b1, "latch closed: bit not yet taken");
    // open the latch: mux_out goes high through the (still c=0) multiplexer
    nand_in = 1'b0;
    #500;
    check(mux_out == 1'b1, "latch opened by mux_out high");
    // c=1 now: NAND passes nand_in
    t0 = $realtime; nand_in = 1'b1;
    #1000;
    check(nand_out == 1'b0, "c=1: nand_out = ~nand_in");
    check(near(t_nand - t0, NAND_D), $sformatf("c=1: NAND delay %0.2f", t_nand - t0));
    // c=1: multiplexer passes mux_in
    t0 = $realtime; mux_in = 1'b1;
    #1000;
    check(mux_out == 1'b0, "c=1: mux_out = ~mux_in");
    check(near(t_mux - t0, MUX_D), "c=1: mux_in delay");
    t0 = $realtime; nand_in = 1'b0;
    #1000;
    check(mux_out == 1'b0, "c=1: mux_out ignores nand_in");
    check(nand_out == 1'b1, "c=1: nand_out = ~nand_in (0)");
    // mux_out low: clearing the bit must also wait
    c_bit = 1'b0;
    nand_in = 1'b1;
    #1000;
    check(nand_out == 1'b0, "latch closed: bit still 1");
    t0 = $realtime; mux_in = 1'b0;   // mux_out goes high, latch takes 0
    #1000;
    check(mux_out == 1'b0 && nand_out == 1'b1, "bit 0 taken once mux_out was high");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(1_000_000);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
