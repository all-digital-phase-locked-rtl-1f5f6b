// pfd_tb: checks the phase frequency detector and its UP/DOWN converter.
//
// Single edge pairs with a known offset: the output of the early input must
// go high at its edge and stay high for exactly the offset, the other output
// must stay low, both must be low afterwards, and UP/DOWN must be 1 when the
// reference led and 0 when the DCO led (and hold until the next pair).
// Free-running clocks 10-15% apart in frequency: once the starting phase
// has worked off, every decision must be 0 with the DCO faster and 1 with it
// slower. Reset clears everything.
module pfd_tb;
  timeunit 1ps; timeprecision 1fs;

  logic ref_clk = 1'b0, dco_clk = 1'b0, rst_n = 1'b1;
  logic up, dn, up_down;

  pfd dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL at %0t: %s (up %0b dn %0b up_down %0b)", $time, what, up, dn, up_down);
    end
  endtask

  // measure the width of up and dn pulses
  realtime up_rise, dn_rise, up_width, dn_width;
  always @(posedge up) up_rise = $realtime;
  always @(negedge up) up_width = $realtime - up_rise;
  always @(posedge dn) dn_rise = $realtime;
  always @(negedge dn) dn_width = $realtime - dn_rise;

  // one edge pair: offset > 0 means the reference leads
  task automatic pair(input real offset);
    up_width = 0; dn_width = 0;
    if (offset >= 0) begin
      ref_clk = 1'b1;
      #1 check(up && !dn, "early reference raises up only");
      #(offset - 1) dco_clk = 1'b1;
      #1 check(!up && !dn, "late edge clears both");
      check(up_width == offset, $sformatf("up width %0.1f = offset %0.1f", up_width, offset));
      check(up_down == 1'b1, "reference led: UP/DOWN = 1");
    end else begin
      dco_clk = 1'b1;
      #1 check(dn && !up, "early DCO raises dn only");
      #(-offset - 1) ref_clk = 1'b1;
      #1 check(!up && !dn, "late edge clears both");
      check(dn_width == -offset, "dn width equals offset");
      check(up_down == 1'b0, "DCO led: UP/DOWN = 0");
    end
    #500 ref_clk = 1'b0; dco_clk = 1'b0;
    #500 check(up_down == (offset >= 0), "UP/DOWN holds between pairs");
  endtask

  int n_ud1, n_ud0, n_samples;
  task automatic free_run(input real t_ref, input real t_dco, input real phase, input bit exp_ud);
    fork
      begin : g_ref
        forever begin #(t_ref / 2) ref_clk = ~ref_clk; end
      end
      begin : g_dco
        #(phase);
        forever begin #(t_dco / 2) dco_clk = ~dco_clk; end
      end
      begin : g_mon
        n_samples = 0;
        // The detector also tracks phase: until the phase difference has
        // wrapped once (at most 1/0.1 = 10 cycles here) the decision may
        // still reflect the starting phase. Skip 15, then check each one.
        repeat (15) @(posedge ref_clk);
        repeat (60) begin
          @(posedge ref_clk);
          #1;
          n_samples++;
          check(up_down == exp_ud, $sformatf("frequency decision, ref %0.0f dco %0.0f", t_ref, t_dco));
        end
      end
    join_any
    disable fork;
    ref_clk = 1'b0; dco_clk = 1'b0;
    #100;
  endtask

  initial begin
    #50 rst_n = 1'b0;   // a falling edge, so the asynchronous clear acts
    #50;
    check(!up && !dn && !up_down, "reset state");
    rst_n = 1'b1;
    #100;
    pair(200.0);
    pair(-300.0);
    pair(50.0);
    pair(-700.0);
    pair(900.0);

    // frequency detection from arbitrary phases
    free_run(1000.0, 900.0, 0.0, 1'b0);
    free_run(1000.0, 900.0, 450.0, 1'b0);
    free_run(1000.0, 1150.0, 0.0, 1'b1);
    free_run(1000.0, 1150.0, 700.0, 1'b1);

    // asynchronous reset
    ref_clk = 1'b1;
    #10 check(up, "up before reset");
    rst_n = 1'b0;
    #1 check(!up && !dn && !up_down, "reset clears outputs");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(10_000_000);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
