// dco_tb: checks the DCO model against the measured period tables.
//
// For every coarse code with the fine code at zero, and every fine code with
// the coarse code at zero, it measures the period over three cycles and
// compares it with the measured table (typed in here). A mixed code must
// give the coarse period plus the fine increment. Reset must hold the output
// high and stop the ring. Then the coarse code is changed at random moments
// while the ring runs: thanks to the segment latches no high or low phase
// may come out shorter than the shortest half period of the two codes
// involved (a glitch would show as a short phase).
module dco_tb;
  timeunit 1ps; timeprecision 1fs;
  import adpll_pkg::*;

  localparam real TC [16] = '{1388, 1873, 2357, 2837, 3704, 4190, 4600, 5157,
                              6027, 6519, 7004, 7477, 8361, 8848, 9330, 9817};
  localparam real TF [9]  = '{1388, 1420, 1460, 1492, 1529, 1566, 1601, 1639, 1677};

  logic rst_n = 1'b1;
  coarse_therm_t coarse = '0;
  fine_therm_t fine = '0;
  logic dco_clk;

  dco dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic coarse_therm_t therm16(int n);
    coarse_therm_t v = '0;
    for (int i = 0; i < n; i++) v[i] = 1'b1;
    return v;
  endfunction

  function automatic fine_therm_t therm8(int n);
    fine_therm_t v = '0;
    for (int i = 0; i < n; i++) v[i] = 1'b1;
    return v;
  endfunction

  function automatic bit near(real a, real b);
    return (a - b) < 0.01 && (b - a) < 0.01;
  endfunction

  // period measured over three cycles after letting the code settle
  task automatic measure(output real period);
    realtime t0;
    repeat (3) @(posedge dco_clk);
    t0 = $realtime;
    repeat (3) @(posedge dco_clk);
    period = ($realtime - t0) / 3.0;
  endtask

  // phase-width monitor
  realtime last_edge;
  real min_phase;
  bit mon_on = 1'b0;
  always @(dco_clk) begin
    if (mon_on && ($realtime - last_edge) < min_phase) min_phase = $realtime - last_edge;
    last_edge = $realtime;
  end

  initial begin
    real p;
    // reset holds the output high
    #10 rst_n = 1'b0;
    #2000;
    check(dco_clk == 1'b1, "output high in reset");
    fork
      begin
        @(dco_clk);
        check(1'b0, "no edge during reset");
      end
      #20000;
    join_any
    disable fork;
    rst_n = 1'b1;

    for (int n = 0; n < 16; n++) begin
      coarse = therm16(n);
      measure(p);
      check(near(p, TC[n]), $sformatf("coarse %0d: period %0.3f ps, table %0.3f", n, p, TC[n]));
    end
    coarse = '0;
    for (int m = 0; m <= 8; m++) begin
      fine = therm8(m);
      measure(p);
      check(near(p, TF[m]), $sformatf("fine %0d: period %0.3f ps, table %0.3f", m, p, TF[m]));
    end
    coarse = therm16(4);
    fine = therm8(5);
    measure(p);
    check(near(p, TC[4] + TF[5] - TF[0]), $sformatf("coarse 4 + fine 5: %0.3f", p));
    $display("frequency range: %0.2f MHz .. %0.2f MHz", 1.0e6 / TC[15], 1.0e6 / TC[0]);

    // random coarse changes: no phase shorter than the fastest half period
    fine = '0;
    coarse = '0;
    measure(p);
    min_phase = 1.0e9;
    mon_on = 1'b1;
    for (int i = 0; i < 300; i++) begin
      #($urandom_range(100, 6000));
      coarse = therm16($urandom_range(0, 15));
    end
    mon_on = 1'b0;
    $display("shortest phase during random coarse changes: %0.3f ps", min_phase);
    check(min_phase >= TC[0] / 2.0 - 0.01, "no glitch on coarse code changes");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(20_000_000);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
