// dco_fine_block_tb: checks the fine block's delay for every fine code.
//
// For a thermometer code with m ones the delay from din to dout must be the
// five unloaded inverters (600 ps) plus half of the measured period step
// from 0 to m fine bits, on rising and falling edges, with dout the inverse
// of din. A code whose ones are not at the low end must give the sum of the
// individual segments' effects, which is checked once: the segments load
// the taps independently of one another.
module dco_fine_block_tb;
  timeunit 1ps; timeprecision 1fs;
  import adpll_pkg::*;

  localparam real TF [9] = '{1388, 1420, 1460, 1492, 1529, 1566, 1601, 1639, 1677};

  fine_therm_t ctrl = '0;
  logic din = 1'b0, dout;

  dco_fine_block dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  realtime t_out;
  always @(posedge dout or negedge dout) t_out = $realtime;

  function automatic bit near(real a, real b);
    return (a - b) < 0.01 && (b - a) < 0.01;
  endfunction

  task automatic delay_of(input fine_therm_t c, output real d_rise, output real d_fall);
    realtime t0;
    ctrl = c;
    #5000 t0 = $realtime; din = ~din;
    #5000 d_rise = t_out - t0;
    check(dout == ~din, "dout is the inverse of din");
    t0 = $realtime; din = ~din;
    #5000 d_fall = t_out - t0;
    check(dout == ~din, "dout is the inverse of din");
  endtask

  initial begin
    real a, b, e;
    fine_therm_t c;
    for (int m = 0; m <= 8; m++) begin
      c = '0;
      for (int i = 0; i < m; i++) c[i] = 1'b1;
      e = 600.0 + (TF[m] - TF[0]) / 2.0;
      delay_of(c, a, b);
      check(near(a, e) && near(b, e),
            $sformatf("%0d bits: delays %0.3f / %0.3f ps, expected %0.3f", m, a, b, e));
    end
    // segments f1 and f5 alone
    delay_of(8'b0100_0100, a, b);
    e = 600.0 + ((TF[2] - TF[1]) + (TF[6] - TF[5])) / 2.0;
    check(near(a, e) && near(b, e), "independent segments add");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(5_000_000);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
