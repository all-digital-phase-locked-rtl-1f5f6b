// dco_coarse_block_tb: checks the coarse ladder's delay for every code.
//
// The input toggles every 20 ns. For a thermometer code with n ones the
// delay from din to dout must be one multiplexer (60 ps) plus half of the
// measured period step from 0 to n coarse bits, for rising and falling edges
// alike, and dout must be the inverse of din. The code is applied and the
// input toggled twice before measuring, so the segment latches have taken
// it. With all sixteen bits set the delay grows by one more half step
// (243.5 ps, half of the 487 ps mean step). Non-thermometer codes are not
// used: the ladder turns at the first 0 bit, which is checked once.
module dco_coarse_block_tb;
  timeunit 1ps; timeprecision 1fs;
  import adpll_pkg::*;

  localparam real TC [16] = '{1388, 1873, 2357, 2837, 3704, 4190, 4600, 5157,
                              6027, 6519, 7004, 7477, 8361, 8848, 9330, 9817};

  coarse_therm_t ctrl = '0;
  logic din = 1'b0, dout;

  dco_coarse_block dut (.*);

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

  task automatic delay_of(input coarse_therm_t c, output real d_rise, output real d_fall);
    realtime t0;
    ctrl = c;
    repeat (2) begin #20000 din = ~din; end
    // din is now as before; measure one edge of each direction
    #20000 t0 = $realtime; din = ~din;
    #20000 d_rise = t_out - t0;
    check(dout == ~din, "dout is the inverse of din");
    t0 = $realtime; din = ~din;
    #20000 d_fall = t_out - t0;
    check(dout == ~din, "dout is the inverse of din");
  endtask

  initial begin
    real a, b, e;
    coarse_therm_t c;
    for (int n = 0; n <= 16; n++) begin
      c = '0;
      for (int i = 0; i < n; i++) c[i] = 1'b1;
      e = (n < 16) ? 60.0 + (TC[n] - TC[0]) / 2.0 : 60.0 + (TC[15] - TC[0]) / 2.0 + 243.5;
      delay_of(c, a, b);
      check(near(a, e) && near(b, e),
            $sformatf("%0d bits: delays %0.2f / %0.2f ps, expected %0.2f", n, a, b, e));
    end
    // a 0 bit ends the path even if later bits are set
    delay_of(16'b1101_1111_0000_0000, a, b);
    e = 60.0 + (TC[2] - TC[0]) / 2.0;
    check(near(a, e) && near(b, e), "path turns at the first 0 bit");

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
