// adpll_range_tb: locks the ADPLL across its whole frequency range.
//
// For every coarse setting n = 0..15 the reference period is placed inside
// that setting's fine range (the measured coarse period plus 140 ps; the
// fine block spans 289 ps), which covers references from about 650 MHz down
// to about 100 MHz. For each one the test resets the loop, lets it run
// 1500 reference cycles and checks that the coarse word is n and that the
// DCO then keeps phase with the reference over 400 cycles (edge counts equal
// within one). It reports the time at which the coarse setting became
// final, a measure of the lock time, and the worst case over the range.
module adpll_range_tb;
  timeunit 1ps; timeprecision 1fs;
  import adpll_pkg::*;

  localparam real TC [16] = '{1388, 1873, 2357, 2837, 3704, 4190, 4600, 5157,
                              6027, 6519, 7004, 7477, 8361, 8848, 9330, 9817};

  logic RESET = 1'b0, REF_CLK = 1'b0, CLK = 1'b0;
  logic DCO_CLK, PFD_UP, PFD_DN, UP_DOWN, COARSE_LOCKED;
  word_t COARSE_WORD, FINE_WORD;
  coarse_therm_t COARSE_CODE;
  fine_therm_t FINE_CODE;

  adpll dut (.*);

  int checks = 0, failures = 0;
  real ref_ps = 1500.0;

  always #125 CLK = ~CLK;                    // 4 GHz controller clock
  always #(ref_ps / 2.0) REF_CLK = ~REF_CLK;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (ref %0.1f ps)", what, ref_ps);
    end
  endtask

  word_t prev_cw;
  realtime t_change;
  always @(posedge CLK) begin
    if (!RESET && COARSE_WORD != prev_cw) t_change = $realtime;
    prev_cw <= COARSE_WORD;
  end

  int ref_edges, dco_edges;
  always @(posedge REF_CLK) ref_edges++;
  always @(posedge DCO_CLK) dco_edges++;

  initial begin
    real worst_ns = 0.0;
    for (int n = 0; n < 16; n++) begin
      realtime t_rel;
      int r0, d0, diff;
      ref_ps = TC[n] + 140.0;
      RESET = 1'b1;
      repeat (4) @(posedge CLK);
      #(ref_ps);
      RESET = 1'b0;
      t_rel = $realtime;
      t_change = t_rel;
      repeat (1500) @(posedge REF_CLK);
      check(int'(COARSE_WORD) == n, $sformatf("coarse word %0d, expected %0d", COARSE_WORD, n));
      r0 = ref_edges; d0 = dco_edges;
      repeat (400) @(posedge REF_CLK);
      diff = (dco_edges - d0) - (ref_edges - r0);
      check(diff >= -1 && diff <= 1, $sformatf("phase held (edge difference %0d)", diff));
      $display("ref %7.1f ps (%6.2f MHz): coarse %0d fine %0d, coarse final after %7.1f ns, edge difference %0d",
               ref_ps, 1.0e6 / ref_ps, COARSE_WORD, FINE_WORD, (t_change - t_rel) / 1000.0, diff);
      if ((t_change - t_rel) / 1000.0 > worst_ns) worst_ns = (t_change - t_rel) / 1000.0;
    end
    $display("worst time to final coarse setting: %0.1f ns", worst_ns);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(400_000_000.0);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
