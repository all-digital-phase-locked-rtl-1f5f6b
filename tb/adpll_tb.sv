// adpll_tb: end-to-end test of the ADPLL at its default sizes.
//
// For each of several reference periods the test resets the loop, runs it
// and checks:
//   - the coarse sweep ends (COARSE_LOCKED) within 40 reference cycles;
//   - after 1500 more cycles the coarse word is the setting worked out from
//     the measured period table (the largest n whose period does not exceed
//     the reference period), and, when the reference lies within that
//     setting's fine range, the loop holds phase: over 400 cycles the DCO
//     produces as many rising edges as the reference, give or take one;
//   - outside the range it rests at the matching end; in a gap between two
//     coarse settings it stays on those two;
//   - the DCO and shift-register codes agree with the controller words.
// It counts how often each mechanism of the loop happened: coarse steps,
// the reversal that ends the coarse sweep, the step back, a sweep ended
// at the slow end of the range, coarse carries from the fine stage, fine
// steps both ways, the fine code held at all ones, and both detector decisions. A mechanism that never
// happened is a failure.
module adpll_tb;
  timeunit 1ps; timeprecision 1fs;
  import adpll_pkg::*;

  // Measured periods, typed in again here so the check does not lean on the
  // model's own table.
  localparam real TC [16] = '{1388, 1873, 2357, 2837, 3704, 4190, 4600, 5157,
                              6027, 6519, 7004, 7477, 8361, 8848, 9330, 9817};
  localparam real TF_SPAN = 1677.0 - 1388.0;   // full fine range
  localparam real CLK_PS  = 250.0;             // 4 GHz system clock

  logic RESET = 1'b0, REF_CLK = 1'b0, CLK = 1'b0;
  logic DCO_CLK, PFD_UP, PFD_DN, UP_DOWN, COARSE_LOCKED;
  word_t COARSE_WORD, FINE_WORD;
  coarse_therm_t COARSE_CODE;
  fine_therm_t FINE_CODE;

  adpll dut (.*);

  int checks = 0, failures = 0;
  real ref_ps = 1500.0;

  always #(CLK_PS / 2.0) CLK = ~CLK;
  always #(ref_ps / 2.0) REF_CLK = ~REF_CLK;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (ref %0.1f ps)", what, ref_ps);
    end
  endtask

  // The loop's decision strobe, rebuilt from the top's ports by a second
  // synchroniser identical to the one inside, so the counters below see each
  // decision the controller takes.
  logic mon_step, mon_ud;
  ref_sync u_mon (
    .clk       (CLK),
    .rst_n     (~RESET),
    .ref_clk   (REF_CLK),
    .up_down   (UP_DOWN),
    .step      (mon_step),
    .up_down_s (mon_ud)
  );

  // mechanism counters
  int n_coarse_step = 0, n_reversal = 0, n_step_back = 0, n_end_lock = 0;
  int n_carry = 0, n_fine_up = 0, n_fine_dn = 0, n_sr_hold = 0, n_ud1 = 0, n_ud0 = 0;
  word_t prev_cw, prev_fw;
  logic prev_lock;
  always @(posedge CLK) begin
    if (!RESET) begin
      if (!prev_lock && COARSE_WORD != prev_cw) n_coarse_step++;
      if (prev_lock && FINE_WORD > prev_fw) n_fine_up++;
      if (prev_lock && FINE_WORD < prev_fw) n_fine_dn++;
      if (mon_step && COARSE_LOCKED && !mon_ud && &FINE_CODE) n_sr_hold++;
      if (prev_lock && COARSE_LOCKED && COARSE_WORD != prev_cw) n_carry++;
      if (mon_step) begin
        if (mon_ud) n_ud1++; else n_ud0++;
      end
    end
    prev_cw   <= COARSE_WORD;
    prev_fw   <= FINE_WORD;
    prev_lock <= COARSE_LOCKED;
  end

  // time of the last coarse-word change, for the lock time
  realtime t_coarse_change;
  always @(posedge CLK) if (!RESET && COARSE_WORD != prev_cw) t_coarse_change = $realtime;

  int ref_edges, dco_edges;
  always @(posedge REF_CLK) ref_edges++;
  always @(posedge DCO_CLK) dco_edges++;

  // expected coarse setting for a reference period
  function automatic int expected_coarse(real r);
    int n = 0;
    for (int i = 0; i < 16; i++) if (TC[i] <= r) n = i;
    return n;
  endfunction

  task automatic run_case(input real r, input bit expect_lock);
    int exp_c, cycles, d0, r0, diff;
    realtime t_rel;
    ref_ps = r;
    RESET = 1'b1;
    repeat (4) @(posedge CLK);
    #(r);
    RESET = 1'b0;
    t_rel = $realtime;
    t_coarse_change = t_rel;
    exp_c = expected_coarse(r);
    // coarse sweep: at most 17 decisions, plus slack for the synchroniser
    cycles = 0;
    while (!COARSE_LOCKED && cycles < 40) begin
      @(posedge REF_CLK);
      cycles++;
    end
    check(COARSE_LOCKED == 1'b1, "coarse stage ended");
    repeat (2) @(posedge CLK);
    $display("ref %0.1f ps: coarse sweep ended after %0d ref cycles on coarse word %0d",
             r, cycles, COARSE_WORD);
    if (COARSE_WORD == 15) n_end_lock++;
    else n_reversal++;
    // let the fine stage and any coarse carries settle
    repeat (1500) @(posedge REF_CLK);
    check(ones16(COARSE_CODE) == int'(COARSE_WORD), "coarse thermometer code equals coarse word");
    check(ones8(FINE_CODE) == int'(FINE_WORD), "fine thermometer code equals fine word");
    if (expect_lock) begin
      check(int'(COARSE_WORD) == exp_c, "coarse word matches period table");
      r0 = ref_edges; d0 = dco_edges;
      repeat (400) @(posedge REF_CLK);
      diff = (dco_edges - d0) - (ref_edges - r0);
      $display("  settled: coarse %0d (expected %0d), fine %0d; dco - ref edges over 400 cycles = %0d",
               COARSE_WORD, exp_c, FINE_WORD, diff);
      $display("  coarse setting final %0.1f ns after reset release (%0.0f reference cycles)",
               (t_coarse_change - t_rel) / 1000.0, (t_coarse_change - t_rel) / r);
      check(diff >= -1 && diff <= 1, "phase held (no cycle slip)");
      check(int'(COARSE_WORD) == exp_c, "coarse word stayed");
    end else begin
      $display("  no lock possible: coarse %0d fine %0d", COARSE_WORD, FINE_WORD);
      if (r < TC[0]) check(COARSE_WORD == 0 && FINE_WORD == 0, "held at fastest setting");
      else if (r > TC[15] + TF_SPAN)
        check(COARSE_WORD == 15 && FINE_WORD == word_t'(FINE_N), "held at slowest setting");
      else check(int'(COARSE_WORD) == exp_c || int'(COARSE_WORD) == exp_c + 1,
                 "stays on the two settings around the reference");
    end
  endtask

  // count step-backs: a coarse word that falls during the coarse stage
  always @(posedge CLK)
    if (!RESET && !prev_lock && COARSE_LOCKED && COARSE_WORD < prev_cw) n_step_back++;

  initial begin
    // inside fine ranges of coarse 0, 4 and 8
    run_case(1500.0, 1'b1);
    run_case(3850.0, 1'b1);
    run_case(6150.0, 1'b1);
    // faster than the fastest setting: ends at coarse 0
    run_case(1300.0, 1'b0);
    // between the fine range of coarse 0 and coarse 1: fine register saturates
    run_case(1800.0, 1'b0);
    // slower than the slowest setting: ends at coarse 15
    run_case(10500.0, 1'b0);

    $display("mechanisms: coarse steps %0d, reversals %0d, step-backs %0d, end-of-range %0d, carries %0d, fine up %0d, fine down %0d, fine held at top %0d, UP %0d, DOWN %0d",
             n_coarse_step, n_reversal, n_step_back, n_end_lock, n_carry, n_fine_up, n_fine_dn,
             n_sr_hold, n_ud1, n_ud0);
    check(n_coarse_step > 0, "coarse stepping happened");
    check(n_reversal > 0, "reversal ended the coarse stage");
    check(n_step_back > 0, "step back happened");
    check(n_end_lock > 0, "coarse stage ended at a range end");
    check(n_fine_up > 0, "fine step up happened");
    check(n_fine_dn > 0, "fine step down happened");
    check(n_carry > 0, "coarse carry from the fine stage happened");
    check(n_sr_hold > 0, "fine code held at all ones");
    check(n_ud1 > 0 && n_ud0 > 0, "both detector decisions happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(60_000_000.0);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
