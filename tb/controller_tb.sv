// controller_tb: checks the stepping controller against a model plant.
//
// The plant answers each decision from the controller's own coarse word
// as a DCO would: UP/DOWN = 1 (too slow) when the word is above a target
// setting t. The expected number of decisions and the final word of the
// coarse sweep are worked out by hand for each t:
//   t = -1 (reference faster than every setting): 1 decision, word 0
//   t =  0: 2 decisions (one step out, reversal, step back), word 0
//   t =  5: 7 decisions, word 5
//   t = 20 (reference slower than every setting): 16 decisions, word 15
// It then checks that the fine stage dithers between tf and tf+1 for a
// fine plant, that no decision is taken without step, that the words
// change one clock after a decision, and that a fine word saturated for
// SAT_LIMIT (32) decisions carries one coarse step each way.
module controller_tb;
  timeunit 1ps; timeprecision 1fs;
  import adpll_pkg::*;

  logic clk = 1'b0, rst_n = 1'b1, step = 1'b0, up_down = 1'b0;
  word_t coarse_word, fine_word;
  logic coarse_locked;

  controller dut (.*);

  always #500 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (coarse %0d fine %0d locked %0b)", what, coarse_word, fine_word,
               coarse_locked);
    end
  endtask

  task automatic reset_dut();
    rst_n = 1'b1;
    #1 rst_n = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
  endtask

  // One decision: step high for one clock.
  task automatic decide(input logic ud);
    @(negedge clk);
    step = 1'b1;
    up_down = ud;
    @(negedge clk);
    step = 1'b0;
  endtask

  task automatic sweep(input int t, input int exp_n, input int exp_word);
    int n = 0;
    reset_dut();
    while (!coarse_locked && n < 40) begin
      decide(int'(coarse_word) > t);
      n++;
    end
    check(n == exp_n, $sformatf("sweep t=%0d: %0d decisions, expected %0d", t, n, exp_n));
    check(int'(coarse_word) == exp_word, $sformatf("sweep t=%0d: final coarse word", t));
    check(fine_word == 0, "fine word untouched by the sweep");
  endtask

  initial begin
    int n;
    word_t cw;
    sweep(-1, 1, 0);
    sweep(0, 2, 0);
    sweep(5, 7, 5);
    sweep(20, 16, 15);

    // no decision without step
    reset_dut();
    @(negedge clk); up_down = 1'b0;
    repeat (5) @(posedge clk);
    #1 check(coarse_word == 0 && !coarse_locked, "idle without step");

    // latency: the word changes at the clock edge after the decision
    @(negedge clk); step = 1'b1; up_down = 1'b0;
    @(posedge clk); #1 check(coarse_word == 1, "word changes one clock after decision");
    step = 1'b0;

    // fine stage dithering: target setting 5, fine plant target tf = 3
    reset_dut();
    while (!coarse_locked) decide(int'(coarse_word) > 5);
    for (int i = 0; i < 30; i++) begin
      decide(int'(fine_word) > 3);
      if (i >= 4) check(fine_word == 3 || fine_word == 4, "fine word dithers around target");
    end
    check(coarse_word == 5, "coarse word kept in fine stage");

    // carry down: always "too slow" -> fine to 0, then 32 saturated decisions
    cw = coarse_word;
    while (fine_word != 0) decide(1'b1);
    n = 0;
    while (coarse_word == cw && n < 100) begin decide(1'b1); n++; end
    check(n == 32, $sformatf("carry after %0d saturated decisions, expected 32", n));
    check(coarse_word == cw - 1 && fine_word == word_t'(FINE_N), "carry to faster coarse, fine at top");

    // carry up: always "too fast"
    cw = coarse_word;
    while (fine_word != word_t'(FINE_N)) decide(1'b0);
    n = 0;
    while (coarse_word == cw && n < 100) begin decide(1'b0); n++; end
    check(n == 32, "carry up after 32 saturated decisions");
    check(coarse_word == cw + 1 && fine_word == 0, "carry to slower coarse, fine at bottom");

    // a break in saturation restarts the count
    while (fine_word != 0) decide(1'b1);
    cw = coarse_word;
    repeat (20) decide(1'b1);
    decide(1'b0);  // fine 0 -> 1
    decide(1'b1);  // back to 0 (not saturated: it moved)
    repeat (20) decide(1'b1);
    check(coarse_word == cw, "interrupted saturation does not carry");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(2_000_000);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
