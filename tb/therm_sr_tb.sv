// therm_sr_tb: checks the thermometer shift registers, 16 and 8 bits.
//
// Both registers get random 4-bit targets. A count kept by the testbench
// moves one step per clock towards the target, capped at the register
// length, and the register must always equal the thermometer code of that
// count (ones from element 0). Fixed cases check the binary-to-thermometer
// table entries (0, 1, 2, 3, 12 and 15 for 16 bits) and that the 8-bit
// register keeps all ones when asked for more than eight.
module therm_sr_tb;
  timeunit 1ps; timeprecision 1fs;

  logic clk = 1'b0, rst_n = 1'b1;
  logic [3:0] t16, t8;
  logic [0:15] q16;
  logic [0:7]  q8;

  therm_sr dut16 (.clk(clk), .rst_n(rst_n), .target(t16), .therm(q16));
  therm_sr #(.N(8), .W(4)) dut8 (.clk(clk), .rst_n(rst_n), .target(t8), .therm(q8));

  always #500 clk = ~clk;

  int checks = 0, failures = 0;
  int n16 = 0, n8 = 0;

  function automatic logic [0:15] therm16(int n);
    logic [0:15] v = '0;
    for (int i = 0; i < n; i++) v[i] = 1'b1;
    return v;
  endfunction

  function automatic logic [0:7] therm8(int n);
    logic [0:7] v = '0;
    for (int i = 0; i < n; i++) v[i] = 1'b1;
    return v;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s q16=%b q8=%b n16=%0d n8=%0d", what, q16, q8, n16, n8);
    end
  endtask

  // reference: one step per clock towards the capped target
  always @(posedge clk) begin
    if (rst_n) begin
      if (n16 < int'(t16) && n16 < 16) n16 <= n16 + 1;
      else if (n16 > int'(t16)) n16 <= n16 - 1;
      if (n8 < int'(t8) && n8 < 8) n8 <= n8 + 1;
      else if (n8 > int'(t8)) n8 <= n8 - 1;
    end
  end

  task automatic settle_and_check16(input int w, input logic [0:15] exp);
    @(negedge clk); t16 = 4'(w);
    repeat (17) @(negedge clk);
    check(q16 == exp, $sformatf("16-bit table entry for %0d", w));
  endtask

  initial begin
    t16 = 0; t8 = 0;
    #1 rst_n = 1'b0;
    repeat (2) @(negedge clk);
    check(q16 == '0 && q8 == '0, "reset to all zeros");
    rst_n = 1'b1;

    // table entries
    settle_and_check16(0,  16'b0000_0000_0000_0000);
    settle_and_check16(1,  16'b1000_0000_0000_0000);
    settle_and_check16(2,  16'b1100_0000_0000_0000);
    settle_and_check16(3,  16'b1110_0000_0000_0000);
    settle_and_check16(12, 16'b1111_1111_1111_0000);
    settle_and_check16(15, 16'b1111_1111_1111_1110);
    settle_and_check16(0,  16'b0000_0000_0000_0000);

    // 8-bit register asked for more than 8 holds all ones
    @(negedge clk); t8 = 4'd15;
    repeat (12) @(negedge clk);
    check(q8 == 8'hFF, "8-bit register saturates at all ones");
    @(negedge clk);
    check(q8 == 8'hFF, "8-bit register keeps all ones");
    @(negedge clk); t8 = 4'd0;
    repeat (12) @(negedge clk);
    check(q8 == 8'h00, "8-bit register back to all zeros");

    // one step per clock: from 0 to 5 takes five clocks
    @(negedge clk); t16 = 4'd5;
    @(negedge clk); check(q16 == therm16(1), "first step after one clock");
    repeat (3) @(negedge clk);
    check(q16 == therm16(4), "four steps after four clocks");

    // random targets, compared with the reference every clock
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      check(q16 == therm16(n16), "16-bit register follows reference");
      check(q8 == therm8(n8), "8-bit register follows reference");
      if ($urandom_range(0, 3) == 0) begin
        t16 = 4'($urandom_range(0, 15));
        t8  = 4'($urandom_range(0, 15));
      end
    end

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
