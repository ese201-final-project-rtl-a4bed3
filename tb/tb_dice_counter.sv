// tb_dice_counter: self-checking test of the 2-to-12 dice counter.
//
// Checks the reset value 2, that the counter holds while ce is low, that it
// steps once per clock while ce is high and wraps from 12 to 2, against a
// reference count kept in the testbench. ce is driven with random patterns.
module tb_dice_counter;
  import dice_pkg::*;

  logic clk = 1'b0, rst = 1'b1, ce = 1'b0;
  dice_t q;
  int checks = 0, failures = 0;
  int ref_q;
  int wraps = 0;

  dice_counter dut (.clk(clk), .rst(rst), .ce(ce), .q(q));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    ref_q = 2;
    check("reset", int'(q), 2);
    // hold while disabled
    repeat (5) @(posedge clk);
    #1 check("hold", int'(q), 2);
    // one full cycle of 11 steps returns to 2, stepping through every value
    for (int i = 0; i < 11; i++) begin
      ce = 1'b1;
      @(posedge clk);
      #1;
      ref_q = (ref_q == 12) ? 2 : ref_q + 1;
      if (ref_q == 2) wraps++;
      check("step", int'(q), ref_q);
    end
    // random enable pattern
    for (int i = 0; i < 3000; i++) begin
      ce = 1'($urandom_range(0, 1));
      @(posedge clk);
      #1;
      if (ce) begin
        ref_q = (ref_q == 12) ? 2 : ref_q + 1;
        if (ref_q == 2) wraps++;
      end
      check("random", int'(q), ref_q);
      if (q < 2 || q > 12) begin
        failures++;
        $display("FAIL out of range %0d", q);
      end
    end
    checks++;
    if (wraps == 0) failures++;
    // synchronous reset in the middle
    ce = 1'b1; rst = 1'b1;
    @(posedge clk);
    #1 check("reset again", int'(q), 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
