// tb_point_reg: self-checking test of the point register: preset to 45 by
// reset, load of the parallel input on the rising edge that ends a
// one-clock load pulse (q does not change before that edge), and hold while
// load is low, with random data and load patterns.
module tb_point_reg;
  import dice_pkg::*;
  logic clk = 1'b0, rst = 1'b1, ld = 1'b0;
  points_t d = '0, q;
  int checks = 0, failures = 0;
  points_t ref_q;

  point_reg dut (.clk(clk), .rst(rst), .ld(ld), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input points_t exp);
    checks++;
    if (q != exp) begin
      failures++; $display("FAIL %s: q=%0d expected %0d", what, q, exp);
    end
  endtask

  initial begin
    d = 8'sd77;
    ld = 1'b1;                 // load is ignored during reset
    repeat (2) @(posedge clk);
    #1 check("reset preset", 8'sd45);
    rst = 1'b0; ld = 1'b0;
    repeat (3) @(posedge clk);
    #1 check("hold after reset", 8'sd45);
    // one-clock load pulse: q changes only at the edge that ends it
    @(negedge clk);
    ld = 1'b1; d = -8'sd16;
    #1 check("no change while load is high", 8'sd45);
    @(posedge clk);
    #1 check("loaded at edge", -8'sd16);
    ld = 1'b0; d = 8'sd101;
    repeat (2) @(posedge clk);
    #1 check("hold", -8'sd16);
    ref_q = -8'sd16;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      ld = 1'($urandom);
      d  = points_t'($urandom);
      @(posedge clk);
      #1;
      if (ld) ref_q = d;
      check("random", ref_q);
    end
    rst = 1'b1;
    @(posedge clk);
    #1 check("reset to 45 again", 8'sd45);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
