// tb_clk_divider: self-checking test of the clock divider at a small divide
// ratio: tick is one clock wide, its period is exactly DIV clocks, the first
// tick comes DIV clocks after reset, and reset restarts the count.
module tb_clk_divider;
  localparam int DIV = 7;
  logic clk = 1'b0, rst = 1'b1, tick;
  int checks = 0, failures = 0;
  int cyc = 0, last = -1, nticks = 0;

  clk_divider #(.DIV(DIV)) dut (.clk(clk), .rst(rst), .tick(tick));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    for (cyc = 1; cyc <= 20 * DIV; cyc++) begin
      @(posedge clk);
      #1;
      if (tick) begin
        nticks++;
        checks++;
        if (last < 0 ? cyc != DIV : cyc - last != DIV) begin
          failures++; $display("FAIL tick at %0d, previous %0d", cyc, last);
        end
        last = cyc;
      end
    end
    checks++;
    if (nticks != 20) begin
      failures++; $display("FAIL %0d ticks, expected 20", nticks);
    end
    // reset in mid-count: next tick DIV clocks after its release
    repeat (3) @(posedge clk);
    rst = 1'b1;
    @(posedge clk);
    #1 rst = 1'b0;
    for (int i = 1; i <= DIV; i++) begin
      @(posedge clk);
      #1;
      checks++;
      if (tick != (i == DIV)) begin
        failures++; $display("FAIL after reset: tick=%0b at %0d", tick, i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
