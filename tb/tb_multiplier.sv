// tb_multiplier: exhaustive self-checking test of the 4 x 2 bit multiplier
// (every dice value 0..15 times every bet 0..3).
module tb_multiplier;
  import dice_pkg::*;
  dice_t a;
  bet_t  b;
  prod_t p;
  int checks = 0, failures = 0;

  multiplier dut (.a(a), .b(b), .p(p));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 4; j++) begin
        a = dice_t'(i); b = bet_t'(j);
        #1;
        checks++;
        if (int'(p) != i * j) begin
          failures++;
          $display("FAIL %0d x %0d = %0d", i, j, p);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
