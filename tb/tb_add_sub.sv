// tb_add_sub: exhaustive self-checking test of the adder/subtractor over
// every 8-bit signed a, every 6-bit b and both operations, including the
// overflow flag, plus the worked cases of the game (73-2x4 etc.).
module tb_add_sub;
  import dice_pkg::*;
  points_t a, y;
  prod_t   b;
  logic    sub, ovf;
  int checks = 0, failures = 0;

  add_sub dut (.a(a), .b(b), .sub(sub), .y(y), .overflow(ovf));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one(input int ia, input int ib, input bit isub);
    int exact;
    a = points_t'(ia); b = prod_t'(ib); sub = isub;
    #1;
    exact = isub ? ia - ib : ia + ib;
    checks++;
    if (int'(y) != ((exact + 256) % 256 > 127 ? (exact + 256) % 256 - 256 : (exact + 256) % 256)
        || ovf != (exact > 127 || exact < -128)) begin
      failures++;
      $display("FAIL %0d %s %0d = %0d ovf=%0b", ia, isub ? "-" : "+", ib, y, ovf);
    end
  endtask

  initial begin
    // game cases: 73 - 4x2 = 65, 77 + 8x3 = 101, 17 - 11x3 = -16
    one(73, 8, 1);  one(77, 24, 0);  one(17, 33, 1);  one(1, 36, 1);  one(89, 36, 0);
    for (int ia = -128; ia < 128; ia++)
      for (int ib = 0; ib < 64; ib++) begin
        one(ia, ib, 1'b0);
        one(ia, ib, 1'b1);
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
