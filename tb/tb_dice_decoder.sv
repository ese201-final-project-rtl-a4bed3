// tb_dice_decoder: self-checking test of the dice display decoder for every
// sum 2..12 (and the unused codes 0, 1, 13..15), against the reference
// patterns of tb_seg_pkg.
module tb_dice_decoder;
  import dice_pkg::*;
  import tb_seg_pkg::*;
  dice_t dice;
  seg_t  st, su;
  int checks = 0, failures = 0;

  dice_decoder dut (.dice(dice), .seg_tens(st), .seg_units(su));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      logic [6:0] et, eu;
      dice_pats(v, et, eu);
      dice = dice_t'(v);
      #1;
      checks++;
      if (st != et || su != eu) begin
        failures++;
        $display("FAIL dice %0d: %b %b expected %b %b", v, st, su, et, eu);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
