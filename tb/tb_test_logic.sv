// tb_test_logic: exhaustive self-checking test of the test logic: every
// 4-bit dice value against the lists 3/8/10 and 4/6/11, and every 8-bit
// signed point value against the limits 90 and 0.
module tb_test_logic;
  import dice_pkg::*;
  dice_t          dice;
  points_t        points;
  dice_class_e    ta;
  points_status_e tb_s;
  int checks = 0, failures = 0;
  int gain_list[3] = '{3, 8, 10};
  int loss_list[3] = '{4, 6, 11};

  test_logic dut (.dice(dice), .points(points), .test_a(ta), .test_b(tb_s));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    points = 8'sd45;
    for (int d = 0; d < 16; d++) begin
      dice_class_e exp;
      exp = DICE_NONE;
      foreach (gain_list[k]) if (gain_list[k] == d) exp = DICE_GAIN;
      foreach (loss_list[k]) if (loss_list[k] == d) exp = DICE_LOSS;
      dice = dice_t'(d);
      #1;
      checks++;
      if (ta != exp) begin
        failures++; $display("FAIL dice %0d class %0d", d, ta);
      end
    end
    for (int v = -128; v < 128; v++) begin
      points_status_e exp;
      exp = (v >= 90) ? PTS_HIGH : (v <= 0) ? PTS_LOW : PTS_PLAY;
      points = points_t'(v);
      #1;
      checks++;
      if (tb_s != exp) begin
        failures++; $display("FAIL points %0d status %0d", v, tb_s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
