// test_logic: the status tests the control unit decides on.
//
// TestA classifies the dice sum: 3, 8 or 10 gains points, 4, 6 or 11 loses
// points, any other sum changes nothing. TestB classifies the point register
// of the player on turn (the output of the point multiplexer): 90 or more
// means that player has won, 0 or less that the other player has won. The
// values tested are the game's rules; the two-bit encodings of TestA and
// TestB are this design's own (see dice_pkg). Purely combinational.
module test_logic
  import dice_pkg::*;
(
  input  dice_t          dice,
  input  points_t        points,
  output dice_class_e    test_a,
  output points_status_e test_b
);

  always_comb begin
    unique case (dice)
      4'd3, 4'd8, 4'd10: test_a = DICE_GAIN;
      4'd4, 4'd6, 4'd11: test_a = DICE_LOSS;
      default:           test_a = DICE_NONE;
    endcase

    if (points >= POINTS_WIN)
      test_b = PTS_HIGH;
    else if (points <= POINTS_LOSE)
      test_b = PTS_LOW;
    else
      test_b = PTS_PLAY;
  end

endmodule
