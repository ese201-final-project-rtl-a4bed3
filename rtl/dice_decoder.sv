// dice_decoder: shows the dice sum (2..12) on two seven-segment digits.
//
// The sum is split into tens and units; the tens digit is blanked when it
// would be a leading zero, so 7 shows as " 7" and 12 as "12". Values above
// 12 cannot come from the counter, but would still show their last two
// decimal digits. Segment patterns are active high, bit order {g..a}; the
// display switch inverts them for the board. Leading-zero blanking is this
// design's choice. Purely combinational.
module dice_decoder
  import dice_pkg::*;
(
  input  dice_t dice,
  output seg_t  seg_tens,
  output seg_t  seg_units
);

  logic [3:0] tens, units;

  always_comb begin
    tens      = 4'(dice / 4'd10);
    units     = 4'(dice % 4'd10);
    seg_tens  = (tens == 4'd0) ? SEG_BLANK : seg7_digit(tens);
    seg_units = seg7_digit(units);
  end

endmodule
