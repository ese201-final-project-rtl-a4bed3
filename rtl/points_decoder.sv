// points_decoder: shows a two's complement point value on two
// seven-segment digits.
//
// Only two digits are available for a value that can range from -35 to 125
// by the end of a game, so the decimal points carry the rest. The magnitude
// is converted to decimal (hundreds, tens, units) and the last two digits
// are shown, with a blanked leading zero. A value of 100 or more lights the
// tens digit's decimal point (it stands for the hundred); a negative value
// lights the units digit's decimal point, and for -9..-1 the tens digit
// also shows a minus sign. During play (1..89) the display is a plain two
// digit number. How values outside 0..99 are shown is this design's own
// choice. Patterns are active high, bit order {g..a}. Combinational.
module points_decoder
  import dice_pkg::*;
(
  input  points_t points,
  output seg_t    seg_tens,
  output seg_t    seg_units,
  output logic    dp_tens,    // lit: value is 100 or more in magnitude
  output logic    dp_units    // lit: value is negative
);

  logic       neg;
  logic [7:0] mag;
  logic [3:0] hundreds, tens, units;

  always_comb begin
    neg      = points[POINTS_W-1];
    mag      = neg ? 8'(-points) : 8'(points);
    hundreds = 4'(mag / 8'd100);
    tens     = 4'((mag / 8'd10) % 8'd10);
    units    = 4'(mag % 8'd10);
    seg_units = seg7_digit(units);
    if (tens != 4'd0 || hundreds != 4'd0)
      seg_tens = seg7_digit(tens);
    else if (neg)
      seg_tens = SEG_MINUS;
    else
      seg_tens = SEG_BLANK;
    dp_tens  = (hundreds != 4'd0);
    dp_units = neg;
  end

endmodule
