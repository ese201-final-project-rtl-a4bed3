// display_unit: the switching circuit that drives four seven-segment
// displays from the dice sum and one player's point register.
//
// The two left displays (digits 3 and 2) show the dice sum, the two right
// ones (digits 1 and 0) the points of the player being shown. That player is
// the one who rolled last: a register takes PL whenever ST is high, so after
// player 1's throw the display keeps player 1's dice and points until
// player 2 starts rolling. The LEDs led_p1/led_p2 say whose values are shown.
// The four displays share their segment lines, so one digit is enabled at a
// time: a two-bit digit counter steps on every scan tick and drives one
// anode and that digit's pattern. Anodes, segments and decimal point are
// active low, as on common-anode boards; the polarity, digit order and scan
// scheme are this design's choices. After reset player 1 is shown and
// digit 0 is lit. Outputs are registered: they change one clock after the
// scan tick, or after the new value arrives.
module display_unit
  import dice_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       scan_tick,   // one-clock enable: next digit
  input  logic       st,          // a roll is in progress
  input  logic       pl,          // player on turn
  input  dice_t      dice,
  input  points_t    points1,
  input  points_t    points2,
  output logic [3:0] an_n,        // digit enables, an_n[3] leftmost
  output seg_t       seg_n,       // segments {g..a}
  output logic       dp_n,        // decimal point
  output logic       led_p1,
  output logic       led_p2
);

  logic    show_pl;
  logic [1:0] digit;
  points_t pts;
  seg_t    dice_t_seg, dice_u_seg, pts_t_seg, pts_u_seg;
  logic    pts_t_dp, pts_u_dp;
  seg_t    seg_sel;
  logic    dp_sel;

  always_ff @(posedge clk) begin
    if (rst)     show_pl <= PL_P1;
    else if (st) show_pl <= pl;
  end

  always_comb pts = (show_pl == PL_P1) ? points1 : points2;

  dice_decoder u_dice_dec (
    .dice      (dice),
    .seg_tens  (dice_t_seg),
    .seg_units (dice_u_seg)
  );

  points_decoder u_pts_dec (
    .points    (pts),
    .seg_tens  (pts_t_seg),
    .seg_units (pts_u_seg),
    .dp_tens   (pts_t_dp),
    .dp_units  (pts_u_dp)
  );

  always_ff @(posedge clk) begin
    if (rst)            digit <= 2'd0;
    else if (scan_tick) digit <= digit + 2'd1;
  end

  always_comb begin
    unique case (digit)
      2'd3:    begin seg_sel = dice_t_seg; dp_sel = 1'b0;     end
      2'd2:    begin seg_sel = dice_u_seg; dp_sel = 1'b0;     end
      2'd1:    begin seg_sel = pts_t_seg;  dp_sel = pts_t_dp; end
      default: begin seg_sel = pts_u_seg;  dp_sel = pts_u_dp; end
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      an_n  <= 4'b1111;
      seg_n <= '1;
      dp_n  <= 1'b1;
    end else begin
      an_n  <= ~(4'b0001 << digit);
      seg_n <= ~seg_sel;
      dp_n  <= ~dp_sel;
    end
  end

  always_comb begin
    led_p1 = (show_pl == PL_P1);
    led_p2 = (show_pl == PL_P2);
  end

endmodule
