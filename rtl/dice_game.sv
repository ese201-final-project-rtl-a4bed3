// dice_game: electronic dice game for two players, top level.
//
// Each player starts with 45 points and sets a bet of 0..3 on two switches.
// Players take turns pressing their Roll Dice button; a fast 2-to-12
// counter runs while the button is held, and the value where it stops is
// the sum of the two dice. A sum of 3, 8 or 10 adds sum x bet to the
// player's points, 4, 6 or 11 subtracts it, any other sum changes nothing.
// A player wins on reaching 90 points or more, or when the other player
// drops to 0 or less; the Win LED then stays on until reset.
//
// The design is split as a control unit (state machine) and a datapath
// (counter, multiplexers, multiplier, adder/subtractor, point registers,
// test logic), plus a display unit that scans four seven-segment displays
// and a clock divider that paces the scan. The buttons are synchronised to
// the single board clock by two flip-flops each. All logic is synchronous
// to clk; reset is synchronous after its synchroniser.
//
// Ports follow the board hookup: rd1/rd2 are the Roll Dice buttons, rst_btn
// the reset button, bet1/bet2 the two switch pairs, led_p1/led_p2 show whose
// dice and points are displayed, led_win1/led_win2 the winner; an_n, seg_n
// and dp_n are the active-low anodes, segments {g..a} and decimal point.
// SCAN_DIV is the clock divide ratio of the display scan.
module dice_game
  import dice_pkg::*;
#(
  parameter int unsigned SCAN_DIV = 100_000
) (
  input  logic       clk,
  input  logic       rst_btn,
  input  logic       rd1_btn,
  input  logic       rd2_btn,
  input  bet_t       bet1,
  input  bet_t       bet2,
  output logic       led_p1,
  output logic       led_p2,
  output logic       led_win1,
  output logic       led_win2,
  output logic [3:0] an_n,
  output seg_t       seg_n,
  output logic       dp_n
);

  logic rst, rd1, rd2;
  logic st, pl, ld1, ld2, sub;
  logic scan_tick;
  dice_class_e    test_a;
  points_status_e test_b;
  dice_t   dice;
  points_t points1, points2;

  sync2 #(.W(3)) u_sync (
    .clk (clk),
    .d   ({rst_btn, rd1_btn, rd2_btn}),
    .q   ({rst, rd1, rd2})
  );

  control_unit u_ctrl (
    .clk    (clk),
    .rst    (rst),
    .rd1    (rd1),
    .rd2    (rd2),
    .test_a (test_a),
    .test_b (test_b),
    .st     (st),
    .pl     (pl),
    .ld1    (ld1),
    .ld2    (ld2),
    .sub    (sub),
    .win1   (led_win1),
    .win2   (led_win2)
  );

  datapath u_dp (
    .clk     (clk),
    .rst     (rst),
    .st      (st),
    .pl      (pl),
    .ld1     (ld1),
    .ld2     (ld2),
    .sub     (sub),
    .bet1    (bet1),
    .bet2    (bet2),
    .test_a  (test_a),
    .test_b  (test_b),
    .dice    (dice),
    .points1 (points1),
    .points2 (points2)
  );

  clk_divider #(.DIV(SCAN_DIV)) u_div (
    .clk  (clk),
    .rst  (rst),
    .tick (scan_tick)
  );

  display_unit u_disp (
    .clk       (clk),
    .rst       (rst),
    .scan_tick (scan_tick),
    .st        (st),
    .pl        (pl),
    .dice      (dice),
    .points1   (points1),
    .points2   (points2),
    .an_n      (an_n),
    .seg_n     (seg_n),
    .dp_n      (dp_n),
    .led_p1    (led_p1),
    .led_p2    (led_p2)
  );

endmodule
