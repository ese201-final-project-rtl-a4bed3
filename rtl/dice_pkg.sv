// dice_pkg: widths, constants and status types shared by the electronic
// dice game.
//
// Bus widths follow the game's number ranges. The dice sum runs from 2 to
// 12 and needs 4 bits; a bet is 0..3 and needs 2 bits; the product of the
// two is at most 36 and needs 6 bits. A point register can reach at most
// 89+36 = 125 and at least 1-36 = -35, so it is an 8-bit two's complement
// number. The rule constants (start with 45, win at 90 or more, lose at 0
// or less, gain on 3/8/10, lose on 4/6/11) are the game's rules. The
// encodings of the two test-logic status buses (TestA for the dice, TestB
// for the points) are this design's own choice.
package dice_pkg;

  localparam int DICE_W   = 4;   // 2..12
  localparam int BET_W    = 2;   // 0..3
  localparam int PROD_W   = 6;   // 0..36
  localparam int POINTS_W = 8;   // -35..125, two's complement

  typedef logic [DICE_W-1:0]          dice_t;
  typedef logic [BET_W-1:0]           bet_t;
  typedef logic [PROD_W-1:0]          prod_t;
  typedef logic signed [POINTS_W-1:0] points_t;

  localparam points_t POINTS_INIT = 8'sd45;
  localparam points_t POINTS_WIN  = 8'sd90;   // reaching this or more wins
  localparam points_t POINTS_LOSE = 8'sd0;    // reaching this or less loses

  // TestA: outcome class of the dice sum
  typedef enum logic [1:0] {
    DICE_NONE = 2'b00,   // 2, 5, 7, 9, 12: nothing happens
    DICE_GAIN = 2'b01,   // 3, 8, 10: add sum x bet
    DICE_LOSS = 2'b10    // 4, 6, 11: subtract sum x bet
  } dice_class_e;

  // TestB: state of the selected point register
  typedef enum logic [1:0] {
    PTS_PLAY = 2'b00,    // 1..89: game goes on
    PTS_HIGH = 2'b01,    // 90 or more: this player wins
    PTS_LOW  = 2'b10     // 0 or less: the other player wins
  } points_status_e;

  // Player select PL: 1 selects player 1, following the "1" input of the
  // bet multiplexer which carries Bet1.
  localparam logic PL_P1 = 1'b1;
  localparam logic PL_P2 = 1'b0;

  // Seven-segment pattern, bit order {g,f,e,d,c,b,a}, 1 = segment lit
  typedef logic [6:0] seg_t;

  localparam seg_t SEG_BLANK = 7'b000_0000;
  localparam seg_t SEG_MINUS = 7'b100_0000;   // segment g only

  // Decimal digit 0..9 to its seven-segment pattern; other codes blank.
  function automatic seg_t seg7_digit(input logic [3:0] d);
    unique case (d)
      4'd0:    return 7'b011_1111;
      4'd1:    return 7'b000_0110;
      4'd2:    return 7'b101_1011;
      4'd3:    return 7'b100_1111;
      4'd4:    return 7'b110_0110;
      4'd5:    return 7'b110_1101;
      4'd6:    return 7'b111_1101;
      4'd7:    return 7'b000_0111;
      4'd8:    return 7'b111_1111;
      4'd9:    return 7'b110_1111;
      default: return SEG_BLANK;
    endcase
  endfunction

endpackage
