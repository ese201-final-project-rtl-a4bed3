// control_unit: state machine that runs the dice game.
//
// The two players take turns. In a player's WAIT state the machine waits for
// that player's Roll Dice button (the other player's button is ignored). In
// ROLL it raises ST so the dice counter runs for as long as the button is
// held. When the button is released it goes to CHECK and looks at TestA:
// for a sum of 3, 8 or 10 it goes to ADD, for 4, 6 or 11 to SUB, and for any
// other sum the turn passes straight to the other player. ADD and SUB raise
// that player's load signal for one clock with Add/Subt low or high, so the
// point register takes points +/- dice x bet at the end of that clock.
// TEST then looks at TestB for the updated register: 90 or more makes the
// player on turn the winner, 0 or less the other player; otherwise the turn
// passes. A WIN state lights its Win LED and holds until reset. Reset starts
// with player 1 on turn. The sequence follows the game's flowchart; the
// state split and the choice of Moore outputs only (every output is decoded
// from the state register, so it changes one clock after the input that
// caused it) are this design's own.
//
// Timing, counting clock edges from the first clock in which the released
// button is seen low: CHECK starts at edge 1, ADD/SUB at edge 2, the point
// register changes at edge 3 and the other player's WAIT starts at edge 4
// (at edge 2 when the sum changes nothing).
module control_unit
  import dice_pkg::*;
(
  input  logic           clk,
  input  logic           rst,      // synchronous, active high
  input  logic           rd1,      // Roll Dice player 1 (synchronised)
  input  logic           rd2,      // Roll Dice player 2 (synchronised)
  input  dice_class_e    test_a,
  input  points_status_e test_b,
  output logic           st,       // start counting / roll the dice
  output logic           pl,       // player on turn: PL_P1 or PL_P2
  output logic           ld1,
  output logic           ld2,
  output logic           sub,      // Add/Subt: 1 subtracts
  output logic           win1,
  output logic           win2
);

  typedef enum logic [3:0] {
    S_P1_WAIT, S_P1_ROLL, S_P1_CHECK, S_P1_ADD, S_P1_SUB, S_P1_TEST,
    S_P2_WAIT, S_P2_ROLL, S_P2_CHECK, S_P2_ADD, S_P2_SUB, S_P2_TEST,
    S_WIN1, S_WIN2
  } state_e;

  state_e state, state_nx;

  always_ff @(posedge clk) begin
    if (rst) state <= S_P1_WAIT;
    else     state <= state_nx;
  end

  always_comb begin
    state_nx = state;
    unique case (state)
      S_P1_WAIT:  if (rd1) state_nx = S_P1_ROLL;
      S_P1_ROLL:  if (!rd1) state_nx = S_P1_CHECK;
      S_P1_CHECK: unique case (test_a)
                    DICE_GAIN: state_nx = S_P1_ADD;
                    DICE_LOSS: state_nx = S_P1_SUB;
                    default:   state_nx = S_P2_WAIT;
                  endcase
      S_P1_ADD,
      S_P1_SUB:   state_nx = S_P1_TEST;
      S_P1_TEST:  unique case (test_b)
                    PTS_HIGH: state_nx = S_WIN1;
                    PTS_LOW:  state_nx = S_WIN2;
                    default:  state_nx = S_P2_WAIT;
                  endcase
      S_P2_WAIT:  if (rd2) state_nx = S_P2_ROLL;
      S_P2_ROLL:  if (!rd2) state_nx = S_P2_CHECK;
      S_P2_CHECK: unique case (test_a)
                    DICE_GAIN: state_nx = S_P2_ADD;
                    DICE_LOSS: state_nx = S_P2_SUB;
                    default:   state_nx = S_P1_WAIT;
                  endcase
      S_P2_ADD,
      S_P2_SUB:   state_nx = S_P2_TEST;
      S_P2_TEST:  unique case (test_b)
                    PTS_HIGH: state_nx = S_WIN2;
                    PTS_LOW:  state_nx = S_WIN1;
                    default:  state_nx = S_P1_WAIT;
                  endcase
      S_WIN1, S_WIN2: state_nx = state;
      default:    state_nx = S_P1_WAIT;
    endcase
  end

  // Moore outputs
  always_comb begin
    st   = (state == S_P1_ROLL) || (state == S_P2_ROLL);
    ld1  = (state == S_P1_ADD)  || (state == S_P1_SUB);
    ld2  = (state == S_P2_ADD)  || (state == S_P2_SUB);
    sub  = (state == S_P1_SUB)  || (state == S_P2_SUB);
    win1 = (state == S_WIN1);
    win2 = (state == S_WIN2);
    unique case (state)
      S_P2_WAIT, S_P2_ROLL, S_P2_CHECK, S_P2_ADD, S_P2_SUB, S_P2_TEST, S_WIN2:
               pl = PL_P2;
      default: pl = PL_P1;
    endcase
  end

  ap_one_load: assert property (@(posedge clk) disable iff (rst) !(ld1 && ld2));
  ap_one_win:  assert property (@(posedge clk) disable iff (rst) !(win1 && win2));
  ap_win_hold: assert property (@(posedge clk) disable iff (rst)
    (win1 || win2) |=> $stable({win1, win2}));

endmodule
