// datapath: the arithmetic side of the dice game.
//
// The 2-to-12 counter holds the dice sum and counts while ST is high. The
// bet multiplexer picks the bet switches of the player on turn (PL), the
// multiplier forms dice x bet, and the adder/subtractor adds that product
// to, or subtracts it from, the player's points as chosen by Add/Subt. The
// result goes to both point registers; LD1 or LD2 decides which one takes
// it at the next rising clock edge. The point multiplexer, also steered by
// PL, feeds the chosen register to the adder/subtractor and to the test
// logic, which reports TestA (class of the dice sum) and TestB (state of the
// chosen register) to the control unit. The structure is that of the
// game's datapath block diagram; the bus widths (4-bit dice, 2-bit bets,
// 6-bit product, 8-bit two's complement points) follow from the number
// ranges of the game. Latency: a register changes one clock after its load
// signal is high; everything else is combinational.
module datapath
  import dice_pkg::*;
(
  input  logic           clk,
  input  logic           rst,      // synchronous: counter to 2, registers to 45
  // control from the control unit
  input  logic           st,       // roll: counter enable
  input  logic           pl,       // player on turn, PL_P1 or PL_P2
  input  logic           ld1,      // load point register 1
  input  logic           ld2,      // load point register 2
  input  logic           sub,      // Add/Subt: 1 subtracts
  // bet switches
  input  bet_t           bet1,
  input  bet_t           bet2,
  // status to the control unit
  output dice_class_e    test_a,
  output points_status_e test_b,
  // data out for the displays
  output dice_t          dice,
  output points_t        points1,
  output points_t        points2
);

  bet_t    bet;
  prod_t   prod;
  points_t points_sel;
  points_t result;
  logic    result_ovf;

  dice_counter u_counter (
    .clk (clk),
    .rst (rst),
    .ce  (st),
    .q   (dice)
  );

  mux2 #(.W(BET_W)) u_bet_mux (
    .sel (pl == PL_P1),
    .in1 (bet1),
    .in0 (bet2),
    .y   (bet)
  );

  multiplier u_mult (
    .a (dice),
    .b (bet),
    .p (prod)
  );

  mux2 #(.W(POINTS_W)) u_points_mux (
    .sel (pl == PL_P1),
    .in1 (points1),
    .in0 (points2),
    .y   (points_sel)
  );

  add_sub u_add_sub (
    .a        (points_sel),
    .b        (prod),
    .sub      (sub),
    .y        (result),
    .overflow (result_ovf)
  );

  point_reg u_reg1 (
    .clk (clk),
    .rst (rst),
    .ld  (ld1),
    .d   (result),
    .q   (points1)
  );

  point_reg u_reg2 (
    .clk (clk),
    .rst (rst),
    .ld  (ld2),
    .d   (result),
    .q   (points2)
  );

  test_logic u_test (
    .dice   (dice),
    .points (points_sel),
    .test_a (test_a),
    .test_b (test_b)
  );

  // The game's ranges keep the sum within 8 bits whenever a register loads.
  ap_no_overflow: assert property (@(posedge clk) disable iff (rst)
    (ld1 || ld2) |-> !result_ovf);

endmodule
