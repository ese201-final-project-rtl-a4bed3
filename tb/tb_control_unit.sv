// tb_control_unit: self-checking test of the game's state machine.
//
// The testbench plays the datapath: it answers TestA and TestB for each turn
// and presses and releases the Roll Dice inputs. For every turn it checks
// that ST is high exactly while the button is held (plus the release
// clock), that the right load signal pulses for exactly one clock two clocks
// after the release with the right Add/Subt, that PL names the player on
// turn, that the other player's button is ignored, and that each way of
// ending the game lights the right Win output and holds it until reset.
module tb_control_unit;
  import dice_pkg::*;
  logic clk = 1'b0, rst = 1'b1, rd1 = 1'b0, rd2 = 1'b0;
  dice_class_e ta = DICE_NONE;
  points_status_e tbs = PTS_PLAY;
  logic st, pl, ld1, ld2, sub, win1, win2;
  int checks = 0, failures = 0;

  control_unit dut (.clk(clk), .rst(rst), .rd1(rd1), .rd2(rd2), .test_a(ta),
                    .test_b(tbs), .st(st), .pl(pl), .ld1(ld1), .ld2(ld2),
                    .sub(sub), .win1(win1), .win2(win2));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic do_reset();
    rst = 1'b1; rd1 = 1'b0; rd2 = 1'b0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    expect_eq("PL after reset", int'(pl), int'(PL_P1));
  endtask

  // One turn of player p (1 or 2): hold the button `hold` clocks, answer
  // class c and status s, check the control outputs clock by clock.
  // Returns with the machine in the next WAIT or a WIN state.
  task automatic turn(input int p, input int hold, input dice_class_e c,
                      input points_status_e s);
    logic exp_pl = (p == 1) ? PL_P1 : PL_P2;
    int st_cycles = 0;
    expect_eq("PL waiting", pl, exp_pl);
    // the other player's button does nothing
    if (p == 1) rd2 = 1'b1; else rd1 = 1'b1;
    repeat (3) @(negedge clk);
    expect_eq("ignore other button: ST", st, 0);
    expect_eq("ignore other button: PL", pl, exp_pl);
    rd1 = 1'b0; rd2 = 1'b0;
    ta = c; tbs = s;
    // press
    if (p == 1) rd1 = 1'b1; else rd2 = 1'b1;
    for (int i = 0; i < hold; i++) begin
      @(negedge clk);
      st_cycles += st;
      expect_eq("no load while rolling", ld1 | ld2, 0);
    end
    rd1 = 1'b0; rd2 = 1'b0;
    @(negedge clk);                       // CHECK
    st_cycles += st;
    expect_eq("ST clocks", st_cycles, hold);
    expect_eq("ST off", st, 0);
    expect_eq("no load in CHECK", ld1 | ld2, 0);
    if (c == DICE_NONE) begin
      @(negedge clk);
      expect_eq("no load on other sums", ld1 | ld2, 0);
      expect_eq("turn passes", pl, (p == 1) ? PL_P2 : PL_P1);
      return;
    end
    @(negedge clk);                       // ADD or SUB
    expect_eq("LD1", ld1, p == 1);
    expect_eq("LD2", ld2, p == 2);
    expect_eq("Add/Subt", sub, c == DICE_LOSS);
    expect_eq("PL during load", pl, exp_pl);
    @(negedge clk);                       // TEST
    expect_eq("load is one clock", ld1 | ld2, 0);
    @(negedge clk);
    case (s)
      PTS_PLAY: begin
        expect_eq("turn passes", pl, (p == 1) ? PL_P2 : PL_P1);
        expect_eq("no winner", win1 | win2, 0);
      end
      PTS_HIGH: begin
        expect_eq("WIN1", win1, p == 1);
        expect_eq("WIN2", win2, p == 2);
      end
      default: begin
        expect_eq("WIN1", win1, p == 2);
        expect_eq("WIN2", win2, p == 1);
      end
    endcase
  endtask

  task automatic check_held(input int w1, input int w2);
    rd1 = 1'b1; rd2 = 1'b1; ta = DICE_GAIN; tbs = PTS_PLAY;
    repeat (10) @(negedge clk);
    rd1 = 1'b0; rd2 = 1'b0;
    repeat (5) @(negedge clk);
    expect_eq("win1 held", win1, w1);
    expect_eq("win2 held", win2, w2);
    expect_eq("no roll after win", st, 0);
    expect_eq("no load after win", ld1 | ld2, 0);
  endtask

  initial begin
    do_reset();
    turn(1, 5, DICE_GAIN, PTS_PLAY);
    turn(2, 1, DICE_LOSS, PTS_PLAY);
    turn(1, 9, DICE_NONE, PTS_PLAY);
    turn(2, 3, DICE_NONE, PTS_PLAY);
    turn(1, 2, DICE_LOSS, PTS_PLAY);
    turn(2, 4, DICE_GAIN, PTS_HIGH);      // player 2 reaches 90
    check_held(0, 1);
    do_reset();
    turn(1, 3, DICE_GAIN, PTS_HIGH);      // player 1 reaches 90
    check_held(1, 0);
    do_reset();
    turn(1, 3, DICE_LOSS, PTS_LOW);       // player 1 drops to 0: player 2 wins
    check_held(0, 1);
    do_reset();
    turn(1, 7, DICE_NONE, PTS_PLAY);
    turn(2, 2, DICE_LOSS, PTS_LOW);       // player 2 drops to 0: player 1 wins
    check_held(1, 0);
    do_reset();
    for (int i = 0; i < 40; i++) begin
      automatic dice_class_e c = dice_class_e'($urandom_range(0, 2));
      turn((i % 2) + 1, $urandom_range(1, 20), c, PTS_PLAY);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
