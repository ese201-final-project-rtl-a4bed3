// tb_dice_game: end-to-end test of the dice game top level at its default
// parameters, playing whole games through the board pins.
//
// The testbench presses the Roll Dice buttons for as many clocks as it takes
// to stop the dice counter on a chosen sum (the counter steps once per clock
// the synchronised button is high, so the hold time sets the throw), sets
// the bet switches, and keeps its own model of the game: points, whose turn
// it is, and the winner. After every turn it compares both point registers
// and the LEDs with the model; at chosen points, and at the end of each game,
// it reads the four scanned seven-segment digits from the anode and segment
// pins and compares them with the dice and the points of the player who
// rolled last. Four directed games end in each of the four ways a game can
// end (player 1 or 2 reaching 90, player 1 or 2 dropping to 0 or below),
// then random games are played to the end.
//
// Mechanisms counted, each of which must occur at least once: gaining and
// losing throws, throws that change nothing, a bet of 0, the counter
// wrapping from 12 to 2 during a roll, the four ways of winning, the other
// player's button being ignored, buttons ignored after a win, the display
// following the roller, and reset in the middle of a game.
module tb_dice_game;
  import dice_pkg::*;
  import tb_seg_pkg::*;

  logic clk = 1'b0;
  logic rst_btn = 1'b1, rd1_btn = 1'b0, rd2_btn = 1'b0;
  bet_t bet1 = '0, bet2 = '0;
  logic led_p1, led_p2, led_win1, led_win2, dp_n;
  logic [3:0] an_n;
  seg_t seg_n;
  int checks = 0, failures = 0;

  // model
  int m_dice, m_p1, m_p2, m_turn, m_winner, m_shown;

  // mechanism counters
  int n_gain, n_loss, n_none, n_bet0, n_wrap, n_ignore, n_after_win,
      n_disp_switch, n_mid_reset, n_display_checks;
  int n_win[4];   // 0: P1 high, 1: P2 high, 2: P1 low (P2 wins), 3: P2 low

  dice_game dut (
    .clk(clk), .rst_btn(rst_btn), .rd1_btn(rd1_btn), .rd2_btn(rd2_btn),
    .bet1(bet1), .bet2(bet2), .led_p1(led_p1), .led_p2(led_p2),
    .led_win1(led_win1), .led_win2(led_win2), .an_n(an_n), .seg_n(seg_n),
    .dp_n(dp_n));

  always #5 clk = ~clk;

  initial begin
    repeat (40_000_000) @(posedge clk);
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

  task automatic reset_game();
    rst_btn = 1'b1; rd1_btn = 1'b0; rd2_btn = 1'b0;
    repeat (6) @(negedge clk);
    rst_btn = 1'b0;
    repeat (4) @(negedge clk);
    m_dice = 2; m_p1 = 45; m_p2 = 45; m_turn = 1; m_winner = 0; m_shown = 1;
    expect_eq("reset points1", int'(dut.u_dp.points1), 45);
    expect_eq("reset points2", int'(dut.u_dp.points2), 45);
    expect_eq("reset win LEDs", int'({led_win1, led_win2}), 0);
  endtask

  task automatic check_state();
    expect_eq("points1", int'(dut.u_dp.points1), m_p1);
    expect_eq("points2", int'(dut.u_dp.points2), m_p2);
    expect_eq("win1 LED", int'(led_win1), int'(m_winner == 1));
    expect_eq("win2 LED", int'(led_win2), int'(m_winner == 2));
    expect_eq("player LED 1", int'(led_p1), int'(m_shown == 1));
    expect_eq("player LED 2", int'(led_p2), int'(m_shown == 2));
  endtask

  // Read the four scanned digits from the pins and compare with the dice and
  // the points of the player shown.
  task automatic check_display();
    logic [6:0] et[4];
    logic       ed[4];
    logic [6:0] dt, du, pt, pu;
    logic dpt, dpu;
    dice_pats(m_dice, dt, du);
    points_pats((m_shown == 1) ? m_p1 : m_p2, pt, pu, dpt, dpu);
    et = '{pu, pt, du, dt};      // index = digit number
    ed = '{dpu, dpt, 1'b0, 1'b0};
    n_display_checks++;
    for (int j = 0; j < 4; j++) begin
      while (an_n != ~(4'b1 << j)) @(negedge clk);
      checks++;
      if (~seg_n != et[j] || ~dp_n != ed[j]) begin
        failures++;
        $display("FAIL display digit %0d: %b dp %b, expected %b dp %b",
                 j, ~seg_n, ~dp_n, et[j], ed[j]);
      end
    end
  endtask

  // Player p throws `target` with bet b. Returns when the turn is over.
  task automatic throw(input int p, input int target, input int b);
    int hold, amount, cls;
    int pts;
    if (p == 1) bet1 = bet_t'(b); else bet2 = bet_t'(b);
    hold = (target - m_dice + 11) % 11;
    if (hold == 0) hold = 11;
    if (m_dice + hold > 12) n_wrap++;
    if (p == 1) rd1_btn = 1'b1; else rd2_btn = 1'b1;
    repeat (hold) @(negedge clk);
    rd1_btn = 1'b0; rd2_btn = 1'b0;
    repeat (12) @(negedge clk);
    if (m_winner != 0 || p != m_turn) begin
      // button of a player not on turn, or after a win: nothing happens
      if (m_winner != 0) n_after_win++; else n_ignore++;
      expect_eq("ignored throw: dice", int'(dut.u_dp.dice), m_dice);
      check_state();
      return;
    end
    m_dice = target;
    if (m_shown != p) n_disp_switch++;
    m_shown = p;
    expect_eq("dice", int'(dut.u_dp.dice), target);
    amount = target * b;
    cls = (target == 3 || target == 8 || target == 10) ? 1 :
          (target == 4 || target == 6 || target == 11) ? 2 : 0;
    pts = (p == 1) ? m_p1 : m_p2;
    if (cls == 0) n_none++;
    else begin
      if (cls == 1) begin n_gain++; pts += amount; end
      else          begin n_loss++; pts -= amount; end
      if (b == 0) n_bet0++;
    end
    if (p == 1) m_p1 = pts; else m_p2 = pts;
    if (cls != 0 && pts >= 90) begin
      m_winner = p; n_win[p - 1]++;
    end else if (cls != 0 && pts <= 0) begin
      m_winner = 3 - p; n_win[p + 1]++;
    end else
      m_turn = 3 - p;
    check_state();
  endtask

  task automatic other_button();
    // the player not on turn presses: ignored
    throw(3 - m_turn, $urandom_range(2, 12), 3);
  endtask

  initial begin
    n_gain = 0; n_loss = 0; n_none = 0; n_bet0 = 0; n_wrap = 0; n_ignore = 0;
    n_after_win = 0; n_disp_switch = 0; n_mid_reset = 0; n_display_checks = 0;
    n_win = '{0, 0, 0, 0};

    // Game A: player 1 reaches 90 or more
    reset_game();
    check_display();
    throw(1, 10, 3);             // 45 + 30 = 75
    check_display();
    other_button();
    throw(2, 4, 3);              // 45 - 12 = 33
    check_display();
    throw(1, 8, 3);              // 75 + 24 = 99: player 1 wins
    check_display();
    throw(2, 10, 3);             // ignored after the win
    throw(1, 10, 3);
    expect_eq("A: winner 1", m_winner, 1);

    // Game B: player 1 drops to 0 or below, player 2 wins
    reset_game();
    throw(1, 11, 3);             // 45 - 33 = 12
    throw(2, 3, 1);              // 45 + 3 = 48
    throw(1, 6, 3);              // 12 - 18 = -6: player 2 wins
    check_display();
    expect_eq("B: winner 2", m_winner, 2);

    // Game C: player 2 reaches 90 or more; bet 0 and a sum that does nothing
    reset_game();
    throw(1, 8, 0);              // bet 0: no change
    throw(2, 10, 3);             // 75
    throw(1, 5, 2);              // nothing
    throw(2, 8, 3);              // 99: player 2 wins
    check_display();
    expect_eq("C: winner 2", m_winner, 2);

    // Game D: player 2 drops to exactly 0, player 1 wins
    reset_game();
    throw(1, 2, 1);              // nothing
    throw(2, 11, 3);             // 12
    throw(1, 7, 3);              // nothing
    throw(2, 4, 3);              // 0: player 1 wins
    check_display();
    expect_eq("D: winner 1", m_winner, 1);

    // Game E: reset in the middle of a game, then the Question 2 sequence:
    // points brought to 73 / 77, bets 2 / 3, player 1 throws 4, player 2 8.
    reset_game();
    throw(1, 10, 2);             // 65
    throw(2, 3, 2);              // 51
    n_mid_reset++;
    reset_game();
    throw(1, 10, 2); throw(2, 8, 3); throw(1, 2, 0); throw(2, 4, 2);
    throw(1, 4, 0);  throw(2, 6, 0); throw(1, 3, 3); throw(2, 8, 1);
    throw(1, 10, 0); throw(2, 8, 0);
    // now 45+20+9 = 74, 45+24-8+8 = 69; adjust to 73 / 77
    throw(1, 10, 0); throw(2, 8, 1); throw(1, 8, 0); throw(2, 2, 0);
    throw(1, 4, 0); throw(2, 2, 0);
    expect_eq("E: setup p2", m_p2, 77);
    // player 1 from 74 to 73: 74 - 4 = 70, then 70 + 3 = 73
    throw(1, 4, 1); throw(2, 2, 0); throw(1, 3, 1); throw(2, 2, 0);
    expect_eq("E: setup p1", m_p1, 73);
    throw(1, 4, 2);              // 73 - 8 = 65
    expect_eq("E: Reg1 after 4", int'(dut.u_dp.points1), 65);
    throw(2, 8, 3);              // 77 + 24 = 101: player 2 wins
    expect_eq("E: Reg2 after 8", int'(dut.u_dp.points2), 101);
    check_display();             // 101 shows as "01" with the hundred dp

    // Game F: the second Question 2 sequence: points brought to 89 / 17,
    // player 1 throws 2 (no change), player 2 throws 11 with bet 3
    reset_game();
    throw(1, 10, 3); throw(2, 11, 2);   // 75, 23
    throw(1, 8, 1);  throw(2, 6, 1);    // 83, 17
    throw(1, 3, 2);  throw(2, 2, 0);    // 89, 17
    expect_eq("F: setup", m_p1 * 1000 + m_p2, 89017);
    throw(1, 2, 2);                     // no change
    expect_eq("F: Reg1 after 2", int'(dut.u_dp.points1), 89);
    throw(2, 11, 3);                    // 17 - 33 = -16: player 1 wins
    expect_eq("F: Reg2 after 11", int'(dut.u_dp.points2), -16);
    expect_eq("F: winner 1", m_winner, 1);
    check_display();                    // "16" with the negative dp

    // random games to the end
    for (int g = 0; g < 30; g++) begin
      automatic int turns = 0;
      reset_game();
      while (m_winner == 0 && turns < 200) begin
        if ($urandom_range(0, 9) == 0) other_button();
        throw(m_turn, $urandom_range(2, 12), $urandom_range(0, 3));
        turns++;
      end
      if (g % 10 == 0) check_display();
      $display("game %0d: %0d turns, winner %0d, points %0d/%0d", g, turns, m_winner, m_p1, m_p2);
    end

    checks += 15;
    if (n_gain == 0)        begin failures++; $display("FAIL never a gain"); end
    if (n_loss == 0)        begin failures++; $display("FAIL never a loss"); end
    if (n_none == 0)        begin failures++; $display("FAIL never a neutral sum"); end
    if (n_bet0 == 0)        begin failures++; $display("FAIL never a zero bet"); end
    if (n_wrap == 0)        begin failures++; $display("FAIL counter never wrapped"); end
    if (n_ignore == 0)      begin failures++; $display("FAIL other button never tried"); end
    if (n_after_win == 0)   begin failures++; $display("FAIL no throw after a win"); end
    if (n_disp_switch == 0) begin failures++; $display("FAIL display never switched"); end
    if (n_mid_reset == 0)   begin failures++; $display("FAIL no reset mid-game"); end
    if (n_display_checks == 0) begin failures++; $display("FAIL display never read"); end
    for (int k = 0; k < 4; k++)
      if (n_win[k] == 0) begin failures++; $display("FAIL win kind %0d never", k); end
    checks++;
    if (n_win[0] + n_win[1] + n_win[2] + n_win[3] != 36) begin
      failures++; $display("FAIL not every game ended with a winner");
    end
    $display("gain=%0d loss=%0d none=%0d bet0=%0d wrap=%0d ignored=%0d after_win=%0d",
             n_gain, n_loss, n_none, n_bet0, n_wrap, n_ignore, n_after_win);
    $display("display_switch=%0d mid_reset=%0d display_reads=%0d wins=%0d/%0d/%0d/%0d",
             n_disp_switch, n_mid_reset, n_display_checks,
             n_win[0], n_win[1], n_win[2], n_win[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
