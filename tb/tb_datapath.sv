// tb_datapath: self-checking test of the datapath driven directly with
// control signals, as the control unit would.
//
// First the worked cases of the game: from 73 and 77 points with bets 2
// and 3, player 1 throws 4 (73 - 8 = 65) and player 2 throws 8
// (77 + 24 = 101); from 89 and 17, player 1 throws 2 (no change, since 2 is
// neither a gaining nor a losing sum) and player 2 throws 11 (17 - 33 = -16).
// The registers are brought to 73/77 and 89/17 through the datapath itself.
// Then random turns: a roll of random length, a random player and bets, and
// a load with the add or subtract the rules call for, with the dice sum,
// TestA, TestB and both registers compared against a model.
module tb_datapath;
  import dice_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  logic st = 0, pl = PL_P1, ld1 = 0, ld2 = 0, sub = 0;
  bet_t bet1 = 0, bet2 = 0;
  dice_class_e ta;
  points_status_e tbs;
  dice_t dice;
  points_t p1, p2;
  int checks = 0, failures = 0;
  int m_dice, m_p1, m_p2;

  datapath dut (.clk(clk), .rst(rst), .st(st), .pl(pl), .ld1(ld1), .ld2(ld2),
                .sub(sub), .bet1(bet1), .bet2(bet2), .test_a(ta), .test_b(tbs),
                .dice(dice), .points1(p1), .points2(p2));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  function automatic int cls(input int d);
    if (d == 3 || d == 8 || d == 10) return 1;
    if (d == 4 || d == 6 || d == 11) return 2;
    return 0;
  endfunction

  function automatic int status(input int v);
    return (v >= 90) ? 1 : (v <= 0) ? 2 : 0;
  endfunction

  // roll the counter to the value `target`
  task automatic roll_to(input int target);
    int n = (target - m_dice + 11) % 11;
    st = 1'b1;
    repeat (n) @(negedge clk);
    st = 1'b0;
    m_dice = target;
    expect_eq("dice", int'(dice), target);
  endtask

  // player p loads its register with points +/- dice x bet (op 1 = add,
  // 2 = subtract); checks TestB p_old and p_new
  task automatic load(input int p, input int op, input int bet);
    int p_old, p_new;
    pl  = (p == 1) ? PL_P1 : PL_P2;
    if (p == 1) bet1 = bet_t'(bet); else bet2 = bet_t'(bet);
    p_old = (p == 1) ? m_p1 : m_p2;
    #1 expect_eq("TestB before load", int'(tbs), status(p_old));
    p_new = (op == 1) ? p_old + m_dice * bet : p_old - m_dice * bet;
    sub = (op == 2);
    ld1 = (p == 1); ld2 = (p == 2);
    @(negedge clk);
    ld1 = 0; ld2 = 0;
    if (p == 1) m_p1 = p_new; else m_p2 = p_new;
    expect_eq("points1", int'(p1), m_p1);
    expect_eq("points2", int'(p2), m_p2);
    expect_eq("TestB after load", int'(tbs), status(p_new));
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst = 1'b0;
    m_dice = 2; m_p1 = 45; m_p2 = 45;
    expect_eq("reset dice", int'(dice), 2);
    expect_eq("reset p1", int'(p1), 45);
    expect_eq("reset p2", int'(p2), 45);
    // bring to 73 / 77: 45 + 4x7 = 73 (a sum the game would not add, but the
    // datapath does what it is told), 45 + 8x4 = 77
    roll_to(7);  load(1, 1, 3); load(1, 1, 1);          // 45+21+7 = 73
    roll_to(8);  load(2, 1, 3); roll_to(8); load(2, 1, 1); // 45+24+8 = 77
    expect_eq("setup p1", int'(p1), 73);
    expect_eq("setup p2", int'(p2), 77);
    // worked case a
    roll_to(4);
    #1 expect_eq("TestA 4", int'(ta), int'(DICE_LOSS));
    load(1, 2, 2);
    expect_eq("case a: Reg1 p_new 4", int'(p1), 65);
    roll_to(8);
    #1 expect_eq("TestA 8", int'(ta), int'(DICE_GAIN));
    load(2, 1, 3);
    expect_eq("case a: Reg2 p_new 8", int'(p2), 101);
    expect_eq("case a: 101 wins", int'(tbs), int'(PTS_HIGH));
    // worked case b: registers to 89 / 17
    rst = 1'b1; @(negedge clk); rst = 1'b0;
    m_dice = 2; m_p1 = 45; m_p2 = 45;
    roll_to(11); load(1, 1, 3); roll_to(11); load(1, 1, 1);  // 45+33+11 = 89
    roll_to(12); load(2, 2, 2); roll_to(4); load(2, 2, 1);   // 45-24-4 = 17
    expect_eq("setup p1 b", int'(p1), 89);
    expect_eq("setup p2 b", int'(p2), 17);
    roll_to(2);
    #1 expect_eq("TestA 2", int'(ta), int'(DICE_NONE));
    roll_to(11);
    #1 expect_eq("TestA 11", int'(ta), int'(DICE_LOSS));
    load(2, 2, 3);
    expect_eq("case b: Reg2 p_new 11", int'(p2), -16);
    expect_eq("case b: -16 loses", int'(tbs), int'(PTS_LOW));
    // random turns within the game's ranges
    for (int i = 0; i < 3000; i++) begin
      int p, d, c;
      if (i % 40 == 0) begin
        rst = 1'b1; @(negedge clk); rst = 1'b0;
        m_dice = 2; m_p1 = 45; m_p2 = 45;
      end
      p = $urandom_range(1, 2);
      d = $urandom_range(2, 12);
      roll_to(d);
      c = cls(d);
      pl = (p == 1) ? PL_P1 : PL_P2;
      #1 expect_eq("TestA", int'(ta), c);
      // load only from 1..89, as in the game (the DUT's value is checked
      // too, so that a wrong register cannot drive the sum out of range)
      if (c != 0 && status((p == 1) ? m_p1 : m_p2) == 0
          && status((p == 1) ? int'(p1) : int'(p2)) == 0)
        load(p, c, $urandom_range(0, 3));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
