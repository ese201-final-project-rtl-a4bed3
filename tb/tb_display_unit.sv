// tb_display_unit: self-checking test of the display switching circuit.
//
// Drives a scan tick every few clocks and, after each tick, checks that
// exactly one anode is on, that the digits are visited in the order
// 0,1,2,3,0,... and that the enabled digit shows the expected dice or point
// pattern (reference in tb_seg_pkg). Also checks that the player shown, and
// its LED, follow PL only while ST is high, so the last roller stays shown.
module tb_display_unit;
  import dice_pkg::*;
  import tb_seg_pkg::*;
  logic clk = 1'b0, rst = 1'b1, tick = 1'b0, st = 1'b0, pl = PL_P1;
  dice_t dice = 4'd7;
  points_t p1 = 8'sd45, p2 = 8'sd45;
  logic [3:0] an_n;
  seg_t seg_n;
  logic dp_n, led1, led2;
  int checks = 0, failures = 0;
  int expect_digit;

  display_unit dut (.clk(clk), .rst(rst), .scan_tick(tick), .st(st), .pl(pl),
                    .dice(dice), .points1(p1), .points2(p2), .an_n(an_n),
                    .seg_n(seg_n), .dp_n(dp_n), .led_p1(led1), .led_p2(led2));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(input string s);
    failures++; $display("FAIL %s", s);
  endtask

  // Scan all four digits once and compare them with the expected values.
  task automatic scan_check(input int shown_player);
    int pts;
    logic [6:0] dt, du, pt, pu;
    logic dpt, dpu;
    pts = (shown_player == 1) ? int'(p1) : int'(p2);
    dice_pats(int'(dice), dt, du);
    points_pats(pts, pt, pu, dpt, dpu);
    checks++;
    if (led1 != (shown_player == 1) || led2 != (shown_player == 2))
      fail($sformatf("LEDs %b%b for player %0d", led1, led2, shown_player));
    for (int k = 0; k < 4; k++) begin
      int idx;
      @(negedge clk) tick = 1'b1;
      @(negedge clk) tick = 1'b0;
      @(negedge clk);
      expect_digit = (expect_digit + 1) % 4;
      idx = -1;
      for (int j = 0; j < 4; j++) if (an_n == ~(4'b1 << j)) idx = j;
      checks++;
      if (idx != expect_digit) begin
        fail($sformatf("anodes %b, expected digit %0d", an_n, expect_digit));
      end else begin
        logic [6:0] es;
        logic edp;
        case (idx)
          3: begin es = dt; edp = 1'b0; end
          2: begin es = du; edp = 1'b0; end
          1: begin es = pt; edp = dpt;  end
          default: begin es = pu; edp = dpu; end
        endcase
        checks++;
        if (~seg_n != es || ~dp_n != edp)
          fail($sformatf("digit %0d shows %b dp %b, expected %b dp %b",
                         idx, ~seg_n, ~dp_n, es, edp));
      end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    @(negedge clk);
    checks++;
    if (an_n != 4'b1110) fail("after reset digit 0 should be enabled");
    expect_digit = 0;
    scan_check(1);
    // player 2 rolls: display switches to player 2
    p2 = 8'sd63;
    pl = PL_P2; st = 1'b1; dice = 4'd11;
    @(negedge clk) st = 1'b0;
    scan_check(2);
    // turn passes to player 1 (PL changes) without a roll: still player 2
    pl = PL_P1; p1 = 8'sd9;
    scan_check(2);
    // player 1 rolls
    st = 1'b1; dice = 4'd3;
    @(negedge clk) st = 1'b0;
    scan_check(1);
    // a range of values
    for (int i = 0; i < 200; i++) begin
      dice = dice_t'($urandom_range(2, 12));
      p1 = points_t'($urandom_range(0, 160) - 35);
      scan_check(1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
