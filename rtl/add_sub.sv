// add_sub: two's complement adder/subtractor for the point registers.
//
// Computes a + b when sub = 0 and a - b when sub = 1, with b the unsigned
// product of dice and bet. Subtraction is done as addition of the one's
// complement of b with a carry-in of 1, so one adder serves both
// operations. In the game a holds 1..89 whenever it is used and b at most
// 36, so the result (-35..125) always fits in 8 bits; an overflow flag is
// provided anyway for checking. Purely combinational.
module add_sub
  import dice_pkg::*;
(
  input  points_t a,        // current points of the player on turn
  input  prod_t   b,        // dice x bet
  input  logic    sub,      // 0: add, 1: subtract (Add/Subt)
  output points_t y,
  output logic    overflow  // signed result out of range
);

  points_t bx;

  always_comb begin
    bx       = points_t'(b) ^ {POINTS_W{sub}};
    y        = a + bx + points_t'(sub);
    overflow = (a[POINTS_W-1] == bx[POINTS_W-1]) && (y[POINTS_W-1] != a[POINTS_W-1]);
  end

endmodule
