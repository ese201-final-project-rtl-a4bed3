// multiplier: 4-bit by 2-bit unsigned multiplier, dice sum times bet.
//
// Built the way a combinational array multiplier is: each bet bit gates a
// copy of the dice value, and the two partial products, the second shifted
// left by one, are added. The largest product, 12 x 3 = 36, fits in 6 bits.
// Purely combinational; the choice of a combinational rather than a
// sequential multiplier follows the main suggestion for this block.
module multiplier
  import dice_pkg::*;
(
  input  dice_t a,   // dice sum
  input  bet_t  b,   // bet
  output prod_t p
);

  prod_t pp0, pp1;

  always_comb begin
    pp0 = b[0] ? prod_t'(a)         : '0;
    pp1 = b[1] ? prod_t'({a, 1'b0}) : '0;
    p   = pp0 + pp1;
  end

endmodule
