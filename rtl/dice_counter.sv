// dice_counter: the 2-to-12 counter that stands for the sum of two dice.
//
// While the count enable ce is high the counter steps 2, 3, ..., 12, 2, ...
// once per clock; when ce is low it holds. Clocked fast, the value at which
// it stops when the Roll Dice button is released is unpredictable to the
// player, and that value is the throw. The wrap from 12 back to 2 is the
// parallel load of a 4-bit counter described for this block. A synchronous
// reset loads 2 (the reset value is this design's choice). Output q is
// registered and changes one clock after ce.
module dice_counter
  import dice_pkg::*;
(
  input  logic  clk,
  input  logic  rst,   // synchronous, active high
  input  logic  ce,    // count enable (ST from the control unit)
  output dice_t q
);

  localparam dice_t LOW  = dice_t'(2);
  localparam dice_t HIGH = dice_t'(12);

  always_ff @(posedge clk) begin
    if (rst)
      q <= LOW;
    else if (ce)
      q <= (q == HIGH) ? LOW : q + dice_t'(1);
  end

endmodule
