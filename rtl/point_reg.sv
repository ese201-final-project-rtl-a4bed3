// point_reg: points register of one player, a parallel-load register.
//
// On the rising clock edge with ld high the register takes d; with ld low
// it holds. So a load signal raised for one clock period changes q at the
// next rising edge, as in the register timing of the game. Reset presets
// the register to INIT, 45 points at the start of every game. The reset is
// synchronous here (the reset button is synchronised before use); that is
// this design's choice.
module point_reg
  import dice_pkg::*;
#(
  parameter points_t INIT = POINTS_INIT
) (
  input  logic    clk,
  input  logic    rst,   // synchronous, active high: load INIT
  input  logic    ld,    // parallel load
  input  points_t d,
  output points_t q
);

  always_ff @(posedge clk) begin
    if (rst)
      q <= INIT;
    else if (ld)
      q <= d;
  end

endmodule
