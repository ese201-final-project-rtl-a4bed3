// sync2: two-flip-flop synchroniser for W asynchronous inputs.
//
// Push buttons and the reset button change with no relation to the board
// clock; each bit passes through two flip-flops before any logic uses it,
// so the output is the input delayed by two clocks. The flip-flops have no
// reset, which lets the reset button itself be synchronised; their contents
// are flushed within two clocks. Not a debouncer: a bouncing Roll Dice
// button only adds a few counts to a fast counter. This block is this
// design's own addition for safe use of the board inputs.
module sync2 #(
  parameter int W = 1
) (
  input  logic         clk,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  logic [W-1:0] meta;

  always_ff @(posedge clk) begin
    meta <= d;
    q    <= meta;
  end

endmodule
