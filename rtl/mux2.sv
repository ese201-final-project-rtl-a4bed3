// mux2: 2-to-1 multiplexer of parameterised width.
//
// The datapath uses two of them, both steered by the player select PL: one
// picks the bet switches of the player on turn (input in1 = Bet1 when
// sel = 1, as labelled in the datapath diagram), the other picks that
// player's point register for the adder/subtractor and the test logic.
// Purely combinational.
module mux2 #(
  parameter int W = 8
) (
  input  logic         sel,
  input  logic [W-1:0] in1,   // chosen when sel = 1
  input  logic [W-1:0] in0,   // chosen when sel = 0
  output logic [W-1:0] y
);

  always_comb y = sel ? in1 : in0;

endmodule
