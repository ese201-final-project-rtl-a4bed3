// clk_divider: divides the board clock into a slow enable tick.
//
// A counter runs from 0 to DIV-1 and tick is high for one clock each time
// it wraps, so tick has the period DIV clocks. The rest of the design stays
// on the one board clock and uses tick as an enable, rather than deriving a
// second clock. The display scan uses it: with the default DIV of 100_000
// and an assumed 100 MHz board clock, the four digits are stepped at 1 kHz.
// The divide ratio is this design's choice.
module clk_divider #(
  parameter int unsigned DIV = 100_000
) (
  input  logic clk,
  input  logic rst,    // synchronous, active high
  output logic tick
);

  localparam int CW = (DIV > 1) ? $clog2(DIV) : 1;

  logic [CW-1:0] cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt  <= '0;
      tick <= 1'b0;
    end else if (cnt == CW'(DIV - 1)) begin
      cnt  <= '0;
      tick <= 1'b1;
    end else begin
      cnt  <= cnt + CW'(1);
      tick <= 1'b0;
    end
  end

endmodule
