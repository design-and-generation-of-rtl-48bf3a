// clk_div: divides the 50 MHz board clock down to a 5 MHz rate.
//
// A modulo-DIV counter runs on the board clock and raises `tick` for
// exactly one clock cycle every DIV cycles, on the cycle where the counter
// holds DIV-1. With the default DIV = 10 the tick rate is 50 MHz / 10 =
// 5 MHz, the rate the design specifies. The divided rate is delivered as a
// clock enable rather than as a new clock so that all logic stays on one
// clock; that is this design's choice.
//
// Interface: clk (board clock), rst_n (synchronous, active low), tick.
// Timing: after reset release the first tick comes on the DIV-th rising
// edge, then one every DIV edges.
module clk_div #(
  parameter int unsigned DIV = 10
) (
  input  logic clk,
  input  logic rst_n,
  output logic tick
);

  localparam int unsigned W = (DIV > 1) ? $clog2(DIV) : 1;

  logic [W-1:0] cnt;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt  <= '0;
      tick <= 1'b0;
    end else begin
      if (cnt == W'(DIV - 1)) cnt <= '0;
      else                    cnt <= cnt + 1'b1;
      tick <= (cnt == W'(DIV - 2)) || (DIV == 1);
    end
  end

endmodule
