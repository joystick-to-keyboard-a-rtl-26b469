// feedback: detects a host suppressing the clock in the middle of a frame.
//
// The host may take the lines at any time by holding the clock line low.
// While a frame is sent, the clock line should be high shortly after the
// sender released it; so at each rising edge of the twice-delayed slow clock
// (dclk, one delay chain later than the clock driven on the line) the
// synchronised clock line is sampled, and a low line raises 'lower' for one
// cycle. One low sample decides, as in the original design.
//
// Timing: 'lower' is a registered one-cycle pulse, one cycle after the
// rising edge of dclk is seen.
module feedback (
  input  logic clk,
  input  logic reset,
  input  logic good,
  input  logic dclk,
  input  logic line_clk,
  output logic lower
);
  logic dclk_q;

  always_ff @(posedge clk or posedge reset)
    if (reset) begin
      dclk_q <= 1'b1;
      lower  <= 1'b0;
    end else begin
      dclk_q <= dclk;
      lower  <= good && dclk && !dclk_q && !line_clk;
    end
endmodule
