// compin: the line-busy flag 'compgood'.
//
// The host pulls the clock line low before it sends, and a keyboard on the
// same lines pulls it low while it clocks out its own frame. While the
// sender is idle, a low clock line therefore sets compgood; so does a
// 'lower' pulse from feedback (host suppressing the clock during a frame).
// compgood blocks new frames and aborts a running one. It is cleared by the
// stopclock timeout ('done'), unless the line is still low in that cycle,
// which has priority as in the original design.
//
// Timing: compgood is registered; line_clk is the synchronised clock line.
module compin (
  input  logic clk,
  input  logic reset,
  input  logic good,
  input  logic line_clk,
  input  logic lower,
  input  logic done,
  output logic compgood
);
  always_ff @(posedge clk or posedge reset)
    if (reset)                   compgood <= 1'b0;
    else if (!line_clk && !good) compgood <= 1'b1;
    else if (done)               compgood <= 1'b0;
    else if (lower)              compgood <= 1'b1;
endmodule
