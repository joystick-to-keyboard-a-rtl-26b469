// counter4: bit counter of the 11-bit PS/2 frame.
//
// Cleared when a frame is accepted, it advances by one on each rising edge
// of the undelayed slow clock ('advance' pulse), so during bit period k of
// the frame it holds k (0 = start bit ... 10 = stop bit); the value 11 ends
// the frame. It saturates at 15 rather than wrapping, which is this
// design's choice; the original counted freely on the slow clock, which
// stops when the frame ends.
//
// Timing: count is registered; 'clear' has priority over 'advance'.
module counter4 (
  input  logic       clk,
  input  logic       reset,
  input  logic       clear,
  input  logic       advance,
  output logic [3:0] count
);
  always_ff @(posedge clk or posedge reset)
    if (reset)                         count <= 4'd0;
    else if (clear)                    count <= 4'd0;
    else if (advance && count != 4'hF) count <= count + 4'd1;
endmodule
