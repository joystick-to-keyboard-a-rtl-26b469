// gooder: frame controller of the PS/2 sender ('good' flag).
//
// A frame starts on the rising edge of the PIC's enable strobe, but only if
// no frame is in progress and the lines are free (compgood low); it then
// raises 'good', which turns the PS/2 pads into outputs and runs the clock
// and bit counter. The frame ends when the bit count passes LAST_BIT (10,
// the stop bit) or at once when compgood rises (the host took the lines);
// the byte is then dropped, not resent, as in the original design. A strobe
// that arrives while busy is ignored (this design's choice: the original
// restarted the bit counter).
//
// Timing: 'load' is combinational and high in the accepting cycle; good is
// registered and high from the next cycle on.
module gooder #(
  parameter logic [3:0] LAST_BIT = 4'd10
) (
  input  logic       clk,
  input  logic       reset,
  input  logic       enable_rise,
  input  logic [3:0] count,
  input  logic       compgood,
  output logic       good,
  output logic       load
);
  assign load = enable_rise && !good && !compgood;

  always_ff @(posedge clk or posedge reset)
    if (reset)                             good <= 1'b0;
    else if (load)                         good <= 1'b1;
    else if (count > LAST_BIT || compgood) good <= 1'b0;
endmodule
