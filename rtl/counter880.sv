// counter880: the slow-clock divider of the PS/2 sender.
//
// An 8-bit counter that runs from FIRST (8'h30) up to LAST (8'hD1) and wraps
// back to FIRST, i.e. a period of LAST-FIRST+1 = 162 clock cycles. At the
// 2 MHz system clock assumed for this design that is 81 us, the ~80 us PS/2
// bit period. Bit 7 of the count is clear for the first 80 states
// (8'h30..8'h7F) and set for the last 82 (8'h80..8'hD1); clocker uses it as
// the slow clock. The range is the original design's; the synchronous
// 'restart' input (count back to FIRST) is this design's addition, so a
// frame can begin with a whole clock period.
//
// Timing: cntr is registered; 'wrap' is combinational and high in the cycle
// cntr == LAST, i.e. once per period.
module counter880 #(
  parameter logic [7:0] FIRST = 8'h30,
  parameter logic [7:0] LAST  = 8'hD1
) (
  input  logic       clk,
  input  logic       reset,
  input  logic       restart,
  output logic [7:0] cntr,
  output logic       wrap
);
  assign wrap = (cntr == LAST);

  always_ff @(posedge clk or posedge reset)
    if (reset)             cntr <= FIRST;
    else if (restart || wrap) cntr <= FIRST;
    else                   cntr <= cntr + 8'd1;

  initial assert (LAST > FIRST) else $error("counter880: LAST must exceed FIRST");
endmodule
