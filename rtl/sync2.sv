// sync2: two-flop synchroniser for one asynchronous input.
//
// The PIC strobe and the PS/2 pins change independently of the FPGA clock;
// each is passed through two flip-flops before any logic looks at it, so
// the output lags the input by two clock cycles. RESET_VAL is the output
// after reset (the idle level of the input).
module sync2 #(
  parameter logic RESET_VAL = 1'b1
) (
  input  logic clk,
  input  logic reset,
  input  logic d,
  output logic q
);
  logic meta;

  always_ff @(posedge clk or posedge reset)
    if (reset) begin
      meta <= RESET_VAL;
      q    <= RESET_VAL;
    end else begin
      meta <= d;
      q    <= meta;
    end
endmodule
