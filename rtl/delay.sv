// delay: a chain of STAGES flip-flops that delays the slow PS/2 clock.
//
// The host reads the data line on the falling edge of the clock line, so
// the clock driven on the line must fall some time after the data has
// changed. The data bit changes with the undelayed slow clock; the line
// clock is this chain's last tap, STAGES system-clock cycles later. A second
// chain behind the first gives the later clock at which feedback checks
// that the line really went high. Five stages, as in the original design,
// are 2.5 us at the assumed 2 MHz clock; the PS/2 requirement quoted for the
// design is 5-25 us, so STAGES may need to be raised for a given host.
//
// Interface: taps[i] is din delayed by i+1 cycles. Reset fills the chain
// with ones, the idle level of the clock (this design's choice).
module delay #(
  parameter int unsigned STAGES = 5
) (
  input  logic              clk,
  input  logic              reset,
  input  logic              din,
  output logic [STAGES-1:0] taps
);
  always_ff @(posedge clk or posedge reset)
    if (reset) taps <= '1;
    else       taps <= {taps[STAGES-2:0], din};

  initial assert (STAGES >= 2) else $error("delay: STAGES must be at least 2");
endmodule
