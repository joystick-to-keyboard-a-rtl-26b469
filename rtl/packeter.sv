// packeter: serialises the held byte into the PS/2 frame on the data line.
//
// On each falling edge of the undelayed slow clock ('shift' pulse) it sets
// the data bit for the current bit count: count 0 is the start bit (0),
// counts 1..8 are holdy[7] down to holdy[0] (MSB first, as in the original
// design; the byte source supplies bit-reversed scancodes so the host still
// receives them LSB first), count 9 is odd parity (~^holdy) and count 10
// and above the stop bit (1). Outside a frame the output is 1, the idle
// level of the line.
//
// Timing: keyout is registered and changes one cycle after 'shift' is seen,
// i.e. DELAY_STAGES-1 cycles before the delayed clock on the line falls.
module packeter (
  input  logic       clk,
  input  logic       reset,
  input  logic       good,
  input  logic       shift,
  input  logic [3:0] count,
  input  logic [7:0] holdy,
  output logic       keyout
);
  logic bit_now;

  always_comb
    unique case (count) inside
      4'd0:          bit_now = 1'b0;              // start
      [4'd1:4'd8]:   bit_now = holdy[3'(4'd8 - count)]; // data, MSB first
      4'd9:          bit_now = ~^holdy;           // odd parity
      default:       bit_now = 1'b1;              // stop / idle
    endcase

  always_ff @(posedge clk or posedge reset)
    if (reset)      keyout <= 1'b1;
    else if (!good) keyout <= 1'b1;
    else if (shift) keyout <= bit_now;
endmodule
