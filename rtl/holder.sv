// holder: holding register for the byte handed over by the PIC.
//
// The byte on picin is captured in the cycle the sender accepts a frame
// ('load', a one-cycle pulse from gooder) and held for the whole frame, so
// the PIC may change its port afterwards. Reset loads all ones.
//
// Timing: holdy is registered; it shows the new byte one cycle after load.
module holder #(
  parameter int unsigned WIDTH = 8
) (
  input  logic             clk,
  input  logic             reset,
  input  logic             load,
  input  logic [WIDTH-1:0] picin,
  output logic [WIDTH-1:0] holdy
);
  always_ff @(posedge clk or posedge reset)
    if (reset)     holdy <= '1;
    else if (load) holdy <= picin;
endmodule
