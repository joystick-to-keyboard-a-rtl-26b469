// joykey_pkg: constants shared by the joystick-to-PS/2 sender and its testbenches.
//
// A PS/2 device-to-host frame is 11 bits: a start bit (0), eight data bits,
// an odd-parity bit and a stop bit (1). The bit counter of the sender runs
// 0..10 over those bits; a count past FRAME_LAST ends the frame.
//
// The byte source (a PIC microcontroller in the original system) hands over
// bytes that are already bit-reversed, because the sender shifts them out
// MSB first while PS/2 wants LSB first. The constants below are those
// reversed scancodes (scan code set 2), e.g. keypad 8 = 8'h75 -> 8'hAE.
package joykey_pkg;

  localparam int unsigned FRAME_BITS = 11;
  localparam logic [3:0]  FRAME_LAST = 4'd10;

  // Bit-reversed scan-code-set-2 codes sent by the byte source.
  localparam logic [7:0] KEY_UP    = 8'hAE;  // keypad 8 (8'h75)
  localparam logic [7:0] KEY_DOWN  = 8'h4E;  // keypad 2 (8'h72)
  localparam logic [7:0] KEY_LEFT  = 8'hD6;  // keypad 4 (8'h6B)
  localparam logic [7:0] KEY_RIGHT = 8'h2E;  // keypad 6 (8'h74)
  localparam logic [7:0] KEY_A     = 8'h58;  // z         (8'h1A)
  localparam logic [7:0] KEY_B     = 8'h44;  // x         (8'h22)
  localparam logic [7:0] KEY_STOP  = 8'h0F;  // break prefix (8'hF0)

  // Reverse the bit order of a byte (LSB <-> MSB).
  function automatic logic [7:0] bitrev8(input logic [7:0] b);
    for (int i = 0; i < 8; i++) bitrev8[i] = b[7-i];
  endfunction

endpackage
