`timescale 1ns/1ps
// pic_model: behavioural model (not synthesizable) of the microcontroller
// that feeds the PS/2 sender. It models only what the FPGA sees: the byte
// on its 8-bit port and the enable strobe, with the firmware's timing.
//
// Each loop samples the two axis readings (8-bit A/D results) and the two
// button inputs. For the Y axis, bit 7 chooses up (set) or down (clear, the
// reading is then inverted); bits 6..4 give a magnitude N of 0..7. If N is
// non-zero the key's make code is sent N times, SLOT_MS apart, then the
// break prefix and the key again; the rest of the 7-slot period is waited
// out, so the key is held for N/7 of the period. Then the buttons are
// tested: a pressed button sends its code, a button released since the
// last test sends break prefix and code. The X axis (bit 7 set = left,
// clear = right) and a second button test follow. Every send puts the byte
// on the port, waits a few instruction cycles, pulses enable for one
// instruction cycle and then waits SEND_MS. Codes are the bit-reversed
// scancodes of joykey_pkg.
//
// Timing parameters are in system-clock cycles per millisecond and
// instruction cycles (4 system cycles at the assumed 2 MHz clock).
module pic_model #(
  parameter int CYC_PER_MS = 2000,
  parameter int SLOT_MS    = 16,
  parameter int SEND_MS    = 2,
  parameter int INSTR_CYC  = 4
) (
  input  logic        clk,
  input  logic        run,
  input  logic [7:0]  y_res,
  input  logic [7:0]  x_res,
  input  logic [1:0]  buttons,
  output logic        enable,
  output logic [7:0]  picin,
  output logic [15:0] loops_done
);
  import joykey_pkg::*;

  logic [1:0] stat;
  logic [7:0] ys, xs;

  initial begin
    enable = 0; picin = 8'h00; loops_done = 0; stat = 2'b00;
  end

  task automatic wait_ms(input int ms);
    repeat (ms * CYC_PER_MS) @(posedge clk);
  endtask

  task automatic send(input logic [7:0] b);
    picin = b;
    repeat (4 * INSTR_CYC) @(posedge clk);   // nops: port settles
    enable = 1;
    repeat (INSTR_CYC) @(posedge clk);
    enable = 0;
    wait_ms(SEND_MS);
  endtask

  task automatic axis(input logic [7:0] res, input logic [7:0] key_hi, input logic [7:0] key_lo);
    logic [7:0] v, key;
    int n;
    key = res[7] ? key_hi : key_lo;
    v   = res[7] ? res : ~res;
    n   = int'(v[6:4]);
    if (n != 0) begin
      for (int i = 0; i < n; i++) begin
        send(key);
        wait_ms(SLOT_MS);
      end
      send(KEY_STOP);
      send(key);
    end
    wait_ms((7 - n) * SLOT_MS);
  endtask

  task automatic buttontest();
    logic [7:0] code [2];
    code[0] = KEY_A; code[1] = KEY_B;
    for (int i = 0; i < 2; i++) begin
      if (buttons[i]) begin
        send(code[i]);
        stat[i] = 1'b1;
      end else if (stat[i]) begin
        send(KEY_STOP);
        send(code[i]);
        stat[i] = 1'b0;
      end
    end
  endtask

  always begin
    @(posedge clk);
    if (run) begin
      ys = y_res;    // both axes are converted at the start of a loop
      xs = x_res;
      axis(ys, KEY_UP, KEY_DOWN);
      buttontest();
      axis(xs, KEY_LEFT, KEY_RIGHT);
      buttontest();
      loops_done = loops_done + 1;
      @(posedge clk);
    end
  end
endmodule
