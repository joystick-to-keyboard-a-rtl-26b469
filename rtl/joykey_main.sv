// joykey_main: FPGA side of the joystick-to-keyboard converter.
//
// A microcontroller reads an analog joystick and turns its position into
// pulse-width-modulated key presses: it hands this FPGA one scancode byte at
// a time (picin) with a strobe (enable). The FPGA sends each byte to the PC
// as a PS/2 keyboard frame, on clock and data lines it shares with a real
// keyboard, so it must keep off the lines while the PC or the keyboard uses
// them.
//
// Send path: gooder accepts a byte when the lines are free and raises
// 'good' for the length of the frame; holder keeps the byte; clocker makes
// the ~80 us bit clock (162 system cycles, 2 MHz assumed); counter4 counts
// the 11 bits on its rising edges and packeter sets start, data (MSB first,
// the bytes arrive bit-reversed), odd parity and stop on its falling edges.
// The clock put on the line is that bit clock delayed by DELAY_STAGES
// cycles, so it falls after the data bit has changed.
//
// Line watch: compin raises 'line_busy' (compgood) when the clock line is
// low while the FPGA is idle, and feedback reports a clock line found low
// when the FPGA had released it high (the PC suppressing the clock in the
// middle of a frame); that aborts the frame and the byte is dropped.
// stopclock lets line_busy fall again STOP_TICKS bit-clock periods later.
// Bytes offered while busy are dropped, as in the original system.
//
// Pads: the PS/2 lines are open-collector with pull-ups. The tri-state pads
// are outside this module: ps2_clk_o / ps2_data_o are the values to drive
// while ps2_oe is high ('good'), and ps2_*_i are the pins as read. The PIC
// strobe and the clock pin pass through two-flop synchronisers.
//
// A frame ends when the bit clock rises for the 11th time, a few cycles
// before the delayed clock on the line has risen; for DELAY_STAGES+3 cycles
// after 'good' falls the line watch still counts the bus as the sender's
// own (this design's addition: without it the sender's own late clock
// edge would be taken for the host and block the next byte).
//
// Timing: a frame takes about 11 x 162 cycles from acceptance; 'good'
// falls after the 11th rising edge of the bit clock. The keyboard sense
// path of the original (boardgood) was tied off there and is not built.
// The assertions at the end use 'disable iff (reset)', which lint reports
// as reset being used both synchronously and asynchronously; the flops all
// use it asynchronously.
module joykey_main #(
  parameter logic [7:0]  CNT_FIRST    = 8'h30,
  parameter logic [7:0]  CNT_LAST     = 8'hD1,
  parameter int unsigned DELAY_STAGES = 5,
  parameter int unsigned STOP_TICKS   = 15
) (
  input  logic       clk,
  input  logic       reset,
  input  logic       enable,
  input  logic [7:0] picin,
  output logic       good,
  input  logic       ps2_clk_i,
  input  logic       ps2_data_i,
  output logic       ps2_clk_o,
  output logic       ps2_data_o,
  output logic       ps2_oe,
  output logic       line_busy
);
  import joykey_pkg::*;

  logic                    enable_s, enable_q, enable_rise;
  logic                    line_clk;
  logic                    load;
  logic [3:0]              count;
  logic [7:0]              holdy;
  logic                    sclk, sclk_rise, sclk_fall;
  logic [DELAY_STAGES-1:0] dly1, dly2;
  logic                    keyout;
  logic                    lower;
  logic                    compgood;
  logic [3:0]              stopcount;
  logic                    stop_done;
  logic                    data_unused;
  logic [DELAY_STAGES+2:0] tail;
  logic                    own_bus;

  // --- input synchronisers -------------------------------------------------
  sync2 #(.RESET_VAL(1'b0)) u_sync_en  (.clk, .reset, .d(enable),    .q(enable_s));
  sync2 #(.RESET_VAL(1'b1)) u_sync_clk (.clk, .reset, .d(ps2_clk_i), .q(line_clk));

  always_ff @(posedge clk or posedge reset)
    if (reset) enable_q <= 1'b0;
    else       enable_q <= enable_s;

  assign enable_rise = enable_s & ~enable_q;

  // The data pin is read only by a keyboard-sense path that the design
  // leaves out; it is kept as a port so the pad ring matches the board.
  assign data_unused = ps2_data_i;

  // --- send path -----------------------------------------------------------
  gooder #(.LAST_BIT(FRAME_LAST)) u_gooder (
    .clk, .reset, .enable_rise, .count, .compgood, .good, .load
  );

  holder #(.WIDTH(8)) u_holder (.clk, .reset, .load, .picin, .holdy);

  clocker #(.CNT_FIRST(CNT_FIRST), .CNT_LAST(CNT_LAST)) u_clocker (
    .clk, .reset, .good, .load, .sclk, .sclk_rise, .sclk_fall
  );

  delay #(.STAGES(DELAY_STAGES)) u_delay_line (.clk, .reset, .din(sclk),                   .taps(dly1));
  delay #(.STAGES(DELAY_STAGES)) u_delay_fb   (.clk, .reset, .din(dly1[DELAY_STAGES-1]),   .taps(dly2));

  counter4 u_counter4 (.clk, .reset, .clear(load), .advance(sclk_rise & good), .count);

  packeter u_packeter (.clk, .reset, .good, .shift(sclk_fall), .count, .holdy, .keyout);

  // --- line watch ----------------------------------------------------------
  feedback u_feedback (.clk, .reset, .good, .dclk(dly2[DELAY_STAGES-1]), .line_clk, .lower);

  // The clock line lags 'good' by the delay chain, the pad register and the
  // synchroniser; for that long after a frame the low line seen is the
  // sender's own clock, so compin treats it as still sending.
  always_ff @(posedge clk or posedge reset)
    if (reset) tail <= '0;
    else       tail <= {tail[DELAY_STAGES+1:0], good};

  assign own_bus = good | (|tail);

  compin u_compin (.clk, .reset, .good(own_bus), .line_clk, .lower, .done(stop_done), .compgood);

  stopclock #(.STOP_TICKS(STOP_TICKS), .CNT_FIRST(CNT_FIRST), .CNT_LAST(CNT_LAST)) u_stopclock (
    .clk, .reset, .compgood, .stopcount, .done(stop_done)
  );

  // --- pads ------------------------------------------------------------------
  always_ff @(posedge clk or posedge reset)
    if (reset) begin
      ps2_data_o <= 1'b1;
      ps2_clk_o  <= 1'b1;
    end else begin
      ps2_data_o <= keyout;
      ps2_clk_o  <= dly1[DELAY_STAGES-1];
    end

  assign ps2_oe    = good;
  assign line_busy = compgood;

  // The driven lines never start a frame low: the first cycle of 'good'
  // shows the idle level on both.
  a_idle_at_start : assert property (@(posedge clk) disable iff (reset)
    $rose(good) |-> (ps2_clk_o && ps2_data_o));
  // A frame is never started while the lines are busy.
  a_no_start_busy : assert property (@(posedge clk) disable iff (reset)
    load |-> !compgood);
endmodule
