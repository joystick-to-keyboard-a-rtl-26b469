`timescale 1ns/1ps
// tb_joykey_main: end-to-end test of the PS/2 sender at its default sizes.
//
// The bench models the shared PS/2 bus as wired-AND open-collector lines
// with pull-ups: the FPGA (while ps2_oe), the host PC and a keyboard can
// each pull a line low. A host receiver samples the data line on every
// falling clock edge it did not cause itself, assembles 11-bit frames, and
// checks start, odd parity and stop; a partial frame is discarded after
// 300 us without a clock edge. A keyboard model clocks out its own frames
// on the same lines. The system clock is 2 MHz.
//
// Phases:
//  A  every code the byte source uses is sent; the host must receive the
//     scancode (the byte bit-reversed); clock period 162 cycles, frame
//     length ~11 periods, data settled >= 4 cycles before each clock fall.
//  B  host inhibits the idle bus: a strobe is dropped, line_busy rises and
//     falls again after the timeout, then a byte goes through.
//  C  host holds the clock low in the middle of a frame: the frame is
//     aborted (feedback), the host keeps no byte, the next byte goes through.
//  D  keyboard frame on the shared lines: the host receives it, the sender
//     stays off the bus and drops a strobe offered meanwhile.
//  E  a strobe during a running frame is ignored.
//  F  the microcontroller model runs two loops of its PWM key algorithm;
//     the host must receive the expected make/break sequence and the key
//     hold times must follow the axis magnitude.
// Each mechanism is counted; one that never happens counts as a failure.
module tb_joykey_main;
  import joykey_pkg::*;

  localparam int PERIOD = 162;             // bit-clock period in cycles
  localparam int MS     = 2000;            // cycles per millisecond

  logic clk = 0, reset = 1;
  always #250 clk = ~clk;                  // 2 MHz

  // byte source: direct drive or the microcontroller model
  logic       tb_en = 0, pic_run = 0;
  logic [7:0] tb_byte = 8'h00;
  logic       pic_en;
  logic [7:0] pic_byte;
  logic [7:0] y_res = 8'h80, x_res = 8'h80;
  logic [1:0] buttons = 2'b00;
  logic [15:0] loops_done;

  logic       enable;
  logic [7:0] picin;
  logic       good, ps2_clk_o, ps2_data_o, ps2_oe, line_busy;

  // open-collector bus
  logic host_clk_n = 1;                    // 0: host pulls the clock low
  logic kb_clk = 1, kb_data = 1;           // keyboard's drivers (1 = released)
  wire  clk_line  = (ps2_oe ? ps2_clk_o  : 1'b1) & host_clk_n & kb_clk;
  wire  data_line = (ps2_oe ? ps2_data_o : 1'b1) & kb_data;

  assign enable = pic_run ? pic_en   : tb_en;
  assign picin  = pic_run ? pic_byte : tb_byte;

  joykey_main dut (
    .clk, .reset, .enable, .picin, .good,
    .ps2_clk_i(clk_line), .ps2_data_i(data_line),
    .ps2_clk_o, .ps2_data_o, .ps2_oe, .line_busy
  );

  pic_model u_pic (
    .clk, .run(pic_run), .y_res, .x_res, .buttons,
    .enable(pic_en), .picin(pic_byte), .loops_done
  );

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  // ---------------------------------------------------------------- host
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic [7:0] rx_q[$];                     // scancodes received
  longint     rx_t[$];                     // cycle of each reception
  int  rx_bits = 0, rx_bad = 0, rx_partial = 0;
  logic [10:0] rx_sh;
  logic clk_line_q = 1, data_line_q = 1;
  longint last_edge = 0, last_data_change = 0, last_fall = -1;
  int  min_setup = 1000, period_bad = 0, periods = 0;

  always @(posedge clk) begin
    clk_line_q  <= clk_line;
    data_line_q <= data_line;
    if (data_line != data_line_q) last_data_change = cyc;
    if (!host_clk_n) begin
      if (rx_bits != 0) rx_partial++;
      rx_bits = 0;
    end else if (clk_line_q && !clk_line) begin
      // falling edge the host did not cause: sample data
      if (ps2_oe) begin
        if (cyc - last_data_change < min_setup) min_setup = int'(cyc - last_data_change);
        if (last_fall >= 0 && rx_bits != 0) begin
          periods++;
          if (cyc - last_fall != PERIOD) period_bad++;
        end
        last_fall = cyc;
      end
      rx_sh = {data_line, rx_sh[10:1]};
      rx_bits++;
      last_edge = cyc;
      if (rx_bits == 11) begin
        rx_bits = 0;
        last_fall = -1;
        if (rx_sh[0] == 1'b0 && rx_sh[10] == 1'b1 && (^rx_sh[9:1]) == 1'b1) begin
          rx_q.push_back(rx_sh[8:1]);
          rx_t.push_back(cyc);
        end else rx_bad++;
      end
    end else if (rx_bits != 0 && cyc - last_edge > 600) begin
      rx_partial++;
      rx_bits = 0;
      last_fall = -1;
    end
  end

  // ----------------------------------------------------- mechanism counters
  int n_frames = 0, n_abort = 0, n_busy_set = 0, n_timeout = 0, n_drop_busy = 0,
      n_ignore_run = 0, n_lower = 0;
  longint good_rise_t = 0;
  int frame_len_bad = 0;
  logic good_q = 0, busy_q = 0, en_q = 0;
  always @(posedge clk) if (!reset) begin
    good_q <= good; busy_q <= line_busy; en_q <= dut.enable_s;
    if (good && !good_q) good_rise_t = cyc;
    if (!good && good_q) begin
      if (dut.count > FRAME_LAST) begin
        n_frames++;
        if ((cyc - good_rise_t) < 11 * PERIOD || (cyc - good_rise_t) > 11 * PERIOD + 10) frame_len_bad++;
      end else n_abort++;
    end
    if (line_busy && !busy_q) n_busy_set++;
    if (!line_busy && busy_q) n_timeout++;
    if (dut.lower) begin n_lower++; $display("suppressed clock seen at cycle %0d", cyc); end
    if (dut.enable_rise && dut.compgood) n_drop_busy++;
    if (dut.enable_rise && dut.good) n_ignore_run++;
  end

  // ------------------------------------------------------------ stimulus
  task automatic strobe(input logic [7:0] b);
    @(negedge clk); tb_byte = b;
    repeat (16) @(negedge clk);
    tb_en = 1;
    repeat (4) @(negedge clk);
    tb_en = 0;
  endtask

  task automatic wait_idle();
    int guard = 0;
    do begin @(posedge clk); guard++; end while ((good || line_busy) && guard < 20 * MS);
    repeat (20) @(posedge clk);
  endtask

  task automatic kb_send(input logic [7:0] code);
    logic [10:0] fr;
    fr = {1'b1, ~^code, code, 1'b0};
    for (int i = 0; i < 11; i++) begin
      kb_data = fr[i];
      repeat (40) @(negedge clk);          // 20 us setup, clock high
      kb_clk = 0;
      repeat (80) @(negedge clk);          // 40 us low
      kb_clk = 1;
      repeat (40) @(negedge clk);
    end
    kb_data = 1;
  endtask

  // expected host sequence for the microcontroller phase
  logic [7:0] exp_q[$];
  task automatic exp_axis(input logic [7:0] res, input logic [7:0] hi, input logic [7:0] lo);
    logic [7:0] key, v;
    int n;
    key = bitrev8(res[7] ? hi : lo);
    v = res[7] ? res : ~res;
    n = v[6:4];
    if (n != 0) begin
      repeat (n) exp_q.push_back(key);
      exp_q.push_back(8'hF0);
      exp_q.push_back(key);
    end
  endtask

  initial begin
    #(2000ms);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0] codes [7];
  int base, n_kb;
  longint t_make, t_break;

  initial begin
    codes = '{KEY_UP, KEY_DOWN, KEY_LEFT, KEY_RIGHT, KEY_A, KEY_B, KEY_STOP};
    repeat (5) @(posedge clk); #1 reset = 0;
    repeat (50) @(posedge clk);

    // ---- A: every code, then random bytes
    for (int i = 0; i < 7 + 5; i++) begin
      logic [7:0] b;
      b = (i < 7) ? codes[i] : 8'($urandom);
      base = rx_q.size();
      strobe(b);
      wait_idle();
      repeat (200) @(posedge clk);
      check(rx_q.size() == base + 1, $sformatf("phase A: one byte received (%0d) bad=%0d partial=%0d", rx_q.size() - base, rx_bad, rx_partial));
      if (rx_q.size() == base + 1)
        check(rx_q[base] == bitrev8(b), $sformatf("phase A: got %h expected %h", rx_q[base], bitrev8(b)));
    end
    check(rx_q[0] == 8'h75 && rx_q[6] == 8'hF0, "phase A: keypad 8 and break prefix scancodes");
    check(min_setup >= 4, $sformatf("data settles %0d cycles before clock falls", min_setup));
    check(periods > 50 && period_bad == 0, $sformatf("clock period: %0d of %0d wrong", period_bad, periods));
    check(frame_len_bad == 0, "frame length about 11 bit periods");

    // ---- B: host inhibits the idle bus
    base = rx_q.size();
    @(negedge clk); host_clk_n = 0;
    repeat (100) @(posedge clk);
    check(line_busy, "phase B: line_busy while host inhibits");
    strobe(KEY_A);                         // dropped
    repeat (200) @(posedge clk);
    check(!good && !ps2_oe, "phase B: sender stays off the bus");
    host_clk_n = 1;
    wait_idle();
    check(rx_q.size() == base, "phase B: dropped byte not received");
    strobe(KEY_B);
    wait_idle(); repeat (200) @(posedge clk);
    check(rx_q.size() == base + 1 && rx_q[$] == bitrev8(KEY_B), "phase B: next byte received");

    // ---- C: host suppresses the clock mid-frame
    base = rx_q.size();
    strobe(8'hA5);
    wait (dut.count == 4'd4);
    repeat (100) @(posedge clk);           // inside the low half of bit 4
    @(negedge clk); host_clk_n = 0;
    repeat (300) @(posedge clk);           // 150 us
    @(negedge clk); host_clk_n = 1;
    check(!good, "phase C: frame aborted");
    wait_idle(); repeat (200) @(posedge clk);
    check(rx_q.size() == base, "phase C: no byte from the aborted frame");
    strobe(KEY_UP);
    wait_idle(); repeat (200) @(posedge clk);
    check(rx_q.size() == base + 1 && rx_q[$] == 8'h75, "phase C: next byte received");

    // ---- D: keyboard frame on the shared lines
    base = rx_q.size();
    fork
      kb_send(8'h1C);
      begin
        repeat (300) @(posedge clk);
        check(line_busy, "phase D: keyboard activity seen");
        strobe(KEY_DOWN);                  // dropped: bus in use
      end
    join
    wait_idle(); repeat (200) @(posedge clk);
    n_kb = rx_q.size() - base;
    check(n_kb == 1 && rx_q[$] == 8'h1C, "phase D: host got the keyboard byte only");

    // ---- E: strobe during a running frame
    base = rx_q.size();
    strobe(KEY_LEFT);
    repeat (500) @(posedge clk);
    strobe(KEY_RIGHT);                     // ignored
    wait_idle(); repeat (200) @(posedge clk);
    check(rx_q.size() == base + 1 && rx_q[$] == 8'h6B, "phase E: only the first byte sent");

    // ---- F: microcontroller PWM loops
    base = rx_q.size();
    y_res = 8'hFF;  x_res = 8'h20;  buttons = 2'b01;   // up N=7, right N=5, z held
    exp_axis(y_res, KEY_UP, KEY_DOWN);
    exp_q.push_back(8'h1A);
    exp_axis(x_res, KEY_LEFT, KEY_RIGHT);
    exp_q.push_back(8'h1A);
    // second loop: centred stick (N=0 both), z released
    exp_q.push_back(8'hF0); exp_q.push_back(8'h1A);
    pic_run = 1;
    wait (loops_done == 1);
    y_res = 8'h80; x_res = 8'h7F; buttons = 2'b00;
    wait (loops_done == 2);
    pic_run = 0;
    repeat (4 * MS) @(posedge clk);
    check(rx_q.size() - base == exp_q.size(),
          $sformatf("phase F: %0d bytes, expected %0d", rx_q.size() - base, exp_q.size()));
    for (int i = 0; i < exp_q.size() && base + i < rx_q.size(); i++)
      check(rx_q[base + i] == exp_q[i], $sformatf("phase F byte %0d: %h expected %h", i, rx_q[base + i], exp_q[i]));
    // key hold: from first make to the break prefix, N slots of 16 ms + 2 ms send
    if (rx_q.size() - base == exp_q.size()) begin
      t_make = rx_t[base]; t_break = rx_t[base + 7];
      check((t_break - t_make) / MS >= 7 * 18 - 1 && (t_break - t_make) / MS <= 7 * 18 + 1,
            $sformatf("up key held %0d ms", (t_break - t_make) / MS));
      t_make = rx_t[base + 10]; t_break = rx_t[base + 15];
      check((t_break - t_make) / MS >= 5 * 18 - 1 && (t_break - t_make) / MS <= 5 * 18 + 1,
            $sformatf("right key held %0d ms", (t_break - t_make) / MS));
    end

    // ---- mechanism coverage
    $display("frames=%0d aborts=%0d feedback_lower=%0d busy_set=%0d timeouts=%0d dropped_busy=%0d ignored_running=%0d host_partial=%0d host_bad=%0d",
             n_frames, n_abort, n_lower, n_busy_set, n_timeout, n_drop_busy, n_ignore_run, rx_partial, rx_bad);
    check(n_frames > 0, "frames sent");
    check(n_abort > 0 && n_lower > 0, "suppressed-clock abort happened");
    check(n_busy_set > 0 && n_timeout > 0, "busy flag and timeout happened");
    check(n_drop_busy >= 2, "strobe dropped while busy");
    check(n_ignore_run > 0, "strobe ignored while sending");
    check(rx_bad == 0, "no frame with bad start/parity/stop at the host");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
