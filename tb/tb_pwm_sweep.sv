`timescale 1ns/1ps
// tb_pwm_sweep: the joystick workload, every stick magnitude in every
// direction, through the microcontroller model and the sender.
//
// Sixteen loops of the key algorithm run back to back: loops 0..7 push the
// stick up with magnitude k and right with 7-k, loops 8..15 down with k and
// left with 7-k, while the two buttons follow the loop number's low bits.
// The bench works out the scancode sequence each loop must produce (make
// code N times, break prefix and code; button make, or break on release)
// on its own, and compares it with what a PS/2 host model receives on the
// open-collector lines. For every axis with N > 0 it also checks the key
// hold time: N slots of 16 ms plus a 2 ms send each.
module tb_pwm_sweep;
  import joykey_pkg::*;

  localparam int MS = 2000;                // cycles per ms at 2 MHz

  logic clk = 0, reset = 1;
  always #250 clk = ~clk;

  logic        pic_run = 0;
  logic [7:0]  y_res = 8'h80, x_res = 8'h80;
  logic [1:0]  buttons = 2'b00;
  logic        enable;
  logic [7:0]  picin;
  logic [15:0] loops_done;
  logic        good, ps2_clk_o, ps2_data_o, ps2_oe, line_busy;

  wire clk_line  = ps2_oe ? ps2_clk_o  : 1'b1;
  wire data_line = ps2_oe ? ps2_data_o : 1'b1;

  joykey_main dut (
    .clk, .reset, .enable, .picin, .good,
    .ps2_clk_i(clk_line), .ps2_data_i(data_line),
    .ps2_clk_o, .ps2_data_o, .ps2_oe, .line_busy
  );

  pic_model u_pic (
    .clk, .run(pic_run), .y_res, .x_res, .buttons,
    .enable, .picin, .loops_done
  );

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  // host receiver
  longint cyc = 0;
  logic [7:0] rx_q[$];
  longint     rx_t[$];
  logic [10:0] sh;
  int bits = 0, bad = 0;
  logic cq = 1;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    cq  <= clk_line;
    if (reset) bits = 0;
    else if (cq && !clk_line) begin
      sh = {data_line, sh[10:1]};
      bits++;
      if (bits == 11) begin
        bits = 0;
        if (!sh[0] && sh[10] && ^sh[9:1]) begin rx_q.push_back(sh[8:1]); rx_t.push_back(cyc); end
        else bad++;
      end
    end
  end

  // expected sequence, built from the algorithm description
  typedef struct { logic [7:0] code; int hold_n; } exp_t;  // hold_n > 0 marks the first make of an axis
  exp_t exp_q[$];
  logic [1:0] st = 2'b00;

  task automatic exp_axis(input logic [7:0] res, input logic [7:0] sc_hi, input logic [7:0] sc_lo);
    logic [7:0] v, sc;
    int n;
    sc = res[7] ? sc_hi : sc_lo;
    v  = res[7] ? res : ~res;
    n  = v[6:4];
    for (int i = 0; i < n; i++) exp_q.push_back('{sc, (i == 0) ? n : 0});
    if (n != 0) begin exp_q.push_back('{8'hF0, 0}); exp_q.push_back('{sc, 0}); end
  endtask

  task automatic exp_buttons(input logic [1:0] b);
    logic [7:0] sc [2];
    sc[0] = 8'h1A; sc[1] = 8'h22;
    for (int i = 0; i < 2; i++)
      if (b[i]) begin exp_q.push_back('{sc[i], 0}); st[i] = 1; end
      else if (st[i]) begin exp_q.push_back('{8'hF0, 0}); exp_q.push_back('{sc[i], 0}); st[i] = 0; end
  endtask

  function automatic logic [7:0] stick(input bit positive, input int n);
    // a reading whose bit 7 is 'positive' and whose magnitude bits 6..4 are n
    logic [7:0] v;
    v = {1'b1, 3'(n), 4'h9};
    return positive ? v : ~v;
  endfunction

  initial begin
    #(6000ms);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_axes_held = 0;
  initial begin
    logic [7:0] ys [16], xs [16];
    logic [1:0] bs [16];
    for (int k = 0; k < 16; k++) begin
      ys[k] = stick(k < 8, k % 8);            // up, then down
      xs[k] = stick(k >= 8, 7 - k % 8);       // right, then left
      bs[k] = 2'(k);
      exp_axis(ys[k], 8'h75, 8'h72);
      exp_buttons(bs[k]);
      exp_axis(xs[k], 8'h6B, 8'h74);
      exp_buttons(bs[k]);
    end
    repeat (5) @(posedge clk); #1 reset = 0;
    repeat (50) @(posedge clk);
    y_res = ys[0]; x_res = xs[0]; buttons = bs[0];
    pic_run = 1;
    for (int k = 1; k <= 16; k++) begin
      wait (loops_done == 16'(k));
      if (k < 16) begin y_res = ys[k]; x_res = xs[k]; buttons = bs[k]; end
    end
    pic_run = 0;
    repeat (4 * MS) @(posedge clk);

    check(bad == 0, "no malformed frame");
    check(rx_q.size() == exp_q.size(), $sformatf("%0d bytes received, %0d expected", rx_q.size(), exp_q.size()));
    for (int i = 0; i < exp_q.size() && i < rx_q.size(); i++) begin
      check(rx_q[i] == exp_q[i].code, $sformatf("byte %0d: %h expected %h", i, rx_q[i], exp_q[i].code));
      if (exp_q[i].hold_n > 0 && i + exp_q[i].hold_n < rx_q.size()) begin
        longint held;
        held = (rx_t[i + exp_q[i].hold_n] - rx_t[i]) / MS;   // first make to break prefix
        check(held >= 18 * exp_q[i].hold_n - 1 && held <= 18 * exp_q[i].hold_n + 1,
              $sformatf("key %h held %0d ms for N=%0d", exp_q[i].code, held, exp_q[i].hold_n));
        n_axes_held++;
      end
    end
    check(n_axes_held == 28, $sformatf("%0d axis presses timed", n_axes_held));
    $display("bytes=%0d axis_presses=%0d", rx_q.size(), n_axes_held);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
