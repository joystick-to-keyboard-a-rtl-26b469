`timescale 1ns/1ps
// tb_packeter: checks the bit chosen for every count of the frame.
//
// For random bytes it steps the count 0..11 with a 'shift' pulse each and
// compares keyout with the PS/2 bit worked out here: start 0, byte MSB
// first, odd parity from a population count, stop 1. Also checks that keyout
// holds between shifts and is 1 while 'good' is low.
module tb_packeter;
  logic clk = 0, reset = 1, good = 0, shift = 0;
  logic [3:0] count = 0;
  logic [7:0] holdy = 0;
  logic keyout, exp_bit;
  int checks = 0, failures = 0;

  packeter dut (.clk, .reset, .good, .shift, .count, .holdy, .keyout);
  always #5 clk = ~clk;

  initial begin
    #400000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(posedge clk); #1 reset = 0;
    checks++; if (keyout !== 1'b1) failures++;
    for (int f = 0; f < 60; f++) begin
      holdy = (f == 0) ? 8'h00 : (f == 1) ? 8'hFF : 8'($urandom);
      good = 1;
      for (int c = 0; c <= 11; c++) begin
        count = 4'(c);
        @(negedge clk); shift = 1; @(negedge clk); shift = 0;
        if (c == 0) exp_bit = 1'b0;
        else if (c <= 8) exp_bit = holdy[8 - c];
        else if (c == 9) exp_bit = ($countones(holdy) % 2 == 0);
        else exp_bit = 1'b1;
        checks++;
        if (keyout !== exp_bit) begin failures++; $display("byte %h count %0d: %b exp %b", holdy, c, keyout, exp_bit); end
        // no shift: hold even if the count moves
        count = 4'(c + 1);
        @(negedge clk);
        checks++; if (keyout !== exp_bit) failures++;
      end
      good = 0; @(negedge clk);
      checks++; if (keyout !== 1'b1) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
