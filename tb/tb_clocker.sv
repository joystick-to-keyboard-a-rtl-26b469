`timescale 1ns/1ps
// tb_clocker: checks the ~80 us bit clock.
//
// After a frame start ('load') the clock must stay high for 80 cycles, then
// alternate 82 low / 80 high (period 162 cycles, 81 us at 2 MHz), with the
// edge pulses marking exactly the cycles where it changed, and return high
// at once when 'good' falls. The expected level is computed from the cycle
// count since 'load', not from the divider.
module tb_clocker;
  logic clk = 0, reset = 1, good = 0, load = 0;
  logic sclk, sclk_rise, sclk_fall, prev;
  int checks = 0, failures = 0, n, falls = 0, rises = 0, last_fall = -1;

  clocker dut (.clk, .reset, .good, .load, .sclk, .sclk_rise, .sclk_fall);
  always #5 clk = ~clk;

  initial begin
    #400000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic frame(input int cycles);
    @(negedge clk); load = 1; good = 0;
    @(negedge clk); load = 0; good = 1;
    prev = sclk;
    checks++; if (sclk !== 1'b1) failures++;
    for (n = 1; n <= cycles; n++) begin
      @(negedge clk);
      // n edges after the load edge
      checks++;
      if (sclk !== (((n - 1) % 162) < 80)) begin
        failures++; $display("n=%0d sclk=%b", n, sclk);
      end
      checks++;
      if (sclk_rise !== (sclk & ~prev) || sclk_fall !== (~sclk & prev)) begin
        failures++; $display("n=%0d edge pulses wrong", n);
      end
      if (sclk_fall) begin
        if (last_fall >= 0) begin checks++; if (n - last_fall != 162) failures++; end
        last_fall = n; falls++;
      end
      if (sclk_rise) rises++;
      prev = sclk;
    end
    good = 0;
    @(negedge clk); @(negedge clk);
    checks++; if (sclk !== 1'b1) failures++;
    last_fall = -1;
  endtask

  initial begin
    repeat (3) @(posedge clk); #1 reset = 0;
    frame(11 * 162 + 5);
    repeat (37) @(negedge clk);   // idle: stays high
    checks++; if (sclk !== 1'b1) failures++;
    frame(500);                    // ends in a low phase
    checks++; if (falls < 13 || rises < 12) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
