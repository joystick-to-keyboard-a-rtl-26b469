`timescale 1ns/1ps
// tb_feedback: checks detection of a clock line held low by the host.
//
// A clock-like dclk is driven while the line is either released (following
// dclk) or held low for some periods; 'lower' must pulse exactly one cycle
// after a rising edge of dclk that finds the line low while 'good' is high,
// and never otherwise.
module tb_feedback;
  logic clk = 0, reset = 1, good = 0, dclk = 1, line_clk = 1, lower;
  logic dq = 1, exp_lower = 0;
  int checks = 0, failures = 0, pulses = 0;

  feedback dut (.clk, .reset, .good, .dclk, .line_clk, .lower);
  always #5 clk = ~clk;

  initial begin
    #400000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(posedge clk); #1 reset = 0;
    for (int t = 0; t < 4000; t++) begin
      @(negedge clk);
      dclk = ((t / 7) % 2 == 0);
      if (t % 300 == 0) good = ($urandom_range(0, 3) != 0);
      // the host holds the line low in some windows, otherwise it follows dclk
      line_clk = ((t / 50) % 5 == 3) ? 1'b0 : dclk;
      @(posedge clk); #1;
      exp_lower = good && dclk && !dq && !line_clk;
      dq = dclk;
      checks++;
      if (lower !== exp_lower) begin failures++; $display("t=%0d lower=%b exp=%b", t, lower, exp_lower); end
      if (exp_lower) pulses++;
    end
    checks++; if (pulses == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
