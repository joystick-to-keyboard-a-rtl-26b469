`timescale 1ns/1ps
// tb_compin: checks the line-busy flag against a reference model.
//
// Random clock-line level, 'good', 'lower' and 'done'; the model sets the
// flag on a low idle line or on 'lower' and clears it on 'done' unless the
// idle line is low in that cycle.
module tb_compin;
  logic clk = 0, reset = 1, good = 0, line_clk = 1, lower = 0, done = 0;
  logic compgood, m = 0;
  int checks = 0, failures = 0, sets = 0, clears = 0;

  compin dut (.clk, .reset, .good, .line_clk, .lower, .done, .compgood);
  always #5 clk = ~clk;

  initial begin
    #400000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(posedge clk); #1 reset = 0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      good     = ($urandom_range(0, 3) == 0);
      line_clk = ($urandom_range(0, 5) != 0);
      lower    = ($urandom_range(0, 15) == 0);
      done     = ($urandom_range(0, 7) == 0);
      @(posedge clk); #1;
      if (!line_clk && !good) begin if (!m) sets++; m = 1; end
      else if (done) begin if (m) clears++; m = 0; end
      else if (lower) begin if (!m) sets++; m = 1; end
      checks++;
      if (compgood !== m) begin failures++; $display("i=%0d compgood=%b exp=%b", i, compgood, m); end
    end
    checks++; if (sets == 0 || clears == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
