`timescale 1ns/1ps
// tb_counter4: checks the frame bit counter: clear, advance, saturation at 15.
module tb_counter4;
  logic clk = 0, reset = 1, clear = 0, advance = 0;
  logic [3:0] count;
  int checks = 0, failures = 0, model = 0;

  counter4 dut (.clk, .reset, .clear, .advance, .count);
  always #5 clk = ~clk;

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(posedge clk); #1 reset = 0;
    for (int i = 0; i < 400; i++) begin
      clear   = ($urandom_range(0, 39) == 0);
      advance = ($urandom_range(0, 2) == 0);
      @(posedge clk); #1;
      if (clear) model = 0; else if (advance && model != 15) model++;
      checks++;
      if (count !== 4'(model)) begin failures++; $display("i=%0d count=%0d exp=%0d", i, count, model); end
    end
    // run to saturation explicitly
    clear = 1; @(posedge clk); #1 clear = 0; advance = 1;
    repeat (20) @(posedge clk); #1;
    checks++; if (count !== 4'hF) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
