`timescale 1ns/1ps
// tb_counter880: checks the 162-state divider against a reference count.
//
// Runs the counter over several periods, with a restart in the middle, and
// compares every cycle with an independently kept model: count FIRST..LAST,
// 'wrap' exactly at LAST, period LAST-FIRST+1 = 162 cycles.
module tb_counter880;
  logic clk = 0, reset = 1, restart = 0;
  logic [7:0] cntr;
  logic wrap;
  int checks = 0, failures = 0;
  int model, wraps, last_wrap, cyc;

  counter880 dut (.clk, .reset, .restart, .cntr, .wrap);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 reset = 0;
    model = 'h30; wraps = 0; last_wrap = -1;
    for (cyc = 0; cyc < 1000; cyc++) begin
      @(negedge clk);
      checks++;
      if (cntr !== 8'(model) || wrap !== (model == 'hD1)) begin
        failures++;
        $display("cycle %0d: cntr=%h wrap=%b expected %h", cyc, cntr, wrap, model);
      end
      if (wrap) begin
        if (last_wrap >= 0) begin
          checks++;
          if (cyc - last_wrap != 162) begin failures++; $display("period %0d", cyc - last_wrap); end
        end
        last_wrap = cyc; wraps++;
      end
      restart = (cyc == 700);
      if (restart) last_wrap = -1;
      @(posedge clk); #1;
      model = (restart || model == 'hD1) ? 'h30 : model + 1;
    end
    checks++;
    if (wraps < 5) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
