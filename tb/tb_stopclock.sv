`timescale 1ns/1ps
// tb_stopclock: checks the busy timeout.
//
// With compgood held high, 'done' must pulse every 15 x 162 = 2430 cycles,
// the first one 2430 cycles after compgood rose; dropping compgood restarts
// the count from zero.
module tb_stopclock;
  localparam int PERIOD = 15 * 162;
  logic clk = 0, reset = 1, compgood = 0;
  logic [3:0] stopcount;
  logic done;
  int checks = 0, failures = 0, n, dones;

  stopclock dut (.clk, .reset, .compgood, .stopcount, .done);
  always #5 clk = ~clk;

  initial begin
    #500000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // compgood high for 'len' cycles; done expected at multiples of PERIOD.
  task automatic busy(input int len);
    @(negedge clk); compgood = 1; dones = 0;
    for (n = 1; n <= len; n++) begin
      // n-th cycle with compgood high (checked before the edge)
      checks++;
      if (done !== (n % PERIOD == 0)) begin failures++; $display("n=%0d done=%b", n, done); end
      checks++;
      if (stopcount !== 4'(((n - 1) % PERIOD) / 162)) begin
        failures++; $display("n=%0d stopcount=%0d", n, stopcount);
      end
      if (done) dones++;
      @(negedge clk);
    end
    compgood = 0;
    @(negedge clk); @(negedge clk);
    checks++; if (stopcount !== 4'd0 || done !== 1'b0) failures++;
  endtask

  initial begin
    repeat (2) @(posedge clk); #1 reset = 0;
    busy(1000);             // too short: no done
    checks++; if (dones != 0) failures++;
    busy(2 * PERIOD + 100); // two timeouts
    checks++; if (dones != 2) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
