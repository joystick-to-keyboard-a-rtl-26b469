`timescale 1ns/1ps
// tb_delay: checks that each tap is the input delayed by its index+1 cycles.
module tb_delay;
  localparam int N = 5;
  logic clk = 0, reset = 1, din = 1;
  logic [N-1:0] taps;
  logic hist [0:63];
  int checks = 0, failures = 0;

  delay dut (.clk, .reset, .din, .taps);
  always #5 clk = ~clk;

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    @(posedge clk); #1; checks++; if (taps !== '1) failures++;
    for (int i = 0; i < 64; i++) hist[i] = 1'b1;
    repeat (2) @(posedge clk); #1 reset = 0;
    for (int t = 0; t < 400; t++) begin
      din = 1'($urandom);
      hist[t % 64] = din;
      @(posedge clk); #1;
      for (int k = 0; k < N; k++) begin
        checks++;
        if (taps[k] !== hist[(t - k + 64) % 64]) begin
          failures++; $display("t=%0d tap%0d=%b exp %b", t, k, taps[k], hist[(t - k + 64) % 64]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
