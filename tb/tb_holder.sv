`timescale 1ns/1ps
// tb_holder: checks reset value, capture on 'load' and holding otherwise.
module tb_holder;
  logic clk = 0, reset = 1, load = 0;
  logic [7:0] picin = 0, holdy, model;
  int checks = 0, failures = 0;

  holder dut (.clk, .reset, .load, .picin, .holdy);
  always #5 clk = ~clk;

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    @(posedge clk); #1; checks++; if (holdy !== 8'hFF) failures++;
    repeat (2) @(posedge clk); #1 reset = 0; model = 8'hFF;
    for (int i = 0; i < 300; i++) begin
      picin = 8'($urandom);
      load  = ($urandom_range(0, 4) == 0);
      @(posedge clk); #1;
      if (load) model = picin;
      checks++;
      if (holdy !== model) begin failures++; $display("i=%0d holdy=%h exp=%h", i, holdy, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
