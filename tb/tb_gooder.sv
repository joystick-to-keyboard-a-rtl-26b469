`timescale 1ns/1ps
// tb_gooder: checks frame start and end against a reference model.
//
// Random strobes, counts and busy flags; the model starts a frame only on a
// strobe with no frame running and the lines free, and ends it when the
// count passes 10 or the lines become busy. Directed cases cover each rule.
module tb_gooder;
  logic clk = 0, reset = 1, enable_rise = 0, compgood = 0;
  logic [3:0] count = 0;
  logic good, load, m_good, m_load;
  int checks = 0, failures = 0, starts = 0, ignored_busy = 0, ignored_run = 0, aborts = 0;

  gooder dut (.clk, .reset, .enable_rise, .count, .compgood, .good, .load);
  always #5 clk = ~clk;

  initial begin
    #400000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    m_good = 0;
    repeat (2) @(posedge clk); #1 reset = 0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      enable_rise = ($urandom_range(0, 9) == 0);
      compgood    = ($urandom_range(0, 19) == 0);
      count       = 4'($urandom_range(0, 12));
      #1;
      m_load = enable_rise && !m_good && !compgood;
      checks++;
      if (load !== m_load || good !== m_good) begin
        failures++; $display("i=%0d load=%b/%b good=%b/%b", i, load, m_load, good, m_good);
      end
      if (m_load) starts++;
      if (enable_rise && compgood && !m_good) ignored_busy++;
      if (enable_rise && m_good) ignored_run++;
      if (m_good && compgood && !m_load) aborts++;
      @(posedge clk); #1;
      if (m_load) m_good = 1;
      else if (count > 10 || compgood) m_good = 0;
    end
    checks++;
    if (starts == 0 || ignored_busy == 0 || ignored_run == 0 || aborts == 0) failures++;
    $display("starts=%0d ignored_busy=%0d ignored_running=%0d aborts=%0d", starts, ignored_busy, ignored_run, aborts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
