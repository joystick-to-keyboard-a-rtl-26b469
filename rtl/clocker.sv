// clocker: generates the ~80 us PS/2 bit clock while a frame is being sent.
//
// A counter880 divider is restarted when a frame is accepted ('load'), so
// the slow clock sclk starts high and falls after the 80 high counts, then
// rises after 82 low counts: period CNT_LAST-CNT_FIRST+1 = 162 cycles. When
// no frame is in progress ('good' low) sclk is held high, its idle level.
// As in the original design sclk is the inverse of the divider's top bit;
// unlike it, the rest of the sender stays on the system clock and uses the
// one-cycle pulses sclk_rise / sclk_fall as clock enables instead of
// clocking flip-flops with sclk.
//
// Timing: sclk, sclk_rise and sclk_fall are registered; a pulse is high in
// the first cycle sclk shows its new level.
module clocker #(
  parameter logic [7:0] CNT_FIRST = 8'h30,
  parameter logic [7:0] CNT_LAST  = 8'hD1
) (
  input  logic clk,
  input  logic reset,
  input  logic good,
  input  logic load,
  output logic sclk,
  output logic sclk_rise,
  output logic sclk_fall
);
  logic [7:0] cnt;
  logic       wrap_unused;
  logic       sclk_next;

  counter880 #(.FIRST(CNT_FIRST), .LAST(CNT_LAST)) u_div (
    .clk, .reset, .restart(load), .cntr(cnt), .wrap(wrap_unused)
  );

  assign sclk_next = (good && !load) ? ~cnt[7] : 1'b1;

  always_ff @(posedge clk or posedge reset)
    if (reset) begin
      sclk      <= 1'b1;
      sclk_rise <= 1'b0;
      sclk_fall <= 1'b0;
    end else begin
      sclk      <= sclk_next;
      sclk_rise <= sclk_next & ~sclk;
      sclk_fall <= ~sclk_next & sclk;
    end
endmodule
