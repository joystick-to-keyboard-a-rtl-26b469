// stopclock: timeout that ends the line-busy state.
//
// While compgood is high it counts periods of its own counter880 divider
// (162 cycles, ~81 us at 2 MHz); after STOP_TICKS periods (15, ~1.2 ms,
// longer than one PS/2 frame of 11 bits at the slowest clock) it pulses
// 'done' and starts counting again. While compgood is low the count and the
// divider are held at their start. The document has the timeout outlast a
// host or keyboard transmission; counting divider periods rather than
// system clocks is this design's reading of it.
//
// Timing: 'done' is combinational, high for one cycle, STOP_TICKS*162
// cycles after compgood rose.
module stopclock #(
  parameter int unsigned STOP_TICKS = 15,
  parameter logic [7:0]  CNT_FIRST  = 8'h30,
  parameter logic [7:0]  CNT_LAST   = 8'hD1
) (
  input  logic       clk,
  input  logic       reset,
  input  logic       compgood,
  output logic [3:0] stopcount,
  output logic       done
);
  logic [7:0] cnt_unused;
  logic       tick;

  counter880 #(.FIRST(CNT_FIRST), .LAST(CNT_LAST)) u_div (
    .clk, .reset, .restart(!compgood), .cntr(cnt_unused), .wrap(tick)
  );

  assign done = compgood && tick && (stopcount == 4'(STOP_TICKS - 1));

  always_ff @(posedge clk or posedge reset)
    if (reset)          stopcount <= 4'd0;
    else if (!compgood) stopcount <= 4'd0;
    else if (done)      stopcount <= 4'd0;
    else if (tick)      stopcount <= stopcount + 4'd1;

  initial assert (STOP_TICKS >= 1 && STOP_TICKS <= 16)
    else $error("stopclock: STOP_TICKS must be 1..16");
endmodule
