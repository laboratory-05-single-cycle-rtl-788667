// mpg -- mono pulse generator for the board push buttons.
//
// Turns each press of a mechanical push button into an enable pulse exactly
// one clock cycle long, so that a press advances a register by one step no
// matter how long the button is held. A free-running CNT_W-bit counter
// makes a sampling tick once every 2^CNT_W cycles; the buttons are sampled
// only on that tick, which filters contact bounce shorter than the tick
// period. Two further registers clocked every cycle delay the sample, and
// `en` is 1 in the single cycle where the delayed sample has just gone from
// 0 to 1.
//
// Interface: `btn` are the raw button levels (1 = pressed), `en` the
// one-cycle enables, one per button. Timing: a press is seen at the first
// tick while the button is held and `en` pulses two cycles after that tick;
// a press must last longer than one tick period to be seen for sure.
//
// The source description only names this block and says that a button press
// yields one enable; the sampling tick and edge detector, and the counter width
// (16 bits, about 1.3 ms at a 50 MHz clock), are this design's choice. The
// registers have no reset: in the first two cycles after power-up a stray
// pulse is possible.
module mpg #(
  parameter int unsigned N     = 2,   // number of buttons
  parameter int unsigned CNT_W = 16   // sampling period is 2^CNT_W cycles
) (
  input  logic         clk,
  input  logic [N-1:0] btn,
  output logic [N-1:0] en
);

  logic [CNT_W-1:0] cnt;
  logic [N-1:0]     sample, q2, q3;

  always_ff @(posedge clk) begin
    cnt <= cnt + 1'b1;
    if (&cnt) sample <= btn;
    q2 <= sample;
    q3 <= q2;
  end

  assign en = q2 & ~q3;

endmodule
