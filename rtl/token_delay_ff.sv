// token_delay_ff -- board-level flip-flop placed in the token path between
// two Switcher ASICs.
//
// A Switcher chip hands its token out of its end channels on the RISING clock
// edge, half a clock ahead of the next falling edge. Wired straight into the
// next chip, the next chip's first row would pulse in the same clock as the
// current chip's last row. This flip-flop re-times the token on the falling
// edge, adding one clock, so that the row sequence continues without overlap
// across the chip boundary. One is used per direction per chip boundary.
// The falling-edge clocking and the asynchronous active-low reset are this
// design's choices; the source asks only for a one-clock delay.
`timescale 1ns/1ps
module token_delay_ff (
  input  logic clk,
  input  logic rst_n,
  input  logic d,      // token from the driving chip's end pin
  output logic q       // token to the receiving chip, one clock later
);

  always_ff @(negedge clk or negedge rst_n) begin
    if (!rst_n) q <= 1'b0;
    else        q <= d;
  end

endmodule
