// updown_counter: the up/down counter that turns the phase detector's
// decisions into the integer control word N of the oscillator.
//
// On each rising edge of clk (the reference clock) the count rises by one
// when up is high and falls by one when dn is high; it saturates at 0 and
// at 2**W-1 instead of wrapping, so that a run of decisions in one direction
// can never flip the oscillator from its slowest to its fastest setting.
// Integrating the bang-bang decisions makes this counter the loop's digital
// filter.
//
// The counter, its up/down inputs and its clock input follow the design's
// schematics. The width, the saturation, the reset value and the
// asynchronous active-low reset are this implementation's choices.
module updown_counter
  import adpll_pkg::*;
#(
  parameter int unsigned W = CNT_W,
  parameter logic [W-1:0] RESET_VALUE = '0
) (
  input  logic         clk,    // reference clock, rising edge
  input  logic         rst_n,  // asynchronous reset, active low
  input  logic         up,     // count up (shift_left)
  input  logic         dn,     // count down (shift_right)
  output logic [W-1:0] n,      // integer control word N
  output logic         at_max, // N is at its largest value
  output logic         at_min  // N is zero
);
  timeunit 1ps;
  timeprecision 1ps;

  assign at_max = (n == {W{1'b1}});
  assign at_min = (n == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                 n <= RESET_VALUE;
    else if (up && !dn && !at_max) n <= n + 1'b1;
    else if (dn && !up && !at_min) n <= n - 1'b1;
  end
endmodule
