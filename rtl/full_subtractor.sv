// full_subtractor: forms N-M, the negative addend of the fractional
// accumulator, as a signed (W+1)-bit number, with the borrow out.
//
// N is the unsigned counter word (0 <= N < M). M is the accumulator modulus;
// with the default M = 2**W the difference always lies in [-M, -1] and fits
// W+1 bits. bo is the borrow of the subtraction (high when N < M).
//
// The block itself and its borrow output follow the design's schematics;
// the widths and the value of M are this implementation's choices.
module full_subtractor
  import adpll_pkg::*;
#(
  parameter int unsigned W = CNT_W,
  parameter int unsigned M = 2 ** CNT_W
) (
  input  logic [W-1:0]        n,          // N, unsigned
  output logic signed [W:0]   n_minus_m,  // N - M, two's complement
  output logic                bo          // borrow out
);
  timeunit 1ps;
  timeprecision 1ps;

  logic [W+1:0] diff;  // one extra bit holds the borrow

  always_comb begin
    diff      = {2'b00, n} - (W+2)'(M);
    n_minus_m = signed'(diff[W:0]);
    bo        = diff[W+1];
  end
endmodule
