// frac_accumulator: the fractional divider of the DCO, a signed
// adder-accumulator clocked by the oscillator output.
//
// A (W+1)-bit signed register acc is updated on every rising edge of f_dco.
// Its most significant bit (the sign) selects the adder's second input:
//   msb = 0 (acc >= 0): acc <= acc + (N - M)   (a negative step)
//   msb = 1 (acc <  0): acc <= acc + N         (a positive step)
// so acc stays in [-M, M-1] and, on average, msb is 0 in a fraction N/M of
// the oscillator cycles. The same msb selects the ring's chain length: L
// when it is 0 and L+1 when it is 1, so the oscillator's mean period is
// 2*t_de*(L + 1 - N/M) and N sets the frequency in steps of 1/M of a chain
// element. co is the carry out of the adder.
//
// The multiplexer, the full adder, the register and the use of the MSB
// follow the design; the widths and the reset to zero are this
// implementation's choices.
module frac_accumulator
  import adpll_pkg::*;
#(
  parameter int unsigned W = CNT_W
) (
  input  logic               f_dco,      // oscillator output, rising edge
  input  logic               rst_n,      // asynchronous reset, active low
  input  logic [W-1:0]       n,          // N from the up/down counter
  input  logic signed [W:0]  n_minus_m,  // N - M from the full subtractor
  output logic               msb,        // sign of the register: 1 selects L+1
  output logic               co,         // carry out of the full adder
  output logic signed [W:0]  acc         // accumulator register
);
  timeunit 1ps;
  timeprecision 1ps;

  logic signed [W:0] addend;
  logic [W+1:0]      sum;

  assign msb = acc[W];

  always_comb begin
    addend = msb ? signed'({1'b0, n}) : n_minus_m;
    sum    = {1'b0, acc} + {1'b0, addend};
    co     = sum[W+1];
  end

  always_ff @(posedge f_dco or negedge rst_n) begin
    if (!rst_n) acc <= '0;
    else        acc <= signed'(sum[W:0]);
  end
endmodule
