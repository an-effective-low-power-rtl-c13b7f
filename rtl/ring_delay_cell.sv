// ring_delay_cell: behavioural model of one AND-OR delay element of the
// digitally controlled ring oscillator (not synthesizable: it carries a
// propagation delay and is part of a combinational ring).
//
// The forward signal fwd_in enters every element. In the element whose
// one-hot control bit sel is 1, one AND gate turns the forward signal back;
// in the others the second AND gate passes on the return signal ret_in from
// the next element. The OR gate merges the two into ret_out:
//   ret_out = (fwd_in & sel) | (ret_in & ~sel)      after TDE
// fwd_out repeats fwd_in for the next element. The whole delay of the
// element, t_de, is lumped on the return path, so a chain of length L adds
// L*t_de between the ring's NAND output and its NAND input.
module ring_delay_cell #(
  parameter int unsigned TDE = adpll_pkg::TDE_PS
) (
  input  logic fwd_in,   // forward signal from the previous element
  input  logic sel,      // control bit: 1 turns the signal back here
  input  logic ret_in,   // return signal from the next element
  output logic fwd_out,  // forward signal to the next element
  output logic ret_out   // return signal to the previous element
);
  timeunit 1ps;
  timeprecision 1ps;

  logic turn, pass;

  assign fwd_out = fwd_in;
  assign turn    = fwd_in & sel;
  assign pass    = ret_in & ~sel;

  // Inertial gate delay: a glitch shorter than t_de does not pass.
  assign #(TDE) ret_out = turn | pass;
endmodule
