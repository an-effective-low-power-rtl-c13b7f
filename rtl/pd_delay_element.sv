// pd_delay_element: behavioural model of the delay element DE of the phase
// detector. It is not synthesizable logic: in silicon it is a short chain of
// gates whose propagation delay defines the width of the phase detector's
// dead zone, and here that delay is modelled as an inertial delay.
//
// Interface: y follows a after DELAY_PS picoseconds. Like a gate, the model
// has an inertial delay: a pulse on a shorter than the delay is swallowed.
//
// The design's schematic draws DE as a few NAND gates; its only role in the
// loop is its delay, which the design says "governs the final phase
// difference". The delay value is this implementation's choice.
module pd_delay_element #(
  parameter int unsigned DELAY_PS = adpll_pkg::DE_PS
) (
  input  logic a,
  output logic y
);
  timeunit 1ps;
  timeprecision 1ps;

  assign #(DELAY_PS) y = a;
endmodule
