// ring_oscillator: behavioural model of the digitally controlled ring
// oscillator (not synthesizable: a combinational ring with gate delays).
//
// A NAND gate with an enable input closes a ring through a chain of
// AND-OR delay elements. The one-hot control word ctrl chooses the element
// where the forward signal turns back, i.e. the chain length L (bit k set
// gives L = k+1). The signal passes each selected element once per half
// period, so the period is 2*L*t_de and the frequency
//   F_osc = 1 / (2 * L * t_de),
// as the design states. With enable low the NAND output, f_osc, rests high;
// it starts to oscillate when enable rises.
//
// A change of ctrl takes effect for the signal that is in flight, so a
// period during which the word changes lies between the two lengths' periods.
// If ctrl is all zeros the ring does not close and f_osc stops.
//
// The NAND enable gate, the AND-OR elements, their number (four) and the
// one-hot control follow the design. Lumping each element's delay in its
// return path and the value of t_de are this implementation's choices. The
// ring is a combinational loop by nature; the delays in the elements break
// it for the simulator.
module ring_oscillator
  import adpll_pkg::*;
#(
  parameter int unsigned STAGES = NUM_STAGES,
  parameter int unsigned TDE = adpll_pkg::TDE_PS
) (
  input  logic              enable,  // starts (1) or stops (0) the ring
  input  logic [STAGES-1:0] ctrl,    // one-hot chain-length word
  output logic              f_osc    // oscillator output (NAND output)
);
  timeunit 1ps;
  timeprecision 1ps;

  logic [STAGES:0] fwd;  // fwd[i] enters element i
  logic [STAGES:0] ret;  // ret[i] leaves element i towards the NAND

  assign f_osc  = ~(enable & ret[0]);
  assign fwd[0] = f_osc;
  assign ret[STAGES] = 1'b0;

  for (genvar i = 0; i < STAGES; i++) begin : g_cell
    ring_delay_cell #(.TDE(TDE)) u_cell (
      .fwd_in (fwd[i]),
      .sel    (ctrl[i]),
      .ret_in (ret[i+1]),
      .fwd_out(fwd[i+1]),
      .ret_out(ret[i])
    );
  end
endmodule
