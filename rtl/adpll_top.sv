// adpll_top: ring-oscillator based all-digital phase-locked loop.
//
// The loop has no frequency divider. The bang-bang phase detector samples
// the oscillator output f_dco (and a copy delayed by the element DE) on each
// rising edge of the reference f_ref and, every second reference cycle,
// asks for a higher (shift_left / up) or lower (shift_right / dn) frequency,
// or for nothing when the oscillator edge lies inside the DE window. The
// up/down counter integrates these requests into the control word N. The
// full subtractor forms N-M, and the fractional accumulator, clocked by
// f_dco itself, adds N-M or N depending on its sign bit; that sign bit picks
// the chain length L (l_code) or L+1 (l1_code) of the ring oscillator for
// the next oscillator cycle. The mean oscillator period is therefore
//   T_dco = 2 * t_de * (L + 1 - N/M).
// Because the phase detector compares only the sampled level, f_dco can
// run several times faster than f_ref without a divider in the loop.
//
// Interface: f_ref, rst_n and enable are inputs; l_code and l1_code are the
// one-hot words for two adjacent chain lengths (the design brings them out
// as pins). f_dco is the output clock; the control word and the decisions
// are brought out for observation, with the subtractor's borrow (bo) and
// the adder's carry (co), which the design's schematic also brings out.
//
// The block structure follows the design's block and loop schematics. The
// block diagram also shows a block labelled LPF after the oscillator whose
// function is not described; the loop schematics feed the oscillator
// straight back to the phase detector, and so does this top. The counter
// starts at mid-scale after reset (this implementation's choice), so the
// loop starts near the middle of its fine-tuning range.
//
// Lint reports a combinational loop through f_dco: that is the ring
// oscillator itself, a loop of gates broken only by their delays.
//
// Closed-loop behaviour: the counter is the only path from the phase
// detector to the oscillator, so the loop integrates phase decisions into
// frequency with no proportional term. In simulation with a 50 MHz
// reference and L = 3 it starts at 142 MHz (N at mid-scale) and then
// wanders where shift_left and shift_right roughly balance (131-145 MHz
// over 2 ms); it does not settle into a fixed phase.
module adpll_top
  import adpll_pkg::*;
#(
  parameter int unsigned STAGES = NUM_STAGES,
  parameter int unsigned W      = CNT_W,
  parameter int unsigned TDE    = TDE_PS,
  parameter int unsigned DE     = DE_PS
) (
  input  logic              f_ref,        // reference clock
  input  logic              rst_n,        // asynchronous reset, active low
  input  logic              enable,       // ring oscillator enable
  input  logic [STAGES-1:0] l_code,       // one-hot word for length L
  input  logic [STAGES-1:0] l1_code,      // one-hot word for length L+1
  output logic              f_dco,        // oscillator output
  output logic              shift_left,   // phase detector: up
  output logic              shift_right,  // phase detector: down
  output logic [W-1:0]      n,            // integer control word N
  output logic              msb,          // accumulator sign: 1 selects L+1
  output logic [STAGES-1:0] ring_ctrl,    // one-hot word applied to the ring
  output logic              bo,           // borrow out of the full subtractor
  output logic              co            // carry out of the accumulator's adder
);
  timeunit 1ps;
  timeprecision 1ps;

  logic              f_dco_de;
  pd_decision_e      decision;
  logic              at_max, at_min;
  logic signed [W:0] n_minus_m;
  logic signed [W:0] acc;

  pd_delay_element #(.DELAY_PS(DE)) u_de (
    .a(f_dco),
    .y(f_dco_de)
  );

  phase_detector u_pd (
    .f_ref      (f_ref),
    .rst_n      (rst_n),
    .f_out      (f_dco),
    .f_out_de   (f_dco_de),
    .shift_left (shift_left),
    .shift_right(shift_right),
    .decision   (decision)
  );

  updown_counter #(.W(W), .RESET_VALUE(W'(1) << (W-1))) u_cnt (
    .clk   (f_ref),
    .rst_n (rst_n),
    .up    (shift_left),
    .dn    (shift_right),
    .n     (n),
    .at_max(at_max),
    .at_min(at_min)
  );

  full_subtractor #(.W(W), .M(2 ** W)) u_sub (
    .n        (n),
    .n_minus_m(n_minus_m),
    .bo       (bo)
  );

  frac_accumulator #(.W(W)) u_acc (
    .f_dco    (f_dco),
    .rst_n    (rst_n),
    .n        (n),
    .n_minus_m(n_minus_m),
    .msb      (msb),
    .co       (co),
    .acc      (acc)
  );

  chain_length_mux #(.STAGES(STAGES)) u_mux (
    .sel    (msb),
    .l_code (l_code),
    .l1_code(l1_code),
    .ctrl   (ring_ctrl)
  );

  ring_oscillator #(.STAGES(STAGES), .TDE(TDE)) u_ring (
    .enable(enable),
    .ctrl  (ring_ctrl),
    .f_osc (f_dco)
  );
endmodule
