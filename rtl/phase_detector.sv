// phase_detector: D-flip-flop based bang-bang phase detector.
//
// Three flip-flops are clocked by the rising edge of the reference clock
// f_ref. The first samples the oscillator output f_out, the second samples
// f_out_de (f_out passed through the delay element DE) and the third is a
// toggle flip-flop whose output is high in every second reference cycle.
// The two outputs are formed from the three flip-flop outputs as:
//   shift_left  = toggle & ~s_out & ~s_de  (f_out still low at the reference
//                 edge: the oscillator edge is late, the counter counts up)
//   shift_right = toggle &  s_out &  s_de  (f_out already high for longer than
//                 the DE delay: the oscillator edge is early, count down)
// When the two samples differ, the oscillator's rising edge lies inside the
// DE window before the reference edge and neither output is raised: the DE
// delay is the dead zone that sets the final phase difference. No frequency
// information is used, and a decision is given only once every two
// reference cycles, as the design description says.
//
// Timing: the outputs are combinational from the flip-flops, so they change
// just after a rising edge of f_ref and stay valid for one reference cycle;
// the up/down counter samples them at the next rising edge.
//
// Three flip-flops clocked by the reference, the delay element and the
// every-second-cycle decision follow the design. How the flip-flop outputs
// are combined (which sample polarity drives which output) and the
// asynchronous active-low reset are this implementation's choices.
module phase_detector
  import adpll_pkg::*;
(
  input  logic f_ref,       // reference clock, sampling edge: rising
  input  logic rst_n,       // asynchronous reset, active low
  input  logic f_out,       // oscillator output
  input  logic f_out_de,    // oscillator output through the delay element DE
  output logic shift_left,  // request to raise the oscillator frequency (Up)
  output logic shift_right, // request to lower the oscillator frequency (Down)
  output pd_decision_e decision
);
  timeunit 1ps;
  timeprecision 1ps;

  logic s_out;   // f_out sampled at the reference edge
  logic s_de;    // delayed f_out sampled at the reference edge
  logic toggle;  // high in every second reference cycle

  always_ff @(posedge f_ref or negedge rst_n) begin
    if (!rst_n) begin
      s_out  <= 1'b0;
      s_de   <= 1'b0;
      toggle <= 1'b0;
    end else begin
      s_out  <= f_out;
      s_de   <= f_out_de;
      toggle <= ~toggle;
    end
  end

  assign shift_left  = toggle & ~s_out & ~s_de;
  assign shift_right = toggle &  s_out &  s_de;

  always_comb begin
    unique case ({shift_right, shift_left})
      2'b01:   decision = PD_LEFT;
      2'b10:   decision = PD_RIGHT;
      default: decision = PD_HOLD;
    endcase
  end

  // The two requests are mutually exclusive by construction.
  a_exclusive: assert property (@(posedge f_ref) disable iff (!rst_n)
                                !(shift_left && shift_right));
endmodule
