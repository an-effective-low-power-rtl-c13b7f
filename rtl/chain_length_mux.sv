// chain_length_mux: selects the ring oscillator's one-hot chain-length word.
//
// l_code is the one-hot word of chain length L, l1_code that of L+1. The
// fractional accumulator's MSB picks l_code when 0 and l1_code when 1. The
// design draws this as a two-input multiplexer of one-hot words, one bit
// slice per delay element (inputs a0..a3 and b0..b3 in its schematic).
// Purely combinational.
module chain_length_mux
  import adpll_pkg::*;
#(
  parameter int unsigned STAGES = NUM_STAGES
) (
  input  logic              sel,      // accumulator MSB
  input  logic [STAGES-1:0] l_code,   // one-hot word for length L
  input  logic [STAGES-1:0] l1_code,  // one-hot word for length L+1
  output logic [STAGES-1:0] ctrl      // one-hot word to the ring
);
  timeunit 1ps;
  timeprecision 1ps;

  always_comb begin
    for (int i = 0; i < STAGES; i++)
      ctrl[i] = sel ? l1_code[i] : l_code[i];
  end
endmodule
