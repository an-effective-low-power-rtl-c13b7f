// adpll_pkg: constants and types shared by the ADPLL blocks.
//
// The ring oscillator has four AND-OR delay elements, so its chain-length
// control word is a four-bit one-hot word; this number is the one the
// oscillator and loop schematics of the design show. The width of the
// up/down counter (the integer control word N) is not given by the design
// description; eight bits is this implementation's choice, and the modulus M
// of the fractional accumulator is 2**CNT_W so that N/M is the fraction of
// oscillator cycles spent on the shorter chain.
//
// All times are in picoseconds.
package adpll_pkg;
  timeunit 1ps;
  timeprecision 1ps;

  // Number of AND-OR delay elements in the ring (four in the schematics).
  localparam int unsigned NUM_STAGES = 4;
  // Width of the up/down counter, i.e. of the integer control word N.
  localparam int unsigned CNT_W = 8;
  // Delay of one delay element of the ring, t_de, in ps.
  localparam int unsigned TDE_PS = 1006;
  // Delay of the phase detector's delay element DE, in ps.
  localparam int unsigned DE_PS = 200;

  // Decision of the bang-bang phase detector in one reference cycle.
  typedef enum logic [1:0] {
    PD_HOLD  = 2'b00,  // no correction (off cycle or edge inside the DE window)
    PD_LEFT  = 2'b01,  // shift_left: oscillator lags, count up
    PD_RIGHT = 2'b10   // shift_right: oscillator leads, count down
  } pd_decision_e;
endpackage
