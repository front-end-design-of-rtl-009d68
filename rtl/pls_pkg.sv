// pls_pkg: types shared by the pulsed-latch shift register.
//
// The shift register is clocked by K+1 short, non-overlapping pulses per
// shift. Pulse index 0 is CLK_pulse<T>, which loads the temporary storage
// latch of every sub shift register; index i (1..K) is CLK_pulse<i>, which
// loads data latch Q<i> of every sub shift register. The pulses fire in the
// order T, K, K-1, ..., 1, i.e. against the direction of data flow.
//
// Two pulse sources are provided. PGEN_DELAY_LINE is the chain of
// delay/inverter/AND clock-pulse circuits of the architecture (a timing
// model, not synthesizable). PGEN_SEQUENCER is a synchronous, synthesizable
// sequencer that derives the same pulse order from a fast clock; it is this
// design's own addition.
package pls_pkg;
  timeunit 1ps;
  timeprecision 1ps;

  typedef enum logic {
    PGEN_DELAY_LINE = 1'b0,
    PGEN_SEQUENCER  = 1'b1
  } pulse_gen_e;

  // Index of CLK_pulse<T> in a pulse vector [K:0].
  localparam int unsigned PULSE_T = 0;
endpackage
