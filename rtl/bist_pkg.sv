// bist_pkg: constants and types shared by the stimulus generator of the
// electrical-stimulus BIST.
//
// The stimulus is a stair-stepped sine with 24 steps per period. Step k holds
// the level sin(k * 15 deg), so one quarter period climbs through the seven
// magnitudes 0, sin15 .. sin90 and the whole period uses 13 distinct signed
// levels. Each signed level is one tap of a resistor string (switches P1..P13,
// P1 the top tap at +1, P7 the middle tap at 0, P13 the bottom tap at -1).
// The seven magnitude phases are named PZ, PA .. PF after the switch-control
// waveforms of the DAC control logic. The step count, level count and tap
// count are the design's own numbers; the ordering of the taps (P1 on top) is
// read from the resistor-string schematic.
package bist_pkg;
  timeunit 1ns;
  timeprecision 1ps;


  localparam int unsigned STEPS_PER_PERIOD = 24;  // steps of the stair sine
  localparam int unsigned NUM_LEVELS       = 7;   // magnitudes sin(0..90 deg)
  localparam int unsigned NUM_TAPS         = 13;  // signed levels, P1..P13
  localparam int unsigned MID_TAP          = 6;   // 0-based index of P7 (zero)
  localparam int unsigned STEP_W           = 6;   // width of the step counter

  typedef logic [STEPS_PER_PERIOD-1:0] phase_vec_t;  // one-hot step phases
  typedef logic [NUM_TAPS-1:0]         tap_sel_t;    // bit i closes P(i+1)

  // Magnitude phases, one per level of a quarter period.
  typedef struct packed {
    logic pz;  // sin 0   (zero crossing)
    logic pa;  // sin 15
    logic pb;  // sin 30
    logic pc;  // sin 45
    logic pd;  // sin 60
    logic pe;  // sin 75
    logic pf;  // sin 90  (peak)
  } mag_phase_t;

  // Magnitude index 0..6 of step k (0..23) of the period.
  function automatic int unsigned step_magnitude(int unsigned k);
    int unsigned q;
    q = k % 12;
    return (q <= 6) ? q : 12 - q;
  endfunction

  // Tap index 0..12 (P1..P13) that holds the signed level of step k.
  function automatic int unsigned step_tap(int unsigned k);
    int unsigned m;
    m = step_magnitude(k);
    return (k < 12) ? MID_TAP - m : MID_TAP + m;
  endfunction

endpackage
