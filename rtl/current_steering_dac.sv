// current_steering_dac: behavioural model of the current-steering form of
// the sine-weighted DAC (analog part, not synthesizable). It is an
// alternative to the resistor string and is not used by bist_top.
//
// Twelve switched currents make the stair sine: six sources for the upper
// half period and six matched sinks for the lower half. Current Ij is the
// j-th increment of the sine, I1 ~ sin15 - sin0 .. I6 ~ sin90 - sin75, so
// magnitude level m (0..6) switches on I1 .. Im, a thermometer code, and the
// peak current is I1 + .. + I6 ~ 100 uA. A transimpedance amplifier turns
// the net current into the output voltage
//   vout = VCM + RTIA * (sources on - sinks on).
//
// Interface: mag is the one-hot magnitude phase (PZ .. PF) and neg_half the
// polarity from switch_logic; vout is recomputed whenever either changes.
// With no magnitude phase set, every current is off and vout = VCM. More
// than one phase set is flagged and the highest level is used. No timing:
// the currents and the amplifier settle instantly.
//
// The six current values (26, 24, 21, 16, 10 and 3.3 uA) and the
// source/sink arrangement follow the design description. The amplifier's
// gain RTIA and the output common mode VCM are not given there: RTIA =
// 13.8 kOhm is chosen so that the swing matches the resistor-string DAC
// (about 1.65 V +- 1.38 V), and VCM is mid-supply.
module current_steering_dac
  import bist_pkg::*;
#(
  parameter real I1   = 26.0e-6,
  parameter real I2   = 24.0e-6,
  parameter real I3   = 21.0e-6,
  parameter real I4   = 16.0e-6,
  parameter real I5   = 10.0e-6,
  parameter real I6   =  3.3e-6,
  parameter real RTIA = 13.8e3,
  parameter real VCM  = 1.65
) (
  input  mag_phase_t mag,
  input  logic       neg_half,
  output real        vout
);
  timeunit 1ns;
  timeprecision 1ps;

  // Current of source (or sink) j, j = 1..6.
  function automatic real cur(int j);
    case (j)
      1:       return I1;
      2:       return I2;
      3:       return I3;
      4:       return I4;
      5:       return I5;
      default: return I6;
    endcase
  endfunction

  // Magnitude level 0..6 of the one-hot phase vector (highest set bit).
  function automatic int level_of(mag_phase_t m);
    logic [NUM_LEVELS-1:0] v;
    v = {m.pf, m.pe, m.pd, m.pc, m.pb, m.pa, m.pz};
    for (int i = int'(NUM_LEVELS) - 1; i >= 0; i--)
      if (v[i]) return i;
    return 0;
  endfunction

  initial vout = VCM;

  always @(mag or neg_half) begin
    real itot;
    int  lvl;
    int  set;
    set = 0;
    for (int i = 0; i < int'(NUM_LEVELS); i++)
      if (((mag >> i) & 1) != 0) set++;
    if (set > 1)
      $error("current_steering_dac: several magnitude phases set (%b)", mag);
    lvl  = level_of(mag);
    itot = 0.0;
    for (int j = 1; j <= lvl; j++) itot += cur(j);
    vout = neg_half ? VCM - RTIA * itot : VCM + RTIA * itot;
  end

endmodule
