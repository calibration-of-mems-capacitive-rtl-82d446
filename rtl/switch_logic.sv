// switch_logic: the OR-gate "digital logic" of the DAC control.
//
// Each DAC switch is closed during a fixed group of the 24 phases, so every
// switch control is the OR of the phases of its group. Step k of the period
// has the level sin(k * 15 deg):
//   * tap_sel: one switch of the 13-tap resistor string. Bit i closes P(i+1);
//     P1 is the top tap (+1), P7 the middle tap (0), P13 the bottom tap (-1).
//     P1 and P13 are closed for one phase per period, P7 for two (the two zero
//     crossings), every other tap for two phases.
//   * mag: the unsigned magnitude phases PZ, PA .. PF. PZ is high at both zero
//     crossings (steps 0 and 12), PF at both peaks (steps 6 and 18), PA .. PE
//     four times per period each.
//   * neg_half: high during steps 13..23, the lower half of the period, where
//     a switched-reference DAC would swap +Vref for -Vref.
// Purely combinational; with a one-hot input exactly one tap_sel bit and one
// mag bit are high.
//
// The grouping of phases by OR gates, the 13 tap switches and the PZ, PA..PF
// phase pattern follow the design description and its figures. Which half of
// the period is positive (steps 1..11) and the neg_half output are this
// implementation's choice.
module switch_logic
  import bist_pkg::*;
(
  input  phase_vec_t phases,
  output tap_sel_t   tap_sel,
  output mag_phase_t mag,
  output logic       neg_half
);
  timeunit 1ns;
  timeprecision 1ps;


  logic [NUM_LEVELS-1:0] mag_vec;  // bit m: magnitude sin(m * 15 deg)

  always_comb begin
    tap_sel  = '0;
    mag_vec  = '0;
    neg_half = 1'b0;
    for (int unsigned k = 0; k < STEPS_PER_PERIOD; k++) begin
      tap_sel[step_tap(k)]       |= phases[k];
      mag_vec[step_magnitude(k)] |= phases[k];
      if (k > 12) neg_half |= phases[k];
    end
  end

  assign mag = '{pz: mag_vec[0], pa: mag_vec[1], pb: mag_vec[2], pc: mag_vec[3],
                 pd: mag_vec[4], pe: mag_vec[5], pf: mag_vec[6]};

endmodule
