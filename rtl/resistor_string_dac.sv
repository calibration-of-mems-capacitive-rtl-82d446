// resistor_string_dac: behavioural model of the sine-weighted resistor
// string DAC (analog part, not synthesizable).
//
// Fourteen resistors R1 R2 .. R7 R7 .. R2 R1 are stacked between VTOP and
// VBOT, giving 13 taps P1 (top) .. P13 (bottom). The resistor values are
// chosen so that the tap voltages sit at mid-supply + A * sin(m * 15 deg),
// m = -6..6: each resistor Rj (j = 2..7) is about 250 kOhm per unit of
// sine difference, and the end resistors R1 set the swing. With the values
// below and a 3.3 V string the taps run from 0.263 V (P13) over 1.65 V (P7)
// to 3.037 V (P1), i.e. amplitude 1.387 V.
//
// Interface: tap_sel bit i closes switch P(i+1) and connects that tap to the
// output node; vtap is that tap's voltage in volts, recomputed whenever
// tap_sel changes. With no switch closed the node floats and, as on the real
// node, which is held by the filter capacitor that follows, vtap keeps its
// last value. More than one closed switch would short part of the string;
// the model flags it and uses the highest closed tap. No timing: the string
// is treated as settling instantly.
//
// The resistor values (R1 47.3k, R2 8.32k, R3 24.73k, R4 39.89k, R5 51.95k,
// R6 60.29k, R7 64.62k) and the tap arrangement follow the design
// description; the string supply of 3.3 V and 0 V and ideal switches are
// this model's assumptions.
module resistor_string_dac
  import bist_pkg::*;
#(
  parameter real VTOP = 3.3,
  parameter real VBOT = 0.0,
  parameter real R1   = 47.30e3,
  parameter real R2   =  8.32e3,
  parameter real R3   = 24.73e3,
  parameter real R4   = 39.89e3,
  parameter real R5   = 51.95e3,
  parameter real R6   = 60.29e3,
  parameter real R7   = 64.62e3
) (
  input  tap_sel_t tap_sel,
  output real      vtap
);
  timeunit 1ns;
  timeprecision 1ps;

  // Resistor between tap P(i) and P(i+1), top to bottom; index 0 is the top
  // R1 above P1, index 13 the bottom R1 below P13.
  function automatic real seg_r(int i);
    case (i)
      0, 13:   return R1;
      1, 12:   return R2;
      2, 11:   return R3;
      3, 10:   return R4;
      4, 9:    return R5;
      5, 8:    return R6;
      default: return R7;
    endcase
  endfunction

  // Voltage of tap index t (0 = P1): divider ratio of the resistance below it.
  function automatic real tap_voltage(int t);
    real below, total;
    below = 0.0;
    total = 0.0;
    for (int i = 0; i < int'(NUM_TAPS) + 1; i++) begin
      total += seg_r(i);
      if (i > t) below += seg_r(i);
    end
    return VBOT + (VTOP - VBOT) * below / total;
  endfunction

  initial vtap = tap_voltage(MID_TAP);

  always @(tap_sel) begin
    int closed;
    closed = 0;
    for (int t = int'(NUM_TAPS) - 1; t >= 0; t--)
      if (tap_sel[t]) begin
        closed++;
        vtap = tap_voltage(t);
      end
    if (closed > 1)
      $error("resistor_string_dac: several taps closed (%b)", tap_sel);
  end

endmodule
