// sc_dac: behavioural model of the switched-capacitor form of the
// sine-weighted DAC (analog part, not synthesizable). It is an alternative
// to the resistor string and is not used by bist_top.
//
// A bank of six capacitors C1 .. C6 feeds an integrator with feedback
// capacitor C7. Each capacitor is sized to one increment of the sine,
// Cj / C0 = sin((7-j)*15 deg) - sin((6-j)*15 deg), so C6 is the first
// increment above zero (sin15) and C1 the last one below the peak. On each
// step of the stair sine one capacitor is charged to the reference and
// its charge is moved onto C7, changing the output by +-VREF * Cj / C7:
//   rising magnitude   level m-1 -> m : add      C(7-m),
//   falling magnitude  level m -> m-1 : subtract C(7-m),
// with the sign of VREF flipped in the lower half period (neg_half). The
// magnitude phase PZ closes the reset switch across C7 and puts the output
// back to the analog ground VAGND, which happens twice per period at the
// zero crossings. With C7 = C0 the output is VAGND + VREF * sin(k*15 deg).
//
// The real circuit loses part of the charge to leakage, which makes the
// steps droop. LOSS models that as the fraction of each packet that does
// not reach C7 (0 = ideal).
//
// Interface: mag is the one-hot magnitude phase (PZ .. PF) and neg_half the
// polarity from switch_logic; the model acts on every change of the
// magnitude phase, which must move by one level at a time as switch_logic
// does. The charge moves 1 ps after the magnitude phase changes.
//
// The capacitor values (302 fF .. 2.34 pF), the sizing rule, the +-VREF
// switching and the reset switch follow the design description. VREF =
// 1.12 V and VAGND = 1.65 V are read from the plotted output of the
// fabricated DAC (about 0.53 .. 2.77 V). C7 is not given there: it is set
// to C0 = C6 / sin15 so that the peak equals VREF.
module sc_dac
  import bist_pkg::*;
#(
  parameter real C1    = 302.0e-15,
  parameter real C2    = 898.0e-15,
  parameter real C3    = 1.43e-12,
  parameter real C4    = 1.867e-12,
  parameter real C5    = 2.15e-12,
  parameter real C6    = 2.34e-12,
  parameter real C7    = 9.041e-12,
  parameter real VREF  = 1.12,
  parameter real VAGND = 1.65,
  parameter real LOSS  = 0.0
) (
  input  mag_phase_t mag,
  input  logic       neg_half,
  output real        vout
);
  timeunit 1ns;
  timeprecision 1ps;

  // Bank capacitor Cj, j = 1..6.
  function automatic real cap(int j);
    case (j)
      1:       return C1;
      2:       return C2;
      3:       return C3;
      4:       return C4;
      5:       return C5;
      default: return C6;
    endcase
  endfunction

  function automatic int level_of(mag_phase_t m);
    logic [NUM_LEVELS-1:0] v;
    v = {m.pf, m.pe, m.pd, m.pc, m.pb, m.pa, m.pz};
    for (int i = int'(NUM_LEVELS) - 1; i >= 0; i--)
      if (v[i]) return i;
    return 0;
  endfunction

  real vint;  // integrator output relative to VAGND
  int  prev;  // magnitude level of the previous step

  initial begin
    vint = 0.0;
    prev = 0;
    vout = VAGND;
  end

  // The polarity and the magnitude phase change on the same step; the
  // model waits 1 ps after a magnitude change so both have settled.
  always @(mag) begin
    int  lvl;
    real vr;
    #1ps;
    lvl = level_of(mag);
    vr  = neg_half ? -VREF : VREF;
    if (mag.pz) begin
      vint = 0.0;
    end else if (lvl == prev + 1) begin
      vint += vr * (1.0 - LOSS) * cap(7 - lvl) / C7;
    end else if (lvl == prev - 1) begin
      vint -= vr * (1.0 - LOSS) * cap(7 - prev) / C7;
    end else if (lvl != prev) begin
      $error("sc_dac: magnitude jumped from level %0d to %0d", prev, lvl);
    end
    prev = lvl;
    vout = VAGND + vint;
  end

endmodule
