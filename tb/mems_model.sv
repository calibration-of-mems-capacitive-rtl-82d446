// mems_model: behavioural model of one sense axis of a capacitive MEMS
// accelerometer, driven electrically, for testbenches.
//
// The proof mass is a second-order mass-spring-damper,
//   m x'' + b x' + k x = F,   b = 2 * zeta * sqrt(k m),
// so its natural frequency is sqrt(k/m) / 2pi and it rolls off above it.
// The stimulus voltage acts across a parallel-plate gap, and the
// electrostatic force follows the square law
//   F = eps0 * A / 2 * (V / d)^2,   V = vin - VBIAS,
// with the gap d held at its rest value GAP. A sine V therefore pushes the
// mass with a constant part and a part at twice the stimulus frequency.
// A mechanical stimulus enters as the acceleration accel of the package;
// in the sensor's frame it adds the inertial force m * accel (sign chosen
// so that a positive accel moves x the same way as the electrostatic
// force). The model also returns the change of the plate capacitance,
//   dcap = eps0 A / (GAP - x) - eps0 A / GAP.
//
// Interface: vin is the electrical stimulus in volts and accel the
// mechanical one in m/s^2; x (m), the electrostatic force fel (N) and dcap
// (F) are updated every DT_NS by a semi-implicit Euler step. There is no
// clock.
//
// Mass, spring constant and damping ratio are the typical values of the
// sensor this stimulus was made for (mass 3.4e-9 taken as kg, giving a
// natural frequency of 5.1 kHz). The gap, plate area and the proof-mass
// bias at mid-supply are this model's own choices; they scale the motion
// but not its frequency response.
module mems_model #(
  parameter real MASS  = 3.4e-9,    // kg
  parameter real K     = 3.5,       // N/m
  parameter real ZETA  = 0.7,
  parameter real GAP   = 2.0e-6,    // m
  parameter real AREA  = 2.26e-7,   // m^2, about 1 pF at rest
  parameter real VBIAS = 1.65,      // V, proof-mass potential
  parameter real DT_NS = 100.0
) (
  input  real vin,
  input  real accel,
  output real x,
  output real fel,
  output real dcap
);
  timeunit 1ns;
  timeprecision 1ps;

  localparam real EPS0 = 8.854e-12;
  localparam real DT   = DT_NS * 1.0e-9;
  localparam real B    = 2.0 * ZETA * $sqrt(K * MASS);

  real v;  // velocity

  initial begin
    x = 0.0;
    v = 0.0;
    fel = 0.0;
    dcap = 0.0;
  end

  always begin
    real vp;
    #(DT_NS);
    vp    = vin - VBIAS;
    fel   = EPS0 * AREA / 2.0 * (vp / GAP) * (vp / GAP);
    v     = v + (fel + MASS * accel - B * v - K * x) / MASS * DT;
    x     = x + v * DT;
    dcap  = EPS0 * AREA / (GAP - x) - EPS0 * AREA / GAP;
  end

endmodule
