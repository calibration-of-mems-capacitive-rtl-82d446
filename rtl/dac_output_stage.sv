// dac_output_stage: behavioural model of the DAC's analog output stage
// (not synthesizable): RC low-pass filter followed by a rail-to-rail op-amp
// in unity-gain (voltage-follower) connection that drives the MEMS device.
//
// The low-pass filter smooths the steps of the stair sine and the glitches of
// the tap switches; its capacitor also holds the node while the switches
// change. The follower buffers the capacitor voltage. A rail-to-rail input
// stage (complementary NMOS/PMOS pairs) keeps the follower working over the
// whole 0.3 V .. 3 V swing; in a follower the gain stays about 1 even though
// the input transconductance doubles in the middle of the common-mode range,
// so the model uses an ideal gain of 1, clipped to the supply rails.
//
// Timing: the filter is integrated in fixed time steps of TSTEP_NS with the
// exact first-order update v += (vin - v) * (1 - exp(-TSTEP/TAU)). vout
// changes only at those steps. The output starts at VSS.
//
// The filter-plus-follower structure and the rail-to-rail follower follow the
// design description; the time constant TAU_NS (R and C are not given), the
// time step and the ideal op-amp are this model's assumptions.
module dac_output_stage #(
  parameter real TAU_NS   = 1000.0,
  parameter real TSTEP_NS = 50.0,
  parameter real VDD      = 3.3,
  parameter real VSS      = 0.0
) (
  input  real vin,
  output real vout
);
  timeunit 1ns;
  timeprecision 1ps;

  localparam real ALPHA = 1.0 - $exp(-TSTEP_NS / TAU_NS);

  real vcap = VSS;

  always begin
    #(TSTEP_NS);
    vcap = vcap + (vin - vcap) * ALPHA;
    vout = (vcap > VDD) ? VDD : (vcap < VSS) ? VSS : vcap;
  end

  initial vout = VSS;

endmodule
