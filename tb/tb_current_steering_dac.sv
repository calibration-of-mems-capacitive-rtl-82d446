// tb_current_steering_dac: self-checking testbench of the current-steering
// DAC model.
//
// A step count drives the real phase decoder and switch logic, which drive
// two DAC instances: one with the nominal currents and one whose I3 is 5 %
// high, as a mismatched current cell would be. For three periods of 24
// steps the nominal output must follow VCM + RTIA * 100.3 uA * sin(k*15 deg)
// within 3 mV, the two half periods must mirror each other, and the peak
// must be VCM +- RTIA * (I1 + .. + I6). From the 24 levels of one period
// the testbench computes the spurious-free range over harmonics 2..11 with
// a DFT: the nominal currents must give at least 50 dB, and the mismatched
// cell must cost at least 6 dB of it. A count outside 0..23 leaves every
// current off, so the output must rest at VCM.
module tb_current_steering_dac;
  timeunit 1ns;
  timeprecision 1ps;
  import bist_pkg::*;

  localparam real RTIA = 13.8e3;
  localparam real VCM  = 1.65;
  localparam real ISUM = 100.3e-6;

  logic [STEP_W-1:0] count = '0;
  phase_vec_t        phases;
  tap_sel_t          tap_sel;
  mag_phase_t        mag;
  logic              neg_half;
  real               vout, vout_mm;

  int checks = 0;
  int failures = 0;

  phase_decoder dec (.count(count), .phases(phases));
  switch_logic  sw  (.phases(phases), .tap_sel(tap_sel), .mag(mag), .neg_half(neg_half));
  current_steering_dac #(.RTIA(RTIA), .VCM(VCM)) dut (.mag(mag), .neg_half(neg_half), .vout(vout));
  current_steering_dac #(.RTIA(RTIA), .VCM(VCM), .I3(21.0e-6 * 1.05))
    dut_mm (.mag(mag), .neg_half(neg_half), .vout(vout_mm));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  function automatic real absr(real x);
    return (x < 0.0) ? -x : x;
  endfunction

  // Largest harmonic 2..11 of a 24-sample period, in dB below the fundamental.
  function automatic real sfdr_db(real v [24]);
    real pi, re, im, fund, worst, p;
    pi = 3.14159265358979;
    worst = 0.0;
    fund = 0.0;
    for (int h = 1; h <= 11; h++) begin
      re = 0.0;
      im = 0.0;
      for (int k = 0; k < 24; k++) begin
        re += v[k] * $cos(2.0 * pi * h * k / 24.0);
        im += v[k] * $sin(2.0 * pi * h * k / 24.0);
      end
      p = re * re + im * im;
      if (h == 1) fund = p;
      else if (p > worst) worst = p;
    end
    return 10.0 * $log10(fund / worst);
  endfunction

  initial begin
    real pi, ideal, v [24], vm [24], s_nom, s_mm;
    pi = 3.14159265358979;
    for (int rep = 0; rep < 3; rep++)
      for (int k = 0; k < 24; k++) begin
        count = STEP_W'(k);
        #500;
        ideal = VCM + RTIA * ISUM * $sin(k * 15.0 * pi / 180.0);
        check(absr(vout - ideal) < 0.003, $sformatf("step %0d: %f V, ideal %f V", k, vout, ideal));
        v[k]  = vout;
        vm[k] = vout_mm;
        #500;
      end
    for (int k = 0; k < 12; k++)
      check(absr((v[k] - VCM) + (v[k + 12] - VCM)) < 1e-9, $sformatf("mirror step %0d/%0d", k, k + 12));
    check(absr(v[6] - (VCM + RTIA * ISUM)) < 1e-9, "positive peak = VCM + RTIA * sum(I)");
    check(absr(v[18] - (VCM - RTIA * ISUM)) < 1e-9, "negative peak = VCM - RTIA * sum(I)");
    check(absr(v[0] - VCM) < 1e-9 && absr(v[12] - VCM) < 1e-9, "zero crossings at VCM");
    s_nom = sfdr_db(v);
    s_mm  = sfdr_db(vm);
    $display("current-steering DAC: SFDR (h2..h11) %0.1f dB nominal, %0.1f dB with I3 +5%%", s_nom, s_mm);
    check(s_nom >= 50.0, "nominal SFDR >= 50 dB");
    check(s_nom - s_mm >= 6.0, "mismatched cell lowers SFDR by 6 dB or more");
    count = 6'd30;
    #500;
    check(absr(vout - VCM) < 1e-9, "all currents off outside the 24 steps");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
