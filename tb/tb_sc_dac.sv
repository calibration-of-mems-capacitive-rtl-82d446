// tb_sc_dac: self-checking testbench of the switched-capacitor DAC model.
//
// A step count drives the real phase decoder and switch logic, which drive
// two DAC instances: an ideal one and one that loses 2 % of every charge
// packet to leakage. For three periods of 24 steps the ideal output must
// follow VAGND + VREF * sin(k*15 deg) within 10 mV (the capacitor values
// are rounded; the peak lands at about 2.763 V), both half periods must
// mirror each other, and the reset switch must bring the output back to
// exactly VAGND at the two zero crossings of every period. The lossy
// instance must droop: its peak lies 1..3 % below the ideal peak, yet it
// still returns to VAGND at each reset, so the error does not build up
// from period to period.
module tb_sc_dac;
  timeunit 1ns;
  timeprecision 1ps;
  import bist_pkg::*;

  localparam real VREF  = 1.12;
  localparam real VAGND = 1.65;

  logic [STEP_W-1:0] count = '0;
  phase_vec_t        phases;
  tap_sel_t          tap_sel;
  mag_phase_t        mag;
  logic              neg_half;
  real               vout, vout_lk;

  int checks = 0;
  int failures = 0;

  phase_decoder dec (.count(count), .phases(phases));
  switch_logic  sw  (.phases(phases), .tap_sel(tap_sel), .mag(mag), .neg_half(neg_half));
  sc_dac #(.VREF(VREF), .VAGND(VAGND)) dut (.mag(mag), .neg_half(neg_half), .vout(vout));
  sc_dac #(.VREF(VREF), .VAGND(VAGND), .LOSS(0.02))
    dut_lk (.mag(mag), .neg_half(neg_half), .vout(vout_lk));

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

  initial begin
    real pi, ideal, v [24], peak, peak_lk;
    pi = 3.14159265358979;
    // Start from step 23 so the first step into 0 closes the reset switch.
    count = 6'd23;
    #1000;
    for (int rep = 0; rep < 3; rep++)
      for (int k = 0; k < 24; k++) begin
        count = STEP_W'(k);
        #500;
        ideal = VAGND + VREF * $sin(k * 15.0 * pi / 180.0);
        check(absr(vout - ideal) < 0.010, $sformatf("period %0d step %0d: %f V, ideal %f V", rep, k, vout, ideal));
        if (k == 0 || k == 12) begin
          check(absr(vout - VAGND) < 1e-12, $sformatf("reset to VAGND at step %0d (ideal)", k));
          check(absr(vout_lk - VAGND) < 1e-12, $sformatf("reset to VAGND at step %0d (lossy)", k));
        end
        if (k == 6) begin
          peak = vout - VAGND;
          peak_lk = vout_lk - VAGND;
        end
        v[k] = vout;
        #500;
      end
    for (int k = 0; k < 12; k++)
      check(absr((v[k] - VAGND) + (v[k + 12] - VAGND)) < 1e-9, $sformatf("mirror step %0d/%0d", k, k + 12));
    for (int k = 0; k < 6; k++) check(v[k + 1] > v[k], $sformatf("rising step %0d", k));
    $display("SC DAC: peak %0.4f V ideal, %0.4f V with 2%% charge loss", VAGND + peak, VAGND + peak_lk);
    check(absr(VAGND + peak - 2.763) < 0.002, "ideal peak about 2.763 V");
    check(peak_lk < 0.99 * peak && peak_lk > 0.97 * peak, "lossy peak droops 1..3 %");
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
