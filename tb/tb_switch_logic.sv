// tb_switch_logic: self-checking testbench of the OR-gate switch logic.
//
// For each single phase k the expected switches are derived from the sine
// itself: the level of step k is sin(k * 15 deg); its magnitude is matched to
// the nearest of sin(0), sin(15) .. sin(90) to give the magnitude phase
// (PZ .. PF), and its sign picks the tap above (P1..P6), at (P7) or below
// (P8..P13) the middle of the resistor string. neg_half must be high exactly
// when the level is negative. Random multi-hot inputs must give the OR of the
// single-phase outputs, and no phase must give no switch.
module tb_switch_logic;
  timeunit 1ns;
  timeprecision 1ps;
  import bist_pkg::*;

  phase_vec_t phases;
  tap_sel_t   tap_sel;
  mag_phase_t mag;
  logic       neg_half;

  int checks = 0;
  int failures = 0;

  switch_logic dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  tap_sel_t   exp_tap [24];
  logic [6:0] exp_mag [24];  // {pz,pa,..,pf}
  logic       exp_neg [24];

  initial begin
    real pi, lvl, best;
    int  m;
    pi = 3.14159265358979;
    for (int k = 0; k < 24; k++) begin
      lvl = $sin(k * 15.0 * pi / 180.0);
      m = 0;
      best = 10.0;
      for (int j = 0; j <= 6; j++)
        if ((lvl < 0 ? -lvl : lvl) - $sin(j * 15.0 * pi / 180.0) < best &&
            $sin(j * 15.0 * pi / 180.0) - (lvl < 0 ? -lvl : lvl) < best) begin
          best = ((lvl < 0 ? -lvl : lvl) > $sin(j * 15.0 * pi / 180.0)) ?
                 (lvl < 0 ? -lvl : lvl) - $sin(j * 15.0 * pi / 180.0) :
                 $sin(j * 15.0 * pi / 180.0) - (lvl < 0 ? -lvl : lvl);
          m = j;
        end
      exp_mag[k] = 7'b1000000 >> m;
      exp_neg[k] = (lvl < -1e-6);
      exp_tap[k] = '0;
      if (m == 0)          exp_tap[k][6] = 1'b1;
      else if (lvl > 0.0)  exp_tap[k][6 - m] = 1'b1;
      else                 exp_tap[k][6 + m] = 1'b1;
    end

    phases = '0;
    #10;
    check(tap_sel == '0 && mag == '0 && !neg_half, "no phase, no switch");

    for (int k = 0; k < 24; k++) begin
      phases = 24'd1 << k;
      #10;
      check(tap_sel == exp_tap[k], $sformatf("step %0d tap %b exp %b", k, tap_sel, exp_tap[k]));
      check(mag == exp_mag[k], $sformatf("step %0d mag %b exp %b", k, mag, exp_mag[k]));
      check(neg_half == exp_neg[k], $sformatf("step %0d neg_half", k));
    end

    // Counts over a period, as in the switch-control waveforms.
    begin
      int npz, npf, npe, np1, np7;
      npz = 0; npf = 0; npe = 0; np1 = 0; np7 = 0;
      for (int k = 0; k < 24; k++) begin
        phases = 24'd1 << k;
        #10;
        npz += mag.pz; npf += mag.pf; npe += mag.pe;
        np1 += tap_sel[0]; np7 += tap_sel[6];
      end
      check(npz == 2 && npf == 2 && npe == 4, "PZ twice, PF twice, PE four times per period");
      check(np1 == 1 && np7 == 2, "P1 once, P7 twice per period");
    end

    repeat (200) begin
      tap_sel_t   t;
      logic [6:0] mm;
      logic       n;
      phases = 24'($urandom());
      t = '0; mm = '0; n = 1'b0;
      for (int k = 0; k < 24; k++)
        if (phases[k]) begin
          t |= exp_tap[k]; mm |= exp_mag[k]; n |= exp_neg[k];
        end
      #10;
      check(tap_sel == t && mag == mm && neg_half == n, "OR of groups");
    end

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
