// tb_resistor_string_dac: self-checking testbench of the resistor-string
// model.
//
// Closes each tap in turn and compares the voltage with the ideal stair-sine
// level 1.65 V + A * sin(m * 15 deg), m = 6 (P1) .. -6 (P13), where the
// amplitude A = 1.3873 V is set by the end resistors (the string must swing
// 0.263 V .. 3.037 V). The resistor values approximate the sine within 5 mV.
// Also checks the symmetry about mid-supply and that the output node holds
// its value when every switch is open.
module tb_resistor_string_dac;
  timeunit 1ns;
  timeprecision 1ps;
  import bist_pkg::*;

  tap_sel_t tap_sel = '0;
  real      vtap;

  int checks = 0;
  int failures = 0;

  resistor_string_dac dut (.*);

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
    real pi, ideal, v [13];
    pi = 3.14159265358979;
    #10;
    for (int t = 0; t < 13; t++) begin
      tap_sel = 13'd1 << t;
      #10;
      v[t] = vtap;
      ideal = 1.65 + 1.3873 * $sin((6 - t) * 15.0 * pi / 180.0);
      check(absr(vtap - ideal) < 0.005, $sformatf("P%0d: %f V, ideal %f V", t + 1, vtap, ideal));
    end
    check(absr(v[0] - 3.037) < 0.002 && absr(v[12] - 0.263) < 0.002, "swing 0.263 .. 3.037 V");
    for (int t = 0; t < 6; t++)
      check(absr((v[t] - 1.65) + (v[12 - t] - 1.65)) < 1e-9, $sformatf("symmetry P%0d/P%0d", t + 1, 13 - t));
    // Levels strictly decrease from P1 to P13.
    for (int t = 0; t < 12; t++) check(v[t] > v[t + 1], "monotonic");
    // All switches open: the node keeps its value.
    tap_sel = 13'd1 << 2;
    #10;
    tap_sel = '0;
    #10;
    check(absr(vtap - v[2]) < 1e-9, "hold with no tap closed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
