// tb_dac_output_stage: self-checking testbench of the filter-and-follower
// model.
//
// Applies voltage steps and compares the output with the first-order step
// response v(t) = v0 + (v1 - v0) * (1 - exp(-t / tau)) at t = tau, 2 tau and
// 8 tau (within 2 % of the step, the error of the fixed time step), and checks
// that an input beyond the supply is clipped to the rails.
module tb_dac_output_stage;
  timeunit 1ns;
  timeprecision 1ps;

  localparam real TAU = 1000.0;

  real vin = 0.0;
  real vout;

  int checks = 0;
  int failures = 0;

  dac_output_stage #(.TAU_NS(TAU), .TSTEP_NS(50.0)) dut (.*);

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

  task automatic step_to(real v0, real v1);
    vin = v1;
    #(TAU);
    check(absr(vout - (v0 + (v1 - v0) * (1.0 - $exp(-1.0)))) < 0.02 * absr(v1 - v0),
          $sformatf("tau: %f", vout));
    #(TAU);
    check(absr(vout - (v0 + (v1 - v0) * (1.0 - $exp(-2.0)))) < 0.02 * absr(v1 - v0),
          $sformatf("2 tau: %f", vout));
    #(6 * TAU);
    check(absr(vout - v1) < 0.002 * absr(v1 - v0) + 0.001, $sformatf("8 tau: %f", vout));
  endtask

  initial begin
    #(10 * TAU);
    check(absr(vout) < 1e-9, "starts at 0 V");
    step_to(0.0, 3.0);
    step_to(3.0, 0.3);
    step_to(0.3, 1.65);
    // Input above the supply: output clipped at 3.3 V.
    vin = 5.0;
    #(20 * TAU);
    check(vout <= 3.3 && vout > 3.299, $sformatf("clip high: %f", vout));
    vin = -2.0;
    #(20 * TAU);
    check(vout >= 0.0 && vout < 0.001, $sformatf("clip low: %f", vout));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(200 * TAU);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
