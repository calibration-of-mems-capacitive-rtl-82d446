// tb_phase_decoder: self-checking testbench of the 24-phase decoder.
//
// Applies all 64 values of the 6-bit count: counts 0..23 must raise exactly
// the phase of that number, counts 24..63 no phase at all.
module tb_phase_decoder;
  timeunit 1ns;
  timeprecision 1ps;

  logic [5:0]  count;
  logic [23:0] phases;

  int checks = 0;
  int failures = 0;

  phase_decoder dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    for (int c = 0; c < 64; c++) begin
      count = 6'(c);
      #10;
      if (c < 24) check(phases == (24'd1 << c), $sformatf("count %0d -> %b", c, phases));
      else        check(phases == '0, $sformatf("count %0d -> %b", c, phases));
    end
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
