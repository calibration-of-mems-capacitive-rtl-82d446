// tb_step_counter: self-checking testbench of the mod-24 step counter.
//
// Random step pulses drive the counter; a reference count modulo 24 is
// compared with count every cycle and wrap must pulse exactly on the step
// that takes 23 back to 0. Also checks that 24 steps make one wrap (one sine
// period) and that reset clears the count.
module tb_step_counter;
  timeunit 1ns;
  timeprecision 1ps;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic       step = 1'b0;
  logic [5:0] count;
  logic       wrap;

  int checks = 0;
  int failures = 0;
  int ref_count = 0;
  int wraps = 0;
  int steps = 0;

  step_counter #(.CNT_W(6), .MODULUS(24)) dut (.*);

  always #500 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      step = ($urandom_range(0, 2) != 0);
      #1;
      check(wrap == (step && ref_count == 23), "wrap");
      @(posedge clk);
      if (step) begin
        steps++;
        if (ref_count == 23) wraps++;
        ref_count = (ref_count + 1) % 24;
      end
      @(negedge clk);
      check(count == 6'(ref_count), $sformatf("count %0d != %0d", count, ref_count));
      check(count < 24, "count range");
    end
    check(wraps == steps / 24, $sformatf("wraps %0d for %0d steps", wraps, steps));
    step = 1'b0;
    rst_n = 1'b0;
    @(negedge clk);
    check(count == 0, "reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(1000 * 10_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
