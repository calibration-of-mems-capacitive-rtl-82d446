// tb_sweep_controller: self-checking testbench of the frequency sweep.
//
// Runs a complete sweep with a short dwell (64 cycles) and checks:
//   * 11 frequencies, freq_idx 0..10 in order, one m_load and one step_start
//     at the start of each;
//   * the tuning word of each frequency equals round(f * 24 * 2^16 / 1 MHz),
//     f = 1000 + 500 k Hz, computed here in floating point (1573 for 1 kHz,
//     9437 for 6 kHz);
//   * capture_en is high for exactly 64 cycles per frequency, 704 in total;
//   * after the last frequency M = 0 is loaded and done is raised;
//   * a second start repeats the sweep.
module tb_sweep_controller;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned DWELL = 64;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        start = 1'b0;
  logic [15:0] m_word;
  logic        m_load;
  logic        step_start;
  logic        capture_en;
  logic [3:0]  freq_idx;
  logic        busy;
  logic        done;

  int checks = 0;
  int failures = 0;

  sweep_controller #(.DWELL_CYCLES(DWELL)) dut (.*);

  always #500 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic run_sweep();
    int loads, starts, cap, cap_this, idx;
    loads = 0; starts = 0; cap = 0; cap_this = 0; idx = -1;
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    while (!done) begin
      if (m_load) begin
        if (idx >= 0) check(cap_this == DWELL, $sformatf("dwell of %0d: %0d", idx, cap_this));
        loads++;
        cap_this = 0;
        if (step_start) begin
          real f;
          int  exp_m;
          idx++;
          f = 1000.0 + 500.0 * idx;
          exp_m = int'($floor(f * 24.0 * 65536.0 / 1.0e6 + 0.5));
          check(freq_idx == 4'(idx), $sformatf("freq_idx %0d exp %0d", freq_idx, idx));
          check(m_word == 16'(exp_m), $sformatf("M(%0d) = %0d exp %0d", idx, m_word, exp_m));
          if (idx == 0) check(m_word == 16'd1573, "M for 1 kHz is 1573");
          if (idx == 10) check(m_word == 16'd9437, "M for 6 kHz is 9437");
          starts++;
        end else begin
          check(m_word == '0, "M = 0 after the sweep");
        end
      end
      check(busy == capture_en, "busy while capturing");
      if (capture_en) begin cap++; cap_this++; end
      @(negedge clk);
    end
    check(m_load && m_word == '0, "stop load with done");
    check(idx == 10, "11 frequencies");
    check(starts == 11, "11 step_start pulses");
    check(loads == 11, "11 loads before the stop load");
    check(cap == 11 * DWELL, $sformatf("capture cycles %0d", cap));
    repeat (5) @(negedge clk);
    check(done && !busy && !capture_en, "stays done");
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (5) @(negedge clk);
    check(!busy && !done && !capture_en && !m_load, "idle after reset");
    run_sweep();
    run_sweep();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(1000 * 5000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
