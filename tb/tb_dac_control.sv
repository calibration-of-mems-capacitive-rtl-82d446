// tb_dac_control: self-checking testbench of the DAC control logic.
//
// A square wave with a random period (6..60 clocks, duty about 50 %) stands
// in for the DDFS MSB. Checks:
//   * the count advances by exactly one, three clock edges after each rising
//     edge of the input is sampled (two-flop synchronizer plus edge detector),
//     and never moves otherwise;
//   * the closed tap follows the stair sine: at count k the tap of the level
//     sin(k * 15 deg) is closed (P7 at 0, P1 at +1, P13 at -1), computed here
//     from the sine;
//   * exactly one tap is closed at any time;
//   * period_start pulses once every 24 input edges, so the output frequency
//     is the input frequency / 24.
module tb_dac_control;
  timeunit 1ns;
  timeprecision 1ps;
  import bist_pkg::*;

  logic              clk = 1'b0;
  logic              rst_n = 1'b0;
  logic              ddfs_msb = 1'b0;
  logic [STEP_W-1:0] count;
  tap_sel_t          tap_sel;
  mag_phase_t        mag;
  logic              neg_half;
  logic              period_start;

  int checks = 0;
  int failures = 0;

  dac_control dut (.*);

  always #500 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Expected tap of step k from the sine level.
  function automatic int exp_tap(int k);
    real lvl, a, pi;
    int m;
    pi = 3.14159265358979;
    lvl = $sin(k * 15.0 * pi / 180.0);
    a = (lvl < 0) ? -lvl : lvl;
    m = 0;
    for (int j = 0; j <= 6; j++)
      if (a > $sin(j * 15.0 * pi / 180.0) - 0.01) m = j;
    return (lvl >= 0) ? 6 - m : 6 + m;
  endfunction

  int edges = 0;
  int starts = 0;
  int pending [$];   // cycle numbers at which the count must advance
  int cyc = 0;
  int ref_count = 0;

  // Stimulus: input changes on the falling clock edge.
  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (24 * 12) begin
      int half;
      half = $urandom_range(3, 30);
      @(negedge clk) ddfs_msb = 1'b1;
      edges++;
      // sampled at the next posedge (cyc+1); count changes at cyc+3
      pending.push_back(cyc + 3);
      repeat (half - 1) @(negedge clk);
      @(negedge clk) ddfs_msb = 1'b0;
      repeat (half - 1) @(negedge clk);
    end
    repeat (10) @(negedge clk);
    check(ref_count == edges % 24, "final count");
    check(starts == edges / 24, $sformatf("period_start %0d for %0d edges", starts, edges));
    check(starts == 12, "twelve periods");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Cycle counter and checks after each rising clock edge.
  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
  end

  always @(negedge clk) if (rst_n) begin
    if (pending.size() > 0 && pending[0] == cyc) begin
      void'(pending.pop_front());
      ref_count = (ref_count + 1) % 24;
    end
    check(count == STEP_W'(ref_count), $sformatf("count %0d != %0d (cycle %0d)", count, ref_count, cyc));
    check($onehot(tap_sel), "one tap closed");
    check(tap_sel[exp_tap(int'(count))], $sformatf("tap for step %0d", count));
    if (period_start) starts++;
  end

  initial begin
    #(1000 * 30_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
