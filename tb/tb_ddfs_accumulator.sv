// tb_ddfs_accumulator: self-checking testbench of the phase accumulator.
//
// A reference accumulator in the testbench follows the documented behaviour
// (M buffer loaded by m_load, used from the next cycle, dither added every
// cycle, wrap modulo 2^16) and is compared with phase and msb every cycle.
// It also checks the output rate: over 2^16 cycles the MSB must rise exactly
// M times (Fout = M * REFCLK / 2^N), for M = 1573 (24 kHz at 1 MHz) and
// M = 15728 (240 kHz), and that a retune does not clear the phase.
module tb_ddfs_accumulator;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned N = 16;

  logic         clk = 1'b0;
  logic         rst_n = 1'b0;
  logic [N-1:0] m_word = '0;
  logic         m_load = 1'b0;
  logic [N-1:0] dither = '0;
  logic [N-1:0] phase;
  logic         msb;

  int checks = 0;
  int failures = 0;

  logic [N-1:0] ref_m, ref_phase;

  ddfs_accumulator #(.N(N)) dut (.*);

  always #500 clk = ~clk;  // 1 MHz

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Reference model, updated on the same edge as the DUT.
  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ref_m     <= '0;
      ref_phase <= '0;
    end else begin
      if (m_load) ref_m <= m_word;
      ref_phase <= ref_phase + ref_m + dither;
    end
  end

  always @(negedge clk) if (rst_n) begin
    check(phase == ref_phase, $sformatf("phase %0d != %0d", phase, ref_phase));
    check(msb == ref_phase[N-1], "msb");
  end

  task automatic count_edges(int cycles, output int edges);
    logic prev;
    edges = 0;
    prev = msb;
    repeat (cycles) begin
      @(negedge clk);
      if (msb && !prev) edges++;
      prev = msb;
    end
  endtask

  initial begin
    int edges;
    logic [N-1:0] ph0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // Without a load the accumulator stays at zero.
    repeat (5) @(negedge clk);
    check(phase == '0, "idle phase");
    // Load M = 1573 and count MSB rising edges over 2^16 cycles.
    m_word = 16'd1573; m_load = 1'b1;
    @(negedge clk);
    m_load = 1'b0;
    m_word = 16'd999;  // must be ignored without m_load
    count_edges(1 << N, edges);
    check(edges == 1573, $sformatf("rate at M=1573: %0d edges", edges));
    // Retune to 15728: phase must continue from its current value.
    ph0 = phase;
    m_word = 16'd15728; m_load = 1'b1;
    @(negedge clk);
    m_load = 1'b0;
    check(phase == ph0 + 16'd1573, "phase continuous across retune (old M one more cycle)");
    @(negedge clk);
    check(phase == ph0 + 16'd1573 + 16'd15728, "new M in use");
    count_edges(1 << N, edges);
    check(edges == 15728, $sformatf("rate at M=15728: %0d edges", edges));
    // Dither is added to the M word.
    repeat (200) begin
      dither = 16'($urandom_range(0, 3));
      @(negedge clk);
    end
    dither = '0;
    // Reset in the middle clears phase and M.
    rst_n = 1'b0;
    @(negedge clk);
    rst_n = 1'b1;
    repeat (4) @(negedge clk);
    check(phase == '0, "reset clears M buffer");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(1000 * 200_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
