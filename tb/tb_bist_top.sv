// tb_bist_top: end-to-end testbench of the BIST stimulus and capture path at
// the default parameters (16-bit DDFS, 1 MHz clock, 11 frequencies of 16384
// cycles each).
//
// The stimulus voltage is looped straight into a first-order sigma-delta
// modulator model whose bitstream returns on adc_bit (the MEMS device and the
// analog readout are not modelled). Two complete sweeps are run, the first
// without and the second with M-word dither. Checks:
//   * the stimulus period at each frequency, measured between period_start
//     pulses, equals 24 * 2^16 / M clocks, i.e. f = 1000 + 500 k Hz within
//     0.5 % (1 % with dither);
//   * exactly one resistor tap is closed at any time and the stimulus swings
//     between about 0.26 V and 3.04 V;
//   * every stored word equals the bits that were presented on adc_bit while
//     the frequency was being recorded (a shadow copy kept here);
//   * the density of ones per frequency is about 0.5 (mean stimulus 1.65 V);
//   * each mechanism occurred: DDFS overflow (MSB edges), counter wrap,
//     zero crossing (PZ), peak (PF), lower half-period, retune to a new
//     frequency, dithered operation, end of sweep (done).
module tb_bist_top;
  timeunit 1ns;
  timeprecision 1ps;
  import bist_pkg::*;

  localparam int unsigned NF    = 11;
  localparam int unsigned DWELL = 16384;
  localparam int unsigned WPF   = DWELL / 16;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        start = 1'b0;
  logic        dither_en = 1'b0;
  logic        adc_bit;
  logic [13:0] rd_addr = '0;
  logic [15:0] rd_data;
  logic        busy, done;
  logic [3:0]  freq_idx;
  logic        capture_overflow;
  logic        ddfs_msb;
  logic [5:0]  step;
  tap_sel_t    tap_sel;
  mag_phase_t  mag;
  logic        neg_half;
  logic        period_start;
  real         stim_v;

  int checks = 0;
  int failures = 0;

  bist_top dut (.*);

  sd_modulator_model u_adc (
    .clk     (clk),
    .rst_n   (rst_n),
    .vin     (stim_v),
    .bit_out (adc_bit)
  );

  always #500 clk = ~clk;  // 1 MHz reference

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Mechanism counters.
  int n_msb_edges, n_wraps, n_zero, n_peak, n_neg, n_retune, n_dither_cycles, n_done;

  // Per-frequency measurements of the current sweep.
  logic [15:0] shadow [NF * WPF];
  int          nbits [NF];
  int          ones [NF];
  int          ps_count [NF];
  longint      ps_first [NF], ps_last [NF];
  real         vmin, vmax;
  longint      cyc = 0;
  logic        prev_msb = 1'b0;
  int          prev_idx = -1;

  // Sample between clock edges: everything the next rising edge captures.
  always @(negedge clk) if (rst_n) begin
    cyc++;
    check($onehot(tap_sel), "one tap closed");
    if (ddfs_msb && !prev_msb) n_msb_edges++;
    prev_msb = ddfs_msb;
    if (period_start) n_wraps++;
    if (mag.pz) n_zero++;
    if (mag.pf) n_peak++;
    if (neg_half) n_neg++;
    if (busy) begin
      int f, n;
      f = int'(freq_idx);
      if (f != prev_idx) begin
        if (prev_idx >= 0) n_retune++;
        prev_idx = f;
      end
      if (dither_en) n_dither_cycles++;
      n = nbits[f];
      if (n < int'(DWELL)) begin
        shadow[f * WPF + n / 16][n % 16] = adc_bit;
        ones[f] += int'(adc_bit);
      end
      nbits[f]++;
      if (period_start) begin
        if (ps_count[f] == 0) ps_first[f] = cyc;
        ps_last[f] = cyc;
        ps_count[f]++;
      end
      // swing, once the first full period of the sweep has passed
      if (f > 0 || ps_count[0] > 1) begin
        if (stim_v < vmin) vmin = stim_v;
        if (stim_v > vmax) vmax = stim_v;
      end
    end
  end

  task automatic run_sweep(bit with_dither);
    for (int f = 0; f < int'(NF); f++) begin
      nbits[f] = 0; ones[f] = 0; ps_count[f] = 0;
    end
    vmin = 10.0; vmax = -10.0;
    prev_idx = -1;
    dither_en = with_dither;
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    wait (done);
    n_done++;
    @(negedge clk);
    check(!busy, "not busy after done");
    check(!capture_overflow, "no capture overflow");
    // Frequency of each step.
    for (int f = 0; f < int'(NF); f++) begin
      real m_exp, period_exp, period, fhz, tol;
      m_exp = $floor((1000.0 + 500.0 * f) * 24.0 * 65536.0 / 1.0e6 + 0.5);
      period_exp = 24.0 * 65536.0 / m_exp;
      tol = with_dither ? 0.01 : 0.005;
      check(nbits[f] == int'(DWELL), $sformatf("freq %0d: %0d bits captured", f, nbits[f]));
      check(ps_count[f] >= 3, $sformatf("freq %0d: %0d periods", f, ps_count[f]));
      if (ps_count[f] >= 3) begin
        period = real'(ps_last[f] - ps_first[f]) / real'(ps_count[f] - 1);
        fhz = 1.0e6 / period;
        check(period > period_exp * (1.0 - tol) && period < period_exp * (1.0 + tol),
              $sformatf("freq %0d: period %f clocks, expected %f", f, period, period_exp));
        check(fhz > (1000.0 + 500.0 * f) * (1.0 - tol) && fhz < (1000.0 + 500.0 * f) * (1.0 + tol),
              $sformatf("freq %0d: %f Hz", f, fhz));
      end
      check(ones[f] > int'(DWELL) * 45 / 100 && ones[f] < int'(DWELL) * 55 / 100,
            $sformatf("freq %0d: ones density %0d / %0d", f, ones[f], DWELL));
    end
    check(vmax > 2.95 && vmax < 3.05, $sformatf("stimulus maximum %f V", vmax));
    check(vmin > 0.25 && vmin < 0.35, $sformatf("stimulus minimum %f V", vmin));
    // Read back the whole capture memory.
    for (int a = 0; a < int'(NF * WPF); a++) begin
      rd_addr = 14'(a);
      @(negedge clk);
      check(rd_data == shadow[a], $sformatf("word %0d: %h exp %h", a, rd_data, shadow[a]));
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (10) @(negedge clk);
    check(!busy && !done && !ddfs_msb && step == 0, "idle after reset");
    run_sweep(1'b0);
    run_sweep(1'b1);
    $display("mechanisms: msb_edges=%0d wraps=%0d zero=%0d peak=%0d neg_half_cycles=%0d retunes=%0d dither_cycles=%0d sweeps_done=%0d",
             n_msb_edges, n_wraps, n_zero, n_peak, n_neg, n_retune, n_dither_cycles, n_done);
    check(n_msb_edges > 0, "DDFS overflow seen");
    check(n_wraps > 0, "counter wrap seen");
    check(n_zero > 0, "zero crossing seen");
    check(n_peak > 0, "peak seen");
    check(n_neg > 0, "lower half seen");
    check(n_retune == 20, $sformatf("retunes %0d", n_retune));
    check(n_dither_cycles == int'(NF * DWELL), "dithered sweep");
    check(n_done == 2, "two sweeps done");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(1000 * 500_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
