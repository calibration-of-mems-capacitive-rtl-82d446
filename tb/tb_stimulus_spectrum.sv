// tb_stimulus_spectrum: spectral purity of the stimulus at the default
// parameters, without and with M-word dither.
//
// Runs the full sweep through bist_top twice. For the lowest (1 kHz), a middle
// (3.5 kHz) and the highest (6 kHz) frequency it samples the stimulus voltage
// once per clock over a whole number of stimulus periods (from the first to the
// last period_start inside the dwell) and evaluates the Fourier coefficients at
// the fundamental and at harmonics 2..30. It reports the amplitude, the
// spurious-free dynamic range (fundamental over the largest harmonic) and the
// total distortion of the low harmonics 2..22, which an ideal 24-step stair
// sine does not have (its first images are harmonics 23 and 25).
// Checks: fundamental amplitude within 3 % of the 1.387 V the resistor string
// gives (less the small loss of the output filter), the ideal stair images
// at 23 and 25 present at roughly 1/23 and 1/25 of it, and the low-harmonic
// SFDR at least 55 dB, the figure the design targets for the 24-point signal.
// A second instance, swept 9 .. 10 kHz, checks the top of the DAC's 1 .. 10
// kHz output range. There the DDFS runs at 240 kHz and each DAC step lasts
// only 4 or 5 clocks, so the step edges jitter by a clock. That stimulus
// must keep its amplitude and a low-harmonic SFDR of at least 40 dB, the
// figure given for the DAC specification.
module tb_stimulus_spectrum;
  timeunit 1ns;
  timeprecision 1ps;
  import bist_pkg::*;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        start = 1'b0;
  logic        dither_en = 1'b0;
  logic        adc_bit = 1'b0;
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

  // 9 .. 10 kHz instance; only its start, stimulus and status are used.
  logic       start_hi = 1'b0;
  logic       busy_hi, done_hi, ps_hi;
  logic [3:0] freq_idx_hi;
  real        stim_hi;
  logic [15:0] unused_rd_hi;
  logic        unused_ov_hi, unused_msb_hi, unused_neg_hi;
  logic [5:0]  unused_step_hi;
  tap_sel_t    unused_tap_hi;
  mag_phase_t  unused_mag_hi;

  bist_top #(.F_START_HZ(9000), .F_STOP_HZ(10000), .F_STEP_HZ(500)) dut_hi (
    .clk (clk), .rst_n (rst_n), .start (start_hi), .dither_en (1'b0), .adc_bit (1'b0),
    .rd_addr (14'd0), .rd_data (unused_rd_hi), .busy (busy_hi), .done (done_hi),
    .freq_idx (freq_idx_hi), .capture_overflow (unused_ov_hi), .ddfs_msb (unused_msb_hi),
    .step (unused_step_hi), .tap_sel (unused_tap_hi), .mag (unused_mag_hi),
    .neg_half (unused_neg_hi), .period_start (ps_hi), .stim_v (stim_hi));

  always #500 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  localparam int NSEL = 3;
  int  sel [NSEL] = '{0, 5, 10};
  real samples [NSEL][$];
  int  ps_pos [NSEL][$];   // sample index of each period_start
  real samples_hi [$];
  int  ps_hi_pos [$];

  always @(negedge clk) if (rst_n && busy_hi && freq_idx_hi == 4'd2) begin
    if (ps_hi) ps_hi_pos.push_back(samples_hi.size());
    samples_hi.push_back(stim_hi);
  end

  // Same measure as amp(), on the 10 kHz record.
  function automatic real amp_hi(int h, int a, int b, int periods);
    real re, im, pi, w;
    pi = 3.14159265358979;
    re = 0.0; im = 0.0;
    w = 2.0 * pi * h * periods / real'(b - a);
    for (int n = a; n < b; n++) begin
      re += samples_hi[n] * $cos(w * (n - a));
      im -= samples_hi[n] * $sin(w * (n - a));
    end
    return 2.0 * $sqrt(re * re + im * im) / real'(b - a);
  endfunction

  task automatic analyse_hi();
    int  a, b, k, worst_h;
    real a1, worst, x, sfdr;
    a = ps_hi_pos[1];
    b = ps_hi_pos[ps_hi_pos.size() - 1];
    k = ps_hi_pos.size() - 2;
    a1 = amp_hi(1, a, b, k);
    worst = 0.0;
    worst_h = 0;
    for (int h = 2; h <= 22; h++) begin
      x = amp_hi(h, a, b, k);
      if (x > worst) begin worst = x; worst_h = h; end
    end
    sfdr = 20.0 * $log10(a1 / worst);
    $display("f=10000 Hz: %0d periods, fundamental %.4f V, SFDR(2..22) %.1f dB (worst h%0d)", k, a1, sfdr, worst_h);
    check(a1 > 1.3873 * 0.97 && a1 < 1.3873 * 1.01, $sformatf("10 kHz fundamental %f V", a1));
    check(sfdr >= 40.0, $sformatf("10 kHz SFDR %f dB", sfdr));
  endtask

  always @(negedge clk) if (rst_n && busy) begin
    for (int s = 0; s < NSEL; s++)
      if (int'(freq_idx) == sel[s]) begin
        if (period_start) ps_pos[s].push_back(samples[s].size());
        samples[s].push_back(stim_v);
      end
  end

  function automatic real amp(int s, int h, int a, int b, int periods);
    real re, im, pi, w;
    pi = 3.14159265358979;
    re = 0.0; im = 0.0;
    w = 2.0 * pi * h * periods / real'(b - a);
    for (int n = a; n < b; n++) begin
      re += samples[s][n] * $cos(w * (n - a));
      im -= samples[s][n] * $sin(w * (n - a));
    end
    return 2.0 * $sqrt(re * re + im * im) / real'(b - a);
  endfunction

  task automatic analyse(bit dith);
    for (int s = 0; s < NSEL; s++) begin
      int a, b, k;
      real a1, worst, thd, h23, h25, sfdr;
      int  worst_h;
      // skip the first period after retuning
      a = ps_pos[s][1];
      b = ps_pos[s][ps_pos[s].size() - 1];
      k = ps_pos[s].size() - 2;
      a1 = amp(s, 1, a, b, k);
      worst = 0.0; worst_h = 0; thd = 0.0;
      for (int h = 2; h <= 22; h++) begin
        real x;
        x = amp(s, h, a, b, k);
        thd += x * x;
        if (x > worst) begin worst = x; worst_h = h; end
      end
      h23 = amp(s, 23, a, b, k);
      h25 = amp(s, 25, a, b, k);
      sfdr = 20.0 * $log10(a1 / worst);
      $display("dither=%0d f=%0d Hz: %0d periods, fundamental %.4f V, SFDR(2..22) %.1f dB (worst h%0d), THD(2..22) %.1f dB, h23 %.1f dB, h25 %.1f dB",
               dith, 1000 + 500 * sel[s], k, a1, sfdr, worst_h, 10.0 * $log10(thd / (a1 * a1)),
               20.0 * $log10(h23 / a1), 20.0 * $log10(h25 / a1));
      check(a1 > 1.3873 * 0.97 && a1 < 1.3873 * 1.01, $sformatf("fundamental %f V", a1));
      check(h23 / a1 > 0.5 / 23.0 && h23 / a1 < 1.2 / 23.0, "image at 23rd harmonic");
      check(h25 / a1 > 0.5 / 25.0 && h25 / a1 < 1.2 / 25.0, "image at 25th harmonic");
      check(sfdr >= 55.0, $sformatf("SFDR %f dB", sfdr));
      samples[s].delete();
      ps_pos[s].delete();
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int d = 0; d < 2; d++) begin
      dither_en = 1'(d);
      @(negedge clk) begin
        start = 1'b1;
        if (d == 0) start_hi = 1'b1;
      end
      @(negedge clk) begin
        start = 1'b0;
        start_hi = 1'b0;
      end
      wait (done);
      @(negedge clk);
      analyse(1'(d));
      if (d == 0) begin
        wait (done_hi);
        analyse_hi();
      end
    end
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
