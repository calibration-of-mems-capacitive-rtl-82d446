// tb_mems_response: the stimulus generator driving a sensor model through
// a full frequency sweep, checking that the electrical response shows the
// sensor's second-order behaviour.
//
// bist_top sweeps 1 kHz .. 6 kHz in 500 Hz steps at its default settings;
// its stimulus drives mems_model (see that file). Because the electrostatic
// force goes with V^2, the mass must move at twice the stimulus frequency.
// At each of the 11 sweep steps, 4 ms after the step starts, the testbench
// correlates displacement and force against cos/sin at f and 2f, over a
// whole number of periods (about 8 ms), sampling every 100 ns. It checks:
//   * the motion at f is at least 40 dB below the motion at 2f;
//   * |X(2f)| / |F(2f)| is within 2 % of the second-order response
//     |1 / (k - m w^2 + j b w)| at w = 2 pi * 2f;
//   * the phase lag of X behind F is within 2 deg of that response;
//   * the mean displacement over mean force is 1/k within 1 %;
//   * at 6 kHz the 2f motion has fallen to under a quarter of that at
//     1 kHz (the response rolls off above the 5.1 kHz resonance).
// The capacitance change also passes a linear readout, 0.8 V + 20 mV/fF,
// standing in for the capacitance-to-voltage converter, into the
// sigma-delta modulator model, whose bits bist_top records. After the
// sweep the testbench reads the whole capture memory back. For each
// frequency it takes a Hann-windowed DFT of the stored bits 2048 .. 16383
// at 2f. The amplitude recovered from the memory must match the readout's
// analog 2f amplitude within 3 %, and its phase, taken against the time
// at which the record of that frequency starts, must match the analog 2f
// phase within 3 deg (the modulator and capture add about a clock).
// Mechanical stimulus: the same sensor, and one with a 10 % stiffer spring
// (one of the parameter spreads the electrical test has to reveal), are
// also shaken with 1 g at the same 2f while their plates sit at the bias.
// Their 2f motion per unit inertial force must follow the second-order
// response of each within 2 %. The stiff sensor also runs under the
// electrical stimulus. The ratio stiff/nominal of the electrical 2f
// response must equal the mechanical one within 1 % at every frequency:
// the electrical test sees the same change the shaker would.
// The exact stimulus frequency is M * 1 MHz / (24 * 2^16) with M the
// rounded tuning word of each step.
module tb_mems_response;
  timeunit 1ns;
  timeprecision 1ps;
  import bist_pkg::*;

  localparam int  NF   = 11;
  localparam real PI   = 3.14159265358979;
  localparam real MASS = 3.4e-9;
  localparam real K    = 3.5;
  localparam real ZETA = 0.7;
  localparam real G_C2V = 20.0e-3 / 1.0e-15;  // V per F of the readout
  localparam real V_C2V = 0.8;                 // readout output at rest
  localparam real VREF  = 3.3;                 // modulator full scale
  localparam int  DWELL = 16384;
  localparam int  WPF   = DWELL / 16;
  localparam int  SKIP  = 2048;                // bits left out while settling
  localparam real K_VAR = 1.1 * K;             // stiffer spring
  localparam real A0    = 9.81;                // mechanical stimulus, m/s^2

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
  real         x, fel, dcap;
  real         v_c2v;
  real         no_accel = 0.0;
  real         v_bias = 1.65;
  real         a_mech = 0.0;   // 1 g at 2f
  real         f_mech = 0.0;   // its frequency, Hz
  real         xv, xm, xvm;    // stiff electrical, nominal and stiff mechanical
  real         unused_f [3];
  real         unused_c [3];

  int checks = 0;
  int failures = 0;

  bist_top dut (.*);

  mems_model #(.MASS(MASS), .K(K), .ZETA(ZETA)) sensor (
    .vin   (stim_v),
    .accel (no_accel),
    .x     (x),
    .fel   (fel),
    .dcap  (dcap)
  );

  mems_model #(.MASS(MASS), .K(K_VAR), .ZETA(ZETA)) sensor_var (
    .vin (stim_v), .accel (no_accel), .x (xv), .fel (unused_f[0]), .dcap (unused_c[0]));
  mems_model #(.MASS(MASS), .K(K), .ZETA(ZETA)) sensor_mech (
    .vin (v_bias), .accel (a_mech), .x (xm), .fel (unused_f[1]), .dcap (unused_c[1]));
  mems_model #(.MASS(MASS), .K(K_VAR), .ZETA(ZETA)) sensor_var_mech (
    .vin (v_bias), .accel (a_mech), .x (xvm), .fel (unused_f[2]), .dcap (unused_c[2]));

  always begin
    #100;
    a_mech = A0 * $sin(2.0 * PI * f_mech * ($realtime * 1.0e-9));
  end

  always @(dcap) v_c2v = V_C2V + G_C2V * dcap;

  sd_modulator_model #(.VREF(VREF)) u_adc (
    .clk     (clk),
    .rst_n   (rst_n),
    .vin     (v_c2v),
    .bit_out (adc_bit)
  );

  always #500 clk = ~clk;  // 1 MHz reference

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  function automatic real absr(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  // Phase difference wrapped to -180 .. 180 deg.
  function automatic real wrap_deg(real d);
    while (d > 180.0) d -= 360.0;
    while (d < -180.0) d += 360.0;
    return d;
  endfunction

  // Reads the capture memory back and compares the 2f amplitude in the
  // stored bits of each frequency with the analog one.
  task automatic read_capture();
    logic [15:0] mem [NF * WPF];
    real th, w, re, im, wsum, vd, pd;
    int  bitv;
    @(negedge clk);
    for (int a = 0; a < NF * WPF; a++) begin
      rd_addr = 14'(a);
      @(negedge clk);
      mem[a] = rd_data;
    end
    for (int i = 0; i < NF; i++) begin
      re = 0.0;
      im = 0.0;
      wsum = 0.0;
      for (int j = SKIP; j < DWELL; j++) begin
        bitv = int'(mem[i * WPF + j / 16][j % 16]);
        w    = 0.5 - 0.5 * $cos(2.0 * PI * (j - SKIP) / (DWELL - SKIP - 1));
        th   = 2.0 * PI * 2.0 * fstim[i] * (t0[i] + j * 1000.0) * 1.0e-9;
        re  += w * bitv * $cos(th);
        im  += w * bitv * $sin(th);
        wsum += w;
      end
      vd = 2.0 * VREF * $sqrt(re * re + im * im) / wsum;
      pd = $atan2(-im, re) * 180.0 / PI;
      $display("f %7.1f Hz: 2f from captured bits %0.4f V %6.1f deg, at the readout %0.4f V %6.1f deg",
               fstim[i], vd, pd, vamp2[i], vph2[i]);
      check(absr(wrap_deg(pd - vph2[i])) < 3.0, $sformatf("%0.0f Hz: captured 2f phase off the readout", fstim[i]));
      check(absr(vd / vamp2[i] - 1.0) < 0.03, $sformatf("%0.0f Hz: captured 2f amplitude off the readout", fstim[i]));
    end
  endtask

  real amp2 [NF];
  real vamp2 [NF];  // analog 2f amplitude at the readout output, V
  real fstim [NF];
  real vph2 [NF];   // analog 2f phase at the readout output, deg
  real t0 [NF];     // time the record of each frequency starts, ns

  initial begin
    real f, t2_ns, w, th, hmag, hph, b;
    real xc2, xs2, fc2, fs2, xc1, xs1, xsum, fsum;
    real ax2, af2, ax1, ph_meas, dcap_max, cc2, cs2;
    real vc, vs, mc, ms, vmc, vms, bv, hmv, r_el, r_me, am, avm;
    int  m, kper, n;
    b = 2.0 * ZETA * $sqrt(K * MASS);
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    for (int i = 0; i < NF; i++) begin
      wait (freq_idx == 4'(i) && busy);
      t0[i] = $realtime;
      m      = int'($floor((1000.0 + 500.0 * i) * 24.0 * 65536.0 / 1.0e6 + 0.5));
      f      = m * 1.0e6 / (24.0 * 65536.0);
      f_mech = 2.0 * f;
      #4_000_000;
      t2_ns = 1.0e9 / (2.0 * f);
      kper  = 2 * int'($floor(8.0e6 / (2.0 * t2_ns)));
      n     = int'($floor(kper * t2_ns / 100.0 + 0.5));
      xc2 = 0.0; xs2 = 0.0; fc2 = 0.0; fs2 = 0.0;
      xc1 = 0.0; xs1 = 0.0; xsum = 0.0; fsum = 0.0;
      dcap_max = 0.0;
      cc2 = 0.0; cs2 = 0.0;
      vc = 0.0; vs = 0.0; mc = 0.0; ms = 0.0; vmc = 0.0; vms = 0.0;
      #50;
      for (int s = 0; s < n; s++) begin
        th   = 2.0 * PI * 2.0 * f * ($realtime * 1.0e-9);
        xc2 += x * $cos(th);
        xs2 += x * $sin(th);
        fc2 += fel * $cos(th);
        fs2 += fel * $sin(th);
        xc1 += x * $cos(th / 2.0);
        xs1 += x * $sin(th / 2.0);
        xsum += x;
        fsum += fel;
        if (dcap > dcap_max) dcap_max = dcap;
        cc2 += dcap * $cos(th);
        vc  += xv * $cos(th);
        vs  += xv * $sin(th);
        mc  += xm * $cos(th);
        ms  += xm * $sin(th);
        vmc += xvm * $cos(th);
        vms += xvm * $sin(th);
        cs2 += dcap * $sin(th);
        #100;
      end
      ax2 = $sqrt(xc2 * xc2 + xs2 * xs2);
      af2 = $sqrt(fc2 * fc2 + fs2 * fs2);
      ax1 = $sqrt(xc1 * xc1 + xs1 * xs1);
      amp2[i] = 2.0 * ax2 / n;
      vamp2[i] = G_C2V * 2.0 * $sqrt(cc2 * cc2 + cs2 * cs2) / n;
      fstim[i] = f;
      vph2[i] = $atan2(-cs2, cc2) * 180.0 / PI;
      // Phase of a component is atan2(-sin sum, cos sum); X lags F.
      ph_meas = wrap_deg(($atan2(-xs2, xc2) - $atan2(-fs2, fc2)) * 180.0 / PI);
      w    = 2.0 * PI * 2.0 * f;
      hmag = 1.0 / $sqrt((K - MASS * w * w) * (K - MASS * w * w) + (b * w) * (b * w));
      hph  = -$atan2(b * w, K - MASS * w * w) * 180.0 / PI;
      $display("f %7.1f Hz: |X/F| at 2f %0.4e m/N (model %0.4e), phase %6.1f deg (model %6.1f), f/2f %0.1f dB, x(2f) %0.1f nm, peak dC %0.1f fF",
               f, ax2 / af2, hmag, ph_meas, hph, 20.0 * $log10(ax1 / ax2), amp2[i] * 1.0e9, dcap_max * 1.0e15);
      check(ax1 < 0.01 * ax2, $sformatf("%0.0f Hz: motion at f not 40 dB below 2f", f));
      check(absr(ax2 / af2 / hmag - 1.0) < 0.02, $sformatf("%0.0f Hz: |X/F| off the second-order response", f));
      check(absr(wrap_deg(ph_meas - hph)) < 2.0, $sformatf("%0.0f Hz: phase off the second-order response", f));
      check(absr(xsum / fsum * K - 1.0) < 0.01, $sformatf("%0.0f Hz: static deflection not F/k", f));
      // Mechanical stimulus, nominal and stiff sensor.
      bv  = 2.0 * ZETA * $sqrt(K_VAR * MASS);
      hmv = 1.0 / $sqrt((K_VAR - MASS * w * w) * (K_VAR - MASS * w * w) + (bv * w) * (bv * w));
      am  = 2.0 * $sqrt(mc * mc + ms * ms) / n;
      avm = 2.0 * $sqrt(vmc * vmc + vms * vms) / n;
      r_el = $sqrt(vc * vc + vs * vs) / ax2;
      r_me = avm / am;
      $display("           mechanical 1 g: x(2f) %0.2f nm nominal, %0.2f nm stiff; stiff/nominal %0.4f electrical, %0.4f mechanical",
               am * 1.0e9, avm * 1.0e9, r_el, r_me);
      check(absr(am / (MASS * A0) / hmag - 1.0) < 0.02, $sformatf("%0.0f Hz: mechanical response off the model", f));
      check(absr(avm / (MASS * A0) / hmv - 1.0) < 0.02, $sformatf("%0.0f Hz: stiff mechanical response off the model", f));
      check(absr(r_el / r_me - 1.0) < 0.01, $sformatf("%0.0f Hz: electrical and mechanical see different changes", f));
    end
    check(amp2[NF-1] < 0.25 * amp2[0], "response at 6 kHz rolled off below a quarter of 1 kHz");
    wait (done);
    read_capture();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #300_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
