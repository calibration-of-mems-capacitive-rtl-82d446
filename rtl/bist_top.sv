// bist_top: electrical-stimulus BIST for a capacitive MEMS accelerometer,
// stimulus generation and response capture.
//
// Instead of shaking the accelerometer, the test excites it electrically with
// a sine-like voltage swept over 1 kHz .. 6 kHz and records the digitized
// response of the existing readout (C2V, gain, sigma-delta modulator) at each
// frequency. The chain built here is:
//   sweep_controller -> M word -> ddfs_accumulator (+ dither_lfsr)
//     -> DDFS MSB (24 x stimulus frequency) -> dac_control (mod-24 counter,
//        decoder, OR switch logic) -> resistor_string_dac -> dac_output_stage
//     -> stim_v, the stimulus voltage for the MEMS device;
//   adc_bit (modulator bitstream from the readout) -> capture_buffer.
// The MEMS device, C2V, gain stage and modulator are analog parts outside this
// block; stim_v leaves on a port and the bitstream returns on adc_bit.
//
// Interface and timing: one clock (clk, the 1 MHz reference) for everything.
// start begins a sweep; for each of the 11 frequencies the DDFS is retuned and
// DWELL_CYCLES bits of adc_bit are stored (one per clock). done rises after the
// last frequency. The stored words are read through rd_addr/rd_data (one-cycle
// latency); the record of frequency k starts at word k * DWELL_CYCLES / 16.
// dither_en adds pseudo-random dither to the tuning word. ddfs_msb, step,
// tap_sel, mag and neg_half bring the digital stimulus state out for test.
// The stimulus is at ddfs frequency / 24 and reacts to a new M word within
// about four clocks plus one DDFS period.
//
// The partition (DDFS, 24-step DAC control, resistor DAC with filter and
// follower), the 16-bit accumulator, the 1 MHz clock and the sweep follow the
// design description. In the design the DDFS and the capture memory sit in an
// FPGA and the DAC on the test chip; here both halves share one clock and one
// module. The dwell time, the capture format and the dither amplitude are this
// implementation's choices.
module bist_top
  import bist_pkg::*;
#(
  parameter int unsigned N            = 16,
  parameter int unsigned REFCLK_HZ    = 1_000_000,
  parameter int unsigned F_START_HZ   = 1000,
  parameter int unsigned F_STOP_HZ    = 6000,
  parameter int unsigned F_STEP_HZ    = 500,
  parameter int unsigned DWELL_CYCLES = 16384,
  parameter int unsigned DITHER_BITS  = 2,
  parameter int unsigned WORD_W       = 16,
  parameter real         TAU_NS       = 1000.0,
  localparam int unsigned NUM_FREQS   = (F_STOP_HZ - F_START_HZ) / F_STEP_HZ + 1,
  localparam int unsigned IDX_W       = (NUM_FREQS > 1) ? $clog2(NUM_FREQS) : 1,
  localparam int unsigned ADDR_W      = $clog2(NUM_FREQS * (DWELL_CYCLES / WORD_W))
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic              dither_en,
  input  logic              adc_bit,
  input  logic [ADDR_W-1:0] rd_addr,
  output logic [WORD_W-1:0] rd_data,
  output logic              busy,
  output logic              done,
  output logic [IDX_W-1:0]  freq_idx,
  output logic              capture_overflow,
  output logic              ddfs_msb,
  output logic [STEP_W-1:0] step,
  output tap_sel_t          tap_sel,
  output mag_phase_t        mag,
  output logic              neg_half,
  output logic              period_start,
  output real               stim_v
);
  timeunit 1ns;
  timeprecision 1ps;

  logic [N-1:0] m_word;
  logic         m_load;
  logic         step_start;
  logic         capture_en;
  logic [N-1:0] dither;
  real          vtap;

  sweep_controller #(
    .N            (N),
    .REFCLK_HZ    (REFCLK_HZ),
    .DIV          (STEPS_PER_PERIOD),
    .F_START_HZ   (F_START_HZ),
    .F_STOP_HZ    (F_STOP_HZ),
    .F_STEP_HZ    (F_STEP_HZ),
    .DWELL_CYCLES (DWELL_CYCLES)
  ) u_sweep (
    .clk        (clk),
    .rst_n      (rst_n),
    .start      (start),
    .m_word     (m_word),
    .m_load     (m_load),
    .step_start (step_start),
    .capture_en (capture_en),
    .freq_idx   (freq_idx),
    .busy       (busy),
    .done       (done)
  );

  dither_lfsr #(.DITHER_W(N), .DITHER_BITS(DITHER_BITS)) u_dither (
    .clk    (clk),
    .rst_n  (rst_n),
    .en     (dither_en),
    .dither (dither)
  );

  ddfs_accumulator #(.N(N)) u_ddfs (
    .clk    (clk),
    .rst_n  (rst_n),
    .m_word (m_word),
    .m_load (m_load),
    .dither (dither),
    .phase  (),
    .msb    (ddfs_msb)
  );

  dac_control u_dac_ctrl (
    .clk          (clk),
    .rst_n        (rst_n),
    .ddfs_msb     (ddfs_msb),
    .count        (step),
    .tap_sel      (tap_sel),
    .mag          (mag),
    .neg_half     (neg_half),
    .period_start (period_start)
  );

  resistor_string_dac u_rdac (
    .tap_sel (tap_sel),
    .vtap    (vtap)
  );

  dac_output_stage #(.TAU_NS(TAU_NS)) u_out (
    .vin  (vtap),
    .vout (stim_v)
  );

  capture_buffer #(
    .NUM_FREQS     (NUM_FREQS),
    .BITS_PER_FREQ (DWELL_CYCLES),
    .WORD_W        (WORD_W)
  ) u_capture (
    .clk        (clk),
    .rst_n      (rst_n),
    .step_start (step_start),
    .valid      (capture_en),
    .bit_in     (adc_bit),
    .freq_idx   (freq_idx),
    .rd_addr    (rd_addr),
    .rd_data    (rd_data),
    .overflow   (capture_overflow)
  );

endmodule
