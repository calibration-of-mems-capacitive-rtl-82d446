// dac_control: control logic of the sine-weighted DAC.
//
// The DDFS MSB is a square wave at 24 times the wanted stimulus frequency.
// Every rising edge of it advances a mod-24 step counter; the count is decoded
// into 24 one-hot phases, and OR gates group the phases into the switch
// controls of the DAC. One counter cycle is one sine period, so the stimulus
// frequency is the DDFS frequency / 24 (24 kHz in gives 1 kHz out), and the
// frequency changes as soon as the DDFS frequency does.
//
// Interface and timing: ddfs_msb comes from the FPGA and is treated as
// asynchronous. It passes a two-flop synchronizer and a rising-edge detector
// running on clk, so the count changes on the third clk edge after the edge of
// ddfs_msb is sampled. clk must be at least twice as fast as ddfs_msb
// (REFCLK / 2^N * M < clk / 2; the design limits M so that the DDFS runs
// below REFCLK / 3). tap_sel, mag and neg_half are decoded from the
// registered count; period_start pulses for one cycle when the count returns
// to 0. Reset clears the synchronizer and the count (step 0, zero level).
//
// The counter, reset logic, decoder and OR logic follow the design
// description. The design clocks the counter with the DDFS MSB itself; this
// version instead clocks everything with the system clock and uses the MSB's
// rising edge as an enable, which keeps the block single-clock.
module dac_control
  import bist_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              ddfs_msb,
  output logic [STEP_W-1:0] count,
  output tap_sel_t          tap_sel,
  output mag_phase_t        mag,
  output logic              neg_half,
  output logic              period_start
);
  timeunit 1ns;
  timeprecision 1ps;


  logic [2:0] msb_sync;  // [0],[1]: synchronizer, [2]: previous value
  logic       step;
  logic       wrap;
  phase_vec_t phases;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) msb_sync <= '0;
    else        msb_sync <= {msb_sync[1:0], ddfs_msb};
  end

  assign step = msb_sync[1] && !msb_sync[2];

  step_counter #(.CNT_W(STEP_W), .MODULUS(STEPS_PER_PERIOD)) u_counter (
    .clk   (clk),
    .rst_n (rst_n),
    .step  (step),
    .count (count),
    .wrap  (wrap)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) period_start <= 1'b0;
    else        period_start <= wrap;
  end

  phase_decoder u_decoder (
    .count  (count),
    .phases (phases)
  );

  switch_logic u_switches (
    .phases   (phases),
    .tap_sel  (tap_sel),
    .mag      (mag),
    .neg_half (neg_half)
  );

  // Exactly one DAC switch is closed at any time.
  a_one_tap: assert property (@(posedge clk) disable iff (!rst_n) $onehot(tap_sel));

endmodule
