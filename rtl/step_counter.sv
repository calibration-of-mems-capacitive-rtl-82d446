// step_counter: 6-bit up-counter with the mod-24 reset logic of the DAC
// control.
//
// Each pulse on step advances the count by one; when the count is at
// MODULUS-1 the reset logic returns it to 0 instead, so the count runs
// 0..23 and one full cycle of it is one period of the stair-stepped sine.
// wrap pulses (combinationally, on the step that resets the count) so that
// the period boundary is visible to other logic.
//
// Timing: count is registered and changes on the clock edge of a cycle with
// step high. Reset clears the count.
//
// The 6-bit width, the reset every 24 counts and the counter advancing once
// per DDFS output period follow the design description. The design clocks the
// counter with the DDFS MSB directly; here the counter runs on the system
// clock and the DDFS edge arrives as the step enable (see dac_control).
module step_counter #(
  parameter int unsigned CNT_W   = 6,
  parameter int unsigned MODULUS = 24
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             step,
  output logic [CNT_W-1:0] count,
  output logic             wrap
);
  timeunit 1ns;
  timeprecision 1ps;


  localparam logic [CNT_W-1:0] LAST = CNT_W'(MODULUS - 1);

  assign wrap = step && (count == LAST);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    count <= '0;
    else if (wrap) count <= '0;
    else if (step) count <= count + 1'b1;
  end

  initial assert (MODULUS >= 2 && MODULUS <= (1 << CNT_W))
    else $error("step_counter: MODULUS does not fit CNT_W");

endmodule
