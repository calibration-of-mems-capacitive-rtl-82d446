// sd_modulator_model: behavioural first-order sigma-delta modulator, used only
// by testbenches in place of the readout's analog-to-digital converter.
//
// On every rising clock edge the input, normalised to 0..1 by VREF, is added
// to an integrator from which the previous output bit is subtracted; the new
// bit is 1 when the integrator is positive. The density of ones therefore
// tracks vin / VREF. Not synthesizable; the order, reference and the
// one-bit-per-clock rate are this model's own simple choices.
module sd_modulator_model #(
  parameter real VREF = 3.3
) (
  input  logic clk,
  input  logic rst_n,
  input  real  vin,
  output logic bit_out
);
  timeunit 1ns;
  timeprecision 1ps;

  real integ = 0.0;

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      integ   = 0.0;
      bit_out <= 1'b0;
    end else begin
      integ = integ + vin / VREF - (bit_out ? 1.0 : 0.0);
      bit_out <= (integ > 0.0);
    end
  end

endmodule
