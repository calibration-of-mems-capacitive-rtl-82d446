// phase_decoder: decode logic of the DAC control.
//
// Turns the step count 0..23 into 24 one-hot phases: phases[k] is high while
// the count equals k. A count outside 0..23 (not reachable from the step
// counter) gives no phase at all, so no DAC switch closes. Purely
// combinational.
//
// The 24 decoded phases follow the design description; the decoder is the
// plain one-hot decode of the count.
module phase_decoder
  import bist_pkg::*;
(
  input  logic [STEP_W-1:0] count,
  output phase_vec_t        phases
);
  timeunit 1ns;
  timeprecision 1ps;


  always_comb begin
    phases = '0;
    for (int k = 0; k < int'(STEPS_PER_PERIOD); k++)
      if (count == STEP_W'(k)) phases[k] = 1'b1;
  end

endmodule
