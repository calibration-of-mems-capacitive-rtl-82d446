// ddfs_accumulator: ROM-less direct digital frequency synthesizer.
//
// An N-bit phase accumulator adds the tuning word M to itself on every
// reference clock and wraps on overflow, so its most significant bit is a
// square wave of frequency Fout = M * REFCLK / 2^N. There is no
// phase-to-amplitude ROM: the MSB itself is the synthesizer output and is
// sent to the DAC control logic, which turns it into a 24-step sine. With
// N = 16 and REFCLK = 1 MHz the resolution is 15.26 Hz and M = 1573..15728
// spans 24 kHz..240 kHz.
//
// Interface and timing: m_word is copied into the M buffer register on a
// cycle with m_load high; the accumulator uses the buffered word from the next
// cycle on, so a frequency change is immediate and phase continuous (the
// accumulator is not cleared). dither is added to the buffered M word on every
// cycle; drive it with zero for a plain DDFS. phase and msb are registered.
// Reset clears the accumulator and the M buffer (output stopped).
//
// The accumulator, its width, the MSB output and M-word dithering follow the
// design description; the load strobe and the reset values are this
// implementation's choice.
module ddfs_accumulator #(
  parameter int unsigned N = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] m_word,
  input  logic         m_load,
  input  logic [N-1:0] dither,
  output logic [N-1:0] phase,
  output logic         msb
);
  timeunit 1ns;
  timeprecision 1ps;


  logic [N-1:0] m_buf;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      m_buf <= '0;
      phase <= '0;
    end else begin
      if (m_load) m_buf <= m_word;
      phase <= phase + m_buf + dither;  // wraps modulo 2^N
    end
  end

  assign msb = phase[N-1];

endmodule
