// dither_lfsr: pseudo-random dither for the DDFS tuning word.
//
// Adding a small random value to the M word every clock spreads the spurs
// caused by phase truncation over the band, at the cost of a slightly higher
// noise floor. A 16-bit maximal-length Fibonacci LFSR (taps 16, 14, 13, 11,
// period 2^16 - 1) steps every clock; its DITHER_BITS low bits, zero-extended
// to DITHER_W, are the dither. With en low the output is zero and the LFSR
// holds, so the synthesizer runs undithered.
//
// Timing: dither is registered-state logic, valid one cycle after en rises.
// Reset loads the non-zero seed 16'hACE1.
//
// Dithering the M word with a pseudo-random generator follows the design
// description; the LFSR polynomial, the seed and the dither amplitude
// (DITHER_BITS) are this implementation's choice.
module dither_lfsr #(
  parameter int unsigned DITHER_W    = 16,
  parameter int unsigned DITHER_BITS = 2
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  output logic [DITHER_W-1:0] dither
);
  timeunit 1ns;
  timeprecision 1ps;


  localparam logic [15:0] SEED = 16'hACE1;

  logic [15:0] lfsr;
  logic        fb;

  assign fb = lfsr[15] ^ lfsr[13] ^ lfsr[12] ^ lfsr[10];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  lfsr <= SEED;
    else if (en) lfsr <= {lfsr[14:0], fb};
  end

  always_comb begin
    dither = '0;
    if (en) dither[DITHER_BITS-1:0] = lfsr[DITHER_BITS-1:0];
  end

  initial assert (DITHER_BITS >= 1 && DITHER_BITS <= 16 && DITHER_BITS <= DITHER_W)
    else $error("dither_lfsr: DITHER_BITS out of range");

endmodule
