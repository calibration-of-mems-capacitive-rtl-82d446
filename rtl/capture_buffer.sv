// capture_buffer: response memory for the frequency sweep.
//
// The sigma-delta modulator's output bitstream is recorded for every stimulus
// frequency so that magnitude and phase can be extracted afterwards. Bits are
// packed LSB first into WORD_W-bit words; frequency k owns the words
// k * WORDS_PER_FREQ .. (k + 1) * WORDS_PER_FREQ - 1, so the record of each
// frequency starts at a fixed address.
//
// Interface and timing: on every cycle with valid high, bit_in is taken as
// the next bit of the record of frequency freq_idx. step_start marks the first
// bit of a record (it restarts the bit counter on the same cycle). A full word
// is written one cycle after its last bit. Bits beyond BITS_PER_FREQ in one
// record are dropped and raise overflow until the next step_start. The read
// port is synchronous: rd_data holds the word at rd_addr one cycle later.
//
// Storing the digitized response of each frequency follows the design
// description; the bit packing, the memory layout and the read port are this
// implementation's choices.
module capture_buffer #(
  parameter int unsigned NUM_FREQS     = 11,
  parameter int unsigned BITS_PER_FREQ = 16384,
  parameter int unsigned WORD_W        = 16,
  localparam int unsigned WORDS_PER_FREQ = BITS_PER_FREQ / WORD_W,
  localparam int unsigned DEPTH          = NUM_FREQS * WORDS_PER_FREQ,
  localparam int unsigned ADDR_W         = $clog2(DEPTH),
  localparam int unsigned IDX_W          = (NUM_FREQS > 1) ? $clog2(NUM_FREQS) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              step_start,
  input  logic              valid,
  input  logic              bit_in,
  input  logic [IDX_W-1:0]  freq_idx,
  input  logic [ADDR_W-1:0] rd_addr,
  output logic [WORD_W-1:0] rd_data,
  output logic              overflow
);
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned BC_W = $clog2(BITS_PER_FREQ + 1);

  logic [WORD_W-1:0] mem [DEPTH];
  logic [WORD_W-1:0] shreg;
  logic [BC_W-1:0]   bit_cnt;    // bits of the current record taken so far
  logic [BC_W-1:0]   cnt_now;    // bit_cnt, restarted by step_start
  logic              wr_en;
  logic [ADDR_W-1:0] wr_addr;
  logic [WORD_W-1:0] wr_word;
  logic              take;

  assign cnt_now = step_start ? '0 : bit_cnt;
  assign take    = valid && (cnt_now < BC_W'(BITS_PER_FREQ));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shreg    <= '0;
      bit_cnt  <= '0;
      wr_en    <= 1'b0;
      wr_addr  <= '0;
      wr_word  <= '0;
      overflow <= 1'b0;
    end else begin
      wr_en <= 1'b0;
      if (step_start) begin
        bit_cnt  <= '0;
        overflow <= 1'b0;
      end
      if (take) begin
        shreg   <= {bit_in, shreg[WORD_W-1:1]};
        bit_cnt <= cnt_now + 1'b1;
        if (cnt_now[$clog2(WORD_W)-1:0] == '1) begin
          wr_en   <= 1'b1;
          wr_word <= {bit_in, shreg[WORD_W-1:1]};
          wr_addr <= ADDR_W'(freq_idx * WORDS_PER_FREQ + 32'(cnt_now) / WORD_W);
        end
      end else if (valid) begin
        overflow <= 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_word;
    rd_data <= mem[rd_addr];
  end

  initial assert (BITS_PER_FREQ % WORD_W == 0 && (WORD_W & (WORD_W - 1)) == 0)
    else $error("capture_buffer: BITS_PER_FREQ must be a multiple of a power-of-two WORD_W");

endmodule
