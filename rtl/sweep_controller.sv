// sweep_controller: frequency sweep of the electrical stimulus.
//
// The MEMS device is excited at stimulus frequencies from F_START_HZ to
// F_STOP_HZ in F_STEP_HZ steps (1 kHz .. 6 kHz in 500 Hz steps: 11
// frequencies) and its response is recorded at each one. The stimulus runs at
// the DDFS frequency / DIV, so for stimulus frequency f the DDFS tuning word is
//   M = round(f * DIV * 2^N / REFCLK_HZ)
// e.g. 1573 for 1 kHz and 9437 for 6 kHz with DIV = 24, N = 16, 1 MHz. The
// table of M words is computed from that formula at elaboration.
//
// Interface and timing: a start pulse (in IDLE or DONE) begins a sweep. For
// frequency index k the controller drives m_word = M(k) with a one-cycle
// m_load and a one-cycle step_start, then holds capture_en high for
// DWELL_CYCLES cycles, starting with the step_start cycle, before it moves to
// the next frequency. freq_idx names the frequency being recorded. After the
// last one it loads M = 0, which stops the DDFS, and raises done until the
// next start. busy is high from the cycle after start to the end of the last
// dwell.
//
// The sweep range and step, the tuning-word relation and the division by 24
// follow the design description; the dwell time, the start/done handshake and
// stopping the DDFS after the sweep are this implementation's choices.
module sweep_controller #(
  parameter int unsigned N            = 16,
  parameter int unsigned REFCLK_HZ    = 1_000_000,
  parameter int unsigned DIV          = 24,
  parameter int unsigned F_START_HZ   = 1000,
  parameter int unsigned F_STOP_HZ    = 6000,
  parameter int unsigned F_STEP_HZ    = 500,
  parameter int unsigned DWELL_CYCLES = 16384,
  localparam int unsigned NUM_FREQS   = (F_STOP_HZ - F_START_HZ) / F_STEP_HZ + 1,
  localparam int unsigned IDX_W       = (NUM_FREQS > 1) ? $clog2(NUM_FREQS) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  output logic [N-1:0]     m_word,
  output logic             m_load,
  output logic             step_start,
  output logic             capture_en,
  output logic [IDX_W-1:0] freq_idx,
  output logic             busy,
  output logic             done
);
  timeunit 1ns;
  timeprecision 1ps;

  typedef logic [N-1:0] m_table_t [NUM_FREQS];

  function automatic m_table_t build_m_table();
    m_table_t t;
    longint unsigned num;
    for (int k = 0; k < int'(NUM_FREQS); k++) begin
      num  = (longint'(F_START_HZ) + longint'(k) * F_STEP_HZ) * DIV * (64'd1 << N);
      t[k] = N'((num + longint'(REFCLK_HZ) / 2) / longint'(REFCLK_HZ));
    end
    return t;
  endfunction

  localparam m_table_t M_TABLE = build_m_table();
  localparam int unsigned DW_W = $clog2(DWELL_CYCLES + 1);

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_DONE} state_t;

  state_t          state;
  logic [DW_W-1:0] dwell;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      dwell      <= '0;
      freq_idx   <= '0;
      m_word     <= '0;
      m_load     <= 1'b0;
      step_start <= 1'b0;
    end else begin
      m_load     <= 1'b0;
      step_start <= 1'b0;
      case (state)
        S_IDLE, S_DONE: begin
          if (start) begin
            state      <= S_RUN;
            freq_idx   <= '0;
            dwell      <= '0;
            m_word     <= M_TABLE[0];
            m_load     <= 1'b1;
            step_start <= 1'b1;
          end
        end
        S_RUN: begin
          if (dwell == DW_W'(DWELL_CYCLES - 1)) begin
            dwell <= '0;
            if (freq_idx == IDX_W'(NUM_FREQS - 1)) begin
              state  <= S_DONE;
              m_word <= '0;
              m_load <= 1'b1;
            end else begin
              freq_idx   <= freq_idx + 1'b1;
              m_word     <= M_TABLE[freq_idx + 1'b1];
              m_load     <= 1'b1;
              step_start <= 1'b1;
            end
          end else begin
            dwell <= dwell + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign capture_en = (state == S_RUN);
  assign busy       = (state == S_RUN);
  assign done       = (state == S_DONE);

  // The DDFS must stay below a third of the reference clock.
  initial assert (longint'(F_STOP_HZ) * DIV * 3 < longint'(REFCLK_HZ))
    else $error("sweep_controller: DDFS frequency above REFCLK/3");

endmodule
