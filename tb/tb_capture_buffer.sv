// tb_capture_buffer: self-checking testbench of the response memory.
//
// Small configuration: 3 frequencies of 64 bits, 16-bit words. For each
// frequency a random bitstream is fed with random gaps in valid, plus 10
// extra bits past the end of the record. A reference copy packs the bits LSB
// first; after the three records every word is read back (one-cycle read
// latency) and compared. overflow must rise only after the 64th bit and clear
// with the next step_start.
module tb_capture_buffer;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned NF = 3;
  localparam int unsigned BITS = 64;
  localparam int unsigned WW = 16;
  localparam int unsigned WPF = BITS / WW;

  logic          clk = 1'b0;
  logic          rst_n = 1'b0;
  logic          step_start = 1'b0;
  logic          valid = 1'b0;
  logic          bit_in = 1'b0;
  logic [1:0]    freq_idx = '0;
  logic [3:0]    rd_addr = '0;
  logic [WW-1:0] rd_data;
  logic          overflow;

  int checks = 0;
  int failures = 0;

  capture_buffer #(.NUM_FREQS(NF), .BITS_PER_FREQ(BITS), .WORD_W(WW)) dut (.*);

  always #500 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  logic [WW-1:0] expected [NF * WPF];

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int f = NF - 1; f >= 0; f--) begin  // records written out of order
      int n;
      n = 0;
      freq_idx = 2'(f);
      while (n < BITS + 10) begin
        valid = ($urandom_range(0, 3) != 0) || (n == 0);
        step_start = (n == 0) && valid;
        bit_in = 1'($urandom());
        if (valid) begin
          if (n < BITS) expected[f * WPF + n / WW][n % WW] = bit_in;
          n++;
        end
        @(negedge clk);
        check(overflow == (n > BITS), $sformatf("overflow after %0d bits", n));
      end
      valid = 1'b0;
      step_start = 1'b0;
      repeat (3) @(negedge clk);
    end
    // A new record start clears overflow.
    step_start = 1'b1; valid = 1'b0;
    @(negedge clk);
    step_start = 1'b0;
    @(negedge clk);
    check(!overflow, "overflow cleared by step_start");
    for (int a = 0; a < int'(NF * WPF); a++) begin
      rd_addr = 4'(a);
      @(negedge clk);
      check(rd_data == expected[a], $sformatf("word %0d: %h exp %h", a, rd_data, expected[a]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(1000 * 5000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
