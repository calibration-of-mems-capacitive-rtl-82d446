// tb_dither_lfsr: self-checking testbench of the dither generator.
//
// Checks that the dither is zero and the state frozen while disabled, that
// only the DITHER_BITS low bits are ever set, that the sequence matches a
// reference 16-bit LFSR with polynomial x^16 + x^14 + x^13 + x^11 + 1, that
// every dither value appears, and that the register state does not repeat
// before 2^16 - 1 steps (maximal length).
module tb_dither_lfsr;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned W = 16;
  localparam int unsigned B = 2;

  logic         clk = 1'b0;
  logic         rst_n = 1'b0;
  logic         en = 1'b0;
  logic [W-1:0] dither;

  int checks = 0;
  int failures = 0;

  dither_lfsr #(.DITHER_W(W), .DITHER_BITS(B)) dut (.*);

  always #500 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  logic [15:0] ref_state;
  int          seen [4];

  function automatic logic [15:0] lfsr_next(logic [15:0] s);
    // taps at bit positions 16, 14, 13, 11 (1-based)
    return {s[14:0], s[15] ^ s[13] ^ s[12] ^ s[10]};
  endfunction

  initial begin
    int period;
    logic [15:0] first;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    repeat (10) begin
      @(negedge clk);
      check(dither == '0, "zero while disabled");
    end
    ref_state = 16'hACE1;
    en = 1'b1;
    #1;
    for (int i = 0; i < 5000; i++) begin
      check(dither == W'(ref_state[B-1:0]), $sformatf("dither %h != %h", dither, ref_state[B-1:0]));
      check(dither[W-1:B] == '0, "high bits zero");
      seen[dither[1:0]]++;
      @(negedge clk);
      ref_state = lfsr_next(ref_state);
    end
    for (int v = 0; v < 4; v++) check(seen[v] > 800, $sformatf("value %0d seen %0d times", v, seen[v]));
    // Freeze: disabling holds the state.
    en = 1'b0;
    repeat (7) @(negedge clk);
    en = 1'b1;
    #1;
    check(dither == W'(ref_state[B-1:0]), "state held while disabled");
    // Maximal length: the low 16 dither-relevant state returns after 65535.
    first = ref_state;
    period = 0;
    do begin
      ref_state = lfsr_next(ref_state);
      period++;
    end while (ref_state != first && period < 70000);
    check(period == 65535, $sformatf("reference period %0d", period));
    // The DUT's output sequence over a period must repeat exactly.
    begin
      logic [B-1:0] hist [64];
      for (int i = 0; i < 64; i++) begin
        hist[i] = dither[B-1:0];
        @(negedge clk);
      end
      repeat (65535 - 64) @(negedge clk);
      for (int i = 0; i < 64; i++) begin
        check(dither[B-1:0] == hist[i], "sequence repeats after 2^16-1");
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(1000 * 100_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
