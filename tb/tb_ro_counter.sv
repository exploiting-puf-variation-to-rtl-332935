`timescale 1ns / 1ps
// tb_ro_counter: drives the counter with an oscillator of known period and checks
// the per-window counts. With a 31.25 ns system clock and a 2.6 ns oscillator a
// one-clock window holds 12.02 periods (count 11, 12 or 13) and a ten-clock window
// 120.2 (count 119..121). Over many back-to-back windows no period may be lost:
// the counts must add up to the periods elapsed between the first and last sample.
// Also checks that count_valid follows sample by exactly one clock.
module tb_ro_counter;
  localparam int CW = 16;
  localparam real TCLK = 31.25, TRO = 2.6;
  logic clk = 0, ro_clk = 0, rst_n = 0, sample = 0;
  logic [CW-1:0] count;
  logic count_valid;
  int checks = 0, failures = 0;
  int ro_edges = 0;

  ro_counter #(.CW(CW)) dut (.ro_clk, .clk, .rst_n, .sample, .count, .count_valid);

  always #(TCLK / 2) clk = ~clk;
  always #(TRO / 2) ro_clk = ~ro_clk;
  always @(posedge ro_clk) ro_edges++;

  task automatic check_range(int v, int lo, int hi, string what);
    checks++;
    if (v < lo || v > hi) begin
      failures++;
      $display("FAIL %s: %0d not in [%0d,%0d]", what, v, lo, hi);
    end
  endtask

  // Issue one sample pulse after `gap` idle clocks and return the reported count.
  task automatic window(int gap, output int c);
    repeat (gap) @(posedge clk);
    sample <= 1;
    @(posedge clk);
    sample <= 0;
    #1;
    checks++;
    if (!count_valid) begin failures++; $display("FAIL count_valid missing"); end
    c = int'(count);
    @(posedge clk);
    #1;
    checks++;
    if (count_valid) begin failures++; $display("FAIL count_valid longer than one clock"); end
  endtask

  initial begin
    int c, total, e0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (5) @(posedge clk);
    window(0, c);                        // prime
    e0 = ro_edges;
    total = 0;
    // one-clock windows, back to back: sample held high continuously
    sample <= 1;
    @(posedge clk);
    for (int k = 0; k < 60; k++) begin
      @(posedge clk);
      #1;
      check_range(int'(count), 11, 13, "one-clock window");
      total += int'(count);
    end
    sample <= 0;
    @(posedge clk);
    #1;
    total += int'(count);
    // 61 windows = 61 clocks = 1906.25 ns = 733.2 periods
    check_range(total, 731, 735, "sum of one-clock windows");
    for (int k = 0; k < 10; k++) begin
      window(8, c);
      check_range(c, 119, 121, "ten-clock window");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
