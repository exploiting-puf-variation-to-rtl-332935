`timescale 1ns / 1ps
// tb_puf_bit: four test oscillators with periods 2.0, 2.2, 2.5 and 3.0 ns feed one
// response bit. For every ordered pair (top, bottom) of different oscillators the
// bit over a ten-clock window must be 1 exactly when the top oscillator is the
// faster one; both counts must match the periods within one count. A pair that
// selects the same oscillator twice must give 0 (equal counts are not "greater").
module tb_puf_bit;
  localparam int NRO = 4, SELW = 2, CW = 16;
  localparam real TCLK = 31.25;
  localparam real TRO[NRO] = '{2.0, 2.2, 2.5, 3.0};
  logic clk = 0, rst_n = 0, sample = 0;
  logic [NRO-1:0] ro = '0;
  logic [SELW-1:0] sel_top, sel_bot;
  logic resp_bit, valid;
  logic [CW-1:0] count_top, count_bot;
  int checks = 0, failures = 0;

  puf_bit #(.NRO(NRO), .CW(CW)) dut (
    .clk, .rst_n, .ro, .sel_top, .sel_bot, .sample, .resp_bit, .valid, .count_top, .count_bot
  );

  always #(TCLK / 2) clk = ~clk;
  for (genvar r = 0; r < NRO; r++) begin : g_ro
    always #(TRO[r] / 2) ro[r] = ~ro[r];
  end

  task automatic pulse_sample();
    sample <= 1;
    @(posedge clk);
    sample <= 0;
  endtask

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    sel_top = 0; sel_bot = 1;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int a = 0; a < NRO; a++) begin
      for (int b = 0; b < NRO; b++) begin
        int exp_top, exp_bot;
        sel_top = SELW'(a);
        sel_bot = SELW'(b);
        repeat (4) @(posedge clk);      // let the new selection pass the synchronizers
        pulse_sample();                  // prime
        repeat (9) @(posedge clk);
        pulse_sample();
        #1;
        chk(valid, "valid after sample");
        exp_top = int'(10.0 * TCLK / TRO[a]);
        exp_bot = int'(10.0 * TCLK / TRO[b]);
        chk(int'(count_top) >= exp_top - 1 && int'(count_top) <= exp_top + 1,
            $sformatf("top count %0d for RO %0d, expected about %0d", count_top, a, exp_top));
        chk(int'(count_bot) >= exp_bot - 1 && int'(count_bot) <= exp_bot + 1,
            $sformatf("bottom count %0d for RO %0d, expected about %0d", count_bot, b, exp_bot));
        if (a != b) chk(resp_bit == (TRO[a] < TRO[b]), $sformatf("bit for pair %0d/%0d", a, b));
        else        chk(resp_bit == 1'b0, $sformatf("bit for same RO %0d", a));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
