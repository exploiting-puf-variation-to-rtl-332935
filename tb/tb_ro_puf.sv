`timescale 1ns / 1ps
// tb_ro_puf: a 3-bit PUF over four test oscillators (periods 2.0, 2.2, 2.6, 3.2 ns)
// with a shortened 20-clock reliable window. Checks:
//  - ro_en follows en; nothing is reported while the PUF is off;
//  - reliable mode: one response every 20 clocks, equal to the frequency order of
//    each selected pair;
//  - unreliable mode: one response every clock, and the same response for the pairs
//    picked here, whose counts differ by more than one per clock;
//  - the response changes with the challenge (the low field of each bit's
//    challenge selects the oscillator of the upper counter).
module tb_ro_puf;
  import fia_pkg::*;
  localparam int NRO = 4, NRESP = 3, SELW = 2, CHW = NRESP * 2 * SELW, RW = 20;
  localparam real TCLK = 31.25;
  localparam real TRO[NRO] = '{2.0, 2.2, 2.6, 3.2};
  logic clk = 0, rst_n = 0, en = 0;
  puf_mode_e mode = MODE_RELIABLE;
  logic [CHW-1:0] challenge;
  logic ro_en;
  logic [NRO-1:0] ro = '0;
  logic [NRESP-1:0] response;
  logic resp_valid;
  int checks = 0, failures = 0;
  int nvalid = 0;

  ro_puf #(.NRO(NRO), .NRESP(NRESP), .RELIABLE_WINDOW(RW)) dut (
    .clk, .rst_n, .en, .mode, .challenge, .ro_en, .ro, .response, .resp_valid
  );

  always #(TCLK / 2) clk = ~clk;
  for (genvar r = 0; r < NRO; r++) begin : g_ro
    always #(TRO[r] / 2) ro[r] = ro_en ? ~ro[r] : 1'b0;
  end
  always @(posedge clk) if (rst_n && resp_valid) nvalid++;

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic logic [CHW-1:0] mkch(int t0, int b0, int t1, int b1, int t2, int b2);
    return {SELW'(b2), SELW'(t2), SELW'(b1), SELW'(t1), SELW'(b0), SELW'(t0)};
  endfunction

  function automatic logic [NRESP-1:0] expect_resp(logic [CHW-1:0] c);
    logic [NRESP-1:0] e;
    for (int i = 0; i < NRESP; i++)
      e[i] = TRO[c[i*2*SELW +: SELW]] < TRO[c[i*2*SELW + SELW +: SELW]];
    return e;
  endfunction

  // Wait for `n` responses; check each against `exp` and the spacing against `gap`.
  task automatic collect(int n, int gap, logic [NRESP-1:0] exp, string what);
    int t_last, t;
    t_last = -1; t = 0;
    for (int k = 0; k < n; k++) begin
      do begin @(posedge clk); t++; end while (!resp_valid);
      chk(response == exp, $sformatf("%s response %b expected %b", what, response, exp));
      if (t_last >= 0) chk(t - t_last == gap, $sformatf("%s spacing %0d expected %0d", what, t - t_last, gap));
      t_last = t;
    end
  endtask

  initial begin
    logic [CHW-1:0] c1, c2;
    c1 = mkch(0, 3, 2, 1, 1, 2);     // 1, 0, 1
    c2 = mkch(3, 0, 0, 2, 2, 3);     // 0, 1, 1
    challenge = c1;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (50) @(posedge clk);
    chk(nvalid == 0 && !ro_en, "idle PUF reports nothing");
    en <= 1;
    @(posedge clk); #1;
    chk(ro_en, "ro_en follows en");
    collect(4, RW, expect_resp(c1), "reliable c1");
    mode <= MODE_UNRELIABLE;
    collect(30, 1, expect_resp(c1), "unreliable c1");
    challenge = c2;
    repeat (5) @(posedge clk);
    collect(30, 1, expect_resp(c2), "unreliable c2");
    mode <= MODE_RELIABLE;
    repeat (2) @(posedge clk);       // the last unreliable response may still be reported
    collect(3, RW, expect_resp(c2), "reliable c2");
    en <= 0;
    repeat (2) @(posedge clk);
    nvalid = 0;
    repeat (60) @(posedge clk);
    chk(nvalid == 0 && !ro_en, "PUF off again");
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
