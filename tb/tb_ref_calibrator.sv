`timescale 1ns / 1ps
// tb_ref_calibrator: the PUF is replaced by a scripted response source (one
// response every third clock while enabled). Each round offers K = 8 responses with
// a known most-frequent value placed at shuffled positions among other values; the
// calibrator must return that value with a one-cycle done pulse. Also checks that
// the PUF is enabled only while collecting, in the requested mode, that exactly K
// responses are taken, and the tie rule (equal counts: the earliest value wins).
module tb_ref_calibrator;
  import fia_pkg::*;
  localparam int N = 8, K = 8;
  logic clk = 0, rst_n = 0, start = 0;
  puf_mode_e cal_mode = MODE_RELIABLE;
  logic puf_en;
  puf_mode_e puf_mode;
  logic [N-1:0] puf_response;
  logic puf_resp_valid;
  logic busy, done;
  logic [N-1:0] new_ref;
  int checks = 0, failures = 0;
  logic [N-1:0] script[K];
  int idx, taken, div;

  ref_calibrator #(.N(N), .K(K)) dut (
    .clk, .rst_n, .start, .cal_mode, .puf_en, .puf_mode, .puf_response, .puf_resp_valid,
    .busy, .done, .new_ref
  );

  always #5 clk = ~clk;
  assign puf_resp_valid = puf_en && (div == 2);
  assign puf_response   = script[idx % K];
  always @(posedge clk) begin
    div <= puf_en ? (div + 1) % 3 : 0;
    if (puf_resp_valid) begin idx <= idx + 1; taken <= taken + 1; end
  end

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic round(logic [N-1:0] exp, puf_mode_e m, string what);
    int ndone, t;
    idx = 0; taken = 0; ndone = 0; t = 0;
    cal_mode <= m;
    start <= 1; @(posedge clk); start <= 0;
    #1;
    chk(busy && puf_en && puf_mode == m, {what, ": collecting in the requested mode"});
    while (t < 200) begin
      @(posedge clk); #1; t++;
      if (done) begin
        ndone++;
        chk(new_ref == exp, $sformatf("%s: new_ref %h expected %h", what, new_ref, exp));
      end
    end
    chk(ndone == 1, $sformatf("%s: %0d done pulses", what, ndone));
    chk(taken == K, $sformatf("%s: %0d responses taken", what, taken));
    chk(!busy && !puf_en, {what, ": PUF released"});
  endtask

  initial begin
    div = 0; idx = 0; taken = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (3) @(posedge clk);
    #1 chk(!puf_en && !busy, "idle");
    script = '{8'h10, 8'h2C, 8'h2C, 8'h3C, 8'h2C, 8'h2D, 8'h2C, 8'h0C};
    round(8'h2C, MODE_RELIABLE, "mode value 4 of 8");
    for (int r = 0; r < 20; r++) begin
      logic [N-1:0] winner;
      int pos[K];
      winner = N'($urandom);
      // winner 3 times; the others distinct from it and from each other
      for (int i = 0; i < K; i++) script[i] = winner ^ N'(i + 1) ^ (N'(i) << 4);
      for (int i = 0; i < K; i++) pos[i] = i;
      pos.shuffle();
      for (int i = 0; i < 3; i++) script[pos[i]] = winner;
      round(winner, (r % 2) ? MODE_UNRELIABLE : MODE_RELIABLE, "random");
    end
    // tie: A at 0,1 ; B at 2,3 ; others single -> A (first reached)
    script = '{8'hAA, 8'hAA, 8'hBB, 8'hBB, 8'h01, 8'h02, 8'h03, 8'h04};
    round(8'hAA, MODE_RELIABLE, "tie");
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
