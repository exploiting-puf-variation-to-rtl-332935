`timescale 1ns / 1ps
// tb_maj_vote: checks the bitwise majority vote against a bit-by-bit count made
// here, for every number of valid entries and many random response sets, plus
// hand-picked cases (even split gives 0, a strict majority of ones gives 1).
module tb_maj_vote;
  localparam int N = 8, M = 4, MW = $clog2(M + 1);
  logic [M-1:0][N-1:0] resp;
  logic [MW-1:0] n_valid;
  logic [N-1:0] voted;
  int checks = 0, failures = 0;

  maj_vote #(.N(N), .M(M)) dut (.resp, .n_valid, .voted);

  function automatic logic [N-1:0] expect_vote(logic [M-1:0][N-1:0] r, int n);
    logic [N-1:0] e;
    for (int b = 0; b < N; b++) begin
      int ones = 0;
      for (int j = 0; j < n; j++) ones += r[j][b];
      e[b] = (ones * 2 > n);
    end
    return e;
  endfunction

  task automatic check(logic [N-1:0] exp, string what);
    #1;
    checks++;
    if (voted !== exp) begin
      failures++;
      $display("FAIL %s: resp=%h n=%0d voted=%b expected=%b", what, resp, n_valid, voted, exp);
    end
  endtask

  initial begin
    // hand-picked
    resp = {8'hFF, 8'hFF, 8'h00, 8'h00}; n_valid = 4; check(8'h00, "2-2 split");
    resp = {8'h0F, 8'hFF, 8'hFF, 8'h00}; n_valid = 4; check(8'h0F, "3 of 4 low, 2-2 high");
    resp = {8'hFF, 8'hFF, 8'h00, 8'h00}; n_valid = 3; check(8'h00, "1 of 3");
    resp = {8'h00, 8'hA5, 8'hA5, 8'h5A}; n_valid = 3; check(8'hA5, "2 of 3");
    resp = {8'h00, 8'h00, 8'h00, 8'h2C}; n_valid = 1; check(8'h2C, "single");
    resp = {8'hFF, 8'hFF, 8'hFF, 8'hFF}; n_valid = 0; check(8'h00, "none valid");
    // random
    repeat (2000) begin
      for (int j = 0; j < M; j++) resp[j] = N'($urandom);
      n_valid = MW'($urandom_range(0, M));
      check(expect_vote(resp, int'(n_valid)), "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
