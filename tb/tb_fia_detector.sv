`timescale 1ns / 1ps
// tb_fia_detector: the PUF is replaced by a response source driven from here, which
// offers one response every clock (unreliable mode) while the detector enables it.
// Scenarios, each judged against the expected verdict worked out here:
//   1 all responses equal r_ref                      -> no_det, HD 0
//   2 two of the last four saved responses corrupted -> attack_det (bits at 1 in
//     r_ref lose the 3-of-4 majority), HD as computed here
//   3 one saved response corrupted                   -> no_det (outvoted)
//   4 task_end before any response                   -> attack_det
//   5 long task, early responses corrupted           -> no_det (ring keeps the last four)
//   6 a fresh start after a verdict clears it
// Also: PUF mode/enable during a run, the state sequence of the state diagram, and
// a verdict no later than three clocks after task_end.
module tb_fia_detector;
  import fia_pkg::*;
  localparam int N = 8, M = 4, CHW = 48, MW = $clog2(M + 1), HW = $clog2(N + 1);
  localparam logic [N-1:0] RREF = 8'd44;
  localparam logic [CHW-1:0] CREF = 48'hFACE_0123_4567;
  logic clk = 0, rst_n = 0;
  logic start_fi_detect = 0, task_start = 0, task_end = 0;
  logic puf_en, puf_resp_valid;
  puf_mode_e puf_mode;
  logic [CHW-1:0] puf_challenge;
  logic [N-1:0] puf_response;
  logic attack_det, no_det, busy;
  det_state_e state;
  logic [M-1:0][N-1:0] saved;
  logic [MW-1:0] n_saved;
  logic [N-1:0] voted;
  logic [HW-1:0] hd;
  int checks = 0, failures = 0;
  int resp_idx;                           // index of the response being offered
  logic [N-1:0] resp_script[64];          // response offered at index k
  logic seen[8];

  fia_detector #(.N(N), .M(M), .CHW(CHW)) dut (
    .clk, .rst_n, .start_fi_detect, .task_start, .task_end, .r_ref(RREF), .c_ref(CREF),
    .puf_en, .puf_mode, .puf_challenge, .puf_response, .puf_resp_valid,
    .attack_det, .no_det, .busy, .state, .saved, .n_saved, .voted, .hd
  );

  always #5 clk = ~clk;

  // response source: a new response every clock while enabled in unreliable mode
  assign puf_resp_valid = puf_en && puf_mode == MODE_UNRELIABLE;
  assign puf_response   = resp_script[resp_idx % 64];
  always @(posedge clk) if (puf_resp_valid) resp_idx <= resp_idx + 1;
  always @(posedge clk) if (rst_n) seen[state] = 1'b1;

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic pulse_start();
    start_fi_detect <= 1; @(posedge clk); start_fi_detect <= 0;
  endtask
  task automatic pulse_task_start();
    task_start <= 1; @(posedge clk); task_start <= 0;
  endtask
  task automatic pulse_task_end();
    task_end <= 1; @(posedge clk); task_end <= 0;
  endtask

  // Run one detection with a task of `len` clocks; return the clocks from task_end
  // to the verdict.
  task automatic run(int len, output int lat);
    resp_idx = 0;
    pulse_start();
    @(posedge clk);
    @(posedge clk);
    #1;
    chk(puf_en && puf_mode == MODE_UNRELIABLE, "PUF in unreliable mode during the run");
    chk(puf_challenge == CREF, "reference challenge applied");
    chk(busy && !attack_det && !no_det, "busy, no verdict yet");
    resp_idx = 0;
    pulse_task_start();
    repeat (len) @(posedge clk);
    pulse_task_end();
    lat = 0;
    while (!attack_det && !no_det && lat < 20) begin @(posedge clk); #1; lat++; end
    chk(lat <= 3, $sformatf("verdict %0d clocks after task_end", lat));
    chk(!puf_en && puf_mode == MODE_RELIABLE, "PUF released after the verdict");
  endtask

  function automatic int popcount(logic [N-1:0] v);
    int c = 0;
    for (int b = 0; b < N; b++) c += v[b];
    return c;
  endfunction

  initial begin
    int lat;
    logic [N-1:0] bad;
    foreach (seen[i]) seen[i] = 0;
    foreach (resp_script[i]) resp_script[i] = RREF;
    resp_idx = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (2) @(posedge clk);
    chk(state == ST_IDLE && !puf_en && !busy, "idle after reset");

    // 1: clean run. Responses are saved every other clock (ask, save).
    run(12, lat);
    chk(no_det && !attack_det && hd == 0, "clean run gives no_det");
    chk(n_saved == MW'(M), "four responses saved");
    chk(voted == RREF, "voted equals reference");
    repeat (5) @(posedge clk); #1;
    chk(no_det, "no_det held");

    // 2: a 12-clock task saves responses 0,2,4,...; the ring keeps the last four
    // saved. Corrupt every response from index 6 on: at least two of the four kept.
    bad = 8'b1101_0011;                 // differs from 44 = 0010_1100 in every bit
    foreach (resp_script[i]) resp_script[i] = (i >= 6) ? bad : RREF;
    run(12, lat);
    begin
      logic [M-1:0][N-1:0] s;
      logic [N-1:0] e;
      s = saved;
      for (int b = 0; b < N; b++) begin
        int ones;
        ones = 0;
        for (int j = 0; j < M; j++) ones += s[j][b];
        e[b] = ones * 2 > M;
      end
      chk(attack_det && !no_det, "corrupted responses raise attack_det");
      chk(voted == e, $sformatf("voted %b, expected %b", voted, e));
      chk(int'(hd) == popcount(e ^ RREF), $sformatf("HD %0d", hd));
      chk(int'(hd) > 0, "HD non-zero");
    end

    // 3: exactly one corrupted response among the saved: outvoted
    foreach (resp_script[i]) resp_script[i] = RREF;
    resp_script[8] = bad;
    run(12, lat);
    chk(no_det && !attack_det, "single corrupted response is outvoted");

    // 4: task_end right after task_start: no response saved
    resp_idx = 0;
    pulse_start();
    @(posedge clk);
    pulse_task_start();
    pulse_task_end();
    repeat (4) @(posedge clk); #1;
    chk(attack_det, "no response collected raises attack_det");
    chk(n_saved == 0, "nothing saved");

    // 5: long task; corrupted responses early on drop out of the ring
    foreach (resp_script[i]) resp_script[i] = (i < 20) ? bad : RREF;
    run(40, lat);
    chk(no_det, "early corruption overwritten by later responses");

    // 6: start clears the previous verdict
    pulse_start();
    #1;
    chk(!attack_det && !no_det, "start clears the verdict");
    @(posedge clk); @(posedge clk); #1;
    chk(state == ST_WAIT_TASK, "waiting for the task");

    foreach (seen[i]) chk(seen[i], $sformatf("state %0d visited", i));
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
