`timescale 1ns / 1ps
// tb_fia_csr: bus reads and writes of every register. Checks reset values, that
// R_REF and C_REF read back what was written, that each CTRL bit produces exactly
// one one-clock pulse on its output, the STATUS field positions for known inputs,
// the saved-response and voted registers, the acknowledge one clock after a
// request, and that a finished calibration loads R_REF only while autoload is on.
module tb_fia_csr;
  import fia_pkg::*;
  localparam int N = 8, M = 4, CHW = 48, MW = 3, HW = 4;
  localparam logic [CHW-1:0] CINIT = 48'h0123_4567_89AB;
  logic clk = 0, rst_n = 0;
  logic req = 0, we = 0;
  logic [3:0] addr = 0;
  logic [31:0] wdata = 0, rdata;
  logic ack;
  logic start_fi_detect, cal_start, sw_task_start, sw_task_end;
  puf_mode_e cal_mode;
  logic [N-1:0] r_ref;
  logic [CHW-1:0] c_ref;
  logic attack_det = 0, no_det = 0, det_busy = 0, cal_busy = 0, cal_done = 0;
  det_state_e det_state = ST_IDLE;
  logic [HW-1:0] hd = 0;
  logic [MW-1:0] n_saved = 0;
  logic [M-1:0][N-1:0] saved = '0;
  logic [N-1:0] voted = 0, cal_ref = 0;
  int checks = 0, failures = 0;
  int n_start = 0, n_cal = 0, n_ts = 0, n_te = 0;

  fia_csr #(.N(N), .M(M), .CHW(CHW), .C_REF_INIT(CINIT), .R_REF_INIT(8'd44)) dut (
    .clk, .rst_n, .req, .we, .addr, .wdata, .rdata, .ack,
    .start_fi_detect, .cal_start, .sw_task_start, .sw_task_end, .cal_mode, .r_ref, .c_ref,
    .attack_det, .no_det, .det_busy, .det_state, .hd, .n_saved, .saved, .voted,
    .cal_busy, .cal_done, .cal_ref
  );

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n) begin
    n_start += start_fi_detect; n_cal += cal_start; n_ts += sw_task_start; n_te += sw_task_end;
  end

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic wr(logic [3:0] a, logic [31:0] d);
    req <= 1; we <= 1; addr <= a; wdata <= d;
    @(posedge clk);
    req <= 0; we <= 0;
    #1;
    chk(ack, "ack after write");
    @(posedge clk);
  endtask

  task automatic rd(logic [3:0] a, output logic [31:0] d);
    req <= 1; we <= 0; addr <= a;
    @(posedge clk);
    req <= 0;
    #1;
    chk(ack, "ack after read");
    d = rdata;
    @(posedge clk);
  endtask

  initial begin
    logic [31:0] d;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    rd(4'd3, d); chk(d == 32'd44, "R_REF reset value");
    rd(4'd4, d); chk(d == 32'h4567_89AB, "C_REF_LO reset value");
    rd(4'd5, d); chk(d == 32'h0000_0123, "C_REF_HI reset value");
    rd(4'd1, d); chk(d == 32'h2, "CONFIG reset: reliable, autoload");
    wr(4'd3, 32'h0000_00A5); chk(r_ref == 8'hA5, "R_REF written");
    rd(4'd3, d); chk(d == 32'hA5, "R_REF read back");
    wr(4'd4, 32'hDEAD_BEEF); wr(4'd5, 32'h0000_CAFE);
    chk(c_ref == 48'hCAFE_DEAD_BEEF, "C_REF written");
    rd(4'd5, d); chk(d == 32'h0000_CAFE, "C_REF_HI read back");
    wr(4'd1, 32'h1); chk(cal_mode == MODE_UNRELIABLE, "cal_mode set");
    // pulses
    wr(4'd0, 32'h1); wr(4'd0, 32'h2); wr(4'd0, 32'h4); wr(4'd0, 32'h8); wr(4'd0, 32'hF);
    repeat (2) @(posedge clk);
    chk(n_start == 2 && n_cal == 2 && n_ts == 2 && n_te == 2,
        $sformatf("pulse counts %0d %0d %0d %0d", n_start, n_cal, n_ts, n_te));
    // status
    attack_det = 1; no_det = 0; det_busy = 0; cal_busy = 1; det_state = ST_ALARM_PROTECT;
    hd = 4'd5; n_saved = 3'd4;
    rd(4'd2, d);
    chk(d == 32'h0400_5609, $sformatf("STATUS %h", d));
    saved = {8'h11, 8'h22, 8'h33, 8'h44}; voted = 8'h5A;
    rd(4'd6, d); chk(d == 32'h1122_3344, "SAVED_LO");
    rd(4'd7, d); chk(d == 32'h0, "SAVED_HI");
    rd(4'd8, d); chk(d == 32'h5A, "VOTED");
    // calibration result with autoload off, then on
    wr(4'd1, 32'h0);
    cal_ref = 8'h3C; cal_done = 1; @(posedge clk); cal_done = 0; @(posedge clk);
    chk(r_ref == 8'hA5, "no autoload when disabled");
    rd(4'd2, d); chk(d[4], "calibration done flag");
    wr(4'd1, 32'h2);
    cal_done = 1; @(posedge clk); cal_done = 0; @(posedge clk);
    chk(r_ref == 8'h3C, "autoload of calibrated reference");
    wr(4'd0, 32'h2);
    rd(4'd2, d); chk(!d[4], "done flag cleared by a new calibration");
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
