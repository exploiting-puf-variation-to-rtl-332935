`timescale 1ns / 1ps
// tb_fia_puf_top: end-to-end test of the detector subsystem at its default sizes,
// with a 32 MHz system clock. Software actions go through the register port; the
// protected operation is modelled here by task_start/task_end pulses around a run
// of clocks.
//
//  1 choose a challenge from the oscillator variation of the model: every bit
//    compares two oscillators whose frequencies differ by more than 9 %, so their
//    order is clear even in one-clock windows; orientation alternates bit by bit;
//  2 calibrate in reliable mode; the reference must equal the frequency order;
//  3 key-generation port: reliable responses equal the reference;
//  4 attack-free runs (short task, long task overwriting the ring of saved
//    responses, task timed by software)                  -> no_det every time;
//  5 clock glitching: a burst of 4 ns clock cycles       -> attack_det;
//  6 supply underfeeding below the oscillator threshold  -> attack_det;
//  7 supply glitches: the supply shorted to 0 V for 28 ns in each of ten
//    consecutive clocks -> attack_det;
//  8 moderate underfeeding (650 mV): verdict reported, not judged;
//  9 recalibration in unreliable mode gives the same reference, and a run after it
//    is clean.
// Every mechanism is counted; one that never happened counts as a failure.
module tb_fia_puf_top;
  import fia_pkg::*;
  localparam int NRO = 8, NRESP = 8, SELW = 3, CHW = 48;
  localparam real HALF = 15.625;            // 32 MHz
  localparam int unsigned SEED = 32'h1234_5678;

  logic clk = 0, rst_n = 0;
  logic [11:0] vdd_mv = 12'd1000;
  logic bus_req = 0, bus_we = 0;
  logic [3:0] bus_addr = 0;
  logic [31:0] bus_wdata = 0, bus_rdata;
  logic bus_ack;
  logic task_start = 0, task_end = 0;
  logic attack_det, no_det;
  logic kg_en = 0;
  logic [NRESP-1:0] kg_response;
  logic kg_valid;
  int checks = 0, failures = 0;
  int glitch_cycles = 0;
  int n_cal_rel = 0, n_cal_unrel = 0, n_kg = 0, n_no_det = 0, n_attack = 0, n_ring = 0,
      n_clk_glitch = 0, n_underfeed = 0, n_vdd_glitch = 0, n_mode_switch = 0, n_sw_task = 0;

  fia_puf_top dut (
    .clk, .rst_n, .vdd_mv,
    .bus_req, .bus_we, .bus_addr, .bus_wdata, .bus_rdata, .bus_ack,
    .task_start, .task_end, .attack_det, .no_det, .kg_en, .kg_response, .kg_valid
  );

  // System clock with optional glitch cycles of 4 ns.
  always begin
    if (glitch_cycles > 0) begin
      #2 clk = 1; #2 clk = 0;
      glitch_cycles--;
    end else begin
      #HALF clk = 1; #HALF clk = 0;
    end
  end

  always @(posedge clk) if (rst_n && dut.u_puf.restart) n_mode_switch++;

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic wr(logic [3:0] a, logic [31:0] d);
    bus_req <= 1; bus_we <= 1; bus_addr <= a; bus_wdata <= d;
    @(posedge clk);
    bus_req <= 0; bus_we <= 0;
    @(posedge clk);
  endtask

  task automatic rd(logic [3:0] a, output logic [31:0] d);
    bus_req <= 1; bus_we <= 0; bus_addr <= a;
    @(posedge clk);
    bus_req <= 0;
    #1 d = bus_rdata;
    @(posedge clk);
  endtask

  // Frequency order of two oscillators of the model at nominal supply: 1 when `a`
  // is faster (smaller delay offset) than `b`.
  function automatic int dvar(int r);
    return ro_variation(SEED, r, 1, 80);
  endfunction

  task automatic calibrate(logic unreliable, output logic [31:0] ref_val);
    logic [31:0] st;
    int t;
    wr(4'd1, {30'd0, 1'b1, unreliable});
    wr(4'd0, 32'h2);
    t = 0;
    do begin rd(4'd2, st); t++; end while (!st[4] && t < 2000);
    chk(st[4], "calibration finished");
    rd(4'd3, ref_val);
  endtask

  // One detection run around a task of `len` clocks; `during` selects a disturbance.
  // Returns 1 for attack_det, 0 for no_det.
  task automatic detect(int len, int during, logic sw_timed, output logic alarm);
    logic [31:0] st;
    int t;
    wr(4'd0, 32'h1);                        // start_FI_detect
    repeat (2) @(posedge clk);
    if (sw_timed) wr(4'd0, 32'h4);
    else begin task_start <= 1; @(posedge clk); task_start <= 0; end
    if (during == 3) vdd_mv = 12'd300;
    if (during == 4) vdd_mv = 12'd650;
    for (int k = 0; k < len; k++) begin
      if (during == 1 && k == len - 8) glitch_cycles = 6;
      if (during == 2 && k >= len - 12 && k < len - 2) fork begin vdd_mv = 12'd0; #28 vdd_mv = 12'd1000; end join_none
      @(posedge clk);
    end
    if (sw_timed) wr(4'd0, 32'h8);
    else begin task_end <= 1; @(posedge clk); task_end <= 0; end
    vdd_mv = 12'd1000;
    t = 0;
    while (!attack_det && !no_det && t < 100) begin @(posedge clk); t++; end
    chk(attack_det ^ no_det, "one verdict");
    rd(4'd2, st);
    chk(st[0] == attack_det && st[1] == no_det, "STATUS mirrors the verdict");
    if (int'(st[27:24]) == 4 && len > 12) n_ring++;
    alarm = attack_det;
    if (attack_det) n_attack++; else n_no_det++;
  endtask

  initial begin
    logic [31:0] d, rref, rref2;
    logic [NRESP-1:0] exp_ref;
    logic [CHW-1:0] ch;
    logic alarm;
    int pa[$], pb[$];

    // 1: pairs with more than 9 % frequency difference
    for (int a = 0; a < NRO; a++)
      for (int b = 0; b < NRO; b++)
        if (dvar(b) - dvar(a) > 90) begin pa.push_back(a); pb.push_back(b); end
    chk(pa.size() > 0, "well-separated oscillator pairs exist");
    ch = '0;
    for (int i = 0; i < NRESP; i++) begin
      int a, b;
      a = pa[i % pa.size()]; b = pb[i % pa.size()];
      if (i % 2) begin int x; x = a; a = b; b = x; end
      ch[i*2*SELW +: SELW] = SELW'(a);
      ch[i*2*SELW + SELW +: SELW] = SELW'(b);
      exp_ref[i] = dvar(a) < dvar(b);
    end

    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (3) @(posedge clk);
    rd(4'd2, d);
    chk(d[2:0] == 3'b000, "idle after reset");
    wr(4'd4, ch[31:0]);
    wr(4'd5, 32'(ch[CHW-1:32]));

    // 2: reliable calibration
    calibrate(1'b0, rref);
    chk(rref[NRESP-1:0] == exp_ref, $sformatf("reliable reference %b expected %b", rref[7:0], exp_ref));
    n_cal_rel++;

    // 3: key-generation port
    kg_en <= 1;
    repeat (2) begin
      int t;
      t = 0;
      do begin @(posedge clk); t++; end while (!kg_valid && t < 300);
      chk(kg_valid && kg_response == exp_ref, "key-generation response");
      n_kg++;
      @(posedge clk);
    end
    kg_en <= 0;
    repeat (3) @(posedge clk);

    // 4: attack-free runs
    detect(16, 0, 0, alarm);  chk(!alarm, "no false alarm, short task");
    detect(60, 0, 0, alarm);  chk(!alarm, "no false alarm, long task");
    detect(20, 0, 1, alarm);  chk(!alarm, "no false alarm, software-timed task");
    n_sw_task++;
    rd(4'd8, d);
    chk(d[7:0] == exp_ref, "voted response equals reference");

    // 5: clock glitching
    detect(24, 1, 0, alarm);  chk(alarm, "clock glitch burst detected");
    n_clk_glitch++;
    rd(4'd2, d);
    chk(d[19:12] != 0, "HD reported");

    // 6: underfeeding below threshold
    detect(24, 3, 0, alarm);  chk(alarm, "underfeeding detected");
    n_underfeed++;

    // 7: supply glitches
    detect(30, 2, 0, alarm);  chk(alarm, "supply glitches detected");
    n_vdd_glitch++;

    // 8: moderate underfeeding
    detect(24, 4, 0, alarm);
    $display("650 mV underfeeding: %s", alarm ? "attack_det" : "no_det");

    // 9: recalibration in unreliable mode
    calibrate(1'b1, rref2);
    chk(rref2 == rref, $sformatf("unreliable-mode reference %b equals reliable %b", rref2[7:0], rref[7:0]));
    n_cal_unrel++;
    detect(16, 0, 0, alarm);  chk(!alarm, "clean run after recalibration");

    $display("mechanisms: cal_rel=%0d cal_unrel=%0d kg=%0d no_det=%0d attack=%0d ring=%0d clk_glitch=%0d underfeed=%0d vdd_glitch=%0d mode_switch=%0d sw_task=%0d",
             n_cal_rel, n_cal_unrel, n_kg, n_no_det, n_attack, n_ring, n_clk_glitch, n_underfeed,
             n_vdd_glitch, n_mode_switch, n_sw_task);
    chk(n_cal_rel > 0 && n_cal_unrel > 0 && n_kg > 0 && n_no_det > 0 && n_attack > 0, "mechanisms 1");
    chk(n_ring > 0 && n_clk_glitch > 0 && n_underfeed > 0 && n_vdd_glitch > 0, "mechanisms 2");
    chk(n_mode_switch > 0 && n_sw_task > 0, "mechanisms 3");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
