`timescale 1ns / 1ps
// tb_fia_attack_sweep: runs the attack settings of the published evaluation of
// this detector (clock glitching, underfeeding, supply glitching) through
// the whole detector subsystem (default sizes, 32 MHz clock) and prints, for each
// setting, how many of RUNS protected operations raised attack_det.
//
//   clock glitching  20 settings: width 1.95/2.73/3.5/4.5 % and offset -5/-3/1/3/5 %
//                    of the clock period. The glitch pulse is XOR-ed into the clock,
//                    so a glitched period gains an extra short cycle. Each setting
//                    is run twice: one glitch in the middle of the operation, and a
//                    glitch in every clock of it. (How the glitch combines with the
//                    clock, and how often it is applied, are this testbench's
//                    choices.)
//   underfeeding     supply 1.1, 1.0, 0.85, 0.75, 0.7, 0.65 V for the whole run.
//   supply glitches  operating supply 1.0/0.85/0.75 V, the supply shorted to 0 V for
//                    3.5 % or 45 % of a clock, repeated 1, 4 or 10 times on
//                    consecutive clocks in the middle of the operation.
//
// The reference is calibrated once, at 1.0 V without attack, on a challenge of
// clearly separated oscillator pairs. The rates come from the behavioural
// oscillator model and an ideal RTL simulation (no timing violations), so they say
// how the detection mechanism reacts, not what a chip would show.
//
// Checks: every run ends in exactly one verdict; the reference equals the frequency
// order; no alarm in undisturbed runs at 1.0 V (before, between and after the
// sweeps); supply below every oscillator's threshold is always detected; at least
// one setting of each sweep is detected.
module tb_fia_attack_sweep;
  import fia_pkg::*;
  localparam int NRO = 8, NRESP = 8, SELW = 3, CHW = 48;
  localparam real T = 31.25;
  localparam int unsigned SEED = 32'h1234_5678;
  localparam int RUNS = 5, TASK_LEN = 24;

  logic clk_base = 0, glitch = 0, clk, rst_n = 0;
  logic [11:0] vdd_mv = 12'd1000, vdd_op = 12'd1000;
  logic bus_req = 0, bus_we = 0;
  logic [3:0] bus_addr = 0;
  logic [31:0] bus_wdata = 0, bus_rdata;
  logic bus_ack;
  logic task_start = 0, task_end = 0;
  logic attack_det, no_det;
  logic [NRESP-1:0] kg_response;
  logic kg_valid;
  int checks = 0, failures = 0;
  logic clk_glitch_on = 0;
  int glitch_shots = 0;
  real g_off = 0.0, g_w = 0.0;             // glitch offset and width, ns
  int clk_detected = 0, vdd_detected = 0, uf_detected = 0;

  assign clk = clk_base ^ glitch;

  fia_puf_top dut (
    .clk, .rst_n, .vdd_mv,
    .bus_req, .bus_we, .bus_addr, .bus_wdata, .bus_rdata, .bus_ack,
    .task_start, .task_end, .attack_det, .no_det, .kg_en(1'b0), .kg_response, .kg_valid
  );

  always #(T / 2) clk_base = ~clk_base;

  // Glitch pulse once per period, positioned relative to the rising clock edge.
  always @(posedge clk_base) begin
    if (clk_glitch_on || glitch_shots > 0) begin
      if (glitch_shots > 0) glitch_shots--;
      if (g_off >= 0.0) #(g_off);
      else              #(T + g_off);
      glitch = 1;
      #(g_w) glitch = 0;
    end
  end

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic wr(logic [3:0] a, logic [31:0] d);
    @(posedge clk_base);
    bus_req <= 1; bus_we <= 1; bus_addr <= a; bus_wdata <= d;
    @(posedge clk_base);
    bus_req <= 0; bus_we <= 0;
    @(posedge clk_base);
  endtask

  task automatic rd(logic [3:0] a, output logic [31:0] d);
    @(posedge clk_base);
    bus_req <= 1; bus_we <= 0; bus_addr <= a;
    @(posedge clk_base);
    bus_req <= 0;
    #1 d = bus_rdata;
  endtask

  function automatic int dvar(int r);
    return ro_variation(SEED, r, 1, 80);
  endfunction

  // kind: 0 none, 1 clock glitch in every clock, 2 supply glitches (reps, width_ns),
  // 3 a single clock glitch
  task automatic run_once(int kind, int reps, real width_ns, output logic alarm);
    int t;
    vdd_mv = vdd_op;
    wr(4'd0, 32'h1);
    repeat (8) @(posedge clk_base);          // PUF warm before the operation
    @(posedge clk_base) task_start <= 1;
    @(posedge clk_base) task_start <= 0;
    if (kind == 1) clk_glitch_on = 1;
    for (int k = 0; k < TASK_LEN; k++) begin
      if (kind == 3 && k == TASK_LEN / 2) glitch_shots = 1;
      if (kind == 2 && k >= TASK_LEN - 4 - reps && k < TASK_LEN - 4)
        fork begin vdd_mv = 12'd0; #(width_ns) vdd_mv = vdd_op; end join_none
      @(posedge clk_base);
    end
    clk_glitch_on = 0;
    #2;
    @(posedge clk_base) task_end <= 1;
    @(posedge clk_base) task_end <= 0;
    t = 0;
    while (!attack_det && !no_det && t < 50) begin @(posedge clk_base); t++; end
    chk(attack_det ^ no_det, "exactly one verdict");
    alarm = attack_det;
    vdd_mv = 12'd1000;
  endtask

  task automatic clean_runs(string when);
    logic alarm;
    int n;
    n = 0;
    vdd_op = 12'd1000;
    for (int r = 0; r < RUNS; r++) begin run_once(0, 0, 0.0, alarm); n += alarm; end
    chk(n == 0, $sformatf("no false alarm %s (%0d of %0d)", when, n, RUNS));
  endtask

  initial begin
    logic [31:0] d;
    logic [CHW-1:0] ch;
    logic [NRESP-1:0] exp_ref;
    logic alarm;
    int pa[$], pb[$];
    real widths[4] = '{1.95, 2.73, 3.5, 4.5};
    int offsets[5] = '{-5, -3, 1, 3, 5};
    int volts[6] = '{1100, 1000, 850, 750, 700, 650};
    int gv[3] = '{1000, 850, 750};
    real gw[2] = '{3.5, 45.0};
    int gr[3] = '{1, 4, 10};

    for (int a = 0; a < NRO; a++)
      for (int b = 0; b < NRO; b++)
        if (dvar(b) - dvar(a) > 90) begin pa.push_back(a); pb.push_back(b); end
    ch = '0;
    for (int i = 0; i < NRESP; i++) begin
      int a, b;
      a = pa[i % pa.size()]; b = pb[i % pa.size()];
      if (i % 2) begin int x; x = a; a = b; b = x; end
      ch[i*2*SELW +: SELW] = SELW'(a);
      ch[i*2*SELW + SELW +: SELW] = SELW'(b);
      exp_ref[i] = dvar(a) < dvar(b);
    end

    repeat (3) @(posedge clk_base);
    rst_n <= 1;
    wr(4'd4, ch[31:0]);
    wr(4'd5, 32'(ch[CHW-1:32]));
    wr(4'd1, 32'h2);                          // reliable calibration, autoload
    wr(4'd0, 32'h2);
    do rd(4'd2, d); while (!d[4]);
    rd(4'd3, d);
    chk(d[NRESP-1:0] == exp_ref, $sformatf("reference %b expected %b", d[7:0], exp_ref));
    clean_runs("before the sweeps");

    $display("clock glitching (glitch XOR-ed into the clock)");
    $display("  width%%  offset%%  single  every-clock");
    vdd_op = 12'd1000;
    foreach (widths[w]) foreach (offsets[o]) begin
      int n, n1;
      n = 0; n1 = 0;
      g_w = widths[w] * T / 100.0;
      g_off = real'(offsets[o]) * T / 100.0;
      for (int r = 0; r < RUNS; r++) begin run_once(3, 0, 0.0, alarm); n1 += alarm; end
      for (int r = 0; r < RUNS; r++) begin run_once(1, 0, 0.0, alarm); n += alarm; end
      $display("  %5.2f  %6d  %0d/%0d  %0d/%0d", widths[w], offsets[o], n1, RUNS, n, RUNS);
      if (n > 0 || n1 > 0) clk_detected++;
    end
    chk(clk_detected > 0, "some clock-glitch setting detected");
    clean_runs("after clock glitching");

    $display("voltage underfeeding");
    foreach (volts[v]) begin
      int n;
      n = 0;
      vdd_op = 12'(volts[v]);
      for (int r = 0; r < RUNS; r++) begin run_once(0, 0, 0.0, alarm); n += alarm; end
      $display("  %4d mV  detected %0d/%0d", volts[v], n, RUNS);
      if (n > 0) uf_detected++;
    end
    begin
      int n;
      n = 0;
      vdd_op = 12'd300;
      for (int r = 0; r < RUNS; r++) begin run_once(0, 0, 0.0, alarm); n += alarm; end
      $display("   300 mV  detected %0d/%0d", n, RUNS);
      chk(n == RUNS, "supply below threshold always detected");
    end
    clean_runs("after underfeeding");

    $display("voltage glitching (supply to 0 V)");
    $display("  supply  width%%  repeat  detected");
    foreach (gv[v]) foreach (gw[w]) foreach (gr[r]) begin
      int n;
      n = 0;
      vdd_op = 12'(gv[v]);
      for (int k = 0; k < RUNS; k++) begin run_once(2, gr[r], gw[w] * T / 100.0, alarm); n += alarm; end
      $display("  %4d mV  %5.1f  %4d  %0d/%0d", gv[v], gw[w], gr[r], n, RUNS);
      if (n > 0) vdd_detected++;
    end
    chk(vdd_detected > 0, "some supply-glitch setting detected");
    clean_runs("after voltage glitching");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
