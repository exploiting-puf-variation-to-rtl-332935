`timescale 1ns / 1ps
// tb_ring_osc: measures the oscillator model. With variation switched off, three
// stages of 400 ps give a 2.4 ns period at the nominal 1000 mV; at 700 mV with a
// 400 mV threshold the gate delay doubles (600/300), so the period is 4.8 ns. Below
// the threshold, or with enable low, the output must stay still. A second instance
// with variation on must still oscillate within the +-8 % delay spread.
module tb_ring_osc;
  logic en;
  logic [11:0] vdd_mv;
  logic osc, osc_var;
  int checks = 0, failures = 0;
  int edges, edges_var;

  ring_osc #(.DELAY_VAR_PERMILLE(0), .VTH_VAR_MV(0)) dut (.en, .vdd_mv, .osc);
  ring_osc #(.INDEX(3)) dut_var (.en, .vdd_mv, .osc(osc_var));

  always @(posedge osc) edges++;
  always @(posedge osc_var) edges_var++;

  task automatic measure(real window_ns, output int n, output int nv);
    edges = 0; edges_var = 0;
    #(window_ns);
    n = edges; nv = edges_var;
  endtask

  task automatic check_range(int v, int lo, int hi, string what);
    checks++;
    if (v < lo || v > hi) begin
      failures++;
      $display("FAIL %s: %0d not in [%0d,%0d]", what, v, lo, hi);
    end
  endtask

  initial begin
    int n, nv;
    en = 0; vdd_mv = 1000;
    measure(100.0, n, nv);
    check_range(n, 0, 0, "disabled");
    checks++; if (osc !== 1'b0) begin failures++; $display("FAIL output not at rest"); end
    en = 1;
    #10;
    measure(240.0, n, nv);
    check_range(n, 99, 101, "1000 mV edges in 240 ns");
    check_range(nv, 92, 109, "varied RO edges in 240 ns");
    vdd_mv = 700;
    #10;
    measure(240.0, n, nv);
    check_range(n, 49, 51, "700 mV edges in 240 ns");
    vdd_mv = 300;
    #10;
    measure(240.0, n, nv);
    check_range(n, 0, 0, "300 mV: stopped");
    check_range(nv, 0, 0, "300 mV: varied RO stopped");
    vdd_mv = 1000;
    #10;
    measure(240.0, n, nv);
    check_range(n, 99, 101, "restart after supply recovery");
    en = 0;
    #10;
    measure(100.0, n, nv);
    check_range(n, 0, 0, "disabled again");
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
