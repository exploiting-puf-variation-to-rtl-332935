`timescale 1ns / 1ps
// puf_bit: one response bit of the ring-oscillator PUF.
//
// Two multiplexers pick one ring oscillator each, as the challenge says: sel_top for
// the upper counter and sel_bot for the lower one. Each selected oscillator drives a
// ro_counter; at the end of a window the two counts are compared and the bit is 1
// when the upper count is greater than the lower one, else 0 (a tie gives 0).
// The multiplexer-counter-comparator structure and the challenge fields follow the
// source design; the tie rule is this design's choice.
//
// Timing: `resp_bit`/`valid` follow `sample` by one system clock (the ro_counter
// latency). The comparison is combinational on the registered counts.
module puf_bit #(
  parameter int unsigned NRO  = 8,
  parameter int unsigned SELW = (NRO > 1) ? $clog2(NRO) : 1,
  parameter int unsigned CW   = 16
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [NRO-1:0]  ro,
  input  logic [SELW-1:0] sel_top,
  input  logic [SELW-1:0] sel_bot,
  input  logic            sample,
  output logic            resp_bit,
  output logic            valid,
  output logic [CW-1:0]   count_top,
  output logic [CW-1:0]   count_bot
);

  logic ro_top, ro_bot, valid_bot;

  assign ro_top = ro[sel_top];
  assign ro_bot = ro[sel_bot];

  ro_counter #(.CW(CW)) u_cnt_top (
    .ro_clk(ro_top), .clk, .rst_n, .sample, .count(count_top), .count_valid(valid)
  );

  ro_counter #(.CW(CW)) u_cnt_bot (
    .ro_clk(ro_bot), .clk, .rst_n, .sample, .count(count_bot), .count_valid(valid_bot)
  );

  assign resp_bit = (count_top > count_bot);

  // Both counters are sampled by the same pulse.
  a_valid_match: assert property (@(posedge clk) disable iff (!rst_n) valid == valid_bot);

endmodule
