`timescale 1ns / 1ps
// ref_calibrator: re-determines the reference response r_ref of the detector.
//
// PUF responses drift with ageing and with the operating environment; such drift
// must not be mistaken for an attack. On a `start` pulse this block takes the PUF
// (in the mode given by `cal_mode`, reliable by default in the system), collects
// K responses to the reference challenge and returns the most frequent of them as
// `new_ref`, with a one-cycle `done` pulse. Calibration must be run when no attack
// is taking place.
//
// The most frequent value is found by comparing every collected response with
// every other one (K*K comparisons of N bits) and taking the response with the
// highest count; on equal counts the earliest response wins. Collection is one
// response per PUF window; the vote takes one extra clock.
//
// Following the source design: calibration through repeated challenges and the most
// frequent response. This design's own choices: K, the tie rule, and the mode
// input (so the reference can also be taken in the mode the detector uses).
module ref_calibrator
  import fia_pkg::*;
#(
  parameter int unsigned N  = 8,
  parameter int unsigned K  = 8,
  parameter int unsigned KW = $clog2(K + 1)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  puf_mode_e    cal_mode,
  output logic         puf_en,
  output puf_mode_e    puf_mode,
  input  logic [N-1:0] puf_response,
  input  logic         puf_resp_valid,
  output logic         busy,
  output logic         done,
  output logic [N-1:0] new_ref
);

  typedef enum logic [1:0] {C_IDLE, C_COLLECT, C_VOTE} cal_state_e;

  cal_state_e           state_q;
  puf_mode_e            mode_q;
  logic [K-1:0][N-1:0]  samp_q;
  logic [KW-1:0]        n_q;
  logic [N-1:0]         best;

  // Most frequent of the K collected responses.
  always_comb begin
    logic [KW-1:0] cnt, best_cnt;
    best     = samp_q[0];
    best_cnt = '0;
    for (int i = 0; i < K; i++) begin
      cnt = '0;
      for (int j = 0; j < K; j++)
        if (samp_q[j] == samp_q[i]) cnt = cnt + 1'b1;
      if (cnt > best_cnt) begin
        best_cnt = cnt;
        best     = samp_q[i];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= C_IDLE;
      mode_q  <= MODE_RELIABLE;
      samp_q  <= '0;
      n_q     <= '0;
      done    <= 1'b0;
      new_ref <= '0;
    end else begin
      done <= 1'b0;
      unique case (state_q)
        C_IDLE: if (start) begin
          mode_q  <= cal_mode;
          n_q     <= '0;
          state_q <= C_COLLECT;
        end
        C_COLLECT: if (puf_resp_valid) begin
          samp_q[n_q[KW-1:0]] <= puf_response;
          n_q <= n_q + 1'b1;
          if (n_q == KW'(K - 1)) state_q <= C_VOTE;
        end
        C_VOTE: begin
          new_ref <= best;
          done    <= 1'b1;
          state_q <= C_IDLE;
        end
        default: state_q <= C_IDLE;
      endcase
    end
  end

  assign busy     = (state_q != C_IDLE);
  assign puf_en   = (state_q == C_COLLECT);
  assign puf_mode = mode_q;

endmodule
