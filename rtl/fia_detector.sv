`timescale 1ns / 1ps
// fia_detector: fault-injection attack detector built on the ring-oscillator PUF.
//
// The system starts the detector with a one-cycle `start_fi_detect` pulse before a
// security-sensitive operation. The FSM then
//   UNRELIABLE_MODE  switches the PUF to unreliable mode (a response every clock)
//                    and applies the reference challenge c_ref;
//   WAIT_TASK        waits for `task_start` from the protected operation;
//   ASK_RESPONSE /   alternate while the operation runs: wait for a PUF response,
//   SAVE_RESPONSE    then store it. The store is a ring of M entries; once full,
//                    each new response replaces the oldest, so the M most recent
//                    responses of the operation are kept;
//   PERFORM_XOR      after `task_end`: votes the saved responses bit by bit
//                    (maj_vote), XORs the result with r_ref and counts the ones
//                    (the Hamming distance, HD);
//   ALARM_PROTECT    HD != 0: `attack_det` is held high;
//   NO_ATTACK        HD == 0: `no_det` is held high.
// Both verdict states hold until the next `start_fi_detect`. The PUF is released
// (en low, reliable mode) outside a detection run, so it can serve key generation.
//
// Following the source design: the state sequence, the unreliable mode, the majority
// vote over M responses, the XOR against r_ref and the HD test. This design's own
// choices: the IDLE state before the first start, the ring buffer when the
// operation yields more than M responses, remembering a `task_end` that arrives
// during SAVE_RESPONSE, and raising the alarm when not a single response was
// collected (an operation too short to be observed, or an oscillator stopped by
// the supply, is treated as an attack).
//
// Timing: one state per clock. From `task_end` the verdict appears after at most
// three clocks (SAVE, ASK, PERFORM_XOR).
module fia_detector
  import fia_pkg::*;
#(
  parameter int unsigned N   = 8,
  parameter int unsigned M   = 4,
  parameter int unsigned CHW = 48,
  parameter int unsigned MW  = $clog2(M + 1),
  parameter int unsigned HW  = $clog2(N + 1)
) (
  input  logic               clk,
  input  logic               rst_n,
  // control from the system
  input  logic               start_fi_detect,
  input  logic               task_start,
  input  logic               task_end,
  input  logic [N-1:0]       r_ref,
  input  logic [CHW-1:0]     c_ref,
  // to / from the PUF
  output logic               puf_en,
  output puf_mode_e          puf_mode,
  output logic [CHW-1:0]     puf_challenge,
  input  logic [N-1:0]       puf_response,
  input  logic               puf_resp_valid,
  // verdict and observation
  output logic               attack_det,
  output logic               no_det,
  output logic               busy,
  output det_state_e         state,
  output logic [M-1:0][N-1:0] saved,
  output logic [MW-1:0]      n_saved,
  output logic [N-1:0]       voted,
  output logic [HW-1:0]      hd
);

  localparam int unsigned PW = (M > 1) ? $clog2(M) : 1;

  det_state_e     state_q;
  logic [N-1:0]   hold_q;
  logic [PW-1:0]  wr_ptr_q;
  logic           end_seen_q;
  logic [N-1:0]   diff;
  logic [HW-1:0]  hd_comb;

  maj_vote #(.N(N), .M(M), .MW(MW)) u_vote (
    .resp(saved), .n_valid(n_saved), .voted
  );

  assign diff = voted ^ r_ref;

  always_comb begin
    hd_comb = '0;
    for (int b = 0; b < N; b++) hd_comb = hd_comb + HW'(diff[b]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q    <= ST_IDLE;
      puf_en     <= 1'b0;
      puf_mode   <= MODE_RELIABLE;
      hold_q     <= '0;
      wr_ptr_q   <= '0;
      end_seen_q <= 1'b0;
      saved      <= '0;
      n_saved    <= '0;
      hd         <= '0;
    end else begin
      if (start_fi_detect) begin
        // A start pulse (re)begins a run from any state.
        state_q    <= ST_UNRELIABLE_MODE;
        end_seen_q <= 1'b0;
      end else begin
        unique case (state_q)
          ST_IDLE: ;
          ST_UNRELIABLE_MODE: begin
            puf_en     <= 1'b1;
            puf_mode   <= MODE_UNRELIABLE;
            wr_ptr_q   <= '0;
            n_saved    <= '0;
            saved      <= '0;
            hd         <= '0;
            state_q    <= ST_WAIT_TASK;
          end
          ST_WAIT_TASK: begin
            if (task_start) state_q <= ST_ASK_RESPONSE;
            if (task_end) end_seen_q <= 1'b1;
          end
          ST_ASK_RESPONSE: begin
            if (task_end || end_seen_q) begin
              state_q <= ST_PERFORM_XOR;
            end else if (puf_resp_valid) begin
              hold_q  <= puf_response;
              state_q <= ST_SAVE_RESPONSE;
            end
          end
          ST_SAVE_RESPONSE: begin
            saved[wr_ptr_q] <= hold_q;
            wr_ptr_q <= (wr_ptr_q == PW'(M - 1)) ? '0 : wr_ptr_q + 1'b1;
            if (n_saved != MW'(M)) n_saved <= n_saved + 1'b1;
            if (task_end) end_seen_q <= 1'b1;
            state_q <= ST_ASK_RESPONSE;
          end
          ST_PERFORM_XOR: begin
            hd       <= hd_comb;
            puf_en   <= 1'b0;
            puf_mode <= MODE_RELIABLE;
            if (hd_comb != '0 || n_saved == '0) state_q <= ST_ALARM_PROTECT;
            else                                state_q <= ST_NO_ATTACK;
          end
          ST_ALARM_PROTECT: ;
          ST_NO_ATTACK: ;
          default: state_q <= ST_IDLE;
        endcase
      end
    end
  end

  assign state         = state_q;
  assign puf_challenge = c_ref;
  assign attack_det    = (state_q == ST_ALARM_PROTECT);
  assign no_det        = (state_q == ST_NO_ATTACK);
  assign busy          = (state_q != ST_IDLE) && !attack_det && !no_det;

  a_verdict_exclusive: assert property (@(posedge clk) disable iff (!rst_n) !(attack_det && no_det));
  a_saved_bound: assert property (@(posedge clk) disable iff (!rst_n) n_saved <= MW'(M));

endmodule
