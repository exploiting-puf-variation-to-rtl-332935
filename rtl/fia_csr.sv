`timescale 1ns / 1ps
// fia_csr: register interface of the detector, the face it shows to the processor
// over the on-chip interconnect.
//
// Bus: a single-cycle request (req, we, word address addr, wdata) answered on the
// next clock by `ack` and, for reads, `rdata`. The interconnect protocol itself is
// not specified by the source design; this minimal request/acknowledge slave is this
// design's choice and is meant to be wrapped by whatever bus the SoC uses.
//
// Register map (word addresses, 32-bit registers):
//   0 CTRL     W  bit0 start_FI_detect, bit1 start calibration,
//                 bit2 task_start, bit3 task_end (software-timed task); all pulses
//   1 CONFIG   RW bit0 calibration mode (0 reliable, 1 unreliable),
//                 bit1 load the calibrated value into R_REF when calibration ends
//   2 STATUS   R  bit0 attack_det, bit1 no_det, bit2 detector busy,
//                 bit3 calibration busy, bit4 calibration done (cleared by a new
//                 calibration), bits 10:8 detector state, bits 19:12 HD,
//                 bits 27:24 number of saved responses
//   3 R_REF    RW reference response r_ref
//   4 C_REF_LO RW reference challenge c_ref bits 31:0
//   5 C_REF_HI RW reference challenge c_ref bits 63:32
//   6 SAVED_LO R  saved responses, entry j at bits j*N +: N (bits 31:0)
//   7 SAVED_HI R  saved responses, bits 63:32
//   8 VOTED    R  majority-voted response
// The registers that hold the saved PUF responses and the reference are the ones
// the source design lists next to the detector; the map and field positions are this
// design's own.
module fia_csr
  import fia_pkg::*;
#(
  parameter int unsigned N          = 8,
  parameter int unsigned M          = 4,
  parameter int unsigned CHW        = 48,
  parameter int unsigned MW         = $clog2(M + 1),
  parameter int unsigned HW         = $clog2(N + 1),
  parameter logic [CHW-1:0] C_REF_INIT = '0,
  parameter logic [N-1:0]   R_REF_INIT = '0
) (
  input  logic               clk,
  input  logic               rst_n,
  // bus slave
  input  logic               req,
  input  logic               we,
  input  logic [3:0]         addr,
  input  logic [31:0]        wdata,
  output logic [31:0]        rdata,
  output logic               ack,
  // control out
  output logic               start_fi_detect,
  output logic               cal_start,
  output logic               sw_task_start,
  output logic               sw_task_end,
  output puf_mode_e          cal_mode,
  output logic [N-1:0]       r_ref,
  output logic [CHW-1:0]     c_ref,
  // status in
  input  logic               attack_det,
  input  logic               no_det,
  input  logic               det_busy,
  input  det_state_e         det_state,
  input  logic [HW-1:0]      hd,
  input  logic [MW-1:0]      n_saved,
  input  logic [M-1:0][N-1:0] saved,
  input  logic [N-1:0]       voted,
  input  logic               cal_busy,
  input  logic               cal_done,
  input  logic [N-1:0]       cal_ref
);

  localparam logic [3:0] A_CTRL = 4'd0, A_CONFIG = 4'd1, A_STATUS = 4'd2, A_RREF = 4'd3,
                         A_CREF_LO = 4'd4, A_CREF_HI = 4'd5, A_SAVED_LO = 4'd6,
                         A_SAVED_HI = 4'd7, A_VOTED = 4'd8;

  logic        autoload_q, cal_done_q;
  logic [63:0] c_ref_w, saved_w;
  logic        wr, rd;

  assign wr = req && we;
  assign rd = req && !we;
  assign c_ref_w = 64'(c_ref);
  assign saved_w = 64'(saved);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      start_fi_detect <= 1'b0;
      cal_start       <= 1'b0;
      sw_task_start   <= 1'b0;
      sw_task_end     <= 1'b0;
      cal_mode        <= MODE_RELIABLE;
      autoload_q      <= 1'b1;
      cal_done_q      <= 1'b0;
      r_ref           <= R_REF_INIT;
      c_ref           <= C_REF_INIT;
      rdata           <= '0;
      ack             <= 1'b0;
    end else begin
      start_fi_detect <= wr && addr == A_CTRL && wdata[0];
      cal_start       <= wr && addr == A_CTRL && wdata[1];
      sw_task_start   <= wr && addr == A_CTRL && wdata[2];
      sw_task_end     <= wr && addr == A_CTRL && wdata[3];
      ack             <= req;

      if (cal_start) cal_done_q <= 1'b0;
      if (cal_done) begin
        cal_done_q <= 1'b1;
        if (autoload_q) r_ref <= cal_ref;
      end

      if (wr) begin
        unique case (addr)
          A_CONFIG: begin
            cal_mode   <= puf_mode_e'(wdata[0]);
            autoload_q <= wdata[1];
          end
          A_RREF:    r_ref <= wdata[N-1:0];
          A_CREF_LO: c_ref <= CHW'({c_ref_w[63:32], wdata});
          A_CREF_HI: c_ref <= CHW'({wdata, c_ref_w[31:0]});
          default: ;
        endcase
      end

      if (rd) begin
        unique case (addr)
          A_CONFIG:   rdata <= {30'd0, autoload_q, cal_mode};
          A_STATUS:   rdata <= {4'd0, 4'(n_saved), 4'd0, 8'(hd), 1'b0, det_state, 3'd0,
                                cal_done_q, cal_busy, det_busy, no_det, attack_det};
          A_RREF:     rdata <= 32'(r_ref);
          A_CREF_LO:  rdata <= c_ref_w[31:0];
          A_CREF_HI:  rdata <= c_ref_w[63:32];
          A_SAVED_LO: rdata <= saved_w[31:0];
          A_SAVED_HI: rdata <= saved_w[63:32];
          A_VOTED:    rdata <= 32'(voted);
          default:    rdata <= '0;
        endcase
      end
    end
  end

  // Every request is acknowledged on the next clock, and only then.
  a_ack: assert property (@(posedge clk) disable iff (!rst_n) ack == $past(req));

  initial begin
    assert (N <= 32 && CHW <= 64 && M * N <= 64 && M <= 15)
      else $error("fia_csr: register map holds N <= 32, CHW <= 64, M*N <= 64, M <= 15");
  end

endmodule
