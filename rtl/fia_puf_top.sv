`timescale 1ns / 1ps
// fia_puf_top: ring-oscillator PUF fault-injection detector subsystem.
//
// An RO PUF that a device already carries for key generation is reused as a sensor.
// Before a security-sensitive operation (for instance an AES encryption on a
// hardware accelerator) the processor starts the detector; the detector switches
// the PUF to its unreliable mode, in which a response is produced every clock,
// and saves responses while the operation runs. Clock glitches and supply
// disturbances shift the oscillator counts and flip response bits. At the end the
// saved responses are majority-voted and compared with a reference response taken
// in the absence of attacks; any difference raises attack_det, so the system can
// drop or redo the result.
//
// Contents: NRO ring oscillators (behavioural model ring_osc; the only part that
// is not logic), the PUF (ro_puf), the detector FSM (fia_detector), the reference
// calibrator (ref_calibrator) and the register interface (fia_csr).
//
// PUF ownership: the detector has the PUF while a detection run is active, else the
// calibrator while it calibrates, else the key-generation port (kg_*), which always
// gets reliable-mode responses. All three use the reference challenge in C_REF.
//
// Ports: bus_* is the register slave (see fia_csr); task_start/task_end come from the
// protected operation (an accelerator) and are OR-ed with the software pulses of
// CTRL; attack_det/no_det are the verdict; kg_* feed an error-correcting key
// generator outside this block; vdd_mv is the supply seen by the oscillators and
// only has a meaning for the behavioural oscillator model.
//
// Default sizes follow the evaluated system: 8 oscillators of 3 inverting stages,
// an 8-bit response, 4 saved responses, a 100-clock reliable window and a 1-clock
// unreliable window. The default challenge (bit i compares RO i with RO i+1 mod
// NRO), the counter width and the calibration count are this design's choices.
module fia_puf_top
  import fia_pkg::*;
#(
  parameter int unsigned NRO               = 8,
  parameter int unsigned NRESP             = 8,
  parameter int unsigned M                 = 4,
  parameter int unsigned CW                = 16,
  parameter int unsigned RELIABLE_WINDOW   = RELIABLE_WINDOW_DEFAULT,
  parameter int unsigned UNRELIABLE_WINDOW = UNRELIABLE_WINDOW_DEFAULT,
  parameter int unsigned CAL_K             = 8,
  parameter int unsigned RO_STAGES         = 3,
  parameter int unsigned RO_STAGE_DELAY_PS = 400,
  parameter int unsigned RO_SEED           = 32'h1234_5678,
  parameter int unsigned SELW              = (NRO > 1) ? $clog2(NRO) : 1,
  parameter int unsigned CHW               = NRESP * 2 * SELW,
  parameter logic [NRESP-1:0] R_REF_INIT   = '0
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [11:0]      vdd_mv,
  // register slave
  input  logic             bus_req,
  input  logic             bus_we,
  input  logic [3:0]       bus_addr,
  input  logic [31:0]      bus_wdata,
  output logic [31:0]      bus_rdata,
  output logic             bus_ack,
  // protected operation
  input  logic             task_start,
  input  logic             task_end,
  // verdict
  output logic             attack_det,
  output logic             no_det,
  // reliable-mode responses for key generation
  input  logic             kg_en,
  output logic [NRESP-1:0] kg_response,
  output logic             kg_valid
);

  localparam int unsigned MW = $clog2(M + 1);
  localparam int unsigned HW = $clog2(NRESP + 1);

  function automatic logic [CHW-1:0] default_challenge();
    logic [CHW-1:0] c;
    c = '0;
    for (int i = 0; i < NRESP; i++) begin
      c[i*2*SELW +: SELW]        = SELW'(i % NRO);
      c[i*2*SELW + SELW +: SELW] = SELW'((i + 1) % NRO);
    end
    return c;
  endfunction

  localparam logic [CHW-1:0] C_REF_INIT = default_challenge();

  // ---- register interface ----
  logic               start_fi_detect, cal_start, sw_task_start, sw_task_end;
  puf_mode_e          cal_mode;
  logic [NRESP-1:0]   r_ref;
  logic [CHW-1:0]     c_ref;
  logic               det_busy, cal_busy, cal_done;
  det_state_e         det_state;
  logic [HW-1:0]      hd;
  logic [MW-1:0]      n_saved;
  logic [M-1:0][NRESP-1:0] saved;
  logic [NRESP-1:0]   voted, cal_ref;

  fia_csr #(
    .N(NRESP), .M(M), .CHW(CHW), .MW(MW), .HW(HW),
    .C_REF_INIT(C_REF_INIT), .R_REF_INIT(R_REF_INIT)
  ) u_csr (
    .clk, .rst_n,
    .req(bus_req), .we(bus_we), .addr(bus_addr), .wdata(bus_wdata),
    .rdata(bus_rdata), .ack(bus_ack),
    .start_fi_detect, .cal_start, .sw_task_start, .sw_task_end, .cal_mode, .r_ref, .c_ref,
    .attack_det, .no_det, .det_busy, .det_state, .hd, .n_saved, .saved, .voted,
    .cal_busy, .cal_done, .cal_ref
  );

  // ---- detector ----
  logic             det_puf_en;
  puf_mode_e        det_puf_mode;
  logic [CHW-1:0]   det_challenge;
  logic [NRESP-1:0] puf_response;
  logic             puf_resp_valid;

  fia_detector #(.N(NRESP), .M(M), .CHW(CHW), .MW(MW), .HW(HW)) u_det (
    .clk, .rst_n,
    .start_fi_detect,
    .task_start(task_start | sw_task_start),
    .task_end  (task_end   | sw_task_end),
    .r_ref, .c_ref,
    .puf_en(det_puf_en), .puf_mode(det_puf_mode), .puf_challenge(det_challenge),
    .puf_response, .puf_resp_valid,
    .attack_det, .no_det, .busy(det_busy), .state(det_state),
    .saved, .n_saved, .voted, .hd
  );

  // ---- reference calibration ----
  logic      cal_puf_en;
  puf_mode_e cal_puf_mode;

  ref_calibrator #(.N(NRESP), .K(CAL_K)) u_cal (
    .clk, .rst_n,
    .start(cal_start), .cal_mode,
    .puf_en(cal_puf_en), .puf_mode(cal_puf_mode),
    .puf_response, .puf_resp_valid,
    .busy(cal_busy), .done(cal_done), .new_ref(cal_ref)
  );

  // ---- PUF ownership ----
  logic      puf_en;
  puf_mode_e puf_mode;

  always_comb begin
    if (det_puf_en) begin
      puf_en   = 1'b1;
      puf_mode = det_puf_mode;
    end else if (cal_puf_en) begin
      puf_en   = 1'b1;
      puf_mode = cal_puf_mode;
    end else begin
      puf_en   = kg_en;
      puf_mode = MODE_RELIABLE;
    end
  end

  assign kg_response = puf_response;
  assign kg_valid    = puf_resp_valid && !det_puf_en && !cal_puf_en;

  // ---- ring oscillators and PUF ----
  logic             ro_en;
  logic [NRO-1:0]   ro;

  for (genvar r = 0; r < NRO; r++) begin : g_ro
    ring_osc #(
      .STAGES(RO_STAGES), .STAGE_DELAY_PS(RO_STAGE_DELAY_PS), .SEED(RO_SEED), .INDEX(r)
    ) u_ro (
      .en(ro_en), .vdd_mv, .osc(ro[r])
    );
  end

  ro_puf #(
    .NRO(NRO), .NRESP(NRESP), .SELW(SELW), .CHW(CHW), .CW(CW),
    .RELIABLE_WINDOW(RELIABLE_WINDOW), .UNRELIABLE_WINDOW(UNRELIABLE_WINDOW)
  ) u_puf (
    .clk, .rst_n, .en(puf_en), .mode(puf_mode), .challenge(det_puf_en ? det_challenge : c_ref),
    .ro_en, .ro, .response(puf_response), .resp_valid(puf_resp_valid)
  );

endmodule
