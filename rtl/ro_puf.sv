`timescale 1ns / 1ps
// ro_puf: ring-oscillator PUF with a reliable and an unreliable mode.
//
// The PUF has NRESP response bits. Bit i compares two of the NRO ring oscillators,
// picked by its field of the challenge:
//   challenge[i*2*SELW +: SELW]        selects the oscillator of the upper counter
//   challenge[i*2*SELW + SELW +: SELW] selects the oscillator of the lower counter
// (with four oscillators and one bit, challenge 4'b0100 compares RO 0 with RO 1 and
// 4'b1000 compares RO 0 with RO 2). The same oscillator may serve several bits.
//
// A window timer fixes how long the oscillators are counted: RELIABLE_WINDOW system
// clocks in reliable mode (100 by default) and UNRELIABLE_WINDOW (1) in unreliable
// mode, so that in unreliable mode a fresh response is produced every clock. As in
// the source design, the two modes differ only in this window length, and the
// defaults (8 oscillators, 8 response bits, 100-clock window) are its sizes.
//
// Sequence: while `en` is low the oscillators are off (ro_en = 0). After `en` rises,
// or whenever `mode` changes, the PUF waits WARMUP cycles for the oscillators and
// the counter synchronizers to settle, takes one priming sample whose result is
// dropped, and then delivers one response per window with a one-cycle `resp_valid`.
// The warm-up, the dropped first window and the window-per-response schedule are
// this design's choices.
//
// Ports: ro_en/ro connect to the ring oscillators, which sit outside this module
// because they are not logic.
module ro_puf
  import fia_pkg::*;
#(
  parameter int unsigned NRO               = 8,
  parameter int unsigned NRESP             = 8,
  parameter int unsigned SELW              = (NRO > 1) ? $clog2(NRO) : 1,
  parameter int unsigned CHW               = NRESP * 2 * SELW,
  parameter int unsigned CW                = 16,
  parameter int unsigned RELIABLE_WINDOW   = RELIABLE_WINDOW_DEFAULT,
  parameter int unsigned UNRELIABLE_WINDOW = UNRELIABLE_WINDOW_DEFAULT,
  parameter int unsigned WARMUP            = 3
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     en,
  input  puf_mode_e                mode,
  input  logic [CHW-1:0]           challenge,
  output logic                     ro_en,
  input  logic [NRO-1:0]           ro,
  output logic [NRESP-1:0]         response,
  output logic                     resp_valid
);

  localparam int unsigned TW = (RELIABLE_WINDOW > 1) ? $clog2(RELIABLE_WINDOW + 1) : 1;
  localparam int unsigned WW = (WARMUP > 0) ? $clog2(WARMUP + 1) : 1;

  puf_mode_e       mode_q;
  logic            restart;
  logic [WW-1:0]   warm_q;
  logic            primed_q;
  logic [TW-1:0]   timer_q;
  logic [TW-1:0]   window_last;
  logic            sample;
  logic            real_q;
  logic [NRESP-1:0] bit_valid;

  assign window_last = (mode == MODE_RELIABLE) ? TW'(RELIABLE_WINDOW - 1)
                                               : TW'(UNRELIABLE_WINDOW - 1);
  assign restart = en && (mode != mode_q);
  assign ro_en   = en;
  assign sample  = en && !restart && (warm_q == '0) && (!primed_q || timer_q == window_last);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode_q   <= MODE_RELIABLE;
      warm_q   <= WW'(WARMUP);
      primed_q <= 1'b0;
      timer_q  <= '0;
      real_q   <= 1'b0;
    end else begin
      mode_q <= mode;
      real_q <= sample && primed_q;
      if (!en || restart) begin
        warm_q   <= WW'(WARMUP);
        primed_q <= 1'b0;
        timer_q  <= '0;
      end else if (warm_q != '0) begin
        warm_q <= warm_q - 1'b1;
      end else if (sample) begin
        primed_q <= 1'b1;
        timer_q  <= '0;
      end else begin
        timer_q <= timer_q + 1'b1;
      end
    end
  end

  for (genvar i = 0; i < NRESP; i++) begin : g_bit
    logic [CW-1:0] cnt_top, cnt_bot;

    puf_bit #(.NRO(NRO), .SELW(SELW), .CW(CW)) u_bit (
      .clk, .rst_n, .ro,
      .sel_top  (challenge[i*2*SELW +: SELW]),
      .sel_bot  (challenge[i*2*SELW + SELW +: SELW]),
      .sample,
      .resp_bit (response[i]),
      .valid    (bit_valid[i]),
      .count_top(cnt_top),
      .count_bot(cnt_bot)
    );

    // The response bit is exactly the comparison of the two window counts.
    a_cmp: assert property (@(posedge clk) disable iff (!rst_n)
      bit_valid[i] |-> (response[i] == (cnt_top > cnt_bot)));
  end

  assign resp_valid = real_q;

  a_window: assert property (@(posedge clk) disable iff (!rst_n) resp_valid |-> &bit_valid);

  initial begin
    assert (RELIABLE_WINDOW >= 1 && UNRELIABLE_WINDOW >= 1 && UNRELIABLE_WINDOW <= RELIABLE_WINDOW)
      else $error("ro_puf: window lengths must satisfy 1 <= UNRELIABLE_WINDOW <= RELIABLE_WINDOW");
  end

endmodule
