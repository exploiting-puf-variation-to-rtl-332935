`timescale 1ns / 1ps
// ro_counter: counts the periods of one ring oscillator and reports, in the system
// clock domain, how many periods fell into each measurement window.
//
// The counter itself is clocked by the oscillator (the "Counter" after each select
// multiplexer of the RO PUF). It runs freely and is published as a Gray code, so the
// system clock domain can sample it through a two-flop synchronizer without ever
// seeing more than one bit in motion. On each `sample` pulse the system side
// converts the synchronized value back to binary and subtracts the value of the
// previous sample: the difference is the number of oscillator periods in the window
// (modulo 2**CW). The Gray-code crossing and the difference-of-samples scheme are
// this design's choice; the source design only places a counter after each multiplexer.
//
// Timing: `count` and `count_valid` appear one system clock after `sample`. The
// window they describe is delayed by the two synchronizer stages, equally for every
// counter, so two counters sampled together compare the same interval.
module ro_counter #(
  parameter int unsigned CW = 16
) (
  input  logic          ro_clk,
  input  logic          clk,
  input  logic          rst_n,
  input  logic          sample,
  output logic [CW-1:0] count,
  output logic          count_valid
);

  // ---- oscillator domain ----
  logic [CW-1:0] bin_q, gray_q;

  always_ff @(posedge ro_clk or negedge rst_n) begin
    if (!rst_n) begin
      bin_q  <= '0;
      gray_q <= '0;
    end else begin
      bin_q  <= bin_q + 1'b1;
      gray_q <= (bin_q + 1'b1) ^ ((bin_q + 1'b1) >> 1);
    end
  end

  // ---- system clock domain ----
  logic [CW-1:0] sync1_q, sync2_q, last_q, cur_bin;

  always_comb begin
    cur_bin[CW-1] = sync2_q[CW-1];
    for (int i = CW - 2; i >= 0; i--) cur_bin[i] = cur_bin[i+1] ^ sync2_q[i];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync1_q     <= '0;
      sync2_q     <= '0;
      last_q      <= '0;
      count       <= '0;
      count_valid <= 1'b0;
    end else begin
      sync1_q     <= gray_q;
      sync2_q     <= sync1_q;
      count_valid <= sample;
      if (sample) begin
        count  <= cur_bin - last_q;
        last_q <= cur_bin;
      end
    end
  end

endmodule
