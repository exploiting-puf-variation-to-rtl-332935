`timescale 1ns / 1ps
// maj_vote: bitwise majority vote over the saved PUF responses.
//
// The detector keeps up to M responses of N bits; `n_valid` says how many of the
// entries (from index 0) hold a response. For every bit position the output is 1
// when strictly more than half of the valid responses have a 1 there, and 0
// otherwise; an even split therefore gives 0. With n_valid = 0 the result is 0.
// The bitwise majority is the source design's way of reducing the responses; the
// tie rule is this design's choice. Purely combinational.
module maj_vote #(
  parameter int unsigned N  = 8,
  parameter int unsigned M  = 4,
  parameter int unsigned MW = $clog2(M + 1)
) (
  input  logic [M-1:0][N-1:0] resp,
  input  logic [MW-1:0]       n_valid,
  output logic [N-1:0]        voted
);

  always_comb begin
    for (int b = 0; b < N; b++) begin
      logic [MW:0] ones;
      ones = '0;
      for (int j = 0; j < M; j++)
        if (j < int'(n_valid) && resp[j][b]) ones = ones + 1'b1;
      voted[b] = ({ones, 1'b0} > (MW + 2)'(n_valid));
    end
  end

endmodule
