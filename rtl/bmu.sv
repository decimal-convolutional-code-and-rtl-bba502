// bmu: branch metric unit for a rate-1/2 code with Q-bit soft decisions.
//
// Each received channel value r is an unsigned Q-bit number where 0 is a
// confident "0" and 2^Q-1 a confident "1". The distance of r to an expected
// code bit is r for a 0 and (2^Q-1)-r for a 1; the branch metric of a symbol
// {c0, c1} is the sum of both distances. The unit outputs the metric of all
// four possible symbols, indexed by {c0, c1}. With Q = 1 it reduces to the
// Hamming distance of hard decisions. The metric form (Manhattan distance on
// soft values) is this design's choice; the decimal decoder uses the same BMU
// as an ordinary Viterbi decoder. Purely combinational.
module bmu #(
  parameter int Q = dcc_pkg::DEF_Q
) (
  input  logic [Q-1:0] r0,          // soft value of the first code bit (c0)
  input  logic [Q-1:0] r1,          // soft value of the second code bit (c1)
  output logic [Q:0]   bm [4]       // bm[{c0,c1}]
);
  localparam logic [Q-1:0] QMAX = {Q{1'b1}};

  logic [Q-1:0] d0 [2];
  logic [Q-1:0] d1 [2];

  always_comb begin
    d0[0] = r0;
    d0[1] = QMAX - r0;
    d1[0] = r1;
    d1[1] = QMAX - r1;
    for (int c = 0; c < 4; c++)
      bm[c] = {1'b0, d0[c[1]]} + {1'b0, d1[c[0]]};
  end
endmodule
