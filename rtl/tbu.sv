// tbu: trace-back unit of the decimal Viterbi decoder.
//
// A combinational chain of trace-back cells, one per trellis stage, that
// walks the survivor memory of a whole frame backwards. The frame is
// terminated, so the chain starts in reduced state 0 after stage L. Stages
// L .. BS+1 use cell-1 at the reduced width K1-2, the break stage uses cell-2,
// which widens the state back to K1-1 bits, and stages BS-1 .. 1 use cell-1 at
// the full width. Each cell yields the decoded bit of its stage; the first
// ND = L-(K1-2) of them are the frame's data bits (the rest are tail bits).
// Because the cells after the break stage are narrower, the chain is shorter
// in logic than one for the plain K1 code. The critical path runs through all
// L cells; the decoder registers the result. The bits of the tail stages are
// left unused (they are zero by construction), which lint reports as unused
// bits of u.
module tbu #(
  parameter int K1 = dcc_pkg::DEF_K1,
  parameter int L  = dcc_pkg::DEF_L,
  parameter int BS = dcc_pkg::DEF_BS,
  localparam int M1  = K1 - 1,
  localparam int M2  = K1 - 2,
  localparam int NS1 = 1 << M1,
  localparam int NS2 = NS1 / 2,
  localparam int ND  = L - M2
) (
  input  logic [NS1-1:0] full_rows [BS],
  input  logic [NS2-1:0] red_rows  [L-BS],
  output logic [ND-1:0]  data      // data[t-1] = decoded bit of stage t
);
  logic [M2-1:0] rs [BS:L];     // reduced state at the end of stage t
  logic [M1-1:0] fs [0:BS-1];   // full state at the end of stage t
  logic [L:1]    u;

  assign rs[L] = '0;

  for (genvar t = L; t > BS; t--) begin : g_red
    tb_cell1 #(.M(M2)) u_cell (
      .state(rs[t]), .row(red_rows[t-BS-1]), .prev(rs[t-1]), .u(u[t]));
  end

  tb_cell2 #(.M2(M2)) u_break (
    .state(rs[BS]), .row(full_rows[BS-1]), .prev(fs[BS-1]), .u(u[BS]));

  for (genvar t = BS - 1; t >= 1; t--) begin : g_full
    tb_cell1 #(.M(M1)) u_cell (
      .state(fs[t]), .row(full_rows[t-1]), .prev(fs[t-1]), .u(u[t]));
  end

  assign data = u[ND:1];
endmodule
