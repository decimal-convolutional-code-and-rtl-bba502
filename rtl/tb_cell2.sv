// tb_cell2: the trace-back step through the break stage ("cell-2").
//
// At the break stage the reduced state n (M2 = K1-2 bits) has four
// predecessors in the full trellis. The stored branch decision x = row[n]
// selects the merged state p = {n without its newest bit, x}; the stored
// latent-bit decision y = row[NS2 + p] then gives the full predecessor
// {p, y} of M2+1 bits. It also returns the decoded bit of the break stage
// (the newest bit of n). Purely combinational.
module tb_cell2 #(
  parameter int M2 = dcc_pkg::DEF_K1 - 2
) (
  input  logic [M2-1:0]          state,
  input  logic [(2<<M2)-1:0]     row,
  output logic [M2:0]            prev,
  output logic                   u
);
  localparam int NS2 = 1 << M2;

  logic [M2-1:0] p;

  assign u    = state[M2-1];
  assign p    = {state[M2-2:0], row[{1'b0, state}]};
  assign prev = {p, row[NS2 + 32'(p)]};
endmodule
