// tb_cell1: one step of the trace-back chain in an ordinary trellis stage
// ("cell-1").
//
// Given the survivor state n (M bits, MSB newest) at the end of a stage and
// the stage's decision row, it returns the decoded input bit of that stage
// (the newest bit of n) and the state at the start of the stage: n shifted
// towards its MSB with the stored decision of n as the new oldest bit. The
// same cell, at width M = K1-1 before the break stage and K1-2 after it,
// serves both trellis sizes. Purely combinational.
module tb_cell1 #(
  parameter int M = dcc_pkg::DEF_K1 - 1
) (
  input  logic [M-1:0]      state,
  input  logic [(1<<M)-1:0] row,
  output logic [M-1:0]      prev,
  output logic              u
);
  assign u    = state[M-1];
  assign prev = {state[M-2:0], row[state]};
endmodule
