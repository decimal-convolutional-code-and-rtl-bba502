// acs2: two-input add-compare-select unit, the basic cell of the path metric
// unit.
//
// It adds a branch metric to each of two candidate path metrics, compares the
// sums and passes on the smaller one together with a decision bit that says
// which candidate won (0: path 0, 1: path 1). On a tie path 0 wins; the tie
// rule is this design's choice. Purely combinational. The sum is formed one
// bit wider than the path metric and clipped to the largest metric, so an
// "unreachable" start metric can never wrap round to a small value.
module acs2 #(
  parameter int PMW = 10,   // path metric width
  parameter int BMW = 4     // branch metric width
) (
  input  logic [PMW-1:0] pm0,
  input  logic [BMW-1:0] bm0,
  input  logic [PMW-1:0] pm1,
  input  logic [BMW-1:0] bm1,
  output logic [PMW-1:0] pm_out,
  output logic           dec
);
  localparam logic [PMW:0] PM_MAX = {1'b0, {PMW{1'b1}}};

  logic [PMW:0] s0, s1, win;

  always_comb begin
    s0  = {1'b0, pm0} + (PMW+1)'(bm0);
    s1  = {1'b0, pm1} + (PMW+1)'(bm1);
    dec = (s1 < s0);
    win = dec ? s1 : s0;
    pm_out = (win > PM_MAX) ? PM_MAX[PMW-1:0] : win[PMW-1:0];
  end
endmodule
