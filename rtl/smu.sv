// smu: survivor memory unit of the decimal Viterbi decoder.
//
// Stores the ACS decision bits of every stage of a frame for the trace-back
// unit. A stage before the break stage needs one bit per state of the full
// trellis (NS1 = 2^(K1-1) bits). The break stage needs NS2 = NS1/2 branch
// decisions plus NS2 latent-bit decisions, NS1 bits in all. Every stage after
// it needs only NS2 bits, so from the break stage on the memory per stage is
// halved. The memory is a register array (BS rows of NS1 bits and L-BS rows of
// NS2 bits); all rows are read in parallel by the trace-back unit.
//
// Timing: with we = 1 the row of stage wr_stage (1-based) takes din at the
// clock edge; for rows after the break stage only din[NS2-1:0] is kept. A row
// is overwritten by the next frame, so the trace-back must run in the cycle
// after the last stage of a frame, before stage 1 of the next frame arrives
// with its new decisions; the decoder schedules it so.
module smu #(
  parameter int K1 = dcc_pkg::DEF_K1,
  parameter int L  = dcc_pkg::DEF_L,
  parameter int BS = dcc_pkg::DEF_BS,
  localparam int NS1 = 1 << (K1 - 1),
  localparam int NS2 = NS1 / 2,
  localparam int SW  = $clog2(L + 1)
) (
  input  logic           clk,
  input  logic           we,
  input  logic [SW-1:0]  wr_stage,
  input  logic [NS1-1:0] din,
  output logic [NS1-1:0] full_rows [BS],       // stages 1 .. BS
  output logic [NS2-1:0] red_rows  [L-BS]      // stages BS+1 .. L
);
  initial assert (BS < L) else $error("BS must be below L");

  always_ff @(posedge clk) begin
    if (we) begin
      for (int t = 1; t <= BS; t++)
        if (32'(wr_stage) == t) full_rows[t-1] <= din;
      for (int t = BS + 1; t <= L; t++)
        if (32'(wr_stage) == t) red_rows[t-BS-1] <= din[NS2-1:0];
    end
  end
endmodule
