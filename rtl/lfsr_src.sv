// lfsr_src: the "Serial Input Generation" block, a random serial bit source.
//
// A Fibonacci linear-feedback shift register of W bits with feedback taps
// TAPS (default x^15 + x^14 + 1, a maximal-length sequence of period 2^15-1).
// The original design names an LFSR as the source but gives neither length nor
// polynomial; both are this design's choice. The output bit is the register's
// MSB; on every cycle with step = 1 the register shifts left and takes the
// feedback bit into its LSB. Reset loads SEED, which must not be zero.
module lfsr_src #(
  parameter int          W    = 15,
  parameter logic [31:0] TAPS = 32'h6000,   // bit i set: stage i+1 feeds back
  parameter logic [31:0] SEED = 32'h0001
) (
  input  logic clk,
  input  logic rst_n,
  input  logic step,
  output logic bit_out
);
  logic [W-1:0] sr;
  logic         fb;

  assign fb      = ^(sr & TAPS[W-1:0]);
  assign bit_out = sr[W-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    sr <= SEED[W-1:0];
    else if (step) sr <= {sr[W-2:0], fb};
  end
endmodule
