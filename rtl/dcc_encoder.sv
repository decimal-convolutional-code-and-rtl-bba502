// dcc_encoder: rate-1/2 convolutional encoder with a decimal constraint length.
//
// A frame has L trellis stages. In stages 1 .. BS-1 the two code bits depend on
// the input bit and the K1-1 previous inputs (constraint length K1). From the
// break stage BS on, the oldest register bit no longer reaches the outputs:
// both generators lose their oldest tap and the code has constraint length
// K2 = K1-1, so the decoder trellis halves. The code therefore has the
// constraint length K2 + (BS-1)/L (6.3 for the defaults). The shift register
// itself keeps all K1-1 bits; only the taps change. The last K2-1 stages of a
// frame are tail stages with input 0, which return the short register to
// zero, so a frame carries L-(K2-1) data bits. The register is cleared at the
// start of each frame.
//
// Latent bit: the register bit that is dropped at the break stage (the oldest
// bit after stage BS-1). To let the decoder recover it, the encoder sends it
// REP times by simple repetition: REP/2 extra symbols {latent, latent} are
// inserted between stage BS-1 and stage BS. REP = 0 sends the plain decimal
// code. The position of the repeated copies in the frame is this design's
// choice; the original design only states that repetition coding with four copies was
// used.
//
// Timing: one symbol per cycle with ce = 1 while en = 1. in_take is high,
// combinationally, in a cycle where the symbol being made consumes in_bit;
// the symbol appears on out_c one cycle later with out_valid. A frame is
// NSYM = L + REP/2 symbols; out_sof marks its first and out_eof its last.
module dcc_encoder #(
  parameter int          K1  = dcc_pkg::DEF_K1,
  parameter int          L   = dcc_pkg::DEF_L,
  parameter int          BS  = dcc_pkg::DEF_BS,
  parameter int          REP = dcc_pkg::DEF_REP,
  parameter logic [31:0] G0  = dcc_pkg::DEF_G0,
  parameter logic [31:0] G1  = dcc_pkg::DEF_G1
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  input  logic       ce,
  input  logic       in_bit,
  output logic       in_take,
  output logic       out_valid,
  output logic       out_sof,
  output logic       out_eof,
  output logic       out_rep,     // symbol is a latent-bit repetition
  output logic [1:0] out_c        // {c0, c1}
);
  localparam int M1   = K1 - 1;
  localparam int M2   = K1 - 2;
  localparam int NREP = REP / 2;
  localparam int NSYM = L + NREP;
  localparam int ND   = L - M2;     // data bits per frame
  localparam int JW   = $clog2(NSYM + 1);

  initial begin
    assert (REP % 2 == 0) else $error("REP must be even");
    assert (BS > 1 && BS <= L) else $error("BS out of range");
    assert (K1 >= 3) else $error("K1 must be at least 3");
  end

  logic [JW-1:0] j;          // symbol index in the frame
  logic [M1-1:0] sr;         // sr[M1-1] newest input, sr[0] oldest
  logic          is_rep;
  logic          after_bs;   // stage >= BS
  int            stage;
  logic          u;
  logic [31:0]   vec;
  logic [1:0]    sym;

  always_comb begin
    is_rep   = (32'(j) >= BS - 1) && (32'(j) < BS - 1 + NREP);
    after_bs = (32'(j) >= BS - 1 + NREP);
    stage    = after_bs ? 32'(j) - NREP + 1 : 32'(j) + 1;
    in_take  = en && ce && !is_rep && (stage <= ND);
    u        = (stage <= ND) ? in_bit : 1'b0;
    vec      = 32'({u, sr});
    if (is_rep)
      sym = {sr[0], sr[0]};
    else if (after_bs)
      sym = dcc_pkg::code_sym(vec >> 1, G0 >> 1, G1 >> 1);
    else
      sym = dcc_pkg::code_sym(vec, G0, G1);
  end

  // Data bits are taken only on symbol strobes, never during the repetitions.
  a_take: assert property (@(posedge clk) disable iff (!rst_n)
    in_take |-> ce && en && !is_rep);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      j         <= '0;
      sr        <= '0;
      out_valid <= 1'b0;
      out_sof   <= 1'b0;
      out_eof   <= 1'b0;
      out_rep   <= 1'b0;
      out_c     <= '0;
    end else begin
      out_valid <= en && ce;
      if (en && ce) begin
        out_c   <= sym;
        out_sof <= (j == '0);
        out_eof <= (32'(j) == NSYM - 1);
        out_rep <= is_rep;
        if (32'(j) == NSYM - 1) begin
          j  <= '0;
          sr <= '0;
        end else begin
          j <= j + 1'b1;
          if (!is_rep) sr <= {u, sr[M1-1:1]};
        end
      end
    end
  end
endmodule
