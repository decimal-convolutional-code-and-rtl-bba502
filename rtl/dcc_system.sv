// dcc_system: the complete encoder/decoder test system for the decimal
// convolutional code.
//
// A random serial source (LFSR) feeds the decimal convolutional encoder; the
// code bits pass a channel stage and reach the decimal Viterbi decoder; each
// decoded frame is compared with the bits the source sent. The source, the
// encoder and the decoder run at one symbol per CLK1 period, CLK1 being the
// system clock divided by DIV (2 by default), and on successively delayed
// phases CLK1, CLK2 and CLK3 (here clock-enable strobes of one system clock).
//
// Channel stage: each code bit is mapped to the soft value 0 or 2^Q-1, the
// signed value on noise0/noise1 is added and the result is clipped to
// 0 .. 2^Q-1. With zero noise the decoder must return exactly the source bits;
// noise lets a test bench exercise error correction. The noise inputs are
// sampled in the cycle where enc_valid is high; that is the CLK3 phase, on
// which the decoder takes its symbols.
//
// The comparison with the source and the counters are this design's addition
// (the original design checked the match on a simulator waveform). Counters:
// frames decoded, frames with at least one wrong bit, and wrong bits. The
// source stalls during the tail stages and the latent-bit repetitions, where
// the encoder takes no data bit.
module dcc_system #(
  parameter int          K1   = dcc_pkg::DEF_K1,
  parameter int          L    = dcc_pkg::DEF_L,
  parameter int          BS   = dcc_pkg::DEF_BS,
  parameter int          Q    = dcc_pkg::DEF_Q,
  parameter int          REP  = dcc_pkg::DEF_REP,
  parameter logic [31:0] G0   = dcc_pkg::DEF_G0,
  parameter logic [31:0] G1   = dcc_pkg::DEF_G1,
  parameter int          DIV  = 2,
  parameter logic [31:0] SEED = 32'h0001,
  localparam int ND = L - (K1 - 2)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en,
  input  logic signed [Q:0] noise0,
  input  logic signed [Q:0] noise1,
  output logic              clk1,
  output logic              clk2,
  output logic              clk3,
  output logic              enc_valid,
  output logic              enc_sof,
  output logic              enc_rep,        // symbol is a latent-bit repetition
  output logic [1:0]        enc_c,
  output logic [Q-1:0]      chan_r0,        // channel output seen by the decoder
  output logic [Q-1:0]      chan_r1,
  output logic              src_stall,      // CLK2 edge where the encoder took no data bit
  output logic              dec_break,      // decoder is processing a break stage
  output logic              dec_valid,
  output logic [ND-1:0]     dec_data,
  output logic [ND-1:0]     ref_data,
  output logic [31:0]       frames,
  output logic [31:0]       frame_errors,
  output logic [31:0]       bit_errors,
  output logic              latent_known,   // decoder: latent bit taken from its repetitions
  output logic              latent_val
);
  localparam int QMAX = (1 << Q) - 1;

  logic ce1, ce2, ce3;
  logic src_bit, take, taken;
  logic enc_eof;
  logic [ND-1:0] src_buf;

  clk_gen #(.DIV(DIV)) u_clk (
    .clk, .rst_n, .clk1, .clk2, .clk3, .ce1, .ce2, .ce3);

  // The source offers a new bit at CLK1 once the encoder has taken the last.
  lfsr_src #(.SEED(SEED)) u_src (
    .clk, .rst_n, .step(ce1 && taken), .bit_out(src_bit));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)              taken <= 1'b0;
    else if (ce2 && take)    taken <= 1'b1;
    else if (ce1)            taken <= 1'b0;
  end

  dcc_encoder #(.K1(K1), .L(L), .BS(BS), .REP(REP), .G0(G0), .G1(G1)) u_enc (
    .clk, .rst_n, .en, .ce(ce2), .in_bit(src_bit), .in_take(take),
    .out_valid(enc_valid), .out_sof(enc_sof), .out_eof(enc_eof),
    .out_rep(enc_rep), .out_c(enc_c));

  // Channel: map to soft values, add noise, clip.
  function automatic logic [Q-1:0] chan(input logic c, input logic signed [Q:0] n);
    int v;
    v = (c ? QMAX : 0) + int'(n);
    if (v < 0)    v = 0;
    if (v > QMAX) v = QMAX;
    return Q'(v);
  endfunction

  assign chan_r0 = chan(enc_c[1], noise0);
  assign chan_r1 = chan(enc_c[0], noise1);
  assign src_stall = en && ce2 && !take;

  dcc_decoder #(.K1(K1), .L(L), .BS(BS), .Q(Q), .REP(REP), .G0(G0), .G1(G1)) u_dec (
    .clk, .rst_n, .in_valid(enc_valid && ce3), .in_sof(enc_sof), .in_r0(chan_r0), .in_r1(chan_r1),
    .out_valid(dec_valid), .out_data(dec_data),
    .latent_known, .latent_val, .at_break(dec_break));

  // Reference: the data bits of the frame the encoder has just finished.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      src_buf      <= '0;
      ref_data     <= '0;
      frames       <= '0;
      frame_errors <= '0;
      bit_errors   <= '0;
    end else begin
      if (ce2 && take) src_buf <= {src_bit, src_buf[ND-1:1]};
      if (enc_valid && enc_eof) ref_data <= src_buf;
      if (dec_valid) begin
        frames       <= frames + 1;
        frame_errors <= frame_errors + 32'(dec_data != ref_data);
        bit_errors   <= bit_errors + 32'($countones(dec_data ^ ref_data));
      end
    end
  end
endmodule
