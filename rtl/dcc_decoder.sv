// dcc_decoder: Viterbi decoder for the decimal convolutional code.
//
// It decodes the frames made by dcc_encoder: L trellis stages, constraint
// length K1 before the break stage BS and K1-1 from it on, REP repetitions of
// the latent bit sent as REP/2 extra symbols just before stage BS, and a tail
// that ends the frame in state 0.
//
// Structure, per received symbol:
//   * bmu   - branch metrics of the four possible code symbols;
//   * pmu   - add-compare-select over the full trellis before the break stage,
//             the four-way merge at the break stage (built from two-input ACS
//             units) and the halved trellis after it;
//   * smu   - decision bits of every stage, halved after the break stage;
//   * latent-bit estimator - adds up the soft values of the repeated latent
//             bit; if the sum leans to one side, the break-stage merge is
//             forced to that latent value, and on a tie it falls back to the
//             path metrics;
//   * tbu   - after the last stage, a combinational trace-back through the
//             whole frame from state 0 yields the data bits.
//
// Interface: in_valid marks a received symbol {in_r0, in_r1} (Q-bit soft
// values, 0 = sure "0", 2^Q-1 = sure "1"); in_sof marks the first symbol of a
// frame, after which NSYM-1 more symbols must follow. Symbols may come on any
// cycles. Two cycles after the last symbol of a frame (one for the trace-back,
// one to register it) out_valid pulses for one cycle and
// out_data holds the frame's ND = L-(K1-2) data bits, out_data[0] first.
// Whole-frame trace-back and the latent-bit repetition follow the original design;
// the soft-decision metric, the tie rules and the frame format are this
// design's choices. The path metrics of the PMU are not needed outside it and
// stay unread here (lint reports pm as unused).
module dcc_decoder #(
  parameter int          K1  = dcc_pkg::DEF_K1,
  parameter int          L   = dcc_pkg::DEF_L,
  parameter int          BS  = dcc_pkg::DEF_BS,
  parameter int          Q   = dcc_pkg::DEF_Q,
  parameter int          REP = dcc_pkg::DEF_REP,
  parameter logic [31:0] G0  = dcc_pkg::DEF_G0,
  parameter logic [31:0] G1  = dcc_pkg::DEF_G1,
  localparam int ND  = L - (K1 - 2),
  localparam int PMW = dcc_pkg::pm_width(L, Q)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic          in_sof,
  input  logic [Q-1:0]  in_r0,
  input  logic [Q-1:0]  in_r1,
  output logic          out_valid,
  output logic [ND-1:0] out_data,
  output logic          latent_known,  // latent bit decided by its repetitions
  output logic          latent_val,
  output logic          at_break       // the current symbol is the break stage
);
  import dcc_pkg::*;

  localparam int NS1  = 1 << (K1 - 1);
  localparam int NS2  = NS1 / 2;
  localparam int NREP = REP / 2;
  localparam int NSYM = L + NREP;
  localparam int JW   = $clog2(NSYM + 1);
  localparam int SW   = $clog2(L + 1);
  localparam int AW   = $clog2(REP * ((1 << Q) - 1) + 1) + 1;
  localparam logic [AW-1:0] HALF2 = AW'(REP * ((1 << Q) - 1));  // twice the midpoint

  initial begin
    assert (REP % 2 == 0) else $error("REP must be even");
    assert (BS > 1 && BS < L) else $error("BS out of range");
    assert (K1 >= 4) else $error("K1 must be at least 4");
  end

  // ---------------- frame control ----------------
  logic [JW-1:0] cnt, idx;
  logic          is_rep, after_bs, in_frame, step, last;
  int            stage;
  stage_mode_t   mode;

  always_comb begin
    idx      = in_sof ? '0 : cnt;
    in_frame = in_valid && (32'(idx) < NSYM);
    is_rep   = (32'(idx) >= BS - 1) && (32'(idx) < BS - 1 + NREP);
    after_bs = (32'(idx) >= BS - 1 + NREP);
    stage    = after_bs ? 32'(idx) - NREP + 1 : 32'(idx) + 1;
    step     = in_frame && !is_rep;
    last     = in_frame && (32'(idx) == NSYM - 1);
    if (stage < BS)       mode = ST_FULL;
    else if (stage == BS) mode = ST_BREAK;
    else                  mode = ST_REDUCED;
  end

  assign at_break = step && (mode == ST_BREAK);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        cnt <= JW'(NSYM);      // idle until the first in_sof
    else if (in_frame) cnt <= idx + 1'b1;
  end

  // A symbol without in_sof is only meaningful inside a frame.
  a_sof_first: assert property (@(posedge clk) disable iff (!rst_n)
    in_valid && !in_sof |-> 32'(cnt) < NSYM)
    else $error("symbol received outside a frame (missing in_sof)");

  // ---------------- latent-bit estimator ----------------
  logic [AW-1:0] acc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                 acc <= '0;
    else if (in_frame && idx == '0) acc <= '0;
    else if (in_frame && is_rep) acc <= acc + AW'(in_r0) + AW'(in_r1);
  end

  assign latent_known = (REP > 0) && ({acc, 1'b0} != {1'b0, HALF2});
  assign latent_val   = ({acc, 1'b0} > {1'b0, HALF2});

  // ---------------- BMU, PMU, SMU, TBU ----------------
  logic [Q:0]     bm [4];
  logic [NS1-1:0] dec;
  logic [PMW-1:0] pm [NS1];
  logic [NS1-1:0] full_rows [BS];
  logic [NS2-1:0] red_rows  [L-BS];
  logic [ND-1:0]  tb_data;
  logic           tb_go;

  bmu #(.Q(Q)) u_bmu (.r0(in_r0), .r1(in_r1), .bm(bm));

  pmu #(.K1(K1), .L(L), .Q(Q), .G0(G0), .G1(G1)) u_pmu (
    .clk, .rst_n, .step, .init(stage == 1), .mode, .bm,
    .latent_known, .latent_val, .dec, .pm);

  smu #(.K1(K1), .L(L), .BS(BS)) u_smu (
    .clk, .we(step), .wr_stage(SW'(stage)), .din(dec),
    .full_rows, .red_rows);

  tbu #(.K1(K1), .L(L), .BS(BS)) u_tbu (
    .full_rows, .red_rows, .data(tb_data));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tb_go     <= 1'b0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      tb_go     <= last;
      out_valid <= tb_go;
      if (tb_go) out_data <= tb_data;
    end
  end
endmodule
