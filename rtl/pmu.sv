// pmu: path metric unit of the decimal Viterbi decoder.
//
// It holds one path metric per trellis state and updates them once per stage.
// Before the break stage the trellis has NS1 = 2^(K1-1) states, each with two
// predecessors, and bank A (NS1 two-input ACS units) does the update. From the
// break stage on the trellis has NS2 = NS1/2 states and bank B (NS2 two-input
// ACS units) does it, while bank A and the upper half of the metric registers
// stand still. Units whose result a stage does not use get constant inputs
// (operand isolation), so the switching activity of the unit drops to about
// half from the break stage on, which is where the code saves its power.
//
// At the break stage every new state has four predecessors. Instead of a
// dedicated four-input ACS, the four-way choice is built from the two-input
// ACS units already present: the lower half of bank A first merges each pair
// of old states that differ only in the latent bit (they share the same branch
// metric, so it merges them with a zero branch metric), and bank B then runs an
// ordinary ACS on the merged metrics. When the latent bit has been recovered
// from its repetitions (latent_known = 1), the merge is forced to the path with
// latent_val by presenting the other path with the largest metric.
//
// Metric convention: smaller is better. With init = 1 the stage starts from
// the frame's start metrics (state 0 at 0, every other state "unreachable")
// instead of the registers. Metrics are never normalised; they are wide
// enough for a whole frame (see dcc_pkg::pm_width).
//
// Decision output dec, valid in the cycle of the update (combinational):
//   ST_FULL:    dec[N]      = survivor bit of full state N
//   ST_BREAK:   dec[n]      = branch-bit decision x of reduced state n,
//               dec[NS2+p]  = latent-bit decision y of merged state p
//   ST_REDUCED: dec[n]      = survivor bit of reduced state n (upper half 0)
module pmu #(
  parameter int          K1 = dcc_pkg::DEF_K1,
  parameter int          L  = dcc_pkg::DEF_L,
  parameter int          Q  = dcc_pkg::DEF_Q,
  parameter logic [31:0] G0 = dcc_pkg::DEF_G0,
  parameter logic [31:0] G1 = dcc_pkg::DEF_G1,
  localparam int PMW = dcc_pkg::pm_width(L, Q),
  localparam int NS1 = 1 << (K1 - 1),
  localparam int NS2 = NS1 / 2
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 step,      // update the metrics this cycle
  input  logic                 init,      // stage 1: start from the frame start metrics
  input  dcc_pkg::stage_mode_t mode,
  input  logic [Q:0]           bm [4],
  input  logic                 latent_known,
  input  logic                 latent_val,
  output logic [NS1-1:0]       dec,
  output logic [PMW-1:0]       pm [NS1]
);
  import dcc_pkg::*;

  localparam logic [PMW-1:0] PM_INF = PMW'(1) << (PMW - 1);
  localparam logic [PMW-1:0] PM_MAX = '1;

  logic [PMW-1:0] old  [NS1];
  logic [PMW-1:0] a_in0 [NS1];
  logic [PMW-1:0] a_in1 [NS1];
  logic [Q:0]     a_bm0 [NS1];
  logic [Q:0]     a_bm1 [NS1];
  logic [PMW-1:0] a_out [NS1];
  logic [NS1-1:0] a_dec;
  logic [PMW-1:0] b_in0 [NS2];
  logic [PMW-1:0] b_in1 [NS2];
  logic [Q:0]     b_bm0 [NS2];
  logic [Q:0]     b_bm1 [NS2];
  logic [PMW-1:0] b_out [NS2];
  logic [NS2-1:0] b_dec;

  always_comb begin
    for (int s = 0; s < NS1; s++)
      old[s] = init ? ((s == 0) ? '0 : PM_INF) : pm[s];

    // Bank A: full-trellis ACS, or latent-bit merge at the break stage.
    for (int n = 0; n < NS1; n++) begin
      automatic int p = n % NS2;                 // n without its newest bit
      a_in0[n] = old[2*p];
      a_in1[n] = old[2*p+1];
      a_bm0[n] = bm[code_sym(32'(2*n),   G0, G1)];
      a_bm1[n] = bm[code_sym(32'(2*n+1), G0, G1)];
      if (mode == ST_BREAK) begin
        a_bm0[n] = '0;
        a_bm1[n] = '0;
        if (latent_known) begin
          if (latent_val) a_in0[n] = PM_MAX;
          else            a_in1[n] = PM_MAX;
        end
      end
      // Operand isolation: units whose result is not used see constant
      // inputs, so they do not toggle.
      if (mode == ST_REDUCED || (mode == ST_BREAK && n >= NS2)) begin
        a_in0[n] = '0;
        a_in1[n] = '0;
        a_bm0[n] = '0;
        a_bm1[n] = '0;
      end
    end
  end

  always_comb begin
    // Bank B: reduced-trellis ACS; at the break stage its inputs are the
    // merged metrics of bank A.
    for (int n = 0; n < NS2; n++) begin
      automatic int p = n % (NS2 / 2);
      b_in0[n] = (mode == ST_BREAK) ? a_out[2*p]   : old[2*p];
      b_in1[n] = (mode == ST_BREAK) ? a_out[2*p+1] : old[2*p+1];
      b_bm0[n] = bm[code_sym(32'(2*n),   G0 >> 1, G1 >> 1)];
      b_bm1[n] = bm[code_sym(32'(2*n+1), G0 >> 1, G1 >> 1)];
      if (mode == ST_FULL) begin
        b_in0[n] = '0;
        b_in1[n] = '0;
        b_bm0[n] = '0;
        b_bm1[n] = '0;
      end
    end

    unique case (mode)
      ST_BREAK:   dec = {a_dec[NS2-1:0], b_dec};
      ST_REDUCED: dec = {{NS2{1'b0}}, b_dec};
      default:    dec = a_dec;
    endcase
  end

  for (genvar g = 0; g < NS1; g++) begin : g_bank_a
    acs2 #(.PMW(PMW), .BMW(Q+1)) u_acs (
      .pm0(a_in0[g]), .bm0(a_bm0[g]), .pm1(a_in1[g]), .bm1(a_bm1[g]),
      .pm_out(a_out[g]), .dec(a_dec[g]));
  end

  for (genvar g = 0; g < NS2; g++) begin : g_bank_b
    acs2 #(.PMW(PMW), .BMW(Q+1)) u_acs (
      .pm0(b_in0[g]), .bm0(b_bm0[g]), .pm1(b_in1[g]), .bm1(b_bm1[g]),
      .pm_out(b_out[g]), .dec(b_dec[g]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < NS1; s++) pm[s] <= (s == 0) ? '0 : PM_INF;
    end else if (step) begin
      if (mode == ST_FULL) begin
        for (int s = 0; s < NS1; s++) pm[s] <= a_out[s];
      end else begin
        for (int s = 0; s < NS2; s++) pm[s] <= b_out[s];
      end
    end
  end
endmodule
