// tb_acs_activity: switching activity of the path metric unit, as a stand-in
// for its dynamic power. Three decoders decode the same kind of random noisy
// frames, one symbol per cycle:
//   D63: the decimal 6.3 code (K1 = 7, break stage 10),
//   D7:  K1 = 7 with the break stage moved to stage 29 (almost a plain K = 7
//        decoder),
//   D6:  K1 = 6 (generators 65/57 octal) with the break stage at 29 (almost a
//        plain K = 6 decoder).
// For each it counts the bit toggles on the inputs of all ACS units of both
// banks, per clock, split into stages before, at and after the break stage.
// Checks: after its break stage the 6.3 decoder's activity per stage is at
// most 60 % of its activity per stage before it, bank A is silent after the
// break stage (apart from one switch into isolation per frame), most frames
// decode correctly, and the total per frame orders as D6 < D63 < D7.
module tb_acs_activity;
  import dcc_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam cfg_t C63 = '{k1: 7, l: 30, bs: 10, rep: 4, q: 3, g0: 32'o171, g1: 32'o133};
  localparam cfg_t C7  = '{k1: 7, l: 30, bs: 29, rep: 4, q: 3, g0: 32'o171, g1: 32'o133};
  localparam cfg_t C6  = '{k1: 6, l: 30, bs: 29, rep: 4, q: 3, g0: 32'o65,  g1: 32'o57};
  localparam int NFR = 100;

  logic v [3], s [3];
  logic [2:0] r0 [3], r1 [3];
  logic ov [3];
  logic [24:0] od0, od1;
  logic [25:0] od2;

  dcc_decoder d63 (.clk, .rst_n, .in_valid(v[0]), .in_sof(s[0]), .in_r0(r0[0]), .in_r1(r1[0]),
                   .out_valid(ov[0]), .out_data(od0), .latent_known(), .latent_val(), .at_break());
  dcc_decoder #(.BS(29)) d7 (
    .clk, .rst_n, .in_valid(v[1]), .in_sof(s[1]), .in_r0(r0[1]), .in_r1(r1[1]),
    .out_valid(ov[1]), .out_data(od1), .latent_known(), .latent_val(), .at_break());
  dcc_decoder #(.K1(6), .BS(29), .G0(32'o65), .G1(32'o57)) d6 (
    .clk, .rst_n, .in_valid(v[2]), .in_sof(s[2]), .in_r0(r0[2]), .in_r1(r1[2]),
    .out_valid(ov[2]), .out_data(od2), .latent_known(), .latent_val(), .at_break());

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Toggle counters: [decoder][region], region 0 = before, 1 = at, 2 = after
  // the break stage; tog_a = bank A only.
  longint tog [3][3];
  longint tog_a [3][3];
  int     stages [3][3];
  int     frames_ok [3];

  function automatic int region(int stage, int bs);
    return (stage < bs) ? 0 : (stage == bs) ? 1 : 2;
  endfunction

  `define COUNT_ACTIVITY(IDX, DUT, NA, NB, BSV)                                   \
    begin                                                                         \
      static logic [63:0] pa0 [NA], pa1 [NA], pb0 [NB], pb1 [NB];                 \
      static logic [7:0]  qa0 [NA], qa1 [NA], qb0 [NB], qb1 [NB];                 \
      int ta, tb, rg;                                                             \
      ta = 0; tb = 0;                                                             \
      for (int n = 0; n < NA; n++) begin                                          \
        ta += $countones(64'(DUT.u_pmu.a_in0[n]) ^ pa0[n]) +                      \
              $countones(64'(DUT.u_pmu.a_in1[n]) ^ pa1[n]) +                      \
              $countones(8'(DUT.u_pmu.a_bm0[n]) ^ qa0[n]) +                       \
              $countones(8'(DUT.u_pmu.a_bm1[n]) ^ qa1[n]);                        \
        pa0[n] = 64'(DUT.u_pmu.a_in0[n]); pa1[n] = 64'(DUT.u_pmu.a_in1[n]);       \
        qa0[n] = 8'(DUT.u_pmu.a_bm0[n]);  qa1[n] = 8'(DUT.u_pmu.a_bm1[n]);        \
      end                                                                         \
      for (int n = 0; n < NB; n++) begin                                          \
        tb += $countones(64'(DUT.u_pmu.b_in0[n]) ^ pb0[n]) +                      \
              $countones(64'(DUT.u_pmu.b_in1[n]) ^ pb1[n]) +                      \
              $countones(8'(DUT.u_pmu.b_bm0[n]) ^ qb0[n]) +                       \
              $countones(8'(DUT.u_pmu.b_bm1[n]) ^ qb1[n]);                        \
        pb0[n] = 64'(DUT.u_pmu.b_in0[n]); pb1[n] = 64'(DUT.u_pmu.b_in1[n]);       \
        qb0[n] = 8'(DUT.u_pmu.b_bm0[n]);  qb1[n] = 8'(DUT.u_pmu.b_bm1[n]);        \
      end                                                                         \
      if (DUT.step) begin                                                         \
        rg = region(DUT.stage, BSV);                                              \
        tog[IDX][rg] += ta + tb;                                                  \
        tog_a[IDX][rg] += ta;                                                     \
        stages[IDX][rg]++;                                                        \
      end                                                                         \
    end

  bit counting = 0;
  always @(negedge clk) if (counting) begin
    `COUNT_ACTIVITY(0, d63, 64, 32, 10)
    `COUNT_ACTIVITY(1, d7, 64, 32, 29)
    `COUNT_ACTIVITY(2, d6, 32, 16, 29)
  end

  task automatic run(cfg_t c, int id);
    for (int f = 0; f < NFR; f++) begin
      logic data [];
      logic [1:0] sym [];
      bit ok;
      data = new[nd(c)];
      foreach (data[i]) data[i] = 1'($urandom);
      encode(c, data, sym);
      foreach (sym[i]) begin
        @(posedge clk);
        #1;
        v[id] = 1; s[id] = (i == 0);
        r0[id] = sym[i][1] ? 3'(7 - $urandom % 3) : 3'($urandom % 3);
        r1[id] = sym[i][0] ? 3'(7 - $urandom % 3) : 3'($urandom % 3);
        if ($urandom % 40 == 0) r0[id] = 3'(7) - r0[id];
      end
      @(posedge clk);
      #1;
      v[id] = 0;
      @(posedge clk);
      #1;
      ok = 1;
      for (int i = 0; i < nd(c); i++) begin
        logic got;
        got = (id == 0) ? od0[i] : (id == 1) ? od1[i] : od2[i];
        if (got != data[i]) ok = 0;
      end
      frames_ok[id] += int'(ok);
    end
  endtask

  initial begin
    real act [3][3];
    real per_frame [3];
    foreach (v[i]) begin v[i] = 0; s[i] = 0; r0[i] = 0; r1[i] = 0; frames_ok[i] = 0; end
    foreach (tog[i, j]) begin tog[i][j] = 0; tog_a[i][j] = 0; stages[i][j] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    counting = 1;
    fork
      run(C63, 0);
      run(C7, 1);
      run(C6, 2);
    join
    for (int d = 0; d < 3; d++) begin
      per_frame[d] = 0;
      for (int r = 0; r < 3; r++) begin
        act[d][r] = stages[d][r] ? real'(tog[d][r]) / stages[d][r] : 0.0;
        per_frame[d] += real'(tog[d][r]);
      end
      per_frame[d] /= NFR;
    end
    $display("ACS input toggles per stage (before / at / after break stage):");
    $display("  6.3     : %0.1f / %0.1f / %0.1f, per frame %0.0f",
             act[0][0], act[0][1], act[0][2], per_frame[0]);
    $display("  ~7 (BS=29): %0.1f / %0.1f / %0.1f, per frame %0.0f",
             act[1][0], act[1][1], act[1][2], per_frame[1]);
    $display("  ~6 (BS=29): %0.1f / %0.1f / %0.1f, per frame %0.0f",
             act[2][0], act[2][1], act[2][2], per_frame[2]);
    $display("  6.3 relative to ~7: %0.2f; ~6 relative to ~7: %0.2f",
             per_frame[0] / per_frame[1], per_frame[2] / per_frame[1]);
    checks += 6;
    if (act[0][2] > 0.6 * act[0][0]) begin failures++; $display("FAIL: no halving after BS"); end
    // bank A toggles once, when its inputs switch to the isolation value
    if (real'(tog_a[0][2]) / NFR > act[0][0]) begin failures++; $display("FAIL: bank A toggles after BS"); end
    if (!(per_frame[0] < per_frame[1])) begin failures++; $display("FAIL: 6.3 not below ~7"); end
    if (!(per_frame[2] < per_frame[0])) begin failures++; $display("FAIL: ~6 not below 6.3"); end
    if (frames_ok[0] < NFR * 9 / 10) begin failures++; $display("FAIL: 6.3 decoding"); end
    if (frames_ok[1] < NFR * 9 / 10) begin failures++; $display("FAIL: ~7 decoding"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
