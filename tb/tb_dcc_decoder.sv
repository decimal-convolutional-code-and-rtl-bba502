// tb_dcc_decoder: end-to-end test of the decimal Viterbi decoder with frames
// made by the reference encoder, for the 6.3 code with four latent-bit
// repetitions and for the 3.3 code without repetition.
//   * Clean frames must be decoded exactly.
//   * Noisy frames: the decoded frame must be a maximum-likelihood choice:
//     its soft distance to the received frame must equal the smallest
//     distance the reference Viterbi finds (restricted to the latent value the
//     repetitions indicate, when they indicate one), and it must carry that
//     latent value.
//   * out_valid must come exactly two cycles after the last symbol.
//   * Some frames carry a tie in the repetitions (no latent decision).
// Symbols arrive with random gaps; frames sometimes follow back to back.
module tb_dcc_decoder;
  import dcc_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam cfg_t CA = '{k1: 7, l: 30, bs: 10, rep: 4, q: 3, g0: 32'o171, g1: 32'o133};
  localparam cfg_t CB = '{k1: 4, l: 30, bs: 10, rep: 0, q: 3, g0: 32'o15,  g1: 32'o17};
  localparam int NDA = 25, NDB = 28;

  logic va, sa, vb, sb;
  logic [2:0] a0, a1, b0, b1;
  logic ova, ovb, lka, lva, lkb, lvb, bka, bkb;
  logic [NDA-1:0] oda;
  logic [NDB-1:0] odb;

  dcc_decoder dut_a (.clk, .rst_n, .in_valid(va), .in_sof(sa), .in_r0(a0), .in_r1(a1),
                     .out_valid(ova), .out_data(oda), .latent_known(lka), .latent_val(lva), .at_break(bka));
  dcc_decoder #(.K1(4), .L(30), .BS(10), .Q(3), .REP(0), .G0(32'o15), .G1(32'o17)) dut_b (
    .clk, .rst_n, .in_valid(vb), .in_sof(sb), .in_r0(b0), .in_r1(b1),
    .out_valid(ovb), .out_data(odb), .latent_known(lkb), .latent_val(lvb), .at_break(bkb));

  int n_corrected, n_forced, n_tie, n_noisy;

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic int noisy(int v, int level);
    int n;
    if (level == 0 || ($urandom % 100) >= level) return v;
    n = int'($urandom % 7) - 3 + int'($urandom % 7) - 3 + int'($urandom % 5) - 2;
    v += n;
    return v < 0 ? 0 : v > 7 ? 7 : v;
  endfunction

  task automatic one_frame(cfg_t c, int level, bit tie, ref logic v, ref logic s,
                           ref logic [2:0] r0, ref logic [2:0] r1,
                           ref logic ov, ref logic lk, ref logic lv);
    logic data [];
    logic [1:0] sym [];
    int x0 [], x1 [];
    int sum, nsy, lat_idx;
    bit fix, fval, clean;
    data = new[nd(c)];
    foreach (data[i]) data[i] = 1'($urandom);
    encode(c, data, sym);
    nsy = nsym(c);
    x0 = new[nsy];
    x1 = new[nsy];
    clean = 1;
    foreach (sym[i]) begin
      x0[i] = noisy(sym[i][1] ? 7 : 0, level);
      x1[i] = noisy(sym[i][0] ? 7 : 0, level);
      if ((x0[i] >= 4) != sym[i][1] || (x1[i] >= 4) != sym[i][0]) clean = 0;
    end
    // a tie: the repetitions say nothing, the merge must use the metrics
    if (tie)
      for (int i = c.bs - 1; i < c.bs - 1 + c.rep / 2; i++) begin
        x0[i] = 3;
        x1[i] = 4;
      end
    // latent estimate from the repetitions
    sum = 0;
    for (int i = c.bs - 1; i < c.bs - 1 + c.rep / 2; i++) sum += x0[i] + x1[i];
    fix  = (c.rep > 0) && (2 * sum != c.rep * 7);
    fval = 2 * sum > c.rep * 7;
    for (int i = 0; i < nsy; i++) begin
      while ($urandom % 3 == 0) begin
        @(negedge clk);
        v = 0;
      end
      @(negedge clk);
      v = 1; s = (i == 0);
      r0 = 3'(x0[i]); r1 = 3'(x1[i]);
      #1;
      chk((c.k1 == 7 ? bka : bkb) == (i == c.bs - 1 + c.rep / 2), "break-stage flag");
      if (i == c.bs - 1 + c.rep / 2 && c.rep > 0) begin
        #1;
        chk(lk == fix && (!fix || lv == fval), "latent estimate");
        if (fix) n_forced++; else n_tie++;
      end
    end
    @(negedge clk);
    v = 0;
    chk(!ov, "no output one cycle after the last symbol");
    @(negedge clk);
    chk(ov, "output two cycles after the last symbol");
    begin
      logic got [];
      int dg, dml;
      got = new[nd(c)];
      foreach (got[i]) got[i] = (c.k1 == 7) ? oda[i] : odb[i];
      if (level == 0) begin
        foreach (got[i]) chk(got[i] == data[i], $sformatf("clean frame bit %0d", i));
      end else begin
        n_noisy++;
        dg  = distance(c, got, x0, x1);
        dml = ml_distance(c, x0, x1, fix, fval);
        chk(dg == dml, $sformatf("ML distance %0d vs %0d", dg, dml));
        lat_idx = c.bs - (c.k1 - 1);
        if (fix && lat_idx >= 1) chk(got[lat_idx-1] == fval, "latent bit in decoded frame");
        if (!clean && got == data) n_corrected++;
      end
    end
  endtask

  initial begin
    va = 0; sa = 0; vb = 0; sb = 0; a0 = 0; a1 = 0; b0 = 0; b1 = 0;
    n_corrected = 0; n_forced = 0; n_tie = 0; n_noisy = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    fork
      begin
        for (int f = 0; f < 30; f++) one_frame(CA, 0, 0, va, sa, a0, a1, ova, lka, lva);
        for (int f = 0; f < 200; f++) one_frame(CA, 10 + f % 25, f % 7 == 3, va, sa, a0, a1, ova, lka, lva);
      end
      begin
        for (int f = 0; f < 30; f++) one_frame(CB, 0, 0, vb, sb, b0, b1, ovb, lkb, lvb);
        for (int f = 0; f < 200; f++) one_frame(CB, 10 + f % 25, 0, vb, sb, b0, b1, ovb, lkb, lvb);
      end
    join
    $display("noisy frames %0d, corrected %0d, latent forced %0d, latent tie %0d",
             n_noisy, n_corrected, n_forced, n_tie);
    chk(n_corrected > 0, "some channel errors corrected");
    chk(n_forced > 0, "latent bit taken from repetitions");
    chk(n_tie > 0, "latent tie resolved by the path metrics");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
