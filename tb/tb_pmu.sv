// tb_pmu: checks the path metric unit of the 6.3 code over random frames
// with random branch metrics. The reference recomputes all metrics with a
// direct four-way minimum at the break stage (the structure the two-input
// merge replaces). It checks every metric of the active trellis after each
// stage, that each decision names a predecessor that gives the new metric,
// and that a known latent bit is obeyed at the break stage.
module tb_pmu;
  import dcc_pkg::*;
  localparam int K1 = 7, L = 30, BS = 10, Q = 3;
  localparam int PMW = pm_width(L, Q);
  localparam int NS1 = 1 << (K1 - 1), NS2 = NS1 / 2;
  localparam int INF = 1 << (PMW - 1), PMAX = (1 << PMW) - 1;
  localparam logic [31:0] G0 = DEF_G0, G1 = DEF_G1;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic step, init, lk, lv;
  stage_mode_t mode;
  logic [Q:0] bm [4];
  logic [NS1-1:0] dec;
  logic [PMW-1:0] pm [NS1];

  pmu dut (.clk, .rst_n, .step, .init, .mode, .bm, .latent_known(lk), .latent_val(lv),
           .dec, .pm);

  initial begin
    #5000000;
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

  function automatic int code_full(int vec);
    return int'({^(32'(vec) & G0), ^(32'(vec) & G1)});
  endfunction
  function automatic int code_red(int vec);   // oldest tap removed
    return int'({^(32'(vec) & (G0 >> 1)), ^(32'(vec) & (G1 >> 1))});
  endfunction
  function automatic int clip(int v);
    return (v > PMAX) ? PMAX : v;
  endfunction

  int ref_pm [NS1];
  int old_pm [NS1];
  int n_forced, n_free;

  initial begin
    step = 0; init = 0; lk = 0; lv = 0; mode = ST_FULL;
    foreach (bm[i]) bm[i] = '0;
    n_forced = 0; n_free = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 60; f++) begin
      for (int t = 1; t <= L; t++) begin
        @(negedge clk);
        step = 1;
        init = (t == 1);
        mode = (t < BS) ? ST_FULL : (t == BS) ? ST_BREAK : ST_REDUCED;
        foreach (bm[i]) bm[i] = (Q+1)'($urandom % 15);
        lk = (f % 3 != 0);
        lv = $urandom % 2;
        if (t == BS) begin
          if (lk) n_forced++; else n_free++;
        end
        for (int s = 0; s < NS1; s++)
          old_pm[s] = (t == 1) ? ((s == 0) ? 0 : INF) : ref_pm[s];
        if (t < BS) begin
          for (int n = 0; n < NS1; n++) begin
            int a, b;
            a = old_pm[(2 * n) % NS1]     + int'(bm[code_full(2 * n)]);
            b = old_pm[(2 * n + 1) % NS1] + int'(bm[code_full(2 * n + 1)]);
            ref_pm[n] = clip(a <= b ? a : b);
          end
        end else if (t == BS) begin
          for (int n = 0; n < NS2; n++) begin
            int best;
            best = 1 << 30;
            for (int x = 0; x < 2; x++)
              for (int y = 0; y < 2; y++) begin
                int s, v;
                if (lk && y != int'(lv)) continue;
                s = ((n % (NS2 / 2)) << 2) | (x << 1) | y;
                v = old_pm[s] + int'(bm[code_red(2 * n + x)]);
                if (v < best) best = v;
              end
            ref_pm[n] = clip(best);
          end
        end else begin
          for (int n = 0; n < NS2; n++) begin
            int a, b;
            a = old_pm[(2 * n) % NS2]     + int'(bm[code_red(2 * n)]);
            b = old_pm[(2 * n + 1) % NS2] + int'(bm[code_red(2 * n + 1)]);
            ref_pm[n] = clip(a <= b ? a : b);
          end
        end
        #1;
        // decisions, checked before the clock edge
        if (t < BS) begin
          for (int n = 0; n < NS1; n++) begin
            int d;
            d = int'(dec[n]);
            chk(clip(old_pm[(2 * n + d) % NS1] + int'(bm[code_full(2 * n + d)])) == ref_pm[n],
                "full-stage decision");
          end
        end else if (t == BS) begin
          for (int n = 0; n < NS2; n++) begin
            int x, p, y;
            x = int'(dec[n]);
            p = ((n % (NS2 / 2)) << 1) | x;
            y = int'(dec[NS2 + p]);
            chk(clip(old_pm[(p << 1) | y] + int'(bm[code_red(2 * n + x)])) == ref_pm[n],
                "break-stage decisions");
            if (lk) chk(y == int'(lv), "latent bit obeyed");
          end
        end else begin
          for (int n = 0; n < NS2; n++) begin
            int d;
            d = int'(dec[n]);
            chk(clip(old_pm[(2 * n + d) % NS2] + int'(bm[code_red(2 * n + d)])) == ref_pm[n],
                "reduced-stage decision");
          end
        end
        @(posedge clk);
        #1;
        for (int s = 0; s < ((t < BS) ? NS1 : NS2); s++)
          chk(int'(pm[s]) == ref_pm[s], $sformatf("metric of state %0d, stage %0d", s, t));
        // random idle cycle: nothing may change
        if ($urandom % 4 == 0) begin
          @(negedge clk);
          step = 0;
          @(posedge clk);
          #1;
          chk(int'(pm[0]) == ref_pm[0], "hold without step");
        end
      end
    end
    chk(n_forced > 0 && n_free > 0, "both break-stage modes exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
