// tb_acs2: random and corner-case test of the two-input ACS unit against
// the add-compare-select rule (smaller sum wins, path 0 on a tie, clipped to
// the largest metric).
module tb_acs2;
  localparam int PMW = 10, BMW = 4;
  logic [PMW-1:0] pm0, pm1, pm_out;
  logic [BMW-1:0] bm0, bm1;
  logic dec;
  int checks = 0, failures = 0;

  acs2 #(.PMW(PMW), .BMW(BMW)) dut (.*);

  task automatic check_one();
    int s0, s1, w, exp_pm;
    bit exp_dec;
    s0 = int'(pm0) + int'(bm0);
    s1 = int'(pm1) + int'(bm1);
    exp_dec = s1 < s0;
    w = exp_dec ? s1 : s0;
    exp_pm = (w > (1 << PMW) - 1) ? (1 << PMW) - 1 : w;
    #1;
    checks++;
    if (pm_out !== PMW'(exp_pm) || dec !== exp_dec) begin
      failures++;
      $display("FAIL pm0=%0d bm0=%0d pm1=%0d bm1=%0d -> %0d/%0b, want %0d/%0b",
               pm0, bm0, pm1, bm1, pm_out, dec, exp_pm, exp_dec);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // ties and saturation
    pm0 = 5; bm0 = 3; pm1 = 6; bm1 = 2; check_one();
    pm0 = 5; bm0 = 3; pm1 = 6; bm1 = 1; check_one();
    pm0 = 1020; bm0 = 15; pm1 = 1023; bm1 = 15; check_one();
    pm0 = 0; bm0 = 0; pm1 = 0; bm1 = 0; check_one();
    repeat (5000) begin
      pm0 = PMW'($urandom); pm1 = PMW'($urandom);
      if ($urandom % 2) pm1 = pm0 + PMW'($urandom % 8) - 4;
      bm0 = BMW'($urandom); bm1 = BMW'($urandom);
      check_one();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
