// tb_bmu: exhaustive test of the branch metric unit for 3-bit and 1-bit
// (hard-decision) inputs.
module tb_bmu;
  logic [2:0] r0, r1;
  logic [3:0] bm [4];
  logic h0, h1;
  logic [1:0] hbm [4];
  int checks = 0, failures = 0;

  bmu #(.Q(3)) dut (.r0, .r1, .bm);
  bmu #(.Q(1)) dut_hard (.r0(h0), .r1(h1), .bm(hbm));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 8; a++)
      for (int b = 0; b < 8; b++) begin
        r0 = 3'(a); r1 = 3'(b);
        #1;
        for (int c = 0; c < 4; c++) begin
          int e;
          e = (c >= 2 ? 7 - a : a) + (c % 2 == 1 ? 7 - b : b);
          checks++;
          if (int'(bm[c]) != e) begin
            failures++;
            $display("FAIL r=%0d,%0d c=%0d bm=%0d want %0d", a, b, c, bm[c], e);
          end
        end
      end
    for (int a = 0; a < 2; a++)
      for (int b = 0; b < 2; b++) begin
        h0 = a[0]; h1 = b[0];
        #1;
        for (int c = 0; c < 4; c++) begin
          int e;
          e = int'(c / 2 != a) + int'(c % 2 != b);   // Hamming distance
          checks++;
          if (int'(hbm[c]) != e) begin
            failures++;
            $display("FAIL hard r=%0d,%0d c=%0d bm=%0d want %0d", a, b, c, hbm[c], e);
          end
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
