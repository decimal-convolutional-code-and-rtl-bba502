// tb_tbu: checks the trace-back unit. For each test a random terminated
// frame of the 6.3 code is chosen; the decision rows are filled with random
// bits, then the bits on the frame's own state path are set so that the path
// is the survivor (including both decisions at the break stage). The unit
// must return the frame's data bits. Also run for the 3.3 code (K1 = 4).
module tb_tbu;
  int checks = 0, failures = 0;

  localparam int KA = 7, KB = 4, L = 30, BS = 10;

  logic [(1<<(KA-1))-1:0] fa [BS];
  logic [(1<<(KA-2))-1:0] ra [L-BS];
  logic [L-(KA-2)-1:0]    da;
  logic [(1<<(KB-1))-1:0] fb [BS];
  logic [(1<<(KB-2))-1:0] rb [L-BS];
  logic [L-(KB-2)-1:0]    db;

  tbu dut_a (.full_rows(fa), .red_rows(ra), .data(da));
  tbu #(.K1(KB), .L(L), .BS(BS)) dut_b (.full_rows(fb), .red_rows(rb), .data(db));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Builds rows for constraint length k from inputs u[1..L]; returns them in
  // flat form: row t as bits of rows[t].
  function automatic void build(int k, logic u [], ref logic [63:0] rows [1:L]);
    int m1, m2, ns2;
    m1 = k - 1; m2 = k - 2; ns2 = 1 << m2;
    for (int t = 1; t <= L; t++) rows[t] = {$urandom, $urandom};
    for (int t = 1; t <= L; t++) begin
      // state at end of stage t (MSB newest); before BS full width, else reduced
      int w, n, oldest;
      w = (t < BS) ? m1 : m2;
      n = 0;
      for (int i = 0; i < w; i++) n |= int'((t - i >= 1) ? u[t-i] : 1'b0) << (w - 1 - i);
      if (t != BS) begin
        oldest = int'((t - w >= 1) ? u[t-w] : 1'b0);
        rows[t][n] = oldest[0];
      end else begin
        int x, y, p;
        x = int'((t - m2 >= 1) ? u[t-m2] : 1'b0);
        y = int'((t - m1 >= 1) ? u[t-m1] : 1'b0);
        p = ((n % (ns2 / 2)) << 1) | x;
        rows[t][n] = x[0];
        rows[t][ns2 + p] = y[0];
      end
    end
  endfunction

  initial begin
    logic [63:0] rows [1:L];
    for (int it = 0; it < 300; it++) begin
      for (int cfg = 0; cfg < 2; cfg++) begin
        int k, ndat;
        logic u [];
        k = cfg ? KB : KA;
        ndat = L - (k - 2);
        u = new[L + 1];
        u[0] = 0;
        for (int t = 1; t <= L; t++) u[t] = (t <= ndat) ? 1'($urandom) : 1'b0;
        build(k, u, rows);
        if (cfg == 0) begin
          for (int t = 1; t <= BS; t++) fa[t-1] = rows[t][(1<<(KA-1))-1:0];
          for (int t = BS + 1; t <= L; t++) ra[t-BS-1] = rows[t][(1<<(KA-2))-1:0];
        end else begin
          for (int t = 1; t <= BS; t++) fb[t-1] = rows[t][(1<<(KB-1))-1:0];
          for (int t = BS + 1; t <= L; t++) rb[t-BS-1] = rows[t][(1<<(KB-2))-1:0];
        end
        #1;
        for (int t = 1; t <= ndat; t++) begin
          logic got;
          got = cfg ? db[t-1] : da[t-1];
          checks++;
          if (got !== u[t]) begin
            failures++;
            if (failures < 10) $display("FAIL cfg %0d iter %0d bit %0d", cfg, it, t);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
