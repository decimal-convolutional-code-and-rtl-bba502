// tb_ber_awgn: bit-error rate of the decimal codes over an AWGN channel with
// BPSK at Eb/N0 = 4 dB, the operating point the code comparison uses.
// Three decoders run side by side on random frames:
//   A: the default 6.3 code (K1 = 7) with four latent-bit repetitions,
//   B: the 3.3 sample code (K1 = 4) with four latent-bit repetitions,
//   C: the 3.3 sample code without repetition (plain decimal code).
// Eb is the energy per data bit, so the repetition symbols and the tail are
// charged to the code: Es/N0 = Eb/N0 * ND / (2 * (L + REP/2)). Channel
// values y = +-1 + noise are quantised uniformly to 3 bits over [-1, +1].
// Gaussian noise comes from the Box-Muller transform of $urandom values.
// Checks: every frame decodes with the expected latency, and each code's
// BER lies below that of uncoded BPSK at the same Eb/N0 (1.25e-2). The
// measured rates are printed; they depend on the quantiser and the
// generators chosen here, so they are not compared with other figures.
module tb_ber_awgn;
  import dcc_ref_pkg::*;

  localparam real EBN0_DB = 4.0;
  localparam real UNCODED_BER = 0.0125;   // 0.5*erfc(sqrt(10^0.4))
  localparam int  NFRAMES = 1500;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam cfg_t CA = '{k1: 7, l: 30, bs: 10, rep: 4, q: 3, g0: 32'o171, g1: 32'o133};
  localparam cfg_t CB = '{k1: 4, l: 30, bs: 10, rep: 4, q: 3, g0: 32'o15,  g1: 32'o17};
  localparam cfg_t CC = '{k1: 4, l: 30, bs: 10, rep: 0, q: 3, g0: 32'o15,  g1: 32'o17};

  logic va, sa, vb, sb, vc, sc;
  logic [2:0] a0, a1, b0, b1, c0, c1;
  logic ova, ovb, ovc;
  logic [24:0] oda;
  logic [27:0] odb, odc;

  dcc_decoder dut_a (.clk, .rst_n, .in_valid(va), .in_sof(sa), .in_r0(a0), .in_r1(a1),
                     .out_valid(ova), .out_data(oda), .latent_known(), .latent_val(), .at_break());
  dcc_decoder #(.K1(4), .REP(4), .G0(32'o15), .G1(32'o17)) dut_b (
    .clk, .rst_n, .in_valid(vb), .in_sof(sb), .in_r0(b0), .in_r1(b1),
    .out_valid(ovb), .out_data(odb), .latent_known(), .latent_val(), .at_break());
  dcc_decoder #(.K1(4), .REP(0), .G0(32'o15), .G1(32'o17)) dut_c (
    .clk, .rst_n, .in_valid(vc), .in_sof(sc), .in_r0(c0), .in_r1(c1),
    .out_valid(ovc), .out_data(odc), .latent_known(), .latent_val(), .at_break());

  initial begin
    #50000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real uniform01();
    return (real'($urandom) + 1.0) / 4294967297.0;
  endfunction

  function automatic real gauss();
    return $sqrt(-2.0 * $ln(uniform01())) * $cos(6.283185307179586 * uniform01());
  endfunction

  function automatic logic [2:0] quant(logic b, real sigma);
    real y;
    int q;
    y = (b ? 1.0 : -1.0) + sigma * gauss();
    q = int'($floor((y + 1.0) * 3.5 + 0.5));
    if (q < 0) q = 0;
    if (q > 7) q = 7;
    return 3'(q);
  endfunction

  task automatic run(cfg_t c, int id, ref logic v, ref logic s, ref logic [2:0] r0,
                     ref logic [2:0] r1, ref logic ov, output int errs, output int bits);
    real esn0, sigma;
    esn0  = (10.0 ** (EBN0_DB / 10.0)) * real'(nd(c)) / real'(2 * nsym(c));
    sigma = $sqrt(1.0 / (2.0 * esn0));
    errs = 0;
    bits = 0;
    for (int f = 0; f < NFRAMES; f++) begin
      logic data [];
      logic [1:0] sym [];
      data = new[nd(c)];
      foreach (data[i]) data[i] = 1'($urandom);
      encode(c, data, sym);
      foreach (sym[i]) begin
        @(negedge clk);
        v = 1; s = (i == 0);
        r0 = quant(sym[i][1], sigma);
        r1 = quant(sym[i][0], sigma);
      end
      @(negedge clk);
      v = 0;
      @(negedge clk);
      checks++;
      if (!ov) begin
        failures++;
        $display("FAIL: no output, code %0d frame %0d", id, f);
      end
      for (int i = 0; i < nd(c); i++) begin
        logic got;
        got = (id == 0) ? oda[i] : (id == 1) ? odb[i] : odc[i];
        errs += int'(got != data[i]);
      end
      bits += nd(c);
    end
  endtask

  initial begin
    int ea, ba, eb, bb, ec, bc;
    va = 0; sa = 0; vb = 0; sb = 0; vc = 0; sc = 0;
    a0 = 0; a1 = 0; b0 = 0; b1 = 0; c0 = 0; c1 = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    fork
      run(CA, 0, va, sa, a0, a1, ova, ea, ba);
      run(CB, 1, vb, sb, b0, b1, ovb, eb, bb);
      run(CC, 2, vc, sc, c0, c1, ovc, ec, bc);
    join
    $display("Eb/N0 = %0.1f dB, uncoded BPSK BER = %e", EBN0_DB, UNCODED_BER);
    $display("K = 6.3, 4 latent copies: %0d errors in %0d bits, BER = %e", ea, ba, real'(ea) / ba);
    $display("K = 3.3, 4 latent copies: %0d errors in %0d bits, BER = %e", eb, bb, real'(eb) / bb);
    $display("K = 3.3, no latent copy:  %0d errors in %0d bits, BER = %e", ec, bc, real'(ec) / bc);
    checks += 3;
    if (real'(ea) / ba >= UNCODED_BER) begin failures++; $display("FAIL: 6.3 BER"); end
    if (real'(eb) / bb >= UNCODED_BER) begin failures++; $display("FAIL: 3.3 BER"); end
    if (real'(ec) / bc >= UNCODED_BER) begin failures++; $display("FAIL: 3.3 plain BER"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
