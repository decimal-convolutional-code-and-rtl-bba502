// tb_dcc_encoder: checks the decimal encoder against the reference encoder
// of dcc_ref_pkg, in two configurations: the default code of constraint
// length 6.3 with four latent-bit repetitions, and the 3.3 code (K1 = 4,
// generators 15/17 octal) without repetition. Symbols are requested on random
// cycles. Per frame it checks every symbol, the frame markers, the number of
// symbols (L + REP/2) and the number of data bits taken (L - (K1-2)).
module tb_dcc_encoder;
  import dcc_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam cfg_t CA = '{k1: 7, l: 30, bs: 10, rep: 4, q: 3, g0: 32'o171, g1: 32'o133};
  localparam cfg_t CB = '{k1: 4, l: 30, bs: 10, rep: 0, q: 3, g0: 32'o15,  g1: 32'o17};

  logic ce_a, in_a, take_a, v_a, sof_a, eof_a, rep_a;
  logic ce_b, in_b, take_b, v_b, sof_b, eof_b, rep_b;
  logic [1:0] c_a, c_b;

  dcc_encoder dut_a (.clk, .rst_n, .en(1'b1), .ce(ce_a), .in_bit(in_a), .in_take(take_a),
                     .out_valid(v_a), .out_sof(sof_a), .out_eof(eof_a), .out_rep(rep_a), .out_c(c_a));
  dcc_encoder #(.K1(4), .L(30), .BS(10), .REP(0), .G0(32'o15), .G1(32'o17)) dut_b (
    .clk, .rst_n, .en(1'b1), .ce(ce_b), .in_bit(in_b), .in_take(take_b),
    .out_valid(v_b), .out_sof(sof_b), .out_eof(eof_b), .out_rep(rep_b), .out_c(c_b));

  initial begin
    #2000000;
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

  // Collects one configuration's frames and checks them.
  task automatic run(cfg_t c, ref logic ce, ref logic inb, ref logic take,
                     ref logic v, ref logic sof, ref logic eof, ref logic rep,
                     ref logic [1:0] cc, input int nframes);
    logic data [$];
    logic [1:0] got [$];
    bit got_rep [$];
    int frames;
    frames = 0;
    while (frames < nframes) begin
      @(negedge clk);
      ce  = ($urandom % 3) != 0;
      inb = $urandom % 2;
      #1;
      if (take) data.push_back(inb);
      @(posedge clk);
      #1;
      if (v) begin
        if (got.size() == 0) chk(sof, "sof on first symbol");
        else                 chk(!sof, "no sof inside frame");
        got.push_back(cc);
        got_rep.push_back(rep);
        if (eof) begin
          logic d [];
          logic [1:0] exp [];
          chk(got.size() == nsym(c), "symbols per frame");
          chk(data.size() == nd(c), "data bits per frame");
          d = new[nd(c)];
          foreach (d[i]) d[i] = (i < data.size()) ? data[i] : 1'b0;
          encode(c, d, exp);
          for (int i = 0; i < nsym(c) && i < got.size(); i++) begin
            chk(got[i] == exp[i], $sformatf("symbol %0d of frame %0d", i, frames));
            chk(got_rep[i] == (i >= c.bs - 1 && i < c.bs - 1 + c.rep / 2), "rep flag");
          end
          data.delete();
          got.delete();
          got_rep.delete();
          frames++;
        end else
          chk(got.size() < nsym(c), "eof missing");
      end
    end
    ce = 0;
  endtask

  initial begin
    ce_a = 0; ce_b = 0; in_a = 0; in_b = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    fork
      run(CA, ce_a, in_a, take_a, v_a, sof_a, eof_a, rep_a, c_a, 40);
      run(CB, ce_b, in_b, take_b, v_b, sof_b, eof_b, rep_b, c_b, 40);
    join
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
