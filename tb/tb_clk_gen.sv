// tb_clk_gen: checks the divided clock and its two delayed copies for DIV = 2
// and DIV = 5: the period of clk1, the one-cycle delays of clk2 and clk3, and
// that ce1/ce2/ce3 pulse once per period at the rising edges.
module tb_clk_gen;
  logic clk = 0, rst_n = 0;
  logic c1a, c2a, c3a, e1a, e2a, e3a;
  logic c1b, c2b, c3b, e1b, e2b, e3b;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  clk_gen #(.DIV(2)) dut_a (.clk, .rst_n, .clk1(c1a), .clk2(c2a), .clk3(c3a),
                            .ce1(e1a), .ce2(e2a), .ce3(e3a));
  clk_gen #(.DIV(5)) dut_b (.clk, .rst_n, .clk1(c1b), .clk2(c2b), .clk3(c3b),
                            .ce1(e1b), .ce2(e2b), .ce3(e3b));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // history of the last cycles
  logic [15:0] h1a, h2a, h3a, h1b, h2b, h3b, he1a, he1b;
  int n_e1a, n_e1b, cyc;

  initial begin
    h1a = 0; h2a = 0; h3a = 0; h1b = 0; h2b = 0; h3b = 0; he1a = 0; he1b = 0;
    n_e1a = 0; n_e1b = 0; cyc = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (200) begin
      @(negedge clk);
      cyc++;
      h1a = {h1a[14:0], c1a}; h2a = {h2a[14:0], c2a}; h3a = {h3a[14:0], c3a};
      h1b = {h1b[14:0], c1b}; h2b = {h2b[14:0], c2b}; h3b = {h3b[14:0], c3b};
      he1a = {he1a[14:0], e1a}; he1b = {he1b[14:0], e1b};
      n_e1a += int'(e1a); n_e1b += int'(e1b);
      if (cyc > 12) begin
        chk(h1a[0] == h1a[2], "clk1 period 2");
        chk(h1a[0] != h1a[1], "clk1 toggles every cycle at DIV=2");
        chk(h1b[0] == h1b[5] && h1b[4:0] != 5'b0 && h1b[4:0] != 5'b11111, "clk1 period 5");
        chk(h2a[0] == h1a[1] && h3a[0] == h1a[2], "clk2/clk3 delay, DIV=2");
        chk(h2b[0] == h1b[1] && h3b[0] == h1b[2], "clk2/clk3 delay, DIV=5");
        chk(e1b == (h1b[0] && !h1b[1]), "ce1 at clk1 rising edge, DIV=5");
        chk(e1a == h1a[0], "ce1 at clk1 high, DIV=2");
        chk(e2a == he1a[1] && e3a == he1a[2], "ce2/ce3 delays, DIV=2");
        chk(e2b == he1b[1] && e3b == he1b[2], "ce2/ce3 delays, DIV=5");
      end
    end
    chk(n_e1a == 100, "ce1 rate DIV=2");
    chk(n_e1b == 40, "ce1 rate DIV=5");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
