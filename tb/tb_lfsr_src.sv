// tb_lfsr_src: compares the source with the recurrence of x^15 + x^14 + 1,
// s[n] = s[n-15] xor s[n-14], checks that it holds while step is low, and
// that the sequence repeats after exactly 2^15-1 steps and not before.
module tb_lfsr_src;
  logic clk = 0, rst_n = 0, step = 0, b;
  int checks = 0, failures = 0;
  bit seq [$];
  always #5 clk = ~clk;

  lfsr_src dut (.clk, .rst_n, .step, .bit_out(b));

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int first_repeat;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // the seed 1 puts the single 1 at the LSB; the MSB is output first
    for (int i = 0; i < 15; i++) seq.push_back(i == 14);
    @(negedge clk);
    step = 1;
    for (int n = 0; n < 40000; n++) begin
      bit e;
      e = (n < 15) ? seq[n] : 1'b0;
      if (n >= 15) begin
        e = seq[n-15] ^ seq[n-14];
        seq.push_back(e);
      end
      checks++;
      if (b !== e) begin
        failures++;
        if (failures < 5) $display("FAIL bit %0d: %0b want %0b", n, b, e);
      end
      @(negedge clk);
      if (n == 100) begin
        logic keep;
        step = 0; keep = b;
        repeat (3) @(negedge clk);
        checks++;
        if (b !== keep) begin failures++; $display("FAIL: moved without step"); end
        step = 1;
      end
    end
    // period
    first_repeat = 0;
    for (int p = 1; p <= 32767 && first_repeat == 0; p++) begin
      bit same;
      same = 1;
      for (int i = 0; i < 15; i++) if (seq[p+i] != seq[i]) same = 0;
      if (same) first_repeat = p;
    end
    checks++;
    if (first_repeat != 32767) begin
      failures++;
      $display("FAIL period %0d", first_repeat);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
