// tb_smu: writes random decision rows for every stage of several frames, in
// random order and with idle cycles, and checks each row against a model
// memory: full rows keep all NS1 bits, rows after the break stage keep only
// the lower NS2 bits.
module tb_smu;
  localparam int K1 = 7, L = 30, BS = 10;
  localparam int NS1 = 1 << (K1 - 1), NS2 = NS1 / 2;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic we;
  logic [4:0] wr_stage;
  logic [NS1-1:0] din;
  logic [NS1-1:0] full_rows [BS];
  logic [NS2-1:0] red_rows [L-BS];
  logic [NS1-1:0] model [1:L];

  smu dut (.clk, .we, .wr_stage, .din, .full_rows, .red_rows);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare_all();
    for (int t = 1; t <= L; t++) begin
      checks++;
      if (t <= BS ? (full_rows[t-1] !== model[t])
                  : (red_rows[t-BS-1] !== model[t][NS2-1:0])) begin
        failures++;
        if (failures < 10) $display("FAIL row %0d", t);
      end
    end
  endtask

  initial begin
    we = 0; wr_stage = 0; din = 0;
    // fill every row once in order
    for (int t = 1; t <= L; t++) begin
      @(negedge clk);
      we = 1; wr_stage = 5'(t); din = {$urandom, $urandom};
      model[t] = din;
    end
    @(negedge clk);
    we = 0;
    @(posedge clk); #1;
    compare_all();
    for (int i = 0; i < 500; i++) begin
      int t;
      @(negedge clk);
      t = 1 + $urandom % L;
      we = ($urandom % 3) != 0;
      wr_stage = 5'(t);
      din = {$urandom, $urandom};
      if (we) model[t] = din;
      @(posedge clk); #1;
      compare_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
