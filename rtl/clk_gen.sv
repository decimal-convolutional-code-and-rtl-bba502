// clk_gen: the CLK1/CLK2/CLK3 generators of the test system.
//
// CLK1 is the system clock divided by DIV (the evaluation used DIV = 2). CLK2
// is CLK1 delayed by one system clock and CLK3 is CLK2 delayed by one more, so
// the source, encoder and decoder that they drive each see their input settle
// before they sample it. Following the original design, the three clocks are made and
// brought out as square waves. Inside this design the blocks stay on the single
// system clock and use the one-cycle strobes ce1/ce2/ce3, which mark the rising
// edge of CLK1/CLK2/CLK3; that replacement of derived clocks by clock enables
// is this design's choice. DIV must be at least 2.
module clk_gen #(
  parameter int DIV = 2
) (
  input  logic clk,
  input  logic rst_n,
  output logic clk1,
  output logic clk2,
  output logic clk3,
  output logic ce1,   // one system cycle, at the rising edge of clk1
  output logic ce2,   // one cycle after ce1
  output logic ce3    // one cycle after ce2
);
  localparam int CW = (DIV > 2) ? $clog2(DIV) : 1;

  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt  <= '0;
      clk2 <= 1'b0;
      clk3 <= 1'b0;
      ce2  <= 1'b0;
      ce3  <= 1'b0;
    end else begin
      cnt  <= (cnt == CW'(DIV - 1)) ? '0 : cnt + 1'b1;
      clk2 <= clk1;
      clk3 <= clk2;
      ce2  <= ce1;
      ce3  <= ce2;
    end
  end

  // CLK1 is high for the first half of every DIV-cycle period.
  assign clk1 = (32'(cnt) < (DIV + 1) / 2);
  assign ce1  = rst_n && (cnt == '0);
endmodule
