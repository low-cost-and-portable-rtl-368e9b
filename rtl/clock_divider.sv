// clock_divider: divides the PLL clock by DIV to make the sampling clock.
//
// A counter runs 0 .. DIV-1 on the input clock; the output is high while
// the count is below DIV/2 (rounded down), so for DIV = 5 the output is high
// for 2 and low for 3 input cycles: 10 ns in, 50 ns out. The output comes
// straight from a flip-flop, so it is glitch-free and can drive a clock
// tree.
//
// Interface: rst is an asynchronous, active-high reset; while it is high the
// output is low. The first rising edge of clk_out comes on the first rising
// edge of clk_in after rst falls, and then every DIV input cycles.
//
// From the published design: the division ratio of 5 and the use of a
// divided clock as the sampling clock. The 2/5 duty cycle is this design's
// choice.
module clock_divider #(
  parameter int unsigned DIV = 5
) (
  input  logic clk_in,
  input  logic rst,
  output logic clk_out
);

  localparam int unsigned CNT_W = (DIV > 1) ? $clog2(DIV) : 1;
  localparam int unsigned HIGH  = (DIV / 2 > 0) ? DIV / 2 : 1;

  logic [CNT_W-1:0] cnt;

  always_ff @(posedge clk_in or posedge rst) begin
    if (rst) begin
      cnt     <= '0;
      clk_out <= 1'b0;
    end else begin
      cnt     <= (cnt == CNT_W'(DIV - 1)) ? '0 : cnt + 1'b1;
      clk_out <= (cnt < CNT_W'(HIGH));
    end
  end

endmodule
