// pll_model: behavioural model of the FPGA's PLL. Not synthesizable: a real
// design uses the vendor's PLL primitive with these ports in its place.
//
// The PLL doubles the 50 MHz (20 ns) board clock to give the 100 MHz
// (10 ns) pll_clk. The model makes the doubled clock as the XOR of inclk0
// and a copy delayed by a quarter of its period: a pulse of half the output
// period follows every edge of inclk0 (inclk0 must have a 50% duty cycle).
// While areset is high, c0 is held low and locked is low. After areset
// falls, c0 runs at once, as a real PLL's output toggles while it acquires
// lock, and locked rises on the LOCK_CYCLES-th rising edge of inclk0.
// Logic clocked by c0 must therefore stay in reset until locked is high.
//
// Interface: inclk0 reference clock, areset asynchronous active-high reset,
// c0 output clock, locked lock flag. Timing: areset clears locked and stops
// c0 at once; lock takes LOCK_CYCLES reference cycles after areset falls.
//
// From the published design: the 20 ns in / 10 ns out periods, the areset
// input and the locked flag the controller waits for. The lock time is this
// model's choice.
`timescale 1ns / 1ps
module pll_model #(
  parameter int unsigned LOCK_CYCLES  = 64,
  parameter real         IN_PERIOD_NS = 20.0
) (
  input  logic inclk0,
  input  logic areset,
  output logic c0,
  output logic locked
);

  int unsigned lock_cnt;
  logic        inclk_q;   // inclk0 delayed by a quarter period

  always_ff @(posedge inclk0 or posedge areset) begin
    if (areset) begin
      lock_cnt <= 0;
      locked   <= 1'b0;
    end else if (!locked) begin
      if (lock_cnt == LOCK_CYCLES - 1) locked <= 1'b1;
      lock_cnt <= lock_cnt + 1;
    end
  end

  assign #(IN_PERIOD_NS / 4.0) inclk_q = inclk0;
  assign c0 = !areset & (inclk0 ^ inclk_q);

endmodule
