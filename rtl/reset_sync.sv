// reset_sync: reset synchroniser. The reset output rises as soon as
// arst_in rises (asynchronously) and falls on the second rising edge of clk
// after arst_in has fallen, so the logic it resets leaves reset in step with
// its own clock. It also asserts its output on every clock edge while
// arst_in is high, and powers up asserted (FPGA flip-flop initial value),
// so the logic behind it starts in reset even if arst_in was already high
// at power-up and never rose. Both reset signals are active high. Helper of
// the generator's clock-domain crossing; not a block of the published
// design.
module reset_sync #(
  parameter int unsigned STAGES = 2
) (
  input  logic clk,
  input  logic arst_in,
  output logic rst_out
);

  logic [STAGES-1:0] sync = '1;

  always_ff @(posedge clk or posedge arst_in) begin
    if (arst_in) sync <= '1;
    else         sync <= {sync[STAGES-2:0], 1'b0};
  end

  assign rst_out = sync[STAGES-1];

endmodule
