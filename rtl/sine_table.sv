// sine_table: the Sine Lookup Table of the generator, an address
// accumulator in front of the sine ROM.
//
// On every rising edge of the sampling clock the table address moves on by
// `step` entries. When it passes the end of the 20000-entry table it wraps
// round modulo the table size, so a step of s produces exactly s periods per
// 20000 samples: at a 50 ns sampling clock, s kHz. The ROM output is the
// generated waveform.
//
// Interface: rst is an asynchronous, active-high reset that clears the
// address to 0 (the controller holds the table in reset while the PLL
// relocks, so a new step always starts from phase 0). `step` must stay
// constant while rst is low; it crosses from the controller's clock domain
// and is only changed while this block's clock is stopped and reset.
// Timing: address a(n) = (n*step) mod DEPTH after n clocks out of reset;
// dataout shows sin at a(n-1) after clock edge n (ROM register latency).
//
// From the published design: the step-per-sampling-clock address increment,
// step = frequency in kHz, the restart at the end of the table. The modulo
// wrap (keeping the remainder instead of going back to exactly 0) is this
// design's reading; it matches the measured periods the design reports.
module sine_table #(
  parameter int unsigned DEPTH  = sine_gen_pkg::N_SAMPLES,
  parameter int unsigned ADDR_W = sine_gen_pkg::ADDR_W,
  parameter int unsigned DATA_W = sine_gen_pkg::DATA_W,
  parameter int unsigned STEP_W = sine_gen_pkg::STEP_W
) (
  input  logic                     clk,       // sampling clock
  input  logic                     rst,       // async, active high
  input  logic [STEP_W-1:0]        step,      // frequency in kHz
  output logic [ADDR_W-1:0]        addr,      // current table address
  output logic signed [DATA_W-1:0] dataout
);

  // One bit wider than the address so addr + step cannot overflow.
  logic [ADDR_W:0]   sum;
  logic [ADDR_W-1:0] next_addr;

  always_comb begin
    sum = {1'b0, addr} + (ADDR_W + 1)'(step);
    if (sum >= (ADDR_W + 1)'(DEPTH)) next_addr = ADDR_W'(sum - (ADDR_W + 1)'(DEPTH));
    else                              next_addr = ADDR_W'(sum);
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) addr <= '0;
    else     addr <= next_addr;
  end

  sine_rom #(
    .DEPTH (DEPTH),
    .ADDR_W(ADDR_W),
    .DATA_W(DATA_W)
  ) u_rom (
    .clk (clk),
    .addr(addr),
    .data(dataout)
  );

  // The address never leaves the table.
  a_addr_in_range: assert property (@(posedge clk) disable iff (rst)
    addr < ADDR_W'(DEPTH));

endmodule
