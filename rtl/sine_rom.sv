// sine_rom: one period of a sine wave, 20000 samples of 16-bit two's
// complement, read synchronously.
//
// Sample a holds floor(AMP * sin(2*pi*a/DEPTH)), so address 0 is 0, address
// DEPTH/4 is +AMP and the table runs once round the circle (1 kHz at a
// 50 ns sampling clock). The contents are computed when the memory is
// initialised instead of being read from a file; a synthesis tool turns the
// initial block into the ROM image.
//
// Interface: addr is sampled on the rising edge of clk and data shows the
// addressed sample after that edge (one cycle of latency), as in an FPGA
// block-RAM ROM with a registered address. Addresses at or above DEPTH are
// never produced by sine_table; they are out of the table's range.
//
// From the published design: 20000 entries, 15-bit address, 16-bit data,
// the clocked ROM interface and the shape of the contents. The exact
// rounding rule (floor) is this design's choice, fitted to the sample
// values the design shows.
module sine_rom #(
  parameter int unsigned DEPTH  = sine_gen_pkg::N_SAMPLES,
  parameter int unsigned ADDR_W = sine_gen_pkg::ADDR_W,
  parameter int unsigned DATA_W = sine_gen_pkg::DATA_W,
  parameter int unsigned AMP    = sine_gen_pkg::AMPLITUDE
) (
  input  logic                     clk,
  input  logic [ADDR_W-1:0]        addr,
  output logic signed [DATA_W-1:0] data
);

  logic signed [DATA_W-1:0] mem [DEPTH];

  initial begin
    for (int a = 0; a < int'(DEPTH); a++) begin
      mem[a] = DATA_W'($rtoi($floor(real'(AMP) *
                 $sin(2.0 * 3.14159265358979323846 * real'(a) / real'(DEPTH)))));
    end
  end

  always_ff @(posedge clk) begin
    data <= mem[addr];
  end

endmodule
