// sine_gen_pkg: sizes, codes and the data_buffer layout shared by the
// sine generator blocks.
//
// The table size (20000 samples of one 1 kHz period), the 15-bit address,
// the 16-bit signed sample, the 1 kHz .. 1 MHz frequency range and the
// 48-bit, six-byte data_buffer layout follow the published design. The
// 10-bit width of the frequency step is derived from the 1000 kHz maximum.
package sine_gen_pkg;

  // Lookup table
  localparam int unsigned N_SAMPLES = 20000;   // samples in one period
  localparam int unsigned ADDR_W    = 15;      // table address width
  localparam int unsigned DATA_W    = 16;      // signed sample width
  localparam int unsigned AMPLITUDE = 32767;   // peak sample value

  // Frequency step = requested frequency in kHz
  localparam int unsigned STEP_W    = 10;
  localparam int unsigned F_MIN_KHZ = 1;
  localparam int unsigned F_MAX_KHZ = 1000;

  // Byte codes carried in data_buffer
  localparam logic [7:0] UPDATE_REQ = 8'h01;   // "update request" byte
  localparam logic [7:0] SIG_SINE   = 8'h00;   // signal type: sine wave

  // data_buffer, bit 47 at the left: six bytes, each decimal digit held as
  // a binary value 0..9 (not ASCII).
  typedef struct packed {
    logic [7:0] update_req;   // [47:40]
    logic [7:0] sig_type;     // [39:32]
    logic [7:0] thousands;    // [31:24]
    logic [7:0] hundreds;     // [23:16]
    logic [7:0] tens;         // [15:8]
    logic [7:0] ones;         // [7:0]
  } data_buffer_t;

  localparam int unsigned BUFFER_BYTES = 6;

endpackage
