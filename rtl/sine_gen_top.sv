// sine_gen_top: FPGA part of an interactive sine-wave generator.
//
// A PC sends a six-byte request over RS-232: update flag, signal type and
// the frequency as four decimal digits (thousands, hundreds, tens, ones of
// kHz). The rs232_controller collects the bytes in data_buffer; the
// controller_fsm checks the request, sets the frequency step to the
// frequency in kHz and restarts the PLL. The PLL turns the 20 ns board
// clock into a 10 ns clock, the clock divider divides it by 5 into the
// 50 ns sampling clock, and on every sampling clock the sine table steps its
// address by freq_step through a 20000-sample period and outputs the sample:
// 1 kHz .. 1 MHz in 1 kHz steps, as a 16-bit signed digital signal.
//
// Clock domains: sys_clk (board clock) runs the receiver and the FSM;
// sampling_clk runs the sine table. freq_step crosses between them without
// synchronisers because it only changes while the PLL is in reset, when
// sampling_clk is stopped, and while the table is held in reset. The PLL
// clock runs while it acquires lock, so the sampling clock runs too and a
// reset synchroniser on it holds the table at address 0 until locked is
// high, then releases it on the second sampling clock edge.
//
// Interface: rst_n is the board's active-low reset button; rxd the RS-232
// receive line (idle high). dataout changes on rising edges of
// sampling_clk. data_buffer, freq_step, pll_locked, update_done,
// freq_update_req, req_rejected and rx_frame_err (a byte with a bad stop
// bit) are status outputs for observation.
//
// The block structure and the clock plan follow the published design; the
// reset synchroniser and the status outputs are this design's additions.
module sine_gen_top
  import sine_gen_pkg::*;
#(
  parameter int unsigned CLK_HZ          = 50_000_000,
  parameter int unsigned BAUD            = 115_200,
  parameter int unsigned PLL_LOCK_CYCLES = 64,
  parameter int unsigned CLK_DIV         = 5
) (
  input  logic                     sys_clk,
  input  logic                     rst_n,
  input  logic                     rxd,
  output logic signed [DATA_W-1:0] dataout,
  output logic                     sampling_clk,
  output logic [47:0]              data_buffer,
  output logic [STEP_W-1:0]        freq_step,
  output logic                     pll_locked,
  output logic                     update_done,
  output logic                     freq_update_req,
  output logic                     req_rejected,
  output logic                     rx_frame_err
);

  data_buffer_t      buf_q;
  logic              buffer_valid;
  logic              pll_areset;
  logic              pll_clk;
  logic              table_rst;
  logic [7:0]        sig_type;

  rs232_controller #(
    .CLK_HZ(CLK_HZ),
    .BAUD  (BAUD)
  ) u_rs232 (
    .clk         (sys_clk),
    .rst_n       (rst_n),
    .rxd         (rxd),
    .data_buffer (buf_q),
    .buffer_valid(buffer_valid),
    .frame_err   (rx_frame_err)
  );

  controller_fsm u_fsm (
    .clk            (sys_clk),
    .rst_n          (rst_n),
    .data_buffer    (buf_q),
    .buffer_valid   (buffer_valid),
    .pll_locked     (pll_locked),
    .pll_areset     (pll_areset),
    .freq_step      (freq_step),
    .sig_type       (sig_type),
    .freq_update_req(freq_update_req),
    .req_rejected   (req_rejected),
    .update_done    (update_done)
  );

  pll_model #(
    .LOCK_CYCLES (PLL_LOCK_CYCLES),
    .IN_PERIOD_NS(1.0e9 / real'(CLK_HZ))
  ) u_pll (
    .inclk0(sys_clk),
    .areset(pll_areset),
    .c0    (pll_clk),
    .locked(pll_locked)
  );

  clock_divider #(
    .DIV(CLK_DIV)
  ) u_div (
    .clk_in (pll_clk),
    .rst    (pll_areset),
    .clk_out(sampling_clk)
  );

  reset_sync u_table_rst (
    .clk    (sampling_clk),
    .arst_in(!pll_locked),
    .rst_out(table_rst)
  );

  sine_table u_table (
    .clk    (sampling_clk),
    .rst    (table_rst),
    .step   (freq_step),
    .addr   (),
    .dataout(dataout)
  );

  assign data_buffer = buf_q;

  // Only the sine wave is generated; the FSM accepts no other type.
  a_sine_only: assert property (@(posedge sys_clk) disable iff (!rst_n)
    sig_type == SIG_SINE);

endmodule
