// controller_fsm: the Controller FSM of the generator. It turns a received
// data_buffer into a new frequency step and restarts the sampling clock.
//
// States:
//   RESET_PLL  hold the PLL in reset (pll_areset high) for RESET_CYCLES
//              clocks. The new step is loaded on entry, while the sampling
//              clock is being stopped.
//   WAIT_LOCK  wait for the PLL's locked flag.
//   GENERATE   the table runs with the new step; update_done is high. A
//              buffer_valid pulse whose update-request byte is 01h moves
//              to IDENTIFY (freq_update_req pulses).
//   IDENTIFY   decode signal type and the four decimal digits to a
//              frequency in kHz. A sine request for 1 .. 1000 kHz with
//              digits 0..9 goes on to RESET_PLL; anything else is refused
//              (req_rejected pulses) and the old signal keeps running.
// Out of reset the FSM starts in RESET_PLL with step 1 (the 1 kHz base
// signal), so power-up and an update take the same path.
//
// Interface: clk system clock, rst_n asynchronous active-low reset (the
// board's reset button); data_buffer/buffer_valid from the RS232
// controller; pll_locked from the PLL. freq_step and sig_type feed the
// lookup table and change only on entry to RESET_PLL. Timing: from
// buffer_valid to pll_areset: 2 clocks; pll_areset stays high RESET_CYCLES
// clocks; update_done rises the clock after pll_locked is seen high.
// Requests that arrive outside GENERATE are ignored.
//
// From the published design: the sequence check request, identify type
// and frequency, update the step and reset the PLL, wait for lock, generate;
// step = frequency in kHz; the signal names. The validity checks, the reset
// length and the power-up step of 1 are this design's choices.
module controller_fsm
  import sine_gen_pkg::*;
#(
  parameter int unsigned RESET_CYCLES = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  data_buffer_t      data_buffer,
  input  logic              buffer_valid,
  input  logic              pll_locked,
  output logic              pll_areset,
  output logic [STEP_W-1:0] freq_step,
  output logic [7:0]        sig_type,
  output logic              freq_update_req,
  output logic              req_rejected,
  output logic              update_done
);

  typedef enum logic [1:0] {RESET_PLL, WAIT_LOCK, GENERATE, IDENTIFY} state_e;

  localparam int unsigned RC_W = $clog2(RESET_CYCLES + 1);

  state_e            state;
  logic [RC_W-1:0]   rst_cnt;
  logic [13:0]       freq_khz;     // up to 9999 from four digits
  logic              digits_ok;
  logic              request_ok;

  // Decimal digits to binary kHz
  always_comb begin
    digits_ok = (data_buffer.thousands <= 8'd9) && (data_buffer.hundreds <= 8'd9)
             && (data_buffer.tens <= 8'd9) && (data_buffer.ones <= 8'd9);
    freq_khz  = 14'(data_buffer.thousands) * 14'd1000
              + 14'(data_buffer.hundreds)  * 14'd100
              + 14'(data_buffer.tens)      * 14'd10
              + 14'(data_buffer.ones);
    request_ok = digits_ok && (data_buffer.sig_type == SIG_SINE)
              && (freq_khz >= 14'(F_MIN_KHZ)) && (freq_khz <= 14'(F_MAX_KHZ));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state           <= RESET_PLL;
      rst_cnt         <= '0;
      freq_step       <= STEP_W'(1);
      sig_type        <= SIG_SINE;
      freq_update_req <= 1'b0;
      req_rejected    <= 1'b0;
      update_done     <= 1'b0;
    end else begin
      freq_update_req <= 1'b0;
      req_rejected    <= 1'b0;
      unique case (state)
        RESET_PLL: begin
          if (rst_cnt == RC_W'(RESET_CYCLES - 1)) begin
            rst_cnt <= '0;
            state   <= WAIT_LOCK;
          end else begin
            rst_cnt <= rst_cnt + 1'b1;
          end
        end
        WAIT_LOCK: begin
          if (pll_locked) begin
            update_done <= 1'b1;
            state       <= GENERATE;
          end
        end
        GENERATE: begin
          if (buffer_valid && data_buffer.update_req == UPDATE_REQ) begin
            freq_update_req <= 1'b1;
            state           <= IDENTIFY;
          end
        end
        IDENTIFY: begin
          if (request_ok) begin
            freq_step   <= STEP_W'(freq_khz);
            sig_type    <= data_buffer.sig_type;
            update_done <= 1'b0;
            rst_cnt     <= '0;
            state       <= RESET_PLL;
          end else begin
            req_rejected <= 1'b1;
            state        <= GENERATE;
          end
        end
        default: state <= RESET_PLL;
      endcase
    end
  end

  assign pll_areset = (state == RESET_PLL);

  // The step only changes when the PLL is being reset.
  a_step_changes_in_reset: assert property (@(posedge clk) disable iff (!rst_n)
    !$stable(freq_step) |-> state == RESET_PLL);
  // The step is always inside the supported range.
  a_step_in_range: assert property (@(posedge clk) disable iff (!rst_n)
    freq_step >= STEP_W'(F_MIN_KHZ) && freq_step <= STEP_W'(F_MAX_KHZ));

endmodule
