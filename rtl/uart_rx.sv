// uart_rx: RS-232 byte receiver (8 data bits, no parity, 1 stop bit).
//
// The line idles high. A falling edge starts a frame; the start bit is
// checked again half a bit later, then the eight data bits are sampled at
// the middle of each bit time, least significant bit first. Each new bit
// enters at the MSB of an 8-bit register that shifts right, so after the
// eighth bit the register holds the byte in normal order. The stop bit must
// be high: then `valid` pulses for one clock with the byte on `data`;
// otherwise `frame_err` pulses and the byte is dropped.
//
// Interface: clk is the system clock, rst_n an asynchronous active-low
// reset, rxd the raw line (synchronised here by two flip-flops). Timing: a
// frame takes 10 bit times of CLKS_PER_BIT clocks; `valid` comes in the
// middle of the stop bit, 9.5 bit times plus 3 clocks after the start edge,
// so the next start bit is always caught.
//
// From the published design: the frame format, the right-shifting 8-bit
// register loaded at the MSB, the bit counter 0..7 and the stop-bit check.
// The baud rate (115200 by default), mid-bit sampling, the input
// synchroniser and the framing-error output are this design's choices.
module uart_rx #(
  parameter int unsigned CLK_HZ = 50_000_000,
  parameter int unsigned BAUD   = 115_200
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rxd,
  output logic [7:0] data,
  output logic       valid,
  output logic       frame_err
);

  localparam int unsigned CLKS_PER_BIT = CLK_HZ / BAUD;
  localparam int unsigned CNT_W        = $clog2(CLKS_PER_BIT + 1);

  typedef enum logic [1:0] {IDLE, START, DATA, STOP} state_e;

  state_e           state;
  logic [CNT_W-1:0] tick;       // clocks into the current bit
  logic [2:0]       bit_idx;    // data bit counter 0..7
  logic [7:0]       shreg;
  logic [1:0]       rx_sync;
  logic             rx;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rx_sync <= 2'b11;
    else        rx_sync <= {rx_sync[0], rxd};
  end
  assign rx = rx_sync[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= IDLE;
      tick      <= '0;
      bit_idx   <= '0;
      shreg     <= '0;
      data      <= '0;
      valid     <= 1'b0;
      frame_err <= 1'b0;
    end else begin
      valid     <= 1'b0;
      frame_err <= 1'b0;
      unique case (state)
        IDLE: begin
          tick <= '0;
          if (!rx) state <= START;
        end
        START: begin
          // middle of the start bit: still low means a real start
          if (tick == CNT_W'(CLKS_PER_BIT / 2 - 1)) begin
            tick    <= '0;
            bit_idx <= '0;
            state   <= rx ? IDLE : DATA;
          end else begin
            tick <= tick + 1'b1;
          end
        end
        DATA: begin
          if (tick == CNT_W'(CLKS_PER_BIT - 1)) begin
            tick  <= '0;
            shreg <= {rx, shreg[7:1]};
            if (bit_idx == 3'd7) state <= STOP;
            bit_idx <= bit_idx + 1'b1;
          end else begin
            tick <= tick + 1'b1;
          end
        end
        STOP: begin
          if (tick == CNT_W'(CLKS_PER_BIT - 1)) begin
            tick <= '0;
            if (rx) begin
              data  <= shreg;
              valid <= 1'b1;
            end else begin
              frame_err <= 1'b1;
            end
            state <= IDLE;
          end else begin
            tick <= tick + 1'b1;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

  a_one_outcome: assert property (@(posedge clk) disable iff (!rst_n)
    !(valid && frame_err));

endmodule
