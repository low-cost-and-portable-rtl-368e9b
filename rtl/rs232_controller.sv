// rs232_controller: the RS232 Controller of the generator. It receives the
// six bytes sent by the PC and gathers them in the 48-bit data_buffer.
//
// Each received byte enters data_buffer at the top (bits 47:40) while the
// buffer shifts right by one byte: the buffer continues the right shift of
// the byte receiver, so the first byte sent ends in bits 7:0 and the sixth
// in bits 47:40. The PC therefore sends the frequency digits ones, tens,
// hundreds, thousands, then the signal type, and the update-request byte
// last. After the sixth byte `buffer_valid` pulses for one clock. A byte
// with a bad stop bit is dropped and does not count.
//
// Interface: clk system clock, rst_n asynchronous active-low reset, rxd the
// RS-232 receive line. data_buffer holds the last complete or partial
// contents (it is observable as a status output); buffer_valid marks the
// clock at which six new bytes are in it. Timing: buffer_valid comes one
// clock after the receiver's valid pulse for the sixth byte.
//
// From the published design: the 48-bit data_buffer, its six fields and
// the receive-only use of the RS-232 link. The byte order on the line and
// the byte counter that finds the end of a buffer are this design's
// choices.
module rs232_controller
  import sine_gen_pkg::*;
#(
  parameter int unsigned CLK_HZ = 50_000_000,
  parameter int unsigned BAUD   = 115_200
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         rxd,
  output data_buffer_t data_buffer,
  output logic         buffer_valid,
  output logic         frame_err
);

  logic [7:0] rx_byte;
  logic       rx_valid;
  logic [2:0] byte_cnt;

  uart_rx #(
    .CLK_HZ(CLK_HZ),
    .BAUD  (BAUD)
  ) u_uart_rx (
    .clk      (clk),
    .rst_n    (rst_n),
    .rxd      (rxd),
    .data     (rx_byte),
    .valid    (rx_valid),
    .frame_err(frame_err)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      data_buffer  <= '0;
      byte_cnt     <= '0;
      buffer_valid <= 1'b0;
    end else begin
      buffer_valid <= 1'b0;
      if (rx_valid) begin
        data_buffer <= data_buffer_t'({rx_byte, data_buffer[47:8]});
        if (byte_cnt == 3'(BUFFER_BYTES - 1)) begin
          byte_cnt     <= '0;
          buffer_valid <= 1'b1;
        end else begin
          byte_cnt <= byte_cnt + 1'b1;
        end
      end
    end
  end

endmodule
