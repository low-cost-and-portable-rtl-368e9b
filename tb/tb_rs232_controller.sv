// tb_rs232_controller: sends the six-byte requests for 25, 150 and 667 kHz
// (ones digit first, update flag last) and checks the 48-bit data_buffer
// (010000000205h, 010000010500h, 010000060607h) and one buffer_valid pulse
// per six bytes. A byte with a low stop bit must not count.
`timescale 1ns / 1ps
module tb_rs232_controller;
  import sine_gen_pkg::*;
  localparam int CLK_HZ = 50_000_000;
  localparam int BAUD   = 115_200;
  localparam real BIT_NS = real'(CLK_HZ / BAUD) * 20.0;

  logic         clk = 1'b0, rst_n = 1'b1, rxd = 1'b1;
  data_buffer_t data_buffer;
  logic         buffer_valid, frame_err;
  logic [47:0]  captured;
  int checks = 0, failures = 0, n_bv = 0;

  rs232_controller #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) dut (
    .clk(clk), .rst_n(rst_n), .rxd(rxd), .data_buffer(data_buffer),
    .buffer_valid(buffer_valid), .frame_err(frame_err));

  always #10 clk = ~clk;

  always @(posedge clk) if (buffer_valid) begin n_bv++; captured = data_buffer; end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic send(logic [7:0] b, logic stop_bit);
    rxd = 1'b0; #(BIT_NS);
    for (int i = 0; i < 8; i++) begin rxd = b[i]; #(BIT_NS); end
    rxd = stop_bit; #(BIT_NS);
    rxd = 1'b1; #(BIT_NS);
  endtask

  // bytes go out from the least significant byte of the buffer image
  task automatic send_buffer(logic [47:0] img);
    for (int i = 0; i < 6; i++) send(img[8*i +: 8], 1'b1);
  endtask

  task automatic expect_buffer(logic [47:0] img);
    int nb;
    nb = n_bv;
    send_buffer(img);
    #(BIT_NS);
    check(n_bv == nb + 1, $sformatf("%0d buffer_valid pulses for %012h", n_bv - nb, img));
    check(captured == img, $sformatf("buffer %012h want %012h", captured, img));
  endtask

  initial begin
    #1 rst_n = 1'b0;
    #200 rst_n = 1'b1;
    #1000;
    expect_buffer(48'h01_00_00_00_02_05);   // 25 kHz
    expect_buffer(48'h01_00_00_01_05_00);   // 150 kHz
    expect_buffer(48'h01_00_00_06_06_07);   // 667 kHz
    check(data_buffer.update_req == 8'h01 && data_buffer.ones == 8'h07 &&
          data_buffer.hundreds == 8'h06, "struct fields");
    // a bad byte in the middle is dropped and the buffer still completes
    begin
      int nb;
      nb = n_bv;
      send(8'h00, 1'b1); send(8'h00, 1'b1); send(8'h77, 1'b0);
      send(8'h01, 1'b1); send(8'h00, 1'b1); send(8'h00, 1'b1);
      check(n_bv == nb, "buffer_valid before six good bytes");
      send(8'h01, 1'b1);
      #(BIT_NS);
      check(n_bv == nb + 1 && captured == 48'h01_00_00_01_00_00, "frame with dropped byte");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
