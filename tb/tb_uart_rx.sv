// tb_uart_rx: sends bytes at 115200 baud from a 50 MHz clock and checks the
// received byte, the framing-error flag for a low stop bit, that a short
// glitch on the idle line is not taken for a start bit, and the time from
// the start edge to `valid` (9.5 bit times, within a few clocks).
`timescale 1ns / 1ps
module tb_uart_rx;
  localparam int CLK_HZ = 50_000_000;
  localparam int BAUD   = 115_200;
  localparam int CPB    = CLK_HZ / BAUD;   // clocks per bit
  localparam real BIT_NS = real'(CPB) * 20.0;

  logic       clk = 1'b0, rst_n = 1'b1, rxd = 1'b1;
  logic [7:0] data;
  logic       valid, frame_err;
  int checks = 0, failures = 0, n_valid = 0, n_ferr = 0;
  logic [7:0] last;
  realtime    t_start, t_valid;

  uart_rx #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) dut (
    .clk(clk), .rst_n(rst_n), .rxd(rxd), .data(data), .valid(valid), .frame_err(frame_err));

  always #10 clk = ~clk;

  always @(posedge clk) begin
    if (valid) begin n_valid++; last = data; t_valid = $realtime; end
    if (frame_err) n_ferr++;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic send(logic [7:0] b, logic stop_bit);
    t_start = $realtime;
    rxd = 1'b0; #(BIT_NS);
    for (int i = 0; i < 8; i++) begin rxd = b[i]; #(BIT_NS); end
    rxd = stop_bit; #(BIT_NS);
    rxd = 1'b1;
  endtask

  task automatic send_and_check(logic [7:0] b);
    int nv;
    nv = n_valid;
    send(b, 1'b1);
    #(BIT_NS);
    check(n_valid == nv + 1, $sformatf("byte %02h: %0d valid pulses", b, n_valid - nv));
    check(last == b, $sformatf("byte %02h received as %02h", b, last));
    check(t_valid - t_start >= 9.5 * BIT_NS && t_valid - t_start <= 9.5 * BIT_NS + 100.0,
          $sformatf("valid %0t after start", t_valid - t_start));
  endtask

  initial begin
    #1 rst_n = 1'b0;
    #200 rst_n = 1'b1;
    #1000;
    send_and_check(8'b0101_0011);    // the example frame of the description
    send_and_check(8'h00);
    send_and_check(8'hFF);
    send_and_check(8'h01);
    repeat (20) send_and_check(8'($urandom));
    // back-to-back bytes, no idle time between stop and next start
    begin
      int nv;
      nv = n_valid;
      send(8'hA5, 1'b1); send(8'h5A, 1'b1);
      #(BIT_NS);
      check(n_valid == nv + 2 && last == 8'h5A, "back-to-back bytes");
    end
    // low stop bit: framing error, no byte
    begin
      int nv, nf;
      nv = n_valid; nf = n_ferr;
      send(8'h3C, 1'b0);
      #(2 * BIT_NS);
      check(n_ferr == nf + 1, "framing error not flagged");
      check(n_valid == nv, "byte with bad stop bit delivered");
    end
    // short glitch: no start
    begin
      int nv, nf;
      nv = n_valid; nf = n_ferr;
      rxd = 1'b0; #(BIT_NS / 4); rxd = 1'b1;
      #(12 * BIT_NS);
      check(n_valid == nv && n_ferr == nf, "glitch taken as a start bit");
    end
    send_and_check(8'hC3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
