// tb_sine_rom: reads every address of the 20000-entry sine ROM and compares
// it with the double-precision reference, plus the table entries listed in
// the design description. Also checks the one-clock read latency.
`timescale 1ns / 1ps
module tb_sine_rom;
  import sine_ref_pkg::*;

  logic               clk = 1'b0;
  logic [14:0]        addr = '0;
  logic signed [15:0] data;
  int checks = 0, failures = 0;

  sine_rom dut (.clk(clk), .addr(addr), .data(data));

  always #5 clk = ~clk;

  task automatic check_addr(int a, int expected);
    @(negedge clk) addr = 15'(a);
    @(posedge clk) #1;
    checks++;
    if (int'(data) != expected) begin
      failures++;
      if (failures < 10) $display("FAIL addr %0d: got %0d want %0d", a, data, expected);
    end
  endtask

  initial begin
    // listed entries
    for (int i = 0; i < N_FIG; i++) check_addr(FIG_ADDR[i], FIG_DATA[i]);
    // whole table against the formula
    for (int a = 0; a < N; a++) check_addr(a, sine_ref(a));
    // latency: data must not change before the clock edge
    @(negedge clk) addr = 15'd5000;
    @(posedge clk) #1;
    @(negedge clk) addr = 15'd15000;
    #2;
    checks++;
    if (data != 16'sd32767) begin failures++; $display("FAIL read is not registered"); end
    @(posedge clk) #1;
    checks++;
    if (data > -16'sd32767) begin failures++; $display("FAIL addr 15000: %0d", data); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
