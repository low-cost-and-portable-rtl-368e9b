// tb_sine_table: runs the address accumulator and ROM at several frequency
// steps for one full table length (20000 sampling clocks) each. Checks the
// address sequence (k*step mod 20000), every output sample against the
// reference with the one-clock ROM latency, and that exactly `step` sine
// periods (rising zero crossings) occur in 20000 samples, i.e. step kHz at
// a 50 ns sampling clock.
`timescale 1ns / 1ps
module tb_sine_table;
  import sine_ref_pkg::*;

  logic               clk = 1'b0;
  logic               rst = 1'b1;
  logic [9:0]         step = 10'd1;
  logic [14:0]        addr;
  logic signed [15:0] dataout;
  int checks = 0, failures = 0, wraps = 0;

  sine_table dut (.clk(clk), .rst(rst), .step(step), .addr(addr), .dataout(dataout));

  always #25 clk = ~clk;   // 50 ns sampling clock

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  task automatic run_step(int s);
    int exp_addr, prev_addr, crossings;
    logic signed [15:0] prev;
    rst = 1'b1;
    step = 10'(s);
    #100;
    @(negedge clk) rst = 1'b0;
    check(addr == 0, "address not 0 after reset");
    exp_addr  = 0;
    crossings = 0;
    prev      = 16'sd0;
    for (int k = 1; k <= N; k++) begin
      @(posedge clk) #1;
      prev_addr = exp_addr;
      exp_addr  = (exp_addr + s) % N;
      if (exp_addr < prev_addr) wraps++;
      check(int'(addr) == exp_addr, $sformatf("step %0d k %0d addr %0d want %0d", s, k, addr, exp_addr));
      check(int'(dataout) == sine_ref(prev_addr),
            $sformatf("step %0d k %0d data %0d want %0d", s, k, dataout, sine_ref(prev_addr)));
      if (prev < 0 && dataout >= 0) crossings++;
      prev = dataout;
    end
    // the sample after the last one closes the final period
    @(posedge clk) #1;
    if (prev < 0 && dataout >= 0) crossings++;
    check(crossings == s, $sformatf("step %0d: %0d periods in 20000 samples", s, crossings));
  endtask

  initial begin
    run_step(1);
    run_step(25);
    run_step(75);
    run_step(150);
    run_step(667);
    run_step(1000);
    check(wraps > 0, "address never wrapped");
    $display("address wraps: %0d", wraps);
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
