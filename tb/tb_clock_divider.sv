// tb_clock_divider: checks that the 10 ns clock divided by 5 gives a 50 ns
// clock that is high for 2 and low for 3 input cycles, and that reset holds
// the output low.
`timescale 1ns / 1ps
module tb_clock_divider;
  logic clk = 1'b0, rst = 1'b1, clk_out;
  int checks = 0, failures = 0;
  realtime t_rise, t_prev, t_fall;

  clock_divider dut (.clk_in(clk), .rst(rst), .clk_out(clk_out));

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (10) begin
      @(posedge clk) #1;
      check(clk_out == 1'b0, "output not low in reset");
    end
    @(negedge clk) rst = 1'b0;
    @(posedge clk_out) t_prev = $realtime;
    repeat (20) begin
      @(negedge clk_out) t_fall = $realtime;
      @(posedge clk_out) t_rise = $realtime;
      check(t_rise - t_prev == 50.0, $sformatf("period %0t", t_rise - t_prev));
      check(t_fall - t_prev == 20.0, $sformatf("high time %0t", t_fall - t_prev));
      t_prev = t_rise;
    end
    // reset again in the middle of a period
    #13 rst = 1'b1;
    #1;
    check(clk_out == 1'b0, "reset is not asynchronous");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
