// tb_pll_model: checks the PLL model: locked low in reset, locked after
// LOCK_CYCLES reference clocks, a 10 ns output from a 20 ns reference, and
// output stopped and locked cleared at once by areset.
`timescale 1ns / 1ps
module tb_pll_model;
  logic inclk = 1'b0, areset = 1'b1, c0, locked;
  int checks = 0, failures = 0, edges;
  realtime t0, t_lock, t_rel;

  pll_model #(.LOCK_CYCLES(64)) dut (.inclk0(inclk), .areset(areset), .c0(c0), .locked(locked));

  always #10 inclk = ~inclk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    edges = 0;
    #95;
    check(locked == 1'b0, "locked during reset");
    check(c0 == 1'b0, "clock running during reset");
    areset = 1'b0;
    t_rel = $realtime;
    @(posedge locked) t_lock = $realtime;
    // first inclk rising edge after release is at 110 ns; lock on the 64th
    check(t_lock == 110.0 + 63 * 20.0, $sformatf("lock at %0t", t_lock));
    @(posedge c0) t0 = $realtime;
    repeat (100) @(posedge c0);
    check($realtime - t0 == 1000.0, $sformatf("100 periods took %0t", $realtime - t0));
    @(negedge inclk) #2 areset = 1'b1;
    #0.1;
    check(locked == 1'b0, "areset did not clear locked");
    fork
      begin #200; end
      begin forever @(posedge c0) edges++; end
    join_any
    disable fork;
    check(edges == 0, $sformatf("%0d clock edges while in reset", edges));
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
