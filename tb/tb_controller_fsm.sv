// tb_controller_fsm: drives data_buffer and buffer_valid directly and plays
// the PLL (locked falls with areset and rises LOCK clocks after it is
// released). Checks the power-up sequence with step 1, accepted requests
// (step, areset 2 clocks after buffer_valid for RESET_CYCLES clocks,
// update_done after lock), refused requests (other signal type, 0 kHz,
// above 1000 kHz, a digit above 9), buffers without the update flag, and
// requests arriving while the PLL relocks.
`timescale 1ns / 1ps
module tb_controller_fsm;
  import sine_gen_pkg::*;
  localparam int RESET_CYCLES = 4;
  localparam int LOCK = 10;

  logic         clk = 1'b0, rst_n = 1'b1;
  data_buffer_t data_buffer = '0;
  logic         buffer_valid = 1'b0;
  logic         pll_locked;
  logic         pll_areset;
  logic [9:0]   freq_step;
  logic [7:0]   sig_type;
  logic         freq_update_req, req_rejected, update_done;
  int checks = 0, failures = 0, lock_cnt = 0;
  int n_req = 0, n_rej = 0, areset_len = 0, last_areset_len = 0;

  controller_fsm #(.RESET_CYCLES(RESET_CYCLES)) dut (
    .clk(clk), .rst_n(rst_n), .data_buffer(data_buffer), .buffer_valid(buffer_valid),
    .pll_locked(pll_locked), .pll_areset(pll_areset), .freq_step(freq_step),
    .sig_type(sig_type), .freq_update_req(freq_update_req), .req_rejected(req_rejected),
    .update_done(update_done));

  always #10 clk = ~clk;

  // PLL stand-in
  always @(posedge clk or posedge pll_areset) begin
    if (pll_areset) begin lock_cnt <= 0; pll_locked <= 1'b0; end
    else if (lock_cnt == LOCK - 1) pll_locked <= 1'b1;
    else lock_cnt <= lock_cnt + 1;
  end

  always @(posedge clk) begin
    if (freq_update_req) n_req++;
    if (req_rejected) n_rej++;
    if (pll_areset) areset_len++;
    else if (areset_len != 0) begin last_areset_len = areset_len; areset_len = 0; end
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic data_buffer_t req(logic [7:0] upd, logic [7:0] typ, int khz);
    data_buffer_t b;
    b.update_req = upd;
    b.sig_type   = typ;
    b.thousands  = 8'(khz / 1000);
    b.hundreds   = 8'((khz / 100) % 10);
    b.tens       = 8'((khz / 10) % 10);
    b.ones       = 8'(khz % 10);
    return b;
  endfunction

  task automatic pulse(data_buffer_t b);
    @(negedge clk) data_buffer = b; buffer_valid = 1'b1;
    @(negedge clk) buffer_valid = 1'b0;
  endtask

  task automatic accept(int khz);
    int nr;
    nr = n_req;
    pulse(req(8'h01, 8'h00, khz));
    // buffer_valid seen at edge 0 (IDENTIFY), RESET_PLL after the next edge
    check(pll_areset == 1'b0, "areset too early");
    @(posedge clk) #1;
    check(pll_areset == 1'b1, $sformatf("%0d kHz: areset not raised", khz));
    check(freq_step == 10'(khz), $sformatf("%0d kHz: step %0d", khz, freq_step));
    check(update_done == 1'b0, "update_done during update");
    @(posedge update_done) #1;
    check(pll_locked == 1'b1, "update_done before lock");
    check(last_areset_len == RESET_CYCLES, $sformatf("areset lasted %0d clocks", last_areset_len));
    check(n_req == nr + 1, "freq_update_req count");
  endtask

  task automatic refuse(data_buffer_t b);
    int nj;
    logic [9:0] s;
    nj = n_rej;
    s  = freq_step;
    pulse(b);
    repeat (4) @(posedge clk);
    #1;
    check(n_rej == nj + 1, $sformatf("request %012h not refused", b));
    check(freq_step == s && update_done && !pll_areset, "refused request changed the state");
  endtask

  initial begin
    #1 rst_n = 1'b0;
    #4;
    check(pll_areset == 1'b1, "areset low during board reset");
    #100 rst_n = 1'b1;
    @(posedge update_done) #1;
    check(freq_step == 10'd1, "power-up step is not 1");
    check(sig_type == SIG_SINE, "power-up type");
    accept(25);
    accept(75);
    accept(150);
    accept(667);
    accept(1000);
    accept(1);
    refuse(req(8'h01, 8'h01, 500));   // not a sine
    refuse(req(8'h01, 8'h00, 0));     // below 1 kHz
    refuse(req(8'h01, 8'h00, 1001));  // above 1 MHz
    begin
      data_buffer_t b;
      b = req(8'h01, 8'h00, 100);
      b.tens = 8'd12;                  // not a decimal digit
      refuse(b);
    end
    // no update flag: ignored
    begin
      int nr, nj;
      nr = n_req; nj = n_rej;
      pulse(req(8'h00, 8'h00, 300));
      repeat (5) @(posedge clk);
      #1;
      check(n_req == nr && n_rej == nj && freq_step == 10'd1, "buffer without update flag acted on");
    end
    // a request while relocking is ignored
    begin
      int nr;
      pulse(req(8'h01, 8'h00, 200));
      repeat (3) @(posedge clk);
      nr = n_req;
      pulse(req(8'h01, 8'h00, 400));
      @(posedge update_done) #1;
      check(freq_step == 10'd200 && n_req == nr, "request during relock");
    end
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
