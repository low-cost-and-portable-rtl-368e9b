// tb_sine_gen_top: end-to-end test of the generator at its default
// parameters (50 MHz board clock, 115200 baud).
//
// The testbench plays the PC: it sends six-byte requests on rxd (ones digit
// first, update flag last) and checks the generated signal. After power-up
// (1 kHz) and after each accepted request (25, 75, 150, 667 and 1000 kHz)
// it follows 20000 sampling clocks and checks
//   - every sample against floor(32767*sin(2*pi*(k*step mod 20000)/20000)),
//   - the 50 ns sampling clock period,
//   - exactly `step` sine periods per 20000 samples, each period
//     floor(20000/step) or ceil(20000/step) samples long (75 kHz: 13 300 or
//     13 350 ns, 150 kHz: 6 650 or 6 700 ns, 667 kHz: 1 450 or 1 500 ns),
//     and for 25 kHz a 40 us period between rising zero crossings.
// It also sends a request for another signal type (refused), a buffer with
// no update flag (ignored) and a byte with a low stop bit (framing error).
// Each mechanism is counted; one that never happens counts as a failure.
`timescale 1ns / 1ps
module tb_sine_gen_top;
  import sine_ref_pkg::*;

  localparam real BIT_NS = real'(50_000_000 / 115_200) * 20.0;

  logic               sys_clk = 1'b0, rst_n = 1'b1, rxd = 1'b1;
  logic signed [15:0] dataout;
  logic               sampling_clk;
  logic [47:0]        data_buffer;
  logic [9:0]         freq_step;
  logic               pll_locked, update_done, freq_update_req, req_rejected, rx_frame_err;

  int checks = 0, failures = 0;
  int n_lock = 0, n_update_req = 0, n_rejected = 0, n_frame_err = 0, n_wraps = 0,
      n_accepted = 0, n_done = 0, n_periods = 0;

  sine_gen_top dut (
    .sys_clk(sys_clk), .rst_n(rst_n), .rxd(rxd), .dataout(dataout),
    .sampling_clk(sampling_clk), .data_buffer(data_buffer), .freq_step(freq_step),
    .pll_locked(pll_locked), .update_done(update_done), .freq_update_req(freq_update_req),
    .req_rejected(req_rejected), .rx_frame_err(rx_frame_err));

  always #10 sys_clk = ~sys_clk;   // 20 ns board oscillator

  always @(posedge pll_locked) n_lock++;
  always @(posedge update_done) n_done++;
  always @(posedge sys_clk) begin
    if (freq_update_req) n_update_req++;
    if (req_rejected) n_rejected++;
    if (rx_frame_err) n_frame_err++;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  task automatic send_byte(logic [7:0] b, logic stop_bit);
    rxd = 1'b0; #(BIT_NS);
    for (int i = 0; i < 8; i++) begin rxd = b[i]; #(BIT_NS); end
    rxd = stop_bit; #(BIT_NS);
    rxd = 1'b1; #(BIT_NS);
  endtask

  // The frequency goes out as four decimal digits, ones first.
  task automatic send_request(logic [7:0] upd, logic [7:0] typ, int khz);
    send_byte(8'(khz % 10), 1'b1);
    send_byte(8'((khz / 10) % 10), 1'b1);
    send_byte(8'((khz / 100) % 10), 1'b1);
    send_byte(8'(khz / 1000), 1'b1);
    send_byte(typ, 1'b1);
    send_byte(upd, 1'b1);
  endtask

  // Follow one table length of output after update_done.
  task automatic check_signal(int s);
    int      a, prev_a, crossings, k, n_cross, lo, hi, len;
    realtime t_prev_edge, t_edge, t_cross, t_first_cross;
    logic signed [15:0] prev;
    // skip the zeros output while the table leaves reset: the first
    // non-zero sample is the one for address step
    k = 0;
    do begin
      @(posedge sampling_clk) t_prev_edge = $realtime;
      #1;
      k++;
    end while (dataout == 0 && k < 20);
    check(k < 20, "no signal after update");
    a = s;
    check(int'(dataout) == sine_ref(a), $sformatf("%0d kHz first sample %0d", s, dataout));
    crossings = 0;
    n_cross = 0;
    prev = dataout;
    t_first_cross = 0;
    for (int n = 1; n <= N; n++) begin
      @(posedge sampling_clk) t_edge = $realtime;
      #1;
      check(t_edge - t_prev_edge == 50.0, $sformatf("sampling period %0t", t_edge - t_prev_edge));
      t_prev_edge = t_edge;
      prev_a = a;
      a = (a + s) % N;
      if (a < prev_a) n_wraps++;
      check(int'(dataout) == sine_ref(a),
            $sformatf("%0d kHz sample %0d: %0d want %0d", s, n, dataout, sine_ref(a)));
      if (prev < 0 && dataout >= 0) begin
        crossings++;
        if (crossings == 1) t_first_cross = t_edge;
        else begin
          // one period is a whole number of samples next to 20000/step
          len = n - n_cross;
          lo  = N / s;
          hi  = (N + s - 1) / s;
          check(len == lo || len == hi,
                $sformatf("%0d kHz: period of %0d samples", s, len));
          n_periods++;
        end
        n_cross = n;
        t_cross = t_edge;
      end
      prev = dataout;
    end
    check(crossings == s, $sformatf("%0d kHz: %0d periods in 1 ms", s, crossings));
    if (s == 25)
      check(t_cross - t_first_cross == 24.0 * 40_000.0,
            $sformatf("25 kHz: 24 periods took %0t", t_cross - t_first_cross));
  endtask

  // The generator relocks while the last byte's stop bit is still on the
  // line, so the request is sent in a parallel thread.
  task automatic update(int khz);
    int done0;
    done0 = n_done;
    fork
      send_request(8'h01, 8'h00, khz);
    join_none
    wait (n_done == done0 + 1);
    check(freq_step == 10'(khz), $sformatf("step %0d want %0d", freq_step, khz));
    n_accepted++;
    check_signal(khz);
    wait fork;
    check(data_buffer == {8'h01, 8'h00, 8'(khz / 1000), 8'((khz / 100) % 10),
                          8'((khz / 10) % 10), 8'(khz % 10)}, "data_buffer contents");
  endtask

  initial begin
    #1 rst_n = 1'b0;
    #200 rst_n = 1'b1;
    @(posedge update_done);
    check(freq_step == 10'd1, "power-up step");
    check_signal(1);
    update(25);
    update(75);
    update(150);
    update(667);
    update(1000);
    // another signal type: refused, 1 MHz keeps running
    begin
      int nr;
      nr = n_rejected;
      send_request(8'h01, 8'h02, 500);
      #(20 * 20.0);
      check(n_rejected == nr + 1 && freq_step == 10'd1000 && update_done, "refused request");
    end
    // no update flag: ignored
    begin
      int nu;
      nu = n_update_req;
      send_request(8'h00, 8'h00, 300);
      #(20 * 20.0);
      check(n_update_req == nu && freq_step == 10'd1000, "buffer without update flag");
    end
    // bad stop bit, then a good request still goes through
    send_byte(8'h55, 1'b0);
    update(150);

    check(n_lock == 7, $sformatf("PLL locked %0d times", n_lock));
    check(n_update_req == 7, $sformatf("%0d update requests", n_update_req));
    check(n_accepted == 6, "accepted updates");
    check(n_rejected == 1, "refused requests");
    check(n_frame_err == 1, "framing errors");
    check(n_wraps > 0, "table address never wrapped");
    check(n_periods > 0, "no period measured");
    $display("mechanisms: pll locks %0d, update requests %0d, accepted %0d, refused %0d, framing errors %0d, address wraps %0d, periods measured %0d",
             n_lock, n_update_req, n_accepted, n_rejected, n_frame_err, n_wraps, n_periods);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #40ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
