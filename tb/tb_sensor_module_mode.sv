// tb_sensor_module_mode: the whole design in pulse-width echo mode, driving a
// behavioural HC-SR04-style sensor module at the default 48 MHz clock.
// Settings for this mode: ECHO_MODE = ECHO_PULSE, one drive period on trig
// (12.5 us high, enough to trigger the module) and a 4 m range
// (MAX_COUNT = 941 periods, 23.5 ms), shorter than the module's 38 ms
// no-target pulse, with a 25 ms hold-off (HOLD_TICKS = 1000) so that a shot
// never starts while the module is still busy.
// Shots: 100 cm; 250 cm with a glitch before the echo; no target; 37 cm;
// 399 cm. Checks the distance to within 1 cm, the digits, the trigger
// length, and that the glitch rejection and the range timeout both happened.
module tb_sensor_module_mode;
  localparam int CLK_HZ = 48_000_000;

  logic clk = 1'b0, rst_n = 1'b0;
  logic echo, trig, update, over;
  logic [23:0] distance;
  logic [2:0][6:0] seg;
  int checks = 0, failures = 0;

  ultrasonic_ranging_top #(
    .ECHO_MODE(us_pkg::ECHO_PULSE), .BURST_PULSES(1), .MAX_COUNT(941), .HOLD_TICKS(1000)
  ) dut (.clk, .rst_n, .echo, .trig, .distance, .update, .seg, .over);

  int delay_clks = 0, shots;
  bit present = 1'b1, glitch = 1'b0;
  hcsr04_model #(.CLK_HZ(CLK_HZ)) sensor (.clk, .trig, .delay_clks, .present, .glitch,
                                          .echo, .shots);

  always #5 clk = ~clk;

  int n_rejected = 0, n_timeout = 0, n_start = 0, trig_high = 0, max_trig_high = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_core.echo_rejected) n_rejected++;
    if (dut.u_core.cnt_timeout)   n_timeout++;
    if (dut.u_core.echo_start)    n_start++;
    if (trig) trig_high++;
    else begin
      if (trig_high > max_trig_high) max_trig_high = trig_high;
      trig_high = 0;
    end
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (30_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int flight(input int d_cm);
    return int'((longint'(2 * d_cm) * CLK_HZ) / 34000);
  endfunction

  task automatic finish_shot(input int d_cm, input bit expect_echo, input string what);
    @(posedge clk iff update);
    @(negedge clk);
    if (expect_echo) begin
      automatic int got = int'(distance);
      automatic int h = got / 100, t = (got / 10) % 10, u = got % 10;
      check(got >= d_cm - 1 && got <= d_cm + 1, $sformatf("%s: %0d cm, target %0d cm", what, got, d_cm));
      check(!over, $sformatf("%s: no overflow", what));
      // Units digit 0-9 must be lit; compare with a decoder-independent count
      // of lit segments per digit.
      check($countones(~seg[0]) == int'(segcount[u]), $sformatf("%s: units segments", what));
      if (h != 0) check($countones(~seg[2]) == int'(segcount[h]), $sformatf("%s: hundreds segments", what));
      if (h != 0 || t != 0) check($countones(~seg[1]) == int'(segcount[t]), $sformatf("%s: tens segments", what));
      $display("%s: target %0d cm, measured %0d cm", what, d_cm, got);
    end else begin
      check(distance == 24'hFFFFFF && over, $sformatf("%s: no-echo code", what));
      $display("%s: no echo within range", what);
    end
  endtask

  // Number of lit segments of the digits 0-9 on a seven-segment display.
  byte segcount [10] = '{6, 2, 5, 5, 4, 5, 6, 3, 7, 6};

  initial begin
    delay_clks = flight(100);
    repeat (5) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    finish_shot(100, 1, "100 cm");
    delay_clks = flight(250); glitch = 1'b1;
    finish_shot(250, 1, "250 cm after a glitch");
    check(n_rejected > 0, "glitch rejected");
    present = 1'b0; glitch = 1'b0;
    finish_shot(0, 0, "no target");
    present = 1'b1; delay_clks = flight(37);
    finish_shot(37, 1, "37 cm");
    delay_clks = flight(399);
    finish_shot(399, 1, "399 cm");
    check(max_trig_high == CLK_HZ / 80_000, $sformatf("trigger high %0d clocks", max_trig_high));
    check(n_timeout == 1, $sformatf("range timeouts %0d", n_timeout));
    check(n_start >= 6, $sformatf("echo starts %0d", n_start));
    check(shots >= 5, $sformatf("sensor shots %0d", shots));
    $display("mechanisms: starts=%0d rejected=%0d timeout=%0d", n_start, n_rejected, n_timeout);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
