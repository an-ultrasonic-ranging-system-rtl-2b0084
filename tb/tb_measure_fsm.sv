// tb_measure_fsm: drives the sequencer's status inputs by hand and checks the
// sequence fire -> listen -> latch -> hold -> fire, the valid flag for an echo
// and for a timeout, and the hold-off length in tone strobes.
module tb_measure_fsm;
  import us_pkg::*;
  localparam int HOLD = 5;
  logic clk = 1'b0, rst_n = 1'b0;
  logic tone_tick = 1'b0, burst_done = 1'b0, cnt_done = 1'b0, cnt_timeout = 1'b0;
  logic fire, listen, latch, latch_valid;
  meas_state_t state;
  int checks = 0, failures = 0;
  int n_fire = 0;

  measure_fsm #(.HOLD_TICKS(HOLD)) dut (.clk, .rst_n, .tone_tick, .burst_done, .cnt_done,
                                        .cnt_timeout, .fire, .listen, .latch, .latch_valid, .state);
  always #5 clk = ~clk;

  // Tone strobe every 4 clocks.
  int div = 0;
  always @(posedge clk) begin
    div <= (div == 3) ? 0 : div + 1;
    tone_tick <= (div == 3);
  end
  always @(posedge clk) if (rst_n && fire) n_fire <= n_fire + 1;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic pulse(ref logic s);
    @(negedge clk) s = 1'b1;
    @(negedge clk) s = 1'b0;
  endtask

  // Wait for the fire pulse, then run one shot ending in echo or timeout.
  task automatic shot(input bit echo_found);
    int n = 0, ticks = 0;
    while (!fire && n < 200) begin @(negedge clk); n++; end
    check(fire && state == S_FIRE, "fire pulse in S_FIRE");
    @(negedge clk);
    check(!fire, "fire is one clock");
    repeat (10) begin @(negedge clk); check(!listen, "gate blanked during burst"); end
    pulse(burst_done);
    check(listen && state == S_LISTEN, "listening after burst");
    repeat (20) @(negedge clk);
    check(listen && !latch, "still listening");
    if (echo_found) pulse(cnt_done); else pulse(cnt_timeout);
    check(latch && state == S_LATCH, "latch after counter end");
    check(latch_valid == echo_found, $sformatf("latch_valid %0d", latch_valid));
    check(!listen, "gate closed at latch");
    @(negedge clk);
    check(state == S_HOLD && !latch, "holding");
    n = 0;
    while (!fire && n < 1000) begin
      if (tone_tick && state == S_HOLD) ticks++;
      @(negedge clk); n++;
    end
    check(ticks == HOLD, $sformatf("hold-off %0d tone strobes", ticks));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    shot(1'b1);
    shot(1'b0);
    shot(1'b1);
    // Counter timeout during the burst (range shorter than the burst).
    while (!fire) @(negedge clk);
    repeat (3) @(negedge clk);
    pulse(cnt_timeout);
    check(latch && !latch_valid, "timeout in burst latches invalid");
    check(n_fire == 4, $sformatf("fire count %0d", n_fire));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
