// tb_hs_counter: checks counting of ticks between launch and stop, the stop
// pulse, the automatic stop at MAX_COUNT, and restart by a new launch.
module tb_hs_counter;
  localparam int MAXC = 20;
  logic clk = 1'b0, rst_n = 1'b0;
  logic launch = 1'b0, tick = 1'b0, stop = 1'b0;
  logic [19:0] count;
  logic running, done, timeout;
  int checks = 0, failures = 0;

  hs_counter #(.WIDTH(20), .MAX_COUNT(MAXC)) dut (.clk, .rst_n, .launch, .tick, .stop,
                                                 .count, .running, .done, .timeout);
  always #5 clk = ~clk;

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

  // One measurement: k ticks, then stop (k < MAXC) or wait for the timeout.
  task automatic run(input int k, input bit expect_timeout);
    int n_done = 0, n_to = 0;
    @(negedge clk) launch = 1'b1;
    @(negedge clk) launch = 1'b0;
    check(running && count == 0, "cleared and running after launch");
    for (int i = 0; i < (expect_timeout ? MAXC + 5 : k); i++) begin
      repeat (2) @(negedge clk);
      tick = 1'b1;
      @(negedge clk) tick = 1'b0;
      if (timeout) n_to++;
    end
    if (!expect_timeout) begin
      check(count == 20'(k), $sformatf("count %0d expected %0d", count, k));
      @(negedge clk) stop = 1'b1;
      @(negedge clk) stop = 1'b0;
      check(done && !running, "done pulse after stop");
      @(negedge clk);
      check(!done, "done one clock wide");
      // Ticks after the stop must not count.
      tick = 1'b1; @(negedge clk) tick = 1'b0;
      check(count == 20'(k), "count frozen after stop");
    end else begin
      check(n_to == 1, $sformatf("timeout pulses %0d", n_to));
      check(count == 20'(MAXC) && !running, $sformatf("stopped at %0d", count));
      stop = 1'b1; @(negedge clk) stop = 1'b0;
      check(!done, "stop ignored when not running");
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    @(negedge clk);
    check(count == 0 && !running, "reset state");
    run(7, 0);
    run(0, 0);
    run(MAXC - 1, 0);
    run(0, 1);
    run(13, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
