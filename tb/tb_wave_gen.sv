// tb_wave_gen: checks the transmit burst: it starts on a tone strobe, has
// BURST_PULSES periods of 50% duty, counts them, and ends with `done`.
module tb_wave_gen;
  localparam int HALF = 7;          // clocks per half period in this test
  localparam int N    = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  logic start = 1'b0, half_tick = 1'b0, tone_tick = 1'b0;
  logic drive, launch, done, busy;
  logic [$clog2(N+1)-1:0] fired;
  int checks = 0, failures = 0;

  wave_gen #(.BURST_PULSES(N)) dut (.clk, .rst_n, .start, .half_tick, .tone_tick,
                                    .drive, .launch, .done, .busy, .fired);

  always #5 clk = ~clk;

  // Strobe source: half_tick every HALF clocks, tone_tick on every second one.
  int div = 0; bit ph = 0;
  always @(posedge clk) begin
    if (div == HALF - 1) begin
      div <= 0; half_tick <= 1'b1; tone_tick <= ph; ph <= ~ph;
    end else begin
      div <= div + 1; half_tick <= 1'b0; tone_tick <= 1'b0;
    end
  end

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

  task automatic one_burst();
    int rises = 0, hi = 0, lo = 0, cyc = 0;
    bit prev = 0, seen_tone = 0, got_launch = 0;
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    check(busy, "busy after start");
    // Watch until done.
    while (1) begin
      @(posedge clk); #1;
      cyc++;
      if (tone_tick) seen_tone = 1;
      if (drive && !prev) begin
        rises++;
        if (rises == 1) begin
          check(launch, "launch on first rising edge");
          got_launch = 1;
        end else check(!launch, "launch only once");
        if (rises > 1) check(lo == HALF, $sformatf("low time %0d", lo));
        hi = 0;
      end
      if (!drive && prev) begin
        check(hi == HALF, $sformatf("high time %0d", hi));
        lo = 0;
      end
      if (drive) hi++; else lo++;
      if (drive) check(fired == ($bits(fired))'(rises), $sformatf("fired %0d vs %0d", fired, rises));
      prev = drive;
      if (done) break;
      if (cyc > 10 * HALF * N) break;
    end
    check(got_launch, "burst launched");
    check(rises == N, $sformatf("pulses %0d", rises));
    check(!drive, "drive low at done");
    @(posedge clk); #1;
    check(!busy, "idle after done");
    repeat (3 * HALF) begin @(posedge clk); #1; check(!drive, "drive stays low"); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    repeat (30) @(posedge clk);
    check(!drive && !busy, "idle after reset");
    one_burst();
    repeat (11) @(posedge clk);
    one_burst();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
