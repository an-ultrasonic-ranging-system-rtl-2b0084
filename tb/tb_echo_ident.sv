// tb_echo_ident: checks the frequency gate at the 48 MHz / 40 kHz defaults
// (nominal period 1200 clocks, gate 120 clocks, 4 periods to accept):
// acceptance of a clean echo and its latency, rejection of interference
// outside the gate, the gate edges, reset of the run by an out-of-gate
// period, glitch immunity and the enable input. A second instance in
// pulse-width mode is checked for start/found on the edges of a pulse and
// for rejection of pulses narrower than one tone period.
module tb_echo_ident;
  logic clk = 1'b0, rst_n = 1'b0;
  logic enable = 1'b0, echo = 1'b0;
  logic found, rejected;
  logic [11:0] period;
  int checks = 0, failures = 0;
  int n_found = 0, n_rej = 0;
  longint cyc = 0, found_cyc = 0;

  echo_ident dut (.clk, .rst_n, .enable, .echo, .start(), .found, .rejected, .period);

  // Pulse-width mode instance with its own echo and enable.
  logic p_enable = 1'b0, p_echo = 1'b0, p_start, p_found, p_rejected;
  logic [11:0] p_period;
  int n_pstart = 0, n_pfound = 0, n_prej = 0;
  longint pstart_cyc = 0, pfound_cyc = 0;
  echo_ident #(.MODE(us_pkg::ECHO_PULSE)) dut_p (
    .clk, .rst_n, .enable(p_enable), .echo(p_echo), .start(p_start), .found(p_found),
    .rejected(p_rejected), .period(p_period));
  always @(posedge clk) if (rst_n) begin
    if (p_start) begin n_pstart <= n_pstart + 1; pstart_cyc <= cyc; end
    if (p_found) begin n_pfound <= n_pfound + 1; pfound_cyc <= cyc; end
    if (p_rejected) n_prej <= n_prej + 1;
  end

  task automatic pulse_w(input int w);
    @(negedge clk) p_echo = 1'b1;
    repeat (w) @(negedge clk);
    p_echo = 1'b0;
    repeat (20) @(negedge clk);
  endtask
  always #5 clk = ~clk;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && found) begin n_found <= n_found + 1; found_cyc <= cyc; end
    if (rst_n && rejected) n_rej <= n_rej + 1;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Square wave of `n` periods of `p` clocks; returns the clock of each rise.
  longint rises[$];
  task automatic pulses(input int n, input int p, input int gap = 50);
    rises.delete();
    for (int i = 0; i < n; i++) begin
      @(negedge clk); echo = 1'b1; rises.push_back(cyc);
      repeat (p / 2 - 1) @(negedge clk);
      @(negedge clk); echo = 1'b0;
      repeat (p - p / 2 - 1) @(negedge clk);
    end
    repeat (gap) @(negedge clk);
  endtask

  task automatic expect_counts(input int f, input int r, input string what);
    check(n_found == f, $sformatf("%s: found %0d expected %0d", what, n_found, f));
    check(n_rej == r, $sformatf("%s: rejected %0d expected %0d", what, n_rej, r));
    n_found = 0; n_rej = 0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    // Disabled: nothing is measured.
    pulses(8, 1200);
    expect_counts(0, 0, "disabled");
    enable = 1'b1;
    // Clean echo: found once, at the 5th rising edge (4 periods), ~3 clocks later.
    pulses(5, 1200);
    expect_counts(1, 0, "clean echo");
    check(found_cyc - rises[4] >= 2 && found_cyc - rises[4] <= 4,
          $sformatf("latency %0d clocks", found_cyc - rises[4]));
    check(period == 12'd1200, $sformatf("period %0d", period));
    enable = 1'b0; @(negedge clk); enable = 1'b1;
    // Four edges only give three periods: not enough.
    pulses(4, 1200);
    expect_counts(0, 0, "short echo");
    enable = 1'b0; @(negedge clk); enable = 1'b1;
    // Interference at 68 kHz: every period rejected.
    pulses(9, 700);
    expect_counts(0, 8, "interference");
    enable = 1'b0; @(negedge clk); enable = 1'b1;
    // Inside the gate (deviation 119) and just outside (deviation 120).
    pulses(5, 1319);
    expect_counts(1, 0, "gate edge inside high");
    enable = 1'b0; @(negedge clk); enable = 1'b1;
    pulses(5, 1081);
    expect_counts(1, 0, "gate edge inside low");
    enable = 1'b0; @(negedge clk); enable = 1'b1;
    pulses(5, 1320);
    expect_counts(0, 4, "gate edge outside high");
    enable = 1'b0; @(negedge clk); enable = 1'b1;
    pulses(5, 1080);
    expect_counts(0, 4, "gate edge outside low");
    enable = 1'b0; @(negedge clk); enable = 1'b1;
    // Three good periods, a bad one, then four good: the run restarts, so
    // only the second group is accepted.
    pulses(3, 1200, 0);
    pulses(1, 500, 0);
    pulses(5, 1200);
    expect_counts(1, 1, "run reset");
    enable = 1'b0; @(negedge clk); enable = 1'b1;
    // Echo with a short glitch in each low phase: the glitch edges make the
    // periods fall out of the gate, so the echo is not accepted.
    for (int i = 0; i < 6; i++) begin
      @(negedge clk) echo = 1'b1; repeat (599) @(negedge clk);
      echo = 1'b0; repeat (300) @(negedge clk);
      echo = 1'b1; @(negedge clk); echo = 1'b0; repeat (298) @(negedge clk);
    end
    repeat (20) @(negedge clk);
    check(n_found == 0, "glitchy echo not accepted");
    check(n_rej > 0, "glitchy echo rejected");
    n_found = 0; n_rej = 0;
    // Pulse-width mode.
    pulse_w(5000);
    check(n_pstart == 0 && n_pfound == 0 && n_prej == 0, "pulse mode disabled: nothing");
    p_enable = 1'b1;
    pulse_w(5000);
    check(n_pstart == 1 && n_pfound == 1 && n_prej == 0, "pulse accepted");
    check(pfound_cyc - pstart_cyc == 5000, $sformatf("start-to-found %0d clocks", pfound_cyc - pstart_cyc));
    check(p_period == 12'd2400, $sformatf("width saturates at 2400, got %0d", p_period));
    pulse_w(30);
    check(n_pstart == 2 && n_pfound == 1 && n_prej == 1, "narrow pulse rejected");
    check(p_period == 12'd30, $sformatf("narrow width %0d", p_period));
    pulse_w(1200);
    check(n_pfound == 2 && n_prej == 1, "one tone period accepted");
    pulse_w(1199);
    check(n_pfound == 2 && n_prej == 2, "just under one tone period rejected");
    check(n_found == 0 && n_rej == 0, "tone instance untouched");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
