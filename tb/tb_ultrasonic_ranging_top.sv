// tb_ultrasonic_ranging_top: end-to-end test of the whole design with every
// parameter at its default (48 MHz clock, 40 kHz tone, 10 m range).
//
// A behavioural model of the transducers and the air returns an echo for
// each burst on `trig`. The test runs one shot per scenario and checks the
// distance and the three display digits against the target distance:
//   1. 100 cm, clean echo
//   2. 37 cm with interference at 68 kHz before the echo (rejected by the
//      frequency gate; the hundreds digit is blanked)
//   3. 150 cm with 40 kHz crosstalk during the burst (ignored by the blanking)
//   4. no target: the counter runs to its 10 m limit, distance is all ones
//      and the display shows 999 with `over`
//   5. 512 cm, clean echo
// It counts how often each mechanism happened - echo identified, period
// rejected by the gate, edge ignored during blanking, counter timeout,
// hold-off between shots - and fails for any that never happened.
module tb_ultrasonic_ranging_top;
  localparam int CLK_HZ = 48_000_000;
  localparam int NOM    = CLK_HZ / 40_000;

  logic clk = 1'b0, rst_n = 1'b0;
  logic echo, trig, update, over;
  logic [23:0] distance;
  logic [2:0][6:0] seg;
  int checks = 0, failures = 0;

  ultrasonic_ranging_top dut (.clk, .rst_n, .echo, .trig, .distance, .update, .seg, .over);

  int delay_clks = 0, n_echo = 8, echo_period = NOM, noise_delay = 0, noise_n = 0,
      noise_period = NOM, shots;
  bit present = 1'b1;
  us_echo_model model (.clk, .drive(trig), .delay_clks, .n_echo, .echo_period, .present,
                       .noise_delay, .noise_n, .noise_period, .echo, .shots);

  always #5 clk = ~clk;

  // Mechanism counters, from the design's internal strobes.
  int n_found = 0, n_rejected = 0, n_blanked = 0, n_timeout = 0, n_hold = 0, n_rises = 0;
  logic echo_q = 1'b0, trig_q = 1'b0;
  always @(posedge clk) if (rst_n) begin
    echo_q <= echo;
    trig_q <= trig;
    if (dut.u_core.echo_found)           n_found++;
    if (dut.u_core.echo_rejected)        n_rejected++;
    if (dut.u_core.cnt_timeout)          n_timeout++;
    if (echo && !echo_q && dut.u_core.state == us_pkg::S_FIRE) n_blanked++;
    if (trig && !trig_q)                 n_rises++;
  end
  always @(posedge clk) if (rst_n && dut.u_core.u_fsm.next_state == us_pkg::S_HOLD
                            && dut.u_core.state != us_pkg::S_HOLD) n_hold++;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (40_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Lit segments of the digits 0-9, bit 0 = a ... bit 6 = g (active high).
  function automatic logic [6:0] glyph(input int d);
    case (d)
      0: return 7'h3F; 1: return 7'h06; 2: return 7'h5B; 3: return 7'h4F; 4: return 7'h66;
      5: return 7'h6D; 6: return 7'h7D; 7: return 7'h07; 8: return 7'h7F; default: return 7'h6F;
    endcase
  endfunction

  task automatic check_display(input int shown);
    int h = shown / 100, t = (shown / 10) % 10, u = shown % 10;
    check(~seg[0] == glyph(u), $sformatf("units digit for %0d", shown));
    check(~seg[1] == ((h == 0 && t == 0) ? 7'h00 : glyph(t)), $sformatf("tens digit for %0d", shown));
    check(~seg[2] == ((h == 0) ? 7'h00 : glyph(h)), $sformatf("hundreds digit for %0d", shown));
  endtask

  // Wait for the end of the current shot and check it.
  task automatic finish_shot(input int d_cm, input bit expect_echo, input string what);
    int rises0 = n_rises;
    @(posedge clk iff update);
    @(negedge clk);
    check(n_rises - rises0 == 8 || rises0 == 0, $sformatf("%s: burst of %0d pulses", what, n_rises - rises0));
    if (expect_echo) begin
      int got = int'(distance);
      check(got >= d_cm - 1 && got <= d_cm + 1, $sformatf("%s: distance %0d cm, target %0d cm", what, got, d_cm));
      check(!over, $sformatf("%s: no overflow", what));
      check_display(got);
      $display("%s: target %0d cm, measured %0d cm", what, d_cm, got);
    end else begin
      check(distance == 24'hFFFFFF, $sformatf("%s: no-echo code", what));
      check(over, $sformatf("%s: overflow lamp", what));
      check_display(999);
      $display("%s: no echo, display 999", what);
    end
  endtask

  function automatic int flight(input int d_cm);
    return int'((longint'(2 * d_cm) * CLK_HZ) / 34000);
  endfunction

  initial begin
    // Shot 1 settings are in place before the first burst.
    delay_clks = flight(100);
    repeat (5) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    finish_shot(100, 1, "clean 100 cm");

    delay_clks = flight(37); noise_delay = 20_000; noise_n = 6; noise_period = 700;
    finish_shot(37, 1, "37 cm with interference");
    check(n_rejected > 0, "interference was rejected");

    delay_clks = flight(150); noise_delay = 0; noise_n = 6; noise_period = NOM;
    finish_shot(150, 1, "150 cm with crosstalk");

    present = 1'b0; noise_n = 0;
    finish_shot(0, 0, "no target");

    present = 1'b1; delay_clks = flight(512);
    finish_shot(512, 1, "512 cm");

    check(shots == 5, $sformatf("model saw %0d bursts", shots));
    check(n_found >= 4,   $sformatf("echo identified %0d times", n_found));
    check(n_rejected > 0, $sformatf("gate rejected %0d periods", n_rejected));
    check(n_blanked > 0,  $sformatf("blanking ignored %0d edges", n_blanked));
    check(n_timeout == 1, $sformatf("counter timeouts %0d", n_timeout));
    check(n_hold >= 4,    $sformatf("hold-off entered %0d times", n_hold));
    $display("mechanisms: found=%0d rejected=%0d blanked=%0d timeout=%0d hold=%0d",
             n_found, n_rejected, n_blanked, n_timeout, n_hold);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
