// tb_ultrasonic_detect: runs the ranging core over the twelve obstacle
// distances of the reference measurement table (200 cm to 2600 cm), with the
// clock scaled down to 4 MHz to keep the run short (the nominal echo period is
// then 100 clocks and the gate 10 clocks; all other parameters at default).
// Targets within the 10 m counter range must be reported to within 1 cm;
// targets beyond it must give the no-echo code. It also checks the burst
// length on trig and the time from the echo's first edge to the result,
// which must be MIN_PERIODS tone periods plus at most one period and a few
// clocks.
module tb_ultrasonic_detect;
  localparam int CLK_HZ = 4_000_000;
  localparam int NOM    = CLK_HZ / 40_000;

  logic clk = 1'b0, rst_n = 1'b0;
  logic echo, trig, update;
  logic [23:0] distance;
  int checks = 0, failures = 0;

  ultrasonic_detect #(.CLK_HZ(CLK_HZ)) dut (.clk, .rst_n, .echo, .trig, .distance, .update);

  int delay_clks = 0, shots;
  us_echo_model model (.clk, .drive(trig), .delay_clks, .n_echo(8), .echo_period(NOM),
                       .present(1'b1), .noise_delay(0), .noise_n(0), .noise_period(NOM),
                       .echo, .shots);

  always #5 clk = ~clk;

  // Per shot: drive pulses, and the clock of the first edge of the returned
  // tone (both restart at each result).
  longint cyc = 0, echo_start = -1, lat = 0;
  int rises = 0, shot_rises = 0;
  logic trig_q = 1'b0;
  always @(posedge clk) begin
    cyc++;
    trig_q <= trig;
    if (update) begin
      shot_rises = rises; lat = cyc - echo_start;
      rises = 0; echo_start = -1;
    end
    if (model.t == longint'(model.d)) echo_start = cyc;
    if (rst_n && trig && !trig_q) rises++;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (20_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int table_cm [12] = '{200, 400, 600, 800, 1200, 1400, 1600, 1800, 2000, 2200, 2400, 2600};

  initial begin
    delay_clks = int'((longint'(2 * table_cm[0]) * CLK_HZ) / 34000);
    repeat (5) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    foreach (table_cm[i]) begin
      automatic int d = table_cm[i];
      @(posedge clk iff update);
      @(negedge clk);
      check(shot_rises == 8, $sformatf("%0d cm: %0d drive pulses", d, shot_rises));
      if (d <= 1000) begin
        check(int'(distance) >= d - 1 && int'(distance) <= d + 1,
              $sformatf("%0d cm measured as %0d cm", d, distance));
        check(lat >= 4 * NOM && lat <= 5 * NOM + 8, $sformatf("%0d cm: echo-to-result %0d clocks", d, lat));
        $display("target %0d cm: measured %0d cm", d, distance);
      end else begin
        check(distance == 24'hFFFFFF, $sformatf("%0d cm beyond range: got %0d", d, distance));
        $display("target %0d cm: beyond the 10 m range, no echo reported", d);
      end
      if (i < 11) delay_clks = int'((longint'(2 * table_cm[i + 1]) * CLK_HZ) / 34000);
    end
    check(shots == 12, $sformatf("model saw %0d bursts", shots));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
