// tb_timing_gen: checks the strobe spacing of the timing generator at the
// 48 MHz / 40 kHz default: half_tick every 600 clocks, tone_tick every 1200
// clocks, both one clock wide, tone_tick only together with half_tick.
module tb_timing_gen;
  logic clk = 1'b0, rst_n = 1'b0;
  logic half_tick, tone_tick;
  int checks = 0, failures = 0;

  timing_gen dut (.clk, .rst_n, .half_tick, .tone_tick);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint cyc = 0, last_half = -1, last_tone = -1;
    int n_half = 0, n_tone = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    repeat (12000) begin
      @(posedge clk);
      #1;
      cyc++;
      if (tone_tick) check(half_tick, "tone_tick without half_tick");
      if (half_tick) begin
        if (last_half >= 0) check(cyc - last_half == 600, $sformatf("half period %0d", cyc - last_half));
        else check(cyc == 600, $sformatf("first half_tick at %0d", cyc));
        last_half = cyc; n_half++;
      end
      if (tone_tick) begin
        if (last_tone >= 0) check(cyc - last_tone == 1200, $sformatf("tone period %0d", cyc - last_tone));
        last_tone = cyc; n_tone++;
      end
    end
    check(n_half == 20, $sformatf("half ticks %0d", n_half));
    check(n_tone == 10, $sformatf("tone ticks %0d", n_tone));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
