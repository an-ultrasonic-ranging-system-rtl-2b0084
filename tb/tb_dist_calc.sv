// tb_dist_calc: checks the count-to-centimetre conversion (0.425 cm per
// 40 kHz period, COMP_TICKS periods removed, rounded), the latch behaviour
// and the all-ones code for "no echo".
module tb_dist_calc;
  logic clk = 1'b0, rst_n = 1'b0;
  logic latch = 1'b0, valid = 1'b0;
  logic [19:0] count = '0;
  logic [23:0] distance;
  logic update;
  int checks = 0, failures = 0;

  dist_calc dut (.clk, .rst_n, .latch, .valid, .count, .distance, .update);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference: 340 m/s over the round trip at 40 kHz is 17/40 cm per count.
  function automatic int ref_cm(input int n);
    int m = (n > 4) ? n - 4 : 0;
    return (m * 17 + 20) / 40;
  endfunction

  task automatic sample(input int n, input bit v);
    logic [23:0] prev_d;
    prev_d = distance;
    @(negedge clk);
    count = 20'(n); valid = v;
    @(negedge clk);
    check(distance == prev_d, "no change without latch");
    latch = 1'b1;
    @(negedge clk) latch = 1'b0;
    check(update, "update pulse");
    if (v) check(distance == 24'(ref_cm(n)), $sformatf("N=%0d: %0d cm, expected %0d", n, distance, ref_cm(n)));
    else   check(distance == 24'hFFFFFF, "no-echo code");
    count = count + 20'd37;
    @(negedge clk);
    check(!update && distance == (v ? 24'(ref_cm(n)) : 24'hFFFFFF), "held after latch");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    sample(0, 1);
    sample(4, 1);
    sample(5, 1);
    sample(2353, 1);   // 10 m range limit
    sample(240, 1);    // 100 cm nominal
    sample(1000, 0);
    for (int i = 0; i < 300; i++) sample(int'($urandom_range(0, (1 << 20) - 1)), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
