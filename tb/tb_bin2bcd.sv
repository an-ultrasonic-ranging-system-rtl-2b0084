// tb_bin2bcd: exhaustive check of the digit split for 0..1100 and a few
// large values, against division and remainder by 10 and 100.
module tb_bin2bcd;
  logic [23:0] value;
  logic [3:0] hundred, decade, unit;
  logic over;
  int checks = 0, failures = 0;

  bin2bcd dut (.value, .hundred, .decade, .unit, .over);

  task automatic try(input int v);
    int s;
    value = 24'(v);
    #1;
    s = (v > 999) ? 999 : v;
    checks++;
    if (hundred != 4'(s / 100) || decade != 4'((s / 10) % 10) || unit != 4'(s % 10)
        || over != (v > 999)) begin
      failures++;
      $display("FAIL: %0d -> %0d%0d%0d over=%0d", v, hundred, decade, unit, over);
    end
  endtask

  initial begin
    for (int v = 0; v <= 1100; v++) try(v);
    try(24'hFFFFFF);
    try(4095);
    try(1024);
    for (int i = 0; i < 200; i++) try(int'($urandom_range(0, 1 << 23)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
