// tb_seg7_decoder: checks every digit against the list of lit segments
// (letters a..g), blanking, and both output polarities.
module tb_seg7_decoder;
  logic [3:0] digit;
  logic blank;
  logic [6:0] seg_n, seg_p;
  int checks = 0, failures = 0;

  seg7_decoder #(.ACTIVE_LOW(1'b1)) dut_n (.digit, .blank, .seg(seg_n));
  seg7_decoder #(.ACTIVE_LOW(1'b0)) dut_p (.digit, .blank, .seg(seg_p));

  function automatic logic [6:0] from_letters(input string s);
    logic [6:0] r = '0;
    for (int i = 0; i < s.len(); i++) r[s[i] - "a"] = 1'b1;
    return r;
  endfunction

  string lit [10] = '{"abcdef", "bc", "abdeg", "abcdg", "bcfg",
                      "acdfg", "acdefg", "abc", "abcdefg", "abcdfg"};

  initial begin
    for (int d = 0; d < 16; d++) begin
      for (int b = 0; b < 2; b++) begin
        logic [6:0] exp;
        digit = 4'(d); blank = 1'(b);
        #1;
        exp = (d < 10 && b == 0) ? from_letters(lit[d]) : 7'b0;
        checks++;
        if (seg_p != exp || seg_n != ~exp) begin
          failures++;
          $display("FAIL: digit %0d blank %0d: %b / %b, expected %b", d, b, seg_p, seg_n, exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
