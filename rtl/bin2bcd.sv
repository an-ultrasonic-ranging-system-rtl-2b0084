// bin2bcd: binary to decimal digits for the distance display.
//
// Splits the binary distance into hundreds, tens and units digits, as the
// display of the described system does. The conversion is the shift-and-add-3
// (double dabble) method, unrolled into combinational logic: the binary value
// is shifted into the BCD digits one bit at a time from the MSB, and before
// each shift every digit of 5 or more gets 3 added. Values above 999 (or the
// all-ones "no echo" code) are shown as 999 and flag `over`; the saturation is
// this design's choice, the described design keeps only the low 9 bits.
//
// Purely combinational; the digits are valid in the clock after `value`.
module bin2bcd #(
  parameter int unsigned IN_W = us_pkg::DIST_W
) (
  input  logic [IN_W-1:0] value,
  output logic [3:0]      hundred,
  output logic [3:0]      decade,
  output logic [3:0]      unit,
  output logic            over
);

  logic [9:0]  v;
  logic [11:0] bcd;

  always_comb begin
    over = (value > IN_W'(999));
    v    = over ? 10'd999 : value[9:0];
    bcd  = '0;
    for (int i = 9; i >= 0; i--) begin
      if (bcd[3:0]  >= 4'd5) bcd[3:0]  = bcd[3:0]  + 4'd3;
      if (bcd[7:4]  >= 4'd5) bcd[7:4]  = bcd[7:4]  + 4'd3;
      if (bcd[11:8] >= 4'd5) bcd[11:8] = bcd[11:8] + 4'd3;
      bcd = {bcd[10:0], v[i]};
    end
    hundred = bcd[11:8];
    decade  = bcd[7:4];
    unit    = bcd[3:0];
  end

  initial assert (IN_W >= 10)
    else $error("bin2bcd: IN_W must be at least 10 bits");

endmodule
