// seg7_decoder: one digit of the seven-segment ("digital tube") display.
//
// Decodes a BCD digit 0-9 into segments {g,f,e,d,c,b,a}; codes 10-15 and
// `blank` turn all segments off. ACTIVE_LOW = 1 suits common-anode tubes,
// where a segment lights when its pin is driven low. The display itself is
// only named in the described system; one decoder per digit with static
// drive is this design's choice.
//
// Purely combinational.
module seg7_decoder #(
  parameter bit ACTIVE_LOW = 1'b1
) (
  input  logic [3:0] digit,
  input  logic       blank,
  output logic [6:0] seg
);

  logic [6:0] on;   // 1 = segment lit, bit 0 = a ... bit 6 = g

  always_comb begin
    unique case (digit)
      4'd0:    on = 7'b011_1111;
      4'd1:    on = 7'b000_0110;
      4'd2:    on = 7'b101_1011;
      4'd3:    on = 7'b100_1111;
      4'd4:    on = 7'b110_0110;
      4'd5:    on = 7'b110_1101;
      4'd6:    on = 7'b111_1101;
      4'd7:    on = 7'b000_0111;
      4'd8:    on = 7'b111_1111;
      4'd9:    on = 7'b110_1111;
      default: on = 7'b000_0000;
    endcase
    if (blank) on = '0;
    seg = ACTIVE_LOW ? ~on : on;
  end

endmodule
