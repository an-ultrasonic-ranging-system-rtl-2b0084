// timing_gen: timing generator of the ranging system.
//
// Divides the global clock into two free-running strobes: half_tick, one
// clock wide, every half period of the transducer tone (80 kHz for a 40 kHz
// tone), and tone_tick, one clock wide, on every second half_tick (40 kHz).
// A D flip-flop toggled by half_tick (see wave_gen) turns the strobe into a
// square wave of exactly 50% duty; with a 48 MHz clock the divider counts to
// 600. The 48 MHz clock and 40 kHz tone are those of the described system;
// the system uses a vendor divider core at this place, here it is a plain
// counter.
//
// Interface: clk, rst_n (asynchronous active-low reset); half_tick and
// tone_tick are registered. The first half_tick comes CLK_HZ/(2*TONE_HZ)
// clocks after reset is released, and the first tone_tick one half period
// later.
module timing_gen #(
  parameter int unsigned CLK_HZ  = us_pkg::CLK_HZ_DEF,
  parameter int unsigned TONE_HZ = us_pkg::TONE_HZ_DEF
) (
  input  logic clk,
  input  logic rst_n,
  output logic half_tick,
  output logic tone_tick
);

  localparam int unsigned HALF_DIV = CLK_HZ / (2 * TONE_HZ);
  localparam int unsigned DIV_W    = (HALF_DIV > 1) ? $clog2(HALF_DIV) : 1;

  logic [DIV_W-1:0] div_q;
  logic             phase_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      div_q     <= '0;
      phase_q   <= 1'b0;
      half_tick <= 1'b0;
      tone_tick <= 1'b0;
    end else begin
      half_tick <= 1'b0;
      tone_tick <= 1'b0;
      if (div_q == DIV_W'(HALF_DIV - 1)) begin
        div_q     <= '0;
        half_tick <= 1'b1;
        tone_tick <= phase_q;
        phase_q   <= ~phase_q;
      end else begin
        div_q <= div_q + 1'b1;
      end
    end
  end

  initial assert (HALF_DIV >= 2)
    else $error("timing_gen: CLK_HZ must be at least 4 * TONE_HZ");

endmodule
