// hcsr04_model: behavioural model of a pulse-width ultrasonic sensor module
// (HC-SR04 style), for simulation only.
//
// A high pulse of at least 10 us on `trig` starts a shot when it falls. The
// module then sends its own 8-period 40 kHz burst (200 us), raises `echo`,
// and drops it after the round-trip time `delay_clks`. With no target
// (`present` = 0) `echo` stays high for 38 ms. If `glitch` is set, a 1 us
// spike appears on `echo` 50 us after the trigger, before the real pulse.
// Settings are read when the trigger falls. Retriggering during a shot is
// ignored.
module hcsr04_model #(
  parameter int CLK_HZ = 48_000_000
) (
  input  logic clk,
  input  logic trig,
  input  int   delay_clks,
  input  bit   present,
  input  bit   glitch,
  output logic echo,
  output int   shots
);
  localparam int MIN_TRIG = CLK_HZ / 100_000;      // 10 us
  localparam int BURST    = 8 * CLK_HZ / 40_000;   // 200 us
  localparam int NO_TGT   = 38 * (CLK_HZ / 1000);  // 38 ms
  localparam int GL_AT    = CLK_HZ / 20_000;       // 50 us
  localparam int GL_LEN   = CLK_HZ / 1_000_000;    // 1 us

  int  high = 0;
  longint t = -1;
  int  width = 0;
  bit  gl = 1'b0;
  bit  prev = 1'b0;

  initial shots = 0;

  always @(posedge clk) begin
    prev <= trig;
    if (trig) high <= high + 1; else high <= 0;
    if (!trig && prev && high >= MIN_TRIG && t < 0) begin
      t     <= 0;
      width <= present ? delay_clks : NO_TGT;
      gl    <= glitch;
      shots <= shots + 1;
    end else if (t >= 0) begin
      t <= (t >= BURST + 10 + width) ? -1 : t + 1;
    end
  end

  always_comb
    echo = (t >= BURST + 10 && t < BURST + 10 + width)
        || (gl && t >= GL_AT && t < GL_AT + GL_LEN);
endmodule
