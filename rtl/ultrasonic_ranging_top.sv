// ultrasonic_ranging_top: the complete FPGA design of the ranging system.
//
// The ranging core (ultrasonic_detect) drives the transmitter through `trig`
// and listens to the receiver on `echo`. Its distance, in centimetres, is
// split into hundreds, tens and units and shown on three seven-segment
// digits. ECHO_MODE selects what `echo` carries (see ultrasonic_detect):
// the receiver's 40 kHz tone (default) or a sensor module's echo pulse. The
// transmitter and receiver analog front ends, the power supply,
// the configuration flash and the JTAG port sit outside this design.
//
// Ports: clk is the 48 MHz global clock, rst_n an asynchronous active-low
// reset. seg[0] is the units digit, seg[1] the tens, seg[2] the hundreds,
// each {g,f,e,d,c,b,a} and active low. `over` lights when the distance is
// above 999 cm or no echo was found; the digits then show 999.
//
// Timing: the digits follow `distance` combinationally, one clock after the
// core latches a new result.
module ultrasonic_ranging_top #(
  parameter us_pkg::echo_mode_t ECHO_MODE = us_pkg::ECHO_TONE,
  parameter int unsigned CLK_HZ       = us_pkg::CLK_HZ_DEF,
  parameter int unsigned TONE_HZ      = us_pkg::TONE_HZ_DEF,
  parameter int unsigned BURST_PULSES = us_pkg::BURST_PULSES_DEF,
  parameter int unsigned MIN_PERIODS  = us_pkg::MIN_PERIODS_DEF,
  parameter int unsigned GATE_CLKS    = CLK_HZ / TONE_HZ / 10,
  parameter int unsigned MAX_COUNT    = us_pkg::MAX_COUNT_DEF,
  parameter int unsigned HOLD_TICKS   = us_pkg::HOLD_TICKS_DEF
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      echo,
  output logic                      trig,
  output logic [us_pkg::DIST_W-1:0] distance,
  output logic                      update,
  output logic [2:0][6:0]           seg,
  output logic                      over
);

  logic [3:0] hundred, decade, unit;

  ultrasonic_detect #(
    .ECHO_MODE(ECHO_MODE), .CLK_HZ(CLK_HZ), .TONE_HZ(TONE_HZ), .BURST_PULSES(BURST_PULSES),
    .MIN_PERIODS(MIN_PERIODS), .GATE_CLKS(GATE_CLKS),
    .MAX_COUNT(MAX_COUNT), .HOLD_TICKS(HOLD_TICKS)
  ) u_core (
    .clk, .rst_n, .echo, .trig, .distance, .update
  );

  bin2bcd #(.IN_W(us_pkg::DIST_W)) u_bcd (
    .value(distance), .hundred, .decade, .unit, .over
  );

  // Leading zeros of the hundreds and tens digits are blanked.
  seg7_decoder u_seg_unit    (.digit(unit),    .blank(1'b0),                          .seg(seg[0]));
  seg7_decoder u_seg_decade  (.digit(decade),  .blank(hundred == 4'd0 && decade == 4'd0), .seg(seg[1]));
  seg7_decoder u_seg_hundred (.digit(hundred), .blank(hundred == 4'd0),               .seg(seg[2]));

endmodule
