// us_pkg: constants and types shared by the ultrasonic ranging design.
//
// The numbers that come from the described system are the 48 MHz global
// clock, the 40 kHz transducer tone, the 340 m/s speed of sound, the 10 m
// design range of the counter and its 20-bit width. The remaining values
// (burst length, frequency gate width, hold-off time) are choices of this
// implementation and are marked as such where they are defined.
package us_pkg;

  // Global clock and transducer tone.
  localparam int unsigned CLK_HZ_DEF      = 48_000_000;
  localparam int unsigned TONE_HZ_DEF     = 40_000;

  // Speed of sound in cm/s (340 m/s).
  localparam int unsigned SOUND_CM_S      = 34_000;

  // High-speed counter: 20 bits, stops after the period count of a 10 m
  // range: N = 2 * 10 m / 340 m/s * 40 kHz = 2353.
  localparam int unsigned COUNT_W         = 20;
  localparam int unsigned MAX_COUNT_DEF   = 2353;

  // Width of the distance result (distance[23:0]).
  localparam int unsigned DIST_W          = 24;

  // Implementation choices.
  localparam int unsigned BURST_PULSES_DEF = 8;    // drive periods per shot
  localparam int unsigned MIN_PERIODS_DEF  = 4;    // in-gate echo periods to accept
  localparam int unsigned HOLD_TICKS_DEF   = 400;  // 10 ms between shots

  // Distance reported when no echo was identified within the range.
  localparam logic [DIST_W-1:0] NO_ECHO   = '1;

  // What the echo input carries.
  //   ECHO_TONE : the digitised receiver output, a train of tone periods;
  //               identified by the frequency gate.
  //   ECHO_PULSE: a sensor module's echo pulse whose width is the time of
  //               flight; timed from its rising to its falling edge.
  typedef enum logic {
    ECHO_TONE  = 1'b0,
    ECHO_PULSE = 1'b1
  } echo_mode_t;

  // States of the measurement sequencer.
  typedef enum logic [2:0] {
    S_IDLE   = 3'd0,  // after reset, start the first shot
    S_FIRE   = 3'd1,  // transmit burst running, receiver blanked
    S_LISTEN = 3'd2,  // frequency gate armed, counter running
    S_LATCH  = 3'd3,  // store the result
    S_HOLD   = 3'd4   // let the reverberation die out before the next shot
  } meas_state_t;

endpackage
