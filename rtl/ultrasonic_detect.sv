// ultrasonic_detect: the ranging core, with the ports of the echo
// recognition symbol (clk, rst_n, echo in; trig, distance[23:0] out).
//
// A measurement runs as follows. The timing generator divides the global
// clock into 80 kHz and 40 kHz strobes. The sequencer (measure_fsm) asks the
// waveform generator for a burst; the waveform generator puts BURST_PULSES
// periods of a 40 kHz, 50% duty square wave on `trig`, which drives the
// transmitter, and starts the high-speed counter on its first edge. The
// counter counts 40 kHz periods. After the burst the echo identifier is
// armed: it synchronises the received `echo`, measures its period in clocks
// and, after MIN_PERIODS periods inside the frequency gate, stops the
// counter. The count is converted to centimetres and latched on `distance`;
// if no echo is identified within MAX_COUNT periods (10 m) `distance` becomes
// all ones. After a hold-off the next shot starts.
//
// With ECHO_MODE = ECHO_PULSE the core serves a sensor module instead of
// bare transducers: `trig` starts the module (one 40 kHz period, 12.5 us
// high, with BURST_PULSES = 1) and `echo` is the module's echo pulse. The
// counter is then restarted by the rising edge of that pulse and stopped by
// its falling edge, so it counts the pulse width; no gate latency is
// subtracted. Pulses narrower than one tone period are ignored as glitches.
//
// `update` (not on the original symbol) pulses for one clock whenever
// `distance` has been written.
//
// Timing: one shot takes the burst, the time of flight plus MIN_PERIODS
// periods (or MAX_COUNT periods without echo), and HOLD_TICKS periods; at
// the defaults at most about 69 ms.
module ultrasonic_detect #(
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
  output logic                      update
);
  import us_pkg::*;

  logic half_tick, tone_tick;
  logic fire, listen, latch, latch_valid;
  logic launch, burst_done, burst_busy;
  logic [$clog2(BURST_PULSES+1)-1:0] fired;
  logic echo_start, echo_found, echo_rejected;
  logic [$clog2(2*(CLK_HZ/TONE_HZ)+1)-1:0] echo_period;
  logic [COUNT_W-1:0] count;
  logic cnt_running, cnt_done, cnt_timeout;
  meas_state_t state;

  timing_gen #(.CLK_HZ(CLK_HZ), .TONE_HZ(TONE_HZ)) u_timing (
    .clk, .rst_n, .half_tick, .tone_tick
  );

  measure_fsm #(.HOLD_TICKS(HOLD_TICKS)) u_fsm (
    .clk, .rst_n, .tone_tick, .burst_done, .cnt_done, .cnt_timeout,
    .fire, .listen, .latch, .latch_valid, .state
  );

  wave_gen #(.BURST_PULSES(BURST_PULSES)) u_wave (
    .clk, .rst_n, .start(fire), .half_tick, .tone_tick,
    .drive(trig), .launch, .done(burst_done), .busy(burst_busy), .fired
  );

  echo_ident #(
    .MODE(ECHO_MODE), .CLK_HZ(CLK_HZ), .TONE_HZ(TONE_HZ),
    .GATE_CLKS(GATE_CLKS), .MIN_PERIODS(MIN_PERIODS)
  ) u_echo (
    .clk, .rst_n, .enable(listen), .echo, .start(echo_start),
    .found(echo_found), .rejected(echo_rejected), .period(echo_period)
  );

  hs_counter #(.WIDTH(COUNT_W), .MAX_COUNT(MAX_COUNT)) u_counter (
    .clk, .rst_n, .launch(launch || echo_start), .tick(tone_tick), .stop(echo_found),
    .count, .running(cnt_running), .done(cnt_done), .timeout(cnt_timeout)
  );

  dist_calc #(
    .COUNT_W(COUNT_W), .DIST_W(DIST_W), .TONE_HZ(TONE_HZ),
    .SOUND_CM_S(SOUND_CM_S),
    .COMP_TICKS((ECHO_MODE == ECHO_TONE) ? MIN_PERIODS : 0)
  ) u_dist (
    .clk, .rst_n, .latch, .valid(latch_valid), .count, .distance, .update
  );

  // The identifier is only armed after the burst, while the counter runs.
  a_listen_counts: assert property (@(posedge clk) disable iff (!rst_n)
    echo_found |-> cnt_running);

endmodule
