// measure_fsm: sequencer of one distance measurement.
//
// Written as a three-process state machine: a state register, a
// combinational next-state process and a registered output process. It runs
// the measurements back to back:
//   S_IDLE   after reset; goes straight to S_FIRE.
//   S_FIRE   `fire` pulses once to start the transmit burst. The echo gate
//            stays disabled (blanking) until the burst is over (`burst_done`),
//            so the direct crosstalk of the transmitter is not taken as an echo.
//   S_LISTEN `listen` enables the echo gate while the counter runs. The
//            counter's `cnt_done` (echo identified) or `cnt_timeout` (nothing
//            within the range) ends the state.
//   S_LATCH  `latch` pulses for one clock; `latch_valid` says whether an echo
//            was found, so the result register takes the new distance.
//   S_HOLD   waits HOLD_TICKS tone periods so that the reverberation dies out,
//            then starts the next shot.
// The three-process style and the sequence fire / count / identify echo /
// latch follow the described design; the blanking during the burst and the
// 10 ms hold-off are this design's choices.
//
// Timing: all outputs are registered and follow the state they belong to in
// the same clock as the state register (they are computed from next_state).
module measure_fsm #(
  parameter int unsigned HOLD_TICKS = us_pkg::HOLD_TICKS_DEF
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                tone_tick,
  input  logic                burst_done,
  input  logic                cnt_done,
  input  logic                cnt_timeout,
  output logic                fire,
  output logic                listen,
  output logic                latch,
  output logic                latch_valid,
  output us_pkg::meas_state_t state
);
  import us_pkg::*;

  localparam int unsigned HOLD_W = $clog2(HOLD_TICKS + 1);

  meas_state_t       state_q, next_state;
  logic [HOLD_W-1:0] hold_q;
  logic              found_q;   // echo identified in this shot

  // Process 1: state register (and the counters that belong to the states).
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      hold_q  <= '0;
      found_q <= 1'b0;
    end else begin
      state_q <= next_state;
      if (state_q != S_HOLD)   hold_q <= '0;
      else if (tone_tick)      hold_q <= hold_q + 1'b1;
      if (state_q == S_FIRE)   found_q <= 1'b0;
      else if (cnt_done)       found_q <= 1'b1;
    end
  end

  // Process 2: next-state logic.
  always_comb begin
    next_state = state_q;
    unique case (state_q)
      S_IDLE:   next_state = S_FIRE;
      S_FIRE:   if (cnt_timeout)                    next_state = S_LATCH;
                else if (burst_done)                next_state = S_LISTEN;
      S_LISTEN: if (cnt_done || cnt_timeout)        next_state = S_LATCH;
      S_LATCH:  next_state = S_HOLD;
      S_HOLD:   if (tone_tick && hold_q == HOLD_W'(HOLD_TICKS - 1))
                                                    next_state = S_FIRE;
      default:  next_state = S_IDLE;
    endcase
  end

  // Process 3: registered outputs.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fire        <= 1'b0;
      listen      <= 1'b0;
      latch       <= 1'b0;
      latch_valid <= 1'b0;
    end else begin
      fire        <= (next_state == S_FIRE) && (state_q != S_FIRE);
      listen      <= (next_state == S_LISTEN);
      latch       <= (next_state == S_LATCH);
      latch_valid <= (next_state == S_LATCH) && (cnt_done || found_q);
    end
  end

  assign state = state_q;

  initial assert (HOLD_TICKS >= 1)
    else $error("measure_fsm: HOLD_TICKS must be at least 1");

endmodule
