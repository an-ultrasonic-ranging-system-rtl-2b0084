// wave_gen: waveform generator of the ranging system.
//
// On a one-clock start request it waits for the next tone_tick, then drives
// `drive` high and toggles it on every half_tick, so the output is a square
// wave at the tone frequency with exactly 50% duty (the D flip-flop toggle
// of the described design). It counts the pulses it fires and stops after
// BURST_PULSES full periods. `launch` is a one-clock pulse in the clock where
// the first rising edge of the burst is produced; the high-speed counter
// starts from it. `done` pulses in the clock where the last pulse ends.
//
// The toggle scheme and the pulse count follow the described design; the
// burst length of 8 periods is this design's choice (the description gives
// none). A start request while a burst is running is ignored.
//
// Timing: drive rises one clock after the tone_tick that follows start, and
// the burst lasts BURST_PULSES tone periods.
module wave_gen #(
  parameter int unsigned BURST_PULSES = us_pkg::BURST_PULSES_DEF
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  logic half_tick,
  input  logic tone_tick,
  output logic drive,
  output logic launch,
  output logic done,
  output logic busy,
  output logic [$clog2(BURST_PULSES+1)-1:0] fired
);

  typedef enum logic [1:0] {W_IDLE, W_ARMED, W_RUN} wstate_t;
  wstate_t state_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= W_IDLE;
      drive   <= 1'b0;
      launch  <= 1'b0;
      done    <= 1'b0;
      fired   <= '0;
    end else begin
      launch <= 1'b0;
      done   <= 1'b0;
      unique case (state_q)
        W_IDLE: if (start) state_q <= W_ARMED;
        W_ARMED: if (tone_tick) begin
          drive   <= 1'b1;
          launch  <= 1'b1;
          fired   <= 1;
          state_q <= W_RUN;
        end
        W_RUN: if (half_tick) begin
          if (drive && fired == ($bits(fired))'(BURST_PULSES)) begin
            drive   <= 1'b0;
            done    <= 1'b1;
            state_q <= W_IDLE;
          end else begin
            if (!drive) fired <= fired + 1'b1;
            drive <= ~drive;
          end
        end
        default: state_q <= W_IDLE;
      endcase
    end
  end

  assign busy = (state_q != W_IDLE);

  initial assert (BURST_PULSES >= 1)
    else $error("wave_gen: BURST_PULSES must be at least 1");

endmodule
