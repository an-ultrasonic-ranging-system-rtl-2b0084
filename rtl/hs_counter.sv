// hs_counter: high-speed counter for the time of flight.
//
// Counts tone periods (one-clock `tick` strobes at 40 kHz) from the moment the
// drive burst is launched until the echo is identified. `launch` clears the
// count and starts it; `stop` freezes it and gives a `done` pulse. If the
// count reaches MAX_COUNT first, the counter stops by itself and gives a
// `timeout` pulse instead. MAX_COUNT = 2353 is the period count of a 10 m
// range, N = 2 * 10 m / 340 m/s * 40 kHz, and the counter is 20 bits wide;
// both follow the described design. Giving `stop` priority over `tick` in the
// same clock is this design's choice.
//
// Timing: count changes one clock after a tick; done and timeout are
// registered one-clock pulses. A stop while the counter is not running is
// ignored.
module hs_counter #(
  parameter int unsigned WIDTH     = us_pkg::COUNT_W,
  parameter int unsigned MAX_COUNT = us_pkg::MAX_COUNT_DEF
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             launch,
  input  logic             tick,
  input  logic             stop,
  output logic [WIDTH-1:0] count,
  output logic             running,
  output logic             done,
  output logic             timeout
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count   <= '0;
      running <= 1'b0;
      done    <= 1'b0;
      timeout <= 1'b0;
    end else begin
      done    <= 1'b0;
      timeout <= 1'b0;
      if (launch) begin
        count   <= '0;
        running <= 1'b1;
      end else if (running) begin
        if (stop) begin
          running <= 1'b0;
          done    <= 1'b1;
        end else if (tick) begin
          count <= count + 1'b1;
          if (count == WIDTH'(MAX_COUNT - 1)) begin
            running <= 1'b0;
            timeout <= 1'b1;
          end
        end
      end
    end
  end

  initial assert (MAX_COUNT < (1 << WIDTH))
    else $error("hs_counter: MAX_COUNT does not fit in WIDTH bits");

endmodule
