// echo_ident: echo signal identification.
//
// In both modes the asynchronous echo first passes through three D
// flip-flops (two for synchronisation, one to find edges), so that the rest
// of the logic sees one clean, registered signal, and a counter measures
// clocks since the last rising edge.
//
// MODE = ECHO_TONE (default), frequency discrimination. The echo is a
// digitised copy of the receiving transducer: a short train of pulses at the
// tone frequency, possibly mixed with interference at other rates and with
// narrow glitches. At each rising edge the clocks since the previous one give
// the period of the received signal. It is compared with the nominal period
// (CLK_HZ/TONE_HZ clocks): when the deviation is smaller than the gate value
// GATE_CLKS the period is in the gate, otherwise it is treated as
// interference and ignored (`rejected` pulses and the run restarts). After
// MIN_PERIODS consecutive in-gate periods the echo is identified (`found`).
//
// MODE = ECHO_PULSE, for a sensor module that reports the time of flight as
// the width of one echo pulse. The rising edge gives a `start` pulse (the
// counter restarts from it) and the falling edge gives `found`. A pulse
// narrower than MIN_PULSE_CLKS is a glitch: it gives `rejected` instead, and
// the next rising edge starts the measurement again.
//
// While `enable` is low (during the transmit burst and between shots) the
// block forgets all edges.
//
// The D flip-flops against glitches and the frequency gate on counted clocks
// follow the described design, as does the sensor module whose echo the
// pulse mode times. The gate width (10% of the period), the number of
// consecutive periods (4), the minimum pulse width (one tone period) and
// offering both modes in one block are this design's choices.
//
// Timing: `found` and `start` are registered and come 3 clocks after the
// echo edge that causes them; in tone mode that edge completes the
// MIN_PERIODS-th in-gate period, about MIN_PERIODS tone periods after the
// echo's first edge. In tone mode `start` is unused and stays low.
// `period` holds the last measured period (tone mode) or
// pulse width (pulse mode), saturated at twice the nominal period.
module echo_ident #(
  parameter us_pkg::echo_mode_t MODE = us_pkg::ECHO_TONE,
  parameter int unsigned CLK_HZ         = us_pkg::CLK_HZ_DEF,
  parameter int unsigned TONE_HZ        = us_pkg::TONE_HZ_DEF,
  parameter int unsigned GATE_CLKS      = CLK_HZ / TONE_HZ / 10,
  parameter int unsigned MIN_PERIODS    = us_pkg::MIN_PERIODS_DEF,
  parameter int unsigned MIN_PULSE_CLKS = CLK_HZ / TONE_HZ
) (
  input  logic clk,
  input  logic rst_n,
  input  logic enable,
  input  logic echo,
  output logic start,
  output logic found,
  output logic rejected,
  output logic [$clog2(2*(CLK_HZ/TONE_HZ)+1)-1:0] period
);
  import us_pkg::*;

  localparam int unsigned NOM_CLKS = CLK_HZ / TONE_HZ;
  localparam int unsigned PER_MAX  = 2 * NOM_CLKS;
  localparam int unsigned PER_W    = $clog2(PER_MAX + 1);
  localparam int unsigned RUN_W    = $clog2(MIN_PERIODS + 1);

  // Synchroniser and edge detector.
  logic [2:0] sync_q;
  logic       rise, fall;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sync_q <= '0;
    else        sync_q <= {sync_q[1:0], echo};
  end

  assign rise = sync_q[1] & ~sync_q[2];
  assign fall = ~sync_q[1] & sync_q[2];

  // Period / width measurement and gate.
  logic [PER_W-1:0] cnt_q;      // clocks since the last rising edge
  logic             seen_q;     // a rising edge has been seen while enabled
  logic [RUN_W-1:0] run_q;      // consecutive in-gate periods
  logic [PER_W-1:0] dev;
  logic             in_gate;

  always_comb begin
    dev     = (cnt_q >= PER_W'(NOM_CLKS)) ? cnt_q - PER_W'(NOM_CLKS)
                                          : PER_W'(NOM_CLKS) - cnt_q;
    in_gate = (dev < PER_W'(GATE_CLKS));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_q    <= '0;
      seen_q   <= 1'b0;
      run_q    <= '0;
      start    <= 1'b0;
      found    <= 1'b0;
      rejected <= 1'b0;
      period   <= '0;
    end else begin
      start    <= 1'b0;
      found    <= 1'b0;
      rejected <= 1'b0;
      if (!enable) begin
        cnt_q  <= '0;
        seen_q <= 1'b0;
        run_q  <= '0;
      end else begin
        if (cnt_q != PER_W'(PER_MAX)) cnt_q <= cnt_q + 1'b1;
        if (MODE == ECHO_TONE) begin
          if (rise) begin
            cnt_q  <= PER_W'(1);
            seen_q <= 1'b1;
            if (seen_q) begin
              period <= cnt_q;
              if (in_gate) begin
                if (run_q == RUN_W'(MIN_PERIODS - 1)) begin
                  found <= 1'b1;
                  run_q <= '0;
                end else begin
                  run_q <= run_q + 1'b1;
                end
              end else begin
                rejected <= 1'b1;
                run_q    <= '0;
              end
            end
          end
        end else begin
          if (rise) begin
            cnt_q  <= PER_W'(1);
            seen_q <= 1'b1;
            start  <= 1'b1;
          end else if (fall && seen_q) begin
            seen_q <= 1'b0;
            period <= cnt_q;
            if (cnt_q >= PER_W'(MIN_PULSE_CLKS)) found    <= 1'b1;
            else                                 rejected <= 1'b1;
          end
        end
      end
    end
  end

  initial assert (MIN_PERIODS >= 1 && GATE_CLKS >= 1 && GATE_CLKS < NOM_CLKS
                  && MIN_PULSE_CLKS <= PER_MAX)
    else $error("echo_ident: bad gate parameters");

endmodule
