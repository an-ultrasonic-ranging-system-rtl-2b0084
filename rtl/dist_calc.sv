// dist_calc: distance calculation and result latch.
//
// Turns the counted number of tone periods N into a distance in centimetres,
//   distance = (N - COMP_TICKS) * v / (2 * f_tone),  v = 34000 cm/s,
// rounded to the nearest centimetre. The factor 2 is the round trip. With
// the 40 kHz tone one count is 0.425 cm. COMP_TICKS removes the periods the
// echo gate needs before it declares an echo (MIN_PERIODS of echo_ident),
// because the counter is stopped only then.
//
// The result is kept in a register that only changes on `latch`, so the
// output never shows the counter while it runs or any glitch of the
// arithmetic (the latch method of the described design). If `valid` is low
// at the latch (no echo within range) the output becomes all ones; a valid
// result too large for DIST_W bits saturates one below that code.
// Compensation, rounding and the all-ones code are this design's choices.
//
// Timing: `distance` and `update` change one clock after `latch`.
module dist_calc #(
  parameter int unsigned COUNT_W    = us_pkg::COUNT_W,
  parameter int unsigned DIST_W     = us_pkg::DIST_W,
  parameter int unsigned TONE_HZ    = us_pkg::TONE_HZ_DEF,
  parameter int unsigned SOUND_CM_S = us_pkg::SOUND_CM_S,
  parameter int unsigned COMP_TICKS = us_pkg::MIN_PERIODS_DEF
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               latch,
  input  logic               valid,
  input  logic [COUNT_W-1:0] count,
  output logic [DIST_W-1:0]  distance,
  output logic               update
);

  localparam int unsigned PROD_W = COUNT_W + $clog2(SOUND_CM_S + 1) + 1;
  localparam longint unsigned DIV = 2 * longint'(TONE_HZ);
  // Largest code: all ones; valid results saturate one below it.
  localparam longint unsigned DIST_MAX = (64'd1 << DIST_W) - 1;

  logic [COUNT_W-1:0] n_eff;
  logic [PROD_W-1:0]  prod;
  logic [PROD_W-1:0]  dist_full;

  always_comb begin
    n_eff     = (count > COUNT_W'(COMP_TICKS)) ? count - COUNT_W'(COMP_TICKS) : '0;
    prod      = PROD_W'(n_eff) * PROD_W'(SOUND_CM_S) + PROD_W'(DIV / 2);
    dist_full = prod / PROD_W'(DIV);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      distance <= '0;
      update   <= 1'b0;
    end else begin
      update <= latch;
      if (latch) begin
        if (!valid)                                distance <= '1;
        else if (dist_full >= PROD_W'(DIST_MAX))   distance <= DIST_W'(DIST_MAX - 1);
        else                                       distance <= DIST_W'(dist_full);
      end
    end
  end

endmodule
