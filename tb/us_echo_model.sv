// us_echo_model: behavioural model of the analog path outside the FPGA -
// transmitter, air, target, receiver and its comparator - for simulation only.
//
// On the first rising edge of a transmit burst on `drive` it starts a clock
// count. After `delay_clks` clocks it plays `n_echo` periods of a square wave
// of `echo_period` clocks on `echo` (the returned tone). If `noise_n` is not
// zero it also plays `noise_n` periods of `noise_period` clocks starting
// `noise_delay` clocks after the burst (interference at another frequency).
// `present` = 0 models a target out of range: no echo at all. A new burst is
// recognised once `drive` has been low for 4 * echo_period clocks. All
// settings are read when a burst starts.
module us_echo_model (
  input  logic clk,
  input  logic drive,
  input  int   delay_clks,
  input  int   n_echo,
  input  int   echo_period,
  input  bit   present,
  input  int   noise_delay,
  input  int   noise_n,
  input  int   noise_period,
  output logic echo,
  output int   shots
);
  longint t = -1;          // clocks since the burst started, -1 = idle
  int low_run = 1 << 30;
  bit prev = 1'b0;
  int d, ne, ep, nd, nn, np;
  bit pr;
  logic e_sig, n_sig;

  initial shots = 0;

  always @(posedge clk) begin
    prev <= drive;
    if (drive) low_run <= 0; else if (low_run < (1 << 30)) low_run <= low_run + 1;
    if (drive && !prev && low_run > 4 * echo_period) begin
      t  <= 0;
      d  <= delay_clks; ne <= n_echo; ep <= echo_period; pr <= present;
      nd <= noise_delay; nn <= noise_n; np <= noise_period;
      shots <= shots + 1;
    end else if (t >= 0) begin
      t <= t + 1;
    end
  end

  always_comb begin
    e_sig = 1'b0;
    n_sig = 1'b0;
    if (t >= 0 && pr && t >= d && t < d + longint'(ne) * ep)
      e_sig = ((t - d) % ep) < ep / 2;
    if (t >= 0 && nn > 0 && t >= nd && t < nd + longint'(nn) * np)
      n_sig = ((t - nd) % np) < np / 2;
    echo = e_sig | n_sig;
  end
endmodule
