// adpll_top: all-digital PLL with a variable reset random walk loop filter.
//
// What it does
//   Produces an output signal at DIVIDER times the frequency of a slow
//   input (reference) signal, phase locked to it, using nothing but the
//   system clock. The loop is:
//
//     signal_in -> phase_detector --lead/lag--> rw_filter
//        ^              |  divider_max               | pos/neg shift
//        |              v                            v
//        +-- signal_out <- freq_divider <-half_period- phase_controller
//
//   The phase detector measures the input's high time in system clocks and
//   divides it by DIVIDER to get the output half-period (divider_max). The
//   divider then runs at roughly the right frequency straight away; the
//   remaining phase error is removed by the feedback loop. At each input
//   rising edge the detector reports whether the output edge came early
//   (lead) or late (lag). The random walk filter passes on a shift request
//   only after N more leads than lags (or the reverse); the phase
//   controller then lengthens or shortens one output half-period by one
//   system clock. When an output rising edge falls in the same clock as the
//   (synchronised) input rising edge, lock goes high.
//
// Interface and timing
//   clk is the system clock (50 MHz in the reference setup, with a
//   500 kHz input). signal_in may be asynchronous. filter_n sets the
//   filter capacity N and may change at run time. All outputs are
//   registered or decoded from registers. The output edges line up with
//   the synchronised input, which trails the raw input by two to three
//   clocks.
//
// From the reference design: the four-block loop, the Lead/Lag,
//   Positive/Negative and Lock signals, the measured period and the
//   divider count, and the top-level Divider parameter that sets the
//   multiplication factor (default 5, the factor of the reference design's
//   main simulation: half-period count 50, divider count 10). The capacity
//   port and the reset are this design's own choices.
module adpll_top
  import adpll_pkg::*;
#(
  parameter int unsigned DIVIDER = 5   // output/input frequency ratio
) (
  input  logic      clk,            // system clock
  input  logic      rst_n,          // asynchronous, active low
  input  logic      signal_in,      // reference input
  input  filt_cap_t filter_n,       // random walk filter capacity N
  output logic      signal_out,     // DIVIDER x input frequency, locked
  output logic      sync_signal,    // synchronised input
  output logic      in_edge,        // input rising edge pulse
  output logic      out_edge,       // output rising edge pulse
  output logic      lead,           // phase detector: feedback ahead
  output logic      lag,            // phase detector: feedback behind
  output logic      pos_shift,      // filter: delay the output
  output logic      neg_shift,      // filter: advance the output
  output logic      lock,           // output edge aligned with input edge
  output count_t    period_count,   // measured input high time, clocks
  output count_t    divider_max     // output half-period, clocks
);

  count_t half_period;
  logic   load;

  phase_detector #(.DIVIDER(DIVIDER)) u_phase_detector (
    .clk          (clk),
    .rst_n        (rst_n),
    .signal_in    (signal_in),
    .out_rise     (out_edge),
    .sync_signal  (sync_signal),
    .in_edge      (in_edge),
    .period_count (period_count),
    .divider_max  (divider_max),
    .lead         (lead),
    .lag          (lag),
    .lock         (lock)
  );

  rw_filter u_rw_filter (
    .clk       (clk),
    .rst_n     (rst_n),
    .inc       (lead),
    .dec       (lag),
    .cap_n     (filter_n),
    .pos_shift (pos_shift),
    .neg_shift (neg_shift),
    .count     ()
  );

  phase_controller u_phase_controller (
    .clk         (clk),
    .rst_n       (rst_n),
    .pos_shift   (pos_shift),
    .neg_shift   (neg_shift),
    .divider_max (divider_max),
    .load        (load),
    .half_period (half_period),
    .pending     ()
  );

  freq_divider u_freq_divider (
    .clk         (clk),
    .rst_n       (rst_n),
    .half_period (half_period),
    .load        (load),
    .signal_out  (signal_out),
    .out_rise    (out_edge)
  );

endmodule
