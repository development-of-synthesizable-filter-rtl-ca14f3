// rw_filter: variable reset random walk loop filter.
//
// What it does
//   A reversible (up/down) counter with 2N+1 states, -N..+N, starting at 0.
//   Each inc pulse (phase detector Lead) counts up, each dec pulse (Lag)
//   counts down; both in the same clock cancel. When the count reaches +N
//   the filter emits a one-clock pos_shift pulse and the counter resets
//   to 0; at -N it emits neg_shift and resets. Only a run of N more leads
//   than lags (or the reverse) gets through, so isolated, evenly
//   distributed noise pulses seen while locked are absorbed.
//
// Interface and timing
//   cap_n is the capacity N and may change at run time (the "variable
//   reset" point). A value of 0 is treated as 1, which passes every pulse
//   through. If N is lowered below the current count, the next pulse in
//   that direction fires. pos_shift / neg_shift are registered: they
//   appear one clock after the inc/dec pulse that completes the count.
//
// From the reference design: the 2N+1-state up/down counter, the +N and -N
//   outputs and their OR feeding the counter reset. This design's own
//   choices: the counter width, a run-time N input, and the handling of
//   simultaneous inc/dec and of N = 0. The reference filter is said to
//   adapt its parameters to the input's noise level, but no rule for that
//   is given; none is implemented here, and N is set from outside.
module rw_filter
  import adpll_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,      // asynchronous, active low
  input  logic      inc,        // Lead pulse
  input  logic      dec,        // Lag pulse
  input  filt_cap_t cap_n,      // capacity N
  output logic      pos_shift,  // count reached +N
  output logic      neg_shift,  // count reached -N
  output logic signed [FILT_W:0] count  // current count, for observation
);

  typedef logic signed [FILT_W:0] scount_t;

  scount_t n_eff;
  scount_t count_d;
  logic    hit_pos, hit_neg;

  assign n_eff = (cap_n == '0) ? scount_t'(1) : scount_t'({1'b0, cap_n});

  always_comb begin
    count_d = count;
    hit_pos = 1'b0;
    hit_neg = 1'b0;
    if (inc && !dec) begin
      if (count + scount_t'(1) >= n_eff) hit_pos = 1'b1;
      else                               count_d = count + scount_t'(1);
    end else if (dec && !inc) begin
      if (count - scount_t'(1) <= -n_eff) hit_neg = 1'b1;
      else                                count_d = count - scount_t'(1);
    end
    // Reaching either end resets the counter (the OR of +N and -N).
    if (hit_pos || hit_neg) count_d = '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count     <= '0;
      pos_shift <= 1'b0;
      neg_shift <= 1'b0;
    end else begin
      count     <= count_d;
      pos_shift <= hit_pos;
      neg_shift <= hit_neg;
    end
  end

  a_shift_excl: assert property (@(posedge clk) disable iff (!rst_n) !(pos_shift && neg_shift));

endmodule
