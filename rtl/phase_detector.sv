// phase_detector: input synchroniser, period meter and lead/lag comparator.
//
// What it does
//   1. Brings the asynchronous input signal into the system clock domain
//      with a two-flop synchroniser and detects its rising and falling
//      edges (in_edge is the one-cycle rising-edge pulse).
//   2. Measures the input's high time in system clocks (period_count, the
//      half-period for a 50% duty input) and derives the divider count
//      divider_max = period_count / DIVIDER. The frequency divider toggles
//      its output every divider_max clocks, so the output runs at DIVIDER
//      times the input frequency. Both values update at every input
//      falling edge.
//   3. At every input rising edge it looks at how many clocks ago the
//      output last rose (out_rise). Zero clocks means the edges coincide:
//      lock is set. Up to divider_max clocks ago means the output edge came
//      first, so the feedback is ahead and lead pulses for one clock. Later
//      than that, the output's next edge is still to come, so the feedback
//      lags and lag pulses for one clock. Either clears lock.
//
// Timing
//   in_edge follows the raw input by two to three clocks (synchroniser).
//   lead, lag and lock are registered: they change one clock after the
//   in_edge pulse. Nothing is decided while divider_max is 0 (no full
//   input high time measured yet, or the high time is shorter than
//   DIVIDER clocks); lock is then held low.
//
// From the reference design: the D-flip-flop synchroniser, the measured
// input period, the divider count derived from it and the Divider
// parameter, the one-clock Lead/Lag pulses (Lead when the feedback is
// ahead) and the Lock output. This design's own choices: measuring the
// high time between rising and falling edge, the "clocks since the last
// output edge" comparison and its half-period threshold, exact (zero
// clock) alignment as the lock criterion, and saturating counters.
module phase_detector
  import adpll_pkg::*;
#(
  parameter int unsigned DIVIDER = 5   // output/input frequency ratio
) (
  input  logic   clk,
  input  logic   rst_n,          // asynchronous, active low
  input  logic   signal_in,      // reference input, asynchronous
  input  logic   out_rise,       // one-clock pulse: output signal just rose
  output logic   sync_signal,    // synchronised input
  output logic   in_edge,        // one-clock pulse on input rising edge
  output count_t period_count,   // measured input high time, clocks
  output count_t divider_max,    // period_count / DIVIDER
  output logic   lead,           // one-clock pulse: feedback ahead
  output logic   lag,            // one-clock pulse: feedback behind
  output logic   lock            // input and output edges coincide
);

  localparam count_t CNT_MAX = '1;
  localparam logic [CNT_W:0] SINCE_MAX = '1;

  logic s1_q, s2_q, s3_q;
  logic in_fall;
  logic seen_rise_q;
  count_t high_cnt_q;
  logic [CNT_W:0] since_q;       // clocks since the last output rise
  logic [CNT_W:0] phase;         // same, counting the current clock as 0
  logic running;
  phase_rel_e rel;

  // Synchroniser and edge detection.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_q <= 1'b0;
      s2_q <= 1'b0;
      s3_q <= 1'b0;
    end else begin
      s1_q <= signal_in;
      s2_q <= s1_q;
      s3_q <= s2_q;
    end
  end

  assign sync_signal = s2_q;
  assign in_edge     = s2_q & ~s3_q;
  assign in_fall     = ~s2_q & s3_q;

  // High-time measurement and divider count.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      seen_rise_q  <= 1'b0;
      high_cnt_q   <= '0;
      period_count <= '0;
      divider_max  <= '0;
    end else begin
      if (in_edge) begin
        seen_rise_q <= 1'b1;
        high_cnt_q  <= count_t'(1);
      end else if (s2_q && high_cnt_q != CNT_MAX) begin
        high_cnt_q <= high_cnt_q + count_t'(1);
      end
      if (in_fall && seen_rise_q) begin
        period_count <= high_cnt_q;
        divider_max  <= high_cnt_q / count_t'(DIVIDER);
      end
    end
  end

  // Clocks since the output last rose.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      since_q <= SINCE_MAX;
    end else if (out_rise) begin
      since_q <= (CNT_W+1)'(1);
    end else if (since_q != SINCE_MAX) begin
      since_q <= since_q + (CNT_W+1)'(1);
    end
  end

  assign phase   = out_rise ? '0 : since_q;
  assign running = (divider_max != '0);

  always_comb begin
    if (!running)                              rel = PH_NONE;
    else if (phase == '0)                      rel = PH_ALIGNED;
    else if (phase <= {1'b0, divider_max})     rel = PH_LEAD;
    else                                       rel = PH_LAG;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lead <= 1'b0;
      lag  <= 1'b0;
      lock <= 1'b0;
    end else begin
      lead <= in_edge && (rel == PH_LEAD);
      lag  <= in_edge && (rel == PH_LAG);
      if (!running)     lock <= 1'b0;
      else if (in_edge) lock <= (rel == PH_ALIGNED);
    end
  end

  // Lead and lag are never asserted together.
  a_lead_lag_excl: assert property (@(posedge clk) disable iff (!rst_n) !(lead && lag));

endmodule
