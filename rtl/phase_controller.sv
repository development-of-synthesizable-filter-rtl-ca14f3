// phase_controller: turns filtered shift pulses into divider half-periods.
//
// What it does
//   Keeps a signed count of phase corrections still to be made: each
//   pos_shift pulse (feedback ahead) adds one, each neg_shift pulse
//   (feedback behind) subtracts one. It offers the frequency divider the
//   length of the next output half-period: divider_max, plus one clock if
//   corrections are pending in the delay direction, minus one clock if they
//   are pending in the advance direction. When the divider takes that value
//   (load pulse) one pending correction is used up. So every shift pulse
//   moves the output edges by exactly one system clock, later for
//   pos_shift and earlier for neg_shift, and at most one clock per
//   half-period.
//
// Interface and timing
//   half_period is combinational from divider_max and the pending count;
//   it is 0 while divider_max is 0 (loop idle). A lengthened half-period is
//   clamped to the count's maximum and a shortened one to 1 clock; a
//   clamped correction is still used up. The pending count saturates at
//   +/-(2^(CORR_W-1)-1).
//
// From the reference design: a phase controller between the loop filter's
//   Pos/Neg Shift outputs and the frequency divider, which shifts the
//   output clock one way or the other. This design's own choices: a one
//   system clock step per shift pulse, the pending-correction counter and
//   applying corrections at half-period boundaries.
module phase_controller
  import adpll_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,        // asynchronous, active low
  input  logic   pos_shift,    // delay the output by one clock
  input  logic   neg_shift,    // advance the output by one clock
  input  count_t divider_max,  // nominal half-period from the phase detector
  input  logic   load,         // divider takes half_period this clock
  output count_t half_period,  // length of the next output half-period
  output logic signed [CORR_W-1:0] pending  // corrections not yet applied
);

  typedef logic signed [CORR_W-1:0] corr_t;
  localparam corr_t PEND_MAX = corr_t'((1 << (CORR_W-1)) - 1);
  localparam count_t CNT_MAX = '1;

  corr_t step;
  corr_t delta;
  logic signed [CORR_W+1:0] pend_sum;

  assign step = (pending > 0) ? corr_t'(1) : (pending < 0) ? corr_t'(-1) : corr_t'(0);

  always_comb begin
    if (divider_max == '0)                        half_period = '0;
    else if (step > 0)                            half_period = (divider_max == CNT_MAX) ? CNT_MAX : divider_max + count_t'(1);
    else if (step < 0)                            half_period = (divider_max == count_t'(1)) ? count_t'(1) : divider_max - count_t'(1);
    else                                          half_period = divider_max;
  end

  always_comb begin
    delta = corr_t'(0);
    if (pos_shift) delta = delta + corr_t'(1);
    if (neg_shift) delta = delta - corr_t'(1);
    pend_sum = (CORR_W+2)'(pending) + (CORR_W+2)'(delta);
    if (load) pend_sum = pend_sum - (CORR_W+2)'(step);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pending <= '0;
    end else if (pend_sum > (CORR_W+2)'(PEND_MAX)) begin
      pending <= PEND_MAX;
    end else if (pend_sum < -(CORR_W+2)'(PEND_MAX)) begin
      pending <= -PEND_MAX;
    end else begin
      pending <= corr_t'(pend_sum);
    end
  end

endmodule
