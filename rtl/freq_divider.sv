// freq_divider: programmable divider of the system clock.
//
// What it does
//   Generates the output signal by counting system clocks. Each half-period
//   of the output lasts half_period clocks, a value taken (load pulse) at
//   the start of that half-period, so the output period is twice
//   divider_max plus any phase corrections. With divider_max derived from
//   the input's half-period divided by DIVIDER, the output frequency is
//   DIVIDER times the input frequency. While half_period is 0 the divider
//   is idle with the output low; it starts with a rising edge as soon as a
//   non-zero half_period appears.
//
// Interface and timing
//   signal_out and out_rise are registered; out_rise is high for the one
//   clock in which signal_out has just become 1. load is combinational and
//   high in the clock at whose end a new half-period starts and half_period
//   is captured.
//
// From the reference design: a counter-based divider of the system clock
//   whose count comes from the measured input period, producing the output
//   signal and its edge pulse. This design's own choices: capturing the
//   count once per half-period, the start and stop behaviour.
module freq_divider
  import adpll_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,        // asynchronous, active low
  input  count_t half_period,  // next half-period length, 0 = stop
  output logic   load,         // half_period is captured this clock
  output logic   signal_out,   // divided output
  output logic   out_rise      // one-clock pulse, signal_out just rose
);

  logic   running_q;
  count_t cnt_q;
  count_t limit_q;
  logic   expire;

  assign expire = running_q && (cnt_q >= limit_q);
  assign load   = (half_period != '0) && (!running_q || expire);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running_q  <= 1'b0;
      cnt_q      <= '0;
      limit_q    <= '0;
      signal_out <= 1'b0;
      out_rise   <= 1'b0;
    end else begin
      out_rise <= 1'b0;
      if (half_period == '0) begin
        if (!running_q || expire) begin
          running_q  <= 1'b0;
          signal_out <= 1'b0;
          cnt_q      <= '0;
        end else begin
          cnt_q <= cnt_q + count_t'(1);
        end
      end else if (load) begin
        running_q  <= 1'b1;
        cnt_q      <= count_t'(1);
        limit_q    <= half_period;
        signal_out <= running_q ? ~signal_out : 1'b1;
        out_rise   <= running_q ? ~signal_out : 1'b1;
      end else begin
        cnt_q <= cnt_q + count_t'(1);
      end
    end
  end

endmodule
