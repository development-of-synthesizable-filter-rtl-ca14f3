// tb_phase_detector: self-checking testbench for the phase detector.
//
// The testbench steps through clock slots. In each input period it raises
// the input for HI slots out of 2*HI, and places a single output-rise pulse
// o clocks after (o > 0) or before (o < 0) the clock in which the
// synchronised input edge reaches the comparator, two clocks after the
// input changed. Expected, one clock after that: lead for o < 0, lag for
// o > 0, lock for o = 0, and no lead/lag pulse anywhere else. The measured
// high time and the divider count (high time / 5) are checked against the
// driven waveform, including a change of input frequency. The in_edge
// latency (two clocks from the input change) is checked for every edge.
module tb_phase_detector;
  import adpll_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b1;   // pulsed low below, so the asynchronous reset sees an edge
  initial #1 rst_n = 1'b0;
  logic signal_in = 1'b0;
  logic out_rise = 1'b0;
  logic sync_signal, in_edge, lead, lag, lock;
  count_t period_count, divider_max;

  int checks = 0;
  int failures = 0;
  int n_lead = 0, n_lag = 0, n_lock = 0;

  phase_detector dut (.*);   // default DIVIDER = 5

  always #10 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t: in_edge=%b lead=%b lag=%b lock=%b dmax=%0d", what, $time, in_edge, lead, lag, lock, divider_max);
    end
  endtask

  // One period of the input: low for 10 slots, high for HI slots, then low
  // again up to a length of 2*HI (at least HI+12). The synchronised edge
  // reaches the comparator in slot 12; the output pulse goes in slot
  // 12 + o, and o = 99 means no output pulse this period. With JUDGE set,
  // the outcome is checked after slot 12; without it, that slot is skipped.
  task automatic period(input int hi, input int o, input bit judge);
    automatic int len = (2 * hi > hi + 12) ? 2 * hi : hi + 12;
    for (int s = 0; s < len; s++) begin
      @(negedge clk);
      signal_in = (s >= 10) && (s < 10 + hi);
      out_rise  = (o != 99) && (s == 12 + o);
      @(posedge clk);
      #1;
      // State after this slot's edge.
      if (s == 11) check(in_edge == 1'b1, "in_edge two clocks after the input rose");
      else         check(in_edge == 1'b0, "no in_edge elsewhere");
      if (s == 12) begin
        if (judge) begin
          check(lead == (o < 0), "lead");
          check(lag  == (o > 0), "lag");
          check(lock == (o == 0), "lock");
          n_lead += int'(lead);
          n_lag  += int'(lag);
          n_lock += int'(lock);
        end
      end else begin
        check(!lead && !lag, "no lead/lag away from an input edge");
      end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    period(50, 99, 0);
    check(period_count == 50, "period_count 50");
    check(divider_max == 10, "divider_max 50/5");
    period(50, 99, 1);
    for (int k = 0; k < 40; k++) begin
      automatic int o = (k % 4 == 0) ? 0 : $urandom_range(0, 18) - 9;
      period(50, o, 1);
    end
    // Input frequency change: the counts follow at the next falling edge.
    period(30, 99, 0);
    check(period_count == 30, "period_count 30");
    check(divider_max == 6, "divider_max 30/5");
    for (int k = 0; k < 30; k++) begin
      automatic int o = (k % 3 == 0) ? 0 : $urandom_range(0, 10) - 5;
      period(30, o, 1);
    end
    // Too short to divide: the detector stops deciding and drops lock.
    period(4, 99, 0);
    period(4, 99, 0);
    check(divider_max == 0 && lock == 1'b0, "idle when high time < DIVIDER");
    check(n_lead > 5 && n_lag > 5 && n_lock > 5, "all three outcomes seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
