// tb_adpll_top: end-to-end test of the ADPLL at its default parameters.
//
// Setup: 50 MHz system clock, 500 kHz input with 50% duty that starts
// after a 3287 ns delay, filter capacity N = 4, multiplication factor 5.
// The test checks, in order:
//   - the measured half-period (50 clocks) and divider count (10 clocks);
//   - acquisition: lock is reached within 200 us of the input starting
//     (the time is printed);
//   - locked operation: exactly 5 output rising edges per input period,
//     output rising edges within 3 clocks of the input rising edge, lock
//     held, no shift requests;
//   - a phase step of the input 5 clocks earlier: the output now lags,
//     lag pulses and neg_shift requests follow and the loop relocks;
//   - a phase step 7 clocks later: lead pulses and pos_shift requests,
//     and relock;
//   - a random +/-1 clock jitter on the input edges for 60 periods: the
//     filter lets through far fewer shift requests than the detector
//     reports lead/lag pulses.
// Each mechanism (lead, lag, pos_shift, neg_shift, lock, relock, noise
// absorbed) is counted, and one that never happened is a failure.
`timescale 1ns/1ps
module tb_adpll_top;
  import adpll_pkg::*;

  localparam realtime TCLK   = 20ns;    // 50 MHz
  localparam realtime TIN    = 2000ns;  // 500 kHz
  localparam realtime TDELAY = 3287ns;

  logic clk = 1'b0;
  logic rst_n = 1'b1;   // pulsed low below, so the asynchronous reset sees an edge
  initial #1 rst_n = 1'b0;
  logic signal_in = 1'b0;
  filt_cap_t filter_n = filt_cap_t'(4);
  logic signal_out, sync_signal, in_edge, out_edge, lead, lag;
  logic pos_shift, neg_shift, lock;
  count_t period_count, divider_max;

  int checks = 0;
  int failures = 0;
  int n_lead = 0, n_lag = 0, n_pos = 0, n_neg = 0, n_lock_rise = 0;
  int n_relock = 0, n_noise_ok = 0;
  int out_rises = 0;
  realtime t_lock = 0;
  realtime t_in_edge = 0;
  realtime t_last_out = 0;
  realtime jitter = 0;       // stretch of the current low half-period

  adpll_top dut (.*);

  always #(TCLK/2) clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Input generator: square wave. The low half-period that is running
  // when 'jitter' is read (at the falling edge) is stretched by it, which
  // moves the next rising edge and all later ones.
  initial begin
    #(TDELAY);
    forever begin
      signal_in = 1'b1;
      #(TIN/2);
      signal_in = 1'b0;
      #(TIN/2 + jitter);
    end
  end

  // Event counters.
  logic lock_q = 1'b0;
  always @(posedge clk) begin
    n_lead += int'(lead);
    n_lag  += int'(lag);
    n_pos  += int'(pos_shift);
    n_neg  += int'(neg_shift);
    if (rst_n && lock && !lock_q) begin
      n_lock_rise++;
      if (t_lock == 0) t_lock = $realtime;
    end
    lock_q = lock;
    if (out_edge) begin
      out_rises++;
      t_last_out = $realtime;
    end
  end

  // Move the input phase by 'clocks' system clocks (negative: earlier) by
  // stretching or shortening one low half-period.
  task automatic phase_step(input int clocks);
    @(posedge signal_in);
    jitter = clocks * TCLK;
    @(posedge signal_in);
    jitter = 0;
  endtask

  task automatic wait_lock(input int max_periods, output bit ok);
    ok = 1'b0;
    for (int p = 0; p < max_periods; p++) begin
      @(posedge signal_in);
      if (lock) begin ok = 1'b1; break; end
    end
  endtask

  initial begin
    bit ok;
    int lead0, lag0, pos0, neg0, rises0;
    repeat (5) @(posedge clk);
    rst_n = 1'b1;

    // Acquisition.
    wait_lock(100, ok);
    check(ok, "initial lock");
    check(period_count == 50, "measured half-period 50 clocks");
    check(divider_max == 10, "divider count 10 clocks");
    $display("lock %0.1f us after the input started (reference run: 149 us)",
             (t_lock - TDELAY) / 1us);
    check(t_lock - TDELAY < 200us, "lock within 200 us");

    // Locked operation.
    repeat (2) @(posedge signal_in);
    repeat (4) @(posedge clk);
    lead0 = n_lead; lag0 = n_lag; pos0 = n_pos; neg0 = n_neg; rises0 = out_rises;
    for (int p = 0; p < 20; p++) begin
      @(posedge signal_in);
      repeat (4) @(posedge clk);
      check(lock, "lock held");
      check($realtime - t_last_out <= 4 * TCLK, "output edge aligned with input edge");
    end
    $display("%0d output edges in 20 input periods", out_rises - rises0);
    check(out_rises - rises0 == 100, "5 output edges per input period");
    check(n_lead == lead0 && n_lag == lag0 && n_pos == pos0 && n_neg == neg0,
          "no corrections while locked");

    // Input steps 5 clocks earlier: the output lags.
    lag0 = n_lag; neg0 = n_neg;
    phase_step(-5);
    wait_lock(100, ok);
    check(ok, "relock after early step");
    n_relock += int'(ok);
    check(n_lag - lag0 >= 20 && n_neg - neg0 >= 5, "lag pulses and neg shifts after early step");

    // Input steps 7 clocks later: the output leads.
    lead0 = n_lead; pos0 = n_pos;
    phase_step(7);
    wait_lock(100, ok);
    check(ok, "relock after late step");
    n_relock += int'(ok);
    check(n_lead - lead0 >= 28 && n_pos - pos0 >= 7, "lead pulses and pos shifts after late step");

    // Jitter: +/-1 clock on each input rising edge.
    lead0 = n_lead; lag0 = n_lag; pos0 = n_pos; neg0 = n_neg;
    // Each rising edge sits -1, 0 or +1 clock from its nominal place.
    begin
      int off, nxt;
      off = 0;
      for (int p = 0; p < 60; p++) begin
        @(posedge signal_in);
        nxt = int'($urandom_range(0, 2)) - 1;
        jitter = (nxt - off) * TCLK;
        off = nxt;
      end
      @(posedge signal_in);
      jitter = -off * TCLK;
      @(posedge signal_in);
      jitter = 0;
    end
    begin
      automatic int pd = (n_lead - lead0) + (n_lag - lag0);
      automatic int sh = (n_pos - pos0) + (n_neg - neg0);
      $display("jitter: %0d lead/lag pulses, %0d shift requests", pd, sh);
      check(pd > 10 && sh * 3 < pd, "filter absorbs most noise pulses");
      if (pd > 10 && sh * 3 < pd) n_noise_ok++;
    end
    wait_lock(100, ok);
    check(ok, "lock after jitter");

    // Every mechanism must have happened.
    check(n_lead > 0, "lead seen");
    check(n_lag > 0, "lag seen");
    check(n_pos > 0, "pos_shift seen");
    check(n_neg > 0, "neg_shift seen");
    check(n_lock_rise > 0, "lock seen");
    check(n_relock == 2, "relock seen twice");
    check(n_noise_ok == 1, "noise absorption seen");
    $display("events: lead=%0d lag=%0d pos_shift=%0d neg_shift=%0d lock_rises=%0d",
             n_lead, n_lag, n_pos, n_neg, n_lock_rise);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
