// tb_adpll_acquire: acquisition time of the ADPLL against filter capacity.
//
// Default loop (DIVIDER = 5) on a 50 MHz clock with a 500 kHz input. For
// each filter capacity N in {1, 2, 4, 8} the loop is reset 8 times and the
// input is started after 3287 ns plus a random extra delay of up to one
// input period, so the output starts at a random phase. The initial phase
// error is at most half an output period (10 clocks), and each one-clock
// correction needs N input periods, so lock must come within
// (10 * N + 4) input periods of the input starting (4 periods for the
// first measurement and the pipeline). After locking, the loop must hold
// lock for 10 periods. The mean lock time per N is printed; it must not
// fall as N grows.
`timescale 1ns/1ps
module tb_adpll_acquire;
  import adpll_pkg::*;

  localparam realtime TCLK = 20ns;
  localparam realtime TIN  = 2000ns;

  logic clk = 1'b0;
  logic rst_n = 1'b1;   // pulsed low below, so the asynchronous reset sees an edge
  initial #1 rst_n = 1'b0;
  logic signal_in = 1'b0;
  logic run = 1'b0;
  realtime start_delay = 3287ns;
  filt_cap_t filter_n = filt_cap_t'(4);
  logic signal_out, sync_signal, in_edge, out_edge, lead, lag;
  logic pos_shift, neg_shift, lock;
  count_t period_count, divider_max;

  int checks = 0;
  int failures = 0;

  adpll_top dut (.*);

  always #(TCLK/2) clk = ~clk;

  // Input: starts start_delay after 'run' rises, stops when it falls.
  always begin
    wait (run);
    #(start_delay);
    while (run) begin
      signal_in = 1'b1;
      #(TIN/2);
      signal_in = 1'b0;
      #(TIN/2);
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    automatic int caps [4] = '{1, 2, 4, 8};
    automatic real mean_prev = 0.0;
    for (int c = 0; c < 4; c++) begin
      automatic real sum = 0.0;
      filter_n = filt_cap_t'(caps[c]);
      for (int trial = 0; trial < 8; trial++) begin
        realtime t0;
        int periods;
        bit locked;
        run = 1'b0;
        wait (signal_in == 1'b0);
        repeat (3) @(posedge clk);
        rst_n = 1'b0;
        repeat (3) @(posedge clk);
        rst_n = 1'b1;
        start_delay = 3287ns + $urandom_range(0, 99) * TCLK + 7ns;
        run = 1'b1;
        t0 = $realtime;
        locked = 1'b0;
        periods = 0;
        while (!locked && periods < 10 * caps[c] + 20) begin
          @(posedge clk);
          if (lock) locked = 1'b1;
          if (in_edge) periods++;
        end
        check(locked && periods <= 10 * caps[c] + 4, "lock within 10*N+4 input periods");
        sum += ($realtime - t0 - start_delay) / 1us;
        for (int p = 0; p < 10; p++) begin
          @(posedge signal_in);
          repeat (5) @(posedge clk);
          check(lock, "lock held");
        end
      end
      $display("N=%0d: mean lock time %0.1f us over 8 starts", caps[c], sum / 8.0);
      check(sum / 8.0 + 0.5 >= mean_prev, "lock time does not fall as N grows");
      mean_prev = sum / 8.0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
