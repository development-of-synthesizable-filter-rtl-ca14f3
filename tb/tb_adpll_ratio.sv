// tb_adpll_ratio: the ADPLL at several multiplication factors.
//
// One 500 kHz input (50% duty, starting after 3287 ns) drives three
// copies of the loop on a 50 MHz clock, built with DIVIDER = 1, 4 and 20.
// The divider count is the integer quotient of the 50-clock half-period:
// 50, 12 and 2. Checks:
//   - DIVIDER = 1: 1:1 output, locks, one output edge per input period,
//     no corrections once locked;
//   - DIVIDER = 20: half-period 2 clocks, so the output period is 4 clocks
//     and 25 output edges fall in each 100-clock input period (the integer
//     quotient rounds 2.5 down); it locks and stays locked;
//   - DIVIDER = 4: half-period 12 clocks, output period 24 clocks against
//     an ideal 25, so the output gains 4 clocks per input period. The loop
//     corrects phase only, one clock per N input periods, so it cannot
//     hold this: the output slips through whole cycles and the detector
//     reports both lead and lag. The output edge count over 24 input
//     periods lies between the ideal 96 and the uncorrected 100.
`timescale 1ns/1ps
module tb_adpll_ratio;
  import adpll_pkg::*;

  localparam realtime TCLK   = 20ns;
  localparam realtime TIN    = 2000ns;
  localparam realtime TDELAY = 3287ns;

  logic clk = 1'b0;
  logic rst_n = 1'b1;   // pulsed low below, so the asynchronous reset sees an edge
  initial #1 rst_n = 1'b0;
  logic signal_in = 1'b0;
  filt_cap_t filter_n = filt_cap_t'(4);

  logic [2:0] signal_out, sync_signal, in_edge, out_edge, lead, lag;
  logic [2:0] pos_shift, neg_shift, lock;
  count_t period_count [3];
  count_t divider_max [3];

  int checks = 0;
  int failures = 0;
  int rises [3] = '{0, 0, 0};
  int leads [3] = '{0, 0, 0};
  int lags  [3] = '{0, 0, 0};
  int poss  [3] = '{0, 0, 0};
  int negs  [3] = '{0, 0, 0};

  adpll_top #(.DIVIDER(1)) u_x1 (
    .clk, .rst_n, .signal_in, .filter_n,
    .signal_out(signal_out[0]), .sync_signal(sync_signal[0]), .in_edge(in_edge[0]),
    .out_edge(out_edge[0]), .lead(lead[0]), .lag(lag[0]), .pos_shift(pos_shift[0]),
    .neg_shift(neg_shift[0]), .lock(lock[0]), .period_count(period_count[0]),
    .divider_max(divider_max[0]));
  adpll_top #(.DIVIDER(4)) u_x4 (
    .clk, .rst_n, .signal_in, .filter_n,
    .signal_out(signal_out[1]), .sync_signal(sync_signal[1]), .in_edge(in_edge[1]),
    .out_edge(out_edge[1]), .lead(lead[1]), .lag(lag[1]), .pos_shift(pos_shift[1]),
    .neg_shift(neg_shift[1]), .lock(lock[1]), .period_count(period_count[1]),
    .divider_max(divider_max[1]));
  adpll_top #(.DIVIDER(20)) u_x20 (
    .clk, .rst_n, .signal_in, .filter_n,
    .signal_out(signal_out[2]), .sync_signal(sync_signal[2]), .in_edge(in_edge[2]),
    .out_edge(out_edge[2]), .lead(lead[2]), .lag(lag[2]), .pos_shift(pos_shift[2]),
    .neg_shift(neg_shift[2]), .lock(lock[2]), .period_count(period_count[2]),
    .divider_max(divider_max[2]));

  always #(TCLK/2) clk = ~clk;

  initial begin
    #(TDELAY);
    forever begin
      signal_in = 1'b1;
      #(TIN/2);
      signal_in = 1'b0;
      #(TIN/2);
    end
  end

  always @(posedge clk) begin
    for (int i = 0; i < 3; i++) begin
      rises[i] += int'(out_edge[i]);
      leads[i] += int'(lead[i]);
      lags[i]  += int'(lag[i]);
      poss[i]  += int'(pos_shift[i]);
      negs[i]  += int'(neg_shift[i]);
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
    int r0 [3];
    int l0 [3];
    int p0 [3];
    int n0 [3];
    int g0 [3];
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    // 260 input periods: at one clock of correction per N = 4 periods, even
    // the x1 loop (up to 50 clocks of initial error) has locked by then.
    repeat (260) @(posedge signal_in);
    check(period_count[0] == 50 && period_count[1] == 50 && period_count[2] == 50,
          "half-period 50 clocks");
    check(divider_max[0] == 50, "x1 divider count 50");
    check(divider_max[1] == 12, "x4 divider count 12");
    check(divider_max[2] == 2,  "x20 divider count 2");
    check(lock[0], "x1 locked");
    check(lock[2], "x20 locked");
    repeat (4) @(posedge clk);
    r0 = rises; l0 = leads; g0 = lags; p0 = poss; n0 = negs;
    for (int p = 0; p < 24; p++) begin
      @(posedge signal_in);
      repeat (4) @(posedge clk);
      check(lock[0], "x1 stays locked");
      check(lock[2], "x20 stays locked");
    end
    $display("output edges in 24 input periods: x1 %0d, x4 %0d, x20 %0d",
             rises[0] - r0[0], rises[1] - r0[1], rises[2] - r0[2]);
    $display("x4 over 24 periods: %0d lead, %0d lag, %0d pos_shift, %0d neg_shift",
             leads[1] - l0[1], lags[1] - g0[1], poss[1] - p0[1], negs[1] - n0[1]);
    check(rises[0] - r0[0] == 24, "x1: one output edge per input period");
    check(rises[2] - r0[2] == 600, "x20: 25 output edges per input period");
    check(rises[1] - r0[1] >= 96 && rises[1] - r0[1] <= 100, "x4: 96..100 output edges");
    check(leads[1] - l0[1] > 0 && lags[1] - g0[1] > 0, "x4: output slips, both lead and lag seen");
    check(poss[0] == p0[0] && negs[0] == n0[0], "x1: no corrections while locked");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (80000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
