// tb_rw_filter: self-checking testbench for the random walk loop filter.
//
// Drives random lead/lag pulses with a capacity N that changes now and
// then, and compares the filter's shift pulses and count, clock by clock,
// against a behavioural model of the 2N+1-state counter. A directed part
// checks that exactly N leads give one pos_shift, one clock after the N-th
// lead, and that alternating lead/lag (noise while locked) gives none.
module tb_rw_filter;
  import adpll_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b1;   // pulsed low below, so the asynchronous reset sees an edge
  initial #1 rst_n = 1'b0;
  logic inc = 1'b0, dec = 1'b0;
  filt_cap_t cap_n = filt_cap_t'(4);
  logic pos_shift, neg_shift;
  logic signed [FILT_W:0] count;

  int checks = 0;
  int failures = 0;
  int m_cnt = 0;
  logic m_pos = 1'b0, m_neg = 1'b0;
  int n_pos = 0, n_neg = 0;

  rw_filter dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t: count=%0d model=%0d pos=%b/%b neg=%b/%b",
               what, $time, count, m_cnt, pos_shift, m_pos, neg_shift, m_neg);
    end
  endtask

  // Reference model, updated on the same clock edge as the filter.
  always @(posedge clk) begin
    if (rst_n) begin
      automatic int n = (cap_n == 0) ? 1 : int'(cap_n);
      m_pos <= 1'b0;
      m_neg <= 1'b0;
      if (inc && !dec) begin
        if (m_cnt + 1 >= n) begin m_cnt <= 0; m_pos <= 1'b1; end
        else m_cnt <= m_cnt + 1;
      end else if (dec && !inc) begin
        if (m_cnt - 1 <= -n) begin m_cnt <= 0; m_neg <= 1'b1; end
        else m_cnt <= m_cnt - 1;
      end
    end
  end

  // Compare after every edge.
  always @(negedge clk) begin
    if (rst_n) begin
      check(pos_shift == m_pos, "pos_shift");
      check(neg_shift == m_neg, "neg_shift");
      check(int'(count) == m_cnt, "count");
      if (pos_shift) n_pos++;
      if (neg_shift) n_neg++;
    end
  end

  task automatic pulse(input bit i, input bit d);
    @(posedge clk) #1;
    inc = i; dec = d;
    @(posedge clk) #1;
    inc = 1'b0; dec = 1'b0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    // Directed: four leads with N = 4 give exactly one pos_shift.
    cap_n = filt_cap_t'(4);
    repeat (3) pulse(1, 0);
    check(n_pos == 0, "no early pos_shift");
    @(posedge clk) #1 inc = 1'b1;
    @(posedge clk) #1 inc = 1'b0;
    check(pos_shift == 1'b1, "pos_shift one clock after 4th lead");
    @(posedge clk) #1;
    check(n_pos == 1 && count == 0, "one pulse, counter reset");
    // Alternating lead/lag never gets through.
    repeat (40) begin pulse(1, 0); pulse(0, 1); end
    check(n_pos == 1 && n_neg == 0, "alternating pulses absorbed");
    // Four lags give one neg_shift.
    repeat (4) pulse(0, 1);
    @(posedge clk) #1;
    check(n_neg == 1, "neg_shift after 4 lags");
    // Random traffic with a varying N.
    for (int k = 0; k < 4000; k++) begin
      @(posedge clk) #1;
      if (k % 500 == 0) cap_n = filt_cap_t'($urandom_range(0, 9));
      inc = ($urandom_range(0, 2) == 0);
      dec = ($urandom_range(0, 2) == 0);
    end
    inc = 1'b0; dec = 1'b0;
    repeat (3) @(posedge clk);
    check(n_pos > 5 && n_neg > 5, "random run produced shifts both ways");
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
