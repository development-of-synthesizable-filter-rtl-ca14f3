// tb_phase_controller: self-checking testbench for the phase controller.
//
// A directed part checks that one pos_shift lengthens exactly one
// half-period by one clock and one neg_shift shortens exactly one, and
// that the correction is used up only at a load. A random part drives
// shift pulses, loads and divider counts (including 0, 1 and the maximum)
// and compares half_period and the pending count against a model every
// clock.
module tb_phase_controller;
  import adpll_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b1;   // pulsed low below, so the asynchronous reset sees an edge
  initial #1 rst_n = 1'b0;
  logic pos_shift = 1'b0, neg_shift = 1'b0, load = 1'b0;
  count_t divider_max = count_t'(10);
  count_t half_period;
  logic signed [CORR_W-1:0] pending;

  int checks = 0;
  int failures = 0;
  int m_pend = 0;
  localparam int PMAX = (1 << (CORR_W-1)) - 1;

  phase_controller dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t: hp=%0d pend=%0d model=%0d dmax=%0d",
               what, $time, half_period, pending, m_pend, divider_max);
    end
  endtask

  function automatic int model_hp(int dm, int pend);
    if (dm == 0) return 0;
    if (pend > 0) return (dm == 255) ? 255 : dm + 1;
    if (pend < 0) return (dm == 1) ? 1 : dm - 1;
    return dm;
  endfunction

  // Model and comparison, just before each rising edge.
  always @(posedge clk) begin
    if (rst_n) begin
      automatic int step = (m_pend > 0) ? 1 : (m_pend < 0) ? -1 : 0;
      automatic int nxt = m_pend + int'(pos_shift) - int'(neg_shift) - (load ? step : 0);
      check(int'(half_period) == model_hp(int'(divider_max), m_pend), "half_period");
      check(int'(pending) == m_pend, "pending");
      if (nxt > PMAX) nxt = PMAX;
      if (nxt < -PMAX) nxt = -PMAX;
      m_pend = nxt;
    end
  end

  task automatic tick(input bit p, input bit n, input bit l);
    @(negedge clk);
    pos_shift = p; neg_shift = n; load = l;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    tick(0, 0, 1);
    @(negedge clk) check(half_period == 10, "nominal half-period");
    tick(1, 0, 0);
    tick(0, 0, 0);
    @(negedge clk) check(half_period == 11, "delayed after pos_shift");
    tick(0, 0, 0);
    @(negedge clk) check(half_period == 11, "held until load");
    tick(0, 0, 1);
    tick(0, 0, 0);
    @(negedge clk) check(half_period == 10, "used up by one load");
    tick(0, 1, 0);
    tick(0, 0, 0);
    @(negedge clk) check(half_period == 9, "advanced after neg_shift");
    tick(0, 0, 1);
    tick(0, 0, 0);
    @(negedge clk) check(half_period == 10 && pending == 0, "back to nominal");
    for (int k = 0; k < 5000; k++) begin
      @(negedge clk);
      pos_shift = ($urandom_range(0, 3) == 0);
      neg_shift = ($urandom_range(0, 4) == 0);
      load      = ($urandom_range(0, 5) == 0);
      if (k % 97 == 0) begin
        case ($urandom_range(0, 4))
          0: divider_max = '0;
          1: divider_max = count_t'(1);
          2: divider_max = '1;
          default: divider_max = count_t'($urandom_range(2, 60));
        endcase
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
