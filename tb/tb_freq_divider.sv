// tb_freq_divider: self-checking testbench for the programmable divider.
//
// Holds half_period at a sequence of values (including 1, the maximum and
// changes mid-run) and measures, in clocks, how long signal_out stays in
// each level. Each level must last exactly the half_period value that was
// offered at the load pulse that started it; out_rise must mark every
// rising edge and nothing else; with half_period 0 the output must stop
// low.
module tb_freq_divider;
  import adpll_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b1;   // pulsed low below, so the asynchronous reset sees an edge
  initial #1 rst_n = 1'b0;
  count_t half_period = '0;
  logic load, signal_out, out_rise;

  int checks = 0;
  int failures = 0;
  int run_len = 0;
  int expect_len = 0;
  int cur_len = 0;     // half_period captured when the current level began
  int levels = 0;
  logic prev_out = 1'b0;

  freq_divider dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t (run=%0d expect=%0d)", what, $time, run_len, cur_len);
    end
  endtask

  // Sample just before each rising edge: the output level of this clock,
  // and whether the divider captures a new half-period now.
  always @(posedge clk) begin
    if (rst_n) begin
      check(out_rise == (signal_out && !prev_out), "out_rise marks rising edges");
      if (signal_out != prev_out) begin
        if (cur_len != 0) begin
          check(run_len == cur_len, "level length");
          levels++;
        end
        cur_len = expect_len;
        run_len = 1;
      end else begin
        run_len++;
      end
      prev_out = signal_out;
      if (load) expect_len = int'(half_period);
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    repeat (10) @(posedge clk);
    check(signal_out == 1'b0, "idle low with half_period 0");
    half_period = count_t'(10);
    repeat (200) @(posedge clk);
    half_period = count_t'(1);
    repeat (50) @(posedge clk);
    half_period = count_t'(255);
    repeat (1200) @(posedge clk);
    for (int k = 0; k < 300; k++) begin
      @(negedge clk);
      half_period = count_t'($urandom_range(1, 12));
    end
    @(negedge clk) half_period = '0;
    repeat (40) @(posedge clk);
    check(signal_out == 1'b0, "stopped low with half_period 0");
    check(levels > 50, "enough levels measured");
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
