// tb_current_averager: self-checking testbench for current_averager with the default
// 300-sample window. Random 10-bit samples are fed every other clock; every average and
// window sum is compared with a reference computed here. Also checks the latency from the
// 300th sample to avg_valid (SUM_W + 2 = 21 cycles), that clear drops a partial window,
// and that clear during the division discards that result.
module tb_current_averager;
  import plating_pkg::*;
  localparam int unsigned N = 300;
  localparam int unsigned SUM_W = ADC_W + $clog2(N);
  logic clk = 1'b0, rst_n = 1'b0, clear = 1'b0, sample_valid = 1'b0;
  adc_code_t sample, avg;
  logic avg_valid;
  logic [SUM_W-1:0] avg_sum;
  int checks = 0, failures = 0;
  longint cyc = 0;

  always #10 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  current_averager #(.N(N)) dut (.*);

  initial begin
    repeat (100_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // Feed n samples (every other clock); returns their sum and the cycle of the last one.
  task automatic feed(input int n, input int base, input int spread, output longint sum,
                      output longint t_last);
    sum = 0;
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      sample = adc_code_t'(base + ($urandom % spread));
      sum += sample;
      sample_valid = 1'b1;
      @(negedge clk);
      t_last = cyc;
      sample_valid = 1'b0;
    end
  endtask

  int n_valid = 0;
  always @(posedge clk) if (avg_valid) n_valid++;

  longint s, tl, tv;

  initial begin
    sample = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // three full windows with different statistics, including the ~818 of a typical reading
    for (int w = 0; w < 3; w++) begin
      feed(N, (w == 0) ? 810 : (w == 1) ? 0 : 500, (w == 0) ? 16 : (w == 1) ? 1024 : 3, s, tl);
      while (!avg_valid) @(negedge clk);
      tv = cyc;
      check("average", avg, s / N);
      check("window sum", avg_sum, s);
      check("latency after last sample", tv - tl, SUM_W + 2);
    end
    // clear in the middle of a window: the first 100 samples must not count
    feed(100, 1000, 20, s, tl);
    @(negedge clk); clear = 1'b1; @(negedge clk); clear = 1'b0;
    feed(N, 100, 50, s, tl);
    while (!avg_valid) @(negedge clk);
    check("average after clear", avg, s / N);
    check("sum after clear", avg_sum, s);
    // clear while the division runs: that result is dropped
    @(negedge clk);
    n_valid = 0;
    feed(N, 300, 10, s, tl);
    repeat (5) @(negedge clk);
    clear = 1'b1; @(negedge clk); clear = 1'b0;
    repeat (50) @(negedge clk);
    check("result discarded by clear", n_valid, 0);
    feed(N, 700, 10, s, tl);
    while (!avg_valid) @(negedge clk);
    check("next window after discard", avg, s / N);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
