// tb_pulse_gen: self-checking testbench for pulse_gen at the default 50 clocks per us.
// Checks pulse high time and period (in clock cycles) for the Q1 and Q2 settings of the
// supply's pulse simulation (5 us / duty 150 and 100 us / duty 5), for duty 1 (always on),
// that a new setting only takes effect at the next period start, and that enable low
// stops the output.
module tb_pulse_gen;
  import plating_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, enable = 1'b0;
  pulse_cfg_t cfg, active;
  logic pulse, pstart;
  int checks = 0, failures = 0;

  always #10 clk = ~clk;   // 50 MHz

  pulse_gen dut (.clk, .rst_n, .enable, .cfg, .pulse, .period_start(pstart), .active_cfg(active));

  // Watchdog
  initial begin
    repeat (2_000_000) @(posedge clk);
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

  // Edge-based measurement: cycles from a rising edge to the falling edge and to
  // the next rising edge.
  task automatic edges(output longint hi, output longint per);
    logic prev;
    hi = 0; per = 0;
    prev = pulse;
    // wait for rising edge
    forever begin
      @(posedge clk);
      if (pulse && !prev) break;
      prev = pulse;
    end
    prev = 1'b1;
    forever begin
      @(posedge clk);
      per++;
      if (prev && !pulse) hi = per;
      if (!prev && pulse) break;
      prev = pulse;
    end
  endtask

  longint hi, per;
  int n_on;

  initial begin
    cfg = '{width_us: 16'd5, duty: 16'd150};
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    check("idle output low", pulse, 0);
    enable = 1'b1;
    // Q1 of the pulse simulation: 5 us pulse, duty 150 -> 250 cycles high, 37500 period
    for (int k = 0; k < 2; k++) begin
      edges(hi, per);
      check("Q1 high cycles", hi, 5 * 50);
      check("Q1 period cycles", per, 5 * 50 * 150);
    end
    // Q2 of the pulse simulation: 100 us, duty 5. Set mid-period: must not change the
    // running period.
    @(negedge clk);
    cfg = '{width_us: 16'd100, duty: 16'd5};
    check("setting held until period start", active.duty, 150);
    @(posedge pstart);
    @(negedge clk);
    check("new width taken at period start", active.width_us, 100);
    for (int k = 0; k < 2; k++) begin
      edges(hi, per);
      check("Q2 high cycles", hi, 100 * 50);
      check("Q2 period cycles", per, 100 * 50 * 5);
    end
    // duty 1: switch always on
    cfg = '{width_us: 16'd1, duty: 16'd1};
    @(posedge pstart);
    n_on = 0;
    repeat (400) begin
      @(posedge clk);
      if (pulse) n_on++;
    end
    check("duty 1 always on", n_on, 400);
    // duty 7 with width 1 us: 50 high, 350 period
    cfg = '{width_us: 16'd1, duty: 16'd7};
    @(posedge pstart);
    edges(hi, per);
    check("1us/7 high", hi, 50);
    check("1us/7 period", per, 350);
    // disable
    @(negedge clk);
    enable = 1'b0;
    @(posedge clk);          // registered output: one cycle to respond
    n_on = 0;
    repeat (1000) begin
      @(posedge clk);
      if (pulse) n_on++;
    end
    check("disabled output low", n_on, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
