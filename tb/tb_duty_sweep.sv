// tb_duty_sweep: runs the supply logic through its two bench workloads, at default
// parameters and in open loop.
//  1. Pulse-generation settings: Q1 5 us / duty 150, Q2 100 us / duty 5. The gate timing
//     is checked in clocks.
//  2. The duty-cycle sweep used to measure the duty-to-voltage curve: Q1 1 us,
//     Q2 50 us / duty 10, Q1 duty stepped through 1, 30, 75, 135, 200, 300, 400, 600, 800,
//     1200, 1800, 3000 and 7000. The plant follows the fit for these conditions,
//     V = 1e5 / (15.783 + 0.0295 D) mV. At each point the test waits two Q1 periods and
//     one fresh average, then checks several things. The averaged current must equal the
//     plant's current within one code. The gate period must match the duty. The readings
//     must fall as the duty rises. The serial link must keep delivering averages.
module tb_duty_sweep;
  import plating_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic run = 1'b0, closed_loop = 1'b0;
  mv_t v_set_mv = '0, v_meas_mv;
  duty_t q1_duty_manual = 16'd150, q2_duty = 16'd5, q1_duty;
  us_t q1_width_us = 16'd5, q2_width_us = 16'd100;
  logic q1_gate, q2_gate, ad_clk, ad_pdwn, ad_otr, txd, locked, avg_valid, adc_over_range;
  adc_code_t ad_data, avg_current;
  logic [15:0] n_adjust_up, n_adjust_down, n_lock, n_sent;
  int checks = 0, failures = 0;

  always #10 clk = ~clk;

  plating_supply_top dut (.*);

  // gate monitors: high time and period of the last complete pulse, in clocks
  longint q1_hi = 0, q1_per = 0, q2_hi = 0, q2_per = 0;
  longint q1_hi_c = 0, q1_per_c = 0, q2_hi_c = 0, q2_per_c = 0;
  logic q1_prev = 0, q2_prev = 0;
  always @(posedge clk) begin
    q1_prev <= q1_gate; q2_prev <= q2_gate;
    q1_per_c <= q1_per_c + 1; if (q1_gate) q1_hi_c <= q1_hi_c + 1;
    q2_per_c <= q2_per_c + 1; if (q2_gate) q2_hi_c <= q2_hi_c + 1;
    if (q1_gate && !q1_prev) begin
      q1_hi <= q1_hi_c; q1_per <= q1_per_c; q1_per_c <= 1; q1_hi_c <= 1;
    end
    if (q2_gate && !q2_prev) begin
      q2_hi <= q2_hi_c; q2_per <= q2_per_c; q2_per_c <= 1; q2_hi_c <= 1;
    end
  end
  // duty 1 keeps the gate high with no edges: a high run longer than two pulse widths
  // means duty 1
  longint q1_run = 0;
  always @(posedge clk) q1_run <= q1_gate ? q1_run + 1 : 0;
  duty_t q1_meas, q2_meas;
  assign q1_meas = (q1_hi == 0 || q1_run > 2 * 50 * longint'(q1_width_us)) ? 16'd1
                 : duty_t'(q1_per / q1_hi);
  assign q2_meas = (q2_hi == 0) ? 16'd1 : duty_t'(q2_per / q2_hi);

  real v, i;
  plating_plant_model #(.A(15.783), .B(0.0295)) plant (.q1_duty(q1_meas), .q2_duty(q2_meas), .v_mv(v), .i_ma(i));
  ad9215_model adc (.clk(ad_clk), .pdwn(ad_pdwn), .vin(i), .d(ad_data), .otr(ad_otr));

  logic rx_valid, rx_ferr;
  logic [7:0] rx_data;
  longint rx_start;
  int n_rx = 0;
  uart_rx_model #(.BIT_CYC(5208)) rx (.clk, .en(rst_n), .rxd(txd), .valid(rx_valid),
                                      .data(rx_data), .frame_err(rx_ferr), .start_cycle(rx_start));
  always @(posedge clk) if (rx_valid && !rx_ferr) n_rx++;

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask
  task automatic check_true(input string what, input bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (20_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int duties [13] = '{1, 30, 75, 135, 200, 300, 400, 600, 800, 1200, 1800, 3000, 7000};
  int code_exp, last_avg, rx_before;

  initial begin
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    run = 1'b1;

    // 1. pulse-generation settings
    repeat (2 * 37_500 + 100) @(posedge clk);
    check("Q1 5 us high time", q1_hi, 5 * 50);
    check("Q1 duty 150 period", q1_per, 5 * 50 * 150);
    check("Q2 100 us high time", q2_hi, 100 * 50);
    check("Q2 duty 5 period", q2_per, 100 * 50 * 5);

    // 2. duty-cycle sweep
    q1_width_us = 16'd1; q2_width_us = 16'd50; q2_duty = 16'd10;
    last_avg = 1024;
    foreach (duties[k]) begin
      q1_duty_manual = duty_t'(duties[k]);
      rx_before = n_rx;
      // two Q1 periods (the first may still run the previous setting), then a fresh average
      repeat (2 * 50 * duties[k] + 2 * 37_500) @(posedge clk);
      @(posedge avg_valid); @(posedge avg_valid); @(negedge clk);
      check("gate duty follows setting", q1_meas, duties[k]);
      code_exp = int'(i / 0.125);
      check_true($sformatf("duty %0d: average %0d vs plant %0d", duties[k], avg_current, code_exp),
                 int'(avg_current) >= code_exp - 1 && int'(avg_current) <= code_exp + 1);
      check_true($sformatf("duty %0d: reading falls with duty", duties[k]),
                 int'(avg_current) <= last_avg);
      $display("duty %5d: plant %7.1f mV, %6.2f mA mean, average code %0d",
               duties[k], v, i, avg_current);
      last_avg = avg_current;
    end
    check_true("serial reports during the sweep", n_rx >= 20);
    check("no over-range", adc_over_range, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
