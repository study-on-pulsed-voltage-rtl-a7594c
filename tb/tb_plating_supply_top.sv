// tb_plating_supply_top: end-to-end testbench of the supply logic at its default
// parameters (50 MHz, 300-sample averages, 1 ms settling, 9600 baud).
// Around the top sit a behavioural AD9215 and a steady-state power-stage model whose duty
// cycles are measured from the Q1 and Q2 gate signals themselves (period / high time), so
// the loop runs through the real pulse generators. The scenario:
//   1. open loop: Q1 duty 400 from the port; gate timing, averaged current and serial
//      reports are checked;
//   2. closed loop at 3000 mV with a plant below the starting curve: the loop must lower
//      the duty cycle and lock with the plant voltage inside the band;
//   3. a new set point of 4000 mV with a plant above the curve: the loop must raise it;
//   4. an over-range current: the over-range flag must rise;
//   5. run low: gates off, ADC powered down.
// Each mechanism (open-loop mode, closed-loop lock, step down, step up, set-point restart,
// serial report, over-range) is counted, and one that never happens is a failure.
module tb_plating_supply_top;
  import plating_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic run = 1'b0, closed_loop = 1'b0;
  mv_t v_set_mv = '0, v_meas_mv;
  duty_t q1_duty_manual = 16'd400, q2_duty = 16'd10, q1_duty;
  us_t q1_width_us = 16'd1, q2_width_us = 16'd50;
  logic q1_gate, q2_gate, ad_clk, ad_pdwn, ad_otr, txd, locked, avg_valid, adc_over_range;
  adc_code_t ad_data, avg_current;
  logic [15:0] n_adjust_up, n_adjust_down, n_lock, n_sent;
  int checks = 0, failures = 0;
  longint cyc = 0;

  always #10 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  plating_supply_top dut (.*);

  // ---- gate monitors: duty cycle value = period / high time -----------------------
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
  duty_t q1_meas, q2_meas;
  assign q1_meas = (q1_hi == 0) ? 16'd0 : duty_t'(q1_per / q1_hi);
  assign q2_meas = (q2_hi == 0) ? 16'd1 : duty_t'(q2_per / q2_hi);

  // ---- power stage and ADC -------------------------------------------------------
  real v1, i1, v2, i2;
  plating_plant_model #(.A(15.286), .B(0.0897)) p1 (.q1_duty(q1_meas), .q2_duty(q2_meas), .v_mv(v1), .i_ma(i1));
  plating_plant_model #(.A(15.225), .B(0.0116)) p2 (.q1_duty(q1_meas), .q2_duty(q2_meas), .v_mv(v2), .i_ma(i2));
  int plant = 1;
  real extra_ma = 0.0;
  real vin;
  always_comb vin = ((plant == 1) ? i1 : i2) + extra_ma;
  ad9215_model adc (.clk(ad_clk), .pdwn(ad_pdwn), .vin, .d(ad_data), .otr(ad_otr));

  function automatic real plant_v();
    return (plant == 1) ? v1 : v2;
  endfunction

  // ---- serial port -----------------------------------------------------------------
  logic rx_valid, rx_ferr;
  logic [7:0] rx_data;
  longint rx_start;
  uart_rx_model #(.BIT_CYC(5208)) rx (.clk, .en(rst_n), .rxd(txd), .valid(rx_valid),
                                      .data(rx_data), .frame_err(rx_ferr), .start_cycle(rx_start));
  bit seen_avg [1024];
  logic [7:0] hi_byte;
  bit have_hi = 0;
  int n_pairs_ok = 0;
  always @(posedge clk) if (avg_valid) seen_avg[avg_current] = 1;

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

  always @(posedge clk) if (rx_valid) begin
    if (!have_hi) begin
      hi_byte = rx_data; have_hi = 1;
    end else begin
      have_hi = 0;
      check("serial high byte has 6 zero bits", hi_byte[7:2], 0);
      check_true("serial value is a produced average", seen_avg[{hi_byte[1:0], rx_data}]);
      n_pairs_ok++;
    end
  end

  // ---- watchdog ---------------------------------------------------------------------
  initial begin
    repeat (6_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters
  int m_open = 0, m_lock = 0, m_down = 0, m_up = 0, m_restart = 0, m_serial = 0, m_otr = 0;

  // Wait until sig equals level, at most limit clocks; a timeout counts as a failure.
  task automatic wait_level(ref logic sig, input logic level, input longint limit,
                            input string what);
    while (sig !== level && limit > 0) begin
      @(posedge clk);
      limit--;
    end
    check_true(what, sig === level);
  endtask

  int code_exp;
  int u0, d0;

  initial begin
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    repeat (5) @(posedge clk);

    // 1. open loop
    run = 1'b1;
    repeat (100_000) @(posedge clk);
    check("open loop: Q1 high time (cycles)", q1_hi, 50);
    check("open loop: Q1 period (cycles)", q1_per, 400 * 50);
    check("open loop: Q2 high time (cycles)", q2_hi, 50 * 50);
    check("open loop: Q2 period (cycles)", q2_per, 50 * 50 * 10);
    check("open loop: status duty", q1_duty, 400);
    @(posedge avg_valid); @(negedge clk);
    code_exp = int'(i1 / 0.125);
    check_true("open loop: averaged current matches plant",
               avg_current >= adc_code_t'(code_exp - 1) && avg_current <= adc_code_t'(code_exp + 1));
    check("open loop: ADC running", ad_pdwn, 0);
    m_open++;

    // 2. closed loop, plant below the starting curve
    closed_loop = 1'b1;
    v_set_mv = 13'd3000;
    wait_level(locked, 1'b1, 1_500_000, "closed loop 3000 mV: locks");
    @(negedge clk);
    check_true("closed loop 3000 mV: plant inside band", plant_v() > 2910.0 && plant_v() < 3090.0);
    check_true("closed loop 3000 mV: stepped down", n_adjust_down > 0);
    check("gate duty equals regulator duty", q1_meas, q1_duty);
    $display("3000 mV: duty %0d, plant %0.1f mV, reported %0d mV, steps down %0d",
             q1_duty, plant_v(), v_meas_mv, n_adjust_down);
    if (n_adjust_down > 0) m_down++;
    if (locked) m_lock++;

    // 3. new set point, plant above the starting curve
    u0 = n_adjust_up; d0 = n_lock;
    plant = 2;
    v_set_mv = 13'd4000;
    wait_level(locked, 1'b0, 100, "new set point: lock released");
    if (!locked) m_restart++;
    wait_level(locked, 1'b1, 1_500_000, "closed loop 4000 mV: locks");
    @(negedge clk);
    check_true("closed loop 4000 mV: plant inside band", plant_v() > 3910.0 && plant_v() < 4090.0);
    check_true("closed loop 4000 mV: stepped up", n_adjust_up > u0);
    check_true("lock counted twice", n_lock >= d0 + 1);
    $display("4000 mV: duty %0d, plant %0.1f mV, reported %0d mV, steps up %0d",
             q1_duty, plant_v(), v_meas_mv, n_adjust_up);
    if (n_adjust_up > u0) m_up++;
    if (n_lock >= 2) m_lock++;

    // 4. over-range
    check("no over-range yet", adc_over_range, 0);
    extra_ma = 200.0;
    repeat (200) @(posedge clk);
    check("over-range flagged", adc_over_range, 1);
    if (adc_over_range) m_otr++;
    extra_ma = 0.0;

    // serial reports made it across
    if (n_pairs_ok < 2) repeat (300_000) @(posedge clk);
    check_true("serial reports received", n_pairs_ok >= 2);
    check_true("serial count matches", n_sent >= 16'(n_pairs_ok));
    if (n_pairs_ok > 0) m_serial++;

    // 5. stop
    @(negedge clk);
    run = 1'b0;
    repeat (3) @(negedge clk);
    check("stopped: Q1 off", q1_gate, 0);
    check("stopped: Q2 off", q2_gate, 0);
    check("stopped: ADC powered down", ad_pdwn, 1);
    check("stopped: not locked", locked, 0);

    $display("mechanisms: open-loop %0d, lock %0d, step down %0d, step up %0d, restart %0d, serial %0d, over-range %0d",
             m_open, m_lock, m_down, m_up, m_restart, m_serial, m_otr);
    check_true("open-loop mode exercised", m_open > 0);
    check_true("lock exercised", m_lock > 0);
    check_true("step down exercised", m_down > 0);
    check_true("step up exercised", m_up > 0);
    check_true("set-point restart exercised", m_restart > 0);
    check_true("serial report exercised", m_serial > 0);
    check_true("over-range exercised", m_otr > 0);
    $display("simulated %0d cycles", cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
