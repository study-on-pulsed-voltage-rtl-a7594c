// tb_voltage_regulator: self-checking testbench for voltage_regulator at its default
// parameters. The power stage is the steady-state model plating_plant_model; the current
// averager is modelled here: after each avg_clear it returns, 300 us later, a window sum of
// 300 identical ADC codes of the plant's mean current (0.125 mA per code, Q2 duty 10).
// Checks: the starting duty cycle against the inverted curve worked out here; immediate
// lock when the plant matches the curve; adjustment downwards and upwards, and lock within
// the band, when the plant follows other fitted curves; the reported voltage against the
// linear current-voltage relation worked out here; restart on a new set point; the
// clamps for 0 mV and 7 V; and the loop timing (wait for the gate to run the new duty,
// then one settle period plus one averaging window per step).
module tb_voltage_regulator;
  import plating_pkg::*;
  localparam int unsigned N = 300;
  localparam int unsigned SUM_W = ADC_W + $clog2(N);
  localparam int unsigned SETTLE = 50_000;
  localparam int unsigned WINDOW = N * 50 + 21;

  logic clk = 1'b0, rst_n = 1'b0, enable = 1'b0;
  mv_t v_set_mv, v_meas_mv;
  duty_t q2_duty, q1_duty;
  logic avg_clear, avg_valid = 1'b0, duty_update, locked;
  logic [SUM_W-1:0] avg_sum;
  logic [15:0] n_up, n_down, n_lock;
  int checks = 0, failures = 0;
  longint cyc = 0;

  always #10 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  // The Q1 pulse generator takes a new duty at its next period start: modelled as a
  // fixed delay of APPLY_DELAY clocks.
  localparam int unsigned APPLY_DELAY = 1000;
  duty_t q1_applied = 16'd65535;   // the regulator's reset duty
  always @(posedge clk) if (duty_update) begin
    repeat (APPLY_DELAY) @(posedge clk);
    q1_applied <= q1_duty;
  end

  voltage_regulator dut (.*);

  // Three plants: the curve the regulator starts from (Q1 50 us, Q2 duty 10), and the
  // curves measured with a 1 us Q1 pulse and Q2 duty 5 and 2.
  real v0, i0, v1, i1, v2, i2;
  duty_t q2 = 16'd10;
  plating_plant_model #(.A(16.155), .B(0.0318)) p0 (.q1_duty, .q2_duty(q2), .v_mv(v0), .i_ma(i0));
  plating_plant_model #(.A(15.286), .B(0.0897)) p1 (.q1_duty, .q2_duty(q2), .v_mv(v1), .i_ma(i1));
  plating_plant_model #(.A(15.225), .B(0.0116)) p2 (.q1_duty, .q2_duty(q2), .v_mv(v2), .i_ma(i2));
  int plant = 0;

  function automatic real plant_v();
    return (plant == 0) ? v0 : (plant == 1) ? v1 : v2;
  endfunction
  function automatic int plant_code();
    real i;
    i = (plant == 0) ? i0 : (plant == 1) ? i1 : i2;
    return int'(i / 0.125);
  endfunction

  // averager model
  int last_code;
  initial begin
    avg_sum = '0;
    forever begin
      @(posedge clk);
      if (avg_clear) begin
        repeat (WINDOW - 1) @(posedge clk);
        last_code = plant_code();
        avg_sum <= SUM_W'(last_code * N);
        avg_valid <= 1'b1;
        @(posedge clk);
        avg_valid <= 1'b0;
      end
    end
  end

  initial begin
    repeat (8_000_000) @(posedge clk);
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
  task automatic check_true(input string what, input bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // starting duty cycle from the curve V = 1e5/(16.155 + 0.0318 D)
  function automatic longint expected_d0(input longint v);
    real d;
    if (v == 0) return 65535;
    d = (1.0e5 / real'(v) - 16.155) / 0.0318;
    if (d < 1.0) return 1;
    if (d > 65535.0) return 65535;
    return longint'(d);      // nearest integer
  endfunction

  // Wait for lock, at most 40 loop steps' worth of clocks; counts the steps taken.
  task automatic wait_lock(output int steps);
    longint limit;
    limit = 40 * (SETTLE + WINDOW);
    steps = 0;
    while (!locked && limit > 0) begin
      @(posedge clk);
      if (duty_update) steps++;
      limit--;
    end
  endtask

  longint t0, t1;
  int steps, d0;
  real vexp;

  initial begin
    v_set_mv = '0; q2_duty = 16'd10;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // 1. plant equals the starting curve: first duty cycle is right, lock with no step
    plant = 0;
    v_set_mv = 13'd3000;
    @(negedge clk); enable = 1'b1;
    t0 = cyc;
    @(posedge duty_update); @(negedge clk);
    d0 = q1_duty;
    check("initial duty 3000 mV", q1_duty, expected_d0(3000));
    check_true("initial duty computed within 60 cycles", cyc - t0 < 60);
    t0 = cyc;
    wait_lock(steps); @(negedge clk);
    t1 = cyc;
    check_true("locked with matching plant", locked);
    check("no adjustment when plant matches the curve", n_up + n_down, 0);
    $display("first lock %0d clocks after the starting duty", t1 - t0);
    check_true("first measurement after the gate update, one settle period and one window",
               t1 - t0 >= APPLY_DELAY + SETTLE + WINDOW && t1 - t0 <= APPLY_DELAY + SETTLE + WINDOW + 120);
    vexp = 474.5 + 60.4 * real'(last_code) * 0.125 * 10.0;
    check_true("reported voltage matches current relation",
               v_meas_mv >= mv_t'(int'(vexp) - 1) && v_meas_mv <= mv_t'(int'(vexp) + 1));
    check_true("plant within band", plant_v() > 3000.0 - 90.0 && plant_v() < 3000.0 + 90.0);
    repeat (3 * WINDOW) @(negedge clk);
    check("stays locked without steps", locked && (n_up + n_down == 0), 1);

    // 2. plant lower than the curve (Q2 duty 5 fit): duty must go down
    enable = 1'b0; @(negedge clk);
    plant = 1;
    v_set_mv = 13'd2500;
    enable = 1'b1;
    @(posedge duty_update); @(negedge clk);
    check("initial duty 2500 mV", q1_duty, expected_d0(2500));
    wait_lock(steps);
    check_true("locked with plant 1", locked);
    check_true("plant 1 adjusted downwards only", n_down > 0 && n_up == 0);
    check_true("plant 1 within band", plant_v() > 2500.0 - 90.0 && plant_v() < 2500.0 + 90.0);
    $display("plant 1: %0d steps, duty %0d -> %0d, V=%0.1f mV, reported %0d", steps,
             expected_d0(2500), q1_duty, plant_v(), v_meas_mv);

    // 3. plant higher than the curve (Q2 duty 2 fit): duty must go up; new set point
    //    while enabled restarts from the curve
    plant = 2;
    v_set_mv = 13'd4000;
    @(posedge duty_update); @(negedge clk);
    check("restart on new set point", q1_duty, expected_d0(4000));
    wait_lock(steps);
    check_true("locked with plant 2", locked);
    check_true("plant 2 adjusted upwards", n_up > 0);
    check_true("plant 2 within band", plant_v() > 4000.0 - 90.0 && plant_v() < 4000.0 + 90.0);
    $display("plant 2: %0d steps, duty %0d -> %0d, V=%0.1f mV, reported %0d", steps,
             expected_d0(4000), q1_duty, plant_v(), v_meas_mv);
    check_true("lock events counted", n_lock >= 3);

    // 4. clamps: 7 V needs duty 1, 0 V gives the largest duty
    enable = 1'b0; @(negedge clk);
    v_set_mv = 13'd7000; plant = 0;
    enable = 1'b1;
    @(posedge duty_update); @(negedge clk);
    check("7000 mV clamps to duty 1", q1_duty, 1);
    v_set_mv = 13'd0;
    @(posedge duty_update); @(negedge clk);
    check("0 mV gives largest duty", q1_duty, 65535);
    enable = 1'b0;
    @(negedge clk); @(negedge clk);
    check("locked cleared when disabled", locked, 0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
