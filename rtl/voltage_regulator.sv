// voltage_regulator: closed-loop control of the Q1 duty cycle (voltage regulation unit).
//
// The output (capacitor) voltage of the supply falls as the Q1 duty cycle value
// (period / pulse width) rises. Two fitted relations of the power stage drive the loop:
//   * duty cycle -> voltage:  V = 1e5 / (a + b*D)  [mV], used backwards to pick the starting
//     duty cycle for a set voltage:  D0 = (1e5 - a*Vset) / (b*Vset), rounded, 1..DUTY_MAX;
//   * current -> voltage:     V = c + r*Ieq  [mV, mA], where Ieq is the equivalent current,
//     the mean measured current times the Q2 duty cycle, i.e. the current during a Q2 pulse;
//     c is the drop of the diode and switches and r the load plus series resistance.
// Sequence: when enable rises (or the set voltage changes) D0 is computed and applied; then,
// repeatedly, the loop waits until the Q1 gate runs the new value (q1_applied; the pulse
// generator takes it at its next period start) and then SETTLE_CYCLES more for the output
// to settle, restarts the current
// average, takes the next average, computes the real voltage from it and compares it with
// the set value. Within +-TOL_MV the loop reports locked and keeps measuring without
// touching the duty cycle; otherwise it moves the duty cycle by
//   step = max(1, (|error mV| * D) >> GAIN_SHIFT)
// (up when the voltage is too high, down when it is too low), clamped to 1..DUTY_MAX.
// Because V is roughly proportional to 1/D, a change of D by the fraction err/V corrects the
// error; 2^GAIN_SHIFT = 4096 mV stands in for V, so the step undershoots at low voltages and
// the loop approaches the set point from one side without oscillating.
//
// Fixed-point forms (defaults are the fits for a 50 us Q1 pulse and Q2 duty 10):
//   D0 = (FIT_K - FIT_A*Vset + FIT_B*Vset/2) / (FIT_B*Vset), with FIT_K = 1e5*1e4,
//        FIT_A = a*1e4 = 161550, FIT_B = b*1e4 = 318;
//   V*1e4*N = LIN_C_X10*1000*N + LIN_R_X10*I_LSB_UA*avg_sum*Q2duty, LIN_C_X10 = 4745,
//        LIN_R_X10 = 604, avg_sum = N * mean ADC code, I_LSB_UA = current per ADC code in uA;
//   the error in mV is the difference of the two scaled values divided by 1e4*N.
// All divisions go through one shared sequential divider.
//
// Interface: duty_update pulses for one cycle when q1_duty changes. avg_clear is a one-cycle
// request to restart the averaging window; avg_valid/avg_sum come from the averager.
// v_meas_mv is the last computed voltage, saturated to 0..8191 mV. Status counters count
// adjustments up and down and locks. The curves, the use of the current to compute the real
// voltage, and adjusting by an amount that depends on the difference follow the supply's
// description; the step rule, TOL_MV, SETTLE_CYCLES and I_LSB_UA are this design's choices.
module voltage_regulator
  import plating_pkg::*;
#(
  parameter int unsigned N_AVG         = 300,          // samples per average
  parameter int unsigned FIT_K         = 1_000_000_000,
  parameter int unsigned FIT_A         = 161_550,
  parameter int unsigned FIT_B         = 318,
  parameter int unsigned LIN_C_X10     = 4745,
  parameter int unsigned LIN_R_X10     = 604,
  parameter int unsigned I_LSB_UA      = 125,
  parameter int unsigned TOL_MV        = 50,
  parameter int unsigned GAIN_SHIFT    = 12,
  parameter int unsigned DUTY_MAX      = 65535,
  parameter int unsigned SETTLE_CYCLES = 50_000        // 1 ms at 50 MHz
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic                              enable,
  input  mv_t                               v_set_mv,
  input  duty_t                             q2_duty,
  input  duty_t                             q1_applied,  // duty the Q1 gate is running
  // current averager
  output logic                              avg_clear,
  input  logic                              avg_valid,
  input  logic [ADC_W+$clog2(N_AVG)-1:0]    avg_sum,
  // Q1 duty cycle
  output duty_t                             q1_duty,
  output logic                              duty_update,
  // status
  output logic                              locked,
  output mv_t                               v_meas_mv,
  output logic [15:0]                       n_up,
  output logic [15:0]                       n_down,
  output logic [15:0]                       n_lock
);

  localparam int unsigned DW    = 48;                  // divider width
  localparam int unsigned SW    = 64;                  // scaled-voltage arithmetic width
  localparam int unsigned STW   = $clog2(SETTLE_CYCLES + 1);
  localparam longint unsigned SCALE = 64'(10_000) * 64'(N_AVG);
  localparam longint unsigned LIN_C = 64'(LIN_C_X10) * 64'(1000) * 64'(N_AVG);
  localparam longint unsigned LIN_R = 64'(LIN_R_X10) * 64'(I_LSB_UA);
  localparam longint unsigned DMAX  = (64'(1) << DW) - 1;

  typedef enum logic [3:0] {
    S_IDLE, S_INIT_DIV, S_INIT_WAIT, S_SETTLE, S_CLEAR, S_WAIT_AVG,
    S_CALC, S_ERR_DIV, S_ERR_WAIT, S_ADJUST
  } state_t;
  state_t state;

  mv_t             vset;
  logic [STW-1:0]  settle_cnt;
  logic [SW-1:0]   meas_s, set_s;
  logic            too_high;                      // measured above set value
  logic [DW-1:0]   err_abs;                       // |error| in scaled units, saturated

  // shared divider
  logic          div_start, div_busy, div_done;
  logic [DW-1:0] div_num, div_den, div_q, div_r;

  // ---- initial duty cycle from the inverted curve ------------------------------
  logic [SW-1:0] a_v, b_v, init_num, init_den;
  assign a_v      = SW'(FIT_A) * SW'(vset);
  assign b_v      = SW'(FIT_B) * SW'(vset);
  assign init_num = (SW'(FIT_K) > a_v) ? SW'(FIT_K) - a_v + (b_v >> 1) : '0;
  assign init_den = b_v;

  function automatic duty_t clamp_duty(input logic [SW-1:0] d);
    if (d < SW'(1))             return duty_t'(1);
    else if (d > SW'(DUTY_MAX)) return duty_t'(DUTY_MAX);
    else                        return duty_t'(d);
  endfunction

  // ---- adjustment step -----------------------------------------------------------
  logic [DW-1:0]   err_mv_full;
  logic [15:0]     err_mv;
  logic [31:0]     step_raw;
  logic [SW-1:0]   step, duty_up, duty_dn;
  assign err_mv_full = div_q;
  assign err_mv      = (err_mv_full > DW'(16'hFFFF)) ? 16'hFFFF : 16'(err_mv_full);
  assign step_raw    = (32'(err_mv) * 32'(q1_duty)) >> GAIN_SHIFT;
  assign step        = (step_raw == '0) ? SW'(1) : SW'(step_raw);
  assign duty_up     = SW'(q1_duty) + step;
  assign duty_dn     = (SW'(q1_duty) > step) ? SW'(q1_duty) - step : SW'(1);

  // measured voltage in mV for status, from set value and signed error
  logic [SW-1:0] vm;
  assign vm = too_high ? SW'(vset) + SW'(err_mv) :
              (SW'(err_mv) > SW'(vset) ? '0 : SW'(vset) - SW'(err_mv));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      vset        <= '0;
      settle_cnt  <= '0;
      meas_s      <= '0;
      set_s       <= '0;
      too_high    <= 1'b0;
      err_abs     <= '0;
      div_start   <= 1'b0;
      div_num     <= '0;
      div_den     <= '0;
      avg_clear   <= 1'b0;
      q1_duty     <= duty_t'(DUTY_MAX);
      duty_update <= 1'b0;
      locked      <= 1'b0;
      v_meas_mv   <= '0;
      n_up        <= '0;
      n_down      <= '0;
      n_lock      <= '0;
    end else begin
      div_start   <= 1'b0;
      avg_clear   <= 1'b0;
      duty_update <= 1'b0;
      if (!enable) begin
        state  <= S_IDLE;
        locked <= 1'b0;
      end else if (state != S_IDLE && v_set_mv != vset && !div_busy) begin
        // new set point: start over from the curve
        state  <= S_IDLE;
        locked <= 1'b0;
      end else begin
        unique case (state)
          S_IDLE: begin
            vset  <= v_set_mv;
            state <= S_INIT_DIV;
          end
          S_INIT_DIV: begin
            div_num   <= (init_num > SW'(DMAX)) ? DW'(DMAX) : DW'(init_num);
            div_den   <= DW'(init_den);
            div_start <= 1'b1;
            state     <= S_INIT_WAIT;
          end
          S_INIT_WAIT: if (div_done) begin
            q1_duty     <= clamp_duty(SW'(div_q));
            duty_update <= 1'b1;
            settle_cnt  <= '0;
            state       <= S_SETTLE;
          end
          S_SETTLE: begin
            // settling time counts from the moment the gate runs the new duty cycle
            if (q1_applied != q1_duty)                  settle_cnt <= '0;
            else if (settle_cnt >= STW'(SETTLE_CYCLES)) state <= S_CLEAR;
            else                                        settle_cnt <= settle_cnt + STW'(1);
          end
          S_CLEAR: begin
            avg_clear <= 1'b1;
            state     <= S_WAIT_AVG;
          end
          S_WAIT_AVG: if (avg_valid) begin
            meas_s <= LIN_C + LIN_R * SW'(avg_sum) * SW'(q2_duty);
            set_s  <= SCALE * SW'(vset);
            state  <= S_CALC;
          end
          S_CALC: begin
            too_high <= meas_s > set_s;
            if (meas_s > set_s)
              err_abs <= (meas_s - set_s > SW'(DMAX)) ? DW'(DMAX) : DW'(meas_s - set_s);
            else
              err_abs <= (set_s - meas_s > SW'(DMAX)) ? DW'(DMAX) : DW'(set_s - meas_s);
            state <= S_ERR_DIV;
          end
          S_ERR_DIV: begin
            div_num   <= err_abs + DW'(SCALE / 2);  // round to the nearest mV
            div_den   <= DW'(SCALE);
            div_start <= 1'b1;
            state     <= S_ERR_WAIT;
          end
          S_ERR_WAIT: if (div_done) state <= S_ADJUST;
          S_ADJUST: begin
            v_meas_mv <= (vm > SW'({VSET_W{1'b1}})) ? '1 : mv_t'(vm);
            if (32'(err_mv) <= 32'(TOL_MV)) begin
              if (!locked) n_lock <= n_lock + 16'd1;
              locked <= 1'b1;
              state  <= S_CLEAR;              // keep watching, duty unchanged
            end else begin
              locked <= 1'b0;
              if (too_high) begin
                if (q1_duty != duty_t'(DUTY_MAX)) begin
                  q1_duty     <= clamp_duty(duty_up);
                  duty_update <= 1'b1;
                  n_up        <= n_up + 16'd1;
                end
              end else begin
                if (q1_duty != duty_t'(1)) begin
                  q1_duty     <= clamp_duty(duty_dn);
                  duty_update <= 1'b1;
                  n_down      <= n_down + 16'd1;
                end
              end
              settle_cnt <= '0;
              state      <= S_SETTLE;
            end
          end
          default: state <= S_IDLE;
        endcase
      end
    end
  end

  seq_divider #(.W(DW)) u_div (
    .clk      (clk),
    .rst_n    (rst_n),
    .start    (div_start),
    .dividend (div_num),
    .divisor  (div_den),
    .busy     (div_busy),
    .done     (div_done),
    .quotient (div_q),
    .remainder(div_r)
  );

endmodule
