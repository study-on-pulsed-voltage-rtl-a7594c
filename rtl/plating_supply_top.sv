// plating_supply_top: FPGA logic of a pulse power supply for precision electroplating.
//
// The supply charges a capacitor through MOSFET Q1 and pulses the plating load through
// MOSFET Q2. The capacitor voltage (0..7 V) is set by the Q1 duty cycle value (period /
// pulse width: larger means lower voltage); Q2's pulse width and duty cycle shape the
// plating pulse. The load current is measured through a precision resistor by an AD9215 ADC.
// This top connects the four units of the logic:
//   * pulse control: two pulse_gen instances make the Q1 and Q2 gate signals;
//   * current sampling: ad9215_capture clocks the ADC at 50 MHz and takes 1 MHz samples,
//     current_averager averages them 300 at a time;
//   * voltage regulation: voltage_regulator closes the loop from the averaged current to
//     the Q1 duty cycle (closed_loop = 1); with closed_loop = 0 the Q1 duty cycle comes from
//     the q1_duty_manual port, the open-loop mode used to measure the duty-cycle curve;
//   * serial communication: serial_comm sends each latest average at 9600 baud.
// run enables everything; with run low both gates are off and the ADC is powered down.
// The gate driver, the MOSFETs, the power circuit and the ADC itself are outside the FPGA
// and appear here only as pins. The partitioning into these units follows the supply's
// description; the pin list, the open-loop/closed-loop switch and run are this design's.
//
// Timing: all logic runs on clk (50 MHz). Settings on the *_width_us and *_duty ports are
// taken by each pulse train at the start of its next period.
module plating_supply_top
  import plating_pkg::*;
#(
  parameter int unsigned CYC_PER_US    = CLK_PER_US,
  parameter int unsigned N_AVG         = 300,
  parameter int unsigned SETTLE_CYCLES = 50_000,
  parameter int unsigned TOL_MV        = 50,
  parameter int unsigned BAUD_DIV      = CLK_HZ / 9600
) (
  input  logic      clk,
  input  logic      rst_n,
  // operating mode and settings
  input  logic      run,
  input  logic      closed_loop,
  input  mv_t       v_set_mv,
  input  duty_t     q1_duty_manual,
  input  us_t       q1_width_us,
  input  us_t       q2_width_us,
  input  duty_t     q2_duty,
  // MOSFET gate drive (to the driver chip)
  output logic      q1_gate,
  output logic      q2_gate,
  // AD9215 pins
  output logic      ad_clk,
  output logic      ad_pdwn,
  input  adc_code_t ad_data,
  input  logic      ad_otr,
  // serial port
  output logic      txd,
  // status
  output duty_t     q1_duty,        // Q1 duty cycle running on the gate now
  output logic      locked,
  output mv_t       v_meas_mv,
  output logic      avg_valid,
  output adc_code_t avg_current,
  output logic      adc_over_range,
  output logic [15:0] n_adjust_up,    // regulation steps that raised the duty cycle
  output logic [15:0] n_adjust_down,  // regulation steps that lowered it
  output logic [15:0] n_lock,         // times the loop entered the tolerance band
  output logic [15:0] n_sent          // values sent on the serial port
);

  localparam int unsigned SUM_W = ADC_W + $clog2(N_AVG);

  // pulse train settings requested and running
  pulse_cfg_t q1_cfg, q2_cfg, q1_active, q2_active;
  logic       q1_start, q2_start;

  // ---- current sampling --------------------------------------------------------
  logic      smp_valid, smp_otr;
  adc_code_t smp;
  logic [SUM_W-1:0] avg_sum;
  logic      avg_clear, reg_clear;

  ad9215_capture #(.DECIM(CYC_PER_US)) u_adc (
    .clk         (clk),
    .rst_n       (rst_n),
    .enable      (run),
    .ad_clk      (ad_clk),
    .ad_pdwn     (ad_pdwn),
    .ad_data     (ad_data),
    .ad_otr      (ad_otr),
    .sample_valid(smp_valid),
    .sample      (smp),
    .sample_otr  (smp_otr)
  );

  // Over-range flag: set by any sample the ADC marks out of range, cleared by run low.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                  adc_over_range <= 1'b0;
    else if (!run)               adc_over_range <= 1'b0;
    else if (smp_valid && smp_otr) adc_over_range <= 1'b1;
  end

  assign avg_clear = closed_loop && reg_clear;

  current_averager #(.N(N_AVG)) u_avg (
    .clk         (clk),
    .rst_n       (rst_n),
    .clear       (avg_clear),
    .sample_valid(smp_valid),
    .sample      (smp),
    .avg_valid   (avg_valid),
    .avg         (avg_current),
    .avg_sum     (avg_sum)
  );

  // ---- voltage regulation ------------------------------------------------------
  duty_t reg_duty;
  logic  reg_update;  // duty change strobe; the pulse generator picks the value up itself

  voltage_regulator #(
    .N_AVG        (N_AVG),
    .TOL_MV       (TOL_MV),
    .SETTLE_CYCLES(SETTLE_CYCLES)
  ) u_reg (
    .clk        (clk),
    .rst_n      (rst_n),
    .enable     (run && closed_loop),
    .v_set_mv   (v_set_mv),
    .q2_duty    (q2_duty),
    .q1_applied (q1_active.duty),
    .avg_clear  (reg_clear),
    .avg_valid  (avg_valid),
    .avg_sum    (avg_sum),
    .q1_duty    (reg_duty),
    .duty_update(reg_update),
    .locked     (locked),
    .v_meas_mv  (v_meas_mv),
    .n_up       (n_adjust_up),
    .n_down     (n_adjust_down),
    .n_lock     (n_lock)
  );

  duty_t q1_duty_sel;
  assign q1_duty_sel = closed_loop ? reg_duty : q1_duty_manual;

  // ---- pulse control -----------------------------------------------------------
  assign q1_cfg = '{width_us: q1_width_us, duty: q1_duty_sel};
  assign q2_cfg = '{width_us: q2_width_us, duty: q2_duty};

  pulse_gen #(.CYC_PER_US(CYC_PER_US)) u_q1 (
    .clk         (clk),
    .rst_n       (rst_n),
    .enable      (run),
    .cfg         (q1_cfg),
    .pulse       (q1_gate),
    .period_start(q1_start),
    .active_cfg  (q1_active)
  );

  pulse_gen #(.CYC_PER_US(CYC_PER_US)) u_q2 (
    .clk         (clk),
    .rst_n       (rst_n),
    .enable      (run),
    .cfg         (q2_cfg),
    .pulse       (q2_gate),
    .period_start(q2_start),
    .active_cfg  (q2_active)
  );

  // Status shows the duty cycle the Q1 gate is running, which trails a new setting until
  // the current Q1 period ends.
  assign q1_duty = q1_active.duty;

  // ---- serial communication ----------------------------------------------------
  serial_comm #(.BAUD_DIV(BAUD_DIV)) u_ser (
    .clk       (clk),
    .rst_n     (rst_n),
    .avg_valid (avg_valid),
    .avg       (avg_current),
    .txd       (txd),
    .sent_count(n_sent)
  );

endmodule
