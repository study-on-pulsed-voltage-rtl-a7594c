// plating_pkg: constants and types shared by the pulse plating power supply logic.
//
// The whole design runs from one 50 MHz clock, the board's crystal. Pulse widths are
// programmed in microseconds and "duty cycles" are programmed as the ratio
// period / pulse width (an integer >= 1), which is how this supply is specified:
// a duty-cycle value of 150 with a 5 us pulse gives a 750 us period. The AD9215 current
// samples are 10-bit offset-binary codes. Voltages are in millivolts.
package plating_pkg;

  // System clock (the board's 50 MHz crystal) and cycles per microsecond.
  localparam int unsigned CLK_HZ     = 50_000_000;
  localparam int unsigned CLK_PER_US = CLK_HZ / 1_000_000;

  // Field widths.
  localparam int unsigned US_W    = 16;  // pulse width in microseconds
  localparam int unsigned DUTY_W  = 16;  // period / pulse width ratio
  localparam int unsigned ADC_W   = 10;  // AD9215 resolution
  localparam int unsigned VSET_W  = 13;  // set voltage in mV, 0..8191 (supply range 0..7 V)

  typedef logic [US_W-1:0]   us_t;
  typedef logic [DUTY_W-1:0] duty_t;
  typedef logic [ADC_W-1:0]  adc_code_t;
  typedef logic [VSET_W-1:0] mv_t;

  // Settings of one pulse train (Q1 or Q2 gate signal).
  typedef struct packed {
    us_t   width_us;  // on time in microseconds
    duty_t duty;      // period / on time
  } pulse_cfg_t;

endpackage
