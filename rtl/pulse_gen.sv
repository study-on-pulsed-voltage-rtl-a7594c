// pulse_gen: MOSFET gate pulse generator (PWM signal generation).
//
// Produces a periodic pulse that is high for cfg.width_us microseconds and whose period is
// cfg.duty times the pulse width. The supply specifies its switching waveforms this way
// (duty cycle = period / pulse width, so duty 1 means the switch is always on and larger
// values mean lower output voltage). One instance drives Q1, the switch that sets the
// capacitor voltage, and another drives Q2, the switch that pulses the plating load.
//
// How it works: a prescaler divides the clock into 1 us ticks; a microsecond counter splits
// time into slots one pulse width long; a slot counter runs 0..duty-1 and the output is
// high during slot 0. No multiplier is needed and the period is exactly
// width_us * duty * CLK_PER_US clock cycles. New settings are taken only at the start of a
// period (period_start), so a change never produces a runt pulse. Width 0 and duty 0 are
// treated as 1. While enable is low the output is held low and the counters restart, so the
// first pulse begins on the first cycle after enable rises.
//
// Timing: pulse, period_start and active_cfg are registered. period_start is high for the
// first clock of each period, the same clock in which pulse rises and active_cfg changes.
// The microsecond granularity and the 50 MHz clock follow the supply's description; the
// slot-counter structure and the load-at-period-start rule are this design's choices.
module pulse_gen
  import plating_pkg::*;
#(
  parameter int unsigned CYC_PER_US = CLK_PER_US
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       enable,
  input  pulse_cfg_t cfg,           // requested width and duty, sampled at period start
  output logic       pulse,         // gate drive (high = MOSFET on)
  output logic       period_start,  // one-cycle strobe: first clock of a new period
  output pulse_cfg_t active_cfg     // settings of the period now running
);

  localparam int unsigned PW = (CYC_PER_US > 1) ? $clog2(CYC_PER_US) : 1;

  logic [PW-1:0] pre_cnt;
  us_t           us_cnt;
  duty_t         slot_cnt;
  logic          running;

  logic us_tick, slot_end, period_end;
  assign us_tick    = (pre_cnt == PW'(CYC_PER_US - 1));
  assign slot_end   = us_tick && (us_cnt == active_cfg.width_us - us_t'(1));
  assign period_end = slot_end && (slot_cnt == active_cfg.duty - duty_t'(1));

  // Start of a period: first cycle after enable, or the cycle after the last one ended.
  logic load;
  assign load = enable && (!running || period_end);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pre_cnt      <= '0;
      us_cnt       <= '0;
      slot_cnt     <= '0;
      running      <= 1'b0;
      pulse        <= 1'b0;
      period_start <= 1'b0;
      active_cfg   <= '{width_us: us_t'(1), duty: duty_t'(1)};
    end else begin
      period_start <= 1'b0;
      if (!enable) begin
        running  <= 1'b0;
        pulse    <= 1'b0;
        pre_cnt  <= '0;
        us_cnt   <= '0;
        slot_cnt <= '0;
      end else if (load) begin
        running             <= 1'b1;
        period_start        <= 1'b1;
        active_cfg.width_us <= (cfg.width_us == '0) ? us_t'(1)   : cfg.width_us;
        active_cfg.duty     <= (cfg.duty == '0)     ? duty_t'(1) : cfg.duty;
        pre_cnt             <= '0;
        us_cnt              <= '0;
        slot_cnt            <= '0;
        pulse               <= 1'b1;
      end else begin
        pre_cnt <= us_tick ? '0 : pre_cnt + PW'(1);
        if (us_tick) begin
          if (slot_end) begin
            us_cnt   <= '0;
            slot_cnt <= slot_cnt + duty_t'(1);
            pulse    <= 1'b0;          // slot 0 (the on time) is over
          end else begin
            us_cnt <= us_cnt + us_t'(1);
          end
        end
      end
    end
  end

endmodule
