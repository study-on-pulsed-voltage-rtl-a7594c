// plating_plant_model: steady-state model of the supply's power stage, for testbenches only.
//
// Not hardware of the design: it stands for the gate driver, MOSFETs Q1/Q2, capacitor C
// and load. Given the Q1 duty cycle value D (period / pulse width) and the Q2 duty cycle
// it returns, after the output has settled, the capacitor voltage from the fitted curve
//   V = 1e5 / (A + B*D)  mV
// and the current the ammeter (and the current-sense ADC) would see: the equivalent
// current Ieq = (V - C) / R  mA from the fitted linear relation, divided by the Q2 duty
// cycle. The fit coefficients are parameters so a testbench can make the plant differ
// from the curve the regulator starts from. vin is the analog value handed to the ADC
// model: the mean current in mA.
module plating_plant_model #(
  parameter real A = 16.155,
  parameter real B = 0.0318,
  parameter real C = 474.5,
  parameter real R = 60.4
) (
  input  logic [15:0] q1_duty,
  input  logic [15:0] q2_duty,
  output real         v_mv,
  output real         i_ma
);
  always_comb begin
    v_mv = 1.0e5 / (A + B * real'(q1_duty));
    i_ma = (v_mv > C) ? (v_mv - C) / R / real'((q2_duty == 0) ? 1 : q2_duty) : 0.0;
  end
endmodule
