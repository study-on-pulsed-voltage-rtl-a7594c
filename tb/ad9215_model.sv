// ad9215_model: behavioural model of the AD9215 10-bit ADC, for testbenches only.
//
// Converts a real input on every rising edge of clk into a 10-bit offset-binary code and
// presents it on d after PIPE_DELAY clocks, like the converter's pipeline. The input is
// given directly in the quantity being measured (here mA of sense current) with LSB units
// per code; values below 0 or above full scale clip and raise otr. pdwn high holds d at 0.
module ad9215_model #(
  parameter real         LSB        = 0.125,
  parameter int unsigned PIPE_DELAY = 5
) (
  input  logic       clk,
  input  logic       pdwn,
  input  real        vin,
  output logic [9:0] d,
  output logic       otr
);
  logic [9:0] pipe_d [PIPE_DELAY];
  logic       pipe_o [PIPE_DELAY];
  int         code;

  initial begin
    for (int i = 0; i < PIPE_DELAY; i++) begin
      pipe_d[i] = '0;
      pipe_o[i] = 1'b0;
    end
  end

  always @(posedge clk) begin
    code = int'(vin / LSB);     // rounds to nearest
    for (int i = PIPE_DELAY - 1; i > 0; i--) begin
      pipe_d[i] <= pipe_d[i-1];
      pipe_o[i] <= pipe_o[i-1];
    end
    if (pdwn) begin
      pipe_d[0] <= '0;
      pipe_o[0] <= 1'b0;
    end else if (code < 0) begin
      pipe_d[0] <= '0;
      pipe_o[0] <= 1'b1;
    end else if (code > 1023) begin
      pipe_d[0] <= 10'd1023;
      pipe_o[0] <= 1'b1;
    end else begin
      pipe_d[0] <= 10'(code);
      pipe_o[0] <= 1'b0;
    end
  end

  assign d   = pipe_d[PIPE_DELAY-1];
  assign otr = pipe_o[PIPE_DELAY-1];
endmodule
