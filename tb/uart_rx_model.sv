// uart_rx_model: serial receiver for testbenches. Waits for a start bit on rxd, samples
// each of the 8 data bits and the stop bit in the middle of its bit time (BIT_CYC clocks
// per bit), and pulses valid for one clock with the byte. frame_err is set with valid when
// the stop bit is low. Nothing is received while en is low. start_cycle is the clock
// count at which the last start bit began.
module uart_rx_model #(
  parameter int unsigned BIT_CYC = 5208
) (
  input  logic       clk,
  input  logic       en,     // hold off until the transmitter is out of reset
  input  logic       rxd,
  output logic       valid,
  output logic [7:0] data,
  output logic       frame_err,
  output longint     start_cycle
);
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    valid = 1'b0; data = '0; frame_err = 1'b0; start_cycle = 0;
    forever begin
      @(posedge clk);
      valid = 1'b0;
      if (en && rxd == 1'b0) begin
        start_cycle = cyc;
        repeat (BIT_CYC / 2) @(posedge clk);
        for (int b = 0; b < 8; b++) begin
          repeat (BIT_CYC) @(posedge clk);
          data[b] = rxd;
        end
        repeat (BIT_CYC) @(posedge clk);
        frame_err = (rxd != 1'b1);
        valid = 1'b1;
        @(posedge clk);
        valid = 1'b0;
        // wait out the rest of the stop bit
        while (rxd == 1'b0) @(posedge clk);
      end
    end
  end
endmodule
