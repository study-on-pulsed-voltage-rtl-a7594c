// serial_comm: reports the measured current to a PC over the serial port.
//
// Each new average from the current averager is latched; whenever the transmitter is
// free and a value is waiting, the latest value is sent as two bytes, high byte first:
// {6'b0, avg[9:8]} then avg[7:0]. A terminal that shows received bytes in binary then
// displays the 10-bit code directly. Averages arrive every 300 us, faster than a 9600 baud
// link can carry two bytes (about 2.1 ms), so values that arrive while a pair is being sent
// overwrite one another and only the newest is sent next: the link carries a decimated but
// always current reading. The serial settings (9600 baud, 8 data bits, 1 stop bit, no
// parity) follow the supply's description; the two-byte framing and the newest-value-wins
// policy are this design's choices.
//
// Interface: avg_valid is a one-cycle strobe with avg. txd is the serial line (idle high).
// sent_count counts value pairs sent, for status.
module serial_comm
  import plating_pkg::*;
#(
  parameter int unsigned BAUD     = 9600,
  parameter int unsigned BAUD_DIV = CLK_HZ / BAUD
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       avg_valid,
  input  adc_code_t  avg,
  output logic       txd,
  output logic [15:0] sent_count
);

  typedef enum logic [1:0] {S_IDLE, S_HIGH, S_LOW} state_t;
  state_t state;

  adc_code_t latest, sending;
  logic      pending;

  logic       tx_valid, tx_ready;
  logic [7:0] tx_data;

  always_comb begin
    tx_valid = 1'b0;
    tx_data  = '0;
    unique case (state)
      S_HIGH: begin tx_valid = 1'b1; tx_data = 8'(sending >> 8); end
      S_LOW:  begin tx_valid = 1'b1; tx_data = sending[7:0];     end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      latest     <= '0;
      sending    <= '0;
      pending    <= 1'b0;
      sent_count <= '0;
    end else begin
      if (avg_valid) begin
        latest  <= avg;
        pending <= 1'b1;
      end
      unique case (state)
        S_IDLE: if (pending && !avg_valid) begin
          sending <= latest;
          pending <= 1'b0;
          state   <= S_HIGH;
        end
        S_HIGH: if (tx_ready) state <= S_LOW;
        S_LOW:  if (tx_ready) begin
          state      <= S_IDLE;
          sent_count <= sent_count + 16'd1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  uart_tx #(.BAUD(BAUD), .BAUD_DIV(BAUD_DIV)) u_tx (
    .clk     (clk),
    .rst_n   (rst_n),
    .tx_valid(tx_valid),
    .tx_data (tx_data),
    .tx_ready(tx_ready),
    .txd     (txd)
  );

endmodule
