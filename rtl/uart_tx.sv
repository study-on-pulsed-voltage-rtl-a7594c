// uart_tx: serial port transmitter, 8 data bits, no parity, 1 stop bit.
//
// A byte offered with tx_valid while tx_ready is high is sent on txd as a start bit (0),
// eight data bits LSB first and a stop bit (1), each BAUD_DIV clock cycles long; txd idles
// high. tx_ready is low from the cycle after the byte is accepted until the stop bit has
// been sent in full, so one frame takes 10 * BAUD_DIV cycles (about 1.04 ms at 9600 baud
// from 50 MHz: BAUD_DIV = 5208, a 0.006 % rate error).
// The 9600 baud, 8N1 frame follows the supply's serial port settings; the valid/ready
// handshake is this design's choice.
module uart_tx
  import plating_pkg::*;
#(
  parameter int unsigned BAUD     = 9600,
  parameter int unsigned BAUD_DIV = CLK_HZ / BAUD
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       tx_valid,
  input  logic [7:0] tx_data,
  output logic       tx_ready,
  output logic       txd
);

  localparam int unsigned BW = $clog2(BAUD_DIV + 1);

  logic [BW-1:0] baud_cnt;
  logic [3:0]    bit_idx;    // 0 = start, 1..8 = data, 9 = stop
  logic [7:0]    shreg;      // data bits not yet sent, LSB next
  logic          busy;

  assign tx_ready = !busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      baud_cnt <= '0;
      bit_idx  <= '0;
      shreg    <= '1;
      busy     <= 1'b0;
      txd      <= 1'b1;
    end else if (!busy) begin
      txd <= 1'b1;
      if (tx_valid) begin
        busy     <= 1'b1;
        shreg    <= tx_data;
        bit_idx  <= '0;
        baud_cnt <= '0;
        txd      <= 1'b0;         // start bit
      end
    end else begin
      if (baud_cnt == BW'(BAUD_DIV - 1)) begin
        baud_cnt <= '0;
        if (bit_idx == 4'd9) begin
          busy <= 1'b0;           // stop bit complete
        end else begin
          bit_idx <= bit_idx + 4'd1;
          if (bit_idx == 4'd8) begin
            txd <= 1'b1;          // stop bit
          end else begin
            txd   <= shreg[0];    // next data bit
            shreg <= {1'b1, shreg[7:1]};
          end
        end
      end else begin
        baud_cnt <= baud_cnt + BW'(1);
      end
    end
  end

endmodule
