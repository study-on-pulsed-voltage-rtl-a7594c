// ad9215_capture: current sampling interface to the AD9215 10-bit ADC.
//
// The AD9215 is clocked straight from the 50 MHz system clock (ad_clk) and presents a new
// 10-bit offset-binary code on its parallel port every clock. This block registers the
// port twice (the first register is meant for the I/O cell and absorbs the ADC's output
// delay, the second gives a clean internal copy) and takes one of every DECIM codes, so the
// rest of the logic sees a 1 MHz sample stream: sample_valid pulses for one cycle with the
// code and the ADC's out-of-range flag. Offset binary maps 0 to the bottom of the input
// range and 1023 to the top; the current path is unipolar, so the code is used as an
// unsigned magnitude. While enable is low the ADC is put in power-down (ad_pdwn high) and
// no samples are produced.
//
// Interface timing: sample_valid is high for one clock every DECIM clocks; sample holds
// until the next one. The code reaching the logic is 2 clocks older than the port value
// (plus the ADC's own pipeline latency). The 50 MHz ADC clock and the 1 MHz sample rate
// follow the supply's description; the two-stage input register and the use of the
// out-of-range flag are this design's choices.
module ad9215_capture
  import plating_pkg::*;
#(
  parameter int unsigned DECIM = CLK_PER_US   // 50 MHz / 50 = 1 MHz
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      enable,
  // AD9215 pins
  output logic      ad_clk,
  output logic      ad_pdwn,
  input  adc_code_t ad_data,
  input  logic      ad_otr,
  // decimated sample stream
  output logic      sample_valid,
  output adc_code_t sample,
  output logic      sample_otr
);

  localparam int unsigned DW = (DECIM > 1) ? $clog2(DECIM) : 1;

  // The converter is clocked by the system clock itself.
  assign ad_clk  = clk;
  assign ad_pdwn = !enable;

  adc_code_t d_io, d_int;
  logic      otr_io, otr_int;
  logic [DW-1:0] dec_cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d_io         <= '0;
      d_int        <= '0;
      otr_io       <= 1'b0;
      otr_int      <= 1'b0;
      dec_cnt      <= '0;
      sample_valid <= 1'b0;
      sample       <= '0;
      sample_otr   <= 1'b0;
    end else begin
      d_io         <= ad_data;
      d_int        <= d_io;
      otr_io       <= ad_otr;
      otr_int      <= otr_io;
      sample_valid <= 1'b0;
      if (!enable) begin
        dec_cnt <= '0;
      end else if (dec_cnt == DW'(DECIM - 1)) begin
        dec_cnt      <= '0;
        sample_valid <= 1'b1;
        sample       <= d_int;
        sample_otr   <= otr_int;
      end else begin
        dec_cnt <= dec_cnt + DW'(1);
      end
    end
  end

endmodule
