// current_averager: mean of N consecutive current samples (average_current).
//
// Accumulates N (300 by default) samples of the 1 MHz AD9215 stream and then divides the
// sum by N with a sequential divider, so a new average appears every N samples (every
// 300 us at 1 MHz) with avg_valid high for one cycle; avg and avg_sum hold until the next.
// The truncated mean (avg) is what the serial port reports; the full sum (avg_sum, N times
// the mean) keeps the extra resolution that averaging buys for the regulation loop.
// clear restarts the window: the partial sum is dropped and a division still in progress
// is discarded, so the next average is made only of samples taken after clear. The
// regulation loop uses this to ignore samples taken before the output had settled.
//
// Timing: avg_valid follows the N-th sample of a window by SUM_W+2 clock cycles. The
// averaging of 300 values follows the supply's description; windows that do not overlap,
// the divider and the clear input are this design's choices.
module current_averager
  import plating_pkg::*;
#(
  parameter int unsigned N = 300
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        clear,
  input  logic                        sample_valid,
  input  adc_code_t                   sample,
  output logic                        avg_valid,
  output adc_code_t                   avg,
  output logic [ADC_W+$clog2(N)-1:0]  avg_sum
);

  localparam int unsigned SUM_W = ADC_W + $clog2(N);
  localparam int unsigned CNT_W = $clog2(N + 1);

  logic [SUM_W-1:0] acc;
  logic [CNT_W-1:0] cnt;
  logic [SUM_W-1:0] sum_hold;
  logic             div_start, div_busy, div_done, drop;
  logic [SUM_W-1:0] div_q, div_r;

  logic [SUM_W-1:0] acc_next;
  assign acc_next = acc + SUM_W'(sample);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc       <= '0;
      cnt       <= '0;
      sum_hold  <= '0;
      div_start <= 1'b0;
      drop      <= 1'b0;
      avg_valid <= 1'b0;
      avg       <= '0;
      avg_sum   <= '0;
    end else begin
      div_start <= 1'b0;
      avg_valid <= 1'b0;
      if (clear) begin
        acc  <= '0;
        cnt  <= '0;
        drop <= div_busy || div_start;
      end else if (sample_valid) begin
        if (cnt == CNT_W'(N - 1)) begin
          acc       <= '0;
          cnt       <= '0;
          sum_hold  <= acc_next;
          div_start <= 1'b1;
        end else begin
          acc <= acc_next;
          cnt <= cnt + CNT_W'(1);
        end
      end
      if (div_done) begin
        if (drop) begin
          drop <= 1'b0;
        end else begin
          avg_valid <= 1'b1;
          avg       <= ADC_W'(div_q);
          avg_sum   <= sum_hold;
        end
      end
    end
  end

  seq_divider #(.W(SUM_W)) u_div (
    .clk      (clk),
    .rst_n    (rst_n),
    .start    (div_start),
    .dividend (sum_hold),
    .divisor  (SUM_W'(N)),
    .busy     (div_busy),
    .done     (div_done),
    .quotient (div_q),
    .remainder(div_r)
  );

endmodule
