// seq_divider: unsigned restoring divider, one quotient bit per clock.
//
// Computes quotient = dividend / divisor and remainder = dividend % divisor. A start
// strobe while idle captures the operands; busy is high for W cycles and done pulses for
// one cycle when quotient and remainder are valid (they hold until the next start).
// Division by zero returns an all-ones quotient and the dividend as remainder.
// It serves the regulation loop (inverting the fitted duty-cycle curve) and the current
// averager (dividing a 300-sample sum); the algorithm is a plain shift-subtract divider
// chosen here because the arithmetic is slow-rate and a multi-cycle unit keeps it small.
module seq_divider #(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [W-1:0] dividend,
  input  logic [W-1:0] divisor,
  output logic         busy,
  output logic         done,
  output logic [W-1:0] quotient,
  output logic [W-1:0] remainder
);

  localparam int unsigned CW = $clog2(W + 1);

  logic [W-1:0]  dvsr;
  logic [W-1:0]  q;     // dividend bits shift out at the top, quotient bits in at the bottom
  logic [W-1:0]  rem;
  logic [CW-1:0] cnt;

  logic [W:0] rem_sh, diff;
  assign rem_sh = {rem, q[W-1]};
  assign diff   = rem_sh - {1'b0, dvsr};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dvsr <= '0;
      q    <= '0;
      rem  <= '0;
      cnt  <= '0;
      busy <= 1'b0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          dvsr <= divisor;
          q    <= dividend;
          rem  <= '0;
          cnt  <= CW'(W);
          busy <= 1'b1;
        end
      end else begin
        if (diff[W]) begin            // negative: restore
          rem <= rem_sh[W-1:0];     // rem_sh < divisor, so the top bit is 0
          q   <= {q[W-2:0], 1'b0};
        end else begin
          rem <= diff[W-1:0];
          q   <= {q[W-2:0], 1'b1};
        end
        cnt <= cnt - CW'(1);
        if (cnt == CW'(1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  assign quotient  = q;
  assign remainder = rem;

  // A start is only honoured while idle.
  property p_no_start_when_busy;
    @(posedge clk) disable iff (!rst_n) busy |-> !start;
  endproperty
  a_no_start_when_busy: assert property (p_no_start_when_busy);

endmodule
