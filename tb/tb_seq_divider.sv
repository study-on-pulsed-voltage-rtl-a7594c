// tb_seq_divider: self-checking testbench for seq_divider (W = 48, as the regulation loop
// uses it). Compares quotient and remainder with the simulator's own / and % for edge
// cases and random operands, checks that done arrives exactly W+1 cycles after start,
// and checks the all-ones result of a division by zero.
module tb_seq_divider;
  localparam int unsigned W = 48;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [W-1:0] dividend, divisor, quotient, remainder;
  logic busy, done;
  int checks = 0, failures = 0;

  always #10 clk = ~clk;

  seq_divider #(.W(W)) dut (.*);

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic divide(input logic [W-1:0] a, input logic [W-1:0] b);
    int lat;
    logic [W-1:0] eq, er;
    @(negedge clk);
    dividend = a; divisor = b; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    lat = 1;
    while (!done) begin @(negedge clk); lat++; end
    eq = (b == 0) ? '1 : a / b;
    er = (b == 0) ? a  : a % b;
    checks++;
    if (quotient !== eq || remainder !== er) begin
      failures++;
      $display("FAIL %0d / %0d: got q=%0d r=%0d expected q=%0d r=%0d", a, b, quotient, remainder, eq, er);
    end
    checks++;
    if (lat != W + 1) begin
      failures++;
      $display("FAIL latency %0d expected %0d", lat, W + 1);
    end
  endtask

  initial begin
    dividend = '0; divisor = '1;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    divide(48'd1_000_000_000, 48'd318);
    divide(48'd0, 48'd7);
    divide(48'd7, 48'd7);
    divide(48'd6, 48'd7);
    divide('1, 48'd1);
    divide('1, '1);
    divide(48'd123456, 48'd0);
    for (int i = 0; i < 200; i++)
      divide({$urandom, $urandom} & {W{1'b1}}, ({$urandom, $urandom} >> ($urandom % 60)) & {W{1'b1}});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
