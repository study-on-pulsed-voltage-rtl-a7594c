// tb_serial_comm: self-checking testbench for serial_comm at 9600 baud from 50 MHz.
// Offers averages like the averager does and decodes the serial line. Checks that each
// value is sent as {6'b0, v[9:8]} then v[7:0], that values arriving while a pair is on the
// line collapse to the newest one, and that nothing is sent without a new value.
module tb_serial_comm;
  import plating_pkg::*;
  localparam int unsigned DIV = 5208;
  logic clk = 1'b0, rst_n = 1'b0, avg_valid = 1'b0, txd;
  adc_code_t avg;
  logic [15:0] sent_count;
  logic rx_valid, rx_ferr;
  logic [7:0] rx_data;
  longint rx_start;
  int checks = 0, failures = 0;

  always #10 clk = ~clk;

  serial_comm dut (.*);
  uart_rx_model #(.BIT_CYC(DIV)) rx (.clk, .en(rst_n), .rxd(txd), .valid(rx_valid), .data(rx_data),
                                     .frame_err(rx_ferr), .start_cycle(rx_start));

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  logic [7:0] rx_bytes [$];
  always @(posedge clk) if (rx_valid) rx_bytes.push_back(rx_data);

  task automatic offer(input adc_code_t v);
    @(negedge clk);
    avg = v; avg_valid = 1'b1;
    @(negedge clk);
    avg_valid = 1'b0;
  endtask

  task automatic expect_pair(input adc_code_t v);
    while (rx_bytes.size() < 2) @(negedge clk);
    check("high byte", rx_bytes.pop_front(), {6'b0, v[9:8]});
    check("low byte", rx_bytes.pop_front(), v[7:0]);
  endtask

  initial begin
    avg = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (3 * DIV) @(posedge clk);
    check("nothing sent before a value", rx_bytes.size(), 0);
    offer(10'd818);
    expect_pair(10'd818);
    // while the line is busy with 819, three more arrive: only the last (1023) follows
    offer(10'd819);
    repeat (1000) @(negedge clk);
    offer(10'd820);
    repeat (15000) @(negedge clk);
    offer(10'd5);
    repeat (15000) @(negedge clk);
    offer(10'd1023);
    expect_pair(10'd819);
    expect_pair(10'd1023);
    repeat (25 * DIV) @(negedge clk);
    check("no further bytes", rx_bytes.size(), 0);
    check("pairs sent", sent_count, 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
