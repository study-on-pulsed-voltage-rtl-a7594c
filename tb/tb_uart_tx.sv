// tb_uart_tx: self-checking testbench for uart_tx at 9600 baud from 50 MHz (5208 clocks
// per bit). A receiver model decodes the line; each byte must arrive intact with a high
// stop bit, the frame must take 10 bit times before tx_ready returns, and the line must
// idle high.
module tb_uart_tx;
  localparam int unsigned DIV = 5208;
  logic clk = 1'b0, rst_n = 1'b0, tx_valid = 1'b0, tx_ready, txd;
  logic [7:0] tx_data;
  logic rx_valid, rx_ferr;
  logic [7:0] rx_data;
  longint rx_start;
  int checks = 0, failures = 0;
  longint cyc = 0;

  always #10 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  uart_tx dut (.*);
  uart_rx_model #(.BIT_CYC(DIV)) rx (.clk, .en(rst_n), .rxd(txd), .valid(rx_valid), .data(rx_data),
                                     .frame_err(rx_ferr), .start_cycle(rx_start));

  initial begin
    repeat (1_000_000) @(posedge clk);
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

  logic [7:0] sent [$];
  always @(posedge clk) if (rx_valid) begin
    check("received byte", rx_data, sent.pop_front());
    check("stop bit high", rx_ferr, 0);
  end

  longint t0, t1;
  logic [7:0] bytes [5] = '{8'h55, 8'h00, 8'hFF, 8'h03, 8'h33};

  initial begin
    tx_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (10) @(posedge clk);
    check("line idles high", txd, 1);
    foreach (bytes[i]) begin
      @(negedge clk);
      while (!tx_ready) @(negedge clk);
      tx_data = bytes[i]; tx_valid = 1'b1;
      sent.push_back(bytes[i]);
      t0 = cyc;
      @(negedge clk);
      tx_valid = 1'b0;
      check("busy after accept", tx_ready, 0);
      while (!tx_ready) @(negedge clk);
      t1 = cyc;
      check("frame length (cycles)", t1 - t0, 10 * DIV + 1);
    end
    repeat (3 * DIV) @(posedge clk);
    check("all bytes received", sent.size(), 0);
    check("line idles high after frames", txd, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
