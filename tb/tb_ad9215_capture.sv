// tb_ad9215_capture: self-checking testbench for ad9215_capture at the default decimation
// (50 MHz ADC clock, one sample per microsecond). The ADC port is driven with a counter
// that changes every clock, so each sample's value shows exactly which clock it was taken
// from. Checks the 50-cycle sample spacing, the 2-cycle capture delay, the out-of-range
// flag, the ADC clock, and power-down with no samples while disabled.
module tb_ad9215_capture;
  import plating_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, enable = 1'b0;
  logic ad_clk, ad_pdwn, ad_otr, sample_valid, sample_otr;
  adc_code_t ad_data, sample;
  int checks = 0, failures = 0;
  longint cyc = 0;

  always #10 clk = ~clk;

  ad9215_capture dut (.*);

  initial begin
    repeat (100_000) @(posedge clk);
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

  // ADC port: after rising edge t the port holds t mod 1024; otr is
  // high when t is a multiple of 7.
  always @(posedge clk) begin
    cyc <= cyc + 1;
    ad_data <= adc_code_t'(cyc + 1);
    ad_otr  <= ((cyc + 1) % 7) == 0;
  end

  longint last_t, t;
  int n;

  initial begin
    ad_data = '0; ad_otr = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check("power-down while disabled", ad_pdwn, 1);
    check("ad_clk follows clk (low phase)", ad_clk, 0);
    #10 check("ad_clk follows clk (high phase)", ad_clk, 1);
    n = 0;
    repeat (200) begin @(posedge clk); if (sample_valid) n++; end
    check("no samples while disabled", n, 0);
    @(negedge clk);
    enable = 1'b1;
    @(negedge clk);
    check("ADC running", ad_pdwn, 0);
    last_t = -1;
    for (int k = 0; k < 20; k++) begin
      @(negedge clk);
      while (!sample_valid) @(negedge clk);
      t = cyc;
      // after edge t the port holds t; the two input registers and the sample register
      // each add one edge, so the sample is the port value t-3
      check("sample value", sample, (t - 3) % 1024);
      check("sample otr", sample_otr, ((t - 3) % 7) == 0);
      if (last_t >= 0) check("sample spacing (cycles)", t - last_t, 50);
      last_t = t;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
