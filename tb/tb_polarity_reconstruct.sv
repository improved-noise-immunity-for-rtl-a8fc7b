// Testbench of polarity_reconstruct: random rectified codes and polarity
// bits; the signed per-unit output is compared with +/- code/PEAK_CODE
// computed in real arithmetic (tolerance: the rounding of the 1/PEAK scale
// times the largest code, under 1e-6 pu). Also checks that en gates the update.
`timescale 1ns/1ps
module tb_polarity_reconstruct;
  import pll_pkg::*;
  logic clk = 0, rst_n = 0, en = 0, polarity = 0;
  logic [11:0] adc_code = '0;
  q_t alpha;
  int checks = 0, failures = 0;

  polarity_reconstruct dut (.*);
  always #5 clk = ~clk;

  initial begin
    #1_000_000; failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    real exp_v, got;
    repeat (3) @(posedge clk); rst_n <= 1;
    for (int n = 0; n < 500; n++) begin
      adc_code <= (n == 0) ? 12'd3500 : (n == 1) ? 12'd4095 : 12'($urandom);
      polarity <= (n == 2) ? 1'b0 : 1'($urandom);
      en <= 1;
      @(posedge clk); en <= 0;
      @(posedge clk);
      exp_v = (polarity ? 1.0 : -1.0) * real'(adc_code) / 3500.0;
      got   = real'(alpha) / 2.0**QF;
      checks++;
      if (got - exp_v > 1e-6 || exp_v - got > 1e-6) begin
        failures++; $display("FAIL code %0d pol %0d: %f vs %f", adc_code, polarity, got, exp_v);
      end
      // en low: no change
      adc_code <= ~adc_code; polarity <= ~polarity;
      @(posedge clk); @(posedge clk);
      checks++;
      if (real'(alpha) / 2.0**QF != got) begin failures++; $display("FAIL: update without en"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
