// Testbench of smoother: a noisy sinusoid and a step are filtered and the
// output compared with the recursion s_k = gamma*alpha_k + (1-gamma)*s_{k-1},
// gamma = 1/32, in real arithmetic. The step response must also reach
// 1 - (31/32)^32 = 0.638 after 32 samples, the filter's time constant.
`timescale 1ns/1ps
module tb_smoother;
  import pll_pkg::*;
  logic clk = 0, rst_n = 0, en = 0;
  q_t alpha = '0, s_k, s_km1;
  int checks = 0, failures = 0;
  real model = 0.0;

  smoother dut (.*);
  always #5 clk = ~clk;

  initial begin
    #1_000_000; failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic sample(real a);
    q_t prev;
    alpha <= to_q(a);
    @(posedge clk);
    model = model / 32.0 * 31.0 + real'(to_q(a)) / 2.0**QF / 32.0;
    checks++;
    if (real'(s_k) / 2.0**QF - model > 2e-6 || model - real'(s_k) / 2.0**QF > 2e-6) begin
      failures++; $display("FAIL s_k %f model %f", real'(s_k) / 2.0**QF, model);
    end
    prev = s_k;
    en <= 1; @(posedge clk); en <= 0;
    #1;
    checks++;
    if (s_km1 != prev) begin failures++; $display("FAIL: state not updated"); end
  endtask

  initial begin
    repeat (3) @(posedge clk); rst_n <= 1; @(posedge clk);
    for (int k = 0; k < 32; k++) sample(1.0);
    checks++;
    if (real'(s_km1) / 2.0**QF < 0.637 || real'(s_km1) / 2.0**QF > 0.640) begin
      failures++; $display("FAIL step after 32 samples: %f", real'(s_km1) / 2.0**QF);
    end
    for (int k = 0; k < 600; k++)
      sample($sin(k * 0.0490873852) + (real'($urandom % 1000) - 500.0) / 5000.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
