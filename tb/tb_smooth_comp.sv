// Testbench of smooth_comp. (1) Random operands against
// beta = beta'*c_gain - alpha*c_tphi. (2) A sinusoid passed through the
// smoother model of the document (gain H, phase phi, with tan(phi) =
// d/ln(1-gamma) and H cos(phi) = |gamma/ln(1-gamma)| cos^2(phi)) must come
// out as the exact quadrature -A cos(theta).
`timescale 1ns/1ps
module tb_smooth_comp;
  import pll_pkg::*;
  logic clk = 0, rst_n = 0, en = 0;
  q_t beta_p = '0, alpha = '0, c_gain = '0, c_tphi = '0, beta;
  int checks = 0, failures = 0;

  smooth_comp dut (.*);
  always #5 clk = ~clk;

  initial begin
    #1_000_000; failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic real r(q_t v); return real'(v) / 2.0**QF; endfunction

  initial begin
    real e, d, ln1, tphi, phi, h, th, a;
    repeat (3) @(posedge clk); rst_n <= 1; @(posedge clk);
    for (int k = 0; k < 300; k++) begin
      beta_p <= to_q((real'($urandom % 2000) - 1000.0) / 1000.0);
      alpha  <= to_q((real'($urandom % 2000) - 1000.0) / 1000.0);
      c_gain <= to_q(1.0 + real'($urandom % 3000) / 1000.0);
      c_tphi <= to_q(-real'($urandom % 2000) / 1000.0);
      @(posedge clk); en <= 1; @(posedge clk); en <= 0; @(posedge clk);
      e = r(beta) - (r(beta_p) * r(c_gain) - r(alpha) * r(c_tphi));
      checks++;
      if (e > 1e-6 || e < -1e-6) begin failures++; $display("FAIL random %0d: %f", k, e); end
    end
    ln1 = $ln(1.0 - 1.0/32.0);
    d = 2.0 * 3.141592653589793 * 50.0 * 156.25e-6;
    tphi = d / ln1; phi = $atan(tphi); a = 0.9;
    h = (1.0/32.0) / (-ln1) * $cos(phi);           // H, so that H cos(phi) = |g/ln| cos^2
    c_gain <= to_q((-ln1 * 32.0) * (1.0 + tphi * tphi));
    c_tphi <= to_q(tphi);
    for (int k = 0; k < 128; k++) begin
      th = d * k;
      alpha  <= to_q(a * $sin(th));
      beta_p <= to_q(-h * a * $cos(th + phi));
      @(posedge clk); en <= 1; @(posedge clk); en <= 0; @(posedge clk);
      e = r(beta) + a * $cos(th);
      checks++;
      if (e > 1e-5 || e < -1e-5) begin failures++; $display("FAIL sinusoid k=%0d: %f", k, e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
