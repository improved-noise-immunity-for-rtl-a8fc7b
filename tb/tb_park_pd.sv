// Testbench of park_pd: random grid phase theta_g, amplitude V and PLL
// phase theta; alpha = V sin(theta_g), beta = -V cos(theta_g). Expects
// vq = V sin(theta_g - theta) and vd = V cos(theta_g - theta).
`timescale 1ns/1ps
module tb_park_pd;
  import pll_pkg::*;
  logic clk = 0, rst_n = 0, en = 0;
  q_t alpha = '0, beta = '0, sin_t = '0, cos_t = '0, vd, vq;
  int checks = 0, failures = 0;

  park_pd dut (.*);
  always #5 clk = ~clk;

  initial begin
    #1_000_000; failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic real r(q_t v); return real'(v) / 2.0**QF; endfunction

  initial begin
    real tg, t, v, e1, e2;
    repeat (3) @(posedge clk); rst_n <= 1; @(posedge clk);
    for (int n = 0; n < 400; n++) begin
      tg = 6.283185307 * real'($urandom % 10000) / 10000.0;
      t  = 6.283185307 * real'($urandom % 10000) / 10000.0;
      v  = 0.2 + real'($urandom % 1000) / 1000.0;
      alpha <= to_q(v * $sin(tg)); beta <= to_q(-v * $cos(tg));
      sin_t <= to_q($sin(t));      cos_t <= to_q($cos(t));
      @(posedge clk); en <= 1; @(posedge clk); en <= 0; @(posedge clk);
      e1 = r(vq) - v * $sin(tg - t);
      e2 = r(vd) - v * $cos(tg - t);
      checks += 2;
      if (e1 > 1e-6 || e1 < -1e-6) begin failures++; $display("FAIL vq %f vs %f", r(vq), v * $sin(tg - t)); end
      if (e2 > 1e-6 || e2 < -1e-6) begin failures++; $display("FAIL vd %f vs %f", r(vd), v * $cos(tg - t)); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
