// Testbench of qsg_2s. Feeds s_k = A sin(d*k) (and the previous sample as
// s_{k-1}, as the smoother would) with the coefficients of that frequency,
// computed here with $sin/$tan, and expects the lagging quadrature
// beta'_k = -A cos(d*k) from the third sample on, for several frequencies.
// Random inputs are then compared with the defining formula.
`timescale 1ns/1ps
module tb_qsg_2s;
  import pll_pkg::*;
  logic clk = 0, rst_n = 0, en = 0;
  q_t s_k = '0, s_km1 = '0, c_isin = '0, c_tan = '0, beta_p;
  int checks = 0, failures = 0;

  qsg_2s dut (.*);
  always #5 clk = ~clk;

  initial begin
    #2_000_000; failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic real r(q_t v); return real'(v) / 2.0**QF; endfunction

  initial begin
    real f, d, a, e, s2, s0;
    repeat (3) @(posedge clk); rst_n <= 1; @(posedge clk);
    foreach (f_list[i]) begin
      f = f_list[i]; d = 2.0 * 3.141592653589793 * f * 156.25e-6; a = 0.8;
      c_isin <= to_q(1.0 / $sin(2.0 * d));
      c_tan  <= to_q($tan(d));
      for (int k = 0; k < 200; k++) begin
        s_km1 <= s_k;
        s_k   <= to_q(a * $sin(d * k));
        en <= 1; @(posedge clk); en <= 0; @(posedge clk);
        if (k >= 2) begin
          e = r(beta_p) + a * $cos(d * k);
          checks++;
          if (e > 2e-5 || e < -2e-5) begin
            failures++; $display("FAIL f=%f k=%0d beta'=%f exp %f", f, k, r(beta_p), -a * $cos(d * k));
          end
        end
      end
    end
    // Random values: beta' = (s_{k-2} - s_k) c_isin + s_k c_tan.
    for (int k = 0; k < 300; k++) begin
      s2 = r(s_km1);
      s_km1 <= to_q((real'($urandom % 2000) - 1000.0) / 1000.0);
      s_k   <= to_q((real'($urandom % 2000) - 1000.0) / 1000.0);
      c_isin <= to_q(8.0 + real'($urandom % 1000) / 200.0);
      c_tan  <= to_q(real'($urandom % 1000) / 10000.0);
      en <= 1; @(posedge clk); en <= 0; @(posedge clk);
      s0 = r(s_k);
      e = r(beta_p) - ((s2 - s0) * r(c_isin) + s0 * r(c_tan));
      if (k > 0) begin
        checks++;
        if (e > 1e-5 || e < -1e-5) begin failures++; $display("FAIL random k=%0d", k); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real f_list [4] = '{45.0, 49.0, 50.0, 55.0};
endmodule
