// Testbench of qsg_coeff. For frequencies across 40..60 Hz the four
// coefficients are compared with $sin/$tan/$ln values of their defining
// formulas (tolerance 2e-6 relative or 3e-7 absolute, i.e. a few LSBs), and the time from start to done with
// the expected 2*QF+2+2 = 52 cycles. Also checks the reset values (50 Hz).
`timescale 1ns/1ps
module tb_qsg_coeff;
  import pll_pkg::*;
  logic clk = 0, rst_n = 0, start = 0;
  q_t delta = '0, c_isin, c_tan, c_tphi, c_gain;
  logic busy, done;
  int checks = 0, failures = 0;

  qsg_coeff dut (.*);
  always #5 clk = ~clk;

  initial begin
    #1_000_000; failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic real r(q_t v); return real'(v) / 2.0**QF; endfunction

  task automatic cmp(real got, real want, string what);
    real e;
    e = got - want;
    if (e < 0.0) e = -e;
    checks++;
    if (e > 3e-7 && e > 2e-6 * ((want < 0.0) ? -want : want)) begin
      failures++; $display("FAIL %s: %.9f vs %.9f", what, got, want);
    end
  endtask

  task automatic expect_all(real d);
    real ln1, tp;
    ln1 = $ln(1.0 - 1.0/32.0);
    tp  = d / ln1;
    cmp(r(c_isin), 1.0 / $sin(2.0 * d), "1/sin(2d)");
    cmp(r(c_tan),  $tan(d), "tan(d)");
    cmp(r(c_tphi), tp, "tan(phi)");
    cmp(r(c_gain), (-ln1 * 32.0) * (1.0 + tp * tp), "gain");
  endtask

  initial begin
    int cyc;
    real f, d;
    repeat (3) @(posedge clk); rst_n <= 1; @(posedge clk);
    expect_all(2.0 * 3.141592653589793 * 50.0 * 156.25e-6);
    for (int n = 0; n < 60; n++) begin
      f = 40.0 + 20.0 * real'($urandom % 10000) / 10000.0;
      if (n == 0) f = 40.0;
      if (n == 1) f = 60.0;
      d = 2.0 * 3.141592653589793 * f * 156.25e-6;
      delta <= to_q(d); start <= 1;
      @(posedge clk); start <= 0;
      cyc = 0;
      while (!done) begin @(posedge clk); cyc++; end
      #1;
      checks++;
      if (cyc != 52) begin failures++; $display("FAIL latency %0d", cyc); end
      expect_all(real'(to_q(d)) / 2.0**QF);
      repeat ($urandom % 5) @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
