// Testbench of vco. Random phase steps around 40..60 Hz (and some large
// ones that reach every quadrant quickly) are applied; a 64-bit model of
// the accumulator predicts theta exactly, and sin/cos are compared with
// $sin/$cos of that phase (tolerance 2e-6). The outputs must update
// ITER+2 = 26 clock edges after the edge that samples en; the loop below,
// which starts counting at that edge and sees done one edge after it rises,
// counts ITER+4 = 28.
`timescale 1ns/1ps
module tb_vco;
  import pll_pkg::*;
  logic clk = 0, rst_n = 0, en = 0;
  q_t delta = '0, sin_t, cos_t;
  phase_t theta;
  logic busy, done;
  int checks = 0, failures = 0;
  longint unsigned th_m = 0;

  vco dut (.*);
  always #5 clk = ~clk;

  initial begin
    #2_000_000; failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic real r(q_t v); return real'(v) / 2.0**QF; endfunction

  initial begin
    real d, ang, e1, e2;
    int cyc;
    longint unsigned k_turn, inc;
    k_turn = longint'(256.0 / (2.0 * 3.141592653589793) * 2.0**QF);
    repeat (3) @(posedge clk); rst_n <= 1; @(posedge clk);
    checks++;
    if (sin_t != 0 || cos_t != Q_ONE || theta != 0) begin failures++; $display("FAIL reset"); end
    for (int n = 0; n < 500; n++) begin
      d = (n % 7 == 0) ? real'($urandom % 3000) / 1000.0
                       : 6.283185307 * (40.0 + real'($urandom % 2000) / 100.0) * 156.25e-6;
      delta <= to_q(d);
      @(posedge clk); en <= 1; @(posedge clk); en <= 0;
      cyc = 1;
      while (!done) begin @(posedge clk); cyc++; end
      #1;
      inc  = (64'(longint'(to_q(d))) * k_turn) >> QF;
      th_m = (th_m + inc) & 64'hffff_ffff;
      ang  = real'(th_m) / 2.0**32 * 6.283185307179586;
      checks += 4;
      if (cyc != 28) begin failures++; $display("FAIL latency %0d", cyc); end
      if (64'(theta) != th_m) begin failures++; $display("FAIL theta %h vs %h", theta, th_m); end
      e1 = r(sin_t) - $sin(ang);
      e2 = r(cos_t) - $cos(ang);
      if (e1 > 2e-6 || e1 < -2e-6) begin failures++; $display("FAIL sin %f vs %f", r(sin_t), $sin(ang)); end
      if (e2 > 2e-6 || e2 < -2e-6) begin failures++; $display("FAIL cos %f vs %f", r(cos_t), $cos(ang)); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
