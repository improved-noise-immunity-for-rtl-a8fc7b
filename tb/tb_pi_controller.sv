// Testbench of pi_controller with the PLL loop-filter gains (Kp = 46,
// Ki = 1024, Ts = 156.25 us, output in rad per sample). A real-arithmetic
// model of the same PI law, with the same integrator and output limits,
// runs alongside: random errors, a long positive error that saturates the
// output, then a negative one, which must leave the limit at once (no wind-up).
`timescale 1ns/1ps
module tb_pi_controller;
  import pll_pkg::*;
  localparam real TS = 156.25e-6;
  localparam real LO = -0.0098, HI = 0.0098;
  logic clk = 0, rst_n = 0, en = 0;
  q_t err = '0, y;
  logic sat;
  int checks = 0, failures = 0, sat_seen = 0;
  real integ = 0.0, ym;

  pi_controller #(.KP(46.0), .KI(1024.0), .TS(TS), .OUT_SCALE(TS), .OUT_MIN(LO), .OUT_MAX(HI)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #2_000_000; failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic step(real e);
    real ev, yn;
    bit   sm;
    err <= to_q(e);
    @(posedge clk); en <= 1; @(posedge clk); en <= 0; @(posedge clk);
    ev = real'(to_q(e)) / 2.0**QF;
    integ = integ + 1024.0 * TS * TS * ev;
    if (integ > HI) integ = HI;
    if (integ < LO) integ = LO;
    yn = 46.0 * TS * ev + integ;
    sm = (yn > HI) || (yn < LO);
    if (yn > HI) yn = HI;
    if (yn < LO) yn = LO;
    ym = yn;
    checks += 2;
    if (real'(y) / 2.0**QF - yn > 1e-6 || yn - real'(y) / 2.0**QF > 1e-6) begin
      failures++; $display("FAIL y %f model %f", real'(y) / 2.0**QF, yn);
    end
    if (sat != sm) begin failures++; $display("FAIL sat flag"); end
    if (sat) sat_seen++;
  endtask

  initial begin
    repeat (3) @(posedge clk); rst_n <= 1; @(posedge clk);
    for (int n = 0; n < 300; n++) step((real'($urandom % 2000) - 1000.0) / 1000.0);
    repeat (2000) step(1.0);
    checks++;
    if (!sat) begin failures++; $display("FAIL: no saturation"); end
    step(-1.0);
    checks++;
    if (ym >= HI) begin failures++; $display("FAIL: wound up"); end
    repeat (200) step(-0.3);
    $display("saturated steps: %0d", sat_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
