// Testbench of pwm at PERIOD = 100: random duty commands including 0, 1
// and out-of-range values. Each period must last PERIOD cycles between
// period_start pulses and hold exactly floor(clamp(duty)*PERIOD) high
// cycles of the command present at the period's start; every command is
// changed early in the period it must not affect.
`timescale 1ns/1ps
module tb_pwm;
  import pll_pkg::*;
  localparam int P = 100;
  logic clk = 0, rst_n = 0;
  q_t duty = '0;
  logic pwm_out, period_start;
  int checks = 0, failures = 0;

  pwm #(.PERIOD(P)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #5_000_000; failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int highs, len, want;
    real dr;
    q_t cmd;
    repeat (3) @(posedge clk); rst_n <= 1;
    while (!period_start) @(posedge clk);
    // Command for the first measured period, set in the period before it.
    repeat (P / 2) @(posedge clk);
    cmd  = to_q(0.0);
    duty <= cmd;
    for (int n = 0; n < 300; n++) begin
      case (n)
        0: dr = 1.0;
        1: dr = 1.7;
        2: dr = -0.4;
        default: dr = real'($urandom % 10000) / 10000.0;
      endcase
      while (!period_start) @(posedge clk);
      // This period must follow the command present at its start ...
      want = (cmd <= 0) ? 0 : (cmd >= Q_ONE) ? P : int'((longint'(cmd) * P) >>> QF);
      highs = 0; len = 0;
      do begin
        if (pwm_out) highs++;
        len++;
        // ... even though the next command arrives a few cycles into it.
        if (len == 3 + n % (P / 2)) begin
          cmd  = to_q(dr);
          duty <= cmd;
        end
        @(posedge clk);
      end while (!period_start);
      checks += 2;
      if (len != P) begin failures++; $display("FAIL period %0d", len); end
      if (highs != want) begin failures++; $display("FAIL duty: %0d high, want %0d", highs, want); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
