// Pulse-width modulator of the PFC switch command.
//
// A counter runs from 0 to PERIOD-1 (a sawtooth carrier); pwm_out is high
// while the counter is below duty*PERIOD. The duty command (Q8.24, limited to
// [0, 1]) is taken once per period, at the counter's wrap, so a new command
// never cuts a pulse short. period_start pulses in the first cycle of each
// period and serves as the sampling strobe of the controller, so sampling is
// synchronous with the carrier.
//
// The document names the PWM block only. The sawtooth carrier, the
// once-per-period update and the switching period equal to the sampling
// period (15625 cycles of a 100 MHz clock = 156.25 us) are this design's
// choices.
module pwm
  import pll_pkg::*;
#(
  parameter int PERIOD = 15625
) (
  input  logic clk,
  input  logic rst_n,
  input  q_t   duty,
  output logic pwm_out,
  output logic period_start
);

  localparam int CW = $clog2(PERIOD + 1);

  logic [CW-1:0] cnt;
  logic [CW-1:0] cmp;
  logic [CW-1:0] cmp_next;

  always_comb begin
    q_t d;
    logic [2*QW-1:0] p;
    d        = qclamp(duty, '0, Q_ONE);
    p        = 64'($unsigned(d)) * 64'(PERIOD);
    cmp_next = CW'(p >> QF);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt          <= '0;
      cmp          <= '0;
      period_start <= 1'b0;
    end else begin
      period_start <= (cnt == CW'(PERIOD - 1));
      if (cnt == CW'(PERIOD - 1)) begin
        cnt <= '0;
        cmp <= cmp_next;
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end

  // Registered so the output is glitch-free; it lags the counter by a cycle,
  // like period_start.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) pwm_out <= 1'b0;
    else        pwm_out <= (cnt == CW'(PERIOD - 1)) ? (cmp_next != '0) : (cnt + 1'b1 < cmp);
  end

endmodule
