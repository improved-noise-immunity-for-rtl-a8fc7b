// Numerically controlled oscillator of the PLL.
//
// A 32-bit phase accumulator (2^32 = one turn) advances by the phase step
// per sample delta = omega*Ts on every en strobe; the new phase is then
// handed to a CORDIC that produces sin(theta) and cos(theta). The document
// describes the VCO only by its function; the accumulator and the CORDIC are
// this design's choice.
//
// Interface: en (one cycle) reads delta (rad per sample, Q8.24, positive);
// theta is updated at the edge that samples en, and sin_t/cos_t ITER+2
// edges later, when done rises for one cycle. After reset theta = 0, sin_t = 0, cos_t = 1.
module vco
  import pll_pkg::*;
#(
  parameter int ITER = 24
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   en,
  input  q_t     delta,
  output phase_t theta,
  output q_t     sin_t,
  output q_t     cos_t,
  output logic   busy,
  output logic   done
);

  localparam q_t K_TURN = to_q(256.0 / (2.0 * PI_R));   // rad -> 2^-32 turn, / 2^24

  phase_t inc;
  logic   start_c;
  logic   c_busy;

  always_comb begin
    logic signed [2*QW-1:0] p;
    p   = 64'(delta) * 64'(K_TURN);
    inc = phase_t'(p >>> QF);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      theta   <= '0;
      start_c <= 1'b0;
    end else begin
      start_c <= en;
      if (en) theta <= theta + inc;
    end
  end

  cordic_sincos #(.ITER(ITER)) u_cordic (
    .clk   (clk),
    .rst_n (rst_n),
    .start (start_c),
    .phase (theta),
    .sin_o (sin_t),
    .cos_o (cos_t),
    .busy  (c_busy),
    .done  (done)
  );

  assign busy = c_busy || start_c;

endmodule
