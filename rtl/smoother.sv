// First-order smoothing filter G(z) = gamma / (1 - (1-gamma) z^-1).
//
// s_k = gamma*alpha_k + (1-gamma)*s_{k-1}, computed as
// s_k = s_{k-1} + (alpha_k - s_{k-1}) * 2^-GAMMA_SHIFT, which is the same
// recursion with a single shift. The smoothing factor gamma = 2^-5 = 0.03125
// is the document's value; restricting gamma to powers of two is this
// design's choice so that it costs no multiplier.
//
// The state register s_km1 is the filter's own delay and is also the first
// delay of the two-sample QSG (qsg_2s reads it), so the two share it.
//
// Interface: s_k is combinational from alpha and the state; on en the state
// takes s_k, so after the strobe s_km1 holds the newest smoothed sample.
module smoother
  import pll_pkg::*;
#(
  parameter int GAMMA_SHIFT = 5
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  q_t   alpha,   // alpha_k
  output q_t   s_k,     // smoothed sample of this instant
  output q_t   s_km1    // smoothed sample of the previous instant (state)
);

  always_comb s_k = qadd(s_km1, qsub(alpha, s_km1) >>> GAMMA_SHIFT);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  s_km1 <= '0;
    else if (en) s_km1 <= s_k;
  end

endmodule
