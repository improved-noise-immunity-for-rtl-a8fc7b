// Attenuation and phase compensation of the smoothed quadrature signal.
//
// The smoother attenuates the fundamental by H_k and delays it by phi_k, so
// the QSG output is beta'_k = H_k*(alpha_k*sin(phi_k) + beta_k*cos(phi_k)).
// This block undoes both:
//     beta_k = beta'_k * c_gain - alpha_k * c_tphi,
// with c_gain = 1/(H_k cos(phi_k)) and c_tphi = tan(phi_k) from qsg_coeff.
// alpha_k is the raw (unsmoothed) sample.
//
// Interface: inputs are read on en; beta is registered and valid from the
// next cycle.
module smooth_comp
  import pll_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  q_t   beta_p,   // beta'_k from qsg_2s
  input  q_t   alpha,    // alpha_k
  input  q_t   c_gain,   // 1/(H_k cos phi_k)
  input  q_t   c_tphi,   // tan(phi_k), negative (phi_k is a lag)
  output q_t   beta
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  beta <= '0;
    else if (en) beta <= qsub(qmul(beta_p, c_gain), qmul(alpha, c_tphi));
  end

endmodule
